// plotting: the 700 x 9-bit trace memory between the acquisition side and the display side.
//
// The computation module writes one scaled trace height per column (write port, one write per
// cycle); the frame buffer's drawing engine reads column heights back (read port, registered
// output, one cycle of latency) to colour one pixel per column. The size follows the design; a
// simple dual-port RAM, which maps to one FPGA block RAM, is this design's choice.
module plotting
  import scope_pkg::*;
#(
  parameter int unsigned N = N_SAMPLES
) (
  input  logic  clk,
  input  logic  we,
  input  addr_t waddr,
  input  plot_t wdata,
  input  addr_t raddr,
  output plot_t rdata
);
  plot_t mem [N];

  always_ff @(posedge clk) begin
    if (we && waddr < addr_t'(N)) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
