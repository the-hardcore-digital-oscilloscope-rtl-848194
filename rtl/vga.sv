// vga: 1024 x 768 at 60 Hz display timing and output stage.
//
// Free-running counters hcount (0..1343) and vcount (0..805) scan the frame one pixel per clock
// (a 65 MHz pixel clock gives 60 Hz). They are sent to the frame buffer (11 + 10 = 21 bits),
// which returns the pixel's 24-bit colour LATENCY cycles later. The sync and blank signals,
// decoded from the counters, are delayed by the same LATENCY so that they line up with the
// colour at the outputs; colour is forced to black while blanked. Syncs are active low.
// The resolution and the 24-bit colour / 21-bit counter buses follow the design; the VESA
// timing numbers and the output stage are this design's choice.
module vga
  import scope_pkg::*;
#(
  parameter int unsigned H_FP    = 24,
  parameter int unsigned H_SYNC  = 136,
  parameter int unsigned H_BP    = 160,
  parameter int unsigned V_FP    = 3,
  parameter int unsigned V_SYNC  = 6,
  parameter int unsigned V_BP    = 29,
  parameter int unsigned LATENCY = 4
) (
  input  logic              clk,
  input  logic              rst,
  output logic [HC_W-1:0]   hcount,
  output logic [VC_W-1:0]   vcount,
  input  logic [RGB_W-1:0]  rgb_in,
  output logic [RGB_W-1:0]  vga_rgb,
  output logic              vga_hsync_n,
  output logic              vga_vsync_n,
  output logic              vga_blank_n
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == HC_W'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == VC_W'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  logic hs, vs, bl;
  assign hs = (hcount >= HC_W'(H_ACTIVE + H_FP)) && (hcount < HC_W'(H_ACTIVE + H_FP + H_SYNC));
  assign vs = (vcount >= VC_W'(V_ACTIVE + V_FP)) && (vcount < VC_W'(V_ACTIVE + V_FP + V_SYNC));
  assign bl = (hcount >= HC_W'(H_ACTIVE)) || (vcount >= VC_W'(V_ACTIVE));

  logic [LATENCY-1:0] hs_d, vs_d, bl_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      hs_d <= '0;
      vs_d <= '0;
      bl_d <= '1;
    end else begin
      hs_d <= {hs_d[LATENCY-2:0], hs};
      vs_d <= {vs_d[LATENCY-2:0], vs};
      bl_d <= {bl_d[LATENCY-2:0], bl};
    end
  end

  assign vga_hsync_n = ~hs_d[LATENCY-1];
  assign vga_vsync_n = ~vs_d[LATENCY-1];
  assign vga_blank_n = ~bl_d[LATENCY-1];
  assign vga_rgb     = bl_d[LATENCY-1] ? '0 : rgb_in;
endmodule
