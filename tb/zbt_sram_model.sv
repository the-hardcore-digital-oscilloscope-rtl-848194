// zbt_sram_model: behavioural model of one pipelined ZBT SRAM chip (512K x 36, four 9-bit byte
// lanes) as the frame buffer drives it. Simulation only.
//
// A command is sampled at a clock edge when ce_n is low. A read returns the addressed word on
// rdata two cycles after its command cycle; a write takes its data (wdata) two cycles after its
// command cycle and updates only the lanes whose bwe_n bit is low. The memory starts filled with INIT.
module zbt_sram_model #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 36,
  parameter logic [35:0] INIT = '0
) (
  input  logic          clk,
  input  logic          ce_n,
  input  logic          we_n,
  input  logic [3:0]    bwe_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  input  logic          wdata_oe,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  logic          v1, v2, w1, w2;
  logic [3:0]    b1, b2;
  logic [AW-1:0] a1, a2;

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = INIT;
    v1 = 0; v2 = 0; w1 = 0; w2 = 0; b1 = '1; b2 = '1; a1 = '0; a2 = '0; rdata = '0;
  end

  always @(posedge clk) begin
    v1 <= !ce_n;
    w1 <= !ce_n && !we_n;
    b1 <= bwe_n;
    a1 <= addr;
    v2 <= v1;
    w2 <= w1;
    b2 <= b1;
    a2 <= a1;
    if (v1 && !w1) rdata <= mem[a1];
    if (w2) begin
      for (int l = 0; l < 4; l++)
        if (!b2[l]) mem[a2][l*9 +: 9] <= wdata[l*9 +: 9];
    end
  end

  // write data must be driven exactly when a write reaches the data phase (checked once the
  // controller's registers have settled after power-up)
  int cyc = 0;
  always @(posedge clk) begin
    if (cyc < 8) cyc <= cyc + 1;
    else if (w2 && !wdata_oe) $error("ZBT write data not driven");
  end

  function automatic logic [7:0] pixel(int unsigned x, int unsigned y);
    logic [DW-1:0] w = mem[{1'b0, 10'(y), 8'(x >> 2)}];
    return w[(x % 4) * 9 +: 8];
  endfunction
endmodule
