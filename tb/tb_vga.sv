// tb_vga: runs two full frames and checks the 1024x768 at 60 Hz timing (1344 x 806 total,
// sync widths and positions, active-low syncs), the 4-cycle alignment of sync/blank with the
// counters, and that colour passes only while not blanked.
module tb_vga;
  import scope_pkg::*;
  logic clk = 0, rst = 1;
  logic [HC_W-1:0] hcount;
  logic [VC_W-1:0] vcount;
  logic [RGB_W-1:0] rgb_in, vga_rgb;
  logic vga_hsync_n, vga_vsync_n, vga_blank_n;
  int checks = 0, failures = 0;

  vga dut (.clk, .rst, .hcount, .vcount, .rgb_in, .vga_rgb, .vga_hsync_n, .vga_vsync_n, .vga_blank_n);

  always #5 clk = ~clk;
  assign rgb_in = {13'(hcount), 11'(vcount)} ^ 24'h5A5A5A;

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int h_hist [4], v_hist [4];
  int eh, ev;
  int line_len, hs_len, n_lines, vs_lines;
  logic hs_prev = 1;

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    eh = 1; ev = 0;
    for (int i = 0; i < 4; i++) begin h_hist[i] = -1; v_hist[i] = -1; end
    hs_len = 0; vs_lines = 0;
    for (int cyc = 0; cyc < 2 * 1344 * 806 + 10; cyc++) begin
      @(negedge clk);
      // counters follow the expected scan
      check(int'(hcount) == eh && int'(vcount) == ev, $sformatf("counter %0d,%0d exp %0d,%0d", hcount, vcount, eh, ev));
      // outputs describe the pixel the counters held 4 cycles ago
      if (h_hist[3] >= 0) begin
        int h, v;
        logic bl, hs, vs;
        h = h_hist[3];
        v = v_hist[3];
        bl = (h >= 1024) || (v >= 768);
        hs = (h >= 1048) && (h < 1184);
        vs = (v >= 771) && (v < 777);
        check(vga_blank_n == !bl && vga_hsync_n == !hs && vga_vsync_n == !vs,
              $sformatf("syncs at %0d,%0d: blank_n %b hs_n %b vs_n %b", h, v, vga_blank_n, vga_hsync_n, vga_vsync_n));
        check(vga_rgb == (bl ? 24'h0 : rgb_in), $sformatf("colour at %0d,%0d", h, v));
      end
      for (int i = 3; i > 0; i--) begin h_hist[i] = h_hist[i-1]; v_hist[i] = v_hist[i-1]; end
      h_hist[0] = eh; v_hist[0] = ev;
      if (!vga_hsync_n) hs_len++;
      if (!vga_vsync_n && hs_prev && !vga_hsync_n) vs_lines++;
      hs_prev = vga_hsync_n;
      eh++;
      if (eh == 1344) begin eh = 0; ev = (ev == 805) ? 0 : ev + 1; end
    end
    check(hs_len >= 2 * 806 * 136 && hs_len <= 2 * 806 * 136 + 136, $sformatf("hsync cycles %0d", hs_len));
    check(vs_lines == 2 * 6, $sformatf("vsync lines %0d", vs_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
