// tb_rendering: sends NFRAME with known measurements and settings, accepts the pixel stream
// with a randomly stalling ready, and checks: the number of writes (grid + text), that no write
// moves while stalled, every grid-line pixel, and every text cell against the expected string
// drawn through a reference character map. Two frames with different values are checked, and
// the renderer must stay done and silent between frames.
module tb_rendering;
  import scope_pkg::*;
  logic clk = 0, rst = 1;
  logic nframe = 0;
  volt_t vmin = '0, vmax = '0, vmean = '0;
  freq_t freq = '0;
  setting_t duration = '0, scale = '0;
  pixel_wr_t pix;
  logic pix_valid, pix_ready = 0, done;
  logic [5:0] char_code;
  logic [7:0] char_xy;
  logic char_pixel;
  int checks = 0, failures = 0;

  byte unsigned screen [1024][768];
  int writes;

  rendering dut (.clk, .rst, .nframe, .vmin, .vmax, .vmean, .freq, .duration, .scale,
                 .pix, .pix_valid, .pix_ready, .done, .char_code, .char_xy, .char_pixel);
  charmap u_font (.char_code, .xy(char_xy), .pixel(char_pixel));

  // reference glyph lookup
  logic [5:0] ref_code;
  logic [7:0] ref_xy;
  logic ref_pixel;
  charmap u_ref (.char_code(ref_code), .xy(ref_xy), .pixel(ref_pixel));

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  // capture writes; a stalled offer must not change
  pixel_wr_t held;
  logic held_v = 0;
  int stall_changes = 0;
  always @(posedge clk) begin
    if (held_v && pix_valid && pix != held) stall_changes++;
    held_v <= pix_valid && !pix_ready;
    held   <= pix;
    if (pix_valid && pix_ready) begin
      screen[pix.x][pix.y] = pix.color;
      writes++;
    end
    pix_ready <= ($urandom_range(0, 3) != 0);
  end

  function automatic string volt_str(int mv);
    return $sformatf("%2d.%03d V  ", mv / 1000, mv % 1000);
  endfunction

  task automatic frame(int v0, int v1, int v2, int f, int dur, int sc, int n, int vdiv);
    string lines [6];
    int cycles = 0;
    vmin = 15'(v0); vmax = 15'(v1); vmean = 15'(v2); freq = 20'(f);
    duration = 4'(dur); scale = 4'(sc);
    for (int x = 0; x < 1024; x++) for (int y = 0; y < 768; y++) screen[x][y] = 8'hAA;
    writes = 0;
    stall_changes = 0;
    @(negedge clk) nframe = 1;
    @(negedge clk) nframe = 0;
    check(!done, "done cleared by nframe");
    while (!done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
    end
    repeat (20) @(negedge clk);
    check(done && !pix_valid, "done and idle after the frame");
    check(writes == 11 * 512 + 9 * 700 + 6 * 16 * 80, $sformatf("writes %0d", writes));
    check(stall_changes == 0, $sformatf("offer changed while stalled %0d times", stall_changes));
    // grid
    for (int k = 0; k <= 10; k++)
      for (int y = 0; y < 512; y++) begin
        int x = 162 + ((k == 10) ? 699 : k * 70);
        check(screen[x][32 + y] == COL_GRID, $sformatf("vertical grid %0d,%0d", x, 32 + y));
      end
    for (int k = 0; k <= 8; k++)
      for (int x = 0; x < 700; x++) begin
        int y = 32 + ((k == 8) ? 511 : k * 64);
        check(screen[162 + x][y] == COL_GRID, $sformatf("horizontal grid %0d,%0d", 162 + x, y));
      end
    check(screen[163][33] == 8'hAA, "inside of the grid untouched");
    // text
    lines[0] = {"VMIN  ", volt_str(v0)};
    lines[1] = {"VMAX  ", volt_str(v1)};
    lines[2] = {"VMEAN ", volt_str(v2)};
    lines[3] = $sformatf("FREQ  %7d HZ", f);
    lines[4] = $sformatf("T/DIV %6d US ", 7 * n);
    lines[5] = $sformatf("V/DIV %3d MV    ", vdiv);
    for (int l = 0; l < 6; l++)
      for (int c = 0; c < 16; c++)
        for (int r = 0; r < 10; r++)
          for (int p = 0; p < 8; p++) begin
            ref_code = 6'(lines[l][c] - 8'h20);
            ref_xy = {4'(r), 4'(p)};
            #0.1;
            check(screen[162 + c * 8 + p][576 + l * 12 + r] == (ref_pixel ? COL_TEXT : COL_BG),
                  $sformatf("text line %0d '%s' char %0d row %0d col %0d", l, lines[l], c, r, p));
          end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(!pix_valid, "silent before the first frame");
    frame(488, 1464, 976, 10000, 3, 0, 10, 250);
    frame(12345, 32767, 7, 1048575, 15, 7, 100000, 31);
    frame(0, 5, 999, 0, 0, 2, 1, 83);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
