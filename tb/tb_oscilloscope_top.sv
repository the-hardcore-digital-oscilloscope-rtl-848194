// tb_oscilloscope_top: end-to-end test of the whole oscilloscope at its default parameters.
//
// A 10 kHz triangle wave (codes 1000..3000, period 1000 ADC samples) is fed at 10 MS/s
// (adc_valid on 10 of every 65 clocks, i.e. 10 MHz at a 65 MHz clock) while two ZBT models hold
// the frame buffers. The test works out each captured record independently from the waveform,
// the trigger level and slope and the decimation, and checks:
//   - VMIN / VMAX / VMEAN / FREQ against that record;
//   - the displayed buffer: exactly one trace pixel per column at the expected row, the grid,
//     and every pixel of the six text lines drawn through a reference character map;
//   - the VGA output against the displayed buffer over a whole frame;
// while it steps the settings through the debounced buttons: longer time scale, a button
// glitch that must be ignored, the highest gain (so the trace clips), a higher trigger level and
// the falling slope. Every mechanism (rising and falling triggers, decimated capture, debounced
// press and rejected glitch, clipping, erase of an old trace, buffer flip, idle wait for
// vertical blank, frequency measurement, trigger-level change) is counted and must occur, and
// the time to construct a frame is measured against the 450,000-cycle drawing budget.
module tb_oscilloscope_top;
  import scope_pkg::*;
  logic clk = 0, rst = 1;
  sample_t adc_data = '0;
  logic adc_valid = 0;
  logic [5:0] btn = '0;
  logic trig_falling = 0;
  logic [1:0] zbt_ce_n, zbt_we_n, zbt_wdata_oe;
  logic [1:0][3:0] zbt_bwe_n;
  logic [1:0][ZBT_AW-1:0] zbt_addr;
  logic [1:0][ZBT_DW-1:0] zbt_wdata, zbt_rdata;
  logic [RGB_W-1:0] vga_rgb;
  logic vga_hsync_n, vga_vsync_n, vga_blank_n;
  int checks = 0, failures = 0;

  oscilloscope_top dut (.clk, .rst, .adc_data, .adc_valid, .btn, .trig_falling, .zbt_ce_n,
    .zbt_we_n, .zbt_bwe_n, .zbt_addr, .zbt_wdata, .zbt_wdata_oe, .zbt_rdata, .vga_rgb,
    .vga_hsync_n, .vga_vsync_n, .vga_blank_n);

  zbt_sram_model u_zbt0 (.clk, .ce_n(zbt_ce_n[0]), .we_n(zbt_we_n[0]), .bwe_n(zbt_bwe_n[0]),
    .addr(zbt_addr[0]), .wdata(zbt_wdata[0]), .wdata_oe(zbt_wdata_oe[0]), .rdata(zbt_rdata[0]));
  zbt_sram_model u_zbt1 (.clk, .ce_n(zbt_ce_n[1]), .we_n(zbt_we_n[1]), .bwe_n(zbt_bwe_n[1]),
    .addr(zbt_addr[1]), .wdata(zbt_wdata[1]), .wdata_oe(zbt_wdata_oe[1]), .rdata(zbt_rdata[1]));

  // reference glyphs
  logic [5:0] ref_code;
  logic [7:0] ref_xy;
  logic ref_pixel;
  charmap u_ref (.char_code(ref_code), .xy(ref_xy), .pixel(ref_pixel));

  always #5 clk = ~clk;

  initial begin
    #400000000;   // 40 M cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // ---------------- ADC stimulus ----------------
  function automatic int tri_wave(int ph);
    return (ph < 500) ? 1000 + 4 * ph : 1000 + 4 * (1000 - ph);
  endfunction
  int acc = 0;
  longint sidx = 0;
  always @(posedge clk) begin
    acc = acc + 10;
    if (acc >= 65) begin
      acc -= 65;
      adc_valid <= 1;
      adc_data  <= 12'(tri_wave(int'(sidx % 1000)));
      sidx++;
    end else adc_valid <= 0;
  end

  // ---------------- mechanism counters ----------------
  int n_trig_rise = 0, n_trig_fall = 0, n_decim = 0, n_meas = 0, n_clip = 0, n_flip = 0;
  int n_erase = 0, n_wait = 0, n_freq = 0, n_press = 0;
  logic ob_q = 1;
  int build_cycles = 0, build_max = 0, builds = 0;
  always @(posedge clk) if (!rst) begin
    // frame construction time: from NFRAME until the engine waits for vertical blank
    if (dut.nframe) build_cycles = 0;
    else if (dut.u_frame_buffer.state != dut.u_frame_buffer.WAIT_FLIP &&
             dut.u_frame_buffer.state != dut.u_frame_buffer.CLEAR) build_cycles++;
    else if (build_cycles > 0) begin
      if (build_cycles > build_max) build_max = build_cycles;
      builds++;
      build_cycles = 0;
    end
    if (dut.u_sampling.state == dut.u_sampling.ARMED && dut.start && adc_valid) begin
      if (trig_falling) n_trig_fall++; else n_trig_rise++;
    end
    if (dut.u_computation.meas_valid) begin
      n_meas++;
      if (dut.capture_n > 1) n_decim++;
      if (dut.freq != 0) n_freq++;
    end
    if (dut.plot_we && (dut.plot_wdata == 0 || dut.plot_wdata == 511)) n_clip++;
    if (ob_q != dut.out_buf) n_flip++;
    ob_q <= dut.out_buf;
    if (dut.u_frame_buffer.state == dut.u_frame_buffer.ERASE && dut.u_frame_buffer.col_v) n_erase++;
    if (dut.u_frame_buffer.state == dut.u_frame_buffer.WAIT_FLIP) n_wait++;
  end

  // ---------------- reference record and measurements ----------------
  int rec [700];
  int e_vmin, e_vmax, e_vmean, e_freq;
  task automatic reference(int n, int level, bit falling);
    int ph0 = -1, mn = 4095, mx = 0, mid, hys, hi, lo, nc = 0, first = 0, last = 0;
    longint sum = 0;
    bit above;
    for (int ph = 1; ph < 1000 && ph0 < 0; ph++) begin
      int a = tri_wave(ph - 1) >= level, b = tri_wave(ph) >= level;
      if (falling ? (a && !b) : (!a && b)) ph0 = ph;
    end
    for (int k = 0; k < 700; k++) begin
      rec[k] = tri_wave((ph0 + n * k) % 1000);
      sum += rec[k];
      if (rec[k] < mn) mn = rec[k];
      if (rec[k] > mx) mx = rec[k];
    end
    mid = (mn + mx) / 2; hys = (mx - mn) / 8; hi = mid + hys; lo = mid - hys;
    above = rec[0] >= mid;
    for (int k = 1; k < 700; k++) begin
      if (!above && rec[k] >= hi) begin
        above = 1;
        if (nc == 0) first = k;
        last = k;
        nc++;
      end else if (above && rec[k] < lo) above = 0;
    end
    e_vmin = mn * 2000 / 4096;
    e_vmax = mx * 2000 / 4096;
    e_vmean = int'(sum * 2000 / (700 * 4096));
    e_freq = (nc >= 2) ? int'((longint'(nc - 1) * 10_000_000) / (longint'(n) * (last - first))) : 0;
  endtask

  function automatic logic [7:0] shown(int x, int y);
    return dut.out_buf ? u_zbt1.pixel(x, y) : u_zbt0.pixel(x, y);
  endfunction

  function automatic string volt_str(int mv);
    return $sformatf("%2d.%03d V  ", mv / 1000, mv % 1000);
  endfunction

  // wait for k buffer flips
  task automatic flips(int k);
    repeat (k) @(dut.out_buf);
    repeat (20) @(negedge clk);
  endtask

  task automatic check_state(string tag, int n, int level, bit falling, int g, int tdiv, int vdiv);
    int bad_cols = 0, bad_text = 0, bad_grid = 0;
    string lines [6];
    reference(n, level, falling);
    check(int'(dut.vmin) == e_vmin && int'(dut.vmax) == e_vmax && int'(dut.vmean) == e_vmean,
          $sformatf("%s: vmin/vmax/vmean %0d/%0d/%0d exp %0d/%0d/%0d", tag, dut.vmin, dut.vmax,
                    dut.vmean, e_vmin, e_vmax, e_vmean));
    check(int'(dut.freq) == e_freq, $sformatf("%s: freq %0d exp %0d", tag, dut.freq, e_freq));
    check(int'(dut.capture_n) == n, $sformatf("%s: decimation %0d exp %0d", tag, dut.capture_n, n));
    // trace: one pixel per column at the expected height
    for (int c = 0; c < 700; c++) begin
      int h = ((rec[c] - 2048) * g) >>> 3;
      int cnt = 0, row = -1;
      h += 256;
      if (h < 0) h = 0;
      if (h > 511) h = 511;
      for (int y = 32; y < 544; y++) if (shown(162 + c, y) == COL_TRACE) begin cnt++; row = y; end
      if (cnt != 1 || row != 543 - h) bad_cols++;
    end
    check(bad_cols == 0, $sformatf("%s: %0d trace columns wrong", tag, bad_cols));
    // grid corners and a mid line (where the trace does not pass)
    for (int y = 32; y < 544; y += 64)
      if (shown(162, y) != COL_GRID && shown(162, y) != COL_TRACE) bad_grid++;
    check(bad_grid == 0, $sformatf("%s: grid missing", tag));
    // text
    lines[0] = {"VMIN  ", volt_str(e_vmin)};
    lines[1] = {"VMAX  ", volt_str(e_vmax)};
    lines[2] = {"VMEAN ", volt_str(e_vmean)};
    lines[3] = $sformatf("FREQ  %7d HZ", e_freq);
    lines[4] = $sformatf("T/DIV %6d US ", tdiv);
    lines[5] = $sformatf("V/DIV %3d MV    ", vdiv);
    for (int l = 0; l < 6; l++)
      for (int c = 0; c < 16; c++)
        for (int r = 0; r < 10; r++)
          for (int p = 0; p < 8; p++) begin
            ref_code = 6'(lines[l][c] - 8'h20);
            ref_xy = {4'(r), 4'(p)};
            #0.1;
            if (shown(162 + c * 8 + p, 576 + l * 12 + r) != (ref_pixel ? COL_TEXT : COL_BG)) bad_text++;
          end
    check(bad_text == 0, $sformatf("%s: %0d text pixels wrong (%s / %s)", tag, bad_text, lines[3], lines[4]));
  endtask

  // VGA output over one whole frame against the displayed buffer
  task automatic check_vga(string tag);
    int hq [4], vq [4], bad = 0, n = 0;
    for (int i = 0; i < 4; i++) begin hq[i] = -1; vq[i] = 0; end
    wait (dut.hcount == 0 && dut.vcount == 0);
    @(negedge clk);
    for (int cyc = 0; cyc < 1344 * 806; cyc++) begin
      if (hq[3] >= 0) begin
        logic vis;
        vis = hq[3] < 1024 && vq[3] < 768;
        n++;
        if (vga_blank_n != vis) bad++;
        else if (vis && vga_rgb != rgb332_to_rgb888(shown(hq[3], vq[3]))) bad++;
        else if (!vis && vga_rgb != 0) bad++;
      end
      for (int i = 3; i > 0; i--) begin hq[i] = hq[i-1]; vq[i] = vq[i-1]; end
      hq[0] = int'(dut.hcount); vq[0] = int'(dut.vcount);
      @(negedge clk);
    end
    check(bad == 0 && n > 1000000, $sformatf("%s: %0d VGA pixels of %0d wrong", tag, bad, n));
  endtask

  task automatic press(int b, int hold);
    @(negedge clk) btn[b] = 1;
    repeat (hold) @(negedge clk);
    btn[b] = 0;
    repeat (hold) @(negedge clk);
  endtask

  initial begin
    repeat (5) @(negedge clk);
    rst = 0;
    // default settings: n = 10, gain 1/8, trigger 2048 rising
    flips(3);
    check_state("default", 10, 2048, 0, 1, 70, 250);
    check_vga("default");
    // longer time scale; then a glitch on the other button must be ignored
    press(0, 70000);
    check(dut.duration == 4'd4, $sformatf("duration %0d after press", dut.duration));
    if (dut.duration == 4'd4) n_press++;
    press(1, 1000);
    check(dut.duration == 4'd4, "glitch ignored");
    flips(3);
    check_state("n=20", 20, 2048, 0, 1, 140, 250);
    // highest gain: the trace clips
    repeat (7) press(2, 70000);
    check(dut.scale == 4'd7, $sformatf("scale %0d", dut.scale));
    flips(3);
    check_state("gain 8", 20, 2048, 0, 8, 140, 31);
    // higher trigger level and falling slope
    press(4, 70000);
    check(dut.trig_level == 12'd2112, $sformatf("trigger level %0d", dut.trig_level));
    trig_falling = 1;
    flips(3);
    check_state("falling 2112", 20, 2112, 1, 8, 140, 31);
    check_vga("final");
    $display("mechanisms: rise %0d fall %0d decim %0d meas %0d clip %0d flips %0d erase %0d wait %0d freq %0d press %0d",
             n_trig_rise, n_trig_fall, n_decim, n_meas, n_clip, n_flip, n_erase, n_wait, n_freq, n_press);
    // frame construction must fit well inside the drawing budget of 450,000 cycles per frame
    $display("frame construction: %0d frames, longest %0d cycles", builds, build_max);
    check(builds > 0 && build_max < 450000, $sformatf("frame construction took %0d cycles", build_max));
    // erase 700 columns + 1, render grid and text + 1, trace 700 columns + 1 (after the NFRAME cycle)
    check(build_max == (700 + 1) + (11932 + 7680 + 1) + (700 + 1), $sformatf("frame construction %0d cycles, exp %0d",
          build_max, (700 + 1) + (11932 + 7680 + 1) + (700 + 1)));
    check(n_trig_rise > 0, "no rising trigger");
    check(n_trig_fall > 0, "no falling trigger");
    check(n_decim > 0, "no decimated capture");
    check(n_meas > 0, "no measurement");
    check(n_clip > 0, "no clipping");
    check(n_flip > 0, "no buffer flip");
    check(n_erase > 0, "no trace erase");
    check(n_wait > 0, "never waited for vertical blank");
    check(n_freq > 0, "no frequency measured");
    check(n_press > 0, "no debounced press");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
