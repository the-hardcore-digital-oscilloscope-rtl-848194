// tb_frame_buffer: drives the frame buffer with its own display counters, a stand-in renderer
// and a stand-in plotting BRAM, over two ZBT chip models that start filled with garbage. It
// checks the power-on clear, that flips happen only at the start of vertical blank after a frame
// is complete, that the displayed buffer holds the renderer's pixels and exactly one trace pixel
// per column at the expected row (so the trace drawn two frames earlier was erased), and that the
// colour returned to the display matches the displayed buffer 4 cycles after the counters.
module tb_frame_buffer;
  import scope_pkg::*;
  localparam int H_TOT = 1100, V_TOT = 790;
  logic clk = 0, rst = 1;
  logic [HC_W-1:0] hcount = '0;
  logic [VC_W-1:0] vcount = '0;
  logic [RGB_W-1:0] rgb;
  logic nframe, pix_valid = 0, pix_ready, render_done = 0, out_buf;
  pixel_wr_t pix = '0;
  addr_t plot_raddr;
  plot_t plot_rdata;
  logic [1:0] zbt_ce_n, zbt_we_n, zbt_wdata_oe;
  logic [1:0][3:0] zbt_bwe_n;
  logic [1:0][ZBT_AW-1:0] zbt_addr;
  logic [1:0][ZBT_DW-1:0] zbt_wdata, zbt_rdata;
  int checks = 0, failures = 0;

  frame_buffer dut (.clk, .rst, .hcount, .vcount, .rgb, .nframe, .pix, .pix_valid, .pix_ready,
                    .render_done, .plot_raddr, .plot_rdata, .out_buf, .zbt_ce_n, .zbt_we_n,
                    .zbt_bwe_n, .zbt_addr, .zbt_wdata, .zbt_wdata_oe, .zbt_rdata);

  zbt_sram_model #(.INIT(36'h1_2345_6789)) u_zbt0 (.clk, .ce_n(zbt_ce_n[0]), .we_n(zbt_we_n[0]),
    .bwe_n(zbt_bwe_n[0]), .addr(zbt_addr[0]), .wdata(zbt_wdata[0]), .wdata_oe(zbt_wdata_oe[0]),
    .rdata(zbt_rdata[0]));
  zbt_sram_model #(.INIT(36'h9_8765_4321)) u_zbt1 (.clk, .ce_n(zbt_ce_n[1]), .we_n(zbt_we_n[1]),
    .bwe_n(zbt_bwe_n[1]), .addr(zbt_addr[1]), .wdata(zbt_wdata[1]), .wdata_oe(zbt_wdata_oe[1]),
    .rdata(zbt_rdata[1]));

  always #5 clk = ~clk;

  initial begin
    #200000000;
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

  // display counters
  always @(posedge clk) begin
    if (hcount == HC_W'(H_TOT - 1)) begin
      hcount <= '0;
      vcount <= (vcount == VC_W'(V_TOT - 1)) ? '0 : vcount + 1'b1;
    end else hcount <= hcount + 1'b1;
  end

  // plotting stand-in: trace of the current frame number
  int frame_no = 0;
  function automatic int trace_of(int f, int c);
    return (c * (f + 3) + 97 * f) % 512;
  endfunction
  always @(posedge clk) plot_rdata <= 9'(trace_of(frame_no, int'(plot_raddr)));

  // renderer stand-in: on nframe, a small pattern of pixels in the text area, then done
  int stalls = 0, flips = 0, bad_flips = 0, nframes = 0;
  function automatic logic [7:0] pat(int f, int i);
    return 8'(i * 7 + f * 13 + 1);
  endfunction
  initial begin
    forever begin
      @(posedge clk);
      if (nframe) begin
        nframes++;
        render_done <= 0;
        for (int i = 0; i < 64; i++) begin
          @(negedge clk);
          pix_valid = 1;
          pix.x = 10'(200 + i);
          pix.y = 10'(600 + (i % 4));
          pix.color = pat(nframes - 1, i);
          @(posedge clk);
          while (!pix_ready) begin
            stalls++;
            @(posedge clk);
          end
        end
        @(negedge clk) pix_valid = 0;
        render_done = 1;
      end
    end
  end

  // flips only at the start of vertical blank
  logic ob_q;
  always @(posedge clk) begin
    ob_q <= out_buf;
    if (!rst && ob_q !== out_buf) begin
      flips++;
      if (!(vcount == 10'd768 && hcount == 11'd1)) bad_flips++;
    end
  end

  // display colour check: compare with the displayed chip 4 cycles after the counters
  int hq [4], vq [4], rgb_checks = 0, since_rst = 0;
  always @(negedge clk) begin
    since_rst = rst ? 0 : since_rst + 1;
    if (since_rst > 8 && hq[3] >= 0 && hq[3] < 1024 && vq[3] < 768 && vcount != 10'd768) begin
      logic [7:0] p;
      p = out_buf ? u_zbt1.pixel(hq[3], vq[3]) : u_zbt0.pixel(hq[3], vq[3]);
      rgb_checks++;
      checks++;
      if (rgb !== rgb332_to_rgb888(p)) begin
        failures++;
        if (failures < 20) $display("FAIL rgb at %0d,%0d: %h exp %h", hq[3], vq[3], rgb, rgb332_to_rgb888(p));
      end
    end else if (since_rst > 8 && hq[3] >= 1024) begin
      rgb_checks++;
      checks++;
      if (rgb !== '0) failures++;
    end
    for (int i = 3; i > 0; i--) begin hq[i] = hq[i-1]; vq[i] = vq[i-1]; end
    hq[0] = int'(hcount); vq[0] = int'(vcount);
  end

  task automatic check_displayed(int f);
    int bad_cols = 0, bad_pix = 0;
    for (int c = 0; c < 700; c++) begin
      int n = 0, row = -1;
      for (int y = 32; y < 544; y++) begin
        logic [7:0] p;
        p = out_buf ? u_zbt1.pixel(162 + c, y) : u_zbt0.pixel(162 + c, y);
        if (p == COL_TRACE) begin n++; row = y; end
      end
      if (n != 1 || row != 543 - trace_of(f, c)) bad_cols++;
    end
    check(bad_cols == 0, $sformatf("frame %0d: %0d columns without exactly one correct trace pixel", f, bad_cols));
    for (int i = 0; i < 64; i++) begin
      logic [7:0] p;
      p = out_buf ? u_zbt1.pixel(200 + i, 600 + i % 4) : u_zbt0.pixel(200 + i, 600 + i % 4);
      if (p != pat(f, i)) bad_pix++;
    end
    check(bad_pix == 0, $sformatf("frame %0d: %0d renderer pixels wrong", f, bad_pix));
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin hq[i] = -1; vq[i] = 0; end
    repeat (3) @(negedge clk);
    rst = 0;
    // power-on clear of both chips
    wait (nframe);
    repeat (5) @(negedge clk);
    begin
      int dirty;
      dirty = 0;
      for (int a = 0; a < 768 * 256; a++)
        if (u_zbt0.mem[a] != '0 || u_zbt1.mem[a] != '0) dirty++;
      check(dirty == 0, $sformatf("%0d words not cleared", dirty));
    end
    for (int f = 0; f < 5; f++) begin
      // the trace of frame f is drawn into the construction buffer; wait for the flip
      @(out_buf);
      repeat (10) @(negedge clk);
      check_displayed(f);
      frame_no = f + 1;
    end
    check(bad_flips == 0 && flips == 5, $sformatf("flips %0d, %0d outside vertical blank", flips, bad_flips));
    check(nframes == 6, $sformatf("nframe pulses %0d", nframes));
    check(stalls > 0, "renderer never stalled");
    check(rgb_checks > 1000000, $sformatf("only %0d colour checks", rgb_checks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
