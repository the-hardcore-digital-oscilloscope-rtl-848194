// tb_computation: plays the sampling module (a 700-sample record behind a one-cycle read port)
// and checks every trace height written to the plotting port and the four measurements against
// a reference model, over sine, square, constant and clipped records at several gains and
// decimations; it also checks that a record is finished well inside the per-sample time budget.
module tb_computation;
  import scope_pkg::*;
  logic clk = 0, rst = 1;
  logic data_ready = 0;
  logic [DECIM_W-1:0] capture_n = 17'd1;
  addr_t rd_addr;
  sample_t rd_data;
  logic release_buf;
  setting_t scale = '0;
  logic plot_we;
  addr_t plot_addr;
  plot_t plot_data;
  volt_t vmin, vmax, vmean;
  freq_t freq;
  logic meas_valid;
  int checks = 0, failures = 0, n_clip = 0, n_freq = 0, n_sat = 0;

  sample_t rec [700];
  int      plot_got [700];

  computation dut (.clk, .rst, .data_ready, .capture_n, .rd_addr, .rd_data, .release_buf, .scale,
                   .plot_we, .plot_addr, .plot_data, .vmin, .vmax, .vmean, .freq, .meas_valid);

  always #5 clk = ~clk;
  always_ff @(posedge clk) rd_data <= rec[rd_addr];
  always_ff @(posedge clk) if (plot_we) plot_got[plot_addr] <= int'(plot_data);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_record(int n, int sc, string name, real true_hz);
    longint sum = 0;
    int mn = 4095, mx = 0, g, mid, hys, hi, lo, nc = 0, first = 0, last = 0, cycles = 0;
    bit above;
    longint e_freq;
    for (int i = 0; i < 700; i++) begin
      sum += rec[i];
      if (rec[i] < mn) mn = rec[i];
      if (rec[i] > mx) mx = rec[i];
    end
    g = (sc > 7) ? 8 : sc + 1;
    mid = (mn + mx) / 2;
    hys = (mx - mn) / 8;
    hi = mid + hys;
    lo = (mid > hys) ? mid - hys : 0;
    above = (rec[0] >= mid);
    for (int i = 1; i < 700; i++) begin
      if (!above && rec[i] >= hi) begin
        above = 1;
        if (nc == 0) first = i;
        last = i;
        nc++;
      end else if (above && rec[i] < lo) above = 0;
    end
    e_freq = (nc >= 2) ? (longint'(nc - 1) * 10_000_000) / (longint'(n) * (last - first)) : 0;
    if (e_freq > 1048575) begin
      e_freq = 1048575;
      n_sat++;
    end
    for (int i = 0; i < 700; i++) plot_got[i] = -1;
    capture_n = 17'(n);
    scale = 4'(sc);
    @(negedge clk) data_ready = 1;
    while (!release_buf) begin
      @(negedge clk);
      cycles++;
      if (cycles > 10000) break;
    end
    data_ready = 0;
    check(cycles < 1600, $sformatf("%s: %0d cycles for a record", name, cycles));
    for (int i = 0; i < 700; i++) begin
      int t = ((int'(rec[i]) - 2048) * g) >>> 3;
      int h = t + 256;
      if (h < 0) h = 0;
      if (h > 511) h = 511;
      if (h == 0 || h == 511) n_clip++;
      check(plot_got[i] == h, $sformatf("%s: column %0d height %0d exp %0d", name, i, plot_got[i], h));
    end
    check(int'(vmin) == mn * 2000 / 4096, $sformatf("%s: vmin %0d exp %0d", name, vmin, mn * 2000 / 4096));
    check(int'(vmax) == mx * 2000 / 4096, $sformatf("%s: vmax %0d exp %0d", name, vmax, mx * 2000 / 4096));
    check(longint'(vmean) == sum * 2000 / (700 * 4096),
          $sformatf("%s: vmean %0d exp %0d", name, vmean, sum * 2000 / (700 * 4096)));
    check(longint'(freq) == e_freq, $sformatf("%s: freq %0d exp %0d", name, freq, e_freq));
    if (true_hz > 0 && e_freq < 1048575) begin
      n_freq++;
      check(freq > true_hz * 0.98 && freq < true_hz * 1.02,
            $sformatf("%s: freq %0d far from %f", name, freq, true_hz));
    end
    repeat (3) @(negedge clk);
  endtask

  // sine with period p record samples, centre c, amplitude a
  task automatic make_sine(real p, int c, int a, int noise);
    for (int i = 0; i < 700; i++) begin
      int v = c + $rtoi(a * $sin(2.0 * 3.14159265358979 * i / p)) + $urandom_range(0, 2 * noise) - noise;
      rec[i] = 12'((v < 0) ? 0 : (v > 4095) ? 4095 : v);
    end
  endtask

  initial begin
    logic seen_valid;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    make_sine(100.0, 2048, 1000, 0);
    run_record(10, 0, "sine 10 kHz n=10", 10_000.0);
    make_sine(70.0, 1500, 600, 8);
    run_record(1, 3, "noisy sine n=1", 10_000_000.0 / 70.0);
    make_sine(233.3, 2500, 1500, 3);
    run_record(100, 7, "slow sine, clipped", 10_000_000.0 / (233.3 * 100));
    for (int i = 0; i < 700; i++) rec[i] = ((i / 25) % 2) ? 12'd3900 : 12'd100;
    run_record(2, 5, "square", 10_000_000.0 / 100.0);
    for (int i = 0; i < 700; i++) rec[i] = 12'd1234;
    run_record(5, 2, "constant", 0.0);
    for (int i = 0; i < 700; i++) rec[i] = (i % 2) ? 12'd4095 : 12'd0;
    run_record(1, 0, "5 MHz saturates", 0.0);
    for (int k = 0; k < 6; k++) begin
      make_sine($urandom_range(20, 600), $urandom_range(1000, 3000), $urandom_range(0, 1000), 4);
      run_record($urandom_range(1, 50), $urandom_range(0, 15), $sformatf("random %0d", k), 0.0);
    end
    check(n_clip > 0 && n_sat > 0 && n_freq >= 3, $sformatf("coverage clip %0d sat %0d freq %0d",
          n_clip, n_sat, n_freq));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
