// tb_sampling: captures a counting waveform at several DURATION codes and checks that the record
// starts at the triggering sample, keeps every n-th valid sample, takes 700 kept samples to fill,
// ignores triggers while full, and re-arms only after release.
module tb_sampling;
  import scope_pkg::*;
  logic clk = 0, rst = 1;
  sample_t sample = '0;
  logic sample_valid = 0, start = 0, release_buf = 0;
  setting_t duration = '0;
  logic data_ready;
  logic [DECIM_W-1:0] capture_n;
  addr_t rd_addr = '0;
  sample_t rd_data;
  int checks = 0, failures = 0;
  int seq = 0;

  sampling dut (.clk, .rst, .sample, .sample_valid, .start, .duration, .data_ready, .capture_n,
                .release_buf, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    #50000000;
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

  // one capture: trigger at sample value t0, decimation from code
  task automatic capture(setting_t code, int n_exp);
    int t0, valid_count, trig_seq;
    duration = code;
    // a few samples without trigger
    repeat (5) begin
      @(negedge clk) sample = 12'(seq); sample_valid = 1; start = 0;
      seq++;
    end
    @(negedge clk) sample = 12'(seq); sample_valid = 1; start = 1;
    trig_seq = seq;
    seq++;
    valid_count = 1;
    // stream samples (valid 2 of 3 cycles) with stray triggers until full
    while (!data_ready && valid_count < 800 * n_exp) begin
      @(negedge clk);
      start = ($urandom_range(0, 9) == 0);
      sample_valid = ($urandom_range(0, 2) != 0);
      sample = 12'(seq);
      if (sample_valid) begin
        seq++;
        valid_count++;
      end
    end
    @(negedge clk) sample_valid = 0; start = 0;
    check(data_ready, $sformatf("record full, code %0d", code));
    check(int'(capture_n) == n_exp, $sformatf("capture_n %0d exp %0d", capture_n, n_exp));
    // the fill took 699 * n + 1 valid samples (the last kept one ends it)
    check(valid_count - 1 == 699 * n_exp + 1 || valid_count - 1 == 699 * n_exp,
          $sformatf("fill used %0d samples exp %0d", valid_count - 1, 699 * n_exp));
    // more triggers while full must not disturb the record
    repeat (50) begin
      @(negedge clk) sample = 12'($urandom); sample_valid = 1; start = 1;
    end
    @(negedge clk) sample_valid = 0; start = 0;
    check(data_ready, "still full");
    for (int i = 0; i < 700; i++) begin
      @(negedge clk) rd_addr = addr_t'(i);
      @(negedge clk);
      check(rd_data == 12'(trig_seq + i * n_exp),
            $sformatf("element %0d = %0d exp %0d", i, rd_data, 12'(trig_seq + i * n_exp)));
    end
    @(negedge clk) release_buf = 1;
    @(negedge clk) release_buf = 0;
    check(!data_ready, "re-armed after release");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!data_ready, "armed after reset");
    capture(4'd0, 1);
    capture(4'd1, 2);
    capture(4'd2, 5);
    capture(4'd3, 10);
    capture(4'd4, 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
