// tb_triggering: feeds random and swept samples against random trigger levels and checks START
// against a reference edge detector for both slopes; also checks that gaps between valid
// samples and the first sample after reset never trigger.
module tb_triggering;
  import scope_pkg::*;
  logic clk = 0, rst = 1;
  sample_t sample = '0, level = 12'd2048;
  logic sample_valid = 0, falling = 0;
  logic start;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0;
  int prev_above = -1;

  triggering dut (.clk, .rst, .sample, .sample_valid, .level, .falling, .start);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(sample_t s, logic v);
    logic exp;
    int a;
    @(negedge clk);
    sample = s;
    sample_valid = v;
    #1;
    a = (s >= level);
    exp = v && prev_above >= 0 && (falling ? (prev_above == 1 && a == 0) : (prev_above == 0 && a == 1));
    checks++;
    if (start !== exp) begin
      failures++;
      $display("FAIL sample %0d level %0d falling %0b prev %0d: start %b exp %b", s, level, falling,
               prev_above, start, exp);
    end
    if (exp && falling) n_fall++;
    if (exp && !falling) n_rise++;
    if (v) prev_above = a;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    step(12'd4000, 1);          // first sample only primes
    for (int k = 0; k < 20000; k++) begin
      if (k % 2000 == 0) begin
        @(negedge clk);
        level = 12'($urandom);
        falling = $urandom_range(0, 1);
        sample_valid = 0;
      end
      if (k % 4 == 0) step(12'($urandom), $urandom_range(0, 3) != 0);
      else step(12'((k * 37) % 4096), $urandom_range(0, 2) != 0);
    end
    // directed: samples landing exactly on the level
    for (int k = 0; k < 400; k++) begin
      if (k % 40 == 0) begin
        @(negedge clk);
        level = 12'($urandom_range(1, 4094));
        falling = k[6];
        sample_valid = 0;
      end
      step(level + 12'($urandom_range(0, 2)) - 12'd1, 1);
    end
    checks++;
    if (n_rise == 0 || n_fall == 0) begin
      failures++;
      $display("FAIL both slopes not exercised: %0d rising %0d falling", n_rise, n_fall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
