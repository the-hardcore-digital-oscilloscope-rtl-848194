// tb_debounce: checks that the debouncer ignores bounces shorter than the hold time and
// follows a steady level exactly DEBOUNCE_CYCLES + 2 cycles after it starts.
module tb_debounce;
  localparam int unsigned DB = 16;
  logic clk = 0, rst = 1;
  logic [5:0] btn_in = '0;
  logic [5:0] btn_out;
  int checks = 0, failures = 0;

  debounce #(.WIDTH(6), .DEBOUNCE_CYCLES(DB)) dut (.clk, .rst, .btn_in, .btn_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [5:0] exp, string what);
    checks++;
    if (btn_out !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b", what, btn_out, exp);
    end
  endtask

  // apply level on button b and count cycles until the output follows
  task automatic measure(int b, logic lvl);
    int n = 0;
    @(negedge clk) btn_in[b] = lvl;
    while (btn_out[b] !== lvl && n < 10 * DB) begin
      @(negedge clk);
      n++;
    end
    checks++;
    if (n != DB + 2) begin
      failures++;
      $display("FAIL latency on button %0d: %0d cycles, exp %0d", b, n, DB + 2);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    check(6'b0, "after reset");
    // bounces shorter than DB never pass
    for (int k = 0; k < 20; k++) begin
      @(negedge clk) btn_in = 6'($urandom);
      repeat ($urandom_range(1, DB - 2)) @(negedge clk);
      btn_in = '0;
      repeat (2) @(negedge clk);
      check(6'b0, "bounce rejected");
    end
    repeat (DB + 4) @(negedge clk);
    for (int b = 0; b < 6; b++) begin
      measure(b, 1'b1);
      check(6'(1 << b), "single press");
      measure(b, 1'b0);
      check(6'b0, "release");
    end
    // bouncing press: short glitches, then steady
    @(negedge clk) btn_in[3] = 1;
    repeat (DB / 2) @(negedge clk);
    btn_in[3] = 0;
    @(negedge clk) btn_in[3] = 1;
    repeat (DB / 2) @(negedge clk);
    check(6'b0, "still bouncing");
    repeat (DB + 3) @(negedge clk);
    check(6'b001000, "settled press");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
