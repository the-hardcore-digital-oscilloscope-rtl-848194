// tb_scaling: presses the six buttons at random and compares DURATION, SCALE and the trigger
// level with a reference model, including saturation at both ends of every setting.
module tb_scaling;
  import scope_pkg::*;
  logic clk = 0, rst = 1;
  logic [5:0] btn = '0;
  setting_t duration, scale;
  sample_t  trig_level;
  int checks = 0, failures = 0;
  int e_dur = 3, e_scale = 0, e_trig = 2048;

  scaling dut (.clk, .rst, .btn, .duration, .scale, .trig_level);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (int'(duration) != e_dur || int'(scale) != e_scale || int'(trig_level) != e_trig) begin
      failures++;
      $display("FAIL %s: dur %0d/%0d scale %0d/%0d trig %0d/%0d", what, duration, e_dur,
               scale, e_scale, trig_level, e_trig);
    end
  endtask

  task automatic press(int b, int hold);
    @(negedge clk) btn[b] = 1;
    repeat (hold) @(negedge clk);
    btn[b] = 0;
    case (b)
      0: if (e_dur < 15) e_dur++;
      1: if (e_dur > 0) e_dur--;
      2: if (e_scale < 7) e_scale++;
      3: if (e_scale > 0) e_scale--;
      4: e_trig = (e_trig + 64 > 4095) ? 4095 : e_trig + 64;
      5: e_trig = (e_trig < 64) ? 0 : e_trig - 64;
      default: ;
    endcase
    repeat (2) @(negedge clk);
    compare($sformatf("press %0d", b));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    compare("reset values");
    // walk every setting to both ends
    repeat (20) press(0, 3);
    repeat (20) press(1, 1);
    repeat (10) press(2, 5);
    repeat (10) press(3, 2);
    repeat (40) press(4, 1);
    repeat (70) press(5, 1);
    repeat (70) press(4, 2);
    for (int k = 0; k < 400; k++) press($urandom_range(0, 5), $urandom_range(1, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
