// tb_plotting: writes random heights to random columns while reading others, and checks every
// read (one cycle of latency) against a shadow copy; out-of-range writes must be dropped.
module tb_plotting;
  import scope_pkg::*;
  logic clk = 0;
  logic we = 0;
  addr_t waddr = '0, raddr = '0;
  plot_t wdata = '0, rdata;
  plot_t shadow [700];
  int checks = 0, failures = 0;

  plotting dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 700; i++) begin
      @(negedge clk) we = 1; waddr = addr_t'(i); wdata = 9'($urandom); shadow[i] = wdata;
    end
    @(negedge clk) we = 0;
    for (int k = 0; k < 5000; k++) begin
      addr_t ra;
      @(negedge clk);
      ra = addr_t'($urandom_range(0, 699));
      raddr = ra;
      we = $urandom_range(0, 1);
      waddr = addr_t'($urandom_range(0, 1023));
      wdata = 9'($urandom);
      if (waddr == ra) we = 0;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== shadow[ra]) begin
        failures++;
        $display("FAIL col %0d: %0d exp %0d", ra, rdata, shadow[ra]);
      end
      if (we && waddr < 700) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
