// serial_divider: unsigned restoring divider, one quotient bit per cycle.
//
// Pulse start with num and den held; W cycles later done pulses for one cycle with
// quot = num / den (truncated). A zero divisor gives an all-ones quotient. Used by the
// computation module for the mean voltage and the frequency, where a W-cycle latency is
// negligible against the per-record time budget.
module serial_divider #(
  parameter int unsigned W = 36
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);
  logic [W-1:0]         rem;
  logic [W-1:0]         dvs;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W+1:0]         trial;

  assign trial = {1'b0, rem, quot[W-1]} - {2'b00, dvs};

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      rem  <= '0;
      quot <= '0;
      dvs  <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        rem  <= '0;
        quot <= num;
        dvs  <= den;
        cnt  <= ($clog2(W+1))'(W);
      end else if (busy) begin
        // shift the next dividend bit into the remainder, quotient bit into the bottom
        if (!trial[W+1]) begin
          rem  <= trial[W-1:0];
          quot <= {quot[W-2:0], 1'b1};
        end else begin
          rem  <= {rem[W-2:0], quot[W-1]};
          quot <= {quot[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
