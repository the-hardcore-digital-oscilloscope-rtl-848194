// triggering: raises START when the input waveform crosses the trigger level.
//
// Every valid ADC sample is compared with the trigger level (sample >= level). START is a
// combinational one-cycle pulse, in the same cycle as the sample, when that comparison changes
// in the selected direction: from below to at-or-above for a rising-slope trigger (falling = 0),
// from at-or-above to below for a falling-slope trigger (falling = 1). The sample that causes
// the trigger is therefore the one presented with START, and capture can store it as element 0.
// The comparison against a user level and triggering on an edge of it follow the design; the
// slope select input and the >= comparison are this design's choice. The first sample after reset
// only primes the previous-comparison register and never triggers.
module triggering
  import scope_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t sample,
  input  logic    sample_valid,
  input  sample_t level,
  input  logic    falling,        // 0: trigger on rising crossings, 1: on falling crossings
  output logic    start
);
  logic above, above_q, primed;

  assign above = (sample >= level);
  assign start = sample_valid && primed && (falling ? (above_q && !above) : (!above_q && above));

  always_ff @(posedge clk) begin
    if (rst) begin
      above_q <= 1'b0;
      primed  <= 1'b0;
    end else if (sample_valid) begin
      above_q <= above;
      primed  <= 1'b1;
    end
  end
endmodule
