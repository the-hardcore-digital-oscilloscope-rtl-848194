// scaling: turns the six debounced buttons into the scope's three user settings.
//
// Buttons come in up/down pairs: [0]/[1] lengthen/shorten the time scale (DURATION code),
// [2]/[3] raise/lower the vertical gain (SCALE code), [4]/[5] raise/lower the trigger level.
// Each press (rising edge of the debounced level) moves its setting one step; settings saturate
// at their ends. DURATION selects the capture decimation (scope_pkg::decimation), SCALE the
// gain (scope_pkg::gain). Three parameters on six buttons and the 4-bit DURATION/SCALE codes follow
// the design; the button assignment, reset values and trigger step are this design's choice.
// Outputs are registers and change the cycle after the press is seen.
module scaling
  import scope_pkg::*;
#(
  parameter int unsigned   TRIG_STEP     = 64,       // trigger level step in ADC codes
  parameter logic [3:0]    DURATION_INIT = 4'd3,     // n = 10: 70 us per division
  parameter logic [3:0]    SCALE_INIT    = 4'd0,     // whole ADC range on the 512-pixel window
  parameter logic [11:0]   TRIG_INIT     = 12'd2048  // mid-scale
) (
  input  logic     clk,
  input  logic     rst,
  input  logic [5:0] btn,          // debounced, active high
  output setting_t duration,
  output setting_t scale,
  output sample_t  trig_level
);
  logic [5:0] btn_q;
  logic [5:0] press;

  assign press = btn & ~btn_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      btn_q      <= '0;
      duration   <= DURATION_INIT;
      scale      <= SCALE_INIT;
      trig_level <= TRIG_INIT;
    end else begin
      btn_q <= btn;
      if (press[0] && duration != 4'd15)       duration <= duration + 1'b1;
      else if (press[1] && duration != 4'd0)   duration <= duration - 1'b1;
      if (press[2] && scale != SET_W'(SCALE_MAX)) scale <= scale + 1'b1;
      else if (press[3] && scale != 4'd0)      scale <= scale - 1'b1;
      if (press[4])
        trig_level <= (trig_level > sample_t'(4095 - TRIG_STEP)) ? 12'd4095
                                                                 : trig_level + sample_t'(TRIG_STEP);
      else if (press[5])
        trig_level <= (trig_level < sample_t'(TRIG_STEP)) ? 12'd0
                                                          : trig_level - sample_t'(TRIG_STEP);
    end
  end
endmodule
