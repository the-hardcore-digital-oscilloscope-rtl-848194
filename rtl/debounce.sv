// debounce: synchronises and debounces the scope's push buttons.
//
// Each button input passes through a two-flop synchroniser. A per-button counter runs while the
// synchronised level differs from the debounced output and restarts whenever they agree; once it
// has seen DEBOUNCE_CYCLES consecutive cycles of the new level, the output takes that level.
// Output therefore follows a clean press DEBOUNCE_CYCLES + 2 cycles late, and a bounce shorter
// than DEBOUNCE_CYCLES is ignored. Six buttons follow the design; the counter method and the
// ~1 ms hold time (65536 cycles at a 65 MHz clock) are this implementation's choices.
// Buttons are active high; outputs reset to released (0).
module debounce #(
  parameter int unsigned WIDTH           = 6,
  parameter int unsigned DEBOUNCE_CYCLES = 65536
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] btn_in,    // raw, asynchronous
  output logic [WIDTH-1:0] btn_out    // clean, synchronous
);
  localparam int unsigned CNT_W = $clog2(DEBOUNCE_CYCLES + 1);

  logic [WIDTH-1:0] sync1, sync2;
  logic [CNT_W-1:0] cnt [WIDTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= btn_in;
      sync2 <= sync1;
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_btn
    always_ff @(posedge clk) begin
      if (rst) begin
        cnt[i]     <= '0;
        btn_out[i] <= 1'b0;
      end else if (sync2[i] == btn_out[i]) begin
        cnt[i] <= '0;
      end else if (cnt[i] == CNT_W'(DEBOUNCE_CYCLES - 1)) begin
        cnt[i]     <= '0;
        btn_out[i] <= sync2[i];
      end else begin
        cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end
endmodule
