// sampling: the capture module. On a trigger it records one screen of samples into a BRAM.
//
// While ARMED it waits for START together with a valid ADC sample; that sample becomes
// element 0. From then on it keeps every n-th valid sample, n = decimation(duration) latched at
// the trigger, so a 10 MHz converter fills the 700-element record with 700*n*100 ns of signal.
// When the record is full it raises data_ready and holds the memory still for the computation
// module, which reads it through rd_addr / rd_data (one-cycle synchronous read) and pulses
// release when it is done; the module then re-arms. capture_n reports the n of the held record.
// Recording every n-th sample at a fixed 10 MHz and the 700x12 memory follow the design; the
// handshake with computation is this design's choice.
module sampling
  import scope_pkg::*;
#(
  parameter int unsigned N = N_SAMPLES
) (
  input  logic                clk,
  input  logic                rst,
  input  sample_t             sample,
  input  logic                sample_valid,
  input  logic                start,
  input  setting_t            duration,
  // to computation
  output logic                data_ready,
  output logic [DECIM_W-1:0]  capture_n,
  input  logic                release_buf,
  input  addr_t               rd_addr,
  output sample_t             rd_data
);
  typedef enum logic [1:0] {ARMED, CAPTURE, FULL} state_e;
  state_e state;

  sample_t             mem [N];
  addr_t               widx;
  logic [DECIM_W-1:0]  skip;
  logic                we;
  addr_t               waddr;

  assign data_ready = (state == FULL);

  always_comb begin
    we    = 1'b0;
    waddr = widx;
    if (state == ARMED && sample_valid && start) begin
      we    = 1'b1;
      waddr = '0;
    end else if (state == CAPTURE && sample_valid && skip == '0) begin
      we = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= sample;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ARMED;
      widx      <= '0;
      skip      <= '0;
      capture_n <= DECIM_W'(1);
    end else begin
      case (state)
        ARMED: if (sample_valid && start) begin
          capture_n <= decimation(duration);
          skip      <= decimation(duration) - 1'b1;
          widx      <= addr_t'(1);
          state     <= CAPTURE;
        end
        CAPTURE: if (sample_valid) begin
          if (skip == '0) begin
            skip <= capture_n - 1'b1;
            widx <= widx + 1'b1;
            if (widx == addr_t'(N - 1)) state <= FULL;
          end else begin
            skip <= skip - 1'b1;
          end
        end
        FULL: if (release_buf) state <= ARMED;
        default: state <= ARMED;
      endcase
    end
  end
endmodule
