// computation: analyses a captured record and produces the trace and the measurements.
//
// When the sampling module signals a full record (data_ready) the module makes two passes
// over its 700 samples, one read per cycle (the sample BRAM has one cycle of read latency):
//   pass 1  minimum, maximum and sum of the samples;
//   pass 2  each sample is scaled to a 9-bit trace height,
//             h = clamp(256 + ((s - 2048) * G) >>> 3, 0, 511),  G = gain(scale) in 1..8,
//           and written to the plotting BRAM at the same address; at the same time a
//           comparator with hysteresis around mid = (min+max)/2 (+/- (max-min)/8) counts
//           rising crossings and notes the first and last crossing index.
// Two serial divisions follow:
//   VMEAN = sum * VFS_MV / (700 * 4096)
//   FREQ  = (crossings - 1) * 10 MHz / (n * (last - first))   (0 with fewer than 2 crossings)
// VMIN / VMAX are min * VFS_MV / 4096 and max * VFS_MV / 4096. Voltages are integer millivolts
// (15 bits), frequency integer hertz (20 bits, saturating). The results update together with a
// one-cycle meas_valid pulse, and release returns the record to the sampling module.
// A record costs about 2 x 700 + 2 x 40 cycles, far inside the 600-cycles-per-sample budget.
// Scaling with offset to 9 bits and the four measurements with their widths follow the design;
// the scaling formula, the crossing method and the fixed-point units are this design's choices.
module computation
  import scope_pkg::*;
#(
  parameter int unsigned N = N_SAMPLES
) (
  input  logic               clk,
  input  logic               rst,
  // sampling side
  input  logic               data_ready,
  input  logic [DECIM_W-1:0] capture_n,
  output addr_t              rd_addr,
  input  sample_t            rd_data,
  output logic               release_buf,
  // user setting
  input  setting_t           scale,
  // plotting side
  output logic               plot_we,
  output addr_t              plot_addr,
  output plot_t              plot_data,
  // measurements
  output volt_t              vmin,
  output volt_t              vmax,
  output volt_t              vmean,
  output freq_t              freq,
  output logic               meas_valid
);
  localparam int unsigned DIV_W = 36;
  localparam int unsigned SUM_W = SAMPLE_W + $clog2(N);

  typedef enum logic [2:0] {IDLE, PASS1, PASS2, DIV_MEAN, DIV_FREQ, FINISH} state_e;
  state_e state;

  addr_t             idx;          // address being issued
  logic              rd_v;         // rd_data holds sample rd_idx
  addr_t             rd_idx;
  sample_t           smin, smax;
  logic [SUM_W-1:0]  sum;
  sample_t           mid, hyst_hi, hyst_lo;
  logic              above, first_seen;
  addr_t             first_x, last_x;
  logic [ADDR_W-1:0] ncross;
  logic [3:0]        g;
  logic [FREQ_W-1:0] freq_q;

  // divider
  logic              div_start, div_done;
  logic [DIV_W-1:0]  div_num, div_den, div_q;
  logic              div_busy;

  serial_divider #(.W(DIV_W)) u_div (
    .clk, .rst, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quot(div_q)
  );

  // vertical scaling of the sample currently on rd_data
  logic signed [SAMPLE_W:0]   centred;
  logic signed [SAMPLE_W+4:0] scaled;
  logic signed [SAMPLE_W+4:0] height;
  always_comb begin
    centred = $signed({1'b0, rd_data}) - 13'sd2048;
    scaled  = (centred * $signed({1'b0, g})) >>> 3;
    height  = scaled + 17'sd256;
  end
  plot_t height_clamped;
  assign height_clamped = (height < 0) ? '0 : (height > 511) ? 9'd511 : plot_t'(height);

  assign rd_addr = (idx < addr_t'(N)) ? idx : '0;   // idx stops at N after the last read

  // final pass-1 extremes, including the last sample being consumed, and the comparator
  // thresholds derived from them
  sample_t fmin, fmax, fmid, fhys;
  always_comb begin
    fmin = (rd_data < smin) ? rd_data : smin;
    fmax = (rd_data > smax) ? rd_data : smax;
    fmid = sample_t'(({1'b0, fmin} + {1'b0, fmax}) >> 1);
    fhys = (fmax - fmin) >> 3;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      idx         <= '0;
      rd_v        <= 1'b0;
      rd_idx      <= '0;
      smin        <= '0;
      smax        <= '0;
      sum         <= '0;
      mid         <= '0;
      hyst_hi     <= '0;
      hyst_lo     <= '0;
      above       <= 1'b0;
      first_seen  <= 1'b0;
      first_x     <= '0;
      last_x      <= '0;
      ncross      <= '0;
      g           <= 4'd1;
      freq_q      <= '0;
      release_buf <= 1'b0;
      plot_we     <= 1'b0;
      plot_addr   <= '0;
      plot_data   <= '0;
      vmin        <= '0;
      vmax        <= '0;
      vmean       <= '0;
      freq        <= '0;
      meas_valid  <= 1'b0;
      div_start   <= 1'b0;
      div_num     <= '0;
      div_den     <= '0;
    end else begin
      release_buf <= 1'b0;
      meas_valid  <= 1'b0;
      plot_we     <= 1'b0;
      div_start   <= 1'b0;
      case (state)
        IDLE: if (data_ready && !release_buf) begin
          idx   <= '0;
          rd_v  <= 1'b0;
          smin  <= '1;
          smax  <= '0;
          sum   <= '0;
          g     <= gain(scale);
          state <= PASS1;
        end

        PASS1: begin
          // issue reads 0..N-1; consume one cycle later
          rd_v   <= (idx < addr_t'(N));
          rd_idx <= idx;
          if (idx < addr_t'(N)) idx <= idx + 1'b1;
          if (rd_v) begin
            if (rd_data < smin) smin <= rd_data;
            if (rd_data > smax) smax <= rd_data;
            sum <= sum + SUM_W'(rd_data);
            if (rd_idx == addr_t'(N - 1)) begin
              smin       <= fmin;
              smax       <= fmax;
              mid        <= fmid;
              hyst_hi    <= fmid + fhys;
              hyst_lo    <= (fmid > fhys) ? fmid - fhys : '0;
              idx        <= '0;
              rd_v       <= 1'b0;
              first_seen <= 1'b0;
              ncross     <= '0;
              state      <= PASS2;
            end
          end
        end

        PASS2: begin
          rd_v   <= (idx < addr_t'(N));
          rd_idx <= idx;
          if (idx < addr_t'(N)) idx <= idx + 1'b1;
          if (rd_v) begin
            plot_we   <= 1'b1;
            plot_addr <= rd_idx;
            plot_data <= height_clamped;
            if (!first_seen) begin
              first_seen <= 1'b1;
              above      <= (rd_data >= mid);
            end else if (!above && rd_data >= hyst_hi) begin
              above  <= 1'b1;
              ncross <= ncross + 1'b1;
              if (ncross == '0) first_x <= rd_idx;
              last_x <= rd_idx;
            end else if (above && rd_data < hyst_lo) begin
              above <= 1'b0;
            end
            if (rd_idx == addr_t'(N - 1)) begin
              div_num   <= DIV_W'(sum) * DIV_W'(VFS_MV);
              div_den   <= DIV_W'(N * 4096);
              div_start <= 1'b1;
              state     <= DIV_MEAN;
            end
          end
        end

        DIV_MEAN: if (div_done) begin
          vmean <= volt_t'(div_q);
          if (ncross >= 2) begin
            div_num   <= DIV_W'(ncross - 1'b1) * DIV_W'(SAMPLE_HZ);
            div_den   <= DIV_W'(capture_n) * DIV_W'(last_x - first_x);
            div_start <= 1'b1;
            state     <= DIV_FREQ;
          end else begin
            freq_q <= '0;
            state  <= FINISH;
          end
        end

        DIV_FREQ: if (div_done) begin
          freq_q <= (div_q > DIV_W'((1 << FREQ_W) - 1)) ? '1 : freq_t'(div_q);
          state  <= FINISH;
        end

        FINISH: begin
          vmin        <= volt_t'((32'(smin) * VFS_MV) >> 12);
          vmax        <= volt_t'((32'(smax) * VFS_MV) >> 12);
          freq        <= freq_q;
          meas_valid  <= 1'b1;
          release_buf <= 1'b1;
          state       <= IDLE;
        end

        default: state <= IDLE;
      endcase
    end
  end

  // a division is never started while the previous one is running
  assert property (@(posedge clk) disable iff (rst) div_start |-> !div_busy);
endmodule
