// frame_buffer: double-buffered 1024 x 768 x 8-bit frame store in two external ZBT SRAMs,
// with the engine that builds each new frame and the read path that feeds the VGA output.
//
// Storage. Buffer b lives in ZBT chip b. A 36-bit word holds four pixels, one per 9-bit byte
// lane (lane = x[1:0], pixel in the lane's low 8 bits); word address = {0, y[9:0], x[9:2]}, so a
// buffer uses 768 x 256 words. At any time one chip is the output buffer, read for the display,
// and the other the construction buffer, written by the engine; flipping swaps the roles.
//
// ZBT timing (pipelined, no bus turnaround): a command (ce_n, we_n, bwe_n, addr) is held for one
// cycle; write data must be driven two cycles later (wdata with wdata_oe); read data is returned
// on rdata two cycles after the command. Every cycle that is not a write is a read.
//
// Display path. The VGA block sends its counters (hcount, vcount: 21 bits). Each cycle the
// output chip is read at that pixel's word; the lane is selected and the 8-bit RGB332 pixel is
// expanded to 24-bit colour. rgb is valid LATENCY = 4 cycles after the counters; outside the
// 1024 x 768 area it is black.
//
// Construction engine, per frame:
//   START   pulse nframe (the renderer starts on it);
//   ERASE   repaint in background colour the 700 trace pixels this buffer got two frames ago
//           (their heights are kept in a 2 x 700 history RAM), one per cycle;
//   RENDER  accept the renderer's grid and text pixel writes until it reports done;
//   TRACE   read the 700 column heights from the plotting BRAM and set one trace pixel per
//           column, recording the heights in the history RAM;
//   WAIT    stay idle until the output frame has been scanned out (start of vertical blank,
//           vcount = 768), then flip and start the next frame.
// A frame costs about 700 + 19612 + 700 writes, well under one frame time. After reset both
// chips are first cleared to background (196608 writes, both chips at once) when CLEAR_ON_RESET.
// Two 1024x768x8 frame buffers in the ZBT chips, the construction/output flip after the output
// frame is drawn, the idle wait and one pixel per trace column follow the design; the packing,
// the erase-by-history scheme, the order of the steps and the ZBT signalling are this design's.
module frame_buffer
  import scope_pkg::*;
#(
  parameter bit CLEAR_ON_RESET = 1'b1
) (
  input  logic                  clk,
  input  logic                  rst,
  // VGA block
  input  logic [HC_W-1:0]       hcount,
  input  logic [VC_W-1:0]       vcount,
  output logic [RGB_W-1:0]      rgb,
  // renderer
  output logic                  nframe,
  input  pixel_wr_t             pix,
  input  logic                  pix_valid,
  output logic                  pix_ready,
  input  logic                  render_done,
  // plotting BRAM read port
  output addr_t                 plot_raddr,
  input  plot_t                 plot_rdata,
  // status
  output logic                  out_buf,      // chip currently displayed
  // two ZBT SRAM chips
  output logic [1:0]                         zbt_ce_n,
  output logic [1:0]                         zbt_we_n,
  output logic [1:0][ZBT_LANES-1:0]          zbt_bwe_n,
  output logic [1:0][ZBT_AW-1:0]             zbt_addr,
  output logic [1:0][ZBT_DW-1:0]             zbt_wdata,
  output logic [1:0]                         zbt_wdata_oe,
  input  logic [1:0][ZBT_DW-1:0]             zbt_rdata
);
  localparam int unsigned N          = N_SAMPLES;
  localparam int unsigned CLEAR_WORDS = V_ACTIVE * H_ACTIVE / ZBT_LANES;

  typedef enum logic [2:0] {CLEAR, START, ERASE, RENDER, TRACE, WAIT_FLIP} state_e;
  state_e state;

  logic                 cons;                 // construction chip = ~out_buf
  logic [17:0]          clear_addr;
  addr_t                idx;                  // column being issued in ERASE / TRACE
  logic                 col_v;                // column idx_q's read data is valid
  addr_t                idx_q;
  logic [1:0]           hist_valid;

  assign cons = ~out_buf;

  // ---------------- trace history ----------------
  plot_t hist [2 * N];
  plot_t hist_q;
  logic  hist_we;
  addr_t idx_rd;                              // idx, kept inside the 700 columns
  assign idx_rd = (idx < addr_t'(N)) ? idx : '0;
  always_ff @(posedge clk) begin
    hist_q <= hist[int'(cons) * N + int'(idx_rd)];
    if (hist_we) hist[int'(cons) * N + int'(idx_q)] <= plot_rdata;
  end
  assign hist_we    = (state == TRACE) && col_v;
  assign plot_raddr = idx_rd;

  // ---------------- write request of this cycle ----------------
  logic             wr_en;
  logic [XY_W-1:0]  wr_x, wr_y;
  logic [PIX_W-1:0] wr_col;
  always_comb begin
    wr_en  = 1'b0;
    wr_x   = pix.x;
    wr_y   = pix.y;
    wr_col = pix.color;
    case (state)
      ERASE: if (col_v) begin
        wr_en  = 1'b1;
        wr_x   = XY_W'(PLOT_X0) + XY_W'(idx_q);
        wr_y   = trace_row(hist_q);
        wr_col = COL_BG;
      end
      RENDER: wr_en = pix_valid;
      TRACE: if (col_v) begin
        wr_en  = 1'b1;
        wr_x   = XY_W'(PLOT_X0) + XY_W'(idx_q);
        wr_y   = trace_row(plot_rdata);
        wr_col = COL_TRACE;
      end
      default: ;
    endcase
    if (wr_y >= XY_W'(V_ACTIVE)) wr_en = 1'b0;   // x is 10 bits, always on screen
  end

  assign pix_ready = (state == RENDER);
  assign nframe    = (state == START);

  // ---------------- engine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= CLEAR_ON_RESET ? CLEAR : START;
      out_buf    <= 1'b1;
      clear_addr <= '0;
      idx        <= '0;
      idx_q      <= '0;
      col_v      <= 1'b0;
      hist_valid <= '0;
    end else begin
      idx_q <= idx;
      col_v <= 1'b0;
      case (state)
        CLEAR: begin
          clear_addr <= clear_addr + 1'b1;
          if (clear_addr == 18'(CLEAR_WORDS - 1)) state <= START;
        end
        START: begin
          idx   <= '0;
          state <= ERASE;
        end
        ERASE: begin
          if (!hist_valid[cons]) begin
            state <= RENDER;
          end else begin
            if (idx < addr_t'(N)) begin
              idx   <= idx + 1'b1;
              col_v <= 1'b1;
            end
            if (col_v && idx_q == addr_t'(N - 1)) state <= RENDER;
          end
        end
        RENDER: if (render_done) begin
          idx   <= '0;
          state <= TRACE;
        end
        TRACE: begin
          if (idx < addr_t'(N)) begin
            idx   <= idx + 1'b1;
            col_v <= 1'b1;
          end
          if (col_v && idx_q == addr_t'(N - 1)) begin
            hist_valid[cons] <= 1'b1;
            state            <= WAIT_FLIP;
          end
        end
        WAIT_FLIP: if (vcount == VC_W'(V_ACTIVE) && hcount == '0) begin
          out_buf <= ~out_buf;
          state   <= START;
        end
        default: state <= START;
      endcase
    end
  end

  // ---------------- ZBT command and data pipelines ----------------
  logic [ZBT_AW-1:0] rd_addr;
  logic              rd_vis;
  assign rd_addr = {1'b0, vcount, hcount[9:2]};
  assign rd_vis  = (hcount < HC_W'(H_ACTIVE)) && (vcount < VC_W'(V_ACTIVE));

  logic [1:0][ZBT_DW-1:0] wd1, wd2, wd3;   // write data in the command cycle, +1, +2
  logic [1:0]             we1, we2, we3;

  for (genvar b = 0; b < 2; b++) begin : g_chip
    always_ff @(posedge clk) begin
      if (rst) begin
        zbt_ce_n[b]  <= 1'b1;
        zbt_we_n[b]  <= 1'b1;
        zbt_bwe_n[b] <= '1;
        zbt_addr[b]  <= '0;
        wd1[b]       <= '0;
        wd2[b]       <= '0;
        wd3[b]       <= '0;
        we1[b]       <= 1'b0;
        we2[b]       <= 1'b0;
        we3[b]       <= 1'b0;
      end else begin
        zbt_ce_n[b]  <= 1'b0;
        zbt_we_n[b]  <= 1'b1;
        zbt_bwe_n[b] <= '1;
        zbt_addr[b]  <= rd_addr;
        wd1[b]       <= '0;
        we1[b]       <= 1'b0;
        if (state == CLEAR) begin
          zbt_we_n[b]  <= 1'b0;
          zbt_bwe_n[b] <= '0;
          zbt_addr[b]  <= ZBT_AW'(clear_addr);
          wd1[b]       <= {ZBT_LANES{1'b0, COL_BG}};
          we1[b]       <= 1'b1;
        end else if (b == int'(cons) && wr_en) begin
          zbt_we_n[b]  <= 1'b0;
          zbt_bwe_n[b] <= ~(ZBT_LANES'(1) << wr_x[1:0]);
          zbt_addr[b]  <= {1'b0, wr_y, wr_x[9:2]};
          wd1[b]       <= {ZBT_LANES{1'b0, wr_col}};
          we1[b]       <= 1'b1;
        end
        wd2[b] <= wd1[b];
        we2[b] <= we1[b];
        wd3[b] <= wd2[b];
        we3[b] <= we2[b];
      end
    end
    assign zbt_wdata[b]    = wd3[b];
    assign zbt_wdata_oe[b] = we3[b];
  end

  // ---------------- display read path ----------------
  logic [2:0]       vis_d;
  logic [2:0][1:0]  lane_d;
  logic [2:0]       chip_d;
  always_ff @(posedge clk) begin
    if (rst) begin
      vis_d  <= '0;
      lane_d <= '0;
      chip_d <= '0;
      rgb    <= '0;
    end else begin
      vis_d  <= {vis_d[1:0], rd_vis};
      lane_d <= {lane_d[1:0], hcount[1:0]};
      chip_d <= {chip_d[1:0], out_buf};
      rgb    <= vis_d[2] ? rgb332_to_rgb888(zbt_rdata[chip_d[2]][9 * lane_d[2] +: 8]) : '0;
    end
  end
endmodule
