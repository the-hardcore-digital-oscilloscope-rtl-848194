// rendering: draws the graticule and the alphanumeric read-out into the construction buffer.
//
// On each NFRAME pulse from the frame buffer the module latches the measurements (VMIN, VMAX,
// VMEAN in mV, FREQ in Hz) and the DURATION / SCALE settings, converts them to decimal, and then
// streams pixel writes {x, y, colour} to the frame buffer over a valid/ready handshake, one per
// accepted cycle:
//   1. grid: 11 vertical lines (every 70 columns and the right edge) of 512 pixels and
//      9 horizontal lines (every 64 rows and the bottom edge) of 700 pixels - 11932 writes;
//   2. text: 6 lines of 16 glyphs, every 8 x 10 glyph cell written in full (lit pixels white,
//      others black), so old text needs no erasing - 7680 writes.
// Glyph pixels come from the character map (combinational), addressed by CHAR (6 bits) and
// XY = {row, column} (8 bits). done goes high when the last pixel has been accepted and stays
// high until the next NFRAME. The read-out is
//   VMIN  dd.ddd V / VMAX  dd.ddd V / VMEAN dd.ddd V / FREQ  ddddddd HZ /
//   T/DIV dddddd US / V/DIV ddd MV
// with leading zeros blanked; T/DIV = 70 columns x n x 100 ns = 7n us, V/DIV = 64 rows at gain
// G/8 pixel per LSB = VFS_MV / (8 G) mV. Grid, measurement and scale text drawn per frame, 8x10
// glyphs and the 8-bit pixel follow the design; layout, colours and text format are this design's
// choice.
module rendering
  import scope_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       nframe,
  input  volt_t      vmin,
  input  volt_t      vmax,
  input  volt_t      vmean,
  input  freq_t      freq,
  input  setting_t   duration,
  input  setting_t   scale,
  // pixel writes to the frame buffer
  output pixel_wr_t  pix,
  output logic       pix_valid,
  input  logic       pix_ready,
  output logic       done,
  // character map
  output logic [5:0] char_code,
  output logic [7:0] char_xy,
  input  logic       char_pixel
);
  localparam int unsigned DIGITS = 7;
  typedef logic [DIGITS*4-1:0] bcd_t;

  // binary to BCD by shift-and-add-3
  function automatic bcd_t to_bcd(logic [19:0] bin);
    bcd_t b = '0;
    for (int i = 19; i >= 0; i--) begin
      for (int d = 0; d < DIGITS; d++)
        if (b[d*4 +: 4] > 4'd4) b[d*4 +: 4] = b[d*4 +: 4] + 4'd3;
      b = {b[DIGITS*4-2:0], bin[i]};
    end
    return b;
  endfunction

  function automatic logic [9:0] vdiv_mv(setting_t code);
    case (gain(code))
      4'd1: return 10'(VFS_MV * GRID_DY * 8 / (4096 * 1));
      4'd2: return 10'(VFS_MV * GRID_DY * 8 / (4096 * 2));
      4'd3: return 10'(VFS_MV * GRID_DY * 8 / (4096 * 3));
      4'd4: return 10'(VFS_MV * GRID_DY * 8 / (4096 * 4));
      4'd5: return 10'(VFS_MV * GRID_DY * 8 / (4096 * 5));
      4'd6: return 10'(VFS_MV * GRID_DY * 8 / (4096 * 6));
      4'd7: return 10'(VFS_MV * GRID_DY * 8 / (4096 * 7));
      default: return 10'(VFS_MV * GRID_DY * 8 / (4096 * 8));
    endcase
  endfunction

  // character codes: ASCII - 0x20
  function automatic logic [5:0] ch(byte unsigned a);
    return 6'(a - 8'h20);
  endfunction
  function automatic logic [5:0] dig(logic [3:0] d);
    return 6'h10 + 6'(d);
  endfunction

  typedef enum logic [2:0] {IDLE, GRID_V, GRID_H, TEXT, DONE} state_e;
  state_e state;

  bcd_t b_vmin, b_vmax, b_vmean, b_freq, b_tdiv, b_vdiv;

  // drawing counters
  logic [3:0] k;         // grid line
  logic [9:0] j;         // position along a grid line
  logic [2:0] tl;        // text line
  logic [3:0] tc;        // text column
  logic [3:0] r;         // glyph row
  logic [2:0] c;         // glyph column

  assign done = (state == DONE);

  // digit i (0 = units) of a BCD value, blank when it and every digit above it up to top are 0
  function automatic logic [5:0] num_char(bcd_t v, int i, int top);
    logic nz = 1'b0;
    for (int d = 0; d < DIGITS; d++)
      if (d >= i && d <= top && v[d*4 +: 4] != 4'd0) nz = 1'b1;
    return (nz || i == 0) ? dig(v[i*4 +: 4]) : ch(" ");
  endfunction

  function automatic logic [5:0] volt_field(bcd_t v, logic [3:0] col);
    case (col)
      4'd6:  return num_char(v, 4, 4);
      4'd7:  return dig(v[15:12]);
      4'd8:  return ch(".");
      4'd9:  return dig(v[11:8]);
      4'd10: return dig(v[7:4]);
      4'd11: return dig(v[3:0]);
      4'd13: return ch("V");
      default: return ch(" ");
    endcase
  endfunction

  // text screen: character at (line, column)
  logic [5:0] text_char;
  always_comb begin
    text_char = ch(" ");
    case (tl)
      3'd0: case (tc)
              4'd0: text_char = ch("V"); 4'd1: text_char = ch("M");
              4'd2: text_char = ch("I"); 4'd3: text_char = ch("N");
              default: text_char = volt_field(b_vmin, tc);
            endcase
      3'd1: case (tc)
              4'd0: text_char = ch("V"); 4'd1: text_char = ch("M");
              4'd2: text_char = ch("A"); 4'd3: text_char = ch("X");
              default: text_char = volt_field(b_vmax, tc);
            endcase
      3'd2: case (tc)
              4'd0: text_char = ch("V"); 4'd1: text_char = ch("M");
              4'd2: text_char = ch("E"); 4'd3: text_char = ch("A");
              4'd4: text_char = ch("N");
              default: text_char = volt_field(b_vmean, tc);
            endcase
      3'd3: case (tc)
              4'd0: text_char = ch("F"); 4'd1: text_char = ch("R");
              4'd2: text_char = ch("E"); 4'd3: text_char = ch("Q");
              4'd14: text_char = ch("H"); 4'd15: text_char = ch("Z");
              default: if (tc >= 4'd6 && tc <= 4'd12) text_char = num_char(b_freq, 12 - int'(tc), 6);
            endcase
      3'd4: case (tc)
              4'd0: text_char = ch("T"); 4'd1: text_char = ch("/");
              4'd2: text_char = ch("D"); 4'd3: text_char = ch("I");
              4'd4: text_char = ch("V");
              4'd13: text_char = ch("U"); 4'd14: text_char = ch("S");
              default: if (tc >= 4'd6 && tc <= 4'd11) text_char = num_char(b_tdiv, 11 - int'(tc), 5);
            endcase
      3'd5: case (tc)
              4'd0: text_char = ch("V"); 4'd1: text_char = ch("/");
              4'd2: text_char = ch("D"); 4'd3: text_char = ch("I");
              4'd4: text_char = ch("V");
              4'd10: text_char = ch("M"); 4'd11: text_char = ch("V");
              default: if (tc >= 4'd6 && tc <= 4'd8) text_char = num_char(b_vdiv, 8 - int'(tc), 2);
            endcase
      default: text_char = ch(" ");
    endcase
  end

  assign char_code = text_char;
  assign char_xy   = {r, 1'b0, c};

  // pixel being offered
  always_comb begin
    pix       = '0;
    pix_valid = 1'b0;
    case (state)
      GRID_V: begin
        pix_valid = 1'b1;
        pix.x     = XY_W'(PLOT_X0) + ((k == 4'd10) ? XY_W'(N_SAMPLES - 1) : XY_W'(k) * XY_W'(GRID_DX));
        pix.y     = XY_W'(PLOT_Y0) + j;
        pix.color = COL_GRID;
      end
      GRID_H: begin
        pix_valid = 1'b1;
        pix.x     = XY_W'(PLOT_X0) + j;
        pix.y     = XY_W'(PLOT_Y0) + ((k == 4'd8) ? XY_W'(PLOT_H - 1) : XY_W'(k) * XY_W'(GRID_DY));
        pix.color = COL_GRID;
      end
      TEXT: begin
        pix_valid = 1'b1;
        pix.x     = XY_W'(TEXT_X0) + XY_W'(tc) * XY_W'(GLYPH_W) + XY_W'(c);
        pix.y     = XY_W'(TEXT_Y0) + XY_W'(tl) * XY_W'(LINE_PITCH) + XY_W'(r);
        pix.color = char_pixel ? COL_TEXT : COL_BG;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      k       <= '0;
      j       <= '0;
      tl      <= '0;
      tc      <= '0;
      r       <= '0;
      c       <= '0;
      b_vmin  <= '0;
      b_vmax  <= '0;
      b_vmean <= '0;
      b_freq  <= '0;
      b_tdiv  <= '0;
      b_vdiv  <= '0;
    end else if (nframe) begin
      b_vmin  <= to_bcd(20'(vmin));
      b_vmax  <= to_bcd(20'(vmax));
      b_vmean <= to_bcd(20'(vmean));
      b_freq  <= to_bcd(freq);
      b_tdiv  <= to_bcd(20'(decimation(duration) * 20'(GRID_DX / 10)));
      b_vdiv  <= to_bcd(20'(vdiv_mv(scale)));
      k       <= '0;
      j       <= '0;
      state   <= GRID_V;
    end else if (pix_valid && pix_ready) begin
      case (state)
        GRID_V: if (j == 10'(PLOT_H - 1)) begin
          j <= '0;
          if (k == 4'd10) begin
            k     <= '0;
            state <= GRID_H;
          end else k <= k + 1'b1;
        end else j <= j + 1'b1;
        GRID_H: if (j == 10'(N_SAMPLES - 1)) begin
          j <= '0;
          if (k == 4'd8) begin
            tl    <= '0;
            tc    <= '0;
            r     <= '0;
            c     <= '0;
            state <= TEXT;
          end else k <= k + 1'b1;
        end else j <= j + 1'b1;
        TEXT: begin
          c <= c + 1'b1;
          if (c == 3'(GLYPH_W - 1)) begin
            if (r == 4'(GLYPH_H - 1)) begin
              r <= '0;
              if (tc == 4'(TEXT_COLS - 1)) begin
                tc <= '0;
                if (tl == 3'(TEXT_LINES - 1)) state <= DONE;
                else tl <= tl + 1'b1;
              end else tc <= tc + 1'b1;
            end else r <= r + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
