// scope_pkg: constants, types and small pure functions shared by the oscilloscope blocks.
//
// The record length (700 samples), the 12-bit sample, the 9-bit trace height, the 15-bit
// voltage and 20-bit frequency measurements, the 10 MHz ADC rate, the 4-bit DURATION and
// SCALE codes, the 8x10 1-bit glyphs and the 1024x768, 8-bit-per-pixel frame buffer all follow
// the design. The rest is this implementation's choice: the 1-2-5 decimation table, the voltage
// gain steps, millivolt fixed point with a 2.000 V full scale, the screen layout and the
// RGB332 palette.
package scope_pkg;

  // ---------------- acquisition ----------------
  localparam int unsigned N_SAMPLES = 700;       // samples per record = trace columns
  localparam int unsigned ADDR_W    = 10;        // sample / column address
  localparam int unsigned SAMPLE_W  = 12;        // ADC resolution
  localparam int unsigned PLOT_W    = 9;         // trace height in pixels (0..511)
  localparam int unsigned VOLT_W    = 15;        // VMIN / VMAX / VMEAN, integer millivolts
  localparam int unsigned FREQ_W    = 20;        // FREQ, integer hertz
  localparam int unsigned SET_W     = 4;         // DURATION and SCALE codes
  localparam int unsigned DECIM_W   = 17;        // decimation factor, up to 100000
  localparam int unsigned SAMPLE_HZ = 10_000_000;
  localparam int unsigned VFS_MV    = 2000;      // ADC full-scale input span in mV
  localparam int unsigned SCALE_MAX = 7;         // gain steps 1/8 .. 8/8 pixel per LSB

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [PLOT_W-1:0]   plot_t;
  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [VOLT_W-1:0]   volt_t;
  typedef logic [FREQ_W-1:0]   freq_t;
  typedef logic [SET_W-1:0]    setting_t;

  // Capture keeps every n-th sample; n follows a 1-2-5 sequence over the 16 DURATION codes.
  function automatic logic [DECIM_W-1:0] decimation(setting_t code);
    case (code)
      4'd0:  return 17'd1;      4'd1:  return 17'd2;      4'd2:  return 17'd5;
      4'd3:  return 17'd10;     4'd4:  return 17'd20;     4'd5:  return 17'd50;
      4'd6:  return 17'd100;    4'd7:  return 17'd200;    4'd8:  return 17'd500;
      4'd9:  return 17'd1000;   4'd10: return 17'd2000;   4'd11: return 17'd5000;
      4'd12: return 17'd10000;  4'd13: return 17'd20000;  4'd14: return 17'd50000;
      default: return 17'd100000;
    endcase
  endfunction

  // Vertical gain numerator G (pixel = 256 + (sample-2048)*G/8); SCALE codes above 7 saturate.
  function automatic logic [3:0] gain(setting_t code);
    return (code > SET_W'(SCALE_MAX)) ? 4'd8 : 4'(code) + 4'd1;
  endfunction

  // ---------------- display ----------------
  localparam int unsigned H_ACTIVE = 1024;
  localparam int unsigned V_ACTIVE = 768;
  localparam int unsigned HC_W     = 11;         // hcount width (VGA bus: 11 + 10 = 21 bits)
  localparam int unsigned VC_W     = 10;
  localparam int unsigned XY_W     = 10;         // pixel coordinate width
  localparam int unsigned PIX_W    = 8;          // bits per stored pixel
  localparam int unsigned RGB_W    = 24;

  // Scope window: 700 x 512 pixels, grid of 10 x 8 divisions.
  localparam int unsigned PLOT_X0  = 162;
  localparam int unsigned PLOT_Y0  = 32;
  localparam int unsigned PLOT_H   = 512;
  localparam int unsigned GRID_DX  = 70;
  localparam int unsigned GRID_DY  = 64;
  // Text: 6 lines of 16 glyphs of 8x10, lines 12 pixels apart, below the scope window.
  localparam int unsigned TEXT_X0    = 162;
  localparam int unsigned TEXT_Y0    = 576;
  localparam int unsigned TEXT_LINES = 6;
  localparam int unsigned TEXT_COLS  = 16;
  localparam int unsigned LINE_PITCH = 12;
  localparam int unsigned GLYPH_W    = 8;
  localparam int unsigned GLYPH_H    = 10;

  // RGB332 colours
  localparam logic [PIX_W-1:0] COL_BG    = 8'h00;
  localparam logic [PIX_W-1:0] COL_GRID  = 8'h49;
  localparam logic [PIX_W-1:0] COL_TRACE = 8'h1C;
  localparam logic [PIX_W-1:0] COL_TEXT  = 8'hFF;

  typedef struct packed {
    logic [XY_W-1:0]  x;
    logic [XY_W-1:0]  y;
    logic [PIX_W-1:0] color;
  } pixel_wr_t;

  // Screen row of trace height v (0 = bottom of the window).
  function automatic logic [XY_W-1:0] trace_row(plot_t v);
    return XY_W'(PLOT_Y0 + PLOT_H - 1) - XY_W'(v);
  endfunction

  function automatic logic [RGB_W-1:0] rgb332_to_rgb888(logic [PIX_W-1:0] p);
    return {p[7:5], p[7:5], p[7:6], p[4:2], p[4:2], p[4:3], p[1:0], p[1:0], p[1:0], p[1:0]};
  endfunction

  // ---------------- ZBT frame store ----------------
  localparam int unsigned ZBT_AW = 19;           // 512K words
  localparam int unsigned ZBT_DW = 36;           // 4 byte lanes of 9 bits, one pixel per lane
  localparam int unsigned ZBT_LANES = 4;

endpackage
