// oscilloscope_top: a digital storage oscilloscope - 12-bit, 10 MS/s acquisition to a
// 1024 x 768 VGA display with on-screen minimum, maximum, mean and frequency.
//
// Acquisition: the external ADC's samples (adc_data with a one-cycle adc_valid strobe at
// 10 MHz, already in this clock domain) go to the triggering block, which raises START when
// they cross the user trigger level, and to the sampling block, which then stores every n-th
// sample into a 700 x 12 BRAM. The computation block scales the record to 9-bit trace heights in
// the 700 x 9 plotting BRAM and measures VMIN / VMAX / VMEAN (mV) and FREQ (Hz).
// Display: the frame buffer keeps two frames in the two external ZBT SRAMs. While one is shown
// through the VGA block, the other is rebuilt: old trace erased, grid and text drawn by the
// rendering block (glyphs from the character map), new trace drawn from the plotting BRAM; the
// two are swapped at the next vertical blank.
// User interface: six buttons, debounced, step the time scale, vertical scale and trigger
// level (scaling block). trig_falling selects the trigger slope.
// One clock drives everything; at 65 MHz it is the VGA pixel clock. The ZBT data bus is
// brought out as separate write data, drive enable and read data, for a tristate pad at the
// board level. The block structure and bus widths follow the design's block diagram.
module oscilloscope_top
  import scope_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst,
  // ADC
  input  sample_t                            adc_data,
  input  logic                               adc_valid,
  // user inputs
  input  logic [5:0]                         btn,
  input  logic                               trig_falling,
  // ZBT SRAM chips
  output logic [1:0]                         zbt_ce_n,
  output logic [1:0]                         zbt_we_n,
  output logic [1:0][ZBT_LANES-1:0]          zbt_bwe_n,
  output logic [1:0][ZBT_AW-1:0]             zbt_addr,
  output logic [1:0][ZBT_DW-1:0]             zbt_wdata,
  output logic [1:0]                         zbt_wdata_oe,
  input  logic [1:0][ZBT_DW-1:0]             zbt_rdata,
  // VGA
  output logic [RGB_W-1:0]                   vga_rgb,
  output logic                               vga_hsync_n,
  output logic                               vga_vsync_n,
  output logic                               vga_blank_n
);
  // user interface
  logic [5:0] btn_clean;
  setting_t   duration, scale;
  sample_t    trig_level;

  debounce #(.WIDTH(6)) u_debounce (
    .clk, .rst, .btn_in(btn), .btn_out(btn_clean)
  );

  scaling u_scaling (
    .clk, .rst, .btn(btn_clean), .duration, .scale, .trig_level
  );

  // acquisition
  logic start;
  triggering u_triggering (
    .clk, .rst, .sample(adc_data), .sample_valid(adc_valid), .level(trig_level),
    .falling(trig_falling), .start
  );

  logic               data_ready, release_buf;
  logic [DECIM_W-1:0] capture_n;
  addr_t              smp_addr;
  sample_t            smp_data;
  sampling u_sampling (
    .clk, .rst, .sample(adc_data), .sample_valid(adc_valid), .start, .duration,
    .data_ready, .capture_n, .release_buf, .rd_addr(smp_addr), .rd_data(smp_data)
  );

  logic  plot_we;
  addr_t plot_waddr, plot_raddr;
  plot_t plot_wdata, plot_rdata;
  volt_t vmin, vmax, vmean;
  freq_t freq;
  logic  meas_valid;
  computation u_computation (
    .clk, .rst, .data_ready, .capture_n, .rd_addr(smp_addr), .rd_data(smp_data), .release_buf,
    .scale, .plot_we, .plot_addr(plot_waddr), .plot_data(plot_wdata),
    .vmin, .vmax, .vmean, .freq, .meas_valid
  );

  plotting u_plotting (
    .clk, .we(plot_we), .waddr(plot_waddr), .wdata(plot_wdata),
    .raddr(plot_raddr), .rdata(plot_rdata)
  );

  // display
  logic             nframe, pix_valid, pix_ready, render_done;
  pixel_wr_t        pix;
  logic [5:0]       char_code;
  logic [7:0]       char_xy;
  logic             char_pixel;
  logic [HC_W-1:0]  hcount;
  logic [VC_W-1:0]  vcount;
  logic [RGB_W-1:0] fb_rgb;
  logic             out_buf;

  rendering u_rendering (
    .clk, .rst, .nframe, .vmin, .vmax, .vmean, .freq, .duration, .scale,
    .pix, .pix_valid, .pix_ready, .done(render_done),
    .char_code, .char_xy, .char_pixel
  );

  charmap u_charmap (
    .char_code, .xy(char_xy), .pixel(char_pixel)
  );

  frame_buffer u_frame_buffer (
    .clk, .rst, .hcount, .vcount, .rgb(fb_rgb),
    .nframe, .pix, .pix_valid, .pix_ready, .render_done,
    .plot_raddr, .plot_rdata, .out_buf,
    .zbt_ce_n, .zbt_we_n, .zbt_bwe_n, .zbt_addr, .zbt_wdata, .zbt_wdata_oe, .zbt_rdata
  );

  vga u_vga (
    .clk, .rst, .hcount, .vcount, .rgb_in(fb_rgb),
    .vga_rgb, .vga_hsync_n, .vga_vsync_n, .vga_blank_n
  );
endmodule
