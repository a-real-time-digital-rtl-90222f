// Real-time camera DSP for a single-chip interline-transfer CCD with a
// complementary (Mg, G, Cy, Ye) colour filter array.
//
// One 10-bit sample per pixel clock (14.318 MHz) enters, already summed
// over two vertically adjacent photosites by the sensor, so each sample
// is one of C1 = Cy+G, C2 = Ye+Mg, C3 = Cy+Mg, C4 = Ye+G. The chain is:
//   black level clamp -> scanning line buffer (H0, H1, H2, H02)
//   luma:   Y LPF + aperture HPF -> level adjust -> gamma -> digital Y
//                                                        -> Y encoder -> Y D/A code
//   chroma: line switching -> colour separation matrix -> white balance
//           -> gamma (G and B/R) -> Cb,Cr matrix -> digital C
//                                               -> C encoder -> C D/A code
// Digital Y and the Cb/Cr bus together form 4:2:2 16-bit YCbCr; digital Y
// is delayed by Y_ALIGN cycles so that each Y sample leaves with the
// chroma computed around the same pixel. The serial interface loads the
// white-balance gains and other settings from the camera microcontroller.
// The D/A converters are analog and not part of this RTL: their 8-bit
// input codes are the y_dac and c_dac ports.
//
// Input timing: hd marks the first pixel of a line, vd the first line of a
// field (with hd), field selects odd (0) or even (1), ob_win covers the
// optical black pixels. Lines must be exactly H_TOTAL clocks long.
// Encoder timing comes from hsync/vsync or csync (register sync_mode).
// The separate H0 and H2 lines, YAP, the measured black level and the
// encoder's vertical-interval flag are block outputs this top does not use;
// they stay as named internal signals for observation in simulation.
module ccd_dsp_top
  import ccd_dsp_pkg::*;
#(
  parameter int H_TOTAL = 910,
  parameter int OB_LOG2 = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  // from the A/D converter and the sensor timing generator
  input  pix_t  id,
  input  logic  hd,
  input  logic  vd,
  input  logic  field,
  input  logic  ob_win,
  // serial link from the microcontroller
  input  logic  sclk,
  input  logic  sdata,
  input  logic  sen_n,
  // encoder sync inputs
  input  logic  hsync,
  input  logic  vsync,
  input  logic  csync,
  // digital 4:2:2 output
  output code_t digital_y,
  output logic signed [7:0] digital_c,
  output logic  digital_c_is_cr,
  // codes for the Y and C D/A converters
  output code_t y_dac,
  output code_t c_dac
);

  ctrl_regs_t regs;

  serial_interface u_serial (
    .clk, .rst_n, .sclk, .sdata, .sen_n, .regs
  );

  // ---------------- front end ----------------
  logic col_odd_in, line_c34_in, col_odd_h1, line_c34_prev;
  pix_t blc, ob_level;
  pix_t h0, h1, h2;
  logic [PIX_W:0] h02;

  pixel_timing u_timing (
    .clk, .rst_n, .hd, .vd, .field, .col_odd(col_odd_in), .line_c34(line_c34_in)
  );

  black_level_clamp #(.OB_LOG2(OB_LOG2)) u_blc (
    .clk, .rst_n, .din(id), .ob_win, .dout(blc), .ob_level
  );

  scanning_line_buffer #(.H_TOTAL(H_TOTAL)) u_slb (
    .clk, .rst_n, .din(blc), .h0, .h1, .h2, .h02
  );

  // Sample phase at H1: three register stages behind the input; H1 is
  // one line older than the input, so of the other line kind.
  delay_line #(.W(2), .N(3)) u_phase_dly (
    .clk, .rst_n, .din({col_odd_in, line_c34_in}), .dout({col_odd_h1, line_c34_prev})
  );

  // ---------------- luminance ----------------
  logic [PIX_W:0] yh;
  logic signed [11:0] ap;
  logic signed [12:0] yap;
  pix_t yad;
  code_t y_gamma;

  y_lpf u_ylpf (.clk, .rst_n, .din(h1), .yh);

  aperture_hpf u_ap (
    .clk, .rst_n, .h1, .h02,
    .gain(regs.ap_gain), .core(regs.ap_core), .limit(regs.ap_limit), .ap
  );

  level_adjust u_level (
    .clk, .rst_n, .yh, .ap, .gain(regs.level_gain), .yap, .yad
  );

  gamma_lut u_gamma_y (.clk, .din(yad), .dout(y_gamma));

  delay_line #(.W(OUT_W), .N(Y_ALIGN)) u_y_align (
    .clk, .rst_n, .din(y_gamma), .dout(digital_y)
  );

  // ---------------- chrominance ----------------
  pix_t c12, c34, g_sep, br_sep, gw, brw;
  logic col_odd_ls, br_is_b, brw_is_b, brg_is_b;
  code_t gg, brg;

  line_switching u_ls (
    .clk, .rst_n, .h1, .h02, .line_c34(!line_c34_prev), .col_odd(col_odd_h1),
    .c12, .c34, .col_odd_o(col_odd_ls)
  );

  color_separation u_csep (
    .clk, .rst_n, .c12, .c34, .col_odd(col_odd_ls), .g(g_sep), .br(br_sep), .br_is_b
  );

  white_balance u_wb (
    .clk, .rst_n, .g(g_sep), .br(br_sep), .br_is_b,
    .gain_r(regs.wb_r), .gain_g(regs.wb_g), .gain_b(regs.wb_b),
    .gw, .brw, .brw_is_b
  );

  gamma_lut u_gamma_g  (.clk, .din(gw),  .dout(gg));
  gamma_lut u_gamma_br (.clk, .din(brw), .dout(brg));

  delay_line #(.W(1), .N(LAT_GAMMA)) u_isb_dly (
    .clk, .rst_n, .din(brw_is_b), .dout(brg_is_b)
  );

  cbcr_matrix u_cbcr (
    .clk, .rst_n, .g(gg), .br(brg), .br_is_b(brg_is_b),
    .cbcr(digital_c), .cbcr_is_cr(digital_c_is_cr)
  );

  // ---------------- encoders ----------------
  logic enc_sync, enc_blank, enc_burst, enc_vert;
  logic enc_sync_y, enc_blank_y;
  code_t y_enc_in;

  encoder_timing #(.H_TOTAL(H_TOTAL)) u_enc_timing (
    .clk, .rst_n, .sync_mode(regs.sync_mode), .hsync, .vsync, .csync,
    .sync(enc_sync), .blank(enc_blank), .burst(enc_burst), .vert(enc_vert)
  );

  // The C encoder is three stages deeper than the Y encoder: delay Y by
  // three and its flags by one (the C encoder delays its flags by one
  // internally), so the two D/A codes stay in step.
  delay_line #(.W(OUT_W), .N(3)) u_yenc_dly (
    .clk, .rst_n, .din(digital_y), .dout(y_enc_in)
  );
  delay_line #(.W(2), .N(1)) u_yflag_dly (
    .clk, .rst_n, .din({enc_sync, enc_blank}), .dout({enc_sync_y, enc_blank_y})
  );

  encoder_y u_enc_y (
    .clk, .rst_n, .y(y_enc_in), .sync(enc_sync_y), .blank(enc_blank_y), .y_dac
  );

  encoder_c u_enc_c (
    .clk, .rst_n, .cbcr(digital_c), .cbcr_is_cr(digital_c_is_cr),
    .blank(enc_blank), .burst(enc_burst), .c_dac
  );

endmodule
