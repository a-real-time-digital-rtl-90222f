// Luminance (Y) encoder for the S-video Y output.
//
// Turns the gamma-corrected 8-bit Y into the code for the 8-bit Y D/A
// converter: the sync tip level during sync, the blanking level during
// blanking, and otherwise blanking level plus Y scaled by 5/8
// ((Y >> 1) + (Y >> 3), shifts only), so that Y = 255 gives code 238.
// With the default levels one IRE unit is 1.6 codes: sync tip 16,
// blanking 80 (40 IRE above the tip), peak white 238 (about 99 IRE).
//
// Timing: registered, 1 cycle. The document states that the encoder
// produces NTSC Y from the YCbCr data with external sync; the levels and
// the scaling are this design's choices.
module encoder_y
  import ccd_dsp_pkg::*;
#(
  parameter int SYNC_LEVEL  = 16,
  parameter int BLANK_LEVEL = 80
) (
  input  logic  clk,
  input  logic  rst_n,
  input  code_t y,
  input  logic  sync,
  input  logic  blank,
  output code_t y_dac
);

  code_t y_scaled;
  assign y_scaled = (y >> 1) + (y >> 3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y_dac <= code_t'(BLANK_LEVEL);
    else if (sync)   y_dac <= code_t'(SYNC_LEVEL);
    else if (blank)  y_dac <= code_t'(BLANK_LEVEL);
    else             y_dac <= code_t'(BLANK_LEVEL) + y_scaled;
  end

endmodule
