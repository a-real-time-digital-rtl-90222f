// Luminance level adjustment.
//
// Adds the aperture detail to the low-passed luminance (YAP = YH + AP, the
// adder in front of this block) and scales the sum by gain/128 into the
// 10-bit range expected by the gamma ROM: YAD = clip((YAP * gain) >> 7).
// Negative sums clip to 0, sums above 1023 after scaling clip to 1023.
// The default gain of 64 maps the 11-bit YH range onto 10 bits.
//
// Timing: two register stages (sum, then scale). The document names this
// block only; gain-and-clip is this design's choice.
module level_adjust
  import ccd_dsp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic [PIX_W:0] yh,
  input  logic signed [11:0] ap,
  input  logic [7:0] gain,          // 128 = 1.0
  output logic signed [12:0] yap,
  output pix_t yad
);

  logic signed [21:0] prod;
  assign prod = yap * $signed({1'b0, gain});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yap <= '0;
      yad <= '0;
    end else begin
      yap <= $signed({2'b0, yh}) + 13'(ap);
      yad <= pix_t'(sat_u(32'(prod >>> 7), PIX_W));
    end
  end

endmodule
