// Aperture compensation (edge enhancement) HPF.
//
// A detail signal carrying both horizontal and vertical edges is formed
// from the centre line H1 and the outer-line sum H02 = H0 + H2:
//   horizontal  Hh(z) = (1 + z^-1)(-1 + 2z^-1 - z^-2) / 2   applied to H1
//   vertical    Hv    = (1 + z^-1)(2*H1 - H02) / 2
// The (1 + z^-1) factor cancels the colour carrier at half the pixel rate.
// The horizontal filter is the document's; the vertical one is this
// design's reading (a [-1 2 -1] line filter with the same carrier notch).
// The detail d = Hh + Hv then goes through a level-dependent gain: if |d| is
// below `core` (noise) or above 16*`limit` (large edges that would give
// artifacts) it is dropped; otherwise it is scaled by gain/16. The result
// AP is saturated to 12 bits signed.
//
// Timing: taps x(n)..x(n-3) are combined in one stage and cored in a
// second, so AP is centred on the same sample as y_lpf's YH.
module aperture_hpf
  import ccd_dsp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t h1,
  input  logic [PIX_W:0] h02,
  input  logic [7:0] gain,    // 16 = 1.0
  input  logic [7:0] core,
  input  logic [7:0] limit,
  output logic signed [11:0] ap
);

  pix_t x1, x2, x3;
  logic [PIX_W:0] y1, y2;
  logic signed [14:0] d;

  // 2*sum of both filters, before the final /2
  logic signed [15:0] d2;
  always_comb begin
    d2 = -$signed({6'b0, h1}) + 16'sd3 * $signed({6'b0, x1}) + 16'sd3 * $signed({6'b0, x2})
         - $signed({6'b0, x3}) - $signed({5'b0, y1}) - $signed({5'b0, y2});
  end

  logic [14:0] mag;
  logic signed [24:0] scaled;
  always_comb begin
    mag    = d[14] ? 15'(-d) : 15'(d);
    scaled = d * $signed({1'b0, gain});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      x3 <= '0;
      y1 <= '0;
      y2 <= '0;
      d  <= '0;
      ap <= '0;
    end else begin
      x1 <= h1;
      x2 <= x1;
      x3 <= x2;
      y1 <= h02;
      y2 <= y1;
      d  <= 15'(d2 >>> 1);
      if (mag < 15'(core) || mag > {3'b0, limit, 4'b0})
        ap <= '0;
      else
        ap <= 12'(sat_s(32'(scaled >>> 4), 12));
    end
  end

endmodule
