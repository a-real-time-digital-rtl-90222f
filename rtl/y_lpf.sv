// Luminance low-pass filter (YH).
//
// On the complementary colour filter array, every pair of horizontally
// adjacent samples holds C1+C2 or C3+C4, and both sums equal 2R+3G+2B.
// The filter therefore adds each sample to its neighbour,
// YH = x(n-1) + x(n-2), which removes the colour carrier at half the pixel
// rate and leaves an 11-bit luminance value.
//
// Timing: the output is delayed so that its centre lines up with the
// centre of the aperture HPF (both appear LAT_APERTURE = 3 cycles after
// the H1 pixel pair they are centred on). The document only names this
// filter; the two-tap sum is this design's choice.
module y_lpf
  import ccd_dsp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t din,                 // H1, centre line
  output logic [PIX_W:0] yh
);

  pix_t x1, x2;
  logic [PIX_W:0] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      s  <= '0;
      yh <= '0;
    end else begin
      x1 <= din;
      x2 <= x1;
      s  <= {1'b0, x1} + {1'b0, x2};
      yh <= s;
    end
  end

endmodule
