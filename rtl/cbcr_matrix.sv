// Cb, Cr matrix (CCIR 601 colour differences).
//
// From gamma-corrected R, G, B it forms the unbiased (signed) colour
// differences
//   Cb =  0.512 (B - G) - 0.174 (R - G)
//   Cr = -0.083 (B - G) + 0.512 (R - G)
// with the coefficients as constants in units of 1/1024 (524, 178, 85),
// rounded and saturated to 8 bits signed. B arrives on the B/R bus one
// cycle before the R of the same pair; B and its G are held, and when R
// arrives G is taken as the mean of the pair's two G values. The results
// leave on one 8-bit bus as Cb then Cr (cbcr_is_cr), which with the 8-bit
// Y gives the 4:2:2 16-bit YCbCr format.
//
// Timing: Cb leaves 2 cycles after the R sample, Cr one cycle later.
// The equations follow the document; the pairing and bus order are this
// design's own.
module cbcr_matrix
  import ccd_dsp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  code_t g,
  input  code_t br,
  input  logic br_is_b,
  output logic signed [7:0] cbcr,
  output logic cbcr_is_cr
);

  code_t b_h, g_h;
  logic  b_seen;
  logic signed [7:0] cb_r, cr_r;
  logic vld;

  logic [8:0] g_sum;
  code_t g_mean;
  logic signed [9:0] bg, rg;
  logic signed [21:0] cb_v, cr_v;
  always_comb begin
    g_sum  = 9'(g_h) + 9'(g) + 9'd1;
    g_mean = 8'(g_sum >> 1);
    bg     = $signed({2'b0, b_h}) - $signed({2'b0, g_mean});
    rg     = $signed({2'b0, br})  - $signed({2'b0, g_mean});
    cb_v  = (22'sd524 * bg - 22'sd178 * rg + 22'sd512) >>> 10;
    cr_v  = (-22'sd85 * bg + 22'sd524 * rg + 22'sd512) >>> 10;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_h        <= '0;
      g_h        <= '0;
      b_seen     <= 1'b0;
      cb_r       <= '0;
      cr_r       <= '0;
      vld        <= 1'b0;
      cbcr       <= '0;
      cbcr_is_cr <= 1'b0;
    end else begin
      b_seen <= br_is_b;
      vld    <= 1'b0;
      if (br_is_b) begin
        b_h <= br;
        g_h <= g;
      end else if (b_seen) begin
        cb_r <= 8'(sat_s(32'(cb_v), 8));
        cr_r <= 8'(sat_s(32'(cr_v), 8));
        vld  <= 1'b1;
      end
      if (vld) begin
        cbcr       <= cb_r;
        cbcr_is_cr <= 1'b0;
      end else begin
        cbcr       <= cr_r;
        cbcr_is_cr <= 1'b1;
      end
    end
  end

endmodule
