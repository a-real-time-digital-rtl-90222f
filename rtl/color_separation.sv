// Colour separation matrix.
//
// From the C1/C2 and C3/C4 streams it forms, at every pixel and from each
// sample and its left neighbour,
//   CY = (C1 + C2 + C3 + C4) / 2 = 2r + 3g + 2b
//   CR = C2 - C1 = 2r - g
//   CB = C3 - C4 = 2b - g
// CR and CB pass through the colour LPF
//   H(z) = 0.125(1 + z^-4) + 0.25(z^-1 + z^-3) + 0.3125 z^-2
// (taps 2,4,5,4,2 / 16, shifts and adds only). Since chrominance needs only
// half the luminance rate, each pair of filtered values is averaged and
// held for two pixels (down-sampling by 2). The primaries are then
//   R = MATR*CY + CR,  G = MATG*CY - (CR + CB),  B = MATB*CY + CB
// with MATx in units of 1/128 (constant multiplies, so shift-add logic).
// The G and B rows are this design's reading of the document's equations,
// chosen so that CB = 2b - g feeds B and -(CR+CB) cancels r and b in G.
// The defaults make a white scene give R = G = B = 3 units (within 1.5%),
// allowing for the LPF's DC gain of 17/16.
//
// Outputs: G at every pixel, and one B/R bus that carries B in odd output
// cycles (br_is_b = 1) and R in the even cycle after it; the B and R of
// one such pair come from the same averaged CR/CB pair. All outputs are
// saturated to 10 bits.
// Timing: LAT_COLOR_SEP cycles from the pixel pair to the RGB outputs.
module color_separation
  import ccd_dsp_pkg::*;
#(
  parameter int MATR = 35,
  parameter int MATG = 94,
  parameter int MATB = 35
) (
  input  logic clk,
  input  logic rst_n,
  input  pix_t c12,
  input  pix_t c34,
  input  logic col_odd,
  output pix_t g,
  output pix_t br,
  output logic br_is_b
);

  // stage 0: previous samples
  pix_t p12, p34;

  // new per-pixel colour differences and luminance
  logic signed [11:0] cr_n, cb_n;
  logic [11:0] cy_sum;
  logic [10:0] cy_n;
  always_comb begin
    if (col_odd) begin
      cr_n = $signed({2'b0, c12}) - $signed({2'b0, p12});
      cb_n = $signed({2'b0, p34}) - $signed({2'b0, c34});
    end else begin
      cr_n = $signed({2'b0, p12}) - $signed({2'b0, c12});
      cb_n = $signed({2'b0, c34}) - $signed({2'b0, p34});
    end
    cy_sum = 12'(c12) + 12'(p12) + 12'(c34) + 12'(p34);
    cy_n   = 11'(cy_sum >> 1);
  end

  // stage 1: five-tap delay lines
  logic signed [11:0] cr_t [5];
  logic signed [11:0] cb_t [5];
  logic [10:0]        cy_t [3];
  logic               odd_t [3];

  function automatic logic signed [11:0] clpf(input logic signed [11:0] a0, a1, a2, a3, a4);
    logic signed [16:0] acc;
    acc = 17'sd2 * (17'(a0) + 17'(a4)) + 17'sd4 * (17'(a1) + 17'(a3)) + 17'sd5 * 17'(a2);
    return 12'(sat_s(32'(acc >>> 4), 12));
  endfunction

  // stage 2: filtered values, stage 3: pair average, stage 4: RGB
  logic signed [11:0] cr_f, cb_f, cr_fp, cb_fp, cr_h, cb_h;
  logic [10:0] cy2, cy3;
  logic        odd2, odd3;

  logic signed [12:0] cr_pair, cb_pair;
  logic signed [11:0] cr_avg, cb_avg;
  assign cr_pair = 13'(cr_f) + 13'(cr_fp);
  assign cb_pair = 13'(cb_f) + 13'(cb_fp);
  assign cr_avg  = 12'(cr_pair >>> 1);
  assign cb_avg  = 12'(cb_pair >>> 1);

  logic signed [21:0] r_v, g_v, b_v;
  always_comb begin
    r_v = 22'(($signed({1'b0, cy3}) * MATR) >>> 7) + 22'(cr_h);
    g_v = 22'(($signed({1'b0, cy3}) * MATG) >>> 7) - 22'(cr_h) - 22'(cb_h);
    b_v = 22'(($signed({1'b0, cy3}) * MATB) >>> 7) + 22'(cb_h);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p12 <= '0;
      p34 <= '0;
      for (int i = 0; i < 5; i++) begin
        cr_t[i] <= '0;
        cb_t[i] <= '0;
      end
      for (int i = 0; i < 3; i++) begin
        cy_t[i]  <= '0;
        odd_t[i] <= 1'b0;
      end
      cr_f <= '0; cb_f <= '0; cr_fp <= '0; cb_fp <= '0;
      cr_h <= '0; cb_h <= '0;
      cy2 <= '0; cy3 <= '0; odd2 <= 1'b0; odd3 <= 1'b0;
      g <= '0; br <= '0; br_is_b <= 1'b0;
    end else begin
      p12 <= c12;
      p34 <= c34;
      cr_t[0] <= cr_n;
      cb_t[0] <= cb_n;
      cy_t[0] <= cy_n;
      odd_t[0] <= col_odd;
      for (int i = 1; i < 5; i++) begin
        cr_t[i] <= cr_t[i-1];
        cb_t[i] <= cb_t[i-1];
      end
      for (int i = 1; i < 3; i++) begin
        cy_t[i]  <= cy_t[i-1];
        odd_t[i] <= odd_t[i-1];
      end
      // stage 2
      cr_f  <= clpf(cr_t[0], cr_t[1], cr_t[2], cr_t[3], cr_t[4]);
      cb_f  <= clpf(cb_t[0], cb_t[1], cb_t[2], cb_t[3], cb_t[4]);
      cr_fp <= cr_f;
      cb_fp <= cb_f;
      cy2   <= cy_t[2];
      odd2  <= odd_t[2];
      // stage 3: average each pair and hold it for two pixels
      if (odd2) begin
        cr_h <= cr_avg;
        cb_h <= cb_avg;
      end
      cy3  <= cy2;
      odd3 <= odd2;
      // stage 4
      g       <= pix_t'(sat_u(32'(g_v), PIX_W));
      br      <= odd3 ? pix_t'(sat_u(32'(b_v), PIX_W)) : pix_t'(sat_u(32'(r_v), PIX_W));
      br_is_b <= odd3;
    end
  end

endmodule
