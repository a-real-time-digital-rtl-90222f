// Line switching.
//
// The CCD delivers C1/C2 (Cy+G, Ye+Mg) on one line and C3/C4 (Cy+Mg, Ye+G)
// on the next. Around the centre line H1, the lines above and below (H0,
// H2) are of the other kind. This block routes H1 to the output of its own
// kind and the average of the outer lines, H02/2, to the other output, so
// that both a C1/C2 and a C3/C4 stream are present on every line.
// line_c34 tells which kind the centre line is (1: C3/C4).
//
// Timing: registered, 1 cycle; col_odd (column parity of the sample) is
// delayed with the data. The switching follows the document; using the
// average of the two outer lines is this design's choice.
module line_switching
  import ccd_dsp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t h1,
  input  logic [PIX_W:0] h02,
  input  logic line_c34,
  input  logic col_odd,
  output pix_t c12,        // C1 at even, C2 at odd columns
  output pix_t c34,        // C3 at even, C4 at odd columns
  output logic col_odd_o
);

  pix_t outer;
  assign outer = pix_t'(h02 >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c12       <= '0;
      c34       <= '0;
      col_odd_o <= 1'b0;
    end else begin
      c12       <= line_c34 ? outer : h1;
      c34       <= line_c34 ? h1 : outer;
      col_odd_o <= col_odd;
    end
  end

endmodule
