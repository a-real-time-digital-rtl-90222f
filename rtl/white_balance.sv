// White balance.
//
// Equalises R, G and B for a neutral target: G is multiplied by gain_g and
// the time-multiplexed B/R bus by gain_b or gain_r (selected by br_is_b).
// Gains are unsigned 8-bit with 64 = 1.0 (range 0 to 3.98), computed by the
// microcontroller and loaded through the serial interface. Results are
// saturated to 10 bits.
//
// Timing: registered, 1 cycle; br_is_b is delayed with the data.
// The gains and their loading follow the document; their format is this
// design's choice. Because the gains change at run time they are true
// multipliers (two 10x8 products).
module white_balance
  import ccd_dsp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t g,
  input  pix_t br,
  input  logic br_is_b,
  input  logic [7:0] gain_r,
  input  logic [7:0] gain_g,
  input  logic [7:0] gain_b,
  output pix_t gw,
  output pix_t brw,
  output logic brw_is_b
);

  logic [7:0]  gain_br;
  logic [17:0] g_p, br_p;
  assign gain_br = br_is_b ? gain_b : gain_r;
  assign g_p     = g * gain_g;
  assign br_p    = br * gain_br;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gw       <= '0;
      brw      <= '0;
      brw_is_b <= 1'b0;
    end else begin
      gw       <= pix_t'(sat_u(32'(g_p >> 6), PIX_W));
      brw      <= pix_t'(sat_u(32'(br_p >> 6), PIX_W));
      brw_is_b <= br_is_b;
    end
  end

endmodule
