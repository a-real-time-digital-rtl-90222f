// Optical black level clamp.
//
// The CCD's dark current drifts with temperature, so the black level of the
// digitised video is not fixed. Each line begins with optically shielded
// (optical black, OB) photosites; while ob_win is high the first
// 2**OB_LOG2 of them are summed, and when the window closes the average
// becomes the clamp level for the rest of the line. Every sample is then
// output as din - level, floored at zero. If a window holds fewer samples
// than that, the previous level is kept.
//
// Timing: one pixel per clock, output registered (1 cycle latency).
// The clamp to the averaged OB reference follows the document; the window
// input, the number of samples averaged and the per-line update are this
// design's own choices.
module black_level_clamp
  import ccd_dsp_pkg::*;
#(
  parameter int OB_LOG2 = 4    // 16 OB samples averaged per line
) (
  input  logic clk,
  input  logic rst_n,
  input  pix_t din,       // A/D sample
  input  logic ob_win,    // high over the optical black photosites
  output pix_t dout,      // clamped video (BLC)
  output pix_t ob_level   // current black reference
);

  localparam int N = 1 << OB_LOG2;

  logic [PIX_W+OB_LOG2-1:0] acc;
  logic [OB_LOG2:0]         cnt;
  logic                     ob_win_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      cnt      <= '0;
      ob_win_d <= 1'b0;
      ob_level <= '0;
      dout     <= '0;
    end else begin
      ob_win_d <= ob_win;
      if (ob_win && cnt < (OB_LOG2+1)'(N)) begin
        acc <= acc + (PIX_W+OB_LOG2)'(din);
        cnt <= cnt + 1'b1;
      end else if (!ob_win && ob_win_d) begin
        if (cnt == (OB_LOG2+1)'(N)) ob_level <= acc[PIX_W+OB_LOG2-1:OB_LOG2];
        acc <= '0;
        cnt <= '0;
      end
      dout <= (din > ob_level) ? din - ob_level : '0;
    end
  end

endmodule
