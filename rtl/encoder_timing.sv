// Encoder video timing: sync input decoding.
//
// The encoder's timing comes from outside, either as separate horizontal
// and vertical sync (sync_mode = 0) or as composite sync (sync_mode = 1),
// all active high. From it this block derives the composite sync to be
// inserted, horizontal and vertical blanking and the colour burst gate.
//
// A horizontal counter restarts at each line sync leading edge that comes
// at least half a line after the previous restart (so the equalising
// pulses at twice the line rate are ignored). Blanking covers the counts
// before H_BLANK_END and from H_FP_START on; the burst gate covers
// BURST_START to BURST_START+BURST_LEN-1. Any active sync pulse also blanks
// and stops the burst (this covers a broad pulse before the vertical
// interval is recognised). The vertical interval is vsync itself in
// separate mode. In composite mode it starts with a sync pulse
// longer than VS_DETECT clocks (a broad pulse) and ends at the first line
// that has none. Lines stay blanked until V_BLANK lines after the vertical
// interval. All numbers are NTSC values at 14.318 MHz; they and the
// detection rules are this design's choices, the document gives only the
// two input modes.
//
// Timing: flags are registered, 1 cycle after the sync inputs.
module encoder_timing #(
  parameter int H_TOTAL     = 910,
  parameter int H_BLANK_END = 135,  // 10.9 us blanking minus 1.5 us front porch
  parameter int H_FP_START  = 889,  // H_TOTAL - 1.5 us front porch
  parameter int BURST_START = 76,   // 5.3 us after the sync edge
  parameter int BURST_LEN   = 36,   // 9 subcarrier cycles
  parameter int VS_DETECT   = 200,  // longer than an H sync (67 clocks)
  parameter int V_BLANK     = 17    // lines after the vertical sync
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sync_mode,
  input  logic hsync,
  input  logic vsync,
  input  logic csync,
  output logic sync,
  output logic blank,
  output logic burst,
  output logic vert          // vertical interval detected
);

  localparam int HW = $clog2(H_TOTAL + 1);

  logic line_sync, line_sync_d;
  logic [HW-1:0] hcnt;
  logic [9:0]    pulse_len;
  logic [5:0]    line_cnt;
  logic          broad_seen;

  logic h_edge, broad, in_vblank, sync_now;
  always_comb begin
    line_sync = sync_mode ? csync : hsync;
    sync_now  = sync_mode ? csync : (hsync | vsync);
    h_edge    = line_sync && !line_sync_d && (hcnt >= HW'(H_TOTAL / 2));
    broad     = sync_mode && csync && (pulse_len >= 10'(VS_DETECT));
    in_vblank = vert || (line_cnt < 6'(V_BLANK));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_sync_d <= 1'b0;
      hcnt        <= '0;
      pulse_len   <= '0;
      broad_seen  <= 1'b0;
      line_cnt    <= '0;
      vert        <= 1'b0;
      sync        <= 1'b0;
      blank       <= 1'b1;
      burst       <= 1'b0;
    end else begin
      line_sync_d <= line_sync;
      if (h_edge)
        hcnt <= '0;
      else if (hcnt != HW'(H_TOTAL))
        hcnt <= hcnt + 1'b1;
      if (csync)
        pulse_len <= (pulse_len == 10'h3ff) ? pulse_len : pulse_len + 1'b1;
      else
        pulse_len <= '0;
      // vertical interval
      if (!sync_mode) begin
        vert <= vsync;
      end else if (broad) begin
        vert <= 1'b1;
      end else if (h_edge) begin
        vert <= broad_seen;
      end
      if (broad)       broad_seen <= 1'b1;
      else if (h_edge) broad_seen <= 1'b0;
      if (vert)
        line_cnt <= '0;
      else if (h_edge && line_cnt != 6'h3f)
        line_cnt <= line_cnt + 1'b1;
      sync  <= sync_now;
      blank <= in_vblank || sync_now || (hcnt < HW'(H_BLANK_END)) || (hcnt >= HW'(H_FP_START));
      burst <= !in_vblank && !sync_now && (hcnt >= HW'(BURST_START)) && (hcnt < HW'(BURST_START + BURST_LEN));
    end
  end

endmodule
