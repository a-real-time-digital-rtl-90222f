// Shared types, register map and pipeline latencies of the CCD camera DSP.
//
// The DSP works on one 10-bit sample per pixel clock (14.318 MHz, four
// times the NTSC colour subcarrier) and produces 8-bit Y and C codes. The
// microcontroller loads the white-balance gains over a serial link; the
// same link also carries the other run-time settings collected in
// ctrl_regs_t (that grouping is this design's own choice).
//
// The latency constants describe where a sample that leaves the line
// buffer on H1 appears at the end of the luma and chroma paths. They let
// the top level delay digital Y so that it lines up with the Cb/Cr pair it
// belongs to.
package ccd_dsp_pkg;

  localparam int PIX_W = 10;  // A/D and internal pixel width
  localparam int OUT_W = 8;   // gamma, digital Y/C and D/A code width

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [OUT_W-1:0] code_t;

  // Register addresses of the serial interface (4-bit address field).
  typedef enum logic [3:0] {
    REG_WB_R       = 4'd0,  // white-balance gain for R, 64 = 1.0
    REG_WB_G       = 4'd1,  // white-balance gain for G, 64 = 1.0
    REG_WB_B       = 4'd2,  // white-balance gain for B, 64 = 1.0
    REG_LEVEL_GAIN = 4'd3,  // luma level gain, 128 = 1.0
    REG_AP_GAIN    = 4'd4,  // aperture (detail) gain, 16 = 1.0
    REG_AP_CORE    = 4'd5,  // detail magnitudes below this are dropped
    REG_AP_LIMIT   = 4'd6,  // detail magnitudes above 16*this are dropped
    REG_SYNC_MODE  = 4'd7   // bit 0: 0 = separate H/V sync, 1 = composite sync
  } reg_addr_e;

  typedef struct packed {
    logic [7:0] wb_r;
    logic [7:0] wb_g;
    logic [7:0] wb_b;
    logic [7:0] level_gain;
    logic [7:0] ap_gain;
    logic [7:0] ap_core;
    logic [7:0] ap_limit;
    logic       sync_mode;
  } ctrl_regs_t;

  localparam ctrl_regs_t CTRL_RESET = '{
    wb_r: 8'd64, wb_g: 8'd64, wb_b: 8'd64,
    level_gain: 8'd64, ap_gain: 8'd16, ap_core: 8'd8, ap_limit: 8'd128,
    sync_mode: 1'b0
  };

  // Register stages of each block (a plain flop stage counts as 1).
  localparam int LAT_LINE_SWITCH = 1;
  localparam int LAT_COLOR_SEP   = 6;  // input pair centre -> RGB output
  localparam int LAT_WB          = 1;
  localparam int LAT_GAMMA       = 1;
  localparam int LAT_CBCR        = 2;  // B sample in -> Cb out
  localparam int LAT_APERTURE    = 3;  // Y LPF and aperture HPF share it
  localparam int LAT_LEVEL       = 2;

  // The pair averaging in color_separation and the B-then-R pairing in
  // cbcr_matrix make the colour content of a Cb/Cr pair about three
  // cycles older than the luminance leaving with it.
  localparam int LAT_CHROMA_PAIR = 3;

  localparam int LAT_C_PATH = LAT_LINE_SWITCH + LAT_COLOR_SEP + LAT_WB + LAT_GAMMA + LAT_CBCR
                              + LAT_CHROMA_PAIR;
  localparam int LAT_Y_PATH = LAT_APERTURE + LAT_LEVEL + LAT_GAMMA;
  localparam int Y_ALIGN    = LAT_C_PATH - LAT_Y_PATH;

  // Saturate a signed value to an unsigned field of W bits.
  function automatic logic [15:0] sat_u(input logic signed [31:0] v, input int w);
    logic signed [31:0] maxv;
    maxv = (32'sd1 <<< w) - 1;
    if (v < 0) return '0;
    else if (v > maxv) return maxv[15:0];
    else return v[15:0];
  endfunction

  // Saturate a signed value to a signed field of W bits.
  function automatic logic [15:0] sat_s(input logic signed [31:0] v, input int w);
    logic signed [31:0] maxv, minv;
    maxv = (32'sd1 <<< (w - 1)) - 1;
    minv = -(32'sd1 <<< (w - 1));
    if (v < minv) return minv[15:0];
    else if (v > maxv) return maxv[15:0];
    else return v[15:0];
  endfunction

endpackage
