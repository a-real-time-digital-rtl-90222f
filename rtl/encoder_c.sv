// Chrominance (C) encoder for the S-video C output.
//
// The multiplexed Cb/Cr bus is split into held Cb and Cr values, which are
// converted to the NTSC colour differences
//   U = 0.872 * Cb * 5/8 = (Cb * 140) / 256,  V = 1.230 * Cr * 5/8 = (Cr * 197) / 256
// (0.872 = 0.492/0.564 and 1.230 = 0.877/0.713 convert the CCIR 601
// scaling to the NTSC one; 5/8 is the same code scale as the Y encoder).
// U and V are low-pass filtered with taps 1,2,1 / 4 and quadrature
// modulated. The pixel clock is four times the subcarrier, so the
// carrier's sine and cosine take only the values 0, +1, -1 and the
// modulator is a four-phase selector: +U, +V, -U, -V. With 910 clocks per
// line the free-running phase counter gives the NTSC half-cycle phase
// shift from line to line by itself. The output code is 128 plus the
// modulated chroma, 128 during blanking, and a burst of +-BURST_AMP on the
// -U axis during the burst gate.
//
// Timing: 4 register stages from the Cb/Cr bus to the D/A code.
// The conversion to YUV, the filtering and the modulation follow the
// document; the filter taps, scaling and burst amplitude are this design's.
module encoder_c
  import ccd_dsp_pkg::*;
#(
  parameter int BURST_AMP = 32   // 20 IRE at 1.6 codes per IRE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic signed [7:0] cbcr,
  input  logic cbcr_is_cr,
  input  logic blank,
  input  logic burst,
  output code_t c_dac
);

  logic signed [7:0] cb_h, cr_h;
  logic signed [7:0] u0, u1, u2, v0, v1, v2;
  logic signed [9:0] u_f, v_f;
  logic [1:0] phase;
  logic blank_d, burst_d;

  logic signed [16:0] u_p, v_p;
  assign u_p = cb_h * 17'sd140;
  assign v_p = cr_h * 17'sd197;

  logic signed [9:0] mod;
  always_comb begin
    unique case (phase)
      2'd0: mod = u_f;
      2'd1: mod = v_f;
      2'd2: mod = -u_f;
      default: mod = -v_f;
    endcase
  end

  logic signed [9:0] burst_v;
  always_comb begin
    unique case (phase)
      2'd0: burst_v = -10'(BURST_AMP);
      2'd2: burst_v = 10'(BURST_AMP);
      default: burst_v = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cb_h <= '0; cr_h <= '0;
      u0 <= '0; u1 <= '0; u2 <= '0;
      v0 <= '0; v1 <= '0; v2 <= '0;
      u_f <= '0; v_f <= '0;
      phase <= '0;
      blank_d <= 1'b1;
      burst_d <= 1'b0;
      c_dac <= 8'd128;
    end else begin
      // stage 1: demultiplex
      if (cbcr_is_cr) cr_h <= cbcr;
      else            cb_h <= cbcr;
      // stage 2: YCbCr -> YUV
      u0 <= 8'(u_p >>> 8);
      v0 <= 8'(v_p >>> 8);
      u1 <= u0; u2 <= u1;
      v1 <= v0; v2 <= v1;
      // stage 3: 1,2,1 low-pass
      u_f <= (10'(u0) + 10'sd2 * 10'(u1) + 10'(u2)) >>> 2;
      v_f <= (10'(v0) + 10'sd2 * 10'(v1) + 10'(v2)) >>> 2;
      blank_d <= blank;
      burst_d <= burst;
      // stage 4: modulate
      phase <= phase + 1'b1;
      if (blank_d)
        c_dac <= burst_d ? code_t'(10'sd128 + burst_v) : 8'd128;
      else
        c_dac <= code_t'(sat_u(32'(10'sd128 + mod), 8));
    end
  end

endmodule
