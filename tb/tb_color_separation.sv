// Self-checking test of color_separation. A scene of flat colour patches
// (r, g, b per column) is sampled the way the complementary filter array
// does it: C1 = 2g+b and C2 = 2r+g+b on the C1/C2 stream, C3 = r+g+2b and
// C4 = r+2g on the C3/C4 stream, even columns first. The reference model
// works in real numbers from the document's equations (CY, CR, CB, the
// 2,4,5,4,2/16 colour LPF, pair averaging, RGB matrix) and is compared with
// a tolerance of 3 codes for rounding, at the fixed 6-cycle latency. In
// grey patches R, G and B must also agree with each other.
module tb_color_separation;
  import ccd_dsp_pkg::*;
  localparam int MATR = 35, MATG = 94, MATB = 35;

  logic clk = 0, rst_n = 0;
  pix_t c12 = '0, c34 = '0, g, br;
  logic col_odd = 0, br_is_b;
  int checks = 0, failures = 0;

  color_separation dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 4000;
  real a12 [N], a34 [N], cr [N], cb [N], cy [N];
  int  rr [N], gg [N], bb [N];
  bit  odd [N];

  function automatic real lpf(ref real x [N], input int c);
    return (2.0 * (x[c+2] + x[c-2]) + 4.0 * (x[c+1] + x[c-1]) + 5.0 * x[c]) / 16.0;
  endfunction

  function automatic real rabs(real v);
    return v < 0 ? -v : v;
  endfunction

  function automatic real clip(real v);
    if (v < 0) return 0;
    if (v > 1023) return 1023;
    return v;
  endfunction

  initial begin
    int n_grey;
    n_grey = 0;
    // scene
    for (int t = 0; t < N; t++) begin
      int patch;
      patch = t / 40;
      if (patch % 3 == 0) begin
        rr[t] = 20 + 25 * (patch % 10); gg[t] = rr[t]; bb[t] = rr[t];
      end else begin
        rr[t] = (patch * 97) % 255; gg[t] = (patch * 61) % 255; bb[t] = (patch * 151) % 255;
      end
      odd[t] = t % 2 == 1;
      a12[t] = odd[t] ? 2 * rr[t] + gg[t] + bb[t] : 2 * gg[t] + bb[t];
      a34[t] = odd[t] ? rr[t] + 2 * gg[t] : rr[t] + gg[t] + 2 * bb[t];
    end
    for (int t = 1; t < N; t++) begin
      cr[t] = odd[t] ? a12[t] - a12[t-1] : a12[t-1] - a12[t];
      cb[t] = odd[t] ? a34[t-1] - a34[t] : a34[t] - a34[t-1];
      cy[t] = (a12[t] + a12[t-1] + a34[t] + a34[t-1]) / 2.0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < N - 4; o++) begin
      c12 = pix_t'(int'(a12[o]));
      c34 = pix_t'(int'(a34[o]));
      col_odd = odd[o];
      @(posedge clk);
      #1;
      if (o >= 20) begin
        int s, j;
        real crh, cbh, er, eg, eb, ebr;
        s = o - 5;
        j = odd[s] ? s : s - 1;
        crh = (lpf(cr, j) + lpf(cr, j - 1)) / 2.0;
        cbh = (lpf(cb, j) + lpf(cb, j - 1)) / 2.0;
        er = clip(MATR / 128.0 * cy[s] + crh);
        eg = clip(MATG / 128.0 * cy[s] - crh - cbh);
        eb = clip(MATB / 128.0 * cy[s] + cbh);
        ebr = odd[s] ? eb : er;
        checks++;
        if (rabs(real'(g) - eg) > 3.0 || rabs(real'(br) - ebr) > 3.0 || br_is_b != odd[s]) begin
          failures++;
          if (failures < 10) $display("o=%0d g=%0d/%0.1f br=%0d/%0.1f isb=%0d", o, g, eg, br, ebr, br_is_b);
        end
        // grey patch, away from its borders: R = G = B within 2%
        if (s % 40 > 8 && s % 40 < 32 && (s / 40) % 3 == 0) begin
          n_grey++;
          checks++;
          if (rabs(real'(br) - real'(g)) > 0.02 * real'(g) + 2.0) begin
            failures++;
            $display("grey s=%0d g=%0d br=%0d", s, g, br);
          end
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_grey == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
