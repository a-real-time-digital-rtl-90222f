// Self-checking test of encoder_c. A Cb/Cr bus alternating Cb, Cr is driven
// with colour patches; the reference converts them to U = 0.545 Cb and
// V = 0.769 Cr, filters with 1,2,1/4 and modulates in four phases
// (+U, +V, -U, -V), and the D/A code must match within 2. During blanking
// the code must be 128, and during the burst gate 128 -+ 32 on the -U axis.
// The subcarrier phase must advance one step per clock.
module tb_encoder_c;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic signed [7:0] cbcr = '0;
  logic cbcr_is_cr = 0, blank = 0, burst = 0;
  code_t c_dac;
  int checks = 0, failures = 0;

  encoder_c dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 3000;
  int cbv [N], crv [N];
  bit bl [N], bu [N];

  // U and V of the values held after edge k (Cb at even, Cr at odd t)
  function automatic real hcb(int k);
    return cbv[k & ~1] * 140.0 / 256.0;
  endfunction
  function automatic real hcr(int k);
    return crv[((k + 1) & ~1) - 1] * 197.0 / 256.0;
  endfunction

  initial begin
    int n_burst, n_act, phase0;
    n_burst = 0; n_act = 0;
    for (int t = 0; t < N; t++) begin
      int patch;
      patch = t / 64;
      cbv[t] = ((patch * 37) % 200) - 100;
      crv[t] = ((patch * 71) % 240) - 120;
      bl[t] = (t % 400) < 80;
      bu[t] = (t % 400) >= 30 && (t % 400) < 66;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    phase0 = 0;   // phase counter value for the output after the first edge
    for (int t = 0; t < N; t++) begin
      cbcr_is_cr = t % 2 == 1;
      cbcr = 8'(cbcr_is_cr ? crv[t] : cbv[t]);
      blank = bl[t];
      burst = bu[t];
      @(posedge clk);
      #1;
      if (t >= 20) begin
        int ph, e, d;
        ph = (t + phase0) % 4;
        if (bl[t-1]) begin
          if (bu[t-1]) begin
            e = (ph == 0) ? 96 : (ph == 2) ? 160 : 128;
            n_burst++;
          end else e = 128;
        end else begin
          // held Cb/Cr after edge t-4 are the filter's centre tap
          real u, v, m;
          u = 0.25 * hcb(t - 3) + 0.5 * hcb(t - 4) + 0.25 * hcb(t - 5);
          v = 0.25 * hcr(t - 3) + 0.5 * hcr(t - 4) + 0.25 * hcr(t - 5);
          m = (ph == 0) ? u : (ph == 1) ? v : (ph == 2) ? -u : -v;
          e = 128 + int'(m);
          n_act++;
        end
        d = int'(c_dac) - e;
        checks++;
        if (d > 2 || d < -2) begin
          failures++;
          if (failures < 10) $display("t=%0d ph=%0d dac=%0d exp=%0d", t, ph, c_dac, e);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_burst == 0 || n_act == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
