// Self-checking test of aperture_hpf. The reference computes the detail
// from the filter definitions as real numbers:
//   Hh = (1+z^-1)(-1+2z^-1-z^-2)/2 on H1, Hv = (1+z^-1)(2*H1 - H02)/2,
// applies coring (drop |d| < core or |d| > 16*limit) and gain/16, and
// compares with AP two cycles after the newest tap. Flat areas, edges of
// different sizes and random data are used; it also counts that all three
// coring regions (cored, passed, limited) occurred.
module tb_aperture_hpf;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t h1 = '0;
  logic [PIX_W:0] h02 = '0;
  logic [7:0] gain = 8'd24, core = 8'd8, limit = 8'd64;
  logic signed [11:0] ap;
  int checks = 0, failures = 0;

  aperture_hpf dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xs [0:4095];
  int ys [0:4095];
  int n_cored = 0, n_pass = 0, n_limit = 0;

  function automatic int ref_ap(int t);
    real hh, hv, d;
    int di, mag, v, gi;
    real prod;
    hh = (-xs[t] + xs[t-1] + xs[t-2] - xs[t-3]) / 2.0;
    hv = (2.0 * (xs[t-1] + xs[t-2]) - (ys[t-1] + ys[t-2])) / 2.0;
    d  = hh + hv;
    di = $floor(d);
    mag = di < 0 ? -di : di;
    if (mag < int'(core)) begin n_cored++; return 0; end
    if (mag > 16 * int'(limit)) begin n_limit++; return 0; end
    n_pass++;
    gi = int'(gain);
    prod = di * gi / 16.0;
    v = $floor(prod);
    if (v > 2047) v = 2047;
    if (v < -2048) v = -2048;
    return v;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int seg;
      seg = (t / 200) % 4;
      case (seg)
        0: begin xs[t] = 500; ys[t] = 1000 + $urandom_range(0, 6); end          // flat, tiny noise
        1: begin xs[t] = (t % 8 < 4) ? 300 : 340; ys[t] = 640; end             // small edges
        2: begin xs[t] = (t % 16 < 8) ? 100 : 900; ys[t] = 2 * xs[t]; end      // large edges
        default: begin xs[t] = $urandom_range(0, 1023); ys[t] = $urandom_range(0, 2046); end
      endcase
      h1 = pix_t'(xs[t]);
      h02 = 11'(ys[t]);
      @(posedge clk);
      #1;
      if (t >= 6) begin
        int e;
        e = ref_ap(t - 1);
        checks++;
        if (ap !== 12'(e)) begin
          failures++;
          if (failures < 10) $display("t=%0d ap=%0d exp=%0d", t, ap, e);
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_cored == 0 || n_pass == 0 || n_limit == 0) begin
      failures++;
      $display("coring regions not all exercised: %0d %0d %0d", n_cored, n_pass, n_limit);
    end
    $display("cored=%0d passed=%0d limited=%0d", n_cored, n_pass, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
