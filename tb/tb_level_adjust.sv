// Self-checking test of level_adjust: random YH, AP and gain. YAP must be
// YH + AP one cycle later and YAD the scaled, clipped value one cycle
// after that; clipping at both ends is counted and must occur.
module tb_level_adjust;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [PIX_W:0] yh = '0;
  logic signed [11:0] ap = '0;
  logic [7:0] gain = 8'd64;
  logic signed [12:0] yap;
  pix_t yad;
  int checks = 0, failures = 0;

  level_adjust dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sum_h [0:4095];
  int g_h [0:4095];
  int n_lo = 0, n_hi = 0;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      yh   = 11'($urandom_range(0, 2047));
      ap   = 12'($signed($urandom_range(0, 1200)) - 600);
      gain = (t < 1500) ? 8'd64 : 8'($urandom_range(0, 255));
      sum_h[t] = int'(yh) + int'(ap);
      g_h[t] = int'(gain);
      @(posedge clk);
      #1;
      if (t >= 1) begin
        int e;
        real r;
        checks++;
        if (yap !== 13'(sum_h[t])) begin failures++; $display("t=%0d yap=%0d exp=%0d", t, yap, sum_h[t]); end
        r = $floor(sum_h[t-1] * g_h[t] / 128.0);
        e = int'(r);
        if (e < 0) begin e = 0; n_lo++; end
        if (e > 1023) begin e = 1023; n_hi++; end
        checks++;
        if (yad !== pix_t'(e)) begin failures++; $display("t=%0d yad=%0d exp=%0d", t, yad, e); end
      end
      @(negedge clk);
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("clipping not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
