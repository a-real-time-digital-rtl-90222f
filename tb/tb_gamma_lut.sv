// Self-checking test of gamma_lut. All 1024 inputs are applied; the
// expected value is computed here from the transfer curve
// f(v) = 4.5 v (v < 0.018), 1.099 v^0.45 - 0.099, out = round(255 f(x/511)),
// and 255 for inputs with bit 9 set. The table is also checked to be
// monotonic. Latency is one cycle.
module tb_gamma_lut;
  import ccd_dsp_pkg::*;

  logic clk = 0;
  pix_t din = '0;
  code_t dout;
  int checks = 0, failures = 0;

  gamma_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_gamma(int x);
    real v, f;
    if (x >= 512) return 255;
    v = x / 511.0;
    f = (v < 0.018) ? 4.5 * v : 1.099 * $pow(v, 0.45) - 0.099;
    return int'($floor(255.0 * f + 0.5));
  endfunction

  initial begin
    int prev;
    prev = 0;
    for (int x = 0; x < 1024; x++) begin
      @(negedge clk);
      din = pix_t'(x);
      @(posedge clk);
      #1;
      checks++;
      if (int'(dout) != ref_gamma(x)) begin
        failures++;
        $display("x=%0d dout=%0d exp=%0d", x, dout, ref_gamma(x));
      end
      checks++;
      if (int'(dout) < prev) begin failures++; $display("not monotonic at %0d", x); end
      prev = int'(dout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
