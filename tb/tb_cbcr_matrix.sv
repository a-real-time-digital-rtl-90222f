// Self-checking test of cbcr_matrix: random gamma-corrected R, G, B pixel
// pairs are sent as B (br_is_b = 1) then R, each with its own G. The
// reference applies the CCIR 601 equations in real numbers to B, R and the
// mean of the two G values; Cb must appear 2 cycles after R and Cr one
// cycle later, each within 1 code, and saturation must occur.
module tb_cbcr_matrix;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  code_t g = '0, br = '0;
  logic br_is_b = 0;
  logic signed [7:0] cbcr;
  logic cbcr_is_cr;
  int checks = 0, failures = 0;

  cbcr_matrix dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat8(real v);
    int i;
    i = int'($floor(v + 0.5));
    if (i > 127) return 127;
    if (i < -128) return -128;
    return i;
  endfunction

  initial begin
    int n_sat;
    n_sat = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 1000; p++) begin
      int r, gb, gr, b, ecb, ecr;
      real gm, vcb, vcr;
      b  = $urandom_range(0, 255);
      r  = $urandom_range(0, 255);
      gb = $urandom_range(0, 255);
      gr = (p % 4 == 0) ? gb : $urandom_range(0, 255);
      if (p % 10 == 1) begin b = 255; r = 0; gb = 0; gr = 0; end
      if (p % 10 == 2) begin b = 0; r = 255; gb = 0; gr = 0; end
      gm = int'((gb + gr + 1) / 2);
      vcb = 0.512 * (b - gm) - 0.174 * (r - gm);
      vcr = -0.083 * (b - gm) + 0.512 * (r - gm);
      ecb = sat8(vcb);
      ecr = sat8(vcr);
      if (vcb > 127.5 || vcb < -128.5 || vcr > 127.5 || vcr < -128.5) n_sat++;
      // B then R
      br = code_t'(b); g = code_t'(gb); br_is_b = 1;
      @(negedge clk);
      br = code_t'(r); g = code_t'(gr); br_is_b = 0;
      @(posedge clk);
      #1;
      @(negedge clk);
      br_is_b = 1; br = '0; g = '0;
      @(posedge clk);
      #1;
      checks++;
      if (cbcr_is_cr || (int'(cbcr) - ecb) > 1 || (ecb - int'(cbcr)) > 1) begin
        failures++;
        $display("p=%0d Cb=%0d exp=%0d is_cr=%0d", p, cbcr, ecb, cbcr_is_cr);
      end
      @(negedge clk);
      // keep the B/R phase going with the next pair's B: handled by loop
      @(posedge clk);
      #1;
      checks++;
      if (!cbcr_is_cr || (int'(cbcr) - ecr) > 1 || (ecr - int'(cbcr)) > 1) begin
        failures++;
        $display("p=%0d Cr=%0d exp=%0d is_cr=%0d", p, cbcr, ecr, cbcr_is_cr);
      end
      @(negedge clk);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
