// Self-checking test of line_switching: on a C1/C2 centre line (line_c34=0)
// H1 must go to the C1/C2 output and H02/2 to the C3/C4 output, the other
// way round on a C3/C4 line; col_odd follows the data with one cycle delay.
module tb_line_switching;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t h1 = '0, c12, c34;
  logic [PIX_W:0] h02 = '0;
  logic line_c34 = 0, col_odd = 0, col_odd_o;
  int checks = 0, failures = 0;

  line_switching dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_sw [2];
  initial begin
    n_sw[0] = 0; n_sw[1] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int e12, e34;
      h1 = pix_t'($urandom_range(0, 1023));
      h02 = 11'($urandom_range(0, 2047));
      line_c34 = (t / 100) % 2 == 1;
      col_odd = t % 2 == 1;
      e12 = line_c34 ? int'(h02) / 2 : int'(h1);
      e34 = line_c34 ? int'(h1) : int'(h02) / 2;
      n_sw[line_c34]++;
      @(posedge clk);
      #1;
      checks++;
      if (int'(c12) != e12 || int'(c34) != e34 || col_odd_o != col_odd) begin
        failures++;
        $display("t=%0d c12=%0d/%0d c34=%0d/%0d", t, c12, e12, c34, e34);
      end
      @(negedge clk);
    end
    checks++;
    if (n_sw[0] == 0 || n_sw[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
