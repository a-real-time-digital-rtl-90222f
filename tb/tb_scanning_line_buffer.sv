// Self-checking test of scanning_line_buffer at its default line length
// (H_TOTAL = 910). Random samples are driven and stored in a history array;
// after two lines have passed, H0, H1 and H2 must equal the input 2,
// 2 + H_TOTAL and 2 + 2*H_TOTAL cycles earlier and H02 = H0 + H2.
module tb_scanning_line_buffer;
  import ccd_dsp_pkg::*;
  localparam int H = 910;

  logic clk = 0, rst_n = 0;
  pix_t din = '0, h0, h1, h2;
  logic [PIX_W:0] h02;
  int checks = 0, failures = 0;

  scanning_line_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t hist [0:10*H];
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10 * H; t++) begin
      din = pix_t'($urandom_range(0, 1023));
      hist[t] = din;
      @(posedge clk);
      #1;
      if (t >= 2 * H + 2) begin
        checks++;
        if (h0 !== hist[t-1] || h1 !== hist[t-1-H] || h2 !== hist[t-1-2*H] ||
            h02 !== 11'(hist[t-1]) + 11'(hist[t-1-2*H])) begin
          failures++;
          $display("t=%0d h0=%0d/%0d h1=%0d/%0d h2=%0d/%0d", t, h0, hist[t-1], h1, hist[t-1-H], h2, hist[t-1-2*H]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
