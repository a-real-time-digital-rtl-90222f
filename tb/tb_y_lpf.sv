// Self-checking test of y_lpf: random H1 samples; YH must be the sum of the
// samples 2 and 3 cycles before (the delay that centres it with the
// aperture filter), checked on every cycle.
module tb_y_lpf;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t din = '0;
  logic [PIX_W:0] yh;
  int checks = 0, failures = 0;

  y_lpf dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_t hist [0:1023];
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      din = (t % 50 < 5) ? 10'd1023 : pix_t'($urandom_range(0, 1023));
      hist[t] = din;
      @(posedge clk);
      #1;
      if (t >= 4) begin
        checks++;
        if (yh !== 11'(hist[t-2]) + 11'(hist[t-3])) begin
          failures++;
          $display("t=%0d yh=%0d exp=%0d", t, yh, hist[t-2] + hist[t-3]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
