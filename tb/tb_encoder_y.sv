// Self-checking test of encoder_y: random Y codes with sync and blanking
// flags. The expected D/A code is 16 during sync, 80 during blanking and
// 80 + floor(5*Y/8) (less the truncation of the two shifts) otherwise,
// one cycle later; white (Y = 255) must give 238.
module tb_encoder_y;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  code_t y = '0, y_dac;
  logic sync = 0, blank = 0;
  int checks = 0, failures = 0;

  encoder_y dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_sync, n_blank, n_act;
    n_sync = 0; n_blank = 0; n_act = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int e;
      y = (t % 100 == 37) ? 8'd255 : code_t'($urandom_range(0, 255));
      sync = (t % 50) < 5;
      blank = (t % 50) < 12;
      if (sync) begin e = 16; n_sync++; end
      else if (blank) begin e = 80; n_blank++; end
      else begin e = 80 + int'(y) / 2 + int'(y) / 8; n_act++; end
      @(posedge clk);
      #1;
      checks++;
      if (int'(y_dac) != e) begin failures++; $display("t=%0d y=%0d dac=%0d exp=%0d", t, y, y_dac, e); end
      if (!sync && !blank && y == 8'd255) begin
        checks++;
        if (y_dac != 8'd238) failures++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_sync == 0 || n_blank == 0 || n_act == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
