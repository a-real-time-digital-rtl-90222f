// Self-checking test of black_level_clamp: several lines, each with an
// optical black window of 20 noisy samples followed by active video. The
// reference keeps its own running sum of the first 16 OB samples of each
// window and checks every output sample, including the floor at zero.
module tb_black_level_clamp;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t din = '0, dout, ob_level;
  logic ob_win = 0;
  int checks = 0, failures = 0;

  black_level_clamp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lvl, acc, cnt, exp_out, floors;
  logic prev_ob;
  initial begin
    lvl = 0; acc = 0; cnt = 0; prev_ob = 0; floors = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int line = 0; line < 12; line++) begin
      int base;
      base = 32 + 20 * line;
      for (int p = 0; p < 120; p++) begin
        @(negedge clk);
        ob_win = (p >= 4 && p < 24);
        if (ob_win) din = pix_t'(base + $urandom_range(0, 15));
        else        din = pix_t'($urandom_range(0, 1023) >> ((p % 3) * 2));
        exp_out = (din > lvl) ? din - lvl : 0;
        @(posedge clk);
        #1;
        checks++;
        if (dout !== pix_t'(exp_out)) begin
          failures++;
          $display("line %0d px %0d: din=%0d lvl=%0d dout=%0d exp=%0d", line, p, din, lvl, dout, exp_out);
        end
        if (exp_out == 0 && din != 0) floors++;
        // reference model of the OB averaging
        if (ob_win && cnt < 16) begin acc += din; cnt++; end
        else if (!ob_win && prev_ob) begin
          if (cnt == 16) lvl = acc / 16;
          acc = 0; cnt = 0;
        end
        prev_ob = ob_win;
      end
      checks++;
      if (ob_level !== pix_t'(lvl)) begin
        failures++;
        $display("line %0d: ob_level=%0d exp=%0d", line, ob_level, lvl);
      end
    end
    checks++;
    if (floors == 0) begin failures++; $display("floor at zero never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
