// Self-checking test of pixel_timing: lines of 910 clocks with hd on the
// first pixel, fields of 7 lines with vd on the first line, odd and even
// fields alternating. Column parity must restart at each hd and toggle
// every pixel; the line kind must start at C1/C2 in the odd field and at
// C3/C4 in the even field and alternate from line to line.
module tb_pixel_timing;
  logic clk = 0, rst_n = 0;
  logic hd = 0, vd = 0, field = 0;
  logic col_odd, line_c34;
  int checks = 0, failures = 0;

  pixel_timing dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      for (int l = 0; l < 7; l++) begin
        for (int p = 0; p < 910; p++) begin
          hd = p == 0;
          vd = p == 0 && l == 0;
          field = f[0];
          #1;
          checks++;
          if (col_odd != p[0] || line_c34 != (f[0] ^ l[0])) begin
            failures++;
            if (failures < 10) $display("f=%0d l=%0d p=%0d col_odd=%0d line_c34=%0d", f, l, p, col_odd, line_c34);
          end
          @(negedge clk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
