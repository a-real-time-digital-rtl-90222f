// Self-checking test of encoder_timing in both sync modes. Two fields of
// 40 lines are generated for each mode: with separate H/V sync (vsync high
// for lines 0-2) and with composite sync (broad pulses twice per line in
// lines 0-2, equalising pulses twice per line in lines 3-5, normal line
// sync after that). For every cycle (except the first of each line) the
// reference predicts sync, blanking and burst from the position in the
// line and the line number: lines 0-19 (separate) or 0-20 (composite) are
// vertically blanked, which follows from V_BLANK = 17 lines after the
// vertical interval ends.
module tb_encoder_timing;
  localparam int H = 910;

  logic clk = 0, rst_n = 0;
  logic sync_mode = 0, hsync = 0, vsync = 0, csync = 0;
  logic sync, blank, burst, vert;
  int checks = 0, failures = 0;

  encoder_timing dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_vert [2];

  task automatic run_field(input bit mode);
    int vb_lines;
    vb_lines = mode ? 21 : 20;
    for (int l = 0; l < 40; l++) begin
      for (int p = 0; p < H; p++) begin
        bit cs, eb, ebu;
        int n;
        @(negedge clk);
        sync_mode = mode;
        hsync = p < 67;
        vsync = l < 3;
        if (l < 3)      cs = (p < 388) || (p >= 455 && p < 455 + 388);
        else if (l < 6) cs = (p < 33) || (p >= 455 && p < 455 + 33);
        else            cs = p < 67;
        csync = cs;
        @(posedge clk);
        #1;
        if (p == 0) continue;
        n = p - 1;
        eb  = (l < vb_lines) || n < 135 || n >= 889 || (mode ? cs : (hsync | vsync));
        ebu = !(l < vb_lines) && n >= 76 && n < 112 && !(mode ? cs : (hsync | vsync));
        checks++;
        if (sync != (mode ? cs : (hsync | vsync)) || blank != eb || burst != ebu) begin
          failures++;
          if (failures < 10)
            $display("mode %0d line %0d px %0d: sync=%0d blank=%0d/%0d burst=%0d/%0d", mode, l, p, sync, blank, eb, burst, ebu);
        end
        if (vert) n_vert[mode]++;
        if (l == 2 && p > 300) begin
          checks++;
          if (!vert) begin failures++; $display("mode %0d: vertical interval not detected", mode); end
        end
        if (l >= 8) begin
          checks++;
          if (vert) begin failures++; $display("mode %0d line %0d: vertical interval too long", mode, l); end
        end
      end
    end
  endtask

  initial begin
    n_vert[0] = 0; n_vert[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) run_field(0);
    repeat (2) run_field(1);
    checks++;
    if (n_vert[0] == 0 || n_vert[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
