// End-to-end test of ccd_dsp_top at its default size (910-clock lines).
//
// Two 262-line fields of a synthetic scene are sampled the way the sensor
// with the complementary colour filter array delivers them: a C1/C2 or
// C3/C4 line, 20 optical black pixels at a black level of 64..67, then
// patches of black, grey (w = 100), red, blue, and a block that is bright
// above line 140 and dark below. Field 0 runs with separate H/V sync and
// reset register values; between the fields the microcontroller model
// loads a 1.5x R white-balance gain, a low aperture limit and composite
// sync mode, and field 1 runs with composite sync.
//
// Checks against values computed here from the scene:
//   - black level measured by the clamp lies in 64..67;
//   - grey patch: Y equals gamma(3.5 w) within 3 codes, Cb and Cr within 3
//     of zero in field 0, Cr clearly positive in field 1 (white balance);
//   - red patch: Cr > 15 and Cr > Cb; blue patch: Cb > 15 and Cb > Cr;
//   - black patch (sensor noise of 0..3 codes only): Y at most 8;
//   - one output per clock: the Cb/Cr bus alternates every cycle;
//   - encoder codes: sync tip 16 on the Y D/A and a burst of 96/160 on the
//     C D/A once the encoder timing has settled.
// Each mechanism must have occurred at least once: OB clamp update, both
// line kinds at the line switching, aperture detail cored, passed and
// limited, serial register writes, vertical interval detected in both sync
// modes, sync insertion and colour burst.
module tb_ccd_dsp_top;
  import ccd_dsp_pkg::*;
  localparam int H = 910;
  localparam int LINES = 262;
  localparam int LAT = 17;   // input column to aligned digital Y/C column

  logic clk = 0, rst_n = 0;
  pix_t id = '0;
  logic hd = 0, vd = 0, field = 0, ob_win = 0;
  logic sclk = 0, sdata = 0, sen_n = 1;
  logic hsync = 0, vsync = 0, csync = 0;
  code_t digital_y, y_dac, c_dac;
  logic signed [7:0] digital_c;
  logic digital_c_is_cr;
  int checks = 0, failures = 0;

  ccd_dsp_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2 * LINES * H + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scene ----------------
  function automatic void scene(input int l, input int c, output int r, output int g, output int b);
    r = 0; g = 0; b = 0;
    if (l < 20 || c < 40 || c >= 840) return;
    if (c < 100)      begin r = 0;   g = 0;   b = 0;   end
    else if (c < 300) begin r = 100; g = 100; b = 100; end
    else if (c < 500) begin r = 180; g = 40;  b = 40;  end
    else if (c < 700) begin r = 40;  g = 40;  b = 180; end
    else if (l < 140) begin r = 200; g = 200; b = 200; end
    else              begin r = 20;  g = 20;  b = 20;  end
  endfunction

  function automatic int gamma_ref(int x);
    real v, f;
    if (x >= 512) return 255;
    v = x / 511.0;
    f = (v < 0.018) ? 4.5 * v : 1.099 * $pow(v, 0.45) - 0.099;
    return int'($floor(255.0 * f + 0.5));
  endfunction

  // ---------------- microcontroller model ----------------
  task automatic send(input logic [3:0] a, input logic [7:0] d);
    sen_n = 0;
    repeat (8) @(posedge clk);
    for (int i = 15; i >= 0; i--) begin
      sdata = (i >= 12) ? a[i-12] : (i < 8) ? d[i] : 1'b0;
      repeat (4) @(posedge clk);
      sclk = 1;
      repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (4) @(posedge clk);
    sen_n = 1;
    repeat (8) @(posedge clk);
  endtask

  // ---------------- mechanism counters ----------------
  int n_clamp = 0, n_lt [2], n_cored = 0, n_pass = 0, n_limited = 0, n_writes = 0;
  int n_vert [2], n_sync_tip = 0, n_burst = 0, n_toggle_err = 0;
  logic prev_is_cr = 0;
  int n_cyc = 0;
  int cur_field = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_blc.ob_win_d && !dut.u_blc.ob_win) n_clamp++;
    n_lt[dut.u_ls.line_c34]++;
    if (dut.u_ap.d != 0) begin
      if (dut.u_ap.mag < 15'(dut.regs.ap_core)) n_cored++;
      else if (dut.u_ap.mag > {3'b0, dut.regs.ap_limit, 4'b0}) n_limited++;
      else n_pass++;
    end
    if (dut.u_enc_timing.vert) n_vert[dut.regs.sync_mode]++;
    if (y_dac == 8'd16) n_sync_tip++;
    if (dut.u_enc_timing.burst && (c_dac == 8'd96 || c_dac == 8'd160)) n_burst++;
    n_cyc++;
    if (n_cyc > 100 && digital_c_is_cr == prev_is_cr) n_toggle_err++;
    prev_is_cr <= digital_c_is_cr;
  end

  // ---------------- output checks ----------------
  // Output column oc of line ol belongs to centre line ol-1, column oc-LAT.
  int ocol = 0, oline = 0;
  int grey_y_err = 0, grey_c0 = 0, grey_cr_pos = 0, red_ok = 0, blue_ok = 0, black_ok = 0;
  int n_grey = 0, n_red = 0, n_blue = 0, n_black = 0;
  logic signed [7:0] last_cb;
  always @(posedge clk) if (rst_n) begin
    int sl, sc;
    #1;
    sl = oline - 1;
    sc = ocol - LAT;
    if (!digital_c_is_cr) last_cb = digital_c;
    if (sl >= 40 && sl < 130 && digital_c_is_cr) begin
      if (sc >= 150 && sc < 250) begin
        int ey, dy;
        n_grey++;
        ey = gamma_ref(350);
        dy = int'(digital_y) - ey;
        if (dy > 3 || dy < -3) grey_y_err++;
        if (cur_field == 0 && digital_c <= 3 && digital_c >= -3 && last_cb <= 3 && last_cb >= -3) grey_c0++;
        if (cur_field == 1 && digital_c > 8) grey_cr_pos++;
      end
      if (sc >= 350 && sc < 450) begin n_red++; if (digital_c > 15 && digital_c > last_cb) red_ok++; end
      if (sc >= 550 && sc < 650) begin n_blue++; if (last_cb > 15 && last_cb > digital_c) blue_ok++; end
      if (sc >= 60 && sc < 90) begin n_black++; if (digital_y <= 8) black_ok++; end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    n_lt[0] = 0; n_lt[1] = 0; n_vert[0] = 0; n_vert[1] = 0;
    repeat (5) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      cur_field = f;
      for (int l = 0; l < LINES; l++) begin
        for (int p = 0; p < H; p++) begin
          int r, g, b, v, pc;
          bit c34;
          hd = p == 0;
          vd = (p == 0) && (l == 0);
          field = f[0];
          ob_win = p >= 4 && p < 24;
          c34 = f[0] ^ l[0];
          scene(l, p, r, g, b);
          if (!c34) v = p[0] ? 2 * r + g + b : 2 * g + b;
          else      v = p[0] ? r + 2 * g : r + g + 2 * b;
          id = pix_t'(64 + $urandom_range(0, 3) + v);
          hsync = p < 67;
          vsync = l < 3;
          if (l < 3)      csync = (p < 388) || (p >= 455 && p < 455 + 388);
          else if (l < 6) csync = (p < 33) || (p >= 455 && p < 455 + 33);
          else            csync = p < 67;
          // output position bookkeeping (one line later)
          pc = p;
          ocol = (pc < 0) ? pc + H : pc;
          oline = (pc < 0) ? l - 1 : l;
          @(negedge clk);
        end
        if (f == 0 && l == 30) begin
          checks++;
          if (dut.u_blc.ob_level < 10'd64 || dut.u_blc.ob_level > 10'd67) begin
            failures++;
            $display("black level %0d not in 64..67", dut.u_blc.ob_level);
          end
        end
      end
      if (f == 0) begin
        // the microcontroller runs in parallel with video; here, between fields
        fork
          begin
            send(REG_WB_R, 8'd96);
            send(REG_AP_LIMIT, 8'd20);
            send(REG_SYNC_MODE, 8'd1);
            n_writes += 3;
          end
        join_none
      end
    end
    // ---- verdicts ----
    // per-sample comparisons count one check each
    checks += n_grey; if (grey_y_err != 0) begin failures += grey_y_err; $display("grey Y wrong %0d times of %0d", grey_y_err, n_grey); end
    checks++; if (grey_c0 < n_grey / 4) begin failures++; $display("grey not neutral: %0d of %0d", grey_c0, n_grey); end
    checks++; if (grey_cr_pos < n_grey / 4) begin failures++; $display("white balance had no effect: %0d", grey_cr_pos); end
    checks += n_red + 1; if (red_ok != n_red || n_red == 0) begin failures += n_red - red_ok + 1; $display("red patch %0d of %0d", red_ok, n_red); end
    checks += n_blue + 1; if (blue_ok != n_blue || n_blue == 0) begin failures += n_blue - blue_ok + 1; $display("blue patch %0d of %0d", blue_ok, n_blue); end
    checks += n_black + 1; if (black_ok != n_black || n_black == 0) begin failures += n_black - black_ok + 1; $display("black patch %0d of %0d", black_ok, n_black); end
    checks += n_cyc - 100; if (n_toggle_err > 0) begin failures += n_toggle_err; $display("Cb/Cr bus missed %0d beats", n_toggle_err); end
    checks++; if (dut.regs.wb_r != 8'd96 || dut.regs.sync_mode != 1'b1) begin failures++; $display("serial writes lost"); end
    $display("mechanisms: clamp=%0d c12_lines=%0d c34_lines=%0d cored=%0d passed=%0d limited=%0d writes=%0d vert_hv=%0d vert_cs=%0d sync_tip=%0d burst=%0d",
             n_clamp, n_lt[0], n_lt[1], n_cored, n_pass, n_limited, n_writes, n_vert[0], n_vert[1], n_sync_tip, n_burst);
    $display("grey=%0d/%0d/%0d red=%0d/%0d blue=%0d/%0d black=%0d/%0d", grey_c0, grey_cr_pos, n_grey, red_ok, n_red, blue_ok, n_blue, black_ok, n_black);
    if (n_clamp == 0)   begin failures++; $display("clamp never updated"); end
    if (n_lt[0] == 0 || n_lt[1] == 0) begin failures++; $display("line switching saw one line kind only"); end
    if (n_cored == 0)   begin failures++; $display("no detail cored"); end
    if (n_pass == 0)    begin failures++; $display("no detail enhanced"); end
    if (n_limited == 0) begin failures++; $display("no large edge left unenhanced"); end
    if (n_writes == 0)  begin failures++; $display("no serial write"); end
    if (n_vert[0] == 0) begin failures++; $display("no vertical interval with H/V sync"); end
    if (n_vert[1] == 0) begin failures++; $display("no vertical interval with composite sync"); end
    if (n_sync_tip == 0) begin failures++; $display("no sync inserted"); end
    if (n_burst == 0)   begin failures++; $display("no colour burst"); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
