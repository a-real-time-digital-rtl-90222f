// Self-checking test of white_balance: random G, B/R and gains; G must be
// scaled by gain_g/64, the B/R bus by gain_b/64 or gain_r/64 according to
// br_is_b, both clipped to 1023, one cycle later.
module tb_white_balance;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  pix_t g = '0, br = '0, gw, brw;
  logic br_is_b = 0, brw_is_b;
  logic [7:0] gain_r = 8'd64, gain_g = 8'd64, gain_b = 8'd64;
  int checks = 0, failures = 0;

  white_balance dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_clip;
    n_clip = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int eg, eb;
      g = pix_t'($urandom_range(0, 1023));
      br = pix_t'($urandom_range(0, 1023));
      br_is_b = t % 2 == 1;
      if (t % 50 == 0) begin
        gain_r = 8'($urandom_range(32, 160));
        gain_g = 8'($urandom_range(32, 160));
        gain_b = 8'($urandom_range(32, 160));
      end
      eg = int'(g) * int'(gain_g) / 64;
      eb = int'(br) * (br_is_b ? int'(gain_b) : int'(gain_r)) / 64;
      if (eg > 1023) begin eg = 1023; n_clip++; end
      if (eb > 1023) begin eb = 1023; n_clip++; end
      @(posedge clk);
      #1;
      checks++;
      if (int'(gw) != eg || int'(brw) != eb || brw_is_b != br_is_b) begin
        failures++;
        $display("t=%0d gw=%0d/%0d brw=%0d/%0d", t, gw, eg, brw, eb);
      end
      @(negedge clk);
    end
    checks++;
    if (n_clip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
