// Self-checking test of serial_interface. A task plays the microcontroller:
// it lowers sen_n, shifts a frame MSB first with sclk running at 1/8 of the
// pixel clock and raises sen_n. The test checks the reset values, writes
// every register with random data and reads the whole register struct
// back after each frame, and checks that short and long frames and unknown
// addresses change nothing.
module tb_serial_interface;
  import ccd_dsp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sclk = 0, sdata = 0, sen_n = 1;
  ctrl_regs_t regs, model;
  int checks = 0, failures = 0;

  serial_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [15:0] frame, input int nbits);
    sen_n = 0;
    repeat (8) @(posedge clk);
    for (int i = nbits - 1; i >= 0; i--) begin
      sdata = frame[i % 16];
      repeat (4) @(posedge clk);
      sclk = 1;
      repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (4) @(posedge clk);
    sen_n = 1;
    repeat (8) @(posedge clk);
  endtask

  task automatic compare(input string what);
    checks++;
    if (regs !== model) begin
      failures++;
      $display("%s: regs=%h expected=%h", what, regs, model);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    model = '{wb_r: 8'd64, wb_g: 8'd64, wb_b: 8'd64, level_gain: 8'd64, ap_gain: 8'd16,
              ap_core: 8'd8, ap_limit: 8'd128, sync_mode: 1'b0};
    repeat (4) @(posedge clk);
    compare("reset");
    for (int k = 0; k < 64; k++) begin
      logic [3:0] a;
      logic [7:0] d;
      a = 4'(k % 9);
      d = 8'($urandom_range(0, 255));
      send({a, 4'h0, d}, 16);
      case (a)
        4'd0: model.wb_r = d;
        4'd1: model.wb_g = d;
        4'd2: model.wb_b = d;
        4'd3: model.level_gain = d;
        4'd4: model.ap_gain = d;
        4'd5: model.ap_core = d;
        4'd6: model.ap_limit = d;
        4'd7: model.sync_mode = d[0];
        default: ;
      endcase
      compare($sformatf("write %0d", k));
    end
    send({4'd0, 4'h0, 8'h5A}, 15);
    compare("15-bit frame");
    send({4'd1, 4'h0, 8'hA5}, 17);
    compare("17-bit frame");
    send({4'd15, 4'h0, 8'h11}, 16);
    compare("unknown address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
