// Gamma correction ROM.
//
// The lower 9 bits of the 10-bit input address a 512 x 8 ROM that holds the
// compressed (gamma-corrected) 8-bit value; an input with bit 9 set is
// above the table's range and gives full scale (255). The same block is
// used three times: for Y, for G and for the time-multiplexed B/R signal.
//
// Table contents (gamma_table.hex): out(x) = round(255 * f(x / 511)) with
// f(v) = 4.5 v for v < 0.018 and f(v) = 1.099 v^0.45 - 0.099 otherwise,
// the usual camera transfer curve with exponent 0.45. The 9-bit ROM and
// 8-bit output follow the document; the curve and the handling of bit 9
// are this design's choices.
//
// Timing: registered ROM read, 1 cycle latency.
module gamma_lut
  import ccd_dsp_pkg::*;
#(
  parameter string INIT_FILE = "rtl/gamma_table.hex"
) (
  input  logic  clk,
  input  pix_t  din,
  output code_t dout
);

  code_t rom [512];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) begin
    dout <= din[PIX_W-1] ? 8'hFF : rom[din[PIX_W-2:0]];
  end

endmodule
