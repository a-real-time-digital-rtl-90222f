// Scanning line buffer: two 1H digital line memories.
//
// The clamped video enters line memory 1; what leaves it enters line
// memory 2. Each memory is a circular buffer of H_TOTAL words read and
// written at the same address, so it delays by exactly one line period.
// The outputs are three vertically adjacent lines: H0 (the current line),
// H1 (one line earlier, the centre line) and H2 (two lines earlier), plus
// their outer sum H02 = H0 + H2 used by the vertical aperture filter and
// the line switching.
//
// Timing: all four outputs come from the same pipeline stage, two cycles
// after the input sample (for H0). H_TOTAL = 910 is one NTSC line at the
// 14.318 MHz pixel clock. The memory contents are not reset: the first two
// lines after power-up are not valid.
module scanning_line_buffer
  import ccd_dsp_pkg::*;
#(
  parameter int H_TOTAL = 910
) (
  input  logic clk,
  input  logic rst_n,
  input  pix_t din,
  output pix_t h0,
  output pix_t h1,
  output pix_t h2,
  output logic [PIX_W:0] h02
);

  localparam int AW = $clog2(H_TOTAL);

  pix_t mem1 [H_TOTAL];
  pix_t mem2 [H_TOTAL];
  logic [AW-1:0] addr;
  pix_t rd1, rd2, in_r;

  // The memories themselves: read-before-write at one address.
  always_ff @(posedge clk) begin
    rd1        <= mem1[addr];
    rd2        <= mem2[addr];
    mem1[addr] <= din;
    mem2[addr] <= mem1[addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      in_r <= '0;
      h0   <= '0;
      h1   <= '0;
      h2   <= '0;
      h02  <= '0;
    end else begin
      addr <= (addr == AW'(H_TOTAL - 1)) ? '0 : addr + 1'b1;
      in_r <= din;
      h0   <= in_r;
      h1   <= rd1;
      h2   <= rd2;
      h02  <= {1'b0, in_r} + {1'b0, rd2};
    end
  end

endmodule
