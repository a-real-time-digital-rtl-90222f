// Serial control interface to the camera microcontroller.
//
// The microcontroller computes the white-balance gains (and the other
// run-time settings of ctrl_regs_t) and loads them into the DSP over a
// three-wire link: a frame starts when sen_n falls, 16 bits are shifted in
// MSB first on rising edges of sclk, and the frame is written when sen_n
// rises again. Frame layout: [15:12] register address (reg_addr_e),
// [11:8] unused, [7:0] data. A frame with a bit count other than 16, or an
// unknown address, is ignored.
//
// The three inputs are asynchronous to the pixel clock; they pass through
// two-flop synchronisers and sclk must stay high and low for at least two
// pixel clocks each. The registers start at CTRL_RESET.
// Loading the gains serially follows the document; the frame format and
// the register map are this design's own.
module serial_interface
  import ccd_dsp_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sclk,
  input  logic sdata,
  input  logic sen_n,
  output ctrl_regs_t regs
);

  logic [2:0] sclk_s, sen_s;
  logic [1:0] sdata_s;
  logic [15:0] shreg;
  logic [4:0]  nbits;

  logic sclk_rise, sen_rise, sen_low;
  assign sclk_rise = sclk_s[1] && !sclk_s[2];
  assign sen_rise  = sen_s[1] && !sen_s[2];
  assign sen_low   = !sen_s[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s  <= '0;
      sen_s   <= '1;
      sdata_s <= '0;
      shreg   <= '0;
      nbits   <= '0;
      regs    <= CTRL_RESET;
    end else begin
      sclk_s  <= {sclk_s[1:0], sclk};
      sen_s   <= {sen_s[1:0], sen_n};
      sdata_s <= {sdata_s[0], sdata};
      if (sen_low && sclk_rise) begin
        shreg <= {shreg[14:0], sdata_s[1]};
        if (nbits != 5'd31) nbits <= nbits + 1'b1;
      end
      if (sen_rise) begin
        nbits <= '0;
        if (nbits == 5'd16) begin
          unique case (shreg[15:12])
            REG_WB_R:       regs.wb_r       <= shreg[7:0];
            REG_WB_G:       regs.wb_g       <= shreg[7:0];
            REG_WB_B:       regs.wb_b       <= shreg[7:0];
            REG_LEVEL_GAIN: regs.level_gain <= shreg[7:0];
            REG_AP_GAIN:    regs.ap_gain    <= shreg[7:0];
            REG_AP_CORE:    regs.ap_core    <= shreg[7:0];
            REG_AP_LIMIT:   regs.ap_limit   <= shreg[7:0];
            REG_SYNC_MODE:  regs.sync_mode  <= shreg[0];
            default: ;
          endcase
        end
      end
    end
  end

endmodule
