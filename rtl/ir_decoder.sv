// ir_decoder: turns the current instruction into the control word of the
// primary TAP.
//
// Combinational. For SHIFTIN it drives TP=1, FP=0, TEST_ENABLE_P=1; for
// SHIFTOUT TP=0, FP=1, TEST_ENABLE_P=1; every other instruction leaves all
// three at 0. It also picks the test data register that sits in the serial
// path and drives the wrapper cells' mode control for EXTEST and INTEST.
// Opcodes not listed decode as BYPASS, as 1149.1 requires.
//
// The TP/FP/TEST_ENABLE_P table is the design's; the register selection of
// the other instructions follows IEEE 1149.1 practice.
module ir_decoder
  import emib_tap_pkg::*;
(
  input  logic [IR_W-1:0] ir,
  output decode_t         dec
);

  always_comb begin
    dec = '{tp: 1'b0, fp: 1'b0, test_enable: 1'b0, mode_control: 1'b0, tdr: TDR_BYPASS};
    unique case (ir)
      OP_SHIFTIN:  begin dec.tp = 1'b1; dec.test_enable = 1'b1; dec.tdr = TDR_NONE; end
      OP_SHIFTOUT: begin dec.fp = 1'b1; dec.test_enable = 1'b1; dec.tdr = TDR_NONE; end
      OP_CONFIG:   dec.tdr = TDR_CONFIG;
      OP_EXTEST:   begin dec.tdr = TDR_DWR; dec.mode_control = 1'b1; end
      OP_INTEST:   begin dec.tdr = TDR_DWR; dec.mode_control = 1'b1; end
      OP_IDCODE:   dec.tdr = TDR_IDCODE;
      OP_ISCAN:    dec.tdr = TDR_ISCAN;
      default:     dec.tdr = TDR_BYPASS;
    endcase
  end

endmodule
