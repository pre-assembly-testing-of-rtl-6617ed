// tb_ir_decoder: exhaustive check of the instruction decoder.
//
// Applies all 16 opcodes and compares TP, FP, TEST_ENABLE_P (the values of
// the SHIFTIN/SHIFTOUT table: 1/0/1 and 0/1/1, all 0 elsewhere), the mode
// control and the selected test data register with an expected table.
module tb_ir_decoder;
  import emib_tap_pkg::*;

  logic [IR_W-1:0] ir;
  decode_t dec;
  int checks = 0, failures = 0;

  ir_decoder dut (.ir, .dec);

  initial begin
    for (int op = 0; op < 16; op++) begin
      logic [2:0] exp_tpf;   // {tp, fp, test_enable}
      logic       exp_mode;
      tdr_sel_e   exp_tdr;
      ir = 4'(op);
      #1;
      exp_tpf  = 3'b000;
      exp_mode = 1'b0;
      case (op)
        0:  begin exp_tpf = 3'b101; exp_tdr = TDR_NONE;   end  // SHIFTIN
        4:  begin exp_tpf = 3'b011; exp_tdr = TDR_NONE;   end  // SHIFTOUT
        1:  exp_tdr = TDR_CONFIG;
        2:  begin exp_tdr = TDR_DWR; exp_mode = 1'b1; end       // EXTEST
        3:  begin exp_tdr = TDR_DWR; exp_mode = 1'b1; end       // INTEST
        5:  exp_tdr = TDR_IDCODE;
        6:  exp_tdr = TDR_ISCAN;
        default: exp_tdr = TDR_BYPASS;
      endcase
      checks++;
      if ({dec.tp, dec.fp, dec.test_enable} !== exp_tpf || dec.mode_control !== exp_mode ||
          dec.tdr !== exp_tdr) begin
        failures++;
        $display("FAIL opcode %b: tp/fp/te=%b mode=%b tdr=%0d", ir,
                 {dec.tp, dec.fp, dec.test_enable}, dec.mode_control, dec.tdr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
