// tb_instruction_register: checks the 4-bit instruction register.
//
// Drives the TAP strobes directly. Checks the IDCODE value after TRSTN and
// after Test-Logic-Reset, the captured 0101 shifted out LSB first, that the
// current instruction does not change while shifting, and that Update-IR
// loads it on the falling edge of TCK, for 200 random instructions.
module tb_instruction_register;
  import emib_tap_pkg::*;

  logic tck = 1'b0, trstn = 1'b1, tdi = 1'b0;
  tap_ctrl_t ctrl = '0;
  logic tdo;
  logic [IR_W-1:0] ir;
  int checks = 0, failures = 0;

  instruction_register dut (.tck, .trstn, .tdi, .ctrl, .tdo, .ir);

  always #5 tck = ~tck;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t ir=%b", what, $time, ir); end
  endtask

  // Loads `val` through Capture/Shift/Update and returns the bits shifted out.
  logic [3:0] prev, val, out;

  task automatic scan_ir(input logic [3:0] val, output logic [3:0] out);
    @(posedge tck); #1 ctrl = '0; ctrl.capture_ir = 1'b1;
    for (int i = 0; i < 4; i++) begin
      @(posedge tck); #1 ctrl = '0; ctrl.shift_ir = 1'b1; tdi = val[i];
      out[i] = tdo;
      check(ir == prev, "instruction held during shift");
    end
    @(posedge tck); #1 ctrl = '0;
    ctrl.update_ir = 1'b1;
  endtask

  initial begin
    #2 trstn = 1'b0; #2;
    check(ir == OP_IDCODE, "TRSTN -> IDCODE");
    #10 trstn = 1'b1;
    prev = ir;
    for (int n = 0; n < 200; n++) begin
      val = 4'($urandom);
      scan_ir(val, out);
      check(out == IR_CAPTURE, "captured value shifted out");
      check(ir == prev, "instruction held while shifting");
      @(posedge tck); #1;
      check(ir == val, "Update-IR loads instruction");
      prev = val;
      ctrl = '0;
    end
    ctrl.test_logic_reset = 1'b1;
    @(posedge tck); #1;
    check(ir == OP_IDCODE, "Test-Logic-Reset -> IDCODE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
