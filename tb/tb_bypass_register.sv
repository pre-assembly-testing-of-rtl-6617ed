// tb_bypass_register: checks the one-bit bypass register: 0 after
// Capture-DR, one TCK of delay from TDI to TDO in Shift-DR, no change while
// deselected.
module tb_bypass_register;
  import emib_tap_pkg::*;

  logic tck = 1'b0, trstn = 1'b1, sel = 1'b1, tdi = 1'b0, tdo;
  tap_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;
  logic last;

  bypass_register dut (.tck, .trstn, .sel, .tdi, .ctrl, .tdo);

  always #5 tck = ~tck;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2 trstn = 1'b0; #2 trstn = 1'b1;
    for (int n = 0; n < 50; n++) begin
      tdi = 1'b1;
      @(posedge tck); #1 ctrl = '0; ctrl.shift_dr = 1'b1;
      @(posedge tck); #1 ctrl = '0; ctrl.capture_dr = 1'b1;
      @(posedge tck); #1;
      check(tdo == 1'b0, "capture clears");
      ctrl = '0; ctrl.shift_dr = 1'b1;
      for (int i = 0; i < 20; i++) begin
        tdi = 1'($urandom);
        last = tdi;
        @(posedge tck); #1;
        check(tdo == last, "one-cycle delay");
      end
      sel = 1'b0; tdi = ~tdo; last = tdo;
      @(posedge tck); #1;
      check(tdo == last, "deselected holds");
      sel = 1'b1;
      ctrl = '0;
    end
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
