// tb_tap_config_register: shifts random 4-bit values into the configuration
// register and checks that cfg changes only at Update-DR (falling TCK), that
// Capture-DR reads the current value back, that a deselected register
// ignores the strobes, and that Test-Logic-Reset clears it.
module tb_tap_config_register;
  import emib_tap_pkg::*;

  logic tck = 1'b0, trstn = 1'b1, sel = 1'b1, tdi = 1'b0, tdo;
  tap_ctrl_t ctrl = '0;
  logic [CFG_W-1:0] cfg, val, prev, got;
  int checks = 0, failures = 0;

  tap_config_register dut (.tck, .trstn, .sel, .tdi, .ctrl, .tdo, .cfg);

  always #5 tck = ~tck;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t cfg=%b", what, $time, cfg); end
  endtask

  initial begin
    #2 trstn = 1'b0; #2;
    check(cfg == '0, "TRSTN clears");
    trstn = 1'b1;
    prev = '0;
    for (int n = 0; n < 100; n++) begin
      val = 4'($urandom);
      sel = 1'b1;
      @(posedge tck); #1 ctrl = '0; ctrl.capture_dr = 1'b1;
      @(posedge tck); #1 ctrl = '0; ctrl.shift_dr = 1'b1;
      for (int i = 0; i < CFG_W; i++) begin
        got[i] = tdo; tdi = val[i];
        @(posedge tck); #1;
      end
      check(got == prev, "capture reads current value");
      check(cfg == prev, "held while shifting");
      ctrl = '0; ctrl.update_dr = 1'b1;
      @(negedge tck); #1;
      check(cfg == val, "Update-DR loads");
      @(posedge tck); #1 ctrl = '0;
      // shift other bits in without updating, then deselect: an Update-DR
      // of another register must not load them
      ctrl.shift_dr = 1'b1; tdi = ~val[0];
      repeat (4) @(posedge tck);
      #1 ctrl = '0;
      sel = 1'b0;
      ctrl.update_dr = 1'b1;
      @(posedge tck); #1 ctrl = '0;
      check(cfg == val, "deselected ignores scan");
      prev = val;
      sel = 1'b1;
    end
    ctrl.test_logic_reset = 1'b1;
    @(posedge tck); #1;
    check(cfg == '0, "Test-Logic-Reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
