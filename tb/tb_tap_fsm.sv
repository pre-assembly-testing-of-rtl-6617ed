// tb_tap_fsm: self-checking testbench of the 1149.1 TAP state machine.
//
// Drives TMS with random bits (and a few fixed walks) and compares the state
// after every rising TCK with a reference transition table written out
// below, plus the one-hot strobes. Checks that five TMS=1 cycles reach
// Test-Logic-Reset from anywhere, that TRSTN resets asynchronously, and that
// all 16 states were visited.
module tb_tap_fsm;
  import emib_tap_pkg::*;

  logic tck = 1'b0, trstn = 1'b1, tms = 1'b1;
  tap_state_e state;
  tap_ctrl_t  ctrl;
  int checks = 0, failures = 0;
  logic [15:0] visited = '0;

  tap_fsm dut (.tck, .trstn, .tms, .state, .ctrl);

  always #5 tck = ~tck;

  // Reference: next state as a 4-bit code from the 1149.1 diagram,
  // index {state, tms}.
  function automatic logic [3:0] ref_next(logic [3:0] s, logic m);
    logic [3:0] t0 [16] = '{4'h2, 4'h3, 4'h2, 4'h3, 4'hE, 4'hC, 4'h2, 4'h6,
                            4'hA, 4'hB, 4'hA, 4'hB, 4'hC, 4'hC, 4'hA, 4'hC};
    logic [3:0] t1 [16] = '{4'h5, 4'h5, 4'h1, 4'h0, 4'hF, 4'h7, 4'h1, 4'h4,
                            4'hD, 4'hD, 4'h9, 4'h8, 4'h7, 4'h7, 4'h9, 4'hF};
    return m ? t1[s] : t0[s];
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: state=%h", what, $time, state);
    end
  endtask

  logic [3:0] expect_s;

  initial begin
    #1 trstn = 1'b0; #1;
    check(state == TEST_LOGIC_RESET, "async reset");
    #20 trstn = 1'b1;
    expect_s = 4'hF;
    for (int i = 0; i < 4000; i++) begin
      @(negedge tck);
      tms = (i % 200 < 8) ? 1'b1 : 1'($urandom_range(0, 2) == 0);
      expect_s = ref_next(expect_s, tms);
      @(posedge tck); #1;
      visited[state] = 1'b1;
      check(state == tap_state_e'(expect_s), "next state");
      check(ctrl.shift_dr == (state == SHIFT_DR) && ctrl.update_ir == (state == UPDATE_IR) &&
            ctrl.capture_dr == (state == CAPTURE_DR) && ctrl.run_test_idle == (state == RUN_TEST_IDLE) &&
            ctrl.shift_ir == (state == SHIFT_IR) && ctrl.update_dr == (state == UPDATE_DR) &&
            ctrl.capture_ir == (state == CAPTURE_IR) && ctrl.test_logic_reset == (state == TEST_LOGIC_RESET),
            "strobes");
    end
    // Five TMS=1 clocks from any state reach Test-Logic-Reset.
    @(negedge tck); tms = 1'b0;
    repeat (3) @(negedge tck);
    tms = 1'b1;
    repeat (5) @(negedge tck);
    check(state == TEST_LOGIC_RESET, "five TMS=1 reset");
    // Asynchronous TRSTN from Shift-DR.
    tms = 1'b0; repeat (3) @(negedge tck);
    tms = 1'b1; @(negedge tck); tms = 1'b0; repeat (3) @(negedge tck);
    check(state == SHIFT_DR, "reach Shift-DR");
    #2 trstn = 1'b0; #1;
    check(state == TEST_LOGIC_RESET, "TRSTN");
    check(visited == 16'hFFFF, "all states visited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
