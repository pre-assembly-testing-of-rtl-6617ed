// tap_fsm: the 16-state IEEE 1149.1 TAP controller used by the primary TAP.
//
// The state advances on the rising edge of TCK under TMS, exactly as in the
// 1149.1 state diagram; TRSTN low forces Test-Logic-Reset asynchronously.
// Besides the state itself the module outputs one strobe per state that a
// test data register acts on (Capture/Shift/Update for DR and IR, Run-Test/
// Idle and Test-Logic-Reset). A strobe is high for the whole TCK period during
// which the controller sits in that state, so a register samples it at the
// next rising edge (capture, shift) or at the falling edge inside the state
// (update).
//
// The state machine is the standard one the design reuses unchanged; the
// state encoding follows the 1149.1 diagram.
module tap_fsm
  import emib_tap_pkg::*;
(
  input  logic       tck,
  input  logic       trstn,
  input  logic       tms,
  output tap_state_e state,
  output tap_ctrl_t  ctrl
);

  tap_state_e next_state;

  always_comb begin
    unique case (state)
      TEST_LOGIC_RESET: next_state = tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    next_state = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   next_state = tms ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       next_state = tms ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         next_state = tms ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         next_state = tms ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         next_state = tms ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         next_state = tms ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        next_state = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   next_state = tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       next_state = tms ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         next_state = tms ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         next_state = tms ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         next_state = tms ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         next_state = tms ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        next_state = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          next_state = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trstn) begin
    if (!trstn) state <= TEST_LOGIC_RESET;
    else        state <= next_state;
  end

  always_comb begin
    ctrl.test_logic_reset = (state == TEST_LOGIC_RESET);
    ctrl.run_test_idle    = (state == RUN_TEST_IDLE);
    ctrl.capture_dr       = (state == CAPTURE_DR);
    ctrl.shift_dr         = (state == SHIFT_DR);
    ctrl.update_dr        = (state == UPDATE_DR);
    ctrl.capture_ir       = (state == CAPTURE_IR);
    ctrl.shift_ir         = (state == SHIFT_IR);
    ctrl.update_ir        = (state == UPDATE_IR);
  end

endmodule
