// instruction_register: the primary TAP's 4-bit instruction register.
//
// A shift stage and an update stage, as in IEEE 1149.1. On the rising edge of
// TCK the shift stage loads IR_CAPTURE in Capture-IR and shifts TDI in at the
// MSB in Shift-IR (LSB leaves first on tdo). The update stage, which holds the
// current instruction, loads the shift stage on the falling edge of TCK in
// Update-IR and is set to IDCODE in Test-Logic-Reset and by TRSTN.
//
// The 4-bit width and the falling-edge update follow the design; the reset
// instruction (IDCODE) and the captured value are this design's choice.
module instruction_register
  import emib_tap_pkg::*;
(
  input  logic            tck,
  input  logic            trstn,
  input  logic            tdi,
  input  tap_ctrl_t       ctrl,
  output logic            tdo,
  output logic [IR_W-1:0] ir      // current instruction
);

  logic [IR_W-1:0] shift_q;

  always_ff @(posedge tck or negedge trstn) begin
    if (!trstn)               shift_q <= IR_CAPTURE;
    else if (ctrl.capture_ir) shift_q <= IR_CAPTURE;
    else if (ctrl.shift_ir)   shift_q <= {tdi, shift_q[IR_W-1:1]};
  end

  always_ff @(negedge tck or negedge trstn) begin
    if (!trstn)                     ir <= OP_IDCODE;
    else if (ctrl.test_logic_reset) ir <= OP_IDCODE;
    else if (ctrl.update_ir)        ir <= shift_q;
  end

  assign tdo = shift_q[0];

endmodule
