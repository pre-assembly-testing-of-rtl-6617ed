// tx_dwr_cell: transmitter die-wrapper cell, placed at a transmitter
// micro-bump of the bridge.
//
// A shift/capture flip-flop (SC) and an update flip-flop, as in a dedicated
// P1838 wrapper cell, plus a multiplexer on the SC control: TEST_ENABLE_S1
// chooses whether the cell follows the TAP's Shift-DR (functional/EXTEST use)
// or the FP signal of the proposed test modes.
//   test_enable = 0: SC loads cti in Shift-DR and cfi in Capture-DR (rising
//     TCK); the update flip-flop loads SC in Update-DR (falling TCK); cfo is
//     the update value when mode_control is high, else the functional cfi.
//   test_enable = 1 (SHIFTIN/SHIFTOUT): with FP = 0 (SHIFTIN) SC shifts cti on
//     every rising TCK the TAP spends in Run-Test/Idle (`run`), and the update
//     flip-flop follows SC on the falling edge, so a new pattern bit reaches
//     the bump half a TCK after each shift; cfo always drives the update
//     value. With FP = 1 (SHIFTOUT) the cell holds.
// cto (SC) feeds the next cell's cti.
//
// The multiplexer with TEST_ENABLE_S1 choosing between FP and Shift-DR is the
// design's. Shifting only in Run-Test/Idle, the falling-edge update that
// launches each bit, and holding the pattern in SHIFTOUT are this design's
// choices.
module tx_dwr_cell (
  input  logic tck,
  input  logic trstn,
  input  logic cti,
  input  logic cfi,           // functional data from the die core
  input  logic shift_dr,
  input  logic capture_dr,
  input  logic update_dr,
  input  logic run,           // TAP in Run-Test/Idle
  input  logic fp,
  input  logic test_enable,   // TEST_ENABLE_S1
  input  logic mode_control,
  output logic cto,
  output logic cfo            // drives the transmitter micro-bump
);

  logic sc, upd;
  logic shift_en, capture_en, update_en;

  always_comb begin
    shift_en   = test_enable ? (!fp && run) : shift_dr;
    capture_en = test_enable ? 1'b0         : capture_dr;
    update_en  = test_enable ? (!fp && run) : update_dr;
  end

  always_ff @(posedge tck or negedge trstn) begin
    if (!trstn)          sc <= 1'b0;
    else if (shift_en)   sc <= cti;
    else if (capture_en) sc <= cfi;
  end

  always_ff @(negedge tck or negedge trstn) begin
    if (!trstn)         upd <= 1'b0;
    else if (update_en) upd <= sc;
  end

  assign cto = sc;
  assign cfo = (test_enable || mode_control) ? upd : cfi;

endmodule
