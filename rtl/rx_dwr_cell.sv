// rx_dwr_cell: receiver die-wrapper cell, placed at a receiver micro-bump of
// the bridge.
//
// A shift/capture flip-flop (SC) and an update flip-flop, as in a dedicated
// P1838 wrapper cell, with TEST_ENABLE_S2 switching the SC control from the
// TAP's Capture-DR/Shift-DR to the TP/FP signals of the proposed test modes.
//   test_enable = 0: SC loads cfi (the bump) in Capture-DR and cti in
//     Shift-DR on the rising edge of TCK; the update flip-flop loads SC in
//     Update-DR on the falling edge; cfo, toward the core, is the update value
//     when mode_control is high, else the bump value.
//   test_enable = 1, TP = 1 (SHIFTIN): SC captures the bump on every rising
//     TCK the TAP spends in Run-Test/Idle, i.e. the response to the pattern
//     bit the paired transmitter launched half a TCK earlier.
//   test_enable = 1, FP = 1 (SHIFTOUT): SC shifts cti in Shift-DR, so the
//     captured responses leave through the chain.
// cto (SC) feeds the next cell's cti.
//
// The cell follows the design in switching its capture source with TP and
// its shift control with TEST_ENABLE_S2. The exact gate-level wiring of the
// added multiplexers and NAND gate is not reproduced: the capture-in-Run-
// Test/Idle and shift-in-Shift-DR behaviour above is this design's reading of
// what they achieve.
module rx_dwr_cell (
  input  logic tck,
  input  logic trstn,
  input  logic cti,
  input  logic cfi,           // receiver micro-bump
  input  logic shift_dr,
  input  logic capture_dr,
  input  logic update_dr,
  input  logic run,           // TAP in Run-Test/Idle
  input  logic tp,
  input  logic fp,
  input  logic test_enable,   // TEST_ENABLE_S2
  input  logic mode_control,
  output logic cto,
  output logic cfo            // toward the die core
);

  logic sc, upd;
  logic shift_en, capture_en, update_en;

  always_comb begin
    shift_en   = test_enable ? (fp && shift_dr) : shift_dr;
    capture_en = test_enable ? (tp && run)      : capture_dr;
    update_en  = test_enable ? 1'b0             : update_dr;
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
  assign cfo = mode_control ? upd : cfi;

endmodule
