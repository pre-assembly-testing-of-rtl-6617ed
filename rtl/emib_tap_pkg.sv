// emib_tap_pkg: types and constants shared by the EMIB pre-assembly test logic.
//
// Holds the 16 states of the IEEE 1149.1 TAP controller (encoded as in the
// 1149.1 state diagram), the 4-bit instruction opcodes, the bundle of strobes
// the TAP controller hands to the test data registers, and the decoded
// control word (TP, FP, TEST_ENABLE_P) of the proposed SHIFTIN/SHIFTOUT test
// modes.
//
// Follows the design: a 4-bit instruction register, SHIFTIN = 4'b0000 and the
// configuration-load instruction = 4'b0001, the TP/FP/TEST_ENABLE_P values of
// the two test modes. Own choices: the opcodes of EXTEST, INTEST, IDCODE,
// SHIFTOUT, BYPASS and the internal-scan instruction, and the bit meaning of
// the 4-bit TAP configuration register.
package emib_tap_pkg;

  localparam int IR_W  = 4;   // instruction register width
  localparam int CFG_W = 4;   // TAP configuration register width

  // Configuration register bits.
  localparam int CFG_SEL_SI1 = 0;  // include SI1 (transmitter chain) in the path
  localparam int CFG_SEL_SI2 = 1;  // include SI2 (receiver chain) in the path
  localparam int CFG_TMS_SI1 = 2;  // TMS_S1 value while SI1 is deselected
  localparam int CFG_TMS_SI2 = 3;  // TMS_S2 value while SI2 is deselected

  // IEEE 1149.1 TAP controller states.
  typedef enum logic [3:0] {
    EXIT2_DR         = 4'h0,
    EXIT1_DR         = 4'h1,
    SHIFT_DR         = 4'h2,
    PAUSE_DR         = 4'h3,
    SELECT_IR_SCAN   = 4'h4,
    UPDATE_DR        = 4'h5,
    CAPTURE_DR       = 4'h6,
    SELECT_DR_SCAN   = 4'h7,
    EXIT2_IR         = 4'h8,
    EXIT1_IR         = 4'h9,
    SHIFT_IR         = 4'hA,
    PAUSE_IR         = 4'hB,
    RUN_TEST_IDLE    = 4'hC,
    UPDATE_IR        = 4'hD,
    CAPTURE_IR       = 4'hE,
    TEST_LOGIC_RESET = 4'hF
  } tap_state_e;

  // Instruction opcodes.
  typedef enum logic [IR_W-1:0] {
    OP_SHIFTIN  = 4'b0000,
    OP_CONFIG   = 4'b0001,
    OP_EXTEST   = 4'b0010,
    OP_INTEST   = 4'b0011,
    OP_SHIFTOUT = 4'b0100,
    OP_IDCODE   = 4'b0101,
    OP_ISCAN    = 4'b0110,
    OP_BYPASS   = 4'b1111
  } opcode_e;

  // Test data register placed between TDI_P and TDO_P (or between TDI_P and
  // the first selected secondary interface).
  typedef enum logic [2:0] {
    TDR_BYPASS = 3'd0,
    TDR_IDCODE = 3'd1,
    TDR_CONFIG = 3'd2,
    TDR_DWR    = 3'd3,
    TDR_ISCAN  = 3'd4,
    TDR_NONE   = 3'd5   // SHIFTIN/SHIFTOUT: only the secondary chains
  } tdr_sel_e;

  // Strobes derived from the TAP state.
  typedef struct packed {
    logic test_logic_reset;
    logic run_test_idle;
    logic capture_dr;
    logic shift_dr;
    logic update_dr;
    logic capture_ir;
    logic shift_ir;
    logic update_ir;
  } tap_ctrl_t;

  // Decoded instruction.
  typedef struct packed {
    logic     tp;            // SHIFTIN: receivers capture from the bumps
    logic     fp;            // SHIFTOUT: receivers shift out
    logic     test_enable;   // TEST_ENABLE_P
    logic     mode_control;  // wrapper cells drive their update value (EXTEST/INTEST)
    tdr_sel_e tdr;
  } decode_t;

  // Value the instruction register captures in Capture-IR (two LSBs 01 as in 1149.1).
  localparam logic [IR_W-1:0] IR_CAPTURE = 4'b0101;

endpackage
