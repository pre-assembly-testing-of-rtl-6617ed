// emib_die_dft: pre-assembly interconnect test logic of a die mounted on an
// EMIB bridge.
//
// Before the second die is attached, the far ends of the bridge wires are
// shorted in pairs with dummy metal: interconnect i is looped back to
// interconnect N/2+i. The one die on the bridge then both launches patterns
// (transmitter wrapper cells on interconnects N/2+1..N) and captures the
// responses (receiver wrapper cells on interconnects 1..N/2), so an open or
// a short in a wire or micro-bump shows up as a wrong captured bit, read out
// through the package C4 bumps of the primary TAP alone.
//
// Structure: primary_tap (pins TCK_P, TMS_P, TDI_P, TRSTN_P, TDO_P) drives two
// secondary interfaces. SI1 splices the transmitter segment of the die
// wrapper register into the serial path, SI2 the receiver segment; the TAP
// configuration register says which, and only while the instruction is
// SHIFTIN or SHIFTOUT (TEST_ENABLE_P = 1). TCK_P and TRSTN_P reach both sides
// unchanged, TEST_ENABLE_P becomes TEST_ENABLE_S1/S2, TMS_S1/TMS_S2 are
// multiplexed and brought out.
//
// Test sequence (TCK cycles):
//   1. CONFIG (4'b0001), DR scan of the configuration value with bit 0 set:
//      SI1 (transmitters) joins the path.
//   2. SHIFTIN (4'b0000): TP=1, FP=0. Each TCK the TAP stays in
//      Run-Test/Idle shifts one bit from TDI_P into the transmitter segment
//      (rising edge), drives the new bits onto the bumps (falling edge), and
//      lets every receiver capture its bump (next rising edge).
//   3. CONFIG with bit 1 set: SI2 (receivers) joins the path.
//   4. SHIFTOUT (4'b0100): TP=0, FP=1. A DR scan of NRX bits shifts the
//      captured responses out on TDO_P, the cell on interconnect N/2 first.
// EXTEST and INTEST (TEST_ENABLE_P = 0) put both segments, transmitters
// first, between TDI_P and TDO_P as an ordinary 1149.1 boundary register.
// ISCAN reaches the core's internal scan chains through the isc_* ports.
//
// The pairing, the transmitter/receiver split, the primary and two secondary
// interfaces, TCK/TRSTN/TEST_ENABLE forwarding, the TMS multiplexers, the
// SHIFTIN/SHIFTOUT opcodes and TP/FP/TEST_ENABLE_P values follow the design.
// The 16-interconnect default, the configuration bit meaning, the other
// opcodes and the Run-Test/Idle shifting detail are this design's choices.
module emib_die_dft
  import emib_tap_pkg::*;
#(
  parameter int          N_IC   = 16,
  parameter int          NTX    = N_IC / 2,
  parameter int          NRX    = N_IC - N_IC / 2,
  parameter logic [31:0] IDCODE = 32'h1838_E001
) (
  // primary TAP (coarse-pitch micro-bumps / C4 bumps)
  input  logic           tck_p,
  input  logic           trstn_p,
  input  logic           tms_p,
  input  logic           tdi_p,
  output logic           tdo_p,
  output logic           tdo_p_en,
  // TMS of the secondary interfaces
  output logic           tms_s1,
  output logic           tms_s2,
  // bridge-side fine-pitch micro-bumps and the core behind them
  input  logic [NTX-1:0] core_tx,
  output logic [NTX-1:0] tx_bump,
  input  logic [NRX-1:0] rx_bump,
  output logic [NRX-1:0] core_rx,
  // internal scan chains of the core
  output logic           isc_si,
  output logic           isc_shift,
  input  logic           isc_so
);

  tap_state_e       state;
  tap_ctrl_t        ctrl;
  logic [IR_W-1:0]  ir;
  decode_t          dec;
  logic [CFG_W-1:0] cfg;
  logic             dwr_sel, isc_sel;
  logic             tdr_out, chain_in, dwr_tdo;

  // send_select / receive_select: SI1 / SI2 spliced into the serial path
  logic send_select, receive_select, si1_out;
  logic tck_s1, tck_s2, trstn_s1, trstn_s2, te_s1, te_s2;
  logic tdo_s1, tdi_s1, tdo_s2, tdi_s2;
  logic tx_si, tx_so, rx_si;

  primary_tap #(.IDCODE(IDCODE)) u_ptap (
    .tck_p, .trstn_p, .tms_p, .tdi_p, .tdo_p, .tdo_p_en,
    .dwr_tdo, .isc_so, .tdr_out, .chain_in,
    .state, .ctrl, .ir, .dec, .cfg, .dwr_sel, .isc_sel
  );

  assign send_select = dec.test_enable && cfg[CFG_SEL_SI1];
  assign receive_select = dec.test_enable && cfg[CFG_SEL_SI2];

  secondary_interface u_si1 (
    .sel(send_select), .tms_user(cfg[CFG_TMS_SI1]),
    .tck_p, .trstn_p, .tms_p, .test_enable_p(dec.test_enable),
    .path_in(tdr_out), .tdi_s(tdi_s1),
    .tck_s(tck_s1), .trstn_s(trstn_s1), .tms_s(tms_s1), .test_enable_s(te_s1),
    .tdo_s(tdo_s1), .path_out(si1_out)
  );

  secondary_interface u_si2 (
    .sel(receive_select), .tms_user(cfg[CFG_TMS_SI2]),
    .tck_p, .trstn_p, .tms_p, .test_enable_p(dec.test_enable),
    .path_in(si1_out), .tdi_s(tdi_s2),
    .tck_s(tck_s2), .trstn_s(trstn_s2), .tms_s(tms_s2), .test_enable_s(te_s2),
    .tdo_s(tdo_s2), .path_out(chain_in)
  );

  // In EXTEST/INTEST the receiver segment follows the transmitter segment;
  // in the test modes each segment hangs off its own secondary interface.
  assign tx_si   = dec.test_enable ? tdo_s1 : tdi_p;
  assign rx_si   = dec.test_enable ? tdo_s2 : tx_so;
  assign tdi_s1  = tx_so;

  die_wrapper_register #(.N_IC(N_IC), .NTX(NTX), .NRX(NRX)) u_dwr (
    .tck_s1, .trstn_s1, .tck_s2, .trstn_s2,
    .shift_dr       (ctrl.shift_dr),
    .capture_dr     (ctrl.capture_dr),
    .update_dr      (ctrl.update_dr),
    .run            (ctrl.run_test_idle),
    .tp             (dec.tp),
    .fp             (dec.fp),
    .test_enable_s1 (te_s1),
    .test_enable_s2 (te_s2),
    .mode_control   (dec.mode_control),
    .tx_sel         (dwr_sel || send_select),
    .rx_sel         (dwr_sel || receive_select),
    .tx_si,
    .tx_so,
    .rx_si,
    .rx_so          (tdi_s2),
    .core_tx, .tx_bump, .rx_bump, .core_rx
  );

  assign dwr_tdo   = tdi_s2;
  assign isc_si    = tdi_p;
  assign isc_shift = isc_sel && ctrl.shift_dr;

endmodule
