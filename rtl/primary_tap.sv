// primary_tap: the modified P1838 primary TAP of the logic die.
//
// Contains the 1149.1 TAP state machine, the 4-bit instruction register, the
// instruction decoder, and the bypass, IDCODE and TAP-configuration
// registers. The die wrapper register and the internal scan chains live
// outside and are reached through dwr_tdo and isc_so.
//
// Serial path: in Shift-IR, TDI_P -> instruction register -> TDO_P. In a DR
// scan, TDI_P -> the register the instruction selects -> tdr_out; tdr_out
// then runs through whichever secondary interfaces are spliced in outside
// and comes back as chain_in, which drives TDO_P. SHIFTIN and SHIFTOUT select
// no register of their own, so tdr_out is TDI_P itself. TDO_P changes on the
// falling edge of TCK and is only enabled (tdo_p_en) in Shift-IR and
// Shift-DR, as in 1149.1.
//
// Outputs for the rest of the die: the decoded TP, FP and TEST_ENABLE_P, the
// wrapper mode control, the configuration bits, the TAP strobes, and the
// selection flags of the die wrapper register and the internal scan chains.
//
// The block structure (TAP controller, instruction register, decoder, bypass
// and configuration registers, TP/FP/TEST_ENABLE_P outputs) follows the
// design; IDCODE value and opcode assignment are this design's.
module primary_tap
  import emib_tap_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1838_E001
) (
  input  logic             tck_p,
  input  logic             trstn_p,
  input  logic             tms_p,
  input  logic             tdi_p,
  output logic             tdo_p,
  output logic             tdo_p_en,
  // test data registers outside the TAP
  input  logic             dwr_tdo,
  input  logic             isc_so,
  output logic             tdr_out,
  input  logic             chain_in,
  // control toward the rest of the die
  output tap_state_e       state,
  output tap_ctrl_t        ctrl,
  output logic [IR_W-1:0]  ir,
  output decode_t          dec,
  output logic [CFG_W-1:0] cfg,
  output logic             dwr_sel,
  output logic             isc_sel
);

  logic ir_tdo, byp_tdo, id_tdo, cfg_tdo;

  tap_fsm u_fsm (.tck(tck_p), .trstn(trstn_p), .tms(tms_p), .state, .ctrl);

  instruction_register u_ir (.tck(tck_p), .trstn(trstn_p), .tdi(tdi_p), .ctrl,
                             .tdo(ir_tdo), .ir);

  ir_decoder u_dec (.ir, .dec);

  bypass_register u_byp (.tck(tck_p), .trstn(trstn_p), .sel(dec.tdr == TDR_BYPASS),
                         .tdi(tdi_p), .ctrl, .tdo(byp_tdo));

  idcode_register #(.IDCODE(IDCODE)) u_id (
    .tck(tck_p), .trstn(trstn_p), .sel(dec.tdr == TDR_IDCODE), .tdi(tdi_p), .ctrl, .tdo(id_tdo));

  tap_config_register u_cfg (.tck(tck_p), .trstn(trstn_p), .sel(dec.tdr == TDR_CONFIG),
                             .tdi(tdi_p), .ctrl, .tdo(cfg_tdo), .cfg);

  assign dwr_sel = (dec.tdr == TDR_DWR);
  assign isc_sel = (dec.tdr == TDR_ISCAN);

  always_comb begin
    unique case (dec.tdr)
      TDR_BYPASS: tdr_out = byp_tdo;
      TDR_IDCODE: tdr_out = id_tdo;
      TDR_CONFIG: tdr_out = cfg_tdo;
      TDR_DWR:    tdr_out = dwr_tdo;
      TDR_ISCAN:  tdr_out = isc_so;
      default:    tdr_out = tdi_p;
    endcase
  end

  // TP and FP select opposite test modes and are never high together; both
  // test modes raise TEST_ENABLE_P.
  a_tp_fp_exclusive: assert property (@(posedge tck_p) disable iff (!trstn_p)
                                      !(dec.tp && dec.fp));
  a_test_enable: assert property (@(posedge tck_p) disable iff (!trstn_p)
                                  (dec.tp || dec.fp) == dec.test_enable);

  always_ff @(negedge tck_p or negedge trstn_p) begin
    if (!trstn_p) begin
      tdo_p    <= 1'b0;
      tdo_p_en <= 1'b0;
    end else begin
      tdo_p    <= ctrl.shift_ir ? ir_tdo : chain_in;
      tdo_p_en <= ctrl.shift_ir || ctrl.shift_dr;
    end
  end

endmodule
