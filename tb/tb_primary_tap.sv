// tb_primary_tap: drives the primary TAP through its pins (TCK_P, TMS_P,
// TDI_P, TRSTN_P, TDO_P) like a tester would.
//
// Small shift-register models stand in for the die wrapper register (3 bits),
// the internal scan chains (5 bits) and the secondary-interface segment
// (2 bits, active in SHIFTIN/SHIFTOUT), so the register selection can be seen
// as a scan length. Checks: IDCODE after reset, the Capture-IR value,
// the bypass delay of one TCK, write and read-back of the configuration
// register, the scan lengths of EXTEST/INTEST, ISCAN and the test modes,
// TP/FP/TEST_ENABLE_P for every instruction (1/0/1 for SHIFTIN, 0/1/1 for
// SHIFTOUT, 0/0/0 otherwise), unknown opcodes acting as BYPASS, TDO_P
// enabled only while shifting, and reset by TRSTN and by five TMS=1 clocks.
module tb_primary_tap;
  import emib_tap_pkg::*;

  localparam logic [31:0] ID = 32'h1838_E001;
  logic tck = 1'b0, trstn = 1'b1, tms = 1'b1, tdi = 1'b0;
  logic tdo, tdo_en, dwr_tdo, isc_so, tdr_out, chain_in;
  tap_state_e state;
  tap_ctrl_t ctrl;
  logic [IR_W-1:0] ir;
  decode_t dec;
  logic [CFG_W-1:0] cfg;
  logic dwr_sel, isc_sel;
  int checks = 0, failures = 0, en_bad = 0;

  primary_tap #(.IDCODE(ID)) dut (
    .tck_p(tck), .trstn_p(trstn), .tms_p(tms), .tdi_p(tdi), .tdo_p(tdo), .tdo_p_en(tdo_en),
    .dwr_tdo, .isc_so, .tdr_out, .chain_in, .state, .ctrl, .ir, .dec, .cfg, .dwr_sel, .isc_sel);

  // stand-in test data registers
  logic [2:0] dwr_m;
  logic [4:0] isc_m;
  logic [1:0] sec_m;
  always_ff @(posedge tck) begin
    if (dwr_sel && ctrl.shift_dr) dwr_m <= {tdi, dwr_m[2:1]};
    if (isc_sel && ctrl.shift_dr) isc_m <= {tdi, isc_m[4:1]};
    if (dec.test_enable && ctrl.shift_dr) sec_m <= {tdr_out, sec_m[1]};
  end
  assign dwr_tdo  = dwr_m[0];
  assign isc_so   = isc_m[0];
  assign chain_in = dec.test_enable ? sec_m[0] : tdr_out;

  always #5 tck = ~tck;

  // TDO_P must only be enabled in the cycle after a shift state was entered
  logic shifting_q;
  always_ff @(negedge tck) shifting_q <= ctrl.shift_dr || ctrl.shift_ir;
  always @(posedge tck) if (trstn && tdo_en != shifting_q) en_bad++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t (ir=%b)", what, $time, ir); end
  endtask

  task automatic tick(input logic m, input logic d, output logic o);
    @(negedge tck); #1 tms = m; tdi = d;
    @(posedge tck); o = tdo;
  endtask

  // Scan `n` bits of `val` (LSB first) through IR or DR, from and back to
  // Run-Test/Idle; returns what came out of TDO_P.
  task automatic scan(input bit is_ir, input int n, input logic [63:0] val, output logic [63:0] out);
    logic o;
    out = '0;
    tick(1'b1, 1'b0, o);
    if (is_ir) tick(1'b1, 1'b0, o);
    tick(1'b0, 1'b0, o);
    tick(1'b0, 1'b0, o);
    for (int i = 0; i < n; i++) begin
      tick(i == n - 1, val[i], o);
      out[i] = o;
    end
    tick(1'b1, 1'b0, o);
    tick(1'b0, 1'b0, o);
  endtask

  // Length of the DR path: flush with zeros, then shift a 1 and count.
  task automatic dr_length(output int len);
    logic [63:0] out;
    scan(1'b0, 64, 64'h0, out);
    scan(1'b0, 64, 64'h1, out);
    len = -1;
    for (int i = 63; i >= 0; i--) if (out[i]) len = i;
  endtask

  logic [63:0] out;
  int len;
  logic o;

  initial begin
    #2 trstn = 1'b0; #20 trstn = 1'b1;
    tick(1'b0, 1'b0, o);                      // to Run-Test/Idle
    check(ir == OP_IDCODE, "IDCODE after TRSTN");
    scan(1'b0, 32, 64'h0, out);
    check(out[31:0] == ID, "IDCODE read");
    // Capture-IR value and BYPASS
    scan(1'b1, 4, 64'(OP_BYPASS), out);
    check(out[3:0] == IR_CAPTURE, "Capture-IR value");
    check(ir == OP_BYPASS, "BYPASS loaded");
    for (int n = 0; n < 5; n++) begin
      logic [63:0] v;
      v = {$urandom, $urandom};
      scan(1'b0, 40, v, out);
      check(out[39:1] == v[38:0] && out[0] == 1'b0, "bypass delays one TCK");
    end
    // CONFIG write and read-back
    scan(1'b1, 4, 64'(OP_CONFIG), out);
    for (int n = 0; n < 8; n++) begin
      logic [3:0] c, prev;
      c = 4'($urandom);
      prev = cfg;
      scan(1'b0, 4, 64'(c), out);
      check(out[3:0] == prev, "config read-back");
      check(cfg == c, "config written");
    end
    // Scan lengths of each register and Table I values
    for (int op = 0; op < 16; op++) begin
      int exp_len;
      logic [2:0] exp_tpf;
      scan(1'b1, 4, 64'(op), out);
      check(ir == 4'(op), "instruction loaded");
      exp_tpf = (op == int'(OP_SHIFTIN)) ? 3'b101 : (op == int'(OP_SHIFTOUT)) ? 3'b011 : 3'b000;
      check({dec.tp, dec.fp, dec.test_enable} == exp_tpf, "TP/FP/TEST_ENABLE_P table");
      case (4'(op))
        OP_SHIFTIN, OP_SHIFTOUT: exp_len = 2;
        OP_CONFIG:               exp_len = CFG_W;
        OP_EXTEST, OP_INTEST:    exp_len = 3;
        OP_IDCODE:               exp_len = 32;
        OP_ISCAN:                exp_len = 5;
        default:                 exp_len = 1;
      endcase
      if (4'(op) == OP_CONFIG) begin
        scan(1'b0, 4, 64'h0, out);    // known content, then measure
      end
      if (4'(op) == OP_IDCODE) begin
        // the code itself is shifted out first; the marker follows it
        scan(1'b0, 64, 64'h1, out);
        len = out[32] ? 32 : -1;
        check(out[31:0] == ID, "IDCODE in the length scan");
      end else begin
        dr_length(len);
      end
      check(len == exp_len, $sformatf("DR length of opcode %0d", op));
      check(dec.mode_control == (4'(op) == OP_EXTEST || 4'(op) == OP_INTEST), "mode control");
    end
    // Five TMS=1 clocks reset the instruction
    scan(1'b1, 4, 64'(OP_BYPASS), out);
    repeat (5) tick(1'b1, 1'b0, o);
    check(state == TEST_LOGIC_RESET && ir == OP_IDCODE && cfg == '0, "TMS reset");
    tick(1'b0, 1'b0, o);
    check(en_bad == 0, "TDO_P enable only while shifting");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
