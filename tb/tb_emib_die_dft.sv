// tb_emib_die_dft: end-to-end test of the die's bridge-interconnect test
// logic at its default size, driven only through the primary TAP pins.
//
// The die's bridge-side bumps are connected to emib_bridge_model (pairs
// looped back by dummy metal, with injectable opens and shorts); a 6-bit
// shift register stands in for the core's internal scan chains.
//
// Each interconnect test is the design's sequence: CONFIG selects SI1,
// SHIFTIN shifts NTX pattern bits into the transmitters during Run-Test/Idle
// while the receivers capture every TCK, CONFIG selects SI2, and a SHIFTOUT
// DR scan of NRX bits reads the responses on TDO_P. The expected response
// is computed here from the shifted bits and the injected defects:
// receiver j reads transmitter j's last bit, the bit before it for a large
// open, and the AND of all wires in its group for a short. Shorts are
// injected between each pair of neighbours, then across three wires with
// every mixed combination of levels on them. The alternating pattern
// (1010..., as in the at-speed open example) makes every wire toggle at the
// last launch and neighbours differ.
//
// Also exercised: IDCODE, BYPASS, CONFIG read-back, functional pass-through
// after reset, EXTEST (both segments as a boundary register), INTEST
// (wrapper drives the core), ISCAN, TMS_S1/TMS_S2 multiplexing, and the
// SHIFTOUT scan length (NRX TCK). Every mechanism is counted; one that
// never happened is a failure.
module tb_emib_die_dft;
  import emib_tap_pkg::*;

  localparam int N   = 16;
  localparam int NTX = N / 2;
  localparam int NRX = N - N / 2;
  localparam logic [31:0] ID = 32'h1838_E001;

  logic tck = 1'b0, trstn = 1'b1, tms = 1'b1, tdi = 1'b0;
  logic tdo, tdo_en, tms_s1, tms_s2, isc_si, isc_shift, isc_so;
  logic [NTX-1:0] core_tx, tx_bump;
  logic [NRX-1:0] rx_bump, core_rx;
  logic [NTX-1:0] open_big = '0, open_small = '0, short_next = '0;
  int checks = 0, failures = 0;

  emib_die_dft dut (
    .tck_p(tck), .trstn_p(trstn), .tms_p(tms), .tdi_p(tdi), .tdo_p(tdo), .tdo_p_en(tdo_en),
    .tms_s1, .tms_s2, .core_tx, .tx_bump, .rx_bump, .core_rx, .isc_si, .isc_shift, .isc_so);

  emib_bridge_model #(.NTX(NTX), .NRX(NRX)) u_bridge (
    .tx_bump, .open_big, .open_small, .short_next, .mid_value(1'b0),
    .repair_en(1'b0), .repair_pair(0), .mid_open(1'b0), .rx_bump);

  // core internal scan chain stand-in
  logic [5:0] isc_m = '0;
  always_ff @(posedge tck) if (isc_shift) isc_m <= {isc_si, isc_m[5:1]};
  assign isc_so = isc_m[0];

  always #5 tck = ~tck;   // 100 MHz TCK

  // mechanism counters
  int n_idcode, n_bypass, n_config, n_shiftin, n_shiftout, n_open_det, n_short_det, n_short3_det,
      n_small_escape, n_extest, n_intest, n_iscan, n_func, n_tms_sel, n_tms_user;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic tick(input logic m, input logic d, output logic o);
    @(negedge tck); #1 tms = m; tdi = d;
    @(posedge tck); o = tdo;
  endtask

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

  task automatic set_ir(input opcode_e op);
    logic [63:0] out;
    scan(1'b1, IR_W, 64'(op), out);
    check(out[1:0] == 2'b01, "Capture-IR pattern");
  endtask

  task automatic set_cfg(input logic [3:0] c);
    logic [63:0] out;
    set_ir(OP_CONFIG);
    scan(1'b0, CFG_W, 64'(c), out);
    n_config++;
  endtask

  // One interconnect test; returns the NRX responses (index = receiver).
  // tx_last/tx_prev: the transmitter contents after the last and the
  // second-to-last shift, worked out from the shifted bits.
  task automatic interconnect_test(input logic [NTX-1:0] bits, output logic [NRX-1:0] resp,
                                   output logic [NTX-1:0] tx_last, output logic [NTX-1:0] tx_prev);
    logic o;
    logic [63:0] out;
    set_cfg(4'b0001);                 // SI1 (transmitters) in the path
    set_ir(OP_SHIFTIN);
    check(tms_s1 == tms && tms_s2 == 1'b0, "TMS_S1 follows TMS_P, TMS_S2 user value");
    check(dut.send_select && !dut.receive_select, "SHIFTIN with SI1 configured: send_select high");
    n_tms_sel++;
    // Run-Test/Idle: one bit per TCK; the first TCK of the next scan is the
    // capture cycle after the last launch.
    for (int i = 0; i < NTX; i++) tick(1'b0, bits[i], o);
    // bit i ends in transmitter NTX-1-i
    for (int j = 0; j < NTX; j++) tx_last[j] = bits[NTX-1-j];
    for (int j = 0; j < NTX - 1; j++) tx_prev[j] = bits[NTX-2-j];
    // the capture TCK of the previous test shifted a 0 into transmitter 0,
    // which had reached the last transmitter one shift before the end
    tx_prev[NTX-1] = 1'b0;
    n_shiftin++;
    set_cfg(4'b0110);                 // SI2 (receivers) in the path, TMS_S1 user value 1
    set_ir(OP_SHIFTOUT);
    check(tms_s1 == 1'b1, "TMS_S1 user value while deselected");
    check(!dut.send_select && dut.receive_select, "SHIFTOUT with SI2 configured: receive_select high");
    n_tms_user++;
    // SHIFTOUT: NRX responses, then TDI_P bits after exactly NRX TCK
    scan(1'b0, NRX + 4, 64'hA << NRX, out);
    for (int j = 0; j < NRX; j++) resp[j] = out[NRX-1-j];
    check(out[NRX+3:NRX] == 4'b0000, "SHIFTOUT scan holds NRX bits");
    n_shiftout++;
  endtask

  function automatic logic [NRX-1:0] expected(logic [NTX-1:0] last, logic [NTX-1:0] prev);
    logic [NTX-1:0] w;
    logic [NRX-1:0] e;
    for (int j = 0; j < NTX; j++) w[j] = open_big[j] ? prev[j] : last[j];
    e = '0;
    // a wire reads the AND of its whole group of shorted neighbours
    for (int j = 0; j < NTX; j++) begin
      int lo, hi;
      lo = j; hi = j;
      while (lo > 0 && short_next[lo-1]) lo--;
      while (hi < NTX - 1 && short_next[hi]) hi++;
      e[j] = 1'b1;
      for (int k = lo; k <= hi; k++) e[j] &= w[k];
    end
    return e;
  endfunction

  logic [63:0] out;
  logic [NRX-1:0] resp, exp_r;
  logic [NTX-1:0] last, prev, pat;
  logic o;

  initial begin
    {n_idcode, n_bypass, n_config, n_shiftin, n_shiftout, n_open_det, n_short_det, n_short3_det,
     n_small_escape, n_extest, n_intest, n_iscan, n_func, n_tms_sel, n_tms_user} = '0;
    core_tx = '0;
    #2 trstn = 1'b0; #20 trstn = 1'b1;
    tick(1'b0, 1'b0, o);
    // functional mode after reset: wrapper transparent
    for (int n = 0; n < 4; n++) begin
      core_tx = NTX'($urandom);
      #1 check(tx_bump == core_tx && core_rx == rx_bump && rx_bump == tx_bump, "functional pass-through");
      n_func++;
    end
    // IDCODE
    scan(1'b0, 32, 64'h0, out);
    check(out[31:0] == ID, "IDCODE");
    n_idcode++;
    // BYPASS
    set_ir(OP_BYPASS);
    scan(1'b0, 20, 64'hABCDE, out);
    check(out[19:1] == 19'(64'hABCDE) && out[0] == 1'b0, "BYPASS one-TCK delay");
    n_bypass++;

    // fault-free interconnect tests, Fig.-8-style alternating and random
    for (int n = 0; n < 6; n++) begin
      pat = (n == 0) ? NTX'({(NTX/2){2'b01}}) : NTX'($urandom);
      interconnect_test(pat, resp, last, prev);
      exp_r = expected(last, prev);
      check(resp == exp_r, "fault-free response");
      check(resp[NTX-1:0] == last, "fault-free: receivers read their transmitters");
    end

    // large opens, one pair at a time
    for (int j = 0; j < NTX; j++) begin
      open_big = '0; open_big[j] = 1'b1;
      interconnect_test(NTX'({(NTX/2){2'b01}}), resp, last, prev);
      exp_r = expected(last, prev);
      check(resp == exp_r, "large open response");
      if (resp[j] != last[j]) n_open_det++;
      check(resp[j] != last[j], "large open detected");
    end
    open_big = '0;
    // small open escapes at this TCK
    open_small[2] = 1'b1;
    interconnect_test(NTX'({(NTX/2){2'b01}}), resp, last, prev);
    check(resp[NTX-1:0] == last, "small open passes at this TCK");
    if (resp[NTX-1:0] == last) n_small_escape++;
    open_small = '0;
    // shorts between neighbouring pairs
    for (int j = 0; j < NTX - 1; j++) begin
      short_next = '0; short_next[j] = 1'b1;
      interconnect_test(NTX'({(NTX/2){2'b01}}), resp, last, prev);
      exp_r = expected(last, prev);
      check(resp == exp_r, "short response");
      if (resp[NTX-1:0] != last) n_short_det++;
      check(resp[NTX-1:0] != last, "short detected");
    end
    short_next = '0;
    // three wires shorted together (pairs 3, 4, 5), every mixed level
    // combination: one victim against two aggressors and the reverse
    short_next[3] = 1'b1; short_next[4] = 1'b1;
    for (int c = 1; c < 7; c++) begin
      logic [NTX-1:0] want, bits;
      want = NTX'({(NTX/2){2'b01}});
      want[5:3] = 3'(c);
      for (int j = 0; j < NTX; j++) bits[NTX-1-j] = want[j];
      interconnect_test(bits, resp, last, prev);
      check(last == want, "three-wire short: levels launched");
      exp_r = expected(last, prev);
      check(resp == exp_r, "three-wire short response");
      check(resp[5:3] == 3'b000, "three-wire short: low driver wins");
      if (resp[NTX-1:0] != last) n_short3_det++;
    end
    short_next = '0;

    // EXTEST: both segments in the path, transmitters first
    set_ir(OP_EXTEST);
    for (int n = 0; n < 3; n++) begin
      logic [NTX+NRX-1:0] p;
      p = (NTX+NRX)'({$urandom, $urandom});
      core_tx = NTX'($urandom);
      // shifting LSB first: bit k ends in chain position NTX+NRX-1-k
      scan(1'b0, NTX + NRX, 64'(p), out);    // shift, update
      for (int j = 0; j < NTX; j++) check(tx_bump[j] == p[NTX+NRX-1-j], "EXTEST drives bump");
      scan(1'b0, NTX + NRX, 64'h0, out);      // capture, shift out
      for (int j = 0; j < NRX; j++) check(out[NRX-1-j] == p[NTX+NRX-1-j], "EXTEST receiver captured its pair");
      for (int j = 0; j < NTX; j++) check(out[NTX+NRX-1-j] == core_tx[j], "EXTEST transmitter captured core");
      n_extest++;
    end
    // INTEST: receivers' update stage drives the core
    set_ir(OP_INTEST);
    begin
      logic [NTX+NRX-1:0] p;
      p = (NTX+NRX)'({$urandom, $urandom});
      scan(1'b0, NTX + NRX, 64'(p), out);
      for (int j = 0; j < NRX; j++) check(core_rx[j] == p[NRX-1-j], "INTEST drives core");
      n_intest++;
    end
    // ISCAN: 6-bit core chain in the path
    set_ir(OP_ISCAN);
    scan(1'b0, 6, 64'h2D, out);
    scan(1'b0, 6, 64'h00, out);
    check(out[5:0] == 6'h2D, "ISCAN reaches the core chain");
    n_iscan++;
    // back to functional mode
    repeat (5) tick(1'b1, 1'b0, o);
    tick(1'b0, 1'b0, o);
    core_tx = NTX'($urandom);
    #1 check(tx_bump == core_tx, "functional after reset");

    check(n_idcode > 0 && n_bypass > 0 && n_config > 0 && n_func > 0, "mechanisms: idcode/bypass/config/functional");
    check(n_shiftin > 0 && n_shiftout > 0, "mechanisms: SHIFTIN/SHIFTOUT");
    check(n_open_det == NTX && n_short_det == NTX - 1 && n_short3_det == 6 && n_small_escape > 0, "mechanisms: defects");
    check(n_extest > 0 && n_intest > 0 && n_iscan > 0, "mechanisms: EXTEST/INTEST/ISCAN");
    check(n_tms_sel > 0 && n_tms_user > 0, "mechanisms: TMS_S multiplexing");
    $display("mechanisms: shiftin=%0d shiftout=%0d open_detected=%0d short_detected=%0d short3_detected=%0d small_open_escape=%0d extest=%0d intest=%0d iscan=%0d bypass=%0d idcode=%0d config=%0d tms_sel=%0d tms_user=%0d functional=%0d",
             n_shiftin, n_shiftout, n_open_det, n_short_det, n_short3_det, n_small_escape, n_extest, n_intest,
             n_iscan, n_bypass, n_idcode, n_config, n_tms_sel, n_tms_user, n_func);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
