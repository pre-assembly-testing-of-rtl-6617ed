// tb_emib_die_dft_odd: the interconnect test with an odd number of bridge
// wires (7), including the rework step for the unpaired middle wire.
//
// With N = 7, interconnects 5..7 transmit and 1..3 receive through the dummy
// metal loops; interconnect 4 has a receiver cell but no partner. First run:
// the three pairs are tested and the middle receiver reads only the level of
// its open wire. Then one dummy short is removed (pair REPAIR) and the
// middle wire is looped to that pair's transmitter instead; the second run
// checks that the middle receiver now reads that transmitter's bit and that
// the orphaned receiver no longer does. A large open on the middle loop must
// then be detected. Expected responses are worked out from the shifted bits.
module tb_emib_die_dft_odd;
  import emib_tap_pkg::*;

  localparam int N      = 7;
  localparam int NTX    = N / 2;
  localparam int NRX    = N - N / 2;
  localparam int REPAIR = 1;

  logic tck = 1'b0, trstn = 1'b1, tms = 1'b1, tdi = 1'b0;
  logic tdo, tdo_en, tms_s1, tms_s2, isc_si, isc_shift;
  logic [NTX-1:0] core_tx = '0, tx_bump;
  logic [NRX-1:0] rx_bump, core_rx;
  logic [NTX-1:0] open_big = '0;
  logic repair_en = 1'b0, mid_open = 1'b0, mid_value = 1'b0;
  int checks = 0, failures = 0;
  int n_unpaired = 0, n_repaired = 0, n_mid_open = 0;

  emib_die_dft #(.N_IC(N)) dut (
    .tck_p(tck), .trstn_p(trstn), .tms_p(tms), .tdi_p(tdi), .tdo_p(tdo), .tdo_p_en(tdo_en),
    .tms_s1, .tms_s2, .core_tx, .tx_bump, .rx_bump, .core_rx, .isc_si, .isc_shift,
    .isc_so(1'b0));

  emib_bridge_model #(.NTX(NTX), .NRX(NRX)) u_bridge (
    .tx_bump, .open_big, .open_small('0), .short_next('0), .mid_value,
    .repair_en, .repair_pair(REPAIR), .mid_open, .rx_bump);

  always #5 tck = ~tck;

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

  task automatic run_test(input logic [NTX-1:0] bits, output logic [NRX-1:0] resp,
                          output logic [NTX-1:0] last, output logic [NTX-1:0] prev);
    logic o;
    logic [63:0] out;
    scan(1'b1, IR_W, 64'(OP_CONFIG), out);
    scan(1'b0, CFG_W, 64'h1, out);
    scan(1'b1, IR_W, 64'(OP_SHIFTIN), out);
    for (int i = 0; i < NTX; i++) tick(1'b0, bits[i], o);
    for (int j = 0; j < NTX; j++) last[j] = bits[NTX-1-j];
    for (int j = 0; j < NTX - 1; j++) prev[j] = bits[NTX-2-j];
    prev[NTX-1] = 1'b0;
    scan(1'b1, IR_W, 64'(OP_CONFIG), out);
    scan(1'b0, CFG_W, 64'h2, out);
    scan(1'b1, IR_W, 64'(OP_SHIFTOUT), out);
    scan(1'b0, NRX, 64'h0, out);
    for (int j = 0; j < NRX; j++) resp[j] = out[NRX-1-j];
  endtask

  logic [NRX-1:0] resp;
  logic [NTX-1:0] last, prev;
  logic o;

  initial begin
    #2 trstn = 1'b0; #20 trstn = 1'b1;
    tick(1'b0, 1'b0, o);
    // before rework: three pairs tested, middle receiver reads its open wire
    for (int n = 0; n < 4; n++) begin
      mid_value = n[0];
      run_test(NTX'($urandom), resp, last, prev);
      check(resp[NTX-1:0] == last, "pairs read their transmitters");
      check(resp[NRX-1] == mid_value, "middle receiver unpaired");
      n_unpaired++;
    end
    // rework: pair REPAIR's short removed, middle wire looped to its transmitter
    repair_en = 1'b1;
    for (int n = 0; n < 4; n++) begin
      mid_value = ~n[0];
      run_test(NTX'($urandom), resp, last, prev);
      check(resp[NRX-1] == last[REPAIR], "middle receiver reads the reworked pair");
      check(resp[REPAIR] == mid_value, "orphaned receiver reads its open wire");
      for (int j = 0; j < NTX; j++)
        if (j != REPAIR) check(resp[j] == last[j], "other pairs unchanged");
      n_repaired++;
    end
    // a large open on the middle loop is detected
    mid_open = 1'b1;
    run_test(NTX'(3'b010), resp, last, prev);
    check(resp[NRX-1] == prev[REPAIR] && prev[REPAIR] != last[REPAIR], "open on middle wire detected");
    if (resp[NRX-1] != last[REPAIR]) n_mid_open++;
    check(n_unpaired > 0 && n_repaired > 0 && n_mid_open > 0, "mechanisms: unpaired, reworked, middle open");
    $display("mechanisms: unpaired=%0d reworked=%0d middle_open_detected=%0d", n_unpaired, n_repaired, n_mid_open);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
