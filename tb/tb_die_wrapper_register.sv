// tb_die_wrapper_register: checks the transmitter and receiver segments
// together, with each transmitter bump looped back to its paired receiver
// bump as the dummy metal does on the bridge.
//
// Part 1 (EXTEST use, TEST_ENABLE = 0): shift a random pattern through both
// segments (transmitters first), update so the transmitters drive it onto
// the bumps, capture so the receivers take it in and the transmitters take
// the core data, then shift everything out and compare.
// Part 2 (SHIFTIN then SHIFTOUT): shift a random pattern into the
// transmitter segment in "Run-Test/Idle" with the receivers capturing every
// TCK, then shift the receivers out and compare with the bits the
// transmitters held before the last shift. Also checks that the transmitter
// segment is not disturbed by the SHIFTOUT scan.
module tb_die_wrapper_register;
  localparam int N   = 16;
  localparam int NTX = N / 2;
  localparam int NRX = N - N / 2;

  logic tck = 1'b0, trstn = 1'b1;
  logic shift_dr, capture_dr, update_dr, run, tp, fp, te, mode, tx_sel, rx_sel;
  logic tx_si, tx_so, rx_si, rx_so, rx_si_tb;
  assign rx_si = te ? rx_si_tb : tx_so;  // receivers follow transmitters in EXTEST
  logic [NTX-1:0] core_tx, tx_bump;
  logic [NRX-1:0] rx_bump, core_rx;
  int checks = 0, failures = 0;

  die_wrapper_register #(.N_IC(N)) dut (
    .tck_s1(tck), .trstn_s1(trstn), .tck_s2(tck), .trstn_s2(trstn), .shift_dr, .capture_dr, .update_dr, .run, .tp, .fp,
    .test_enable_s1(te), .test_enable_s2(te), .mode_control(mode), .tx_sel, .rx_sel,
    .tx_si, .tx_so, .rx_si, .rx_so, .core_tx, .tx_bump, .rx_bump, .core_rx);

  // dummy-metal loopback: pair j
  assign rx_bump = tx_bump;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic clk();
    #5 tck = 1'b1;
    #5 tck = 1'b0;
    #1;  // let the falling-edge logic settle before the next stimulus
  endtask

  logic [NTX+NRX-1:0] pat, got;
  logic [NTX-1:0] txpat, tx_before;
  logic [NRX-1:0] rxgot;

  initial begin
    {shift_dr, capture_dr, update_dr, run, tp, fp, te, mode, tx_sel, rx_sel, tx_si} = '0;
    core_tx = '0;
    #1 trstn = 1'b0; #1 trstn = 1'b1;
    for (int n = 0; n < 20; n++) begin
      // ---------- part 1: EXTEST-style scan
      te = 1'b0; mode = 1'b1; tx_sel = 1'b1; rx_sel = 1'b1; tp = 1'b0; fp = 1'b0;
      pat = (NTX+NRX)'({$urandom, $urandom});
      core_tx = NTX'($urandom);
      shift_dr = 1'b1;
      for (int i = NTX + NRX - 1; i >= 0; i--) begin tx_si = pat[i]; clk(); end
      shift_dr = 1'b0; update_dr = 1'b1; clk(); update_dr = 1'b0;
      // pattern bit k ends in chain position k: tx cell j = bit j, rx cell j = bit NTX+j
      for (int j = 0; j < NTX; j++) check(tx_bump[j] == pat[j], "tx update drives bump");
      for (int j = 0; j < NRX; j++) check(core_rx[j] == pat[NTX+j], "rx update drives core");
      capture_dr = 1'b1; clk(); capture_dr = 1'b0;
      shift_dr = 1'b1;
      for (int i = 0; i < NTX + NRX; i++) begin got[i] = rx_so; tx_si = 1'b0; clk(); end
      shift_dr = 1'b0;
      // got[0] = last rx cell ... got[NRX-1] = rx cell 0, then tx cells last..0
      for (int j = 0; j < NRX; j++) check(got[NRX-1-j] == tx_bump[j], "rx captured its pair");
      for (int j = 0; j < NTX; j++) check(got[NRX+NTX-1-j] == core_tx[j], "tx captured core data");
      // ---------- part 2: SHIFTIN in run, then SHIFTOUT
      te = 1'b1; mode = 1'b0; tp = 1'b1; fp = 1'b0; tx_sel = 1'b1; rx_sel = 1'b0;
      txpat = NTX'($urandom);
      run = 1'b1;
      for (int i = NTX - 1; i >= 0; i--) begin tx_si = txpat[i]; clk(); end
      // after NTX shifts tx cell j holds txpat[j]; one more run cycle lets
      // the receivers capture it (and shifts the transmitters once more)
      tx_si = 1'($urandom); clk();
      run = 1'b0;
      tx_before = tx_bump;
      check(tx_bump == {txpat[NTX-2:0], tx_si}, "transmitters shifted once more");
      tp = 1'b0; fp = 1'b1; tx_sel = 1'b0; rx_sel = 1'b1;
      shift_dr = 1'b1;
      for (int i = 0; i < NRX; i++) begin rxgot[NRX-1-i] = rx_so; rx_si_tb = 1'b0; clk(); end
      shift_dr = 1'b0;
      check(rxgot == txpat, "receivers captured the shifted-in pattern");
      check(tx_bump == tx_before, "transmitters hold during SHIFTOUT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
