// tb_rx_dwr_cell: random-stimulus check of the receiver wrapper cell.
//
// Every TCK the controls (shift_dr, capture_dr, update_dr, run, tp, fp,
// test_enable, mode_control) and data take random values. A reference model
// of the intended behaviour (1149.1 shift/capture/update when
// TEST_ENABLE_S2 = 0; capture from the bump in Run-Test/Idle when TP = 1;
// shift in Shift-DR when FP = 1) is compared with cto after each rising edge
// and with cfo after each falling edge. Counts how often each mode was
// exercised.
module tb_rx_dwr_cell;
  logic tck = 1'b0, trstn = 1'b1;
  logic cti, cfi, shift_dr, capture_dr, update_dr, run, tp, fp, te, mode;
  logic cto, cfo;
  logic m_sc, m_upd;
  int checks = 0, failures = 0, n_tp_cap = 0, n_fp_shift = 0, n_ext = 0;

  rx_dwr_cell dut (.tck, .trstn, .cti, .cfi, .shift_dr, .capture_dr, .update_dr, .run, .tp, .fp,
                   .test_enable(te), .mode_control(mode), .cto, .cfo);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    {cti, cfi, shift_dr, capture_dr, update_dr, run, tp, fp, te, mode} = '0;
    #1 trstn = 1'b0; #1 trstn = 1'b1;
    m_sc = 1'b0; m_upd = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      #3;
      cti = 1'($urandom); cfi = 1'($urandom);
      te  = 1'($urandom); tp = 1'($urandom); fp = !tp; run = 1'($urandom);
      mode = 1'($urandom);
      shift_dr = 1'($urandom); capture_dr = !shift_dr && 1'($urandom);
      update_dr = !shift_dr && !capture_dr && 1'($urandom);
      #2 tck = 1'b1;
      if (te) begin
        if (fp && shift_dr)  begin m_sc = cti; n_fp_shift++; end
        else if (tp && run)  begin m_sc = cfi; n_tp_cap++;   end
      end else begin
        if (shift_dr)        begin m_sc = cti; n_ext++; end
        else if (capture_dr) begin m_sc = cfi; n_ext++; end
      end
      #1 check(cto == m_sc, "cto after rising edge");
      #4 tck = 1'b0;
      if (!te && update_dr) m_upd = m_sc;
      #1 check(cfo == (mode ? m_upd : cfi), "cfo after falling edge");
    end
    check(n_tp_cap > 0 && n_fp_shift > 0 && n_ext > 0, "all modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
