// tb_secondary_interface: exhaustive check of the secondary interface over
// all 256 input combinations: forwarded TCK/TRSTN/TEST_ENABLE, TMS_S taken
// from TMS_P only while selected, TDO_S carrying the path, and the path
// taking TDI_S only while selected.
module tb_secondary_interface;
  logic sel, tms_user, tck_p, trstn_p, tms_p, te_p, path_in, tdi_s;
  logic tck_s, trstn_s, tms_s, te_s, tdo_s, path_out;
  int checks = 0, failures = 0;

  secondary_interface dut (.sel, .tms_user, .tck_p, .trstn_p, .tms_p,
                           .test_enable_p(te_p), .path_in, .tdi_s, .tck_s, .trstn_s,
                           .tms_s, .test_enable_s(te_s), .tdo_s, .path_out);

  initial begin
    for (int v = 0; v < 256; v++) begin
      {sel, tms_user, tck_p, trstn_p, tms_p, te_p, path_in, tdi_s} = 8'(v);
      #1;
      checks++;
      if (tck_s !== tck_p || trstn_s !== trstn_p || te_s !== te_p ||
          tms_s !== (sel ? tms_p : tms_user) || tdo_s !== path_in ||
          path_out !== (sel ? tdi_s : path_in)) begin
        failures++;
        $display("FAIL inputs %b", 8'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
