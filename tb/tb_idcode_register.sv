// tb_idcode_register: captures the identification code and shifts it out,
// checking all 32 bits LSB first, bit 0 = 1, and that TDI follows 32 TCK
// later.
module tb_idcode_register;
  import emib_tap_pkg::*;

  localparam logic [31:0] ID = 32'h1838_E001;
  logic tck = 1'b0, trstn = 1'b1, sel = 1'b1, tdi = 1'b0, tdo;
  tap_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;
  logic [31:0] got, pat;

  idcode_register #(.IDCODE(ID)) dut (.tck, .trstn, .sel, .tdi, .ctrl, .tdo);

  always #5 tck = ~tck;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2 trstn = 1'b0; #2 trstn = 1'b1;
    for (int n = 0; n < 4; n++) begin
      pat = $urandom;
      @(posedge tck); #1 ctrl = '0; ctrl.capture_dr = 1'b1;
      @(posedge tck); #1 ctrl = '0; ctrl.shift_dr = 1'b1;
      for (int i = 0; i < 32; i++) begin
        got[i] = tdo; tdi = pat[i];
        @(posedge tck); #1;
      end
      check(got == ID, "IDCODE shifted out");
      check(got[0] == 1'b1, "IDCODE bit 0");
      for (int i = 0; i < 32; i++) begin
        got[i] = tdo;
        @(posedge tck); #1;
      end
      check(got == pat, "TDI reaches TDO after 32 TCK");
      ctrl = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
