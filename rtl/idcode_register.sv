// idcode_register: 32-bit device identification register.
//
// Loads IDCODE in Capture-DR and shifts toward the LSB in Shift-DR on the
// rising edge of TCK, while `sel` is high; the LSB is on tdo. The value's
// bit 0 must be 1 as in IEEE 1149.1. The design names the IDCODE instruction
// but gives no code: the default value is a placeholder.
module idcode_register
  import emib_tap_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1838_E001
) (
  input  logic      tck,
  input  logic      trstn,
  input  logic      sel,
  input  logic      tdi,
  input  tap_ctrl_t ctrl,
  output logic      tdo
);

  logic [31:0] sr;

  always_ff @(posedge tck or negedge trstn) begin
    if (!trstn)                      sr <= IDCODE;
    else if (sel && ctrl.capture_dr) sr <= IDCODE;
    else if (sel && ctrl.shift_dr)   sr <= {tdi, sr[31:1]};
  end

  assign tdo = sr[0];

endmodule
