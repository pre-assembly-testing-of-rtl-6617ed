// bypass_register: the one-bit bypass register of IEEE 1149.1.
//
// Clears on the rising edge of TCK in Capture-DR and loads TDI in Shift-DR,
// so a selected bypass register adds exactly one TCK of delay between TDI and
// TDO. Only acts while `sel` is high. Standard behaviour, reused by the design.
module bypass_register
  import emib_tap_pkg::*;
(
  input  logic      tck,
  input  logic      trstn,
  input  logic      sel,
  input  logic      tdi,
  input  tap_ctrl_t ctrl,
  output logic      tdo
);

  always_ff @(posedge tck or negedge trstn) begin
    if (!trstn)                   tdo <= 1'b0;
    else if (sel && ctrl.capture_dr) tdo <= 1'b0;
    else if (sel && ctrl.shift_dr)   tdo <= tdi;
  end

endmodule
