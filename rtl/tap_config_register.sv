// tap_config_register: the primary TAP's configuration register, which
// chooses the secondary interfaces that join the serial path.
//
// A CFG_W-bit shift stage (Capture-DR loads the current value, Shift-DR
// shifts TDI in at the MSB on the rising edge of TCK) and an update stage
// loaded on the falling edge of TCK in Update-DR while `sel` is high. Reset by
// TRSTN and in Test-Logic-Reset to 0 (no secondary interface selected).
// Bit meaning (see emib_tap_pkg): bit 0 selects SI1 (transmitter chain),
// bit 1 selects SI2 (receiver chain), both may be set; bits 2 and 3 are the
// values TMS_S1/TMS_S2 take while their interface is deselected.
//
// The register and its role are the design's; its bit meaning is this
// design's choice.
module tap_config_register
  import emib_tap_pkg::*;
(
  input  logic             tck,
  input  logic             trstn,
  input  logic             sel,
  input  logic             tdi,
  input  tap_ctrl_t        ctrl,
  output logic             tdo,
  output logic [CFG_W-1:0] cfg
);

  logic [CFG_W-1:0] sr;

  always_ff @(posedge tck or negedge trstn) begin
    if (!trstn)                      sr <= '0;
    else if (sel && ctrl.capture_dr) sr <= cfg;
    else if (sel && ctrl.shift_dr)   sr <= {tdi, sr[CFG_W-1:1]};
  end

  always_ff @(negedge tck or negedge trstn) begin
    if (!trstn)                     cfg <= '0;
    else if (ctrl.test_logic_reset) cfg <= '0;
    else if (sel && ctrl.update_dr) cfg <= sr;
  end

  assign tdo = sr[0];

endmodule
