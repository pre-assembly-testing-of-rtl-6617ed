// secondary_interface: one P1838-style secondary test interface of the die
// (SI1 on the transmitter side, SI2 on the receiver side).
//
// It forwards the primary TAP's TCK and TRSTN and the test-enable signal to
// its side (TCK_S, TRSTN_S, TEST_ENABLE_S), gives TMS_S the primary TMS_P
// while the interface is selected and a programmable value otherwise, and
// splices its segment into the serial path: the data arriving along the path
// (path_in) leaves on TDO_S, and while the interface is selected the data
// returning on TDI_S continues along the path (path_out); while deselected
// the path goes straight through. Purely combinational: the segment between
// TDO_S and TDI_S sets the added delay.
//
// The forwarding of TCK, TRSTN and TEST_ENABLE and the TMS multiplexer are
// the design's. The interface carries no retiming flip-flop between TDI_S and
// the path, which is this design's choice.
module secondary_interface (
  input  logic sel,          // interface included in the serial path
  input  logic tms_user,     // TMS_S value while deselected
  input  logic tck_p,
  input  logic trstn_p,
  input  logic tms_p,
  input  logic test_enable_p,
  input  logic path_in,
  input  logic tdi_s,
  output logic tck_s,
  output logic trstn_s,
  output logic tms_s,
  output logic test_enable_s,
  output logic tdo_s,
  output logic path_out
);

  assign tck_s         = tck_p;
  assign trstn_s       = trstn_p;
  assign test_enable_s = test_enable_p;
  assign tms_s         = sel ? tms_p : tms_user;
  assign tdo_s         = path_in;
  assign path_out      = sel ? tdi_s : path_in;

endmodule
