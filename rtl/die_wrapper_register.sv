// die_wrapper_register: the wrapper cells on the bridge-side micro-bumps of
// the logic die, as two scan segments.
//
// NTX transmitter cells (tx_dwr_cell) form the transmitter segment from
// tx_si to tx_so; NRX receiver cells (rx_dwr_cell) form the receiver segment
// from rx_si to rx_so. Cell j of each segment sits on pair j: its
// transmitter bump drives interconnect N/2+1+j and its receiver bump listens
// to interconnect 1+j, which the dummy metal shorts to it. Data enters each
// segment at cell 0 and leaves from the last cell.
//
// tx_sel and rx_sel say whether a segment is part of the current scan: they
// gate the Shift-DR, Capture-DR and Update-DR strobes of that segment, and
// tx_sel also gates the Run-Test/Idle shifting of SHIFTIN. The receivers'
// Run-Test/Idle capture is not gated, so they record the responses even
// while only the transmitter segment is in the path. All timing is that of
// the two cell types.
//
// The split into transmitter and receiver cells and the pairing of
// interconnect i with N/2+i are the design's; the cell order within a
// segment and the default of 16 interconnects are this design's choice.
// The transmitter segment runs on TCK_S1/TRSTN_S1 of the transmitter-side
// secondary interface, the receiver segment on TCK_S2/TRSTN_S2; both are the
// primary TCK_P/TRSTN_P passed through.
module die_wrapper_register #(
  parameter int N_IC = 16,             // bridge interconnects
  parameter int NTX  = N_IC / 2,       // transmitter cells
  parameter int NRX  = N_IC - N_IC / 2 // receiver cells (one extra when N_IC is odd)
) (
  input  logic           tck_s1,       // clock and reset of the transmitter segment
  input  logic           trstn_s1,
  input  logic           tck_s2,       // clock and reset of the receiver segment
  input  logic           trstn_s2,
  input  logic           shift_dr,
  input  logic           capture_dr,
  input  logic           update_dr,
  input  logic           run,
  input  logic           tp,
  input  logic           fp,
  input  logic           test_enable_s1,
  input  logic           test_enable_s2,
  input  logic           mode_control,
  input  logic           tx_sel,
  input  logic           rx_sel,
  input  logic           tx_si,
  output logic           tx_so,
  input  logic           rx_si,
  output logic           rx_so,
  input  logic [NTX-1:0] core_tx,      // functional data toward the bridge
  output logic [NTX-1:0] tx_bump,
  input  logic [NRX-1:0] rx_bump,
  output logic [NRX-1:0] core_rx       // functional data toward the core
);

  logic [NTX:0] tx_chain;
  logic [NRX:0] rx_chain;

  assign tx_chain[0] = tx_si;
  assign rx_chain[0] = rx_si;

  for (genvar j = 0; j < NTX; j++) begin : g_tx
    tx_dwr_cell u_cell (
      .tck          (tck_s1),
      .trstn        (trstn_s1),
      .cti          (tx_chain[j]),
      .cfi          (core_tx[j]),
      .shift_dr     (shift_dr && tx_sel),
      .capture_dr   (capture_dr && tx_sel),
      .update_dr    (update_dr && tx_sel),
      .run          (run && tx_sel),
      .fp,
      .test_enable  (test_enable_s1),
      .mode_control,
      .cto          (tx_chain[j+1]),
      .cfo          (tx_bump[j])
    );
  end

  for (genvar j = 0; j < NRX; j++) begin : g_rx
    rx_dwr_cell u_cell (
      .tck          (tck_s2),
      .trstn        (trstn_s2),
      .cti          (rx_chain[j]),
      .cfi          (rx_bump[j]),
      .shift_dr     (shift_dr && rx_sel),
      .capture_dr   (capture_dr && rx_sel),
      .update_dr    (update_dr && rx_sel),
      .run,
      .tp, .fp,
      .test_enable  (test_enable_s2),
      .mode_control,
      .cto          (rx_chain[j+1]),
      .cfo          (core_rx[j])
    );
  end

  assign tx_so = tx_chain[NTX];
  assign rx_so = rx_chain[NRX];

endmodule
