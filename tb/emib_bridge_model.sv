// emib_bridge_model: behavioural model of the bridge wires with the dummy
// metal that loops interconnect N/2+1+j back to interconnect 1+j (pair j),
// for simulation only.
//
// Fault-free, receiver bump j follows transmitter bump j at once. Defects
// per pair, set at run time:
//   open_big[j]   resistive open whose extra RC delay (BIG_DELAY) exceeds
//                 the half TCK between launch and capture: detectable;
//   open_small[j] resistive open with a delay (SMALL_DELAY) inside that
//                 window: escapes an at-speed test at this TCK;
//   short_next[j] resistive short between pair j and pair j+1: both wires
//                 settle at the AND of the two driven values (a low driver
//                 wins). Adjacent shorts chain, so short_next[j] and
//                 short_next[j+1] together short three wires.
// With an odd number of interconnects the middle receiver has no partner
// and reads mid_value (the level its open wire settles at). After the rework
// step (repair_en), pair repair_pair's dummy short is removed and its
// transmitter wire is looped to the middle wire instead: the middle receiver
// then reads that transmitter (one BIG_DELAY late if mid_open) and the
// orphaned receiver of repair_pair reads mid_value.
module emib_bridge_model #(
  parameter int  NTX         = 8,
  parameter int  NRX         = 8,
  parameter int  BIG_DELAY   = 7,   // time units of the testbench (TCK period 10)
  parameter int  SMALL_DELAY = 2
) (
  input  logic [NTX-1:0] tx_bump,
  input  logic [NTX-1:0] open_big,
  input  logic [NTX-1:0] open_small,
  input  logic [NTX-1:0] short_next,
  input  logic           mid_value,
  input  logic           repair_en,
  input  int             repair_pair,
  input  logic           mid_open,
  output logic [NRX-1:0] rx_bump
);

  logic [NTX-1:0] late_big = '0, late_small = '0, wire_v;

  for (genvar j = 0; j < NTX; j++) begin : g_pair
    always @(tx_bump[j]) late_big[j]   <= #(BIG_DELAY)   tx_bump[j];
    always @(tx_bump[j]) late_small[j] <= #(SMALL_DELAY) tx_bump[j];
  end

  always_comb begin
    for (int j = 0; j < NTX; j++)
      wire_v[j] = open_big[j] ? late_big[j] : open_small[j] ? late_small[j] : tx_bump[j];
    rx_bump = '0;
    for (int j = 0; j < NTX; j++) begin
      // every wire joined to j through a chain of shorts pulls it low
      logic joined;
      rx_bump[j] = wire_v[j];
      joined = 1'b1;
      for (int k = j; k < NTX - 1; k++) begin
        joined = joined & short_next[k];
        if (joined) rx_bump[j] = rx_bump[j] & wire_v[k+1];
      end
      joined = 1'b1;
      for (int k = j - 1; k >= 0; k--) begin
        joined = joined & short_next[k];
        if (joined) rx_bump[j] = rx_bump[j] & wire_v[k];
      end
    end
    if (NRX > NTX) begin
      rx_bump[NRX-1] = mid_value;
      if (repair_en) begin
        rx_bump[NRX-1] = mid_open ? late_big[repair_pair] : tx_bump[repair_pair];
        rx_bump[repair_pair] = mid_value;
      end
    end
  end

endmodule
