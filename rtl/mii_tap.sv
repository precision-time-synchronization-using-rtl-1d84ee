// mii_tap: the FPGA path between the Ethernet MAC's MII and the PHY.
//
// Frames pass in both directions unmodified, each nibble delayed by exactly
// one MII clock (a fixed latency, so timestamps stay consistent).  A
// ptp_detector on each direction recognises PTP event frames and reports
// the local time at their start-of-frame delimiter: receive (PHY to MAC)
// frames give T2 on a slave, transmit (MAC to PHY) frames give T3.
//
// The placement between MII and PHY, the unchanged pass-through and the
// per-frame preamble detection are the document's.  Working in the local
// clock domain with one nibble-enable per direction (rx_ce, tx_ce: the MII
// receive and transmit clock edges already synchronised) is this design's
// simplification.  Rewriting timestamps inside frames (one-step operation)
// is not done: the two-step exchange with Follow_Up needs only capture.
module mii_tap
  import ptp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  ptp_time_t   time_i,
  // receive: PHY -> MAC
  input  logic        rx_ce,
  input  logic        phy_rx_dv,
  input  logic        phy_rx_er,
  input  logic [3:0]  phy_rxd,
  output logic        mac_rx_dv,
  output logic        mac_rx_er,
  output logic [3:0]  mac_rxd,
  // transmit: MAC -> PHY
  input  logic        tx_ce,
  input  logic        mac_tx_en,
  input  logic        mac_tx_er,
  input  logic [3:0]  mac_txd,
  output logic        phy_tx_en,
  output logic        phy_tx_er,
  output logic [3:0]  phy_txd,
  // captured event timestamps
  output logic        rx_evt_valid,
  output ts_entry_t   rx_evt,
  output logic        tx_evt_valid,
  output ts_entry_t   tx_evt,
  output logic [31:0] rx_frames,
  output logic [31:0] tx_frames,
  output logic [31:0] rx_ptp,
  output logic [31:0] tx_ptp
);

  logic rx_sof, tx_sof;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mac_rx_dv <= 1'b0; mac_rx_er <= 1'b0; mac_rxd <= '0;
      phy_tx_en <= 1'b0; phy_tx_er <= 1'b0; phy_txd <= '0;
    end else begin
      if (rx_ce) begin
        mac_rx_dv <= phy_rx_dv; mac_rx_er <= phy_rx_er; mac_rxd <= phy_rxd;
      end
      if (tx_ce) begin
        phy_tx_en <= mac_tx_en; phy_tx_er <= mac_tx_er; phy_txd <= mac_txd;
      end
    end
  end

  ptp_detector u_rx_det (
    .clk, .rst_n, .nib_ce(rx_ce), .dv(phy_rx_dv), .d(phy_rxd), .time_i,
    .sof_o(rx_sof), .evt_valid(rx_evt_valid), .evt_o(rx_evt),
    .frame_o(rx_frames), .ptp_o(rx_ptp)
  );

  ptp_detector u_tx_det (
    .clk, .rst_n, .nib_ce(tx_ce), .dv(mac_tx_en), .d(mac_txd), .time_i,
    .sof_o(tx_sof), .evt_valid(tx_evt_valid), .evt_o(tx_evt),
    .frame_o(tx_frames), .ptp_o(tx_ptp)
  );

  // an event report always belongs to a frame whose SFD was seen earlier
  a_rx_sof: assert property (@(posedge clk) disable iff (!rst_n) rx_sof |-> !rx_evt_valid);
  a_tx_sof: assert property (@(posedge clk) disable iff (!rst_n) tx_sof |-> !tx_evt_valid);

endmodule
