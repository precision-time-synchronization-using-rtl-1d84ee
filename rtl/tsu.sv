// tsu: time stamp unit.
//
// Keeps the timestamps that the MII tap captures for PTP event frames until
// the protocol software collects them: one queue for received frames (T2 on
// a slave, T4 on a master) and one for transmitted frames (T1 on a master,
// T3 on a slave).  Each entry holds the 64-bit local time at the frame's
// start-of-frame delimiter, the messageType and the sequenceId, so that the
// software can match it with the message it sent or received.
//
// The document names the unit and its job; the queue depth (DEPTH, default
// 4 per direction), the show-ahead read with an explicit pop and the sticky
// overflow flags are this design's choices.  An entry written into a full
// queue is dropped and flagged.
module tsu
  import ptp_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      rx_valid,
  input  ts_entry_t rx_entry,
  input  logic      tx_valid,
  input  ts_entry_t tx_entry,
  input  logic      rx_pop,
  input  logic      tx_pop,
  input  logic      clr_ovf,
  output ts_entry_t rx_head,
  output ts_entry_t tx_head,
  output logic      rx_avail,
  output logic      tx_avail,
  output logic [$clog2(DEPTH+1)-1:0] rx_count,
  output logic [$clog2(DEPTH+1)-1:0] tx_count,
  output logic      rx_ovf,
  output logic      tx_ovf
);

  localparam int unsigned EW = $bits(ts_entry_t);

  logic rx_empty, tx_empty;

  sync_fifo #(.W(EW), .DEPTH(DEPTH)) u_rxq (
    .clk, .rst_n, .wr(rx_valid), .wdata(rx_entry), .rd(rx_pop), .rdata_o(rx_head),
    .empty_o(rx_empty), .full_o(), .count_o(rx_count), .clr_ovf, .overflow_o(rx_ovf)
  );

  sync_fifo #(.W(EW), .DEPTH(DEPTH)) u_txq (
    .clk, .rst_n, .wr(tx_valid), .wdata(tx_entry), .rd(tx_pop), .rdata_o(tx_head),
    .empty_o(tx_empty), .full_o(), .count_o(tx_count), .clr_ovf, .overflow_o(tx_ovf)
  );

  assign rx_avail = !rx_empty;
  assign tx_avail = !tx_empty;

endmodule
