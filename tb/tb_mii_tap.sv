// tb_mii_tap: checks the MII pass-through and the capture in both directions.
//
// Receive frames (PHY to MAC) and transmit frames (MAC to PHY) run at the
// same time with independent nibble enables.  Every nibble enable checks
// that each output equals the input of the previous enable (fixed one-nibble
// latency, no change to the data, error or valid lines).  PTP event frames
// must be reported on their own direction only, with the SFD time.
// Pass-through without change follows the document; the one-nibble
// latency is this design's.
module tb_mii_tap;
  import ptp_pkg::*;
  import mii_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  ptp_time_t time_i = 64'd77;
  logic rx_ce = 0, phy_rx_dv = 0, phy_rx_er = 0;  logic [3:0] phy_rxd = '0;
  logic mac_rx_dv, mac_rx_er;                     logic [3:0] mac_rxd;
  logic tx_ce = 0, mac_tx_en = 0, mac_tx_er = 0;  logic [3:0] mac_txd = '0;
  logic phy_tx_en, phy_tx_er;                     logic [3:0] phy_txd;
  logic rx_evt_valid, tx_evt_valid;
  ts_entry_t rx_evt, tx_evt;
  logic [31:0] rx_frames, tx_frames, rx_ptp, tx_ptp;
  int checks = 0, failures = 0;

  mii_tap dut (.*);
  always #5 clk = !clk;
  always @(posedge clk) time_i <= time_i + 1;

  // pass-through checker: at each enable the output shows the previous input
  logic [5:0] rx_prev = '0, tx_prev = '0;
  always @(posedge clk) begin
    if (rst_n && rx_ce) begin
      #1;
      checks++;
      if ({mac_rx_dv, mac_rx_er, mac_rxd} != rx_prev) begin failures++; $display("FAIL rx pass-through"); end
    end
  end
  always @(posedge clk) begin
    if (rst_n && tx_ce) begin
      #1;
      checks++;
      if ({phy_tx_en, phy_tx_er, phy_txd} != tx_prev) begin failures++; $display("FAIL tx pass-through"); end
    end
  end

  ts_entry_t rx_got[$], tx_got[$];
  always @(posedge clk) begin
    if (rx_evt_valid) rx_got.push_back(rx_evt);
    if (tx_evt_valid) tx_got.push_back(tx_evt);
  end

  ts_entry_t rx_exp[$], tx_exp[$];

  task automatic rx_nib(input logic [3:0] n, input logic v, input logic er, ref ptp_time_t t);
    phy_rx_dv = v; phy_rx_er = er; phy_rxd = n; rx_ce = 1; t = time_i;
    @(posedge clk); rx_prev = {v, er, n}; #1 rx_ce = 0;
    repeat ($urandom_range(0, 1)) @(posedge clk);
    #1;
  endtask
  task automatic tx_nib(input logic [3:0] n, input logic v, input logic er, ref ptp_time_t t);
    mac_tx_en = v; mac_tx_er = er; mac_txd = n; tx_ce = 1; t = time_i;
    @(posedge clk); tx_prev = {v, er, n}; #1 tx_ce = 0;
    repeat ($urandom_range(0, 2)) @(posedge clk);
    #1;
  endtask

  task automatic rx_frame(input bytes_t b, input bit ev, input int mt, input int sq);
    ptp_time_t t, sfd;
    for (int i = 0; i < 15; i++) rx_nib(4'h5, 1, 0, t);
    rx_nib(4'hD, 1, 0, sfd);
    foreach (b[i]) begin
      rx_nib(b[i][3:0], 1, ($urandom_range(0, 200) == 0), t);
      rx_nib(b[i][7:4], 1, 0, t);
    end
    repeat (24) rx_nib(4'h0, 0, 0, t);
    if (ev) rx_exp.push_back('{ts: sfd, msg_type: 4'(mt), seq_id: 16'(sq)});
  endtask
  task automatic tx_frame(input bytes_t b, input bit ev, input int mt, input int sq);
    ptp_time_t t, sfd;
    for (int i = 0; i < 15; i++) tx_nib(4'h5, 1, 0, t);
    tx_nib(4'hD, 1, 0, sfd);
    foreach (b[i]) begin
      tx_nib(b[i][3:0], 1, 0, t);
      tx_nib(b[i][7:4], 1, 0, t);
    end
    repeat (24) tx_nib(4'h0, 0, 0, t);
    if (ev) tx_exp.push_back('{ts: sfd, msg_type: 4'(mt), seq_id: 16'(sq)});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      begin
        rx_frame(l2_ptp(0, 10), 1, 0, 10);           // Sync in: T2
        rx_frame(other(30), 0, 0, 0);
        rx_frame(udp_ptp(9, 11), 0, 9, 11);          // Delay_Resp: no capture
        for (int i = 0; i < 15; i++) begin
          int sq = $urandom_range(0, 65535);
          rx_frame(udp_ptp(0, sq), 1, 0, sq);
        end
      end
      begin
        tx_frame(other(10), 0, 0, 0);
        tx_frame(l2_ptp(1, 20), 1, 1, 20);           // Delay_Req out: T3
        for (int i = 0; i < 15; i++) begin
          int sq = $urandom_range(0, 65535);
          tx_frame(l2_ptp(1, sq), 1, 1, sq);
        end
      end
    join
    repeat (4) @(posedge clk);
    checks++;
    if (rx_got.size() != rx_exp.size() || tx_got.size() != tx_exp.size()) begin
      failures++;
      $display("FAIL report counts rx %0d/%0d tx %0d/%0d", rx_got.size(), rx_exp.size(),
               tx_got.size(), tx_exp.size());
    end else begin
      foreach (rx_exp[i]) begin
        checks++;
        if (rx_got[i] != rx_exp[i]) begin failures++; $display("FAIL rx report %0d", i); end
      end
      foreach (tx_exp[i]) begin
        checks++;
        if (tx_got[i] != tx_exp[i]) begin failures++; $display("FAIL tx report %0d", i); end
      end
    end
    checks++;
    if (rx_frames != 18 || tx_frames != 17 || rx_ptp != 16 || tx_ptp != 16) begin
      failures++; $display("FAIL counters %0d %0d %0d %0d", rx_frames, tx_frames, rx_ptp, tx_ptp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
