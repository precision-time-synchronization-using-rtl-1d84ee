// tb_ptp_node_full: end-to-end test of a grandmaster and a slave node with
// every parameter of ptp_node_top at its default: the 44 MHz oscillator and
// a one-second sync interval, so one interval is 44 million cycles.  Eight
// exchanges are run: the first locks, the second updates the filter, the
// third follows a time jump and restarts, the fourth and fifth update with
// the computed gain and the last three with the fixed gain.  About nine
// simulated seconds.  The test itself is
// in ptp_e2e_body.svh.
// The parameters are the document's (44 MHz, 1 s); the test flow is this
// testbench's own.
module tb_ptp_node_full;
  localparam longint F_OSC    = 44_000_000;
  localparam int     NSYNC    = 8;
  localparam int     JUMP_AT  = 2;
  localparam int     FIX_AT   = 5;
  localparam int     INTERVAL = int'(F_OSC);
  logic m_drdy_n;

  ptp_node_top u_m (
    .clk, .rst_n, .rx_ce(ce), .phy_rx_dv(m_phy_rx_dv), .phy_rx_er(m_phy_rx_er), .phy_rxd(m_phy_rxd),
    .tx_ce(ce), .phy_tx_en(m_phy_tx_en), .phy_tx_er(m_phy_tx_er), .phy_txd(m_phy_txd),
    .mac_rx_dv(m_mac_rx_dv), .mac_rx_er(m_mac_rx_er), .mac_rxd(m_mac_rxd),
    .mac_tx_en(m_tx_en), .mac_tx_er(m_tx_er), .mac_txd(m_txd),
    .bus_we(m_we), .bus_re(m_re), .bus_addr(m_addr), .bus_wdata(m_wdata), .bus_rdata(m_rdata),
    .bus_rvalid(m_rvalid), .adc_clk(m_adc_clk), .adc_sclk(m_sclk), .adc_drdy_n(m_drdy_n),
    .adc_dout(1'b0), .trig_pulse(m_trig), .pps(m_pps), .local_time(m_time)
  );

  ptp_node_top u_s (
    .clk, .rst_n, .rx_ce(ce), .phy_rx_dv(s_phy_rx_dv), .phy_rx_er(s_phy_rx_er), .phy_rxd(s_phy_rxd),
    .tx_ce(ce), .phy_tx_en(s_phy_tx_en), .phy_tx_er(s_phy_tx_er), .phy_txd(s_phy_txd),
    .mac_rx_dv(s_mac_rx_dv), .mac_rx_er(s_mac_rx_er), .mac_rxd(s_mac_rxd),
    .mac_tx_en(s_tx_en), .mac_tx_er(s_tx_er), .mac_txd(s_txd),
    .bus_we(s_we), .bus_re(s_re), .bus_addr(s_addr), .bus_wdata(s_wdata), .bus_rdata(s_rdata),
    .bus_rvalid(s_rvalid), .adc_clk(s_adc_clk), .adc_sclk(s_sclk), .adc_drdy_n(s_drdy_n),
    .adc_dout(s_dout), .trig_pulse(s_trig), .pps(s_pps), .local_time(s_time)
  );

  `include "ptp_e2e_body.svh"
endmodule
