// ptp_node_top: IEEE 1588 synchronised acoustic measurement node.
//
// Two FPGA functions side by side on one local clock, the 44 MHz crystal:
//  * the timing FPGA, inserted between the Ethernet MAC's MII and the PHY.
//    mii_tap passes every frame unchanged and timestamps PTP event frames
//    with the FCRTC time; tsu queues those timestamps for the host; the host
//    software (one CPU core) runs the protocol, collects T1..T4 and starts
//    mgmt_unit, which steps the FCRTC by the measured offset, estimates the
//    skew with a Kalman filter and writes the FCRTC addend.  Two trigger_gen
//    instances derive the ADC clock / sampling trigger and the PPS output
//    from the disciplined time.
//  * the sampling FPGA: adc_capture reads the ADS1271 converter that the
//    trigger clock drives and sample_packer packs timestamped samples for
//    upload.
// The host reaches everything through host_regs (bus_* ports).  The PHY,
// the MAC (inside the CPU), the CPU and the ADC are outside this module;
// their pins are the ports.  Timing: everything runs on clk; rx_ce/tx_ce
// mark the MII receive/transmit clock edges.
//
// The partitioning and the data flow are the document's; the single clock
// domain and the register interface are this design's choices.
module ptp_node_top
  import ptp_pkg::*;
#(
  parameter longint unsigned F_OSC_HZ        = 44_000_000,  // crystal frequency
  parameter int unsigned     SYNC_INTERVAL_S = 1,           // sync interval
  parameter int unsigned     TSU_DEPTH       = 4,
  parameter int unsigned     PKT_SAMPLES     = 8,
  parameter int unsigned     PKT_FIFO_DEPTH  = 64,
  parameter int unsigned     SCLK_DIV        = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // MII, PHY side
  input  logic        rx_ce,
  input  logic        phy_rx_dv,
  input  logic        phy_rx_er,
  input  logic [3:0]  phy_rxd,
  input  logic        tx_ce,
  output logic        phy_tx_en,
  output logic        phy_tx_er,
  output logic [3:0]  phy_txd,
  // MII, MAC side
  output logic        mac_rx_dv,
  output logic        mac_rx_er,
  output logic [3:0]  mac_rxd,
  input  logic        mac_tx_en,
  input  logic        mac_tx_er,
  input  logic [3:0]  mac_txd,
  // host register bus
  input  logic        bus_we,
  input  logic        bus_re,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  // ADS1271
  output logic        adc_clk,
  output logic        adc_sclk,
  input  logic        adc_drdy_n,
  input  logic        adc_dout,
  // timing outputs
  output logic        trig_pulse,
  output logic        pps,
  output ptp_time_t   local_time
);

  ptp_cfg_t    cfg;
  ptp_cmd_t    cmd;
  ptp_status_t st;

  // clock
  logic                       m_step_en, m_addend_we;
  logic signed [TIME_W-1:0]   m_step;
  logic signed [ADDEND_W-1:0] m_addend, addend_now;

  fcrtc #(.P_W(TIME_W), .Q_W(32), .R_W(ADDEND_W)) u_fcrtc (
    .clk, .rst_n,
    .addend_we(m_addend_we || cmd.addend_we),
    .addend_i(m_addend_we ? m_addend : $signed(cfg.addend)),
    .step_en(m_step_en), .step_i(m_step),
    .set_en(cmd.set_time), .set_i(cfg.set_time),
    .time_o(local_time), .addend_o(addend_now)
  );

  // MII tap and time stamp unit
  logic      rx_evt_v, tx_evt_v;
  ts_entry_t rx_evt, tx_evt;
  logic [$clog2(TSU_DEPTH+1)-1:0] rx_cnt, tx_cnt;

  mii_tap u_tap (
    .clk, .rst_n, .time_i(local_time),
    .rx_ce, .phy_rx_dv, .phy_rx_er, .phy_rxd, .mac_rx_dv, .mac_rx_er, .mac_rxd,
    .tx_ce, .mac_tx_en, .mac_tx_er, .mac_txd, .phy_tx_en, .phy_tx_er, .phy_txd,
    .rx_evt_valid(rx_evt_v), .rx_evt, .tx_evt_valid(tx_evt_v), .tx_evt,
    .rx_frames(st.rx_frames), .tx_frames(st.tx_frames), .rx_ptp(st.rx_ptp), .tx_ptp(st.tx_ptp)
  );

  tsu #(.DEPTH(TSU_DEPTH)) u_tsu (
    .clk, .rst_n, .rx_valid(rx_evt_v), .rx_entry(rx_evt), .tx_valid(tx_evt_v), .tx_entry(tx_evt),
    .rx_pop(cmd.rx_pop), .tx_pop(cmd.tx_pop), .clr_ovf(cmd.clr_ovf),
    .rx_head(st.rx_head), .tx_head(st.tx_head), .rx_avail(st.rx_avail), .tx_avail(st.tx_avail),
    .rx_count(rx_cnt), .tx_count(tx_cnt), .rx_ovf(st.rx_ovf), .tx_ovf(st.tx_ovf)
  );

  // management unit
  mgmt_unit #(.F_OSC_HZ(F_OSC_HZ), .SYNC_INTERVAL_S(SYNC_INTERVAL_S), .P_W(TIME_W),
              .R_W(ADDEND_W), .Q_W(32), .SW(SKEW_W), .SF(SKEW_F), .PW(VAR_W), .KW(GAIN_F)) u_mgmt (
    .clk, .rst_n, .start(cmd.start), .t1(cfg.t1), .t2(cfg.t2), .t3(cfg.t3), .t4(cfg.t4),
    .q_i(cfg.kf_q), .r_i(cfg.kf_r), .p_init_i(cfg.kf_p0), .fixed_gain(cfg.fixed_gain),
    .k_fix_i(cfg.kf_kfix),
    .step_en(m_step_en), .step_o(m_step), .addend_we(m_addend_we), .addend_o(m_addend),
    .offset_o(st.offset), .delay_o(st.delay), .skew_o(st.skew), .meas_o(st.meas),
    .gain_o(st.gain), .var_o(st.kf_var), .locked_o(st.locked), .relocks_o(st.relocks),
    .busy_o(st.busy), .done_o()
  );

  // ADC clock / trigger and PPS
  logic [31:0] trig_resync, pps_resync;
  logic        pps_pulse;

  trigger_gen u_trig (
    .clk, .rst_n, .enable_i(cfg.trig_en), .time_i(local_time), .start_i(cfg.trig_start),
    .half_i(cfg.trig_half), .out_o(adc_clk), .pulse_o(trig_pulse),
    .edges_o(st.trig_edges), .resync_o(trig_resync)
  );

  trigger_gen u_pps (
    .clk, .rst_n, .enable_i(cfg.pps_en), .time_i(local_time), .start_i('0),
    .half_i(cfg.pps_half), .out_o(pps), .pulse_o(pps_pulse),
    .edges_o(st.pps_edges), .resync_o(pps_resync)
  );

  // sampling FPGA
  logic            s_valid;
  logic [23:0]     s_data;
  ptp_time_t       s_ts;
  logic [$clog2(PKT_FIFO_DEPTH+1)-1:0] pk_count;

  adc_capture #(.SCLK_DIV(SCLK_DIV), .BITS(24)) u_adc (
    .clk, .rst_n, .time_i(local_time), .drdy_n(adc_drdy_n), .dout(adc_dout), .sclk(adc_sclk),
    .sample_valid_o(s_valid), .sample_o(s_data), .sample_ts_o(s_ts), .missed_o(st.adc_missed)
  );

  sample_packer #(.N(PKT_SAMPLES), .BITS(24), .DEPTH(PKT_FIFO_DEPTH)) u_pack (
    .clk, .rst_n, .sample_valid_i(s_valid), .sample_i(s_data), .sample_ts_i(s_ts),
    .pop_i(cmd.adc_pop), .clr_ovf(cmd.clr_ovf), .word_o(st.adc_word), .avail_o(st.adc_avail),
    .count_o(pk_count), .overflow_o(st.adc_ovf), .packets_o(st.adc_packets)
  );

  assign st.now       = local_time;
  assign st.addend    = addend_now;
  assign st.adc_count = 16'(pk_count);

  host_regs #(.F_OSC_HZ(F_OSC_HZ)) u_regs (
    .clk, .rst_n, .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .cfg_o(cfg), .cmd_o(cmd), .st_i(st)
  );

endmodule
