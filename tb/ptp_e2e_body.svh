// ptp_e2e_body.svh: body shared by the end-to-end testbenches of
// ptp_node_top.  The including module declares, before the include,
//   localparam longint F_OSC  : oscillator frequency the nodes are built for
//   localparam int     NSYNC  : number of sync exchanges to run
//   localparam int     JUMP_AT: exchange before which the slave's time is jumped
//   localparam int     FIX_AT : exchange from which the fixed gain is used
//   localparam int     INTERVAL : cycles between Sync messages (F_OSC * 1 s)
// and instantiates the two nodes, u_m (grandmaster) and u_s (slave), with
// the port names used below.
//
// Test flow.  Both nodes share the simulation clock; the grandmaster's FCRTC
// is given a fixed addend of MASTER_PPM parts per million, so its time runs
// fast against the slave's nominal oscillator, as a different crystal would.
// The two MIIs are joined by a symmetric network model (a nibble delay line
// per direction).  The testbench plays the MACs and the protocol software of
// both CPUs: each interval the master sends Sync and Follow_Up, the slave
// sends Delay_Req, the master answers with Delay_Resp; the software reads T1
// and T4 from the master's timestamp queues, T2 and T3 from the slave's,
// hands all four to the slave's management unit and starts it.
//
// Checked independently of the design: the true time error between the two
// nodes (read straight from their clocks), the convergence of the slave's
// addend to the grandmaster's, the path delay, the PPS edges of both nodes,
// the timestamp queue contents, the overflow of a queue, the restart after a
// time jump, the fixed-gain mode and the ADC sample packets.  The exchange
// and the servo follow the document; the network model, the master's fixed
// drift and the test schedule are this testbench's own.
  import ptp_pkg::*;
  import mii_tb_pkg::*;

  localparam int MASTER_PPM = 500;
  // Residual drift allowed once locked.  The filter removes the skew
  // geometrically, so what is left after a given number of exchanges is a
  // fraction of the skew per interval (22 ticks in the 44 kHz copy, 22,000 at
  // 44 MHz): 12 ticks plus 1/256 of the initial skew per interval.
  localparam longint LOCK_TOL = 12 + (F_OSC * MASTER_PPM / 1000000) / 256;
  localparam int NET_NIBBLES = 12;         // one-way network delay in nibbles

  logic clk = 0, rst_n = 0, ce = 0;
  always #5 clk = !clk;
  always @(posedge clk) ce <= !ce;        // MII nibble every second cycle
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // ---- master node pins
  logic m_tx_en = 0, m_tx_er = 0;  logic [3:0] m_txd = '0;
  logic m_phy_tx_en, m_phy_tx_er;  logic [3:0] m_phy_txd;
  logic m_phy_rx_dv, m_phy_rx_er;  logic [3:0] m_phy_rxd;
  logic m_mac_rx_dv, m_mac_rx_er;  logic [3:0] m_mac_rxd;
  logic m_we = 0, m_re = 0;        logic [7:0] m_addr = '0;  logic [31:0] m_wdata = '0, m_rdata;
  logic m_rvalid, m_adc_clk, m_sclk, m_trig, m_pps;
  ptp_time_t m_time;
  // ---- slave node pins
  logic s_tx_en = 0, s_tx_er = 0;  logic [3:0] s_txd = '0;
  logic s_phy_tx_en, s_phy_tx_er;  logic [3:0] s_phy_txd;
  logic s_phy_rx_dv, s_phy_rx_er;  logic [3:0] s_phy_rxd;
  logic s_mac_rx_dv, s_mac_rx_er;  logic [3:0] s_mac_rxd;
  logic s_we = 0, s_re = 0;        logic [7:0] s_addr = '0;  logic [31:0] s_wdata = '0, s_rdata;
  logic s_rvalid, s_adc_clk, s_sclk, s_trig, s_pps;
  ptp_time_t s_time;
  logic s_drdy_n, s_dout;
  int   adc_conv;
  logic [23:0] adc_last;

  // ---- symmetric network: nibble delay lines between the PHY sides
  logic [5:0] m2s[NET_NIBBLES], s2m[NET_NIBBLES];
  initial foreach (m2s[i]) begin m2s[i] = '0; s2m[i] = '0; end
  always @(posedge clk) if (ce) begin
    for (int i = NET_NIBBLES - 1; i > 0; i--) begin m2s[i] <= m2s[i-1]; s2m[i] <= s2m[i-1]; end
    m2s[0] <= {m_phy_tx_en, m_phy_tx_er, m_phy_txd};
    s2m[0] <= {s_phy_tx_en, s_phy_tx_er, s_phy_txd};
  end
  assign {s_phy_rx_dv, s_phy_rx_er, s_phy_rxd} = m2s[NET_NIBBLES-1];
  assign {m_phy_rx_dv, m_phy_rx_er, m_phy_rxd} = s2m[NET_NIBBLES-1];

  // ---- ADC on the slave, clocked by the slave's trigger output
  ads1271_model #(.DECIM(32)) u_ads (.clk_in(s_adc_clk), .sclk(s_sclk), .use_ext(1'b0),
    .sample_i(24'd0), .drdy_n(s_drdy_n), .dout(s_dout), .conv_count(adc_conv), .last_sample(adc_last));
  assign m_drdy_n = 1'b1;

  // ---- frames seen by each MAC (pass-through)
  int s_mac_frames = 0, m_mac_frames = 0;
  logic s_dv_q = 0, m_dv_q = 0;
  always @(posedge clk) begin
    s_dv_q <= s_mac_rx_dv; m_dv_q <= m_mac_rx_dv;
    if (rst_n && s_mac_rx_dv && !s_dv_q) s_mac_frames++;
    if (rst_n && m_mac_rx_dv && !m_dv_q) m_mac_frames++;
  end

  // ---- PPS edges of both nodes
  longint unsigned m_pps_at[$], s_pps_at[$];
  logic m_pps_q = 0, s_pps_q = 0;
  always @(posedge clk) begin
    m_pps_q <= m_pps; s_pps_q <= s_pps;
    if (m_pps && !m_pps_q) m_pps_at.push_back(cyc);
    if (s_pps && !s_pps_q) s_pps_at.push_back(cyc);
  end

  // ---- host bus tasks
  task automatic mw(input logic [7:0] a, input logic [31:0] d);
    @(posedge clk); #1 m_we = 1; m_addr = a; m_wdata = d;
    @(posedge clk); #1 m_we = 0;
  endtask
  task automatic sw(input logic [7:0] a, input logic [31:0] d);
    @(posedge clk); #1 s_we = 1; s_addr = a; s_wdata = d;
    @(posedge clk); #1 s_we = 0;
  endtask
  task automatic mr(input logic [7:0] a, output logic [31:0] d);
    @(posedge clk); #1 m_re = 1; m_addr = a;
    @(posedge clk); #1 m_re = 0; d = m_rdata;
  endtask
  task automatic sr(input logic [7:0] a, output logic [31:0] d);
    @(posedge clk); #1 s_re = 1; s_addr = a;
    @(posedge clk); #1 s_re = 0; d = s_rdata;
  endtask

  // ---- MAC transmit
  task automatic mac_send(input bit master, input bytes_t b);
    logic [3:0] n[$];
    for (int i = 0; i < 15; i++) n.push_back(4'h5);
    n.push_back(4'hD);
    foreach (b[i]) begin n.push_back(b[i][3:0]); n.push_back(b[i][7:4]); end
    foreach (n[i]) begin
      @(posedge clk iff ce == 1'b0); #1;        // change data between nibble enables
      if (master) begin m_tx_en = 1; m_txd = n[i]; end
      else        begin s_tx_en = 1; s_txd = n[i]; end
    end
    @(posedge clk iff ce == 1'b0); #1;
    if (master) begin m_tx_en = 0; m_txd = '0; end
    else        begin s_tx_en = 0; s_txd = '0; end
    repeat (2 * (NET_NIBBLES + 30)) @(posedge clk);  // let it cross the network
  endtask

  // ---- timestamp queue reads
  task automatic pop_ts(input bit master, input bit rx, output ptp_time_t t,
                        output int mt, output int seq, output bit ok);
    logic [31:0] lo, hi, info;
    logic [7:0] base;
    base = rx ? R_RX_TS_LO : R_TX_TS_LO;
    if (master) begin mr(base, lo); mr(base + 1, hi); mr(base + 2, info); end
    else        begin sr(base, lo); sr(base + 1, hi); sr(base + 2, info); end
    ok = info[31]; mt = int'(info[19:16]); seq = int'(info[15:0]); t = {hi, lo};
    if (master) mw(R_CMD, 32'(1) << (rx ? CMD_RX_POP : CMD_TX_POP));
    else        sw(R_CMD, 32'(1) << (rx ? CMD_RX_POP : CMD_TX_POP));
  endtask

  // ---- mechanism counters
  int n_exchanges = 0, n_filter_updates = 0, n_relock = 0, n_fixed = 0, n_ovf = 0;
  int n_general = 0, n_nonptp = 0, n_packets = 0, n_samples = 0;

  function automatic longint signed abs64(input longint signed v);
    return v < 0 ? -v : v;
  endfunction

  task automatic exchange(input int seq);
    ptp_time_t t1, t2, t3, t4;
    int mt, sq;
    bit ok;
    logic [31:0] d, st;
    // Sync: T1 at the master, T2 at the slave
    mac_send(1, l2_ptp(MSG_SYNC, seq));
    pop_ts(1, 0, t1, mt, sq, ok);
    check(ok && mt == MSG_SYNC && sq == seq, "master transmit timestamp of Sync");
    pop_ts(0, 1, t2, mt, sq, ok);
    check(ok && mt == MSG_SYNC && sq == seq, "slave receive timestamp of Sync");
    mac_send(1, udp_ptp(MSG_FOLLOW_UP, seq, 320)); n_general++;   // carries T1
    // Delay_Req: T3 at the slave, T4 at the master
    mac_send(0, udp_ptp(MSG_DELAY_REQ, seq));
    pop_ts(0, 0, t3, mt, sq, ok);
    check(ok && mt == MSG_DELAY_REQ && sq == seq, "slave transmit timestamp of Delay_Req");
    pop_ts(1, 1, t4, mt, sq, ok);
    check(ok && mt == MSG_DELAY_REQ && sq == seq, "master receive timestamp of Delay_Req");
    mac_send(1, udp_ptp(MSG_DELAY_RESP, seq, 320)); n_general++;  // carries T4
    // general messages must not have been queued
    mr(R_STATUS, st);
    check(st[3:2] == 2'b00, "master queues empty after the exchange");
    sr(R_STATUS, st);
    check(st[3:2] == 2'b00, "slave queues empty after the exchange");
    // slave software hands T1..T4 to the management unit
    sw(R_T1_LO, t1[31:0]); sw(R_T1_HI, t1[63:32]);
    sw(R_T2_LO, t2[31:0]); sw(R_T2_HI, t2[63:32]);
    sw(R_T3_LO, t3[31:0]); sw(R_T3_HI, t3[63:32]);
    sw(R_T4_LO, t4[31:0]); sw(R_T4_HI, t4[63:32]);
    sw(R_CMD, 32'(1) << CMD_START);
    do sr(R_STATUS, st); while (st[0]);
    n_exchanges++;
  endtask

  logic [31:0] rd_v;
  longint signed ofs, dly, err;
  longint signed last_dly;
  logic [31:0] relocks_before;
  int seq;

  initial begin
    last_dly = -1;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    mw(R_ADDEND, 32'(longint'(MASTER_PPM) * 64'sd4294967296 / 1000000));   // master crystal fast
    sw(R_CTRL, 32'b100);                                               // PPS on, computed gain
    // timestamp queue overflow: five Syncs with nobody reading (depth 4)
    for (int i = 0; i < 5; i++) mac_send(1, l2_ptp(MSG_SYNC, 1000 + i));
    mac_send(1, other(50)); n_nonptp++;
    mr(R_STATUS, rd_v);
    check(rd_v[5] && rd_v[3], "master transmit queue overflowed");
    sr(R_STATUS, rd_v);
    check(rd_v[4] && rd_v[2], "slave receive queue overflowed");
    if (rd_v[4]) n_ovf++;
    sw(R_CMD, 32'(1) << CMD_CLR_OVF);
    mw(R_CMD, 32'(1) << CMD_CLR_OVF);
    for (int i = 0; i < 4; i++) begin
      ptp_time_t t; int mt, sq; bit ok;
      pop_ts(1, 0, t, mt, sq, ok);
      check(ok && sq == 1000 + i, "master queue order");
      pop_ts(0, 1, t, mt, sq, ok);
      check(ok && sq == 1000 + i, "slave queue order");
    end
    sr(R_STATUS, rd_v);
    check(rd_v[4] == 1'b0 && rd_v[2] == 1'b0, "slave queue drained and flag cleared");
    // sync exchanges, one per interval
    seq = 0;
    for (int k = 0; k < NSYNC; k++) begin
      wait (cyc >= longint'(k + 1) * INTERVAL);
      if (k == FIX_AT) begin
        sw(R_CTRL, 32'b101);                                           // fixed gain mode
        n_fixed = NSYNC - FIX_AT;
      end
      if (k == JUMP_AT) begin
        // time jump on the slave: the next exchange must restart
        sr(R_TIME_LO, rd_v);
        sw(R_SET_LO, rd_v + 32'd3_000_000);
        sr(R_TIME_HI, rd_v);
        sw(R_SET_HI, rd_v);
        sw(R_CMD, 32'(1) << CMD_SET_TIME);
      end
      sr(R_RELOCKS, relocks_before);
      exchange(seq++);
      sr(R_OFS_LO, rd_v); ofs = longint'($signed(rd_v));
      sr(R_DLY_LO, rd_v); dly = longint'($signed(rd_v));
      err = longint'(m_time - s_time);
      sr(R_RELOCKS, rd_v);
      if (rd_v != relocks_before) n_relock++;
      else n_filter_updates++;
      sr(R_ADDEND, rd_v);
      $display("exchange %0d: offset %0d delay %0d true error now %0d addend %0d", k, ofs, dly, err, $signed(rd_v));
      if (last_dly >= 0) check(abs64(dly - last_dly) <= 2, "path delay steady");
      last_dly = dly;
      if (k >= 6 && k != JUMP_AT) begin
        check(abs64(ofs) <= LOCK_TOL, "measured offset small once locked");
        check(abs64(err) <= 3, "true time error small once locked");
      end
    end
    check(n_relock == 2, "exactly two restarts: first exchange and time jump");
    // the slave's addend must have converged to the grandmaster's
    sr(R_ADDEND, rd_v);
    begin
      longint signed ma, sa;
      ma = longint'(MASTER_PPM) * 64'sd4294967296 / 1000000;
      sa = longint'($signed(rd_v));
      $display("grandmaster addend %0d, slave addend %0d", ma, sa);
      check(abs64(sa - ma) <= ma / 5, "slave frequency compensation converged");
    end
    // PPS of the two nodes (edges of the last seconds)
    begin
      int nm, ns;
      nm = m_pps_at.size();
      ns = s_pps_at.size();
      check(nm >= 3 && ns >= 3, "PPS edges produced");
      $display("PPS edges: master %0d slave %0d", nm, ns);
      if (nm >= 2 && ns >= 2) begin
        longint signed dp;
        dp = longint'(m_pps_at[nm-1]) - longint'(s_pps_at[ns-1]);
        $display("last PPS edges: master cycle %0d slave cycle %0d", m_pps_at[nm-1], s_pps_at[ns-1]);
        check(abs64(dp) <= 4 + LOCK_TOL - 12, "PPS edges of the two nodes aligned");
      end
    end
    // frames reached the MACs through the taps
    check(s_mac_frames == 5 + 1 + 3 * NSYNC && m_mac_frames == NSYNC, "all frames passed through");
    $display("frames at the MACs: slave %0d master %0d", s_mac_frames, m_mac_frames);
    // ADC sampling on the slave, triggered from synchronised time
    sr(R_TIME_LO, rd_v);
    sw(R_TRIG_LO, rd_v + 32'd100);
    sr(R_TIME_HI, rd_v);
    sw(R_TRIG_HI, rd_v);
    sw(R_TRIG_HALF, 32'd2);
    sw(R_CTRL, 32'b110);
    repeat (8 * 32 * 4 * 2 + 400) @(posedge clk);                 // two packets of 8
    sw(R_CTRL, 32'b100);
    repeat (200) @(posedge clk);
    begin
      logic [31:0] cnt, w;
      ptp_time_t prev_ts;
      prev_ts = '0;
      sr(R_ADC_COUNT, cnt);
      check(cnt >= 22, "ADC packets queued");
      while (cnt >= 11) begin
        logic [31:0] lo, hi;
        sr(R_ADC_WORD, w); sw(R_CMD, 32'(1) << CMD_ADC_POP);
        check(w[31:24] == 8'hA5 && w[23:16] == 8'd8 && w[15:0] == 16'(n_packets), "packet header");
        sr(R_ADC_WORD, lo); sw(R_CMD, 32'(1) << CMD_ADC_POP);
        sr(R_ADC_WORD, hi); sw(R_CMD, 32'(1) << CMD_ADC_POP);
        if (n_packets > 0)
          check({hi, lo} - prev_ts >= 8 * 32 * 4 - 4 && {hi, lo} - prev_ts <= 8 * 32 * 4 + 4,
                "packet times one packet period apart");
        prev_ts = {hi, lo};
        for (int i = 0; i < 8; i++) begin
          int c;
          c = n_packets * 8 + i;         // conversion number
          sr(R_ADC_WORD, w); sw(R_CMD, 32'(1) << CMD_ADC_POP);
          check(w == 32'($signed(24'(c * 24'h01_2345 + 24'h80_0001))), "sample value");
          if (w != 32'($signed(24'(c * 24'h01_2345 + 24'h80_0001)))) $display("sample %h conv %0d", w, c);
          n_samples++;
        end
        n_packets++;
        sr(R_ADC_COUNT, cnt);
      end
    end
    // every mechanism happened
    check(n_exchanges == NSYNC, "exchanges");
    check(n_filter_updates > 0, "Kalman filter updates");
    check(n_relock > 0, "restarts");
    check(n_fixed > 0, "fixed-gain mode");
    check(n_ovf > 0, "queue overflow");
    check(n_general > 0 && n_nonptp > 0, "general and non-PTP frames");
    check(n_packets >= 2 && n_samples >= 16, "ADC packets");
    $display("mechanisms: exchanges %0d filter updates %0d restarts %0d fixed-gain %0d overflows %0d general %0d other %0d packets %0d samples %0d",
             n_exchanges, n_filter_updates, n_relock, n_fixed, n_ovf, n_general, n_nonptp, n_packets, n_samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (longint'(NSYNC + 3) * INTERVAL + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
