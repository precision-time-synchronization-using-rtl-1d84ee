// host_regs: register file through which the host CPU runs the timing logic.
//
// A simple synchronous 32-bit register bus (the CPU reaches the FPGA over
// PCI): a write takes bus_we with bus_addr/bus_wdata in one cycle; a read
// takes bus_re and returns bus_rdata with bus_rvalid one cycle later.  The
// map is the reg_addr_e enumeration of ptp_pkg.  Writable registers form the
// configuration (cfg_o); writes to CMD and ADDEND produce one-cycle commands
// (cmd_o); everything else reads the status inputs.  Reading TIME_LO copies
// the high half of the clock into a shadow register that TIME_HI returns, so
// a 64-bit time read is consistent.
//
// The document has the protocol software on one core of the host CPU and
// the timestamping, clock and filter in the FPGA; the register map, the bus
// handshake and the reset values are this design's choices.  Reset values:
// Kalman Q = 16, R = 4096, P0 = 65536 (steady gain about 1/16), fixed gain
// 4096/65536, PPS half period of half a second, ADC clock half period of
// two ticks (11 MHz), PPS on, trigger off.
module host_regs
  import ptp_pkg::*;
#(
  parameter longint unsigned F_OSC_HZ      = 44_000_000,
  parameter logic [31:0]     TRIG_HALF_RST = 32'd2,
  parameter logic [31:0]     KF_Q_RST      = 32'd16,
  parameter logic [31:0]     KF_R_RST      = 32'd4096,
  parameter logic [31:0]     KF_P0_RST     = 32'd65536,
  parameter logic [16:0]     KF_KFIX_RST   = 17'd4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_we,
  input  logic        bus_re,
  input  logic [7:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  output ptp_cfg_t    cfg_o,
  output ptp_cmd_t    cmd_o,
  input  ptp_status_t st_i
);

  localparam logic [31:0] PPS_HALF_RST = 32'(F_OSC_HZ / 2);

  logic [31:0] time_hi_shadow;
  logic [31:0] rd;

  // writes and commands
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_o            <= '0;
      cfg_o.pps_en     <= 1'b1;
      cfg_o.kf_q       <= KF_Q_RST;
      cfg_o.kf_r       <= KF_R_RST;
      cfg_o.kf_p0      <= KF_P0_RST;
      cfg_o.kf_kfix    <= KF_KFIX_RST;
      cfg_o.trig_half  <= TRIG_HALF_RST;
      cfg_o.pps_half   <= PPS_HALF_RST;
      cmd_o            <= '0;
    end else begin
      cmd_o <= '0;
      if (bus_we) begin
        unique case (bus_addr)
          R_CTRL:      {cfg_o.pps_en, cfg_o.trig_en, cfg_o.fixed_gain} <= bus_wdata[2:0];
          R_CMD: begin
            cmd_o.start    <= bus_wdata[CMD_START];
            cmd_o.set_time <= bus_wdata[CMD_SET_TIME];
            cmd_o.rx_pop   <= bus_wdata[CMD_RX_POP];
            cmd_o.tx_pop   <= bus_wdata[CMD_TX_POP];
            cmd_o.clr_ovf  <= bus_wdata[CMD_CLR_OVF];
            cmd_o.adc_pop  <= bus_wdata[CMD_ADC_POP];
          end
          R_SET_LO:    cfg_o.set_time[31:0]    <= bus_wdata;
          R_SET_HI:    cfg_o.set_time[63:32]   <= bus_wdata;
          R_T1_LO:     cfg_o.t1[31:0]          <= bus_wdata;
          R_T1_HI:     cfg_o.t1[63:32]         <= bus_wdata;
          R_T2_LO:     cfg_o.t2[31:0]          <= bus_wdata;
          R_T2_HI:     cfg_o.t2[63:32]         <= bus_wdata;
          R_T3_LO:     cfg_o.t3[31:0]          <= bus_wdata;
          R_T3_HI:     cfg_o.t3[63:32]         <= bus_wdata;
          R_T4_LO:     cfg_o.t4[31:0]          <= bus_wdata;
          R_T4_HI:     cfg_o.t4[63:32]         <= bus_wdata;
          R_ADDEND: begin
            cfg_o.addend    <= bus_wdata;
            cmd_o.addend_we <= 1'b1;
          end
          R_KF_Q:      cfg_o.kf_q              <= bus_wdata;
          R_KF_R:      cfg_o.kf_r              <= bus_wdata;
          R_KF_P0:     cfg_o.kf_p0             <= bus_wdata;
          R_KF_KFIX:   cfg_o.kf_kfix           <= bus_wdata[GAIN_F:0];
          R_TRIG_LO:   cfg_o.trig_start[31:0]  <= bus_wdata;
          R_TRIG_HI:   cfg_o.trig_start[63:32] <= bus_wdata;
          R_TRIG_HALF: cfg_o.trig_half         <= bus_wdata;
          R_PPS_HALF:  cfg_o.pps_half          <= bus_wdata;
          default: ;
        endcase
      end
    end
  end

  // read multiplexer
  always_comb begin
    unique case (bus_addr)
      R_ID:         rd = DEVICE_ID;
      R_CTRL:       rd = {29'd0, cfg_o.pps_en, cfg_o.trig_en, cfg_o.fixed_gain};
      R_STATUS:     rd = {24'd0, st_i.adc_ovf, st_i.adc_avail, st_i.tx_ovf, st_i.rx_ovf,
                          st_i.tx_avail, st_i.rx_avail, st_i.locked, st_i.busy};
      R_TIME_LO:    rd = st_i.now[31:0];
      R_TIME_HI:    rd = time_hi_shadow;
      R_SET_LO:     rd = cfg_o.set_time[31:0];
      R_SET_HI:     rd = cfg_o.set_time[63:32];
      R_T1_LO:      rd = cfg_o.t1[31:0];
      R_T1_HI:      rd = cfg_o.t1[63:32];
      R_T2_LO:      rd = cfg_o.t2[31:0];
      R_T2_HI:      rd = cfg_o.t2[63:32];
      R_T3_LO:      rd = cfg_o.t3[31:0];
      R_T3_HI:      rd = cfg_o.t3[63:32];
      R_T4_LO:      rd = cfg_o.t4[31:0];
      R_T4_HI:      rd = cfg_o.t4[63:32];
      R_OFS_LO:     rd = st_i.offset[31:0];
      R_OFS_HI:     rd = st_i.offset[63:32];
      R_DLY_LO:     rd = st_i.delay[31:0];
      R_DLY_HI:     rd = st_i.delay[63:32];
      R_SKEW_LO:    rd = st_i.skew[31:0];
      R_SKEW_HI:    rd = 32'(st_i.skew[SKEW_W-1:32]);
      R_ADDEND:     rd = st_i.addend;
      R_KF_Q:       rd = cfg_o.kf_q;
      R_KF_R:       rd = cfg_o.kf_r;
      R_KF_P0:      rd = cfg_o.kf_p0;
      R_KF_KFIX:    rd = 32'(cfg_o.kf_kfix);
      R_KF_GAIN:    rd = 32'(st_i.gain);
      R_KF_VAR:     rd = st_i.kf_var;
      R_MEAS_LO:    rd = st_i.meas[31:0];
      R_RX_TS_LO:   rd = st_i.rx_head.ts[31:0];
      R_RX_TS_HI:   rd = st_i.rx_head.ts[63:32];
      R_RX_INFO:    rd = {st_i.rx_avail, 11'd0, st_i.rx_head.msg_type, st_i.rx_head.seq_id};
      R_TX_TS_LO:   rd = st_i.tx_head.ts[31:0];
      R_TX_TS_HI:   rd = st_i.tx_head.ts[63:32];
      R_TX_INFO:    rd = {st_i.tx_avail, 11'd0, st_i.tx_head.msg_type, st_i.tx_head.seq_id};
      R_TRIG_LO:    rd = cfg_o.trig_start[31:0];
      R_TRIG_HI:    rd = cfg_o.trig_start[63:32];
      R_TRIG_HALF:  rd = cfg_o.trig_half;
      R_PPS_HALF:   rd = cfg_o.pps_half;
      R_ADC_WORD:   rd = st_i.adc_word;
      R_ADC_COUNT:  rd = 32'(st_i.adc_count);
      R_RELOCKS:    rd = 32'(st_i.relocks);
      R_RX_FRAMES:  rd = st_i.rx_frames;
      R_TX_FRAMES:  rd = st_i.tx_frames;
      R_RX_PTP:     rd = st_i.rx_ptp;
      R_TX_PTP:     rd = st_i.tx_ptp;
      R_TRIG_EDGES: rd = st_i.trig_edges;
      R_PPS_EDGES:  rd = st_i.pps_edges;
      R_ADC_MISSED: rd = 32'(st_i.adc_missed);
      R_ADC_PKTS:   rd = 32'(st_i.adc_packets);
      default:      rd = 32'hDEAD_BEEF;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_rdata      <= '0;
      bus_rvalid     <= 1'b0;
      time_hi_shadow <= '0;
    end else begin
      bus_rvalid <= bus_re;
      if (bus_re) begin
        bus_rdata <= rd;
        if (bus_addr == R_TIME_LO) time_hi_shadow <= st_i.now[63:32];
      end
    end
  end

  a_rw_excl: assert property (@(posedge clk) disable iff (!rst_n) !(bus_we && bus_re));

endmodule
