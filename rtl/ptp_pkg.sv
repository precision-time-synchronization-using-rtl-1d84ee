// ptp_pkg: types and constants shared by the IEEE 1588 timing logic.
//
// Local time is a 64-bit count of ticks of the nominal oscillator period
// (44 MHz, 22.73 ns per tick).  Timestamps captured on the MII are stored as
// ts_entry_t records.  The PTP message-type codes and the Ethernet/UDP
// constants follow IEEE 1588-2008; the document names the four messages
// (Sync, Follow_Up, Delay_Req, Delay_Resp), the numeric codes are the
// standard's.
package ptp_pkg;

  localparam int unsigned TIME_W = 64;     // clock counter width p
  typedef logic [TIME_W-1:0] ptp_time_t;

  // IEEE 1588-2008 messageType codes (low nibble of the first PTP byte)
  typedef enum logic [3:0] {
    MSG_SYNC        = 4'h0,
    MSG_DELAY_REQ   = 4'h1,
    MSG_PDELAY_REQ  = 4'h2,
    MSG_PDELAY_RESP = 4'h3,
    MSG_FOLLOW_UP   = 4'h8,
    MSG_DELAY_RESP  = 4'h9
  } ptp_msg_e;

  localparam logic [15:0] ETHERTYPE_PTP  = 16'h88F7;
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'd17;
  localparam logic [15:0] UDP_PORT_EVENT = 16'd319;

  // One captured timestamp of a PTP event frame
  typedef struct packed {
    ptp_time_t   ts;        // local time at the start-of-frame delimiter
    logic [3:0]  msg_type;  // PTP messageType
    logic [15:0] seq_id;    // PTP sequenceId
  } ts_entry_t;

  // Event messages carry a timestamp that must be taken in hardware
  function automatic logic is_event_msg(input logic [3:0] t);
    return t inside {MSG_SYNC, MSG_DELAY_REQ, MSG_PDELAY_REQ, MSG_PDELAY_RESP};
  endfunction

  // Fixed-point formats of the skew estimation (see kalman_skew)
  localparam int unsigned SKEW_W = 48;   // skew, ticks per sync interval
  localparam int unsigned SKEW_F = 8;    // its fraction bits
  localparam int unsigned VAR_W  = 32;   // Kalman P, Q, R
  localparam int unsigned GAIN_F = 16;   // Kalman gain fraction bits
  localparam int unsigned ADDEND_W = 32; // FCRTC addend width r

  // Host-programmed configuration (held in host_regs)
  typedef struct packed {
    logic                fixed_gain;   // Kalman filter uses k_fix
    logic                trig_en;      // ADC clock / trigger output on
    logic                pps_en;       // pulse-per-second output on
    ptp_time_t           set_time;     // value for a time set command
    ptp_time_t           t1, t2, t3, t4;
    logic [VAR_W-1:0]    kf_q, kf_r, kf_p0;
    logic [GAIN_F:0]     kf_kfix;
    ptp_time_t           trig_start;
    logic [31:0]         trig_half;    // ticks per half period
    logic [31:0]         pps_half;
    logic [ADDEND_W-1:0] addend;       // value for an addend write
  } ptp_cfg_t;

  // One-cycle commands from the host
  typedef struct packed {
    logic start;       // run the management unit on t1..t4
    logic set_time;    // load set_time into the clock
    logic addend_we;   // load addend into the FCRTC
    logic rx_pop;      // drop the head of the receive timestamp queue
    logic tx_pop;      // drop the head of the transmit timestamp queue
    logic adc_pop;     // drop the head word of the sample queue
    logic clr_ovf;     // clear the sticky overflow flags
  } ptp_cmd_t;

  // Status seen by the host
  typedef struct packed {
    ptp_time_t                  now;
    logic signed [TIME_W-1:0]   offset, delay;
    logic signed [SKEW_W-1:0]   skew, meas;
    logic [GAIN_F:0]            gain;
    logic [VAR_W-1:0]           kf_var;
    logic [ADDEND_W-1:0]        addend;
    logic                       busy, locked;
    logic [15:0]                relocks;
    ts_entry_t                  rx_head, tx_head;
    logic                       rx_avail, tx_avail, rx_ovf, tx_ovf;
    logic [31:0]                rx_frames, tx_frames, rx_ptp, tx_ptp;
    logic [31:0]                trig_edges, pps_edges;
    logic [31:0]                adc_word;
    logic                       adc_avail, adc_ovf;
    logic [15:0]                adc_count, adc_missed, adc_packets;
  } ptp_status_t;

  // Register map of host_regs (32-bit word addresses)
  typedef enum logic [7:0] {
    R_ID        = 8'h00, R_CTRL      = 8'h01, R_STATUS    = 8'h02, R_CMD       = 8'h03,
    R_TIME_LO   = 8'h04, R_TIME_HI   = 8'h05, R_SET_LO    = 8'h06, R_SET_HI    = 8'h07,
    R_T1_LO     = 8'h08, R_T1_HI     = 8'h09, R_T2_LO     = 8'h0A, R_T2_HI     = 8'h0B,
    R_T3_LO     = 8'h0C, R_T3_HI     = 8'h0D, R_T4_LO     = 8'h0E, R_T4_HI     = 8'h0F,
    R_OFS_LO    = 8'h10, R_OFS_HI    = 8'h11, R_DLY_LO    = 8'h12, R_DLY_HI    = 8'h13,
    R_SKEW_LO   = 8'h14, R_SKEW_HI   = 8'h15, R_ADDEND    = 8'h16, R_KF_Q      = 8'h17,
    R_KF_R      = 8'h18, R_KF_P0     = 8'h19, R_KF_KFIX   = 8'h1A, R_KF_GAIN   = 8'h1B,
    R_KF_VAR    = 8'h1C, R_MEAS_LO   = 8'h1D,
    R_RX_TS_LO  = 8'h20, R_RX_TS_HI  = 8'h21, R_RX_INFO   = 8'h22,
    R_TX_TS_LO  = 8'h24, R_TX_TS_HI  = 8'h25, R_TX_INFO   = 8'h26,
    R_TRIG_LO   = 8'h28, R_TRIG_HI   = 8'h29, R_TRIG_HALF = 8'h2A, R_PPS_HALF  = 8'h2B,
    R_ADC_WORD  = 8'h30, R_ADC_COUNT = 8'h31, R_RELOCKS   = 8'h32, R_RX_FRAMES = 8'h33,
    R_TX_FRAMES = 8'h34, R_RX_PTP    = 8'h35, R_TX_PTP    = 8'h36, R_TRIG_EDGES = 8'h37,
    R_PPS_EDGES = 8'h38, R_ADC_MISSED = 8'h39, R_ADC_PKTS = 8'h3A
  } reg_addr_e;

  // CMD register bits
  localparam int unsigned CMD_START = 0, CMD_SET_TIME = 1, CMD_RX_POP = 2, CMD_TX_POP = 3,
                          CMD_CLR_OVF = 4, CMD_ADC_POP = 5;

  localparam logic [31:0] DEVICE_ID = 32'h1588_0001;

endpackage
