// ptp_detector: finds IEEE 1588 event messages in an MII nibble stream.
//
// It watches one direction of an MII (data valid plus 4-bit data, least
// significant nibble of each byte first) without changing it.  When the
// start-of-frame delimiter ends the preamble it samples the local time; this
// is the timestamp point of the frame.  It then assembles bytes and checks
// whether the frame carries a PTP message, either directly over Ethernet
// (EtherType 0x88F7, PTP header at byte 14) or over UDP/IPv4 to the event
// port 319 (IPv4 header without options, PTP header at byte 42).  For the
// event messages (Sync, Delay_Req, Pdelay_Req, Pdelay_Resp) it reports the
// captured time together with messageType and sequenceId.
//
// The document says only that the preamble of every frame is detected and
// that frames carrying timestamps are recognised; the two encapsulations,
// the header offsets and the reported fields come from IEEE 1588-2008.
//
// Timing: nib_ce marks a cycle carrying an MII nibble (the MII clock edge
// in the local clock domain).  time_i is sampled in the cycle of the SFD's
// second nibble.  evt_valid pulses for one cycle after the last sequenceId
// nibble.  frame_o counts frames, ptp_o counts reported event messages.
module ptp_detector
  import ptp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        nib_ce,
  input  logic        dv,
  input  logic [3:0]  d,
  input  ptp_time_t   time_i,
  output logic        sof_o,        // SFD seen
  output logic        evt_valid,
  output ts_entry_t   evt_o,
  output logic [31:0] frame_o,
  output logic [31:0] ptp_o
);

  typedef enum logic [1:0] {D_IDLE, D_PRE, D_DATA, D_SKIP} dstate_e;
  dstate_e state;

  logic        hi_nib;          // next nibble is the high nibble of a byte
  logic [3:0]  lo_nib;
  logic [7:0]  byte_v;
  logic [10:0] idx;             // index of the byte being completed
  logic [15:0] etype;
  logic        is_l2, is_udp_ok;
  logic [10:0] ptp_base;
  logic        ptp_frame;
  ptp_time_t   ts_sfd;
  logic [3:0]  mtype;
  logic [7:0]  seq_hi;

  assign byte_v = {d, lo_nib};

  always_comb begin
    ptp_frame = is_l2 || is_udp_ok;
    ptp_base  = is_l2 ? 11'd14 : 11'd42;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      hi_nib    <= 1'b0;
      lo_nib    <= '0;
      idx       <= '0;
      etype     <= '0;
      is_l2     <= 1'b0;
      is_udp_ok <= 1'b0;
      ts_sfd    <= '0;
      mtype     <= '0;
      seq_hi    <= '0;
      sof_o     <= 1'b0;
      evt_valid <= 1'b0;
      evt_o     <= '0;
      frame_o   <= '0;
      ptp_o     <= '0;
    end else begin
      sof_o     <= 1'b0;
      evt_valid <= 1'b0;
      if (nib_ce) begin
        if (!dv) begin
          state <= D_IDLE;
        end else begin
          unique case (state)
            D_IDLE: state <= (d == 4'h5) ? D_PRE : D_SKIP;
            D_PRE: begin
              if (d == 4'hD) begin            // SFD 0xD5: timestamp point
                state     <= D_DATA;
                ts_sfd    <= time_i;
                sof_o     <= 1'b1;
                frame_o   <= frame_o + 32'd1;
                hi_nib    <= 1'b0;
                idx       <= '0;
                is_l2     <= 1'b0;
                is_udp_ok <= 1'b0;
              end else if (d != 4'h5) begin
                state <= D_SKIP;
              end
            end
            D_DATA: begin
              hi_nib <= !hi_nib;
              if (!hi_nib) begin
                lo_nib <= d;
              end else begin
                idx <= idx + 11'd1;
                // header fields
                if (idx == 11'd12) etype[15:8] <= byte_v;
                if (idx == 11'd13) begin
                  etype[7:0] <= byte_v;
                  is_l2 <= ({etype[15:8], byte_v} == ETHERTYPE_PTP);
                end
                if (etype == ETHERTYPE_IPV4) begin
                  // IPv4 without options, UDP, destination port 319
                  if (idx == 11'd14) is_udp_ok <= (byte_v == 8'h45);
                  if (idx == 11'd23 && byte_v != IP_PROTO_UDP) is_udp_ok <= 1'b0;
                  if (idx == 11'd36 && byte_v != UDP_PORT_EVENT[15:8]) is_udp_ok <= 1'b0;
                  if (idx == 11'd37 && byte_v != UDP_PORT_EVENT[7:0]) is_udp_ok <= 1'b0;
                end
                if (ptp_frame && idx == ptp_base) mtype <= byte_v[3:0];
                if (ptp_frame && idx == ptp_base + 11'd30) seq_hi <= byte_v;
                if (ptp_frame && idx == ptp_base + 11'd31) begin
                  if (is_event_msg(mtype)) begin
                    evt_valid <= 1'b1;
                    evt_o     <= '{ts: ts_sfd, msg_type: mtype, seq_id: {seq_hi, byte_v}};
                    ptp_o     <= ptp_o + 32'd1;
                  end
                  state <= D_SKIP;
                end
                if (idx == 11'h7FF) state <= D_SKIP;
              end
            end
            D_SKIP: ;                         // wait for the end of the frame
            default: state <= D_IDLE;
          endcase
        end
      end
    end
  end

endmodule
