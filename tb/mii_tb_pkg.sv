// mii_tb_pkg: Ethernet frame builders for the MII testbenches.
//
// Each function returns the bytes of a frame after the start-of-frame
// delimiter (destination MAC .. FCS; the FCS bytes are filler, nothing here
// checks them).  PTP frames carry a 34-byte IEEE 1588-2008 header with
// messageType in the low nibble of byte 0 and sequenceId in bytes 30-31,
// followed by a 10-byte timestamp field.
// Frame layouts follow IEEE 802.3 and IEEE 1588-2008; the document gives
// none.
package mii_tb_pkg;

  typedef byte unsigned bytes_t[$];

  function automatic bytes_t ptp_msg(input int msg_type, input int seq);
    bytes_t b;
    for (int i = 0; i < 44; i++) b.push_back(8'(i * 7 + 3));
    b[0]  = 8'(msg_type & 15);
    b[1]  = 8'h02;                    // versionPTP
    b[30] = 8'(seq >> 8);
    b[31] = 8'(seq);
    return b;
  endfunction

  function automatic bytes_t mac_hdr(input int ethertype);
    bytes_t b;
    b = '{8'h01, 8'h1B, 8'h19, 8'h00, 8'h00, 8'h00, 8'h00, 8'h11, 8'h22, 8'h33, 8'h44, 8'h55};
    b.push_back(8'(ethertype >> 8));
    b.push_back(8'(ethertype));
    return b;
  endfunction

  function automatic void pad_fcs(ref bytes_t b);
    while (b.size() < 60) b.push_back(8'h00);
    repeat (4) b.push_back(8'hA5);
  endfunction

  // PTP directly over Ethernet
  function automatic bytes_t l2_ptp(input int msg_type, input int seq);
    bytes_t b = mac_hdr(16'h88F7);
    begin
      bytes_t p = ptp_msg(msg_type, seq);
      foreach (p[i]) b.push_back(p[i]);
    end
    pad_fcs(b);
    return b;
  endfunction

  // PTP over UDP/IPv4; proto and port may be changed to build near misses
  function automatic bytes_t udp_ptp(input int msg_type, input int seq,
                                     input int dport = 319, input int proto = 17,
                                     input int ver_ihl = 8'h45);
    bytes_t b = mac_hdr(16'h0800);
    bytes_t ip;
    ip = '{8'h00, 8'h00, 8'h00, 8'd72, 8'h00, 8'h00, 8'h40, 8'h00, 8'h01, 8'h00,
           8'h00, 8'h00, 8'd10, 8'd0, 8'd0, 8'd1, 8'd224, 8'd0, 8'd1, 8'd129};
    ip[0] = 8'(ver_ihl);
    ip[9] = 8'(proto);
    foreach (ip[i]) b.push_back(ip[i]);
    b.push_back(8'h01); b.push_back(8'h3F);              // UDP source port 319
    b.push_back(8'(dport >> 8)); b.push_back(8'(dport));
    b.push_back(8'h00); b.push_back(8'd52); b.push_back(8'h00); b.push_back(8'h00);
    begin
      bytes_t p = ptp_msg(msg_type, seq);
      foreach (p[i]) b.push_back(p[i]);
    end
    pad_fcs(b);
    return b;
  endfunction

  // a frame that is not PTP
  function automatic bytes_t other(input int len);
    bytes_t b = mac_hdr(16'h0806);
    for (int i = 0; i < len; i++) b.push_back(8'($urandom));
    pad_fcs(b);
    return b;
  endfunction

endpackage
