// rrbox_tb_pkg: packet construction helpers shared by the rrBox testbenches.
// Packets are byte queues, first byte on the wire first; pkt_to_beats cuts
// them into 64-bit stream beats with the first byte in tdata[63:56].
package rrbox_tb_pkg;
  import rrbox_pkg::*;

  typedef byte unsigned bytes_t[$];
  typedef beat_t beats_t[$];

  function automatic void put16(ref bytes_t q, input logic [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction
  function automatic void put32(ref bytes_t q, input logic [31:0] v);
    put16(q, v[31:16]); put16(q, v[15:0]);
  endfunction
  function automatic void put48(ref bytes_t q, input logic [47:0] v);
    put16(q, v[47:32]); put32(q, v[31:0]);
  endfunction

  // Ethernet + IPv4 (no options) + UDP around a payload.
  function automatic bytes_t udp_packet(logic [47:0] dmac, logic [47:0] smac,
                                        logic [31:0] sip, logic [31:0] dip,
                                        logic [15:0] sport, logic [15:0] dport,
                                        bytes_t payload);
    bytes_t q;
    put48(q, dmac); put48(q, smac); put16(q, ETH_IPV4);
    q.push_back(8'h45); q.push_back(8'h00); put16(q, 16'(20 + 8 + payload.size()));
    put16(q, 16'h0); put16(q, 16'h4000); q.push_back(8'd64); q.push_back(IP_UDP);
    put16(q, 16'h0); put32(q, sip); put32(q, dip);
    put16(q, sport); put16(q, dport); put16(q, 16'(8 + payload.size())); put16(q, 16'h0);
    foreach (payload[i]) q.push_back(payload[i]);
    return q;
  endfunction

  // Bitstream transfer packet: device ID, type, segment, 6 reserved bytes,
  // then the bitstream words (64-bit each).
  function automatic bytes_t bit_packet(logic [47:0] dmac, logic [47:0] smac,
                                        logic [31:0] sip, logic [31:0] dip,
                                        logic [15:0] sport, logic [15:0] dport,
                                        logic [31:0] dev, logic [15:0] ptype,
                                        logic [15:0] seg, logic [63:0] words[$]);
    bytes_t p;
    put32(p, dev); put16(p, ptype); put16(p, seg);
    repeat (6) p.push_back(8'h00);
    foreach (words[i]) begin put32(p, words[i][63:32]); put32(p, words[i][31:0]); end
    return udp_packet(dmac, smac, sip, dip, sport, dport, p);
  endfunction

  // Non-UDP data packet of len bytes (len >= 14) with a recognisable body.
  function automatic bytes_t data_packet(logic [47:0] dmac, logic [47:0] smac,
                                         int unsigned len, byte unsigned tag);
    bytes_t q;
    put48(q, dmac); put48(q, smac); put16(q, 16'h88B5);
    for (int i = 14; i < int'(len); i++) q.push_back(8'(tag + i));
    return q;
  endfunction

  function automatic beats_t pkt_to_beats(bytes_t q, port_mask_t port);
    beats_t b;
    int unsigned n = (q.size() + 7) / 8;
    for (int unsigned k = 0; k < n; k++) begin
      beat_t x;
      x.tdata = '0; x.tkeep = '0;
      for (int unsigned j = 0; j < 8; j++) begin
        if (8*k + j < q.size()) begin
          x.tdata[63-8*j -: 8] = q[8*k + j];
          x.tkeep[7-j] = 1'b1;
        end
      end
      x.tlast = (k == n - 1);
      x.tuser = port;
      b.push_back(x);
    end
    return b;
  endfunction

  // Reference IPv4 header checksum, byte-wise, over bytes 14..33 of a frame
  // with the checksum field (bytes 24..25) taken as zero.
  function automatic logic [15:0] ref_ip_checksum(bytes_t q);
    int unsigned s = 0;
    for (int i = 14; i < 34; i += 2) if (i != 24) s += {q[i], q[i+1]};
    while (s > 32'hFFFF) s = (s & 32'hFFFF) + (s >> 16);
    return ~16'(s);
  endfunction
endpackage
