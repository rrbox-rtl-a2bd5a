// rrbox_pkg: types and constants shared by the rrBox Core.
//
// The core moves packets on a 64-bit AXI4-Stream at 100 MHz and loads partial
// bitstreams through a 32-bit configuration port at 50 MHz (both widths and
// clocks follow the published design). Everything else in this package is a
// choice of this implementation: the byte order on the stream (first packet
// byte in tdata[63:56]), one-hot 4-port masks in place of the NetFPGA tuser
// encoding, and the layout of the bitstream-transfer payload that follows the
// UDP header:
//
//   byte 42..45  device ID (each box has its own)
//   byte 46..47  packet type: 1 = bitstream segment, 2 = termination, 3 = ack
//   byte 48..49  segment number
//   byte 50      ack status (1 = marked / stored, 0 = unmarked / resend)
//   byte 51..55  reserved
//   byte 56..    partial bitstream data, a whole number of 64-bit words
package rrbox_pkg;

  localparam int unsigned DATA_W   = 64;            // AXI4-Stream data width
  localparam int unsigned KEEP_W   = DATA_W / 8;
  localparam int unsigned NPORTS   = 4;             // Ethernet ports of the board

  localparam int unsigned HDR_BEATS = 7;            // beats 0..6 carry the headers

  localparam logic [15:0] ETH_IPV4  = 16'h0800;
  localparam logic [7:0]  IP_UDP    = 8'd17;

  localparam logic [15:0] PT_SEGMENT = 16'd1;
  localparam logic [15:0] PT_TERM    = 16'd2;
  localparam logic [15:0] PT_ACK     = 16'd3;

  typedef logic [NPORTS-1:0] port_mask_t;

  // One beat of the packet stream; tuser carries the port mask (source port
  // on receive, destination ports on transmit).
  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic [KEEP_W-1:0] tkeep;
    logic              tlast;
    port_mask_t        tuser;
  } beat_t;

  typedef enum logic [1:0] {
    PKT_DATA    = 2'd0,
    PKT_BIT_SEG = 2'd1,
    PKT_BIT_END = 2'd2
  } pkt_kind_e;

  // One Hdr_fifo entry: what the Header Parser extracted from a packet.
  typedef struct packed {
    pkt_kind_e   kind;
    port_mask_t  src_port;
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_udp;
    logic [15:0] dst_udp;
    logic [15:0] seg;
    logic [15:0] len_bytes;
  } hdr_t;

  // One Bit_stat_fifo entry: the outcome of extracting one bitstream packet,
  // with what is needed to answer the client.
  typedef struct packed {
    logic        marked;     // 1 = stored (or already stored), 0 = resend
    logic        term;       // answer to a termination packet
    logic [15:0] seg;
    port_mask_t  port;
    logic [47:0] mac;
    logic [31:0] ip;
    logic [15:0] udp;
  } bstat_t;

  // Forwarding algorithms available as partial reconfigurable modules.
  typedef enum logic [1:0] {
    ALG_SWITCH   = 2'd0,
    ALG_HUB      = 2'd1,
    ALG_LOOPBACK = 2'd2
  } algo_e;

  localparam int unsigned HDR_W   = $bits(hdr_t);
  localparam int unsigned BSTAT_W = $bits(bstat_t);
  localparam int unsigned BEAT_W  = $bits(beat_t);

  // Byte n (0 = first on the wire) of a 64-bit beat.
  function automatic logic [7:0] beat_byte(input logic [DATA_W-1:0] d, input int unsigned n);
    return d[DATA_W-1-8*n -: 8];
  endfunction

endpackage
