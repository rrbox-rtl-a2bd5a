// header_parser: the Header Parser of the rrBox Core.
//
// Every received packet is copied beat by beat into In_fifo, and while it
// passes the parser picks out the fields the rest of the core needs: source
// and destination MAC address, source and destination IPv4 address, UDP
// ports and, for bitstream packets, the segment number. When the last beat is
// accepted one hdr_t entry goes into Hdr_fifo, so every packet in In_fifo has
// exactly one entry in Hdr_fifo, in the same order.
//
// A packet is a bitstream packet when it is IPv4 (no IP options) carrying UDP
// to port BIT_UDP_PORT and its payload holds this box's DEVICE_ID and a
// segment (type 1) or termination (type 2) code; everything else is a data
// packet, including bitstream packets meant for another box. The published
// design names the UDP port and a per-device identifier as the criteria; the
// port number, the ID and the payload layout (see rrbox_pkg) are this
// implementation's.
//
// Interface: AXI4-Stream slave (s_valid/s_ready/s_beat, first byte in
// tdata[63:56], tuser = one-hot source port). s_ready is low while either
// FIFO is full. One beat per clock, no added latency on the data path.
module header_parser
  import rrbox_pkg::*;
#(
  parameter logic [31:0] DEVICE_ID    = 32'h0000_0001,
  parameter logic [15:0] BIT_UDP_PORT = 16'd5000
) (
  input  logic   clk,
  input  logic   rst_n,
  // received stream
  input  logic   s_valid,
  output logic   s_ready,
  input  beat_t  s_beat,
  // In_fifo write side
  output logic   in_wr,
  output beat_t  in_data,
  input  logic   in_full,
  // Hdr_fifo write side
  output logic   hdr_wr,
  output hdr_t   hdr_data,
  input  logic   hdr_full
);
  // Fields gathered from the beats seen so far.
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [15:0] ethertype;
    logic [7:0]  ver_ihl;
    logic [7:0]  proto;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_udp;
    logic [15:0] dst_udp;
    logic [31:0] dev_id;
    logic [15:0] ptype;
    logic [15:0] seg;
  } fields_t;

  fields_t     f_q, f_d;
  logic [3:0]  beat_q;       // beat index, saturates at 15
  logic [15:0] len_q, len_d;
  port_mask_t  src_q, src_d;

  wire acc = s_valid && s_ready;

  assign s_ready = !in_full && !hdr_full;
  assign in_wr   = acc;
  assign in_data = s_beat;

  always_comb begin
    logic [63:0] d;
    d     = s_beat.tdata;
    f_d   = f_q;
    src_d = (beat_q == 4'd0) ? s_beat.tuser : src_q;
    len_d = ((beat_q == 4'd0) ? 16'd0 : len_q) + 16'($countones(s_beat.tkeep));
    unique case (beat_q)
      4'd0: begin f_d.dst_mac = d[63:16]; f_d.src_mac[47:32] = d[15:0]; end
      4'd1: begin f_d.src_mac[31:0] = d[63:32]; f_d.ethertype = d[31:16]; f_d.ver_ihl = d[15:8]; end
      4'd2: f_d.proto = d[7:0];
      4'd3: begin f_d.src_ip = d[47:16]; f_d.dst_ip[31:16] = d[15:0]; end
      4'd4: begin f_d.dst_ip[15:0] = d[63:48]; f_d.src_udp = d[47:32]; f_d.dst_udp = d[31:16]; end
      4'd5: begin f_d.dev_id = d[47:16]; f_d.ptype = d[15:0]; end
      4'd6: f_d.seg = d[63:48];
      default: ;
    endcase
  end

  // Classification of the packet that ends with the current beat.
  always_comb begin
    logic is_bit;
    is_bit = (beat_q >= 4'd6) &&
             (f_d.ethertype == ETH_IPV4) && (f_d.ver_ihl == 8'h45) &&
             (f_d.proto == IP_UDP) && (f_d.dst_udp == BIT_UDP_PORT) &&
             (f_d.dev_id == DEVICE_ID) &&
             (f_d.ptype == PT_SEGMENT || f_d.ptype == PT_TERM);
    hdr_data.kind      = !is_bit ? PKT_DATA : (f_d.ptype == PT_TERM) ? PKT_BIT_END : PKT_BIT_SEG;
    hdr_data.src_port  = src_d;
    hdr_data.dst_mac   = f_d.dst_mac;
    hdr_data.src_mac   = f_d.src_mac;
    hdr_data.src_ip    = f_d.src_ip;
    hdr_data.dst_ip    = f_d.dst_ip;
    hdr_data.src_udp   = f_d.src_udp;
    hdr_data.dst_udp   = f_d.dst_udp;
    hdr_data.seg       = f_d.seg;
    hdr_data.len_bytes = len_d;
  end

  assign hdr_wr = acc && s_beat.tlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q    <= '0;
      beat_q <= '0;
      len_q  <= '0;
      src_q  <= '0;
    end else if (acc) begin
      // Fields of a packet that ends early are cleared so that a short packet
      // never inherits header bytes of the packet before it.
      f_q    <= s_beat.tlast ? '0 : f_d;
      len_q  <= len_d;
      src_q  <= src_d;
      if (s_beat.tlast)         beat_q <= '0;
      else if (beat_q != 4'hF)  beat_q <= beat_q + 1'b1;
    end
  end
endmodule
