// ack_generator: answers the rrBox Client for every bitstream packet.
//
// In the published scheme the client resends every bitstream packet that
// comes back unmarked (and every one that times out), and sends the
// termination packet once the last segment is acknowledged. This module takes
// the extraction results from Bit_stat_fifo and turns each into a 64-byte
// Ethernet/IPv4/UDP acknowledgement sent out of the port the bitstream packet
// came in on, back to the client's MAC, IP address and UDP port. Its payload
// uses the transfer layout of rrbox_pkg: device ID, type 3 (ack), the segment
// number, byte 50 = 1 for marked / 0 for unmarked, byte 51 = 1 when it answers
// a termination packet. The IPv4 header checksum is computed; the UDP
// checksum is left 0 (allowed for IPv4). The packet format is this
// implementation's; the published text describes only marked and unmarked
// acknowledgements.
//
// Interface: Bit_stat_fifo read side in, AXI4-Stream master out. An
// acknowledgement takes 8 beats; the status entry is removed with the last.
module ack_generator
  import rrbox_pkg::*;
#(
  parameter logic [47:0] MY_MAC       = 48'h02_00_00_00_00_01,
  parameter logic [31:0] MY_IP        = 32'hC0A8_0001,
  parameter logic [31:0] DEVICE_ID    = 32'h0000_0001,
  parameter logic [15:0] BIT_UDP_PORT = 16'd5000
) (
  input  logic   clk,
  input  logic   rst_n,
  // Bit_stat_fifo read side
  output logic   st_rd,
  input  bstat_t st_data,
  input  logic   st_empty,
  // transmit stream
  output logic   m_valid,
  input  logic   m_ready,
  output beat_t  m_beat,
  // number of marked / unmarked acknowledgements sent
  output logic [31:0] n_marked,
  output logic [31:0] n_unmarked
);
  localparam int unsigned PKT_BYTES = 64;
  localparam int unsigned BEATS = PKT_BYTES / 8;

  logic [2:0]           beat;
  logic [8*PKT_BYTES-1:0] pkt;
  logic [15:0]          csum;

  function automatic logic [15:0] ip_checksum(logic [159:0] h);
    logic [19:0] s;
    s = '0;
    for (int i = 0; i < 10; i++) s = s + 20'(h[16*i +: 16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    return ~s[15:0];
  endfunction

  logic [159:0] iphdr;
  always_comb begin
    iphdr = {8'h45, 8'h00, 16'(PKT_BYTES - 14), 16'h0000, 16'h4000,
             8'd64, IP_UDP, 16'h0000, MY_IP, st_data.ip};
    csum  = ip_checksum(iphdr);
    pkt   = {st_data.mac, MY_MAC, ETH_IPV4,
             iphdr[159:80], csum, iphdr[63:0],
             BIT_UDP_PORT, st_data.udp, 16'(PKT_BYTES - 14 - 20), 16'h0000,
             DEVICE_ID, PT_ACK, st_data.seg,
             7'd0, st_data.marked, 7'd0, st_data.term,
             {(PKT_BYTES - 52) {8'h00}}};
  end

  assign m_valid      = !st_empty;
  assign m_beat.tdata = pkt[8*PKT_BYTES-1-64*beat -: 64];
  assign m_beat.tkeep = '1;
  assign m_beat.tlast = (beat == 3'(BEATS - 1));
  assign m_beat.tuser = st_data.port;
  assign st_rd        = m_valid && m_ready && m_beat.tlast;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat       <= '0;
      n_marked   <= '0;
      n_unmarked <= '0;
    end else if (m_valid && m_ready) begin
      beat <= m_beat.tlast ? '0 : beat + 1'b1;
      if (m_beat.tlast) begin
        if (st_data.marked) n_marked   <= n_marked + 1'b1;
        else                n_unmarked <= n_unmarked + 1'b1;
      end
    end
  end
endmodule
