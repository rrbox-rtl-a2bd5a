// header_processor: the Header Processor, the packet forwarding algorithm of
// the middlebox. In the published design it sits in the partial
// reconfigurable region and is replaced at run time by loading a different
// partial bitstream; switch, hub and loopback are the algorithms that were
// exchanged this way. Configuration memory cannot be simulated, so this
// module holds all three and algo says which one is currently configured.
//
//   ALG_HUB       send to every port except the one it came in on
//   ALG_LOOPBACK  send back out of the port it came in on
//   ALG_SWITCH    learning Ethernet switch: remembers the port behind every
//                 source MAC address in a TABLE_SIZE-entry table (replaced
//                 round robin), sends known unicast addresses to their port
//                 (dropped when that is the input port), floods broadcast,
//                 multicast and unknown addresses like the hub.
// The table size and replacement are this implementation's choices.
//
// Interface: start with the packet's hdr_t; one clock later (or when
// Dst_port_fifo has room) the destination port mask, zero meaning drop, is
// written to Dst_port_fifo and done pulses. init clears the switch table, as
// happens to a freshly configured module.
module header_processor
  import rrbox_pkg::*;
#(
  parameter int unsigned TABLE_SIZE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       init,
  input  algo_e      algo,
  input  logic       start,
  input  hdr_t       hdr,
  output logic       done,
  // Dst_port_fifo write side
  output logic       dp_wr,
  output port_mask_t dp_data,
  input  logic       dp_full
);
  localparam port_mask_t ALL = '1;
  localparam int unsigned IW = (TABLE_SIZE > 1) ? $clog2(TABLE_SIZE) : 1;

  logic              busy;
  hdr_t              h;
  logic              t_valid [TABLE_SIZE];
  logic [47:0]       t_mac   [TABLE_SIZE];
  port_mask_t        t_port  [TABLE_SIZE];
  logic [IW-1:0]     rr;

  // Table lookups for the destination and the source address.
  logic          dst_hit, src_hit;
  logic [IW-1:0] dst_idx, src_idx;
  always_comb begin
    dst_hit = 1'b0; dst_idx = '0;
    src_hit = 1'b0; src_idx = '0;
    for (int i = 0; i < int'(TABLE_SIZE); i++) begin
      if (t_valid[i] && t_mac[i] == h.dst_mac) begin dst_hit = 1'b1; dst_idx = IW'(i); end
      if (t_valid[i] && t_mac[i] == h.src_mac) begin src_hit = 1'b1; src_idx = IW'(i); end
    end
  end

  wire        group = h.dst_mac[40];   // I/G bit of the first address byte
  port_mask_t flood;
  assign flood = ALL & ~h.src_port;

  always_comb begin
    unique case (algo)
      ALG_HUB:      dp_data = flood;
      ALG_LOOPBACK: dp_data = h.src_port;
      default: begin
        if (group || !dst_hit)               dp_data = flood;
        else if (t_port[dst_idx] == h.src_port) dp_data = '0;
        else                                 dp_data = t_port[dst_idx];
      end
    endcase
  end

  assign dp_wr = busy && !dp_full;
  assign done  = dp_wr;

  wire learn = dp_wr && (algo == ALG_SWITCH) && !h.src_mac[40];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      h    <= '0;
      rr   <= '0;
      for (int i = 0; i < int'(TABLE_SIZE); i++) begin
        t_valid[i] <= 1'b0;
        t_mac[i]   <= '0;
        t_port[i]  <= '0;
      end
    end else if (init) begin
      busy <= 1'b0;
      rr   <= '0;
      for (int i = 0; i < int'(TABLE_SIZE); i++) t_valid[i] <= 1'b0;
    end else begin
      if (start) begin
        busy <= 1'b1;
        h    <= hdr;
      end else if (dp_wr) begin
        busy <= 1'b0;
      end
      if (learn) begin
        if (src_hit) begin
          t_port[src_idx] <= h.src_port;
        end else begin
          t_valid[rr] <= 1'b1;
          t_mac[rr]   <= h.src_mac;
          t_port[rr]  <= h.src_port;
          rr          <= (rr == IW'(TABLE_SIZE - 1)) ? '0 : rr + 1'b1;
        end
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
