// data_packet_handler: the Data Packet Handler of the rrBox Core.
//
// Started by the Packet Manager for a data packet, it takes the forwarding
// decision for that packet from Dst_port_fifo, then moves the packet from
// In_fifo to the transmit stream with tuser set to the destination port
// mask. A zero mask drops the packet: it is read out of In_fifo and
// discarded. Like the Header Processor it belongs to the partial
// reconfigurable region in the published design; this version forwards
// packets unchanged (packet rewriting is only mentioned as a possibility).
//
// Interface: start in, done pulse with the last beat. Transmit side is an
// AXI4-Stream master (m_valid/m_ready/m_beat). One beat per clock when the
// receiver is ready; one clock to fetch the decision.
module data_packet_handler
  import rrbox_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       done,
  // Dst_port_fifo read side
  output logic       dp_rd,
  input  port_mask_t dp_data,
  input  logic       dp_empty,
  // In_fifo read side
  output logic       in_rd,
  input  beat_t      in_data,
  input  logic       in_empty,
  // transmit stream
  output logic       m_valid,
  input  logic       m_ready,
  output beat_t      m_beat
);
  typedef enum logic [1:0] {S_IDLE, S_DEC, S_MOVE} state_e;
  state_e     state;
  port_mask_t dst;

  wire drop = (dst == '0);

  assign dp_rd   = (state == S_DEC) && !dp_empty;
  assign m_valid = (state == S_MOVE) && !in_empty && !drop;
  assign in_rd   = (state == S_MOVE) && !in_empty && (drop || m_ready);
  assign done    = in_rd && in_data.tlast;

  always_comb begin
    m_beat       = in_data;
    m_beat.tuser = dst;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      dst   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) state <= S_DEC;
        S_DEC:  if (!dp_empty) begin
          dst   <= dp_data;
          state <= S_MOVE;
        end
        S_MOVE: if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             m_valid && !m_ready |=> m_valid && $stable(m_beat));
endmodule
