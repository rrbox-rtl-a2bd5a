// bitstream_packet_handler: the Bitstream Packet Handler of the rrBox Core.
//
// Started by the Packet Manager with the Hdr_fifo entry of a bitstream
// packet, it reads that packet from In_fifo, drops the 56 header bytes and
// writes the partial bitstream that follows into Bit_fifo, 64 bits per beat.
// The outcome goes into Bit_stat_fifo, from which the acknowledgement to the
// client is built: marked (stored) or unmarked (send again).
//
// Verification, as published: a segment is held back in Bit_fifo until the
// next segment arrives, and the termination packet verifies the last one.
// Here the handler keeps the number of the segment it expects next (exp):
//   segment == exp  verify and release the previous segment (commit), then
//                   store this one; if Bit_fifo fills up on the way, its
//                   partial data is thrown away (rollback) and the answer is
//                   unmarked, otherwise marked and exp advances;
//   segment <  exp  a resend of a segment already stored: marked, not stored;
//   segment >  exp  out of order: unmarked, not stored;
//   termination == exp  releases the last segment, ends the transfer
//                   (term_seen pulse) and is answered marked; a repeated
//                   termination of the transfer just ended is answered
//                   marked again; any other termination unmarked.
// The first stored segment 0 starts a transfer (reconf_start pulse). The
// exp/resend rules, the handling of a repeated termination and the bitstream
// data being a whole number of 64-bit words are this implementation's.
//
// Interface: start/hdr in, done pulse out when the packet has been consumed
// and its status written. Throughput: one beat per clock while In_fifo has
// data and Bit_fifo has room; two extra clocks per packet.
module bitstream_packet_handler
  import rrbox_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // from the Packet Manager
  input  logic         start,
  input  hdr_t         hdr,
  output logic         done,
  output logic         active,        // a transfer is in progress
  output logic         reconf_start,  // pulse: segment 0 accepted
  output logic         term_seen,     // pulse: transfer verified complete
  // In_fifo read side
  output logic         in_rd,
  input  beat_t        in_data,
  input  logic         in_empty,
  // Bit_fifo write side
  output logic         bf_wr,
  output logic [63:0]  bf_data,
  input  logic         bf_full,
  output logic         bf_mark,
  output logic         bf_rollback,
  output logic         bf_commit,
  // Bit_stat_fifo write side
  output logic         st_wr,
  output bstat_t       st_data,
  input  logic         st_full
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_FIN} state_e;

  state_e      state;
  hdr_t        h;
  logic [15:0] exp_seg;
  logic        pending;      // a stored segment waits for verification
  logic        storing;      // payload of the current packet goes to Bit_fifo
  logic        failed;       // Bit_fifo filled while storing
  logic        marked;
  logic        done_valid;
  logic [15:0] done_seg;
  logic [3:0]  beat;

  wire data_beat  = (beat >= 4'(HDR_BEATS));
  wire want_store = storing && !failed && data_beat;
  wire blocked    = want_store && bf_full;

  assign in_rd       = (state == S_READ) && !in_empty && !blocked;
  assign bf_wr       = (state == S_READ) && !in_empty && want_store && !bf_full;
  assign bf_data     = in_data.tdata;
  assign bf_rollback = (state == S_READ) && !in_empty && blocked;
  assign bf_mark     = (state == S_FIN) && !st_full && storing && !failed;
  assign st_wr       = (state == S_FIN) && !st_full;
  assign done        = st_wr;

  always_comb begin
    st_data.marked = storing ? !failed : marked;
    st_data.term   = (h.kind == PKT_BIT_END);
    st_data.seg    = h.seg;
    st_data.port   = h.src_port;
    st_data.mac    = h.src_mac;
    st_data.ip     = h.src_ip;
    st_data.udp    = h.src_udp;
  end

  // Decision taken when a packet is started.
  logic d_store, d_marked, d_commit, d_term, d_first;
  always_comb begin
    d_store  = 1'b0;
    d_marked = 1'b0;
    d_commit = 1'b0;
    d_term   = 1'b0;
    d_first  = 1'b0;
    if (hdr.kind == PKT_BIT_END) begin
      if (active && hdr.seg == exp_seg) begin
        d_commit = pending;
        d_marked = 1'b1;
        d_term   = 1'b1;
      end else if (!active && done_valid && hdr.seg == done_seg) begin
        d_marked = 1'b1;
      end
    end else begin
      if (hdr.seg == exp_seg) begin
        d_commit = pending;
        d_store  = 1'b1;
        d_first  = (hdr.seg == 16'd0);
      end else if (hdr.seg < exp_seg) begin
        d_marked = 1'b1;
      end
    end
  end

  assign bf_commit    = (state == S_IDLE) && start && d_commit;
  assign reconf_start = (state == S_IDLE) && start && d_first;
  assign term_seen    = (state == S_IDLE) && start && d_term;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      h          <= '0;
      exp_seg    <= '0;
      pending    <= 1'b0;
      storing    <= 1'b0;
      failed     <= 1'b0;
      marked     <= 1'b0;
      active     <= 1'b0;
      done_valid <= 1'b0;
      done_seg   <= '0;
      beat       <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          h       <= hdr;
          storing <= d_store;
          marked  <= d_marked;
          failed  <= 1'b0;
          beat    <= '0;
          if (d_commit) pending <= 1'b0;
          if (d_first) begin
            active     <= 1'b1;
            done_valid <= 1'b0;
          end
          if (d_term) begin
            active     <= 1'b0;
            exp_seg    <= '0;
            done_valid <= 1'b1;
            done_seg   <= hdr.seg;
          end
          state <= S_READ;
        end
        S_READ: begin
          if (bf_rollback) failed <= 1'b1;
          if (in_rd) begin
            if (beat != 4'hF) beat <= beat + 1'b1;
            if (in_data.tlast) state <= S_FIN;
          end
        end
        S_FIN: if (!st_full) begin
          if (storing && !failed) begin
            pending <= 1'b1;
            exp_seg <= exp_seg + 1'b1;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE);
endmodule
