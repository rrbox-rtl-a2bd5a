// tx_arbiter: merges two AXI4-Stream packet sources into the core's single
// transmit stream, a whole packet at a time. Input 0 carries forwarded data
// packets, input 1 acknowledgements; when both wait at a packet boundary the
// one that did not go last goes first (round robin). Combinational path from
// input to output, no added latency. The merge itself is this
// implementation's: the published design has one output towards the output
// queues and does not say how acknowledgements join it.
module tx_arbiter
  import rrbox_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  s0_valid,
  output logic  s0_ready,
  input  beat_t s0_beat,
  input  logic  s1_valid,
  output logic  s1_ready,
  input  beat_t s1_beat,
  output logic  m_valid,
  input  logic  m_ready,
  output beat_t m_beat
);
  logic locked, sel, last_sel;
  logic cur;

  always_comb begin
    if (locked)                  cur = sel;
    else if (s0_valid && s1_valid) cur = !last_sel;
    else                         cur = s1_valid;
  end

  assign m_valid  = cur ? s1_valid : s0_valid;
  assign m_beat   = cur ? s1_beat  : s0_beat;
  assign s0_ready = m_ready && !cur;
  assign s1_ready = m_ready &&  cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      sel      <= 1'b0;
      last_sel <= 1'b1;
    end else if (m_valid && m_ready) begin
      if (m_beat.tlast) begin
        locked   <= 1'b0;
        last_sel <= cur;
      end else begin
        locked <= 1'b1;
        sel    <= cur;
      end
    end
  end
endmodule
