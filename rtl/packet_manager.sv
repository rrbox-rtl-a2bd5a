// packet_manager: the Packet Manager, coordinator of the rrBox Core.
//
// It takes one Hdr_fifo entry at a time and hands the packet it describes
// to a handler, then waits for that handler to finish before the next entry:
//   bitstream packet  -> Bitstream Packet Handler;
//   data packet       -> Header Processor (forwarding decision), then Data
//                        Packet Handler (moves the packet out).
// While a partial reconfiguration is in progress the Header Processor and
// Data Packet Handler are being rewritten, so the Packet Manager forwards
// data packets itself, to every port except the input port. When the
// transfer has been verified complete and the ICAP Interface has loaded every
// word, it holds prm_init for INIT_CYCLES clocks to initialise the newly
// configured module and then returns data packets to it.
//
// Hand-off, waiting and the reconfiguration hand-back follow the published
// description; flooding during reconfiguration (the text only says the
// Packet Manager handles data packets on behalf of the Data Packet Handler),
// the end-of-load detection and INIT_CYCLES are this implementation's.
//
// The In_fifo read port and the data transmit stream are shared: the block
// that the current state has activated owns them. The count outputs record
// how many packets of each kind were handled and how many
// reconfigurations completed.
module packet_manager
  import rrbox_pkg::*;
#(
  parameter int unsigned INIT_CYCLES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // Hdr_fifo read side
  output logic        hdr_rd,
  input  hdr_t        hdr_data,
  input  logic        hdr_empty,
  // Bitstream Packet Handler
  output logic        bph_start,
  output hdr_t        bph_hdr,
  input  logic        bph_done,
  input  logic        bph_in_rd,
  input  logic        reconf_start,
  input  logic        term_seen,
  // end-of-load status: Bit_fifo drained (packet clock) and ICAP Interface
  // idle (already synchronised to the packet clock)
  input  logic        bf_drained,
  input  logic        icap_idle,
  // Header Processor and Data Packet Handler (partial reconfigurable region)
  output logic        hp_start,
  output hdr_t        hp_hdr,
  output logic        dph_start,
  input  logic        dph_done,
  input  logic        dph_in_rd,
  input  logic        dph_valid,
  output logic        dph_ready,
  input  beat_t       dph_beat,
  output logic        prm_init,
  output logic        reconfiguring,
  // In_fifo read side
  output logic        in_rd,
  input  beat_t       in_data,
  input  logic        in_empty,
  // data transmit stream
  output logic        m_valid,
  input  logic        m_ready,
  output beat_t       m_beat,
  // statistics
  output logic [31:0] n_bit_pkts,
  output logic [31:0] n_data_pkts,
  output logic [31:0] n_bypass_pkts,
  output logic [31:0] n_reconfigs
);
  typedef enum logic [2:0] {S_IDLE, S_BIT_GO, S_BIT_WAIT, S_DATA_GO, S_DATA_WAIT, S_BYPASS} state_e;
  typedef enum logic [1:0] {R_IDLE, R_LOAD, R_DRAIN, R_INIT} rstate_e;

  state_e  state;
  rstate_e rstate;
  hdr_t    h;
  logic [7:0] cnt;

  assign reconfiguring = (rstate != R_IDLE);
  assign prm_init      = (rstate == R_INIT);

  assign hdr_rd    = (state == S_IDLE) && !hdr_empty;
  assign bph_start = (state == S_BIT_GO);
  assign bph_hdr   = h;
  assign hp_start  = (state == S_DATA_GO);
  assign hp_hdr    = h;
  assign dph_start = (state == S_DATA_GO);

  // Bypass forwarding during reconfiguration.
  wire byp_valid = (state == S_BYPASS) && !in_empty;
  wire byp_rd    = byp_valid && m_ready;

  always_comb begin
    unique case (state)
      S_BIT_WAIT:  in_rd = bph_in_rd;
      S_DATA_WAIT: in_rd = dph_in_rd;
      S_BYPASS:    in_rd = byp_rd;
      default:     in_rd = 1'b0;
    endcase
  end

  assign dph_ready = (state == S_DATA_WAIT) && m_ready;
  always_comb begin
    if (state == S_BYPASS) begin
      m_valid      = byp_valid;
      m_beat       = in_data;
      m_beat.tuser = ~h.src_port;
    end else begin
      m_valid = (state == S_DATA_WAIT) && dph_valid;
      m_beat  = dph_beat;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      h             <= '0;
      n_bit_pkts    <= '0;
      n_data_pkts   <= '0;
      n_bypass_pkts <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (!hdr_empty) begin
          h <= hdr_data;
          if (hdr_data.kind != PKT_DATA) state <= S_BIT_GO;
          else if (reconfiguring)        state <= S_BYPASS;
          else                           state <= S_DATA_GO;
        end
        S_BIT_GO:    state <= S_BIT_WAIT;
        S_BIT_WAIT:  if (bph_done) begin
          n_bit_pkts <= n_bit_pkts + 1'b1;
          state      <= S_IDLE;
        end
        S_DATA_GO:   state <= S_DATA_WAIT;
        S_DATA_WAIT: if (dph_done) begin
          n_data_pkts <= n_data_pkts + 1'b1;
          state       <= S_IDLE;
        end
        S_BYPASS: if (byp_rd && in_data.tlast) begin
          n_bypass_pkts <= n_bypass_pkts + 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Reconfiguration tracking: from the first accepted segment until the
  // loaded module has been initialised.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rstate      <= R_IDLE;
      cnt         <= '0;
      n_reconfigs <= '0;
    end else begin
      unique case (rstate)
        R_IDLE:  if (reconf_start) rstate <= R_LOAD;
        R_LOAD:  if (term_seen) begin
          rstate <= R_DRAIN;
          cnt    <= '0;
        end
        // Everything committed must have left Bit_fifo and the ICAP bus for
        // 8 clocks in a row, which covers the synchronisers on both paths.
        R_DRAIN: begin
          if (!(bf_drained && icap_idle)) cnt <= '0;
          else if (cnt == 8'd7) begin
            rstate <= R_INIT;
            cnt    <= '0;
          end else cnt <= cnt + 1'b1;
        end
        R_INIT: begin
          if (cnt == 8'(INIT_CYCLES - 1)) begin
            rstate      <= R_IDLE;
            n_reconfigs <= n_reconfigs + 1'b1;
          end
          cnt <= cnt + 1'b1;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end
endmodule
