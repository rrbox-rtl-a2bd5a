// rrbox_core: the rrBox Core, a middlebox whose packet forwarding algorithm
// is replaced remotely, through its own Ethernet ports, by partial
// reconfiguration of the FPGA it runs on.
//
// Static region (packet clock, 100 MHz, 64-bit AXI4-Stream):
//   header_parser -> In_fifo (packets) + Hdr_fifo (one header entry each)
//   packet_manager dispatches each entry:
//     bitstream packets -> bitstream_packet_handler -> Bit_fifo, and a
//                          status entry in Bit_stat_fifo -> ack_generator
//     data packets      -> header_processor -> Dst_port_fifo ->
//                          data_packet_handler -> transmit stream
//   tx_arbiter merges forwarded packets and acknowledgements.
// Reconfiguration clock (50 MHz): icap_interface drains verified bitstream
// from Bit_fifo into the 32-bit ICAP.
// Partial reconfigurable region: header_processor and data_packet_handler.
// The ICAP primitive and configuration memory are outside this RTL: the ICAP
// pins are ports, and prm_algo says which forwarding algorithm the
// configuration memory currently holds (in hardware it would be whatever the
// last loaded bitstream configured).
//
// Ports: s_* receive stream from the input arbiter (tuser = one-hot source
// port), m_* transmit stream to the output queues (tuser = destination port
// mask), icap_* configuration port, prm_init pulse after a completed
// reconfiguration, statistics counters. Widths and clocks follow the
// published design; FIFO depths and addresses are this implementation's
// defaults.
module rrbox_core
  import rrbox_pkg::*;
#(
  parameter logic [31:0] DEVICE_ID      = 32'h0000_0001,
  parameter logic [15:0] BIT_UDP_PORT   = 16'd5000,
  parameter logic [47:0] MY_MAC         = 48'h02_00_00_00_00_01,
  parameter logic [31:0] MY_IP          = 32'hC0A8_0001,
  parameter int unsigned IN_FIFO_DEPTH  = 1024,
  parameter int unsigned HDR_FIFO_DEPTH = 32,
  parameter int unsigned BIT_FIFO_DEPTH = 2048,
  parameter int unsigned STAT_FIFO_DEPTH = 16,
  parameter int unsigned DST_FIFO_DEPTH = 16,
  parameter int unsigned TABLE_SIZE     = 16,
  parameter bit          BITSWAP        = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        icap_clk,
  input  logic        icap_rst_n,
  // receive stream
  input  logic        s_valid,
  output logic        s_ready,
  input  beat_t       s_beat,
  // transmit stream
  output logic        m_valid,
  input  logic        m_ready,
  output beat_t       m_beat,
  // configuration port
  output logic        icap_ce_n,
  output logic        icap_wr_n,
  output logic [31:0] icap_i,
  input  logic        icap_busy,
  // configured forwarding algorithm and its initialisation
  input  algo_e       prm_algo,
  output logic        prm_init,
  output logic        reconfiguring,
  // statistics
  output logic [31:0] n_bit_pkts,
  output logic [31:0] n_data_pkts,
  output logic [31:0] n_bypass_pkts,
  output logic [31:0] n_reconfigs,
  output logic [31:0] n_acks_marked,
  output logic [31:0] n_acks_unmarked,
  output logic [31:0] n_icap_words
);
  // ---------------- In_fifo and Hdr_fifo ----------------
  logic  in_wr, in_rd, in_full, in_empty;
  beat_t in_wdata, in_rdata;
  logic  hdr_wr, hdr_rd, hdr_full, hdr_empty;
  hdr_t  hdr_wdata, hdr_rdata;

  header_parser #(.DEVICE_ID(DEVICE_ID), .BIT_UDP_PORT(BIT_UDP_PORT)) u_parser (
    .clk, .rst_n, .s_valid, .s_ready, .s_beat,
    .in_wr, .in_data(in_wdata), .in_full,
    .hdr_wr, .hdr_data(hdr_wdata), .hdr_full);

  sync_fifo #(.WIDTH(BEAT_W), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .wr_en(in_wr), .wr_data(in_wdata), .full(in_full),
    .rd_en(in_rd), .rd_data(in_rdata), .empty(in_empty), .count());

  sync_fifo #(.WIDTH(HDR_W), .DEPTH(HDR_FIFO_DEPTH)) u_hdr_fifo (
    .clk, .rst_n, .wr_en(hdr_wr), .wr_data(hdr_wdata), .full(hdr_full),
    .rd_en(hdr_rd), .rd_data(hdr_rdata), .empty(hdr_empty), .count());

  // ---------------- bitstream path ----------------
  logic        bph_start, bph_done, bph_in_rd, bph_active, reconf_start, term_seen;
  hdr_t        bph_hdr;
  logic        bf_wr, bf_full, bf_mark, bf_rollback, bf_commit, bf_drained;
  logic [63:0] bf_wdata, bf_rdata;
  logic        bf_rd, bf_empty;
  logic        st_wr, st_rd, st_full, st_empty;
  bstat_t      st_wdata, st_rdata;

  bitstream_packet_handler u_bph (
    .clk, .rst_n, .start(bph_start), .hdr(bph_hdr), .done(bph_done),
    .active(bph_active), .reconf_start, .term_seen,
    .in_rd(bph_in_rd), .in_data(in_rdata), .in_empty,
    .bf_wr, .bf_data(bf_wdata), .bf_full, .bf_mark, .bf_rollback, .bf_commit,
    .st_wr, .st_data(st_wdata), .st_full);

  bit_fifo #(.WIDTH(64), .DEPTH(BIT_FIFO_DEPTH)) u_bit_fifo (
    .wclk(clk), .wrst_n(rst_n), .wr_en(bf_wr), .wr_data(bf_wdata), .full(bf_full),
    .mark(bf_mark), .rollback(bf_rollback), .commit(bf_commit), .drained(bf_drained),
    .rclk(icap_clk), .rrst_n(icap_rst_n), .rd_en(bf_rd), .rd_data(bf_rdata), .empty(bf_empty));

  logic icap_idle, icap_idle_w;
  icap_interface #(.BITSWAP(BITSWAP)) u_icap_if (
    .clk(icap_clk), .rst_n(icap_rst_n),
    .bf_rd, .bf_data(bf_rdata), .bf_empty,
    .icap_ce_n, .icap_wr_n, .icap_i, .icap_busy,
    .idle(icap_idle), .words(n_icap_words));

  sync2 #(.W(1)) u_idle_sync (.clk, .rst_n, .d(icap_idle), .q(icap_idle_w));

  sync_fifo #(.WIDTH(BSTAT_W), .DEPTH(STAT_FIFO_DEPTH)) u_stat_fifo (
    .clk, .rst_n, .wr_en(st_wr), .wr_data(st_wdata), .full(st_full),
    .rd_en(st_rd), .rd_data(st_rdata), .empty(st_empty), .count());

  logic  ack_valid, ack_ready;
  beat_t ack_beat;
  ack_generator #(.MY_MAC(MY_MAC), .MY_IP(MY_IP), .DEVICE_ID(DEVICE_ID),
                  .BIT_UDP_PORT(BIT_UDP_PORT)) u_ack (
    .clk, .rst_n, .st_rd, .st_data(st_rdata), .st_empty,
    .m_valid(ack_valid), .m_ready(ack_ready), .m_beat(ack_beat),
    .n_marked(n_acks_marked), .n_unmarked(n_acks_unmarked));

  // ---------------- data path (partial reconfigurable region) ----------------
  logic       hp_start, hp_done, dph_start, dph_done, dph_in_rd;
  hdr_t       hp_hdr;
  logic       dp_wr, dp_rd, dp_full, dp_empty;
  port_mask_t dp_wdata, dp_rdata;
  logic       dph_valid, dph_ready;
  beat_t      dph_beat;

  header_processor #(.TABLE_SIZE(TABLE_SIZE)) u_hp (
    .clk, .rst_n, .init(prm_init), .algo(prm_algo),
    .start(hp_start), .hdr(hp_hdr), .done(hp_done),
    .dp_wr, .dp_data(dp_wdata), .dp_full);

  sync_fifo #(.WIDTH(NPORTS), .DEPTH(DST_FIFO_DEPTH)) u_dst_fifo (
    .clk, .rst_n, .wr_en(dp_wr), .wr_data(dp_wdata), .full(dp_full),
    .rd_en(dp_rd), .rd_data(dp_rdata), .empty(dp_empty), .count());

  data_packet_handler u_dph (
    .clk, .rst_n, .start(dph_start), .done(dph_done),
    .dp_rd, .dp_data(dp_rdata), .dp_empty,
    .in_rd(dph_in_rd), .in_data(in_rdata), .in_empty,
    .m_valid(dph_valid), .m_ready(dph_ready), .m_beat(dph_beat));

  // ---------------- coordinator and output ----------------
  logic  fw_valid, fw_ready;
  beat_t fw_beat;

  packet_manager u_pm (
    .clk, .rst_n,
    .hdr_rd, .hdr_data(hdr_rdata), .hdr_empty,
    .bph_start, .bph_hdr, .bph_done, .bph_in_rd, .reconf_start, .term_seen,
    .bf_drained, .icap_idle(icap_idle_w),
    .hp_start, .hp_hdr, .dph_start, .dph_done, .dph_in_rd,
    .dph_valid, .dph_ready, .dph_beat,
    .prm_init, .reconfiguring,
    .in_rd, .in_data(in_rdata), .in_empty,
    .m_valid(fw_valid), .m_ready(fw_ready), .m_beat(fw_beat),
    .n_bit_pkts, .n_data_pkts, .n_bypass_pkts, .n_reconfigs);

  tx_arbiter u_tx (
    .clk, .rst_n,
    .s0_valid(fw_valid), .s0_ready(fw_ready), .s0_beat(fw_beat),
    .s1_valid(ack_valid), .s1_ready(ack_ready), .s1_beat(ack_beat),
    .m_valid, .m_ready, .m_beat);
endmodule
