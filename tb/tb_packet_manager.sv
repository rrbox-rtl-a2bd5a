// tb_packet_manager: surrounds the Packet Manager with behavioural handlers
// and checks the dispatching: a data packet goes through the Header
// Processor and Data Packet Handler, bitstream packets go to the Bitstream
// Packet Handler, a data packet that arrives during reconfiguration is
// flooded by the Packet Manager itself (no Header Processor call), the
// reconfiguration does not end before Bit_fifo is drained and the ICAP
// idle, prm_init then lasts INIT_CYCLES clocks, and data packets return to
// the Data Packet Handler afterwards. Packet contents on the output and the
// statistics counters are compared with what was sent.
module tb_packet_manager;
  import rrbox_pkg::*;
  import rrbox_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // FIFOs
  logic h_wr = 0, h_full, hdr_rd, hdr_empty;
  hdr_t h_wdata = '0, hdr_data;
  logic i_wr = 0, i_full, in_rd, in_empty;
  beat_t i_wdata = '0, in_data;
  sync_fifo #(.WIDTH(HDR_W), .DEPTH(8)) u_h (
    .clk, .rst_n, .wr_en(h_wr), .wr_data(h_wdata), .full(h_full),
    .rd_en(hdr_rd), .rd_data(hdr_data), .empty(hdr_empty), .count());
  sync_fifo #(.WIDTH(BEAT_W), .DEPTH(128)) u_i (
    .clk, .rst_n, .wr_en(i_wr), .wr_data(i_wdata), .full(i_full),
    .rd_en(in_rd), .rd_data(in_data), .empty(in_empty), .count());

  logic bph_start, bph_done, bph_in_rd, reconf_start, term_seen;
  hdr_t bph_hdr, hp_hdr;
  logic bf_drained = 1, icap_idle = 1;
  logic hp_start, dph_start, dph_done, dph_in_rd, dph_valid, dph_ready, prm_init, reconfiguring;
  beat_t dph_beat;
  logic m_valid, m_ready = 1;
  beat_t m_beat;
  logic [31:0] n_bit_pkts, n_data_pkts, n_bypass_pkts, n_reconfigs;

  packet_manager #(.INIT_CYCLES(4)) dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) m_ready = ($urandom_range(0, 3) != 0);

  // behavioural Bitstream Packet Handler: consume the packet, then done
  logic bph_busy = 0;
  hdr_t bph_h;
  assign bph_in_rd    = bph_busy && !in_empty;
  assign bph_done     = bph_in_rd && in_data.tlast;
  assign reconf_start = bph_start && bph_hdr.kind == PKT_BIT_SEG && bph_hdr.seg == 0;
  assign term_seen    = bph_start && bph_hdr.kind == PKT_BIT_END;
  always @(posedge clk) begin
    if (bph_start) bph_busy <= 1;
    else if (bph_done) bph_busy <= 0;
  end

  // behavioural Data Packet Handler: forward to ports 0 and 1
  logic dph_busy = 0;
  assign dph_valid = dph_busy && !in_empty;
  assign dph_in_rd = dph_valid && dph_ready;
  assign dph_done  = dph_in_rd && in_data.tlast;
  always_comb begin dph_beat = in_data; dph_beat.tuser = 4'b0011; end
  always @(posedge clk) begin
    if (dph_start) dph_busy <= 1;
    else if (dph_done) dph_busy <= 0;
  end

  int n_hp = 0, n_init = 0;
  hdr_t hp_seen[$];
  beat_t got[$], expb[$];
  always @(posedge clk) begin
    if (hp_start) begin n_hp++; hp_seen.push_back(hp_hdr); end
    if (prm_init) n_init++;
    if (m_valid && m_ready) got.push_back(m_beat);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(pkt_kind_e k, int seg, port_mask_t sp, int len, port_mask_t out_mask);
    beats_t b = pkt_to_beats(data_packet(48'h02_00_00_00_00_0B, 48'h02_00_00_00_00_0A, len, 8'(seg)), sp);
    hdr_t h = '0;
    foreach (b[i]) begin
      @(negedge clk); i_wr = 1; i_wdata = b[i];
      if (out_mask != 0) begin beat_t x = b[i]; x.tuser = out_mask; expb.push_back(x); end
    end
    h.kind = k; h.seg = 16'(seg); h.src_port = sp; h.src_mac = 48'h02_00_00_00_00_0A;
    @(negedge clk); i_wr = 0; h_wr = 1; h_wdata = h;
    @(negedge clk); h_wr = 0;
  endtask

  task automatic settle();
    repeat (40) @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    send(PKT_DATA, 1, 4'b0001, 70, 4'b0011);
    settle();
    check(n_hp == 1 && hp_seen[0].seg == 16'd1 && hp_seen[0].src_port == 4'b0001, "Header Processor called");
    check(!reconfiguring, "not reconfiguring");
    send(PKT_BIT_SEG, 0, 4'b0100, 80, 4'b0000);
    settle();
    check(reconfiguring, "reconfiguring after segment 0");
    bf_drained = 0;
    send(PKT_DATA, 2, 4'b0010, 64, 4'b1101);
    settle();
    check(n_hp == 1, "no Header Processor call during reconfiguration");
    check(n_bypass_pkts == 1, "bypass counted");
    send(PKT_BIT_END, 1, 4'b0100, 56, 4'b0000);
    settle();
    check(reconfiguring && n_init == 0, "waits for Bit_fifo to drain");
    bf_drained = 1; icap_idle = 0;
    settle();
    check(reconfiguring && n_init == 0, "waits for ICAP idle");
    icap_idle = 1;
    settle();
    check(!reconfiguring, "reconfiguration ended");
    check(n_init == 4, $sformatf("prm_init lasted %0d clocks", n_init));
    send(PKT_DATA, 3, 4'b1000, 90, 4'b0011);
    settle();
    check(n_hp == 2, "Header Processor called again after reconfiguration");
    check(n_bit_pkts == 2 && n_data_pkts == 2 && n_bypass_pkts == 1 && n_reconfigs == 1,
          $sformatf("counters %0d %0d %0d %0d", n_bit_pkts, n_data_pkts, n_bypass_pkts, n_reconfigs));
    check(in_empty && hdr_empty, "all packets consumed");
    check(got.size() == expb.size(), $sformatf("%0d beats out, expected %0d", got.size(), expb.size()));
    foreach (expb[i]) if (i < got.size()) check(got[i] == expb[i], $sformatf("beat %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
