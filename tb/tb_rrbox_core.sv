// tb_rrbox_core: end-to-end test of the rrBox Core with a behavioural client
// and configuration port.
//
// The client sends a partial bitstream as numbered UDP segments, waits for
// each acknowledgement, resends a segment that comes back unmarked, and
// closes with a termination packet. The configuration port model records
// every ICAP word and switches the forwarding algorithm when a complete
// bitstream has been loaded. The test:
//   1. forwards data with the initial hub algorithm;
//   2. loads a loopback module while data keeps flowing (flooded by the
//      Packet Manager during the transfer), with a repeated segment (lost
//      acknowledgement) and an out-of-order segment on the way;
//   3. loads a switch module with the configuration port held busy so that
//      Bit_fifo fills and a segment is refused and resent;
//   4. checks the learning switch and a bitstream packet for another device
//      being forwarded as ordinary data.
// Every ICAP word is compared with the bitstream sent, every forwarded frame
// with the frame received and the expected output ports, and each mechanism
// must have happened at least once. PARAM SMALL shrinks Bit_fifo so that it
// can be filled; with SMALL = 0 the core runs with all its defaults.
module tb_rrbox_core;
  import rrbox_pkg::*;
  import rrbox_tb_pkg::*;

  localparam bit SMALL = 1'b1;
  localparam int SEG_WORDS = 24;                  // 64-bit words per segment

  localparam logic [47:0] BOX_MAC = 48'h02_00_00_00_00_01;
  localparam logic [31:0] BOX_IP  = 32'hC0A8_0001;
  localparam logic [47:0] CL_MAC  = 48'h0A_0B_0C_0D_0E_0F;
  localparam logic [31:0] CL_IP   = 32'h0A00_0002;
  localparam logic [15:0] CL_UDP  = 16'd40000;
  localparam port_mask_t  CL_PORT = 4'b0100;

  logic clk = 0, icap_clk = 0, rst_n = 0, icap_rst_n = 0;
  logic s_valid = 0, s_ready, m_valid, m_ready = 1;
  beat_t s_beat = '0, m_beat;
  logic icap_ce_n, icap_wr_n, icap_busy = 0;
  logic [31:0] icap_i;
  algo_e prm_algo;
  logic prm_init, reconfiguring;
  logic [31:0] n_bit_pkts, n_data_pkts, n_bypass_pkts, n_reconfigs;
  logic [31:0] n_acks_marked, n_acks_unmarked, n_icap_words;
  int n_words, n_configs;
  int checks = 0, failures = 0;

  if (SMALL) begin : g_dut
    rrbox_core #(.BIT_FIFO_DEPTH(64)) dut (.*);
  end else begin : g_dut
    rrbox_core dut (.*);
  end

  icap_model #(.INITIAL(ALG_HUB)) u_icap (
    .clk(icap_clk), .icap_ce_n, .icap_wr_n, .icap_i, .icap_busy,
    .prm_algo, .n_words, .n_configs);

  always #5  clk = ~clk;        // 100 MHz packet clock
  always #10 icap_clk = ~icap_clk;  // 50 MHz reconfiguration clock

  // ---------------- mechanism counters ----------------
  int m_dup = 0, m_ooo = 0, m_full = 0, m_bypass = 0, m_init = 0, m_tx_stall = 0,
      m_busy_hold = 0, m_rx_stall = 0, m_foreign = 0, m_hub = 0, m_loop = 0, m_switch = 0,
      m_switch_learned = 0;
  always @(posedge clk) begin
    if (prm_init) m_init++;
    if (m_valid && !m_ready) m_tx_stall++;
    if (s_valid && !s_ready) m_rx_stall++;
  end
  always @(posedge icap_clk) if (!icap_ce_n && icap_busy) m_busy_hold++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- output monitor ----------------
  typedef struct { bytes_t b; port_mask_t port; } frame_t;
  frame_t acks[$], datas[$];
  bytes_t cur;
  bit random_ready = 1;
  always @(negedge clk) m_ready = !random_ready || ($urandom_range(0, 4) != 0);
  always @(posedge clk) if (m_valid && m_ready) begin
    for (int j = 0; j < 8; j++) if (m_beat.tkeep[7-j]) cur.push_back(m_beat.tdata[63-8*j -: 8]);
    if (m_beat.tlast) begin
      frame_t f;
      f.b = cur; f.port = m_beat.tuser;
      if (cur.size() >= 48 && {cur[34], cur[35]} == 16'd5000 && {cur[46], cur[47]} == PT_ACK)
        acks.push_back(f);
      else
        datas.push_back(f);
      cur.delete();
    end
  end

  // ---------------- receive driver ----------------
  task automatic send_frame(bytes_t q, port_mask_t port);
    beats_t b = pkt_to_beats(q, port);
    foreach (b[i]) begin
      @(negedge clk); s_valid = 1; s_beat = b[i];
      @(posedge clk);
      while (!s_ready) @(posedge clk);
    end
    @(negedge clk) s_valid = 0;
  endtask

  // Send a data frame and check that it comes out unchanged on expect_ports.
  task automatic data_check(logic [47:0] dmac, logic [47:0] smac, port_mask_t in_port,
                            port_mask_t expect_ports, string what);
    bytes_t q = data_packet(dmac, smac, 64 + $urandom_range(0, 40), 8'($urandom));
    int t = 0;
    datas.delete();
    send_frame(q, in_port);
    while (datas.size() == 0 && t < 2000) begin @(posedge clk); t++; end
    check(datas.size() == 1, {what, ": frame forwarded"});
    if (datas.size() > 0) begin
      check(datas[0].b == q, {what, ": frame unchanged"});
      check(datas[0].port == expect_ports, $sformatf("%s: ports %b expected %b", what, datas[0].port, expect_ports));
    end
    datas.delete();
  endtask

  // icap_busy changes away from the configuration clock edge
  task automatic set_busy(logic v);
    @(negedge icap_clk) icap_busy = v;
  endtask

  // ---------------- client ----------------
  task automatic send_bit(logic [15:0] ptype, int seg, logic [63:0] w[$], output bit marked);
    int t = 0;
    acks.delete();
    send_frame(bit_packet(BOX_MAC, CL_MAC, CL_IP, BOX_IP, CL_UDP, 16'd5000, 32'h1, ptype, 16'(seg), w), CL_PORT);
    while (acks.size() == 0 && t < 5000) begin @(posedge clk); t++; end
    check(acks.size() == 1, $sformatf("ack for segment %0d", seg));
    marked = 1'b0;
    if (acks.size() > 0) begin
      bytes_t a = acks[0].b;
      check({a[0], a[1], a[2], a[3], a[4], a[5]} == CL_MAC && {a[30], a[31], a[32], a[33]} == CL_IP &&
            {a[36], a[37]} == CL_UDP && acks[0].port == CL_PORT, "ack addressed to client");
      check({a[48], a[49]} == 16'(seg), "ack segment number");
      check({a[24], a[25]} == ref_ip_checksum(a), "ack IP checksum");
      marked = (a[50] == 8'd1);
    end
    acks.delete();
  endtask

  // Build a toy partial bitstream: sync, module id, body, desync.
  function automatic void make_bitstream(algo_e id, int body, ref logic [31:0] bs[$]);
    bs.delete();
    bs.push_back(32'hFFFF_FFFF);
    bs.push_back(32'hAA99_5566);
    bs.push_back(32'(id));
    for (int i = 0; i < body; i++) bs.push_back($urandom);
    bs.push_back(32'h3000_8001);
    bs.push_back(32'h0000_000D);
    if (bs.size() % 2) bs.push_back(32'h2000_0000);   // NOOP pad to 64 bits
  endfunction

  // Transfer a bitstream; hooks: a segment to send twice, a segment n_before
  // which an out-of-order one is tried, a segment after which a data frame
  // is sent, a segment after which the ICAP is released.
  task automatic transfer(logic [31:0] bs[$], int dup_seg, int ooo_seg, int data_seg, int release_seg);
    logic [63:0] segs[$][$];
    logic [63:0] w[$];
    bit marked;
    int nseg;
    for (int i = 0; i < bs.size(); i += 2) begin
      w.push_back({bs[i], bs[i+1]});
      if (w.size() == SEG_WORDS || i + 2 >= bs.size()) begin segs.push_back(w); w.delete(); end
    end
    nseg = segs.size();
    for (int s = 0; s < nseg; s++) begin
      if (s == ooo_seg && s + 1 < nseg) begin
        send_bit(PT_SEGMENT, s + 1, segs[s + 1], marked);
        check(!marked, "out-of-order segment unmarked");
        if (!marked) m_ooo++;
      end
      do begin
        send_bit(PT_SEGMENT, s, segs[s], marked);
        if (!marked) begin
          m_full++;
          set_busy(1'b0);            // let the port drain, then resend
          repeat (200) @(posedge clk);
        end
      end while (!marked);
      if (s == dup_seg) begin
        send_bit(PT_SEGMENT, s, segs[s], marked);
        check(marked, "repeated segment marked");
        if (marked) m_dup++;
      end
      if (s == data_seg) begin
        check(reconfiguring, "reconfiguring during transfer");
        data_check(48'h02_00_00_00_00_BB, 48'h02_00_00_00_00_AA, 4'b0001, 4'b1110, "bypass during transfer");
        m_bypass++;
      end
      if (s == release_seg) set_busy(1'b0);
    end
    send_bit(PT_TERM, nseg, '{}, marked);
    check(marked, "termination marked");
  endtask

  task automatic wait_reconfig(int n_before);
    int t = 0;
    while ((n_reconfigs == 32'(n_before) || reconfiguring) && t < 100000) begin @(posedge clk); t++; end
    check(n_reconfigs == 32'(n_before + 1), "reconfiguration completed");
  endtask

  task automatic compare_icap(logic [31:0] bs[$], int w0);
    check(u_icap.words.size() == w0 + bs.size(),
          $sformatf("ICAP words %0d expected %0d", u_icap.words.size(), w0 + bs.size()));
    foreach (bs[i]) if (w0 + i < u_icap.words.size())
      check(u_icap.words[w0 + i] == bs[i], $sformatf("ICAP word %0d", i));
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] bs[$];
    int w0;
    // a reset edge at time 1 clears every flop before the first clock
    #1 rst_n = 1; icap_rst_n = 1;
    #1 rst_n = 0; icap_rst_n = 0;
    repeat (4) @(posedge icap_clk);
    rst_n = 1; icap_rst_n = 1;
    repeat (4) @(posedge clk);

    // 1. initial hub module
    data_check(48'h02_00_00_00_00_BB, 48'h02_00_00_00_00_AA, 4'b0001, 4'b1110, "hub");
    m_hub++;

    // 2. load loopback: repeated segment 1, out-of-order try n_before 2,
    //    data frame after segment 0
    make_bitstream(ALG_LOOPBACK, 150, bs);
    w0 = u_icap.words.size();
    transfer(bs, 1, 2, 0, -1);
    wait_reconfig(0);
    compare_icap(bs, w0);
    check(prm_algo == ALG_LOOPBACK, "loopback configured");
    data_check(48'h02_00_00_00_00_BB, 48'h02_00_00_00_00_AA, 4'b0100, 4'b0100, "loopback");
    m_loop++;

    // 3. load switch with the ICAP held busy so Bit_fifo fills
    make_bitstream(ALG_SWITCH, 200, bs);
    w0 = u_icap.words.size();
    set_busy(1'b1);
    transfer(bs, -1, -1, -1, 5);
    set_busy(1'b0);
    wait_reconfig(1);
    compare_icap(bs, w0);
    check(prm_algo == ALG_SWITCH, "switch configured");

    // 4. learning switch and a foreign bitstream packet
    data_check(48'h02_00_00_00_00_BB, 48'h02_00_00_00_00_AA, 4'b0001, 4'b1110, "switch unknown");
    data_check(48'h02_00_00_00_00_AA, 48'h02_00_00_00_00_BB, 4'b0010, 4'b0001, "switch learned");
    data_check(48'h02_00_00_00_00_BB, 48'h02_00_00_00_00_AA, 4'b0001, 4'b0010, "switch learned back");
    m_switch++; m_switch_learned++;
    begin
      bytes_t q = bit_packet(BOX_MAC, CL_MAC, CL_IP, BOX_IP, CL_UDP, 16'd5000, 32'h7, PT_SEGMENT, 16'd0, '{64'h1, 64'h2});
      int t = 0;
      datas.delete();
      send_frame(q, 4'b0001);
      while (datas.size() == 0 && t < 2000) begin @(posedge clk); t++; end
      check(datas.size() == 1 && datas[0].b == q && datas[0].port == 4'b1110,
            "bitstream packet for another device forwarded as data (flooded)");
      check(!reconfiguring, "foreign bitstream did not start a reconfiguration");
      m_foreign++;
    end

    // statistics
    check(n_reconfigs == 2 && n_configs == 2, "two reconfigurations");
    check(n_icap_words == 32'(u_icap.words.size()), $sformatf("ICAP word counter %0d model %0d", n_icap_words, u_icap.words.size()));
    check(n_bypass_pkts >= 1, "bypass counter");
    check(n_acks_unmarked == 32'(m_ooo + m_full), "unmarked ack counter");

    $display("mechanisms: dup=%0d ooo=%0d full=%0d bypass=%0d init=%0d tx_stall=%0d rx_stall=%0d busy_hold=%0d foreign=%0d hub=%0d loop=%0d switch=%0d",
             m_dup, m_ooo, m_full, m_bypass, m_init, m_tx_stall, m_rx_stall, m_busy_hold, m_foreign, m_hub, m_loop, m_switch);
    check(m_dup > 0, "repeated segment happened");
    check(m_ooo > 0, "out-of-order segment happened");
    check(m_full > 0, "Bit_fifo full refusal happened");
    check(m_bypass > 0, "bypass forwarding happened");
    check(m_init > 0, "module initialisation happened");
    check(m_tx_stall > 0, "transmit back-pressure happened");
    check(m_busy_hold > 0, "ICAP busy hold happened");
    check(m_foreign > 0 && m_hub > 0 && m_loop > 0 && m_switch > 0, "all algorithms exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
