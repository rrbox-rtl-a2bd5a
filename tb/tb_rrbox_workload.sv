// tb_rrbox_workload: remote reconfiguration with partial bitstreams of the
// four sizes the design was measured with (255, 334, 512 and 684 kB,
// 1 kB = 1000 bytes), through an rrbox_core with all default parameters.
//
// The client model sends each bitstream in segments of SEG_BYTES bytes of
// bitstream per packet (a full 1512-byte Ethernet frame), paced at the
// 1 Gbit/s line rate including preamble and inter-frame gap, waits for each
// acknowledgement (itself paced at line rate on the way back) before the
// next segment, and closes with a termination packet. The reconfiguration
// time runs from the first segment to the end of the module
// initialisation. The test checks that every ICAP word matches the
// bitstream, that each load configures the expected module, and that the
// reconfiguration throughput is at least the 352.12 Mbit/s reported for
// the hardware (a client with no software delay should do better) and below
// the line rate. The ICAP Interface (50 MHz x 32 bit = 1.6 Gbit/s) must
// never be the bottleneck, so Bit_fifo must never refuse a segment.
module tb_rrbox_workload;
  import rrbox_pkg::*;
  import rrbox_tb_pkg::*;

  localparam int SEG_BYTES = 1456;                   // 182 words of 64 bits
  localparam int SIZES_KB[4] = '{255, 334, 512, 684};

  localparam logic [47:0] BOX_MAC = 48'h02_00_00_00_00_01;
  localparam logic [31:0] BOX_IP  = 32'hC0A8_0001;
  localparam logic [47:0] CL_MAC  = 48'h0A_0B_0C_0D_0E_0F;
  localparam logic [31:0] CL_IP   = 32'h0A00_0002;
  localparam logic [15:0] CL_UDP  = 16'd40000;
  localparam port_mask_t  CL_PORT = 4'b0001;

  logic clk = 0, icap_clk = 0, rst_n = 1, icap_rst_n = 1;
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

  rrbox_core dut (.*);

  icap_model #(.INITIAL(ALG_HUB)) u_icap (
    .clk(icap_clk), .icap_ce_n, .icap_wr_n, .icap_i, .icap_busy,
    .prm_algo, .n_words, .n_configs);

  always #5  clk = ~clk;
  always #10 icap_clk = ~icap_clk;

  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // acknowledgement monitor: segment number and marked flag of each ack
  int ack_seg[$];
  bit ack_marked[$];
  logic [7:0] cur[$];
  always @(posedge clk) if (m_valid && m_ready) begin
    for (int j = 0; j < 8; j++) if (m_beat.tkeep[7-j]) cur.push_back(m_beat.tdata[63-8*j -: 8]);
    if (m_beat.tlast) begin
      if (cur.size() >= 52 && {cur[46], cur[47]} == PT_ACK) begin
        ack_seg.push_back({cur[48], cur[49]});
        ack_marked.push_back(cur[50] == 8'd1);
      end
      cur.delete();
    end
  end

  // line-rate pacing in tenths of a 10 ns clock: 8 bytes = 6.4 clocks
  longint credit = 0;
  task automatic pace(int bytes);
    while (cyc * 10 < credit) @(posedge clk);
    credit = cyc * 10 + longint'(bytes) * 8;
  endtask

  task automatic send_frame(bytes_t q);
    beats_t b = pkt_to_beats(q, CL_PORT);
    foreach (b[i]) begin
      pace(8);
      @(negedge clk); s_valid = 1; s_beat = b[i];
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk) s_valid = 0;
    end
    credit += 20 * 8;   // preamble and inter-frame gap
  endtask

  // Send one bitstream packet and wait for its acknowledgement, which also
  // crosses the link (84 bytes on the wire).
  task automatic send_bit(logic [15:0] ptype, int seg, logic [63:0] w[$], output bit marked);
    int n0 = ack_seg.size();
    send_frame(bit_packet(BOX_MAC, CL_MAC, CL_IP, BOX_IP, CL_UDP, 16'd5000, 32'h1, ptype, 16'(seg), w));
    while (ack_seg.size() == n0) @(posedge clk);
    repeat (68) @(posedge clk);   // the acknowledgement's own wire time
    marked = ack_marked[n0];
    check(ack_seg[n0] == seg, $sformatf("ack for segment %0d", seg));
  endtask

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 0; icap_rst_n = 0;
    repeat (4) @(posedge icap_clk);
    rst_n = 1; icap_rst_n = 1;
    repeat (4) @(posedge clk);
    foreach (SIZES_KB[k]) begin
      automatic logic [31:0] bs[$];
      automatic logic [63:0] w[$];
      automatic int nbytes = SIZES_KB[k] * 1000;
      automatic int nwords = nbytes / 4;
      automatic int w0 = u_icap.words.size();
      automatic int seg = 0, refused = 0;
      automatic int start_r = int'(n_reconfigs);
      automatic algo_e id = algo_e'((k % 3 == 0) ? ALG_LOOPBACK : (k % 3 == 1) ? ALG_SWITCH : ALG_HUB);
      automatic longint t0, t1;
      automatic real mbps;
      automatic bit marked;
      // toy bitstream of nwords 32-bit words: sync, module id, body, desync
      bs.push_back(32'hAA99_5566);
      bs.push_back(32'(id));
      while (bs.size() < nwords - 2) bs.push_back($urandom);
      bs.push_back(32'h3000_8001);
      bs.push_back(32'h0000_000D);
      t0 = cyc;
      for (int i = 0; i < bs.size(); i += 2) begin
        w.push_back({bs[i], bs[i+1]});
        if (w.size() * 8 == SEG_BYTES || i + 2 >= bs.size()) begin
          do begin
            send_bit(PT_SEGMENT, seg, w, marked);
            if (!marked) refused++;
          end while (!marked);
          seg++;
          w.delete();
        end
      end
      send_bit(PT_TERM, seg, '{}, marked);
      check(marked, "termination marked");
      while (n_reconfigs == 32'(start_r)) @(posedge clk);
      t1 = cyc;
      mbps = real'(nbytes) * 8.0 / (real'(t1 - t0) * 10.0e-9) / 1.0e6;
      $display("bitstream %0d kB: %0d segments, reconfiguration %0.3f ms, %0.1f Mbit/s",
               SIZES_KB[k], seg, real'(t1 - t0) * 10.0e-6, mbps);
      check(refused == 0, $sformatf("%0d segments refused", refused));
      check(u_icap.words.size() == w0 + bs.size(), "ICAP word count");
      for (int i = 0; i < bs.size(); i++)
        if (u_icap.words[w0 + i] != bs[i]) begin
          check(0, $sformatf("ICAP word %0d", i));
          break;
        end
      check(1, "ICAP words compared");
      check(prm_algo == id, "module configured");
      check(mbps >= 352.12 && mbps < 1000.0, $sformatf("throughput %0.1f Mbit/s", mbps));
      u_icap.words.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
