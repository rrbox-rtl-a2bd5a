// tb_bitstream_packet_handler: plays a bitstream transfer with a resend, an
// out-of-order segment, a segment that meets a full Bit_fifo, and repeated
// and wrong termination packets. A model of Bit_fifo's mark / rollback /
// commit pointers rebuilds what the reader would see; the test checks that
// exactly segments 0, 1, 2 are released, in order and each once, that each
// is released only when the next segment (or the termination) arrives, and
// that every Bit_stat_fifo entry carries the expected marked flag, segment
// and client address.
module tb_bitstream_packet_handler;
  import rrbox_pkg::*;
  import rrbox_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0, done, active, reconf_start, term_seen;
  hdr_t hdr = '0;
  logic in_wr = 0, in_rd, in_full, in_empty;
  beat_t in_wdata = '0, in_data;
  logic bf_wr, bf_mark, bf_rollback, bf_commit;
  logic [63:0] bf_data;
  logic bf_full = 0;
  logic st_wr, st_full = 0;
  bstat_t st_data;
  int checks = 0, failures = 0;

  bitstream_packet_handler dut (.*);

  sync_fifo #(.WIDTH(BEAT_W), .DEPTH(64)) u_in (
    .clk, .rst_n, .wr_en(in_wr), .wr_data(in_wdata), .full(in_full),
    .rd_en(in_rd), .rd_data(in_data), .empty(in_empty), .count());

  always #5 clk = ~clk;

  // Bit_fifo model
  logic [63:0] spec[$], marked_q[$], released[$];
  int fill_limit = 1 << 30;   // bf_full rises after this many speculative words
  int n_wr = 0, n_commit = 0, n_rollback = 0, n_reconf = 0, n_term = 0;
  bstat_t st_got[$];
  always @(posedge clk) if (rst_n) begin
    if (bf_commit) begin released = {released, marked_q}; marked_q.delete(); n_commit++; end
    if (bf_wr) begin spec.push_back(bf_data); n_wr++; end
    if (bf_rollback) begin spec.delete(); n_rollback++; end
    if (bf_mark) begin marked_q = {marked_q, spec}; spec.delete(); end
    if (st_wr) st_got.push_back(st_data);
    if (reconf_start) n_reconf++;
    if (term_seen) n_term++;
  end
  always @(negedge clk) bf_full = (spec.size() >= fill_limit);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam logic [47:0] CMAC = 48'h0A_0B_0C_0D_0E_0F;
  localparam logic [31:0] CIP  = 32'h0A00_0002;

  function automatic logic [63:0] word(int seg, int i);
    return {32'(seg), 32'(i) ^ 32'h5A5A_0000};
  endfunction

  // Load one packet into In_fifo, start the handler, wait for done and
  // return its status entry.
  task automatic run(logic [15:0] ptype, int seg, int nwords, output bstat_t st);
    logic [63:0] w[$];
    beats_t b;
    hdr_t h;
    int n0 = st_got.size();
    for (int i = 0; i < nwords; i++) w.push_back(word(seg, i));
    b = pkt_to_beats(bit_packet(48'h02_00_00_00_00_01, CMAC, CIP, 32'hC0A8_0001,
                                16'd40000, 16'd5000, 32'h1, ptype, 16'(seg), w), 4'b0100);
    foreach (b[i]) begin
      @(negedge clk); in_wr = 1; in_wdata = b[i];
    end
    @(negedge clk); in_wr = 0;
    h = '0;
    h.kind = (ptype == PT_TERM) ? PKT_BIT_END : PKT_BIT_SEG;
    h.src_port = 4'b0100; h.src_mac = CMAC; h.src_ip = CIP; h.src_udp = 16'd40000;
    h.seg = 16'(seg); h.len_bytes = 16'(56 + 8 * nwords);
    hdr = h; start = 1;
    @(negedge clk); start = 0;
    while (st_got.size() == n0) @(negedge clk);
    st = st_got[n0];
    check(st.seg == 16'(seg) && st.mac == CMAC && st.ip == CIP && st.udp == 16'd40000 &&
          st.port == 4'b0100 && st.term == (ptype == PT_TERM), $sformatf("status fields seg %0d", seg));
    check(in_empty, $sformatf("packet of seg %0d fully consumed", seg));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bstat_t st;
    int w0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(PT_SEGMENT, 0, 5, st);
    check(st.marked, "seg0 marked");
    check(n_reconf == 1 && active, "transfer started");
    check(released.size() == 0, "seg0 held back");
    run(PT_SEGMENT, 1, 3, st);
    check(st.marked, "seg1 marked");
    check(released.size() == 5, "seg0 released by seg1");
    w0 = n_wr;
    run(PT_SEGMENT, 1, 3, st);
    check(st.marked, "resent seg1 marked");
    check(n_wr == w0, "resent seg1 not stored");
    run(PT_SEGMENT, 3, 3, st);
    check(!st.marked, "out-of-order seg3 unmarked");
    check(n_wr == w0, "seg3 not stored");
    fill_limit = 2;
    run(PT_SEGMENT, 2, 4, st);
    check(!st.marked, "seg2 unmarked when Bit_fifo full");
    check(n_rollback == 1, "rollback on full");
    check(released.size() == 8, "seg1 released by seg2");
    fill_limit = 1 << 30;
    run(PT_SEGMENT, 2, 4, st);
    check(st.marked, "resent seg2 marked");
    check(released.size() == 8, "seg2 held back");
    run(PT_TERM, 3, 0, st);
    check(st.marked, "termination marked");
    check(n_term == 1 && !active, "transfer ended");
    check(released.size() == 12, "seg2 released by termination");
    run(PT_TERM, 3, 0, st);
    check(st.marked, "repeated termination marked");
    run(PT_TERM, 5, 0, st);
    check(!st.marked, "wrong termination unmarked");
    check(n_term == 1, "one termination only");
    check(released.size() == 12, "released word count");
    for (int i = 0; i < 12; i++) begin
      automatic int s = (i < 5) ? 0 : (i < 8) ? 1 : 2;
      automatic int k = (i < 5) ? i : (i < 8) ? i - 5 : i - 8;
      if (i < released.size()) check(released[i] == word(s, k), $sformatf("released word %0d %h exp %h", i, released[i], word(s,k)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
