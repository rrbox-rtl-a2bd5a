// tb_data_packet_handler: forwards three packets under random receiver
// back-pressure, the middle one with a zero port mask; checks that the
// first and last arrive beat for beat with tuser set to their decisions,
// that the dropped one is removed from In_fifo without appearing, and that
// done pulses once per packet.
module tb_data_packet_handler;
  import rrbox_pkg::*;
  import rrbox_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic dp_wr = 0, dp_rd, dp_full, dp_empty;
  port_mask_t dp_wdata = '0, dp_data;
  logic in_wr = 0, in_rd, in_full, in_empty;
  beat_t in_wdata = '0, in_data;
  logic m_valid, m_ready = 0;
  beat_t m_beat;
  int checks = 0, failures = 0, n_done = 0;

  data_packet_handler dut (.*);
  sync_fifo #(.WIDTH(BEAT_W), .DEPTH(64)) u_in (
    .clk, .rst_n, .wr_en(in_wr), .wr_data(in_wdata), .full(in_full),
    .rd_en(in_rd), .rd_data(in_data), .empty(in_empty), .count());
  sync_fifo #(.WIDTH(NPORTS), .DEPTH(4)) u_dp (
    .clk, .rst_n, .wr_en(dp_wr), .wr_data(dp_wdata), .full(dp_full),
    .rd_en(dp_rd), .rd_data(dp_data), .empty(dp_empty), .count());

  always #5 clk = ~clk;
  always @(negedge clk) m_ready = ($urandom_range(0, 2) != 0);

  beat_t got[$], expb[$];
  always @(posedge clk) begin
    if (m_valid && m_ready) got.push_back(m_beat);
    if (done) n_done++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic push(int len, byte unsigned tag, port_mask_t dst);
    beats_t b = pkt_to_beats(data_packet(48'h02_00_00_00_00_0B, 48'h02_00_00_00_00_0A, len, tag), 4'b0001);
    foreach (b[i]) begin
      @(negedge clk); in_wr = 1; in_wdata = b[i];
      if (dst != 0) begin beat_t x = b[i]; x.tuser = dst; expb.push_back(x); end
    end
    @(negedge clk); in_wr = 0; dp_wr = 1; dp_wdata = dst;
    @(negedge clk); dp_wr = 0;
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
    push(64, 8'h10, 4'b0101);
    push(100, 8'h20, 4'b0000);
    push(61, 8'h30, 4'b0010);
    for (int p = 0; p < 3; p++) begin
      automatic int n0 = n_done;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (n_done == n0) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(n_done == 3, "three packets done");
    check(in_empty && dp_empty, "FIFOs empty");
    check(got.size() == expb.size(), $sformatf("%0d beats out, expected %0d", got.size(), expb.size()));
    foreach (expb[i]) if (i < got.size()) check(got[i] == expb[i], $sformatf("beat %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
