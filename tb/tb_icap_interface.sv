// tb_icap_interface: preloads a Bit_fifo stand-in with 64-bit words and checks
// that the ICAP receives them as 32-bit words, upper half first, in order,
// one word per clock (a preloaded block of N words takes 2N clocks), that a
// word is held while icap_busy is high, that the word counter matches, and
// that the BITSWAP variant reverses the bits of every byte.
module tb_icap_interface;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic f_wr = 0, f_full, bf_rd, bf_empty;
  logic [63:0] f_wdata = '0, bf_data;
  logic icap_ce_n, icap_wr_n, icap_busy = 0, idle;
  logic [31:0] icap_i, words;

  sync_fifo #(.WIDTH(64), .DEPTH(64)) u_f (
    .clk, .rst_n, .wr_en(f_wr), .wr_data(f_wdata), .full(f_full),
    .rd_en(bf_rd), .rd_data(bf_data), .empty(bf_empty), .count());

  icap_interface #(.BITSWAP(1'b0)) dut (.*);

  // bit-swapping variant on the same FIFO output, not popping it
  logic s_ce_n, s_wr_n, s_idle, s_rd;
  logic [31:0] s_i, s_words;
  icap_interface #(.BITSWAP(1'b1)) dut_swap (
    .clk, .rst_n, .bf_rd(s_rd), .bf_data, .bf_empty,
    .icap_ce_n(s_ce_n), .icap_wr_n(s_wr_n), .icap_i(s_i), .icap_busy,
    .idle(s_idle), .words(s_words));

  always #10 clk = ~clk;

  logic [31:0] got[$], got_swap[$];
  always @(posedge clk) begin
    if (!icap_ce_n && !icap_busy) begin
      got.push_back(icap_i);
      if (icap_wr_n) begin failures++; $display("FAIL write strobe high during write"); end
    end
    if (!s_ce_n && !icap_busy && got_swap.size() < 1) got_swap.push_back(s_i);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(int n, int base);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); f_wr = 1; f_wdata = {32'(base + 2*i), 32'(base + 2*i + 1)};
    end
    @(negedge clk); f_wr = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    rst_n = 0;
    repeat (3) @(posedge clk);
    check(idle && icap_ce_n, "idle after reset");
    // hold the ICAP busy while preloading so both instances see the same data
    icap_busy = 1;
    f_wdata = 64'h0180_F00F_8001_0203;
    @(negedge clk); rst_n = 1; f_wr = 1;
    @(negedge clk); f_wr = 0;
    repeat (3) @(negedge clk);
    icap_busy = 0;
    repeat (4) @(negedge clk);
    check(got.size() == 2 && got[0] == 32'h0180_F00F && got[1] == 32'h8001_0203, "first word split upper/lower");
    check(got_swap.size() == 1 && got_swap[0] == 32'h8001_0FF0, $sformatf("bit swap %h", got_swap[0]));
    got.delete();
    // throughput: 16 preloaded words leave in 32 clocks
    icap_busy = 1;
    load(16, 32'h100);
    @(negedge clk); icap_busy = 0;
    t0 = $time;
    while (got.size() < 32) @(posedge clk);
    t1 = $time;
    check((t1 - t0) / 20 <= 33, $sformatf("32 ICAP words took %0d clocks", (t1 - t0) / 20));
    foreach (got[i]) check(got[i] == 32'(32'h100 + i), $sformatf("word %0d = %h", i, got[i]));
    got.delete();
    // random busy: order must survive
    fork
      load(20, 32'h200);
      repeat (200) begin @(negedge clk); icap_busy = ($urandom_range(0, 2) == 0); end
    join
    icap_busy = 0;
    repeat (50) @(negedge clk);
    check(got.size() == 40, $sformatf("%0d words under busy", got.size()));
    foreach (got[i]) check(got[i] == 32'(32'h200 + i), $sformatf("busy word %0d = %h", i, got[i]));
    check(words == 32'(2 + 32 + 40), $sformatf("word counter %0d", words));
    check(idle, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
