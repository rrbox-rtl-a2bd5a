// tb_bit_fifo: checks the segment-release behaviour of Bit_fifo across the
// 100 MHz write and 50 MHz read clocks: marked but uncommitted data stays
// invisible, committed data arrives complete and in order, rolled-back data
// never arrives, full appears at exactly DEPTH outstanding words, and
// drained reports when the reader has taken everything committed.
module tb_bit_fifo;
  localparam int D = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, full, mark = 0, rollback = 0, commit = 0, drained;
  logic [63:0] wr_data = '0, rd_data;
  logic rd_en, empty;
  bit   rd_go = 0;
  int checks = 0, failures = 0;
  logic [63:0] expq[$], got[$];

  bit_fifo #(.WIDTH(64), .DEPTH(D)) dut (.*);

  always #5  wclk = ~wclk;
  always #10 rclk = ~rclk;

  assign rd_en = rd_go && !empty;
  always @(posedge rclk) if (rd_en) got.push_back(rd_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [63:0] d);
    @(negedge wclk); wr_en = 1; wr_data = d;
    @(posedge wclk); #1 wr_en = 0;
  endtask
  task automatic pulse(ref logic s);
    @(negedge wclk); s = 1;
    @(posedge wclk); #1 s = 0;
  endtask

  task automatic expect_got(string what);
    check(got.size() == expq.size(), $sformatf("%s: got %0d words, expected %0d", what, got.size(), expq.size()));
    foreach (expq[i]) if (i < got.size()) check(got[i] == expq[i], $sformatf("%s word %0d", what, i));
    got.delete(); expq.delete();
  endtask

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    rd_go = 1;
    // 1: a marked segment is not visible before commit
    for (int i = 0; i < 8; i++) begin wr(64'hA000 + i); expq.push_back(64'hA000 + i); end
    pulse(mark);
    repeat (40) @(posedge rclk);
    check(got.size() == 0, "uncommitted data visible");
    check(drained, "drained with nothing committed");
    // 2: commit releases it
    pulse(commit);
    #1 check(!drained, "drained right after commit");
    repeat (40) @(posedge rclk);
    expect_got("first segment");
    check(drained, "drained after reading");
    // 3: a rolled-back segment never appears
    for (int i = 0; i < 4; i++) begin wr(64'hC000 + i); expq.push_back(64'hC000 + i); end
    pulse(mark);
    for (int i = 0; i < 5; i++) wr(64'hB000 + i);
    pulse(rollback);
    pulse(commit);
    for (int i = 0; i < 3; i++) begin wr(64'hE000 + i); expq.push_back(64'hE000 + i); end
    pulse(mark);
    pulse(commit);
    repeat (40) @(posedge rclk);
    expect_got("after rollback");
    // 4: full at exactly DEPTH outstanding words
    rd_go = 0;
    for (int i = 0; i < D; i++) begin
      check(!full, $sformatf("full too early at %0d", i));
      wr(64'hD000 + i); expq.push_back(64'hD000 + i);
    end
    #1 check(full, "not full at DEPTH");
    pulse(mark);
    pulse(commit);
    rd_go = 1;
    repeat (60) @(posedge rclk);
    expect_got("full FIFO");
    check(!full, "full after draining");
    check(drained, "drained at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
