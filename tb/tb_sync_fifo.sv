// tb_sync_fifo: random writes and reads against a queue model; checks data
// order, full and count every clock, that empty is low whenever more than
// one entry is held (one clock of write-to-read latency is allowed), and
// sustained one-per-clock throughput. Writes when full and reads when empty
// are not driven, to respect the FIFO's assertions.
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // the output register adds one clock before a written entry shows
      check(!empty || model.size() <= 1, "empty with more than one entry");
      check(!(model.size() == 0) || empty, "not empty with no entry");
      check(full == (model.size() == D), "full");
      check(count == ($clog2(D)+1)'(model.size()), "count");
      if (!empty) check(rd_data == model[0], $sformatf("data %h exp %h", rd_data, model[0]));
      // phases: fill-biased, drain-biased, balanced
      wr_en = !full && ($urandom_range(0, 99) < ((i / 500) % 3 == 0 ? 80 : (i / 500) % 3 == 1 ? 20 : 50));
      rd_en = !empty && ($urandom_range(0, 99) < ((i / 500) % 3 == 0 ? 20 : (i / 500) % 3 == 1 ? 80 : 50));
      wr_data = W'($urandom);
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    // throughput: with the FIFO half full, a read and a write every clock
    // for 100 clocks must never see it empty or full
    wr_en = 0; rd_en = 0;
    while (model.size() > 0) begin
      @(negedge clk); rd_en = !empty;
      @(posedge clk); #1 if (rd_en) void'(model.pop_front());
    end
    @(negedge clk); rd_en = 0;
    for (int i = 0; i < D / 2; i++) begin
      @(negedge clk); wr_en = 1; wr_data = W'(i);
      @(posedge clk); #1 model.push_back(wr_data);
    end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      check(!empty && !full, "streaming stalled");
      if (!empty) check(rd_data == model[0], "streaming data");
      wr_en = !full; rd_en = !empty; wr_data = W'($urandom);
      @(posedge clk); #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
