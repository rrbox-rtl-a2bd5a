// tb_header_processor: checks the forwarding decision of the hub, loopback
// and learning-switch algorithms: flooding of unknown, broadcast and
// multicast destinations, learning and moving of source addresses, dropping
// of packets whose destination lies behind the input port, round-robin
// eviction from a 4-entry table, clearing by init, and waiting while
// Dst_port_fifo is full.
module tb_header_processor;
  import rrbox_pkg::*;

  logic clk = 0, rst_n = 0, init = 0, start = 0, done, dp_wr, dp_full = 0;
  algo_e algo = ALG_HUB;
  hdr_t hdr = '0;
  port_mask_t dp_data;
  int checks = 0, failures = 0;

  header_processor #(.TABLE_SIZE(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic decide(logic [47:0] smac, logic [47:0] dmac, port_mask_t sp,
                        port_mask_t expd, string what);
    hdr_t h = '0;
    h.src_mac = smac; h.dst_mac = dmac; h.src_port = sp;
    @(negedge clk); hdr = h; start = 1;
    @(negedge clk); start = 0;
    while (!dp_wr) @(negedge clk);
    check(dp_data == expd, $sformatf("%s: got %b expected %b", what, dp_data, expd));
    @(negedge clk);
  endtask

  localparam logic [47:0] A = 48'h02_00_00_00_00_0A, B = 48'h02_00_00_00_00_0B,
                          C = 48'h02_00_00_00_00_0C, BC = 48'hFF_FF_FF_FF_FF_FF,
                          MC = 48'h01_00_5E_00_00_01;

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
    algo = ALG_HUB;
    decide(A, B, 4'b0001, 4'b1110, "hub from port 0");
    decide(A, B, 4'b0100, 4'b1011, "hub from port 2");
    algo = ALG_LOOPBACK;
    decide(A, B, 4'b0100, 4'b0100, "loopback port 2");
    decide(A, B, 4'b1000, 4'b1000, "loopback port 3");
    algo = ALG_SWITCH;
    decide(A, B, 4'b0001, 4'b1110, "switch unknown dst floods");
    decide(B, A, 4'b0100, 4'b0001, "switch learned A on port 0");
    decide(A, B, 4'b0001, 4'b0100, "switch learned B on port 2");
    decide(C, BC, 4'b0010, 4'b1101, "switch broadcast floods");
    decide(C, MC, 4'b0010, 4'b1101, "switch multicast floods");
    decide(A, C, 4'b1000, 4'b0010, "switch A moved to port 3, C on port 1");
    decide(B, A, 4'b0100, 4'b1000, "switch follows A to port 3");
    decide(C, A, 4'b1000, 4'b0000, "switch drops when dst is behind input port");
    // table holds A, B, C; add two more to evict the oldest (A)
    decide(48'h02_00_00_00_00_0D, B, 4'b0010, 4'b0100, "switch D");
    decide(48'h02_00_00_00_00_0E, B, 4'b0010, 4'b0100, "switch E evicts A");
    decide(B, A, 4'b0100, 4'b1011, "switch A evicted floods");
    // init clears the table
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    decide(A, B, 4'b0001, 4'b1110, "switch after init floods");
    // Dst_port_fifo full: no write until it has room
    dp_full = 1;
    begin
      hdr_t h = '0;
      h.src_mac = B; h.dst_mac = A; h.src_port = 4'b0010;
      @(negedge clk); hdr = h; start = 1;
      @(negedge clk); start = 0;
      repeat (5) begin check(!dp_wr, "write while full"); @(negedge clk); end
      dp_full = 0;
      #1 check(dp_wr && dp_data == 4'b0001, "write after full");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
