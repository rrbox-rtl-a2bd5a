// tb_ack_generator: turns three status entries (marked, unmarked, marked
// termination) into acknowledgements under random back-pressure and checks
// every field of each 64-byte frame against the entry, including an IPv4
// header checksum computed here byte by byte, the output port, and the
// marked/unmarked counters.
module tb_ack_generator;
  import rrbox_pkg::*;
  import rrbox_tb_pkg::*;

  localparam logic [47:0] MYMAC = 48'h02_11_22_33_44_55;
  localparam logic [31:0] MYIP  = 32'hC0A8_0101;

  logic clk = 0, rst_n = 0;
  logic s_wr = 0, s_full, st_rd, st_empty;
  bstat_t s_wdata = '0, st_data;
  logic m_valid, m_ready = 0;
  beat_t m_beat;
  logic [31:0] n_marked, n_unmarked;
  int checks = 0, failures = 0;

  ack_generator #(.MY_MAC(MYMAC), .MY_IP(MYIP), .DEVICE_ID(32'hCAFE_0042),
                  .BIT_UDP_PORT(16'd5000)) dut (.*);
  sync_fifo #(.WIDTH(BSTAT_W), .DEPTH(4)) u_st (
    .clk, .rst_n, .wr_en(s_wr), .wr_data(s_wdata), .full(s_full),
    .rd_en(st_rd), .rd_data(st_data), .empty(st_empty), .count());

  always #5 clk = ~clk;
  always @(negedge clk) m_ready = ($urandom_range(0, 3) != 0);

  bytes_t frames[$];
  port_mask_t ports[$];
  bytes_t cur;
  always @(posedge clk) if (m_valid && m_ready) begin
    for (int j = 0; j < 8; j++) if (m_beat.tkeep[7-j]) cur.push_back(m_beat.tdata[63-8*j -: 8]);
    if (m_beat.tlast) begin frames.push_back(cur); ports.push_back(m_beat.tuser); cur.delete(); end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bstat_t mk(bit marked, bit term, int seg, port_mask_t p, logic [47:0] mac,
                                logic [31:0] ip, logic [15:0] udp);
    bstat_t s;
    s.marked = marked; s.term = term; s.seg = 16'(seg); s.port = p; s.mac = mac; s.ip = ip; s.udp = udp;
    return s;
  endfunction

  bstat_t ents[3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ents[0] = mk(1, 0, 12, 4'b0010, 48'h0A_0B_0C_0D_0E_0F, 32'h0A00_0002, 16'd40000);
    ents[1] = mk(0, 0, 13, 4'b0010, 48'h0A_0B_0C_0D_0E_0F, 32'h0A00_0002, 16'd40000);
    ents[2] = mk(1, 1, 300, 4'b1000, 48'h0A_0B_0C_0D_0E_10, 32'hAC10_FE01, 16'd1234);
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ents[i]) begin @(negedge clk); s_wr = 1; s_wdata = ents[i]; end
    @(negedge clk); s_wr = 0;
    repeat (100) @(negedge clk);
    check(frames.size() == 3, $sformatf("%0d frames", frames.size()));
    foreach (frames[i]) if (i < 3) begin
      automatic bytes_t f = frames[i];
      automatic bstat_t e = ents[i];
      check(f.size() == 64, $sformatf("ack %0d length %0d", i, f.size()));
      if (f.size() == 64) begin
        check({f[0], f[1], f[2], f[3], f[4], f[5]} == e.mac, "dst mac");
        check({f[6], f[7], f[8], f[9], f[10], f[11]} == MYMAC, "src mac");
        check({f[12], f[13]} == 16'h0800 && f[14] == 8'h45 && f[23] == 8'd17, "IPv4/UDP");
        check({f[16], f[17]} == 16'd50, "IP total length");
        check({f[24], f[25]} == ref_ip_checksum(f), $sformatf("ack %0d IP checksum %h", i, {f[24], f[25]}));
        check({f[26], f[27], f[28], f[29]} == MYIP, "src ip");
        check({f[30], f[31], f[32], f[33]} == e.ip, "dst ip");
        check({f[34], f[35]} == 16'd5000 && {f[36], f[37]} == e.udp, "UDP ports");
        check({f[38], f[39]} == 16'd30, "UDP length");
        check({f[42], f[43], f[44], f[45]} == 32'hCAFE_0042, "device id");
        check({f[46], f[47]} == PT_ACK, "type ack");
        check({f[48], f[49]} == e.seg, "segment");
        check(f[50] == 8'(e.marked) && f[51] == 8'(e.term), $sformatf("ack %0d status bytes", i));
        check(ports[i] == e.port, "output port");
      end
    end
    check(n_marked == 2 && n_unmarked == 1, "counters");
    check(st_empty, "status FIFO emptied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
