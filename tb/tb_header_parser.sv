// tb_header_parser: sends bitstream, termination, foreign-device, wrong-port,
// plain and very short packets, with random idle beats and FIFO-full
// back-pressure, and checks every Hdr_fifo entry field by field against the
// values the packets were built from, and that In_fifo receives every beat
// unchanged.
module tb_header_parser;
  import rrbox_pkg::*;
  import rrbox_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_ready;
  beat_t s_beat = '0;
  logic in_wr, in_full = 0, hdr_wr, hdr_full = 0;
  beat_t in_data;
  hdr_t hdr_data;
  int checks = 0, failures = 0;

  header_parser #(.DEVICE_ID(32'hCAFE_0042), .BIT_UDP_PORT(16'd5000)) dut (.*);

  always #5 clk = ~clk;

  beat_t sent[$], got_beats[$];
  hdr_t  exp_h[$], got_h[$];

  always @(posedge clk) begin
    if (in_wr) got_beats.push_back(in_data);
    if (hdr_wr) got_h.push_back(hdr_data);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(bytes_t q, port_mask_t port);
    beats_t b = pkt_to_beats(q, port);
    foreach (b[i]) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin s_valid = 0; @(negedge clk); end
      s_valid = 1; s_beat = b[i];
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      sent.push_back(b[i]);
    end
    @(negedge clk) s_valid = 0;
  endtask

  function automatic hdr_t mk(pkt_kind_e k, port_mask_t p, logic [47:0] d, logic [47:0] s,
                              logic [31:0] sip, logic [31:0] dip, logic [15:0] sp,
                              logic [15:0] dp, logic [15:0] seg, int len);
    hdr_t h;
    h.kind = k; h.src_port = p; h.dst_mac = d; h.src_mac = s; h.src_ip = sip; h.dst_ip = dip;
    h.src_udp = sp; h.dst_udp = dp; h.seg = seg; h.len_bytes = 16'(len);
    return h;
  endfunction

  // back-pressure: hold the FIFOs full now and then
  initial begin
    forever begin
      @(negedge clk);
      in_full  = ($urandom_range(0, 9) == 0);
      hdr_full = ($urandom_range(0, 19) == 0);
    end
  end
  int bp_seen = 0;
  always @(posedge clk) if (in_full || hdr_full) begin
    bp_seen++;
    checks++;
    if (s_ready) begin failures++; $display("FAIL s_ready while full"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] w[$];
    logic [47:0] cm = 48'h0A_0B_0C_0D_0E_0F, bm = 48'h02_00_00_00_00_01;
    bytes_t q;
    w = '{64'h1111_2222_3333_4444, 64'h5555_6666_7777_8888, 64'h9999_AAAA_BBBB_CCCC};
    repeat (3) @(posedge clk);
    rst_n = 1;

    q = bit_packet(bm, cm, 32'h0A00_0002, 32'hC0A8_0001, 16'd40000, 16'd5000, 32'hCAFE_0042, PT_SEGMENT, 16'd7, w);
    send(q, 4'b0010);
    exp_h.push_back(mk(PKT_BIT_SEG, 4'b0010, bm, cm, 32'h0A00_0002, 32'hC0A8_0001, 16'd40000, 16'd5000, 16'd7, 80));

    q = bit_packet(bm, cm, 32'h0A00_0002, 32'hC0A8_0001, 16'd40000, 16'd5000, 32'hCAFE_0042, PT_TERM, 16'd9, '{});
    send(q, 4'b0100);
    exp_h.push_back(mk(PKT_BIT_END, 4'b0100, bm, cm, 32'h0A00_0002, 32'hC0A8_0001, 16'd40000, 16'd5000, 16'd9, 56));

    q = bit_packet(bm, cm, 32'h0A00_0003, 32'hC0A8_0001, 16'd40001, 16'd5000, 32'hCAFE_0043, PT_SEGMENT, 16'd1, w);
    send(q, 4'b0001);
    exp_h.push_back(mk(PKT_DATA, 4'b0001, bm, cm, 32'h0A00_0003, 32'hC0A8_0001, 16'd40001, 16'd5000, 16'd1, 80));

    q = bit_packet(bm, cm, 32'h0A00_0003, 32'hC0A8_0001, 16'd40001, 16'd5001, 32'hCAFE_0042, PT_SEGMENT, 16'd1, w);
    send(q, 4'b0001);
    exp_h.push_back(mk(PKT_DATA, 4'b0001, bm, cm, 32'h0A00_0003, 32'hC0A8_0001, 16'd40001, 16'd5001, 16'd1, 80));

    q = data_packet(48'hFF_FF_FF_FF_FF_FF, 48'h06_05_04_03_02_01, 61, 8'h30);
    send(q, 4'b1000);
    begin
      // fields past byte 14 come from the packet body
      hdr_t h = mk(PKT_DATA, 4'b1000, 48'hFF_FF_FF_FF_FF_FF, 48'h06_05_04_03_02_01, '0, '0, '0, '0, '0, 61);
      h.src_ip  = {q[26], q[27], q[28], q[29]};
      h.dst_ip  = {q[30], q[31], q[32], q[33]};
      h.src_udp = {q[34], q[35]};
      h.dst_udp = {q[36], q[37]};
      h.seg     = {q[48], q[49]};
      exp_h.push_back(h);
    end

    q = data_packet(48'h01_02_03_04_05_06, 48'h0A_0A_0A_0A_0A_0A, 14, 8'h00);
    send(q, 4'b0001);
    exp_h.push_back(mk(PKT_DATA, 4'b0001, 48'h01_02_03_04_05_06, 48'h0A_0A_0A_0A_0A_0A, '0, '0, '0, '0, '0, 14));

    repeat (5) @(posedge clk);
    check(got_h.size() == exp_h.size(), $sformatf("%0d headers, expected %0d", got_h.size(), exp_h.size()));
    foreach (exp_h[i]) if (i < got_h.size()) begin
      check(got_h[i].kind == exp_h[i].kind, $sformatf("pkt %0d kind %0d", i, got_h[i].kind));
      check(got_h[i].src_port == exp_h[i].src_port, $sformatf("pkt %0d src_port", i));
      check(got_h[i].dst_mac == exp_h[i].dst_mac, $sformatf("pkt %0d dst_mac", i));
      check(got_h[i].src_mac == exp_h[i].src_mac, $sformatf("pkt %0d src_mac", i));
      check(got_h[i].len_bytes == exp_h[i].len_bytes, $sformatf("pkt %0d len %0d", i, got_h[i].len_bytes));
      if (i < 5) begin
        check(got_h[i].src_ip == exp_h[i].src_ip, $sformatf("pkt %0d src_ip", i));
        check(got_h[i].dst_ip == exp_h[i].dst_ip, $sformatf("pkt %0d dst_ip", i));
        check(got_h[i].src_udp == exp_h[i].src_udp, $sformatf("pkt %0d src_udp", i));
        check(got_h[i].dst_udp == exp_h[i].dst_udp, $sformatf("pkt %0d dst_udp", i));
        check(got_h[i].seg == exp_h[i].seg, $sformatf("pkt %0d seg", i));
      end
    end
    check(got_beats.size() == sent.size(), "In_fifo beat count");
    foreach (sent[i]) if (i < got_beats.size()) check(got_beats[i] == sent[i], $sformatf("beat %0d", i));
    check(bp_seen > 0, "back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
