// bit_fifo: Bit_fifo, the store for extracted partial bitstream between the
// 100 MHz packet clock and the 50 MHz reconfiguration clock.
//
// The published design keeps extracted bitstream in this FIFO "waiting for
// the acknowledgement" before it may be loaded, and loads a segment only once
// the next bitstream packet (or the termination packet) has verified it. This
// FIFO therefore has three write-side pointers:
//   wp  where the next word goes (speculative),
//   mp  end of the last segment stored completely (mark),
//   cp  end of the verified data the reader may take (commit).
// mark sets mp to wp when a segment has been stored; rollback returns wp to mp
// when storing a segment failed (the FIFO filled up), discarding its partial
// data; commit sets cp to mp when the segment is verified. Only data below cp
// is visible to the reader.
//
// Crossing (this implementation's choice): a published pointer pp walks one
// step per write clock towards cp and crosses to the read clock in Gray code,
// as does the read pointer in the other direction, so every crossing changes
// a single bit. The read side is first-word-fall-through through an output
// register (block-RAM friendly). drained (write clock) is high when every
// committed word has left the array; the word in the output register is
// shown by empty on the read side.
//
// Latency: data committed at write clock n is visible to the reader about
// (words + 3) write clocks plus three read clocks later. DEPTH is a power of two.
module bit_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 2048
) (
  // write side, packet clock
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             full,
  input  logic             mark,
  input  logic             rollback,
  input  logic             commit,
  output logic             drained,
  // read side, reconfiguration clock
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(ptr_t b);
    return b ^ (b >> 1);
  endfunction
  function automatic ptr_t gray2bin(ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [WIDTH-1:0] mem [DEPTH];

  // ---------------- write clock domain ----------------
  ptr_t wp, mp, cp, pp, pp_gray, rp_gray_w, rp_w;   // write clock
  ptr_t rp, rp_gray_r, pp_gray_r, pp_r;             // read clock

  sync2 #(.W(AW+1)) u_rp_sync (.clk(wclk), .rst_n(wrst_n), .d(rp_gray_r), .q(rp_gray_w));
  assign rp_w = gray2bin(rp_gray_w);

  assign full    = ((wp - rp_w) == ptr_t'(DEPTH));
  assign drained = (pp == cp) && (rp_w == cp);

  wire do_wr = wr_en && !full;

  always_ff @(posedge wclk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wp <= '0;
      mp <= '0;
      cp <= '0;
      pp <= '0;
      pp_gray <= '0;
    end else begin
      if (rollback)   wp <= mp;
      else if (do_wr) wp <= wp + 1'b1;
      if (mark)       mp <= wp;
      if (commit)     cp <= mp;
      if (pp != cp) begin
        pp      <= pp + 1'b1;
        pp_gray <= bin2gray(pp + 1'b1);
      end
    end
  end

  // ---------------- read clock domain ----------------
  sync2 #(.W(AW+1)) u_pp_sync (.clk(rclk), .rst_n(rrst_n), .d(pp_gray), .q(pp_gray_r));
  assign pp_r = gray2bin(pp_gray_r);

  // Block-RAM style read: the array is read synchronously into an output
  // register, prefetched so that the oldest visible word sits on rd_data.
  // rp counts words taken from the array (including the one in the register).
  logic             ov;
  logic [WIDTH-1:0] q;
  wire do_rd = rd_en && ov;
  wire fetch = (rp != pp_r) && (!ov || do_rd);

  assign empty   = !ov;
  assign rd_data = q;

  always_ff @(posedge rclk) begin
    if (fetch) q <= mem[rp[AW-1:0]];
  end

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rp <= '0;
      rp_gray_r <= '0;
      ov <= 1'b0;
    end else if (fetch) begin
      rp <= rp + 1'b1;
      rp_gray_r <= bin2gray(rp + 1'b1);
      ov <= 1'b1;
    end else if (do_rd) begin
      ov <= 1'b0;
    end
  end

  a_mark_rollback: assert property (@(posedge wclk) disable iff (!wrst_n) !(mark && rollback));
  a_no_underflow:  assert property (@(posedge rclk) disable iff (!rrst_n) !(rd_en && empty));
endmodule
