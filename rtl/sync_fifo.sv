// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for four of the core's FIFOs: In_fifo (received packets), Hdr_fifo
// (extracted header information), Bit_stat_fifo (bitstream extraction
// status) and Dst_port_fifo (forwarding decisions). As in the published
// design the storage is meant for block RAM: the array is read synchronously
// into an output register, and a prefetch keeps that register filled, so the
// head entry is always on rd_data while empty is low. The first-word-fall-
// through interface and the depths are this implementation's choice.
//
// Interface: wr_en/wr_data write when not full; rd_data shows the oldest
// entry whenever empty is low and rd_en removes it. count gives the number of
// entries (in the array and in the output register); full is count == DEPTH.
// A write to a full FIFO or a read from an empty one is ignored (and flagged
// by an assertion). Write-to-read latency is two clocks; one entry per clock
// can be written and read continuously. DEPTH is a power of two.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  output logic                     full,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;         // rp: next entry to fetch from the array
  logic             ov;             // output register holds an entry
  logic [WIDTH-1:0] q;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;
  wire in_ram = (wp != rp);
  wire fetch  = in_ram && (!ov || do_rd);

  assign count   = (wp - rp) + (AW+1)'(ov);
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = !ov;
  assign rd_data = q;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
    if (fetch) q <= mem[rp[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      ov <= 1'b0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (fetch) begin
        rp <= rp + 1'b1;
        ov <= 1'b1;
      end else if (do_rd) begin
        ov <= 1'b0;
      end
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
