// icap_interface: the ICAP Interface of the rrBox Core.
//
// Runs on the 50 MHz reconfiguration clock and feeds verified partial
// bitstream from Bit_fifo into the FPGA's Internal Configuration Access Port,
// whose data bus is 32 bits wide (both figures as published). Each 64-bit
// Bit_fifo word is split into two ICAP words, the upper half (the earlier
// bytes on the wire) first, so loading a segment takes two clocks per
// 64-bit word.
//
// ICAP side (Virtex-5 style, registered outputs): icap_ce_n and icap_wr_n are
// active low; a word on icap_i is taken at every rising edge where icap_ce_n
// is low and icap_busy is low, otherwise it is held. The write strobe stays
// low (write mode) while a transfer is in progress. When BITSWAP is set the
// bits of every byte are reversed, as the configuration port expects for
// bitstream files written in the usual byte order; by default the client is
// assumed to send ICAP-ready words. busy handling and BITSWAP are this
// implementation's choices.
//
// idle is high when no word is waiting or on the bus. words counts ICAP words
// written since reset.
module icap_interface #(
  parameter bit BITSWAP = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // Bit_fifo read side
  output logic        bf_rd,
  input  logic [63:0] bf_data,
  input  logic        bf_empty,
  // configuration port
  output logic        icap_ce_n,
  output logic        icap_wr_n,
  output logic [31:0] icap_i,
  input  logic        icap_busy,
  // status
  output logic        idle,
  output logic [31:0] words
);
  logic half;                        // 0: upper word next, 1: lower word next
  logic [31:0] next_word;

  function automatic logic [31:0] swap_bits(logic [31:0] w);
    logic [31:0] r;
    for (int b = 0; b < 4; b++)
      for (int i = 0; i < 8; i++) r[8*b+i] = w[8*b+7-i];
    return r;
  endfunction

  wire   taken = !icap_ce_n && !icap_busy;        // bus word consumed this edge
  wire   hold  = !icap_ce_n && icap_busy;
  wire   load  = !hold && !bf_empty;              // put a new word on the bus

  assign next_word = half ? bf_data[31:0] : bf_data[63:32];
  assign bf_rd     = load && half;
  assign idle      = bf_empty && icap_ce_n && !half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icap_ce_n <= 1'b1;
      icap_wr_n <= 1'b1;
      icap_i    <= '0;
      half      <= 1'b0;
      words     <= '0;
    end else begin
      if (taken) words <= words + 1'b1;
      if (!hold) begin
        if (load) begin
          icap_ce_n <= 1'b0;
          icap_wr_n <= 1'b0;
          icap_i    <= BITSWAP ? swap_bits(next_word) : next_word;
          half      <= !half;
        end else begin
          icap_ce_n <= 1'b1;
          icap_wr_n <= 1'b1;
        end
      end
    end
  end
endmodule
