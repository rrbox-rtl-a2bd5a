// icap_model: behavioural stand-in for the FPGA's configuration port and
// configuration memory, for simulation only. It records every 32-bit word
// written (icap_ce_n and icap_wr_n low, icap_busy low at the clock edge).
// To emulate partial reconfiguration it interprets a toy bitstream: after
// the sync word AA995566 the next word names the forwarding algorithm the
// partial module implements (an algo_e value), and the DESYNC sequence
// 30008001 0000000D makes that algorithm the configured one on prm_algo.
// Real bitstream frames carry no such field; this only lets a testbench see
// that a complete bitstream was loaded.
module icap_model
  import rrbox_pkg::*;
#(
  parameter algo_e INITIAL = ALG_HUB
) (
  input  logic        clk,
  input  logic        icap_ce_n,
  input  logic        icap_wr_n,
  input  logic [31:0] icap_i,
  input  logic        icap_busy,
  output algo_e       prm_algo,
  output int          n_words,
  output int          n_configs
);
  logic [31:0] words[$];
  logic        synced = 1'b0, want_id = 1'b0;
  logic [31:0] prev = '0;
  algo_e       pending = INITIAL;

  initial begin
    prm_algo  = INITIAL;
    n_words   = 0;
    n_configs = 0;
  end

  always @(posedge clk) begin
    if (!icap_ce_n && !icap_wr_n && !icap_busy) begin
      words.push_back(icap_i);
      n_words <= n_words + 1;
      if (icap_i == 32'hAA99_5566) begin
        synced  = 1'b1;
        want_id = 1'b1;
      end else if (want_id) begin
        pending = algo_e'(icap_i[1:0]);
        want_id = 1'b0;
      end else if (synced && prev == 32'h3000_8001 && icap_i == 32'h0000_000D) begin
        prm_algo  <= pending;
        n_configs <= n_configs + 1;
        synced    = 1'b0;
      end
      prev = icap_i;
    end
  end
endmodule
