// Receiving-side redundancy muxes of a TSV link.
//
// Mirror of tsv_tx_xbar: each of the W signals is taken by a 2:1 mux from its
// own pad or from the next pad of its cluster. With cluster repair code k
// (0 = no repair, k = pad k-1 faulty) every signal at index k-1 or above reads
// the next pad, so the faulty pad is never read and the spare carries the
// cluster's last signal. Purely combinational.
//
// Follows the paper's OUT_n muxes and ROM-driven selection; cluster layout
// and code format are this design's, shared with tsv_tx_xbar via noc3d_pkg.
module tsv_rx_xbar
  import noc3d_pkg::*;
#(
  parameter int unsigned W = FWD_W,
  parameter int unsigned C = FWD_CLUSTERS
) (
  input  logic [W+C-1:0]          pad_i,
  input  logic [C-1:0][REP_W-1:0] cfg_i,
  output logic [W-1:0]            sig_o
);

  always_comb begin
    sig_o = '0;
    for (int unsigned c = 0; c < C; c++) begin
      int unsigned s0, n;
      s0 = cl_start(W, C, c);
      n  = cl_size(W, C, c);
      for (int unsigned i = 0; i < n; i++) begin
        logic shift;
        shift = (cfg_i[c] != '0) && (i + 1 >= 32'(cfg_i[c]));
        sig_o[s0 + i] = shift ? pad_i[s0 + c + i + 1] : pad_i[s0 + c + i];
      end
    end
  end

endmodule
