// Sending-side redundancy crossbar of a TSV link.
//
// The W signals are split into C clusters of consecutive signals; each cluster
// of n signals owns n+1 pads, the last of which is its spare TSV. Every pad is
// driven by a 2:1 mux that picks either the signal of the same index or the
// previous signal of the cluster. A cluster's repair code k (0 = no repair,
// k = pad k-1 is faulty) selects the shifted input on every pad above the
// faulty one, so the faulty pad's signal and all that follow it move one pad
// up and the last one lands on the spare. With no repair the spare is driven
// low. The first pad of a cluster can never take a previous signal, so it is a
// plain wire from the cluster's first signal (C such outputs have no mux).
// Purely combinational.
//
// Follows the paper: 2x1 crossbar per pad, one spare per cluster, one fault
// tolerated per cluster, local shifting. This design's choices: clusters are
// consecutive signal ranges of near-equal size (cl_start), the repair code
// format, and the idle level of an unused spare. Pad index = signal index +
// cluster number, so cluster c's spare sits at cl_start(c+1) + c.
module tsv_tx_xbar
  import noc3d_pkg::*;
#(
  parameter int unsigned W = FWD_W,
  parameter int unsigned C = FWD_CLUSTERS
) (
  input  logic [W-1:0]           sig_i,
  input  logic [C-1:0][REP_W-1:0] cfg_i,
  output logic [W+C-1:0]         pad_o
);

  always_comb begin
    pad_o = '0;
    for (int unsigned c = 0; c < C; c++) begin
      int unsigned s0, n;
      s0 = cl_start(W, C, c);
      n  = cl_size(W, C, c);
      for (int unsigned j = 0; j <= n; j++) begin
        logic shift;
        // pad j of the cluster takes the previous signal when it lies above the fault
        shift = (cfg_i[c] != '0) && (j >= 32'(cfg_i[c]));
        if (j == n)
          pad_o[s0 + c + j] = shift ? sig_i[s0 + j - 1] : 1'b0;
        else if (j == 0)
          pad_o[s0 + c + j] = sig_i[s0 + j];
        else
          pad_o[s0 + c + j] = shift ? sig_i[s0 + j - 1] : sig_i[s0 + j];
      end
    end
  end

endmodule
