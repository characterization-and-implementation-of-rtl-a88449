// Behavioural model of a bundle of N through-silicon vias between two tiers.
//
// A healthy TSV connects its top-tier pad to its bottom-tier pad. A TSV with a
// random open defect (open_i bit set, a model control, not a pin of the real
// structure) leaves the receiving input floating; this model reads it as 0.
// The RC delay of the via (about 18.5 ps with drivers and planar routing) is
// far below a clock period and is not modelled. Misalignment is not modelled
// either: it only adds contact resistance and delay short of the extreme case.
module tsv_bundle #(
  parameter int unsigned N = 38
) (
  input  logic [N-1:0] top_i,
  input  logic [N-1:0] open_i,
  output logic [N-1:0] bot_o
);

  assign bot_o = top_i & ~open_i;

endmodule
