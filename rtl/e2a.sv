// e2a: "eliminate two, add" submodule (E2A) of the candidate generator.
//
// Used when the newest attribute is the last column: no attribute can follow it, so
// two Rem_1 stages drop it and the attribute x_k before it, and A adds x_(k+1).
// Outputs: the new candidate, the previous candidate (the current one without both
// attributes) and the new index k+1. If the candidate had a single attribute there
// is nothing left to extend: all outputs are zero, and the empty candidate makes
// the generator report done. Purely combinational; structure as in the original,
// the empty case is this design's choice.
module e2a #(
  parameter int unsigned N  = ctext_pkg::N_DEFAULT,
  parameter int unsigned JW = ctext_pkg::idx_width(N)
) (
  input  logic [N-1:0]  cand_i,
  output logic [N-1:0]  cand_o,
  output logic [N-1:0]  prev_o,
  output logic [JW-1:0] j_o
);
  logic [N-1:0]  rem1_cand, rem2_cand, add_cand;
  logic [JW-1:0] rem1_idx, rem2_idx, add_j;
  logic          rem1_found, rem2_found;

  rem_1 #(.N(N), .JW(JW)) u_rem1 (
    .cand_i (cand_i),
    .cand_o (rem1_cand),
    .idx_o  (rem1_idx),
    .found_o(rem1_found)
  );

  rem_1 #(.N(N), .JW(JW)) u_rem2 (
    .cand_i (rem1_cand),
    .cand_o (rem2_cand),
    .idx_o  (rem2_idx),
    .found_o(rem2_found)
  );

  add_attr #(.N(N), .JW(JW)) u_add (
    .cand_i(rem2_cand),
    .j_i   (rem2_idx),
    .cand_o(add_cand),
    .j_o   (add_j)
  );

  logic ok;
  assign ok     = rem1_found && rem2_found;
  assign cand_o = ok ? add_cand : '0;
  assign prev_o = ok ? rem2_cand : '0;
  assign j_o    = ok ? add_j : '0;

  logic unused;
  assign unused = ^rem1_idx;
endmodule
