// e1a: "eliminate one, add" submodule (E1A) of the candidate generator.
//
// Rem_1 drops the newest attribute x_k of the current candidate, then A adds x_(k+1).
// Outputs: the new candidate, the previous candidate (current minus x_k, against
// which the new attribute's contribution is judged) and the new index k+1.
// Used when the newest attribute did not contribute, or when a testor was reached.
// Purely combinational; structure as in the original. An empty input (never
// presented while the search runs) yields all-zero outputs.
module e1a #(
  parameter int unsigned N  = ctext_pkg::N_DEFAULT,
  parameter int unsigned JW = ctext_pkg::idx_width(N)
) (
  input  logic [N-1:0]  cand_i,
  output logic [N-1:0]  cand_o,
  output logic [N-1:0]  prev_o,
  output logic [JW-1:0] j_o
);
  logic [N-1:0]  rem_cand, add_cand;
  logic [JW-1:0] rem_idx, add_j;
  logic          rem_found;

  rem_1 #(.N(N), .JW(JW)) u_rem (
    .cand_i (cand_i),
    .cand_o (rem_cand),
    .idx_o  (rem_idx),
    .found_o(rem_found)
  );

  add_attr #(.N(N), .JW(JW)) u_add (
    .cand_i(rem_cand),
    .j_i   (rem_idx),
    .cand_o(add_cand),
    .j_o   (add_j)
  );

  assign cand_o = rem_found ? add_cand : '0;
  assign prev_o = rem_cand;
  assign j_o    = rem_found ? add_j : '0;
endmodule
