// add_attr: submodule A of the candidate generator.
//
// Given a candidate whose rightmost attribute is at index j_i, it adds the next
// attribute to the right: cand_o = cand_i | (1 << (j_i+1)) and j_o = j_i + 1.
// When j_i is already the last column nothing can be added: cand_o = cand_i and
// j_o = j_i (the selector never takes A in that case). Purely combinational.
// Function from the original design; taking the index as an input rather than
// searching for it again is how E1A and E2A use it.
module add_attr #(
  parameter int unsigned N  = ctext_pkg::N_DEFAULT,
  parameter int unsigned JW = ctext_pkg::idx_width(N)
) (
  input  logic [N-1:0]  cand_i,
  input  logic [JW-1:0] j_i,
  output logic [N-1:0]  cand_o,
  output logic [JW-1:0] j_o
);
  always_comb begin
    cand_o = cand_i;
    j_o    = j_i;
    if (32'(j_i) < N - 1) begin
      j_o         = j_i + JW'(1);
      cand_o[j_o] = 1'b1;
    end
  end
endmodule
