// rem_1: removes the newest (rightmost) attribute from a candidate (Rem_1).
//
// A priority encoder finds the highest set bit of cand_i; cand_o is cand_i with that
// bit cleared and idx_o is its index. found_o is low when cand_i is empty (cand_o is
// then zero and idx_o zero). Purely combinational. Function and structure follow
// the original submodule; the found_o flag is this design's addition so that a
// double removal from a one-attribute candidate can be recognised.
module rem_1 #(
  parameter int unsigned N  = ctext_pkg::N_DEFAULT,
  parameter int unsigned JW = ctext_pkg::idx_width(N)
) (
  input  logic [N-1:0]  cand_i,
  output logic [N-1:0]  cand_o,
  output logic [JW-1:0] idx_o,
  output logic          found_o
);
  always_comb begin
    idx_o   = '0;
    found_o = 1'b0;
    for (int unsigned j = 0; j < N; j++) begin
      if (cand_i[j]) begin
        idx_o   = JW'(j);
        found_o = 1'b1;
      end
    end
    cand_o = cand_i;
    if (found_o) cand_o[idx_o] = 1'b0;
  end
endmodule
