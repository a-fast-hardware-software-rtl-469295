// bm_module: the basic-matrix evaluation array (BM module).
//
// Holds all M rows of the sorted basic matrix as constants, one bm_row each, and
// judges the current candidate in a single combinational pass:
//   testor_o      - every row is covered (AND of the row testor outputs)
//   contrib_o     - some row is covered by the current candidate but not by the
//                   previous one, so the newest attribute reduced the zero rows
//                   (OR of the row contributes outputs)
//   irreducible_o - testor_o and the OR of all row decoder outputs equals the
//                   candidate, i.e. every attribute is the only cover of some row
// With registered candidates at its inputs this evaluates one candidate per clock.
// All of this follows the original BM module; the matrix is passed as parameter BM
// where row r is BM[r] and bit j of a row is attribute j.
module bm_module #(
  parameter int unsigned        N  = ctext_pkg::N_DEFAULT,
  parameter int unsigned        M  = ctext_pkg::M_DEFAULT,
  parameter logic [M-1:0][N-1:0] BM = (M*N)'(ctext_pkg::default_bm(M, N))
) (
  input  logic [N-1:0] curr_i,
  input  logic [N-1:0] prev_i,
  output logic         testor_o,
  output logic         contrib_o,
  output logic         irreducible_o
);
  logic [M-1:0]        row_testor;
  logic [M-1:0]        row_contrib;
  logic [N-1:0]        row_dec [M];
  logic [N-1:0]        cover_bits;

  for (genvar r = 0; r < M; r++) begin : g_row
    bm_row #(.N(N), .ROW(BM[r])) u_row (
      .curr_i   (curr_i),
      .prev_i   (prev_i),
      .testor_o (row_testor[r]),
      .contrib_o(row_contrib[r]),
      .dec_o    (row_dec[r])
    );
  end

  always_comb begin
    cover_bits = '0;
    for (int unsigned r = 0; r < M; r++) cover_bits = cover_bits | row_dec[r];
  end

  assign testor_o      = &row_testor;
  assign contrib_o     = |row_contrib;
  assign irreducible_o = testor_o && (cover_bits == curr_i);
endmodule
