// bm_row: one row of the basic matrix with its evaluation logic ("row i").
//
// The row is a constant (parameter ROW), as the platform elaborates the hardware for
// one sorted basic matrix. Each cycle the row is ANDed with the current candidate
// and with the previous candidate (the current one minus its newest attribute):
//   testor_o  - the current candidate has a 1 in this row (row is covered)
//   contrib_o - covered by the current but not by the previous candidate, i.e. the
//               newest attribute removed this zero row
//   dec_o     - N-to-N decoder of (ROW & current): the single attribute covering the
//               row when exactly one does, zero otherwise
// Purely combinational. The structure follows the original row sub-module; the
// default row is row 5 of the default matrix (any nonzero row would do). Bits of
// dec_o at columns where ROW is 0 are constant zero by construction, and synthesis
// removes them: the row is a constant, as in the original per-matrix build.
module bm_row #(
  parameter int unsigned       N   = ctext_pkg::N_DEFAULT,
  parameter logic [N-1:0]      ROW = N'(ctext_pkg::default_bm_row(5, N))
) (
  input  logic [N-1:0] curr_i,
  input  logic [N-1:0] prev_i,
  output logic         testor_o,
  output logic         contrib_o,
  output logic [N-1:0] dec_o
);
  logic [N-1:0] and_curr;
  logic         covered_prev;

  assign and_curr     = ROW & curr_i;
  assign testor_o     = |and_curr;
  assign covered_prev = |(ROW & prev_i);
  assign contrib_o    = testor_o != covered_prev;

  nn_decoder #(.N(N)) u_dec (
    .in_i (and_curr),
    .out_o(dec_o)
  );
endmodule
