// cand_sel: the selector ("sel") of the candidate generator.
//
// Chooses which submodule output loads the Curr_cand, Prev_cand and J registers,
// by priority:
//   1. J is the last column (N-1)           -> E2A (curr, prev and J from E2A)
//   2. the newest attribute does not
//      contribute, or a testor was reached  -> E1A (curr, prev and J from E1A)
//   3. otherwise (contributes, no testor)   -> A   (curr and J from A, prev <- curr)
// Purely combinational. The priorities and register updates follow the original
// selector table; rule 3 is read as "contributes and not a testor", the complement
// of rule 2.
module cand_sel #(
  parameter int unsigned N  = ctext_pkg::N_DEFAULT,
  parameter int unsigned JW = ctext_pkg::idx_width(N)
) (
  input  logic [JW-1:0]       j_i,
  input  logic                testor_i,
  input  logic                contrib_i,
  input  logic [N-1:0]        curr_i,
  input  logic [N-1:0]        a_cand_i,
  input  logic [JW-1:0]       a_j_i,
  input  logic [N-1:0]        e1a_cand_i,
  input  logic [N-1:0]        e1a_prev_i,
  input  logic [JW-1:0]       e1a_j_i,
  input  logic [N-1:0]        e2a_cand_i,
  input  logic [N-1:0]        e2a_prev_i,
  input  logic [JW-1:0]       e2a_j_i,
  output ctext_pkg::sel_t     sel_o,
  output logic [N-1:0]        next_curr_o,
  output logic [N-1:0]        next_prev_o,
  output logic [JW-1:0]       next_j_o
);
  import ctext_pkg::*;

  always_comb begin
    if (32'(j_i) == N - 1)            sel_o = SEL_E2A;
    else if (!contrib_i || testor_i)  sel_o = SEL_E1A;
    else                              sel_o = SEL_A;

    unique case (sel_o)
      SEL_E2A: begin
        next_curr_o = e2a_cand_i;
        next_prev_o = e2a_prev_i;
        next_j_o    = e2a_j_i;
      end
      SEL_E1A: begin
        next_curr_o = e1a_cand_i;
        next_prev_o = e1a_prev_i;
        next_j_o    = e1a_j_i;
      end
      default: begin
        next_curr_o = a_cand_i;
        next_prev_o = curr_i;
        next_j_o    = a_j_i;
      end
    endcase
  end
endmodule
