// cand_gen: candidate generator of the CT-EXT engine.
//
// Registers: Curr_cand (candidate under evaluation), Prev_cand (the same candidate
// without its newest attribute) and J (index of the newest attribute). Each cycle
// the BM module's verdict on Curr_cand (testor_i, contrib_i) is fed back, and the
// selector loads the registers from A, E1A or E2A, so the search walks the
// attribute subsets in CT-EXT's lexicographic order and prunes every extension of a
// subset whose newest attribute did not contribute.
//
// done_o is high when Curr_cand has no attribute in common with the first BM row
// (ROW0): since the first row's ones are the leftmost columns, no later candidate can
// cover that row and the search is over. The registers then hold.
//
// Timing: after reset Curr_cand = {x_0}, Prev_cand = {}, J = 0. A new candidate
// is produced on every clock edge where advance_i is high and done_o is low;
// advance_i low (output back-pressure) holds the registers.
// Structure follows the original generator; reset values and the advance_i hold
// are this design's choices.
module cand_gen #(
  parameter int unsigned  N    = ctext_pkg::N_DEFAULT,
  parameter logic [N-1:0] ROW0 = N'(ctext_pkg::default_bm_row(0, N)),
  parameter int unsigned  JW   = ctext_pkg::idx_width(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            advance_i,
  input  logic            testor_i,
  input  logic            contrib_i,
  output logic [N-1:0]    curr_o,
  output logic [N-1:0]    prev_o,
  output logic [JW-1:0]   j_o,
  output ctext_pkg::sel_t sel_o,
  output logic            done_o
);
  logic [N-1:0]  curr_q, prev_q;
  logic [JW-1:0] j_q;

  logic [N-1:0]  a_cand, e1a_cand, e1a_prev, e2a_cand, e2a_prev;
  logic [JW-1:0] a_j, e1a_j, e2a_j;
  logic [N-1:0]  next_curr, next_prev;
  logic [JW-1:0] next_j;

  add_attr #(.N(N), .JW(JW)) u_a (
    .cand_i(curr_q),
    .j_i   (j_q),
    .cand_o(a_cand),
    .j_o   (a_j)
  );

  e1a #(.N(N), .JW(JW)) u_e1a (
    .cand_i(curr_q),
    .cand_o(e1a_cand),
    .prev_o(e1a_prev),
    .j_o   (e1a_j)
  );

  e2a #(.N(N), .JW(JW)) u_e2a (
    .cand_i(curr_q),
    .cand_o(e2a_cand),
    .prev_o(e2a_prev),
    .j_o   (e2a_j)
  );

  cand_sel #(.N(N), .JW(JW)) u_sel (
    .j_i        (j_q),
    .testor_i   (testor_i),
    .contrib_i  (contrib_i),
    .curr_i     (curr_q),
    .a_cand_i   (a_cand),
    .a_j_i      (a_j),
    .e1a_cand_i (e1a_cand),
    .e1a_prev_i (e1a_prev),
    .e1a_j_i    (e1a_j),
    .e2a_cand_i (e2a_cand),
    .e2a_prev_i (e2a_prev),
    .e2a_j_i    (e2a_j),
    .sel_o      (sel_o),
    .next_curr_o(next_curr),
    .next_prev_o(next_prev),
    .next_j_o   (next_j)
  );

  assign done_o = (curr_q & ROW0) == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      curr_q <= N'(1);
      prev_q <= '0;
      j_q    <= '0;
    end else if (advance_i && !done_o) begin
      curr_q <= next_curr;
      prev_q <= next_prev;
      j_q    <= next_j;
    end
  end

  assign curr_o = curr_q;
  assign prev_o = prev_q;
  assign j_o    = j_q;
endmodule
