// ctext_core: the CT-EXT architecture, BM module plus candidate generator.
//
// The candidate generator presents Curr_cand and Prev_cand to the BM module, which
// answers within the same cycle whether Curr_cand is a testor, an irreducible testor,
// and whether its newest attribute contributes. The answer is fed back to the
// generator, which forms the next candidate on the next clock edge: one candidate
// is evaluated per clock.
//
// Every irreducible testor is offered on a valid/ready output (testor_o with
// testor_valid_o) in the cycle it is evaluated. If testor_ready_i is low the whole
// search holds until it is accepted, so no testor is lost; the hold is this design's
// choice. done_o rises when the search space is exhausted and stays high.
// eval_o marks a cycle in which a candidate was evaluated and the search moved on;
// sel_o tells which generator submodule formed the next candidate.
module ctext_core #(
  parameter int unsigned         N  = ctext_pkg::N_DEFAULT,
  parameter int unsigned         M  = ctext_pkg::M_DEFAULT,
  parameter logic [M-1:0][N-1:0] BM = (M*N)'(ctext_pkg::default_bm(M, N))
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [N-1:0]    testor_o,
  output logic            testor_valid_o,
  input  logic            testor_ready_i,
  output logic            done_o,
  output logic            eval_o,
  output ctext_pkg::sel_t sel_o
);
  localparam int unsigned JW = ctext_pkg::idx_width(N);

  logic [N-1:0]  curr, prev;
  logic [JW-1:0] j;
  logic          testor, contrib, irreducible, advance, done;

  bm_module #(.N(N), .M(M), .BM(BM)) u_bm (
    .curr_i       (curr),
    .prev_i       (prev),
    .testor_o     (testor),
    .contrib_o    (contrib),
    .irreducible_o(irreducible)
  );

  cand_gen #(.N(N), .ROW0(BM[0]), .JW(JW)) u_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .advance_i(advance),
    .testor_i (testor),
    .contrib_i(contrib),
    .curr_o   (curr),
    .prev_o   (prev),
    .j_o      (j),
    .sel_o    (sel_o),
    .done_o   (done)
  );

  assign testor_valid_o = !done && irreducible;
  assign testor_o       = curr;
  assign advance        = !testor_valid_o || testor_ready_i;
  assign done_o         = done;
  assign eval_o         = !done && advance;

  logic unused;
  assign unused = ^j;

  // An offered testor stays offered, unchanged, until it is taken.
  logic         stalled_q;
  logic [N-1:0] stalled_data_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stalled_q      <= 1'b0;
      stalled_data_q <= '0;
    end else begin
      stalled_q      <= testor_valid_o && !testor_ready_i;
      stalled_data_q <= testor_o;
      if (stalled_q) a_hold: assert (testor_valid_o && testor_o == stalled_data_q);
    end
  end
endmodule
