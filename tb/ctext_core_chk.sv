// ctext_core_chk: testbench harness around one ctext_core instance.
//
// Runs the search to its end and compares, in order, every irreducible testor the
// core offers with the software reference search on the same matrix. With
// RANDOM_READY the output is back-pressured at random, which must not lose or
// repeat testors; without it, each testor must appear in the clock cycle equal to
// its candidate number (one candidate per clock) and done must rise after exactly
// as many cycles as the reference evaluates candidates. Counts its checks and
// failures and raises finished_o at the end.
module ctext_core_chk #(
  parameter int unsigned         N  = 5,
  parameter int unsigned         M  = 3,
  parameter logic [M-1:0][N-1:0] BM = {5'b01101, 5'b11100, 5'b00111},
  parameter bit                  RANDOM_READY = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished_o,
  output int   checks_o,
  output int   failures_o,
  output int   stalls_o,
  output int   testors_o
);
  import ctext_ref_pkg::*;
  logic [N-1:0] testor;
  logic valid, ready, done, eval;
  ctext_pkg::sel_t sel;

  ctext_core #(.N(N), .M(M), .BM(BM)) dut (.clk(clk), .rst_n(rst_n), .testor_o(testor),
    .testor_valid_o(valid), .testor_ready_i(ready), .done_o(done), .eval_o(eval),
    .sel_o(sel));

  vec_t   bm[$], exp_t[$];
  longint exp_at[$];
  longint n_cands;
  bit     fin;
  int     got = 0;
  longint cycle = 0, evals = 0;

  initial begin
    for (int r = 0; r < M; r++) bm.push_back(vec_t'(BM[r]));
    n_cands = search(bm, N, exp_t, exp_at, 0, 0, fin);
  end

  initial begin
    finished_o = 0; checks_o = 0; failures_o = 0; stalls_o = 0; testors_o = 0;
    ready = 1;
  end

  always @(negedge clk) if (RANDOM_READY) ready = ($urandom_range(0, 2) != 0);

  always @(posedge clk) begin
    if (rst_n && !finished_o) begin
      if (valid && !ready) stalls_o++;
      if (valid && ready) begin
        checks_o++;
        if (got >= exp_t.size() || vec_t'(testor) !== exp_t[got] ||
            (!RANDOM_READY && cycle != exp_at[got])) begin
          failures_o++;
          $display("FAIL N=%0d testor #%0d = %h at cycle %0d", N, got, testor, cycle);
        end
        got++;
        testors_o++;
      end
      if (eval) evals++;
      if (done) begin
        checks_o++;
        if (got != exp_t.size() || evals != n_cands || !fin ||
            (!RANDOM_READY && cycle != n_cands)) begin
          failures_o++;
          $display("FAIL N=%0d done: testors %0d/%0d evals %0d cycles %0d exp %0d",
                   N, got, exp_t.size(), evals, cycle, n_cands);
        end
        finished_o <= 1;
      end
      cycle++;
    end
  end
endmodule
