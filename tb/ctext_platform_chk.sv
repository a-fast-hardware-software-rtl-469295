// ctext_platform_chk: testbench harness around one ctext_platform instance.
//
// Drives byte_ready: always high, or high at random with probability 1/READY_ONE_IN;
// reassembles the byte stream into n-tuples and compares them, in order, with the
// software reference search on the same matrix. Runs until done, or until
// MAX_TESTORS testors have arrived when that is nonzero (the reference then stops at
// the same testor), or, when MAX_CANDS is nonzero, until MAX_CANDS candidates have
// been evaluated and every testor the reference found among them has arrived.
// Counts how often each mechanism of the design occurred: generator steps through A,
// through E1A after a non-contributing attribute (a pruned branch), through E1A
// after a testor, through E2A; irreducible testors found; search stalls because the
// tuple FIFO was full; byte stalls; done.
module ctext_platform_chk #(
  parameter int unsigned         N  = 5,
  parameter int unsigned         M  = 3,
  parameter logic [M-1:0][N-1:0] BM = {5'b01101, 5'b11100, 5'b00111},
  parameter int unsigned         FIFO_DEPTH  = 16,
  parameter int unsigned         READY_ONE_IN = 0,
  parameter int unsigned         MAX_TESTORS = 0,
  parameter longint              MAX_CANDS   = 0
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   finished_o,
  output int     checks_o,
  output int     failures_o,
  output longint events_o [8]
);
  import ctext_ref_pkg::*;
  localparam int NB = (N + 7) / 8;
  localparam int EV_A = 0, EV_PRUNE = 1, EV_TESTOR_E1A = 2, EV_E2A = 3, EV_FOUND = 4,
                 EV_FIFO_FULL = 5, EV_BYTE_STALL = 6, EV_DONE = 7;

  logic [7:0] b;
  logic bv, br, done;

  ctext_platform #(.N(N), .M(M), .BM(BM), .FIFO_DEPTH(FIFO_DEPTH)) dut (
    .clk(clk), .rst_n(rst_n), .byte_o(b), .byte_valid_o(bv), .byte_ready_i(br),
    .done_o(done));

  vec_t   bm[$], exp_t[$];
  longint exp_at[$];
  longint n_cands;
  bit     fin;
  int     got = 0, nb = 0;
  logic [NB*8-1:0] acc;

  initial begin
    for (int r = 0; r < M; r++) bm.push_back(vec_t'(BM[r]));
    n_cands = search(bm, N, exp_t, exp_at, MAX_TESTORS, MAX_CANDS, fin);
  end

  initial begin
    finished_o = 0; checks_o = 0; failures_o = 0; br = 1;
    foreach (events_o[i]) events_o[i] = 0;
  end

  always @(negedge clk) br = (READY_ONE_IN == 0) || ($urandom_range(1, READY_ONE_IN) == 1);

  always @(posedge clk) begin
    if (rst_n && !finished_o) begin
      // mechanism counters, read from inside the design
      if (dut.u_core.eval_o) begin
        case (dut.u_core.sel_o)
          ctext_pkg::SEL_A:   events_o[EV_A]++;
          ctext_pkg::SEL_E2A: events_o[EV_E2A]++;
          default: if (dut.u_core.u_bm.testor_o) events_o[EV_TESTOR_E1A]++;
                   else events_o[EV_PRUNE]++;
        endcase
      end
      if (dut.u_core.testor_valid_o && dut.u_core.testor_ready_i) events_o[EV_FOUND]++;
      if (dut.u_core.testor_valid_o && !dut.u_core.testor_ready_i) events_o[EV_FIFO_FULL]++;
      if (bv && !br) events_o[EV_BYTE_STALL]++;
      if (bv && br) begin
        acc[nb*8 +: 8] = b;
        nb++;
        if (nb == NB) begin
          checks_o++;
          if (MAX_CANDS != 0 && got >= exp_t.size()) begin
            // past the reference's candidate budget: not compared
          end else if (got >= exp_t.size() || (NB*8)'(exp_t[got]) !== acc) begin
            failures_o++;
            $display("FAIL N=%0d tuple #%0d = %h", N, got, acc);
          end
          got++; nb = 0;
          if (MAX_TESTORS != 0 && got == MAX_TESTORS) finished_o <= 1;
        end
      end
      if (MAX_CANDS != 0 && !done && got >= exp_t.size() &&
          events_o[EV_A] + events_o[EV_PRUNE] + events_o[EV_TESTOR_E1A] + events_o[EV_E2A]
            >= MAX_CANDS) begin
        checks_o++;
        finished_o <= 1;
      end
      if (done) begin
        events_o[EV_DONE]++;
        checks_o++;
        if (got != exp_t.size() || nb != 0 || !fin) begin
          failures_o++;
          $display("FAIL N=%0d done with %0d of %0d testors", N, got, exp_t.size());
        end
        finished_o <= 1;
      end
    end
  end
endmodule
