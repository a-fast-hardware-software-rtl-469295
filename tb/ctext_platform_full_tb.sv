// ctext_platform_full_tb: the platform at its default size (400 rows x 44 attributes,
// default matrix) with no parameter changed. The complete search at this size takes
// far more cycles than a simulation can run, so this test follows it until NT
// irreducible testors have been found, sent through the FIFO and split into bytes,
// and compares each with the software reference search. It also checks the cycle in
// which each testor is offered (one candidate per clock, output always ready).
module ctext_platform_full_tb;
  import ctext_ref_pkg::*;
  localparam int N = ctext_pkg::N_DEFAULT, M = ctext_pkg::M_DEFAULT, NB = (N + 7) / 8;
  localparam int NT = 12;
  logic clk = 0, rst_n = 0;
  logic [7:0] b;
  logic bv, done;
  int checks = 0, failures = 0, got = 0, nb = 0;
  longint cycle = 0;
  logic [NB*8-1:0] acc;
  vec_t bm[$], exp_t[$];
  longint exp_at[$], offered_at[$];
  bit fin;

  ctext_platform dut (.clk(clk), .rst_n(rst_n), .byte_o(b), .byte_valid_o(bv),
                      .byte_ready_i(1'b1), .done_o(done));

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog: %0d testors after %0d cycles", got, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_core.testor_valid_o) offered_at.push_back(cycle);
      cycle++;
      if (bv) begin
        acc[nb*8 +: 8] = b;
        nb++;
        if (nb == NB) begin
          checks++;
          if (got >= exp_t.size() || acc !== (NB*8)'(exp_t[got]) ||
              offered_at[got] != exp_at[got]) begin
            failures++;
            $display("FAIL testor #%0d = %h at cycle %0d", got, acc, offered_at[got]);
          end
          got++; nb = 0;
        end
      end
    end
  end

  initial begin
    longint n;
    for (int r = 0; r < M; r++) bm.push_back(vec_t'(ctext_pkg::default_bm_row(r, N)));
    n = search(bm, N, exp_t, exp_at, NT, 0, fin);
    $display("reference: %0d testors within the first %0d candidates", exp_t.size(), n);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == NT || done);
    checks++;
    if (got != NT) failures++;
    $display("%0d testors checked, last offered at cycle %0d", got, offered_at[got-1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
