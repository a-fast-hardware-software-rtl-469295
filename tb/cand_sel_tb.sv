// cand_sel_tb: checks the selector's priorities (last column -> E2A; no contribution
// or testor -> E1A; otherwise A) and which values load each register.
module cand_sel_tb;
  import ctext_pkg::*;
  localparam int N = 44, JW = 6;
  logic [JW-1:0] j, aj, e1j, e2j, nj;
  logic t, k;
  logic [N-1:0] curr, ac, e1c, e1p, e2c, e2p, nc, np;
  sel_t sel;
  int checks = 0, failures = 0;

  cand_sel #(.N(N)) dut (.j_i(j), .testor_i(t), .contrib_i(k), .curr_i(curr),
    .a_cand_i(ac), .a_j_i(aj), .e1a_cand_i(e1c), .e1a_prev_i(e1p), .e1a_j_i(e1j),
    .e2a_cand_i(e2c), .e2a_prev_i(e2p), .e2a_j_i(e2j),
    .sel_o(sel), .next_curr_o(nc), .next_prev_o(np), .next_j_o(nj));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [3] = '{0, 0, 0};
    for (int i = 0; i < 2000; i++) begin
      sel_t es;
      logic [N-1:0] ec, ep;
      logic [JW-1:0] ej;
      j = (i % 5 == 0) ? JW'(N - 1) : JW'($urandom_range(0, N - 2));
      t = 1'($urandom); k = 1'($urandom);
      curr = {$urandom, $urandom}; ac = {$urandom, $urandom};
      e1c = {$urandom, $urandom}; e1p = {$urandom, $urandom};
      e2c = {$urandom, $urandom}; e2p = {$urandom, $urandom};
      aj = JW'($urandom); e1j = JW'($urandom); e2j = JW'($urandom);
      #1;
      if (int'(j) == N - 1)  begin es = SEL_E2A; ec = e2c; ep = e2p; ej = e2j; end
      else if (!k || t)      begin es = SEL_E1A; ec = e1c; ep = e1p; ej = e1j; end
      else                   begin es = SEL_A;   ec = ac;  ep = curr; ej = aj; end
      seen[int'(es)]++;
      checks++;
      if (sel !== es || nc !== ec || np !== ep || nj !== ej) begin
        failures++;
        $display("FAIL j=%0d t=%b k=%b sel=%0d exp %0d", j, t, k, sel, es);
      end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
