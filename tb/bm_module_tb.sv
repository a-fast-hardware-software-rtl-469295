// bm_module_tb: checks the basic-matrix evaluation array.
// Instance 1 holds the 3x5 worked example (sorted columns x0 x3 x4 x1 x2) and is
// checked exhaustively, including the two irreducibility examples ({x0,x1} is an
// irreducible testor, {x0,x4} a testor that is not). Instance 2 is the default
// 400x44 matrix, checked on random candidates of several densities.
module bm_module_tb;
  import ctext_ref_pkg::*;
  localparam int N1 = 5, M1 = 3;
  localparam logic [M1-1:0][N1-1:0] BM1 = {5'b01101, 5'b11100, 5'b00111};
  localparam int N2 = ctext_pkg::N_DEFAULT, M2 = ctext_pkg::M_DEFAULT;

  logic [N1-1:0] c1, p1;
  logic t1, k1, i1;
  logic [N2-1:0] c2, p2;
  logic t2, k2, i2;
  int checks = 0, failures = 0;
  vec_t bm1[$], bm2[$];

  bm_module #(.N(N1), .M(M1), .BM(BM1)) dut1 (.curr_i(c1), .prev_i(p1), .testor_o(t1),
                                              .contrib_o(k1), .irreducible_o(i1));
  bm_module dut2 (.curr_i(c2), .prev_i(p2), .testor_o(t2), .contrib_o(k2), .irreducible_o(i2));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect3(string what, logic gt, logic gk, logic gi, logic et, logic ek, logic ei);
    checks++;
    if (gt !== et || gk !== ek || gi !== ei) begin
      failures++;
      $display("FAIL %s got t=%b c=%b i=%b exp t=%b c=%b i=%b", what, gt, gk, gi, et, ek, ei);
    end
  endtask

  initial begin
    int n_t = 0, n_i = 0, n_k = 0;
    for (int r = 0; r < M1; r++) bm1.push_back(vec_t'(BM1[r]));
    for (int r = 0; r < M2; r++) bm2.push_back(vec_t'(ctext_pkg::default_bm_row(r, N2)));

    // the two worked irreducibility examples, previous candidate {x0}
    c1 = 5'b01001; p1 = 5'b00001; #1;
    expect3("{x0,x1}", t1, k1, i1, 1, 1, 1);
    c1 = 5'b00101; p1 = 5'b00001; #1;
    expect3("{x0,x4}", t1, k1, i1, 1, 1, 0);
    // {x0,x3} against {x0}: no contribution (Table of the worked example)
    c1 = 5'b00011; p1 = 5'b00001; #1;
    expect3("{x0,x3}", t1, k1, i1, 0, 0, 0);

    // exhaustive over the small matrix
    for (int c = 0; c < 32; c++) begin
      for (int p = 0; p < 32; p++) begin
        if ((p & ~c) != 0) continue;
        c1 = N1'(c); p1 = N1'(p); #1;
        expect3("exhaustive", t1, k1, i1, zero_rows(bm1, vec_t'(c)) == 0,
                zero_rows(bm1, vec_t'(c)) != zero_rows(bm1, vec_t'(p)),
                is_irreducible(bm1, vec_t'(c), N1));
      end
    end

    // random candidates on the default matrix; dense ones give testors, and
    // thinning a testor greedily gives irreducible ones
    for (int i = 0; i < 600; i++) begin
      logic [N2-1:0] c;
      c = {$urandom, $urandom};
      if (i % 3 == 1) c |= {$urandom, $urandom};
      if (i % 3 == 2) begin
        c = '1;
        for (int a = N2 - 1; a >= 0; a--) begin
          if ($urandom_range(0, 3) != 0 && zero_rows(bm2, vec_t'(c & ~(N2'(1) << a))) == 0)
            c[a] = 1'b0;
        end
      end
      c2 = c; p2 = c & {$urandom, $urandom}; #1;
      begin
        int zc, zp; bit ir;
        zc = zero_rows(bm2, vec_t'(c2)); zp = zero_rows(bm2, vec_t'(p2));
        ir = is_irreducible(bm2, vec_t'(c2), N2);
        n_t += (zc == 0); n_i += ir; n_k += (zc != zp);
        expect3("default", t2, k2, i2, zc == 0, zc != zp, ir);
      end
    end
    checks++;
    if (n_t == 0 || n_i == 0 || n_k == 0) begin
      failures++;
      $display("FAIL coverage testor=%0d irreducible=%0d contributes=%0d", n_t, n_i, n_k);
    end
    $display("irreducible seen %0d, testors %0d", n_i, n_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
