// bm_row_tb: checks one basic-matrix row's testor, contributes and decoder outputs
// against bit-level reference computations for random current/previous candidates.
module bm_row_tb;
  localparam int N = 44;
  localparam logic [N-1:0] ROW = N'(ctext_pkg::default_bm_row(7, N));
  logic [N-1:0] curr, prev, dec;
  logic testor, contrib;
  int checks = 0, failures = 0;

  bm_row #(.N(N), .ROW(ROW)) dut (.curr_i(curr), .prev_i(prev), .testor_o(testor),
                                  .contrib_o(contrib), .dec_o(dec));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_cov = 0, n_con = 0, n_dec = 0;
    for (int i = 0; i < 4000; i++) begin
      logic e_t, e_p, e_c;
      logic [N-1:0] e_d;
      int hits;
      curr = {$urandom, $urandom};
      repeat ($urandom_range(0, 4)) curr &= {$urandom, $urandom};
      prev = curr & {$urandom, $urandom};
      #1;
      hits = 0; e_t = 0; e_p = 0; e_d = '0;
      for (int j = 0; j < N; j++) begin
        if (ROW[j] && curr[j]) begin e_t = 1; hits++; e_d = N'(1) << j; end
        if (ROW[j] && prev[j]) e_p = 1;
      end
      if (hits != 1) e_d = '0;
      e_c = e_t && !e_p;
      n_cov += e_t; n_con += e_c; n_dec += (hits == 1);
      checks++;
      if (testor !== e_t || contrib !== e_c || dec !== e_d) begin
        failures++;
        $display("FAIL curr=%h prev=%h got %b %b %h exp %b %b %h",
                 curr, prev, testor, contrib, dec, e_t, e_c, e_d);
      end
    end
    // each case must have been exercised
    checks++;
    if (n_cov == 0 || n_con == 0 || n_dec == 0) begin
      failures++;
      $display("FAIL coverage cov=%0d con=%0d dec=%0d", n_cov, n_con, n_dec);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
