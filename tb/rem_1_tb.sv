// rem_1_tb: checks that Rem_1 clears exactly the rightmost set bit and reports its
// index, and reports nothing found for an empty candidate.
module rem_1_tb;
  localparam int N = 44, JW = 6;
  logic [N-1:0] c, co, ec;
  logic [JW-1:0] idx;
  logic found;
  int checks = 0, failures = 0;

  rem_1 #(.N(N)) dut (.cand_i(c), .cand_o(co), .idx_o(idx), .found_o(found));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int e_idx;
      c = {$urandom, $urandom};
      if (i % 4 == 1) c &= c >> $urandom_range(1, 40);
      if (i % 4 == 2) c = (N'(1) << $urandom_range(0, N - 1));
      if (i == 0) c = '0;
      #1;
      e_idx = -1;
      for (int j = 0; j < N; j++) if (c[j]) e_idx = j;
      ec = c;
      if (e_idx >= 0) ec[e_idx] = 1'b0;
      checks++;
      if (found !== (e_idx >= 0) || co !== ec || (e_idx >= 0 && int'(idx) != e_idx)) begin
        failures++;
        $display("FAIL c=%h got %h idx=%0d found=%b exp %h idx=%0d", c, co, idx, found, ec, e_idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
