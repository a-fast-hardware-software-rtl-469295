// e2a_tb: checks E2A on candidates ending in the last column: the last two
// attributes x_k < x_(N-1) are dropped and x_(k+1) added; a one-attribute candidate
// gives the empty candidate.
module e2a_tb;
  localparam int N = 44, JW = 6;
  logic [N-1:0] c, co, po;
  logic [JW-1:0] jo;
  int checks = 0, failures = 0;

  e2a #(.N(N)) dut (.cand_i(c), .cand_o(co), .prev_o(po), .j_o(jo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int k;
      logic [N-1:0] ep, ec;
      int ej;
      k = (i < N - 1) ? i : $urandom_range(0, N - 2);
      c = {$urandom, $urandom} & ((N'(1) << k) - N'(1));
      c[k] = 1'b1;
      c[N-1] = 1'b1;
      if (i == 0) c = N'(1) << (N - 1);    // single attribute at the last column
      #1;
      if (i == 0) begin
        ep = '0; ec = '0; ej = 0;
      end else begin
        ep = c & ~(N'(1) << k) & ~(N'(1) << (N - 1));
        ec = ep | (N'(1) << (k + 1));
        ej = k + 1;
      end
      checks++;
      if (co !== ec || po !== ep || int'(jo) != ej) begin
        failures++;
        $display("FAIL c=%h got %h %h %0d exp %h %h %0d", c, co, po, jo, ec, ep, ej);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
