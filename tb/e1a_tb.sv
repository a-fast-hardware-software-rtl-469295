// e1a_tb: checks E1A: the newest attribute x_k is replaced by x_(k+1); the previous
// candidate is the input without x_k.
module e1a_tb;
  localparam int N = 44, JW = 6;
  logic [N-1:0] c, co, po;
  logic [JW-1:0] jo;
  int checks = 0, failures = 0;

  e1a #(.N(N)) dut (.cand_i(c), .cand_o(co), .prev_o(po), .j_o(jo));

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
      k = (i < N - 1) ? i : $urandom_range(0, N - 2);   // E1A is used below the last column
      c = {$urandom, $urandom} & ((N'(1) << k) - N'(1));
      c[k] = 1'b1;
      #1;
      ep = c & ~(N'(1) << k);
      ec = ep | (N'(1) << (k + 1));
      checks++;
      if (co !== ec || po !== ep || int'(jo) != k + 1) begin
        failures++;
        $display("FAIL c=%h got %h %h %0d exp %h %h %0d", c, co, po, jo, ec, ep, k + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
