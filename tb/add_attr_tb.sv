// add_attr_tb: checks submodule A: the attribute right of index j is added and the
// index advances, and nothing changes at the last column.
module add_attr_tb;
  localparam int N = 44, JW = 6;
  logic [N-1:0] c, co, ec;
  logic [JW-1:0] j, jo;
  int checks = 0, failures = 0;

  add_attr #(.N(N)) dut (.cand_i(c), .j_i(j), .cand_o(co), .j_o(jo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int jj, ej;
      jj = (i < N) ? i : $urandom_range(0, N - 1);
      // candidate whose rightmost attribute is jj
      c = {$urandom, $urandom} & ((N'(1) << jj) - N'(1));
      c[jj] = 1'b1;
      j = JW'(jj);
      #1;
      ec = c; ej = jj;
      if (jj < N - 1) begin ec[jj + 1] = 1'b1; ej = jj + 1; end
      checks++;
      if (co !== ec || int'(jo) != ej) begin
        failures++;
        $display("FAIL c=%h j=%0d got %h %0d exp %h %0d", c, jj, co, jo, ec, ej);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
