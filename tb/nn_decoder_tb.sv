// nn_decoder_tb: checks the N-to-N decoder on empty, one-hot and multi-bit inputs
// against a popcount reference.
module nn_decoder_tb;
  localparam int N = 44;
  logic [N-1:0] in, out, exp;
  int checks = 0, failures = 0;

  nn_decoder #(.N(N)) dut (.in_i(in), .out_o(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [N-1:0] v);
    in = v;
    #1;
    exp = ($countones(v) == 1) ? v : '0;
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL in=%h out=%h exp=%h", v, out, exp);
    end
  endtask

  initial begin
    check('0);
    for (int b = 0; b < N; b++) check(N'(1) << b);
    for (int b = 1; b < N; b++) check((N'(1) << b) | N'(1));
    check('1);
    for (int i = 0; i < 2000; i++) begin
      logic [N-1:0] v;
      v = {$urandom, $urandom};
      // thin the vector so that single-bit and few-bit cases are common
      repeat ($urandom_range(0, 6)) v &= {$urandom, $urandom};
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
