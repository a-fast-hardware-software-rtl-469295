// testor_fifo_tb: random writes and reads against a queue model; checks data order,
// the full (in_ready low) and empty (out_valid low) flags and the occupancy count,
// and that both full and simultaneous read/write cases occur.
module testor_fifo_tb;
  localparam int W = 44, D = 16;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout;
  logic iv, ir, ov, orr;
  logic [4:0] cnt;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, fulls = 0, both = 0;

  testor_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk(clk), .rst_n(rst_n), .in_data_i(din),
    .in_valid_i(iv), .in_ready_o(ir), .out_data_o(dout), .out_valid_o(ov),
    .out_ready_i(orr), .count_o(cnt));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; orr = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // phases: fill, drain, mixed
      iv  = (i % 600 < 200) ? ($urandom_range(0, 4) != 0) : ($urandom_range(0, 1) == 0);
      orr = (i % 600 < 200) ? ($urandom_range(0, 5) == 0) : (i % 600 < 400) ? 1'b1 : 1'($urandom);
      din = {$urandom, $urandom};
      #1;
      checks++;
      if (ir !== (q.size() < D) || ov !== (q.size() > 0) || int'(cnt) != q.size() ||
          (ov && dout !== q[0])) begin
        failures++;
        $display("FAIL i=%0d ir=%b ov=%b cnt=%0d model=%0d", i, ir, ov, cnt, q.size());
      end
      if (!ir) fulls++;
      if (iv && ir && ov && orr) both++;
      @(posedge clk);
      if (ov && orr) void'(q.pop_front());
      if (iv && ir) q.push_back(din);
    end
    checks++;
    if (fulls == 0 || both == 0) begin
      failures++;
      $display("FAIL coverage fulls=%0d both=%0d", fulls, both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
