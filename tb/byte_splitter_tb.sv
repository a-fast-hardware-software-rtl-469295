// byte_splitter_tb: random tuples and random back-pressure; reassembles the byte
// stream (lowest attributes first, ceil(N/8) bytes per tuple, zero padding) and
// compares it with the tuples sent. Also checks that a steady stream moves one
// byte per clock.
module byte_splitter_tb;
  localparam int N = 44, NB = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] din;
  logic iv, ir, ov, orr, busy;
  logic [7:0] b;
  logic [N-1:0] sent[$];
  logic [NB*8-1:0] acc;
  int nb = 0, checks = 0, failures = 0, got = 0;

  byte_splitter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_data_i(din), .in_valid_i(iv),
    .in_ready_o(ir), .out_data_o(b), .out_valid_o(ov), .out_ready_i(orr), .busy_o(busy));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sink: collect bytes into tuples
  always @(posedge clk) begin
    if (rst_n && ov && orr) begin
      acc[nb*8 +: 8] = b;
      nb++;
      if (nb == NB) begin
        checks++;
        if (sent.size() == 0 || acc !== (NB*8)'(sent[0])) begin
          failures++;
          $display("FAIL tuple %0d got %h", got, acc);
        end
        if (sent.size() != 0) void'(sent.pop_front());
        nb = 0; got++;
      end
    end
  end

  initial begin
    int bytes_steady;
    iv = 0; orr = 1; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (!(iv && !ir)) begin   // hold a tuple on offer until it is taken
        iv  = 1'($urandom);
        din = {$urandom, $urandom};
      end
      orr = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (iv && ir) sent.push_back(din);
    end
    // steady stream: tuples always offered, output always ready
    @(negedge clk);
    iv = 0; orr = 1;
    wait (sent.size() == 0 && !busy);
    @(negedge clk);
    bytes_steady = 0;
    for (int i = 0; i < 10 * NB; i++) begin
      iv = 1; din = {$urandom, $urandom};
      @(posedge clk);
      if (ov) bytes_steady++;
      if (iv && ir) sent.push_back(din);
      @(negedge clk);
    end
    iv = 0;
    repeat (2 * NB) @(posedge clk);
    checks++;
    if (bytes_steady < 10 * NB - 1 || sent.size() != 0 || got < 100) begin
      failures++;
      $display("FAIL steady=%0d left=%0d got=%0d", bytes_steady, sent.size(), got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
