// ctext_platform_tb: end-to-end test of the FPGA side, from the search to the byte
// stream. Run 1: the 3x5 worked example with the output always ready; the bytes must
// decode to {x0,x1} {x0,x2} {x3,x1} {x4}. Run 2: a 40x16 matrix from the default
// generator with a 4-entry tuple FIFO and a byte sink that is often not ready, so
// the FIFO fills and the search stalls. Every testor is compared with the software
// reference, and each mechanism (A, pruning E1A, testor E1A, E2A, testor found,
// FIFO-full stall, byte stall, done) must have occurred.
module ctext_platform_tb;
  localparam int N2 = 16, M2 = 40;
  localparam string NAMES [8] = '{"A", "E1A-prune", "E1A-testor", "E2A", "found",
                                  "fifo-full-stall", "byte-stall", "done"};
  logic clk = 0, rst_n = 0;
  logic [1:0] fin;
  int c [2], f [2];
  longint ev0 [8], ev1 [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctext_platform_chk u0 (.clk(clk), .rst_n(rst_n), .finished_o(fin[0]), .checks_o(c[0]),
                         .failures_o(f[0]), .events_o(ev0));
  ctext_platform_chk #(.N(N2), .M(M2), .BM((M2*N2)'(ctext_pkg::default_bm(M2, N2))),
                       .FIFO_DEPTH(4), .READY_ONE_IN(64))
    u1 (.clk(clk), .rst_n(rst_n), .finished_o(fin[1]), .checks_o(c[1]),
        .failures_o(f[1]), .events_o(ev1));

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + c[0] + c[1],
             failures + 1 + f[0] + f[1]);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    @(posedge clk);
    checks++;
    if (ev0[4] != 4) begin
      failures++;
      $display("FAIL worked example found %0d testors", ev0[4]);
    end
    for (int i = 0; i < 8; i++) begin
      $display("mechanism %-16s: %0d + %0d", NAMES[i], ev0[i], ev1[i]);
      checks++;
      if (ev0[i] + ev1[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", NAMES[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + c[0] + c[1], failures + f[0] + f[1]);
    $finish;
  end
endmodule
