// ctext_workloads_tb: the platform elaborated at the matrix sizes and densities of the
// published evaluation, each run until a number of irreducible testors have come out
// of the byte stream and been checked against the software reference:
//   400 x 40 and 400 x 42, about 8% ones (3-4 per row)
//   225 x 50 and 225 x 55, about 33% ones (14-19 and 17-19 per row)
//   100 x 70, about 45% ones (30-33 per row; the row count of the published
//   70-attribute matrix is not known, 100 is this test's choice)
// The 400 x 44 size is covered by ctext_platform_full_tb. Complete searches at these
// sizes take 10^10 cycles or more, so each run stops after its first testors; the
// 225 x 50 run finds its first testor late and stops after 2.9 million candidates.
module ctext_workloads_tb;
  localparam int NR = 5;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0] fin;
  int c [NR], f [NR];
  longint ev [NR][8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctext_platform_chk #(.N(40), .M(400), .BM((400*40)'(ctext_pkg::gen_bm(400, 40, 3, 4))),
                       .MAX_TESTORS(3))
    u0 (.clk(clk), .rst_n(rst_n), .finished_o(fin[0]), .checks_o(c[0]), .failures_o(f[0]),
        .events_o(ev[0]));
  ctext_platform_chk #(.N(42), .M(400), .BM((400*42)'(ctext_pkg::gen_bm(400, 42, 3, 4))),
                       .MAX_TESTORS(1))
    u1 (.clk(clk), .rst_n(rst_n), .finished_o(fin[1]), .checks_o(c[1]), .failures_o(f[1]),
        .events_o(ev[1]));
  ctext_platform_chk #(.N(50), .M(225), .BM((225*50)'(ctext_pkg::gen_bm(225, 50, 14, 19))),
                       .MAX_CANDS(2900000))
    u2 (.clk(clk), .rst_n(rst_n), .finished_o(fin[2]), .checks_o(c[2]), .failures_o(f[2]),
        .events_o(ev[2]));
  ctext_platform_chk #(.N(55), .M(225), .BM((225*55)'(ctext_pkg::gen_bm(225, 55, 17, 19))),
                       .MAX_TESTORS(10))
    u3 (.clk(clk), .rst_n(rst_n), .finished_o(fin[3]), .checks_o(c[3]), .failures_o(f[3]),
        .events_o(ev[3]));
  ctext_platform_chk #(.N(70), .M(100), .BM((100*70)'(ctext_pkg::gen_bm(100, 70, 30, 33))),
                       .MAX_TESTORS(40))
    u4 (.clk(clk), .rst_n(rst_n), .finished_o(fin[4]), .checks_o(c[4]), .failures_o(f[4]),
        .events_o(ev[4]));

  function automatic int sum(int a [NR]);
    int s = 0;
    foreach (a[i]) s += a[i];
    return s;
  endfunction

  initial begin
    #200000000;
    $display("watchdog: finished runs %b", fin);
    $display("TB_RESULT checks=%0d failures=%0d", checks + sum(c), failures + 1 + sum(f));
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    @(posedge clk);
    for (int i = 0; i < NR; i++) begin
      $display("run %0d: %0d testors, %0d candidates", i, ev[i][4],
               ev[i][0] + ev[i][1] + ev[i][2] + ev[i][3]);
      checks++;
      if (ev[i][4] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + sum(c), failures + sum(f));
    $finish;
  end
endmodule
