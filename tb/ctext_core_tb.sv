// ctext_core_tb: runs the CT-EXT core to completion on the 3x5 worked example and
// on two matrices from the default generator (12 and 16 attributes), comparing the
// irreducible testors, the cycle in which each appears and the total cycle count
// with the software reference. One run back-pressures the output at random.
// The worked example must yield exactly {x0,x1} {x0,x2} {x3,x1} {x4} in 10 cycles.
module ctext_core_tb;
  localparam int N2 = 12, M2 = 20, N3 = 16, M3 = 40;
  logic clk = 0, rst_n = 0;
  logic [2:0] fin;
  int c [3], f [3], s [3], t [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctext_core_chk u0 (.clk(clk), .rst_n(rst_n), .finished_o(fin[0]), .checks_o(c[0]),
                     .failures_o(f[0]), .stalls_o(s[0]), .testors_o(t[0]));
  ctext_core_chk #(.N(N2), .M(M2), .BM((M2*N2)'(ctext_pkg::default_bm(M2, N2))))
    u1 (.clk(clk), .rst_n(rst_n), .finished_o(fin[1]), .checks_o(c[1]),
        .failures_o(f[1]), .stalls_o(s[1]), .testors_o(t[1]));
  ctext_core_chk #(.N(N3), .M(M3), .BM((M3*N3)'(ctext_pkg::default_bm(M3, N3))),
                   .RANDOM_READY(1'b1))
    u2 (.clk(clk), .rst_n(rst_n), .finished_o(fin[2]), .checks_o(c[2]),
        .failures_o(f[2]), .stalls_o(s[2]), .testors_o(t[2]));

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks + c[0] + c[1] + c[2],
             failures + 1 + f[0] + f[1] + f[2]);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    @(posedge clk);
    // the worked example has four irreducible testors; the stalled run must stall
    checks += 2;
    if (t[0] != 4) failures++;
    if (s[2] == 0) failures++;
    $display("testors: %0d %0d %0d, stalls %0d", t[0], t[1], t[2], s[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + c[0] + c[1] + c[2],
             failures + f[0] + f[1] + f[2]);
    $finish;
  end
endmodule
