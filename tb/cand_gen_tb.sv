// cand_gen_tb: closes the loop of the candidate generator through the software
// reference evaluation of the 3x5 worked example (sorted columns x0 x3 x4 x1 x2) and
// checks the exact candidate sequence of the worked example, one per clock:
// {x0} {x0,x3} {x0,x4} {x0,x1} {x0,x2} {x3} {x3,x4} {x3,x1} {x3,x2} {x4}, then
// done at {x1}. Random cycles with advance low must hold all registers.
module cand_gen_tb;
  import ctext_ref_pkg::*;
  localparam int N = 5;
  localparam logic [N-1:0] ROW0 = 5'b00111;
  localparam logic [N-1:0] SEQ [11] = '{5'b00001, 5'b00011, 5'b00101, 5'b01001, 5'b10001,
                                         5'b00010, 5'b00110, 5'b01010, 5'b10010, 5'b00100,
                                         5'b01000};
  logic clk = 0, rst_n = 0, adv, t, k, done;
  logic [N-1:0] curr, prev;
  logic [2:0] j;
  ctext_pkg::sel_t sel;
  int checks = 0, failures = 0;
  vec_t bm[$];

  cand_gen #(.N(N), .ROW0(ROW0)) dut (.clk(clk), .rst_n(rst_n), .advance_i(adv),
    .testor_i(t), .contrib_i(k), .curr_o(curr), .prev_o(prev), .j_o(j), .sel_o(sel),
    .done_o(done));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb begin
    t = zero_rows(bm, vec_t'(curr)) == 0;
    k = zero_rows(bm, vec_t'(curr)) != zero_rows(bm, vec_t'(prev));
  end

  initial begin
    int step = 0, cycles = 0, holds = 0;
    bm = '{vec_t'(5'b00111), vec_t'(5'b11100), vec_t'(5'b01101)};
    adv = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (step < 11) begin
      @(negedge clk);
      checks++;
      if (curr !== SEQ[step] || done !== (step == 10)) begin
        failures++;
        $display("FAIL step %0d curr=%b exp %b done=%b", step, curr, SEQ[step], done);
      end
      if (step == 10) break;
      adv = ($urandom_range(0, 3) != 0);
      if (adv) begin step++; cycles++; end else holds++;
    end
    // done holds the registers even with advance high
    adv = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (!done || curr !== SEQ[10]) begin
      failures++;
      $display("FAIL done not held");
    end
    checks++;
    if (cycles != 10 || holds == 0) begin
      failures++;
      $display("FAIL cycles=%0d holds=%0d", cycles, holds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
