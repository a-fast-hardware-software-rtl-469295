// ctext_platform: FPGA side of the hardware/software irreducible-testor platform.
//
// The host sorts the basic matrix (a row with the fewest ones first, its ones moved to
// the leftmost columns) and elaborates this design for that matrix (parameters N, M,
// BM). After reset the CT-EXT core walks the attribute subsets, one candidate per
// clock, and every irreducible testor it finds goes through a tuple FIFO into a byte
// splitter. The byte stream (byte_o, byte_valid_o, byte_ready_i) is where the
// dual-clock FIFO towards the 48 MHz USB interface would be attached; that FIFO and
// the USB interface are not part of this RTL. done_o rises once the search is over
// and every testor byte has left, which is what the host waits for. Testors are in
// the sorted column order; mapping back to the original columns is left to the host.
//
// The chain core -> FIFO -> splitter follows the original platform; the FIFO depth,
// byte order, back-pressure into the search and the done condition are this
// design's choices (see the sub-module headers).
module ctext_platform #(
  parameter int unsigned         N          = ctext_pkg::N_DEFAULT,
  parameter int unsigned         M          = ctext_pkg::M_DEFAULT,
  parameter logic [M-1:0][N-1:0] BM         = (M*N)'(ctext_pkg::default_bm(M, N)),
  parameter int unsigned         FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] byte_o,
  output logic       byte_valid_o,
  input  logic       byte_ready_i,
  output logic       done_o
);
  logic [N-1:0]    core_testor, fifo_data;
  logic            core_valid, core_ready, core_done, core_eval;
  logic            fifo_valid, split_ready, split_busy;
  ctext_pkg::sel_t core_sel;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  ctext_core #(.N(N), .M(M), .BM(BM)) u_core (
    .clk           (clk),
    .rst_n         (rst_n),
    .testor_o      (core_testor),
    .testor_valid_o(core_valid),
    .testor_ready_i(core_ready),
    .done_o        (core_done),
    .eval_o        (core_eval),
    .sel_o         (core_sel)
  );

  testor_fifo #(.WIDTH(N), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_data_i  (core_testor),
    .in_valid_i (core_valid),
    .in_ready_o (core_ready),
    .out_data_o (fifo_data),
    .out_valid_o(fifo_valid),
    .out_ready_i(split_ready),
    .count_o    (fifo_count)
  );

  byte_splitter #(.N(N)) u_split (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_data_i  (fifo_data),
    .in_valid_i (fifo_valid),
    .in_ready_o (split_ready),
    .out_data_o (byte_o),
    .out_valid_o(byte_valid_o),
    .out_ready_i(byte_ready_i),
    .busy_o     (split_busy)
  );

  assign done_o = core_done && !fifo_valid && !split_busy;

  logic unused;
  assign unused = core_eval ^ (^core_sel) ^ (^fifo_count);
endmodule
