// testor_fifo: synchronous FIFO that buffers irreducible-testor n-tuples.
//
// Decouples the one-candidate-per-clock search from the byte-wide output path.
// Valid/ready on both sides: a word is written when in_valid_i && in_ready_o and
// read when out_valid_o && out_ready_i; both may happen in the same cycle. in_ready_o
// is low only when all DEPTH entries are full. out_data_o shows the oldest entry
// whenever out_valid_o is high (first-word fall-through). Storage is a plain array
// of DEPTH words with wrap-around read and write pointers and an occupancy count.
// The original platform names this FIFO without giving its depth or interface;
// DEPTH = 16 and the handshakes are this design's choices.
module testor_fifo #(
  parameter int unsigned WIDTH = ctext_pkg::N_DEFAULT,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_data_i,
  input  logic             in_valid_i,
  output logic             in_ready_o,
  output logic [WIDTH-1:0] out_data_o,
  output logic             out_valid_o,
  input  logic             out_ready_i,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    count;
  logic             wr_en, rd_en;

  assign in_ready_o  = count != CW'(DEPTH);
  assign out_valid_o = count != '0;
  assign wr_en       = in_valid_i && in_ready_o;
  assign rd_en       = out_valid_o && out_ready_i;
  assign out_data_o  = mem[rd_ptr];
  assign count_o     = count;

  function automatic logic [AW-1:0] bump(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= bump(wr_ptr);
      if (rd_en) rd_ptr <= bump(rd_ptr);
      if (wr_en && !rd_en)      count <= count + CW'(1);
      else if (rd_en && !wr_en) count <= count - CW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= in_data_i;
  end
endmodule
