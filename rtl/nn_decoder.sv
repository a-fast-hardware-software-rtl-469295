// nn_decoder: N-to-N decoder of the irreducibility check.
//
// The input is one BM row ANDed with the current candidate. When exactly one bit of
// it is set, the candidate covers this row through a single attribute, which is
// therefore indispensable; the decoder then repeats its input. With zero or several
// bits set it outputs zero. Purely combinational.
//
// The behaviour is the one the original architecture specifies; the one-hot test
// (x != 0 and x & (x-1) == 0) is this design's way of building it.
module nn_decoder #(
  parameter int unsigned N = ctext_pkg::N_DEFAULT
) (
  input  logic [N-1:0] in_i,
  output logic [N-1:0] out_o
);
  logic onehot;
  assign onehot = (in_i != '0) && ((in_i & (in_i - N'(1))) == '0);
  assign out_o  = onehot ? in_i : '0;
endmodule
