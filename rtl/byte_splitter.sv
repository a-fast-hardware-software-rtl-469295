// byte_splitter: cuts each irreducible-testor n-tuple into bytes for the USB path.
//
// A tuple of N bits becomes NB = ceil(N/8) bytes, sent lowest attributes first: bit k
// of byte b is attribute 8*b+k, and the unused high bits of the last byte are zero.
// Valid/ready on both sides. A tuple is taken when the splitter is idle, then one
// byte leaves per cycle in which out_ready_i is high; the next tuple is taken in the
// cycle the last byte is accepted, so a steady stream moves one byte per clock.
// The original platform states only that tuples are split into bytes; byte order,
// padding and handshakes are this design's choices.
module byte_splitter #(
  parameter int unsigned N = ctext_pkg::N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_data_i,
  input  logic         in_valid_i,
  output logic         in_ready_o,
  output logic [7:0]   out_data_o,
  output logic         out_valid_o,
  input  logic         out_ready_i,
  output logic         busy_o
);
  localparam int unsigned NB = (N + 7) / 8;
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;

  logic [NB*8-1:0] shreg;
  logic [BW-1:0]   left;      // bytes still to send after the current one
  logic            full;
  logic            last_taken;

  assign out_valid_o = full;
  assign out_data_o  = shreg[7:0];
  assign last_taken  = full && out_ready_i && (left == '0);
  assign in_ready_o  = !full || last_taken;
  assign busy_o      = full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full  <= 1'b0;
      left  <= '0;
      shreg <= '0;
    end else if (in_valid_i && in_ready_o) begin
      full  <= 1'b1;
      left  <= BW'(NB - 1);
      shreg <= (NB*8)'(in_data_i);
    end else if (full && out_ready_i) begin
      if (left == '0) begin
        full <= 1'b0;
      end else begin
        left  <= left - BW'(1);
        shreg <= shreg >> 8;
      end
    end
  end

  // A byte on offer stays, unchanged, until it is taken.
  logic       stalled_q;
  logic [7:0] stalled_byte_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stalled_q      <= 1'b0;
      stalled_byte_q <= '0;
    end else begin
      stalled_q      <= out_valid_o && !out_ready_i;
      stalled_byte_q <= out_data_o;
      if (stalled_q) a_byte_hold: assert (out_valid_o && out_data_o == stalled_byte_q);
    end
  end
endmodule
