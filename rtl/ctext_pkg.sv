// ctext_pkg: constants and helper functions shared by the CT-EXT irreducible-testor engine.
//
// Attribute subsets are n-tuples: bit j of a candidate vector is 1 when attribute
// x_j (column j of the sorted basic matrix) belongs to the subset. "Right of" an
// attribute means a higher bit index; the leftmost attribute is bit 0.
//
// The basic matrix (BM) is not loaded at run time: as in the original platform the
// hardware is elaborated for one matrix, which is passed down as a parameter so that
// synthesis can fold the constant rows into the evaluation logic.
//
// The default matrix is 400 rows by 44 attributes, the largest very-low-density size
// of the published evaluation. Its contents are this design's own choice (the
// published matrices are not reproduced): row 0 holds the three leftmost attributes,
// every other row holds three or four attributes picked by a xorshift32 sequence
// seeded from the row number, giving about 8% ones. gen_bm builds matrices of other
// densities the same way, for elaborating other sizes. Row 0 has the fewest ones and
// its ones are leftmost, which is the ordering CT-EXT requires.
package ctext_pkg;

  localparam int unsigned N_DEFAULT = 44;   // attributes (columns)
  localparam int unsigned M_DEFAULT = 400;  // basic rows
  localparam int unsigned N_MAX     = 128;  // widest row the default generator builds
  localparam int unsigned M_MAX     = 512;  // most rows the default generator builds

  typedef logic [N_MAX-1:0]       wide_row_t;
  typedef logic [M_MAX*N_MAX-1:0] flat_bm_t;

  // Which candidate-generator submodule updates the registers (Table of priorities):
  // E2A when the last added attribute is the last column, E1A when the newest
  // attribute does not contribute or a testor was reached, A otherwise.
  typedef enum logic [1:0] {
    SEL_A   = 2'd0,
    SEL_E1A = 2'd1,
    SEL_E2A = 2'd2
  } sel_t;

  // Width of an attribute index for n attributes.
  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // One 32-bit xorshift step.
  function automatic logic [31:0] xorshift32(logic [31:0] s);
    logic [31:0] x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  // Row r of a generated sorted basic matrix with n attributes: row 0 holds the lo
  // leftmost attributes, every other row holds between lo and hi attributes
  // (lo + r mod (hi-lo+1)) at columns drawn from a xorshift32 sequence seeded from r.
  // Bits above n-1 are zero. Requires 1 <= lo <= hi.
  function automatic wide_row_t gen_bm_row(int unsigned r, int unsigned n,
                                           int unsigned lo, int unsigned hi);
    wide_row_t   row;
    logic [31:0] s;
    int unsigned want, ones;
    logic [$clog2(N_MAX)-1:0] col;
    row = '0;
    if (r == 0) begin
      for (int unsigned c = 0; c < lo; c++)
        if (c < n) row[c] = 1'b1;
      return row;
    end
    want = lo + (r % (hi - lo + 1));
    if (want > n) want = n;
    s    = 32'h9E37_79B9 ^ (r * 32'h85EB_CA6B);
    if (s == 0) s = 32'h1;
    ones = 0;
    while (ones < want) begin
      s   = xorshift32(s);
      col = $clog2(N_MAX)'(s % n);
      if (row[col] == 1'b0) begin
        row[col] = 1'b1;
        ones++;
      end
    end
    return row;
  endfunction

  // A whole generated matrix for m rows and n attributes, row r in bits
  // [r*n +: n]; the low m*n bits have the layout of a logic [m-1:0][n-1:0].
  function automatic flat_bm_t gen_bm(int unsigned m, int unsigned n,
                                      int unsigned lo, int unsigned hi);
    flat_bm_t b;
    b = flat_bm_t'(1'b0);
    for (int unsigned r = 0; r < m; r++)
      b = b | (flat_bm_t'(gen_bm_row(r, n, lo, hi)) << (r * n));
    return b;
  endfunction

  // The default matrix: 3 or 4 ones per row (about 8% at n = 44).
  function automatic wide_row_t default_bm_row(int unsigned r, int unsigned n);
    return gen_bm_row(r, n, 3, 4);
  endfunction

  function automatic flat_bm_t default_bm(int unsigned m, int unsigned n);
    return gen_bm(m, n, 3, 4);
  endfunction

endpackage
