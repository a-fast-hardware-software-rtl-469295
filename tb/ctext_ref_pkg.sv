// ctext_ref_pkg: software reference of the CT-EXT search, for the testbenches.
//
// Written directly from the definitions, independently of the hardware structure:
// a subset T (bit j = attribute j) is a testor when every row has a 1 in some
// column of T; it is irreducible when, in addition, every attribute of T is the
// only attribute of T covering at least one row. The search is CT-EXT's
// depth-first lexicographic walk with an explicit stack: an attribute that does
// not reduce the number of zero rows is skipped with all its extensions, a testor
// is never extended, and the walk stops at the first single attribute that has a
// 0 in the first row. Matrices are queues of rows, up to VW attributes wide.
package ctext_ref_pkg;
  localparam int VW = 128;
  typedef logic [VW-1:0] vec_t;

  function automatic int zero_rows(ref vec_t bm[$], input vec_t c);
    int z = 0;
    foreach (bm[r]) if ((bm[r] & c) == '0) z++;
    return z;
  endfunction

  function automatic bit is_irreducible(ref vec_t bm[$], input vec_t c, input int n);
    if (zero_rows(bm, c) != 0) return 1'b0;
    for (int a = 0; a < n; a++) begin
      if (c[a]) begin
        bit needed = 1'b0;
        foreach (bm[r]) if ((bm[r] & c) == (vec_t'(1) << a)) needed = 1'b1;
        if (!needed) return 1'b0;
      end
    end
    return 1'b1;
  endfunction

  // Runs the search. Fills testors (in the order found) and, for each, the number
  // of candidates evaluated before it (its evaluation cycle, counting from 0).
  // Stops after max_testors testors or max_cands candidates (0 = no limit).
  // Returns the number of candidates evaluated; finished tells whether the search
  // ran to its end.
  function automatic longint search(ref vec_t bm[$], input int n,
                                    ref vec_t testors[$], ref longint at[$],
                                    input int max_testors, input longint max_cands,
                                    output bit finished);
    vec_t   st_t[$];
    int     st_z[$], st_j[$];
    vec_t   t, c;
    int     zt, j, z;
    longint cands = 0;
    t = '0; zt = bm.size(); j = 0;
    finished = 1'b0;
    forever begin
      if (j >= n) begin
        if (st_t.size() == 0) begin finished = 1'b1; break; end
        t = st_t.pop_back(); zt = st_z.pop_back(); j = st_j.pop_back();
        continue;
      end
      if (t == '0 && !bm[0][j]) begin finished = 1'b1; break; end
      if (max_cands != 0 && cands >= max_cands) break;
      c = t | (vec_t'(1) << j);
      z = zero_rows(bm, c);
      cands++;
      if (z == zt) begin
        j++;
      end else if (z == 0) begin
        if (is_irreducible(bm, c, n)) begin
          testors.push_back(c);
          at.push_back(cands - 1);
          if (max_testors != 0 && testors.size() >= max_testors) break;
        end
        j++;
      end else if (j + 1 < n) begin
        st_t.push_back(t); st_z.push_back(zt); st_j.push_back(j + 1);
        t = c; zt = z; j = j + 1;
      end else begin
        j++;
      end
    end
    return cands;
  endfunction
endpackage
