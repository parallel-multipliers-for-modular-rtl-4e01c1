// pmm_pkg: shared elaboration-time helpers for the parallel Montgomery
// multipliers (PMMs).
//
// The PMMs reduce a tall summation array with a Montgomery-style modified
// Wallace tree (mont_tree). Every tree stage with more than four rows
// groups rows in threes, compresses each group with back-to-back adders that
// also add the modulus when the group's least significant bit is one, and
// then drops that (now zero) bit, i.e. divides by two. Stages with four or
// three rows are plain carry-save stages. The functions below give the row
// count after one stage, the number of halving stages a tree of a given
// height performs (its Montgomery exponent J: the tree returns
// sum(rows) * 2^-J mod M), and the row counts of the four summation arrays.
package pmm_pkg;

  // Rows left after one stage of height h.
  function automatic int unsigned tree_next(int unsigned h);
    if (h <= 2) return h;
    if (h == 3) return 2;
    if (h == 4) return 3;
    // Halving stage: each full group of three gives two rows, a group of two
    // gives two rows, and a single row plus the modulus also gives two rows.
    return 2 * (h / 3) + ((h % 3) != 0 ? 2 : 0);
  endfunction

  // Number of halving stages in a tree that starts with h rows.
  function automatic int unsigned tree_halvings(int unsigned h);
    int unsigned j = 0;
    while (h > 4) begin
      h = tree_next(h);
      j++;
    end
    return j;
  endfunction

  // Live rows entering stage s of a tree that starts with h rows.
  function automatic int unsigned tree_height(int unsigned h, int unsigned s);
    for (int unsigned i = 0; i < s; i++) h = tree_next(h);
    return h;
  endfunction

  // Dots in column n+d of the upper half of an n x n bit-product array.
  function automatic int unsigned upper_dots(int unsigned n, int unsigned d);
    return (d <= n - 2) ? (n - 1 - d) : 0;
  endfunction

  // Implementation II: rows contributed by the even upper column n+d after
  // its bits and the bits of column n+d+1 are merged into it as unary bits.
  function automatic int unsigned impl2_col_rows(int unsigned n, int unsigned d);
    return upper_dots(n, d) + 2 * upper_dots(n, d + 1);
  endfunction

  // Implementation II: first summation row of even upper column n+d.
  function automatic int unsigned impl2_col_base(int unsigned n, int unsigned d);
    int unsigned base = n;
    for (int unsigned e = 0; e < d; e += 2) base += impl2_col_rows(n, e);
    return base;
  endfunction

  // Implementation II: total height of the summation array.
  function automatic int unsigned impl2_rows(int unsigned n);
    return impl2_col_base(n, 2 * ((n - 2) / 2) + 2);
  endfunction

endpackage
