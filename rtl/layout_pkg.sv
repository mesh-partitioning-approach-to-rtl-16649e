// layout_pkg: types and elaboration-time helpers shared by the tile layout blocks.
//
// A two-dimensional K x K data array is stored in a memory cell array of p rows and
// q columns. The array index space is cut into equal rectangles of m columns (x
// direction) by n rows (y direction) with m*n = q, and each rectangle is placed in one
// memory row. Both the order in which rectangles are numbered and the order of the
// elements inside a rectangle are either row major or column major, which gives the
// four tile based layout candidates.
//
// The helpers here are constant functions used to size ports and to enumerate the
// rectangle shapes m x n = q that an exhaustive search has to try.
package layout_pkg;

  // Traversal order used for rectangles and for elements inside a rectangle.
  typedef enum logic {
    ORDER_ROW_MAJOR = 1'b0,
    ORDER_COL_MAJOR = 1'b1
  } order_e;

  // ceil(a / b) for positive operands.
  function automatic int ceil_div(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  // Width of an unsigned counter or index that must hold the values 0 .. n-1 (at least 1).
  function automatic int idx_w(input int n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Number of rectangle shapes m x n with m*n = q (the divisors of q).
  function automatic int num_shapes(input int q);
    int cnt;
    cnt = 0;
    for (int d = 1; d <= q; d++) if (q % d == 0) cnt++;
    return cnt;
  endfunction

  // Width m (x extent) of shape number s. Shapes are numbered from the widest
  // (m = q, n = 1, the row major layout) to the narrowest (m = 1, n = q), so a search
  // that keeps the first minimum prefers the row major shape on a tie.
  function automatic int shape_width(input int q, input int s);
    int cnt;
    cnt = 0;
    for (int d = q; d >= 1; d--) begin
      if (q % d == 0) begin
        if (cnt == s) return d;
        cnt++;
      end
    end
    return 1;
  endfunction

  // Number of memory rows a K x K array occupies with m x n rectangles, one per row.
  function automatic int rows_needed(input int k, input int m, input int n);
    return ceil_div(k, m) * ceil_div(k, n);
  endfunction

  // Largest rows_needed over all shapes of q: the row count that fits every shape.
  function automatic int max_rows_all_shapes(input int k, input int q);
    int best, r, m;
    best = 1;
    for (int s = 0; s < num_shapes(q); s++) begin
      m = shape_width(q, s);
      r = rows_needed(k, m, q / m);
      if (r > best) best = r;
    end
    return best;
  endfunction

endpackage
