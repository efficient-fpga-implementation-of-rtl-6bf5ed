// mia_pkg - construction rules of the multi-input adder tree.
//
// The tree is planned level by level from the number of rows it receives.
// A level that holds at least six rows groups them six at a time into 6-2
// adders and passes the rows left over (fewer than six) down unchanged; a
// level that holds three to five rows adds them in pairs with 2-1 (row)
// adders. Reduction stops at two rows. For M = 2*3^h rows this gives exactly
// h levels of 6-2 adders and no 2-1 adder. Each 6-2 level widens the rows by
// two bits and each 2-1 level by one, so every row holds its value exactly.
// All functions are constant functions used to size generate blocks.
package mia_pkg;

  // rows after one level that receives r rows
  function automatic int unsigned rows_next(int unsigned r);
    if (r >= 6)      return (r / 6) * 2 + (r % 6);
    else if (r > 2)  return (r / 2) + (r % 2);
    else             return r;
  endfunction

  // true when the level receiving r rows is built from 6-2 adders
  function automatic bit level_is_6_2(int unsigned r);
    return r >= 6;
  endfunction

  // number of levels needed to bring m rows down to two
  function automatic int unsigned num_levels(int unsigned m);
    int unsigned r = m;
    int unsigned l = 0;
    while (r > 2) begin
      r = rows_next(r);
      l++;
    end
    return l;
  endfunction

  // rows entering level l (l = num_levels(m) gives the tree's output rows)
  function automatic int unsigned rows_at(int unsigned m, int unsigned l);
    int unsigned r = m;
    for (int unsigned i = 0; i < l; i++) r = rows_next(r);
    return r;
  endfunction

  // width of the rows entering level l, for n-bit inputs
  function automatic int unsigned width_at(int unsigned n, int unsigned m, int unsigned l);
    int unsigned r = m;
    int unsigned w = n;
    for (int unsigned i = 0; i < l; i++) begin
      w += level_is_6_2(r) ? 2 : 1;
      r = rows_next(r);
    end
    return w;
  endfunction

  // number of 6-2 adders in the whole tree
  function automatic int unsigned count_6_2(int unsigned m);
    int unsigned r = m;
    int unsigned c = 0;
    while (r > 2) begin
      if (level_is_6_2(r)) c += r / 6;
      r = rows_next(r);
    end
    return c;
  endfunction

  // number of 2-1 adders in the tree (the final row adder not included)
  function automatic int unsigned count_2_1(int unsigned m);
    int unsigned r = m;
    int unsigned c = 0;
    while (r > 2) begin
      if (!level_is_6_2(r)) c += r / 2;
      r = rows_next(r);
    end
    return c;
  endfunction

  // width of the exact sum of m n-bit numbers
  function automatic int unsigned sum_width(int unsigned n, int unsigned m);
    return n + $clog2(m);
  endfunction

endpackage
