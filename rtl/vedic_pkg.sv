// Shared constants and elaboration-time functions of the compressor-based
// Vedic multiplier.
//
// An N x N multiplication by the vertical-and-crosswise rule forms, for every
// product column k, the partial products a[i] & b[k-i]. Each column is summed
// by one counter ("column adder") whose output bit j is a carry into column
// k + j. These functions work out, for every column, how many bits arrive
// (partial products plus carries) and how wide its count is, so that the
// multiplier can be generated for any N up to MAX_N.
package vedic_pkg;

  // Largest column a single compressor can take (the 20-5 compressor).
  localparam int MAX_COL_IN = 20;
  // Widest column count (20-5 compressor).
  localparam int MAX_COL_W  = 5;
  // Largest operand width the tables below are sized for. With N = 16 the
  // tallest column holds 19 bits; N = 17 would need 21.
  localparam int MAX_N      = 16;

  // Number of partial products a[i] & b[k-i] in column k of an n x n product.
  function automatic int pp_count(int n, int k);
    if (k < n)          return k + 1;
    else if (k < 2*n-1) return 2*n - 1 - k;
    else                return 0;
  endfunction

  // Lowest i with a[i] & b[k-i] in column k.
  function automatic int pp_low(int n, int k);
    return (k < n) ? 0 : k - n + 1;
  endfunction

  // Width of the count produced for a column of nin bits, given the
  // compressor chosen for it: wire, half adder, full adder, 5-3, 10-4, 15-4
  // or 20-5.
  function automatic int count_width(int nin);
    if (nin <= 1)       return 1;
    else if (nin <= 3)  return 2;
    else if (nin <= 5)  return 3;
    else if (nin <= 15) return 4;
    else                return 5;
  endfunction

  // Number of bits arriving at column k: partial products plus carry bit j
  // of every column k - j whose count is wider than j.
  function automatic int col_inputs(int n, int k);
    int nin [2*MAX_N];
    for (int c = 0; c <= k; c++) begin
      nin[c] = pp_count(n, c);
      for (int j = 1; j < MAX_COL_W; j++)
        if (c - j >= 0 && count_width(nin[c-j]) > j) nin[c]++;
    end
    return nin[k];
  endfunction

  // Whether column k receives bit j of column k - j.
  function automatic bit has_carry(int n, int k, int j);
    if (k - j < 0) return 1'b0;
    return count_width(col_inputs(n, k - j)) > j;
  endfunction

  // Input position, within column k, of bit j of column k - j: the partial
  // products come first, then the carries in order of increasing j.
  function automatic int carry_slot(int n, int k, int j);
    int slot = pp_count(n, k);
    for (int jj = 1; jj < j; jj++)
      if (has_carry(n, k, jj)) slot++;
    return slot;
  endfunction

  // Tallest column of an n x n product, and whether every column fits into
  // one compressor.
  function automatic int max_col_inputs(int n);
    int m = 0;
    for (int k = 0; k < 2*n; k++)
      if (col_inputs(n, k) > m) m = col_inputs(n, k);
    return m;
  endfunction

  function automatic bit columns_fit(int n);
    return max_col_inputs(n) <= MAX_COL_IN;
  endfunction

endpackage
