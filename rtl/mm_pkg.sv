// mm_pkg: sizes and index helpers shared by the modular-multiplier arrays.
//
// An n-bit modulus N is handled with (n+3)-bit two's-complement carry-save
// words, which hold every intermediate value of the reduction in
// [-2^(n+2), 2^(n+2)). The sign estimator looks at the five bit positions
// n-2 .. n+2 (estimation precision t = n-1). The systolic array folds the n-2
// low bit positions into columns of two and merges the five top positions
// into one supercell, giving w = ceil(n/2) columns. For odd n the lowest
// column holds bit 0 alone (this grouping is a choice of this design; the
// even case follows the published array).
package mm_pkg;

  // Carry-save word width for an n-bit modulus.
  function automatic int unsigned cs_width(int unsigned n);
    return n + 3;
  endfunction

  // Number of columns of the systolic array, w = ceil(n/2).
  function automatic int unsigned sys_width(int unsigned n);
    return (n + 1) / 2;
  endfunction

  // Cycles from operand entry to carry-save result.
  function automatic int unsigned semi_latency(int unsigned n);
    return 3 * n;
  endfunction

  function automatic int unsigned sys_latency(int unsigned n);
    return 6 * n + sys_width(n) - 2;
  endfunction

  // Column of the systolic array that computes bit position b
  // (column 0 is the least significant, column w-1 the supercell).
  function automatic int unsigned sys_col(int unsigned n, int unsigned b);
    int unsigned c;
    c = (b + n % 2) / 2;
    return (c > sys_width(n) - 1) ? sys_width(n) - 1 : c;
  endfunction

  // Lowest and highest bit position held by column c.
  function automatic int unsigned col_lo(int unsigned n, int unsigned c);
    if (c == sys_width(n) - 1) return n - 2;
    if (n % 2 == 0) return 2 * c;
    return (c == 0) ? 0 : 2 * c - 1;
  endfunction

  function automatic int unsigned col_hi(int unsigned n, int unsigned c);
    if (c == sys_width(n) - 1) return n + 2;
    if (n % 2 == 0) return 2 * c + 1;
    return 2 * c;
  endfunction

  // The three row kinds of one iteration of the algorithm.
  typedef enum logic [1:0] {
    ROW_ADD   = 2'd0,  // Step 2a: shift and add A_k * B   (X cells)
    ROW_SUB2N = 2'd1,  // Step 2b: conditionally subtract 2N (Y and Z cells)
    ROW_SUBN  = 2'd2   // Step 2c: conditionally subtract N  (U and W cells)
  } row_kind_e;

endpackage
