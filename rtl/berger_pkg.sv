// Shared constants and elaboration-time helpers for the Berger-code checkers.
//
// A Berger code BC(n,k) appends to k information bits an r-bit check symbol
// that is the binary count of zeros among the information bits. The checkers
// in this library target the case k = 2^(r-1) (k = 8, 16, 32, ...), so
// r = log2(k) + 1.
//
// The functions below size and schedule the 0's counter. That counter is a
// column-compression network: a first level of complementary cells (C-FA,
// C-HA) turns the raw bits into weight-1 and weight-2 partial counts, then
// each column, from the least significant upward, is reduced to a single bit
// with full adders while it holds three or more bits, and with one half adder
// when exactly two are left. Carries go to the next column. For k = 8 this
// gives the 2 C-FA + 1 C-HA + 2 FA + 2 HA network of the reference design;
// in general it uses k - r full adders (C-FA included). The grouping rule of
// the first level for k other than 8 is this library's own choice.
package berger_pkg;

  // Number of check bits r for k information bits, k = 2^(r-1).
  function automatic int check_bits(input int k);
    return $clog2(k) + 1;
  endfunction

  // First level: number of C-FA cells. Raw bits are grouped in threes from
  // x[0] upward; a remainder of two bits takes one C-HA, a remainder of one
  // bit is avoided by turning the last C-FA into two C-HA cells.
  function automatic int n_cfa(input int k);
    if (k % 3 == 0) return k / 3;
    if (k % 3 == 2) return (k - 2) / 3;
    return (k - 4) / 3;
  endfunction

  function automatic int n_cha(input int k);
    if (k % 3 == 0) return 0;
    if (k % 3 == 2) return 1;
    return 2;
  endfunction

  // Number of first-level cells; each puts one bit in column 0 and one in
  // column 1.
  function automatic int n_first(input int k);
    return n_cfa(k) + n_cha(k);
  endfunction

  // Bits that enter column w before it is reduced (first-level bits plus the
  // carries of column w-1).
  function automatic int col_bits(input int k, input int w);
    int n;
    n = n_first(k);            // column 0
    for (int i = 1; i <= w; i++)
      n = n / 2 + ((i == 1) ? n_first(k) : 0);
    return n;
  endfunction

  // Largest column, used to size the per-column wire pools.
  function automatic int max_col_bits(input int k);
    int m;
    m = 0;
    for (int w = 0; w < check_bits(k); w++)
      if (col_bits(k, w) > m) m = col_bits(k, w);
    return m;
  endfunction

endpackage
