// Arithmetic reference model for the fixed-width Booth multiplier
// testbenches. It does not look at the multiplier's structure: it forms the
// radix-4 digits d(i) = -2*y(2i+1) + y(2i) + y(2i-1) of Y, writes each row
// d(i)*X as it appears in the partial-product matrix (|d|*X for d >= 0, its
// bitwise inverse for d < 0, N+1 bits, with the +1 correction at the row's
// LSB column), and sums the matrix bits by column with plain integers.
//   lp       value of all bits in the n-1 truncated columns
//   lp_minor value of the bits below the top truncated column
//   maj      number of ones in the top truncated column (LP_major)
//   nz       bit i set when digit i (i <= N/2-2) is non-zero
//   est      estimated carry from LP_minor, from the published rule
//   pt       reference fixed-width result times 2^(n-1):
//            x*y - lp + floor((maj + est + 1) / 2) * 2^(n-1)
package fwm_ref_pkg;

  typedef struct {
    longint exact;
    longint lp;
    longint lp_minor;
    int     maj;
    int     nz;
    int     est;
    longint pt;
  } ref_t;

  // estimated carry for a flag pattern (0, 1 or 2)
  function automatic int est_carry(int n, int nz);
    int ones = $countones(nz);
    if (n == 8)  return (ones == 3) ? 1 : 0;
    if (n == 10) return (ones >= 3) ? 1 : 0;
    return (ones == 5) ? 2 : ((ones >= 3) ? 1 : 0);
  endfunction

  function automatic ref_t model(int n, longint x, longint y);
    ref_t   r;
    longint ybits = y & ((longint'(1) << n) - 1);
    longint mask_n1 = (longint'(1) << (n + 1)) - 1;
    r.exact    = x * y;
    r.lp       = 0;
    r.lp_minor = 0;
    r.maj      = 0;
    r.nz       = 0;
    for (int i = 0; i < n / 2; i++) begin
      int     d;
      longint row, cor;
      longint ym1 = (i == 0) ? 0 : (ybits >> (2 * i - 1)) & 1;
      d = -2 * int'((ybits >> (2 * i + 1)) & 1) + int'((ybits >> (2 * i)) & 1) + int'(ym1);
      if (d >= 0) begin
        row = (longint'(d) * x) & mask_n1;
        cor = 0;
      end else begin
        row = ~(longint'(-d) * x) & mask_n1;
        cor = 1;
      end
      if (d != 0 && i <= n / 2 - 2) r.nz |= (1 << i);
      r.lp       += ((row << (2 * i)) & ((longint'(1) << (n - 1)) - 1))
                  + ((2 * i < n - 1) ? (cor << (2 * i)) : 0);
      r.lp_minor += ((row << (2 * i)) & ((longint'(1) << (n - 2)) - 1))
                  + ((2 * i < n - 2) ? (cor << (2 * i)) : 0);
      r.maj      += int'(((row << (2 * i)) >> (n - 2)) & 1)
                  + ((2 * i == n - 2) ? int'(cor) : 0);
    end
    r.est = est_carry(n, r.nz);
    r.pt  = r.exact - r.lp + (longint'((r.maj + r.est + 1) / 2) << (n - 1));
    return r;
  endfunction

endpackage
