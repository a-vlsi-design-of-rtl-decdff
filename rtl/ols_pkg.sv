// ols_pkg: construction of the parity check matrix of an Orthogonal Latin
// Square (OLS) code and of its extension with extra data columns.
//
// An OLS code with m*m data bits that corrects t errors has 2*t*m check bits,
// split into 2*t groups of m bits. Data bit (i,j) (row i, column j of the m x m
// data square, bit index i*m+j) has exactly one 1 in every group:
//   group 0      : check bit i                      (matrix M1)
//   group g >= 1 : check bit ((g-1) * i) XOR j       (M2 is [I I .. I], then
//                                                    the Latin squares)
// where the product is taken in GF(m). For m = 4 this reproduces the 16 x 16
// data part of the published matrix exactly (multipliers 0, 1 and alpha), and
// it generalises the row rule of M1 ("ones at (r-1)m+1 .. (r-1)m+m") and
// M2 = [I_m I_m .. I_m]. The Galois-field form is this design's choice for
// sizes other than m = 4; m must be a power of two.
//
// Extension: extra data bits are added whose columns have all 2t ones inside
// one group, chosen so that two columns still share at most one check bit,
// which keeps one-step majority-logic decoding (OS-MLD) valid. For
// l = m/(2t) >= 2t the combinations of one group are the columns of a smaller
// OLS code with l*l data bits (plus its own extension), as for m = 16, where
// the 20 columns of the extended m = 4 code give 20 combinations per group.
// Otherwise each group is cut into m/(2t) disjoint blocks of 2t bits: one
// combination per group for m = 4 (all four bits set, the published k = 20
// code) and two for m = 8.
//
// Bit order: data bit d_n (1-based) is d[n-1], check bit c_n is c[n-1].
package ols_pkg;

  // Upper bounds on the vector widths the mask function below returns.
  localparam int unsigned KMAX = 2048;
  localparam int unsigned RMAX = 256;

  // Reduction polynomial of GF(m), m a power of two up to 64.
  function automatic int unsigned gf_poly(input int unsigned m);
    case (m)
      2:       return 'h3;
      4:       return 'h7;
      8:       return 'hB;
      16:      return 'h13;
      32:      return 'h25;
      64:      return 'h43;
      default: return 0;
    endcase
  endfunction

  // Product a*b in GF(m).
  function automatic int unsigned gf_mul(input int unsigned a, input int unsigned b,
                                         input int unsigned m);
    int unsigned p, aa;
    p  = 0;
    aa = a;
    for (int unsigned bit_i = 0; bit_i < 8; bit_i++) begin
      if (((b >> bit_i) & 1) != 0) p ^= aa;
      aa = aa << 1;
      if ((aa & m) != 0) aa ^= gf_poly(m);
    end
    return p;
  endfunction

  // Number of check bits.
  function automatic int unsigned check_bits(input int unsigned m, input int unsigned t);
    return 2 * t * m;
  endfunction

  // Number of extra data columns added in each group of m check bits.
  function automatic int unsigned ext_per_group(input int unsigned m, input int unsigned t);
    int unsigned l;
    if (m < 2 * t || (m % (2 * t)) != 0) return 0;
    l = m / (2 * t);
    if (l >= 2 * t) return l * l + 2 * t * (l / (2 * t));
    return l;
  endfunction

  // Number of data bits: m*m, plus 2t*ext_per_group when extended.
  function automatic int unsigned data_bits(input int unsigned m, input int unsigned t,
                                            input bit ext);
    return m * m + (ext ? 2 * t * ext_per_group(m, t) : 0);
  endfunction

  // Position (0..m-1) inside a group of m check bits of the n-th one of
  // column q of a plain OLS code of size m (q < m*m).
  function automatic int unsigned base_pos(input int unsigned m, input int unsigned q,
                                           input int unsigned n);
    int unsigned i, j;
    i = q / m;
    j = q % m;
    if (n == 0) return i;
    return gf_mul(n - 1, i, m) ^ j;
  endfunction

  // Global check bit index (0..2tm-1) of the n-th one (n = 0..2t-1) of data
  // column col.
  function automatic int unsigned col_row(input int unsigned m, input int unsigned t,
                                          input int unsigned col, input int unsigned n);
    int unsigned e, npg, grp, q, l, lpg, ig, b;
    if (col < m * m) return n * m + base_pos(m, col, n);
    e   = col - m * m;
    npg = ext_per_group(m, t);
    grp = e / npg;
    q   = e % npg;
    l   = m / (2 * t);
    if (l >= 2 * t) begin
      // combination q is column q of the extended OLS code of size l
      if (q < l * l) return grp * m + n * l + base_pos(l, q, n);
      lpg = l / (2 * t);
      ig  = (q - l * l) / lpg;
      b   = (q - l * l) % lpg;
      return grp * m + ig * l + b * 2 * t + n;
    end
    return grp * m + q * 2 * t + n;
  endfunction

  // Row r of the data part of H: bit col is set when data bit col takes part
  // in check bit r.
  function automatic logic [KMAX-1:0] row_mask(input int unsigned m, input int unsigned t,
                                               input int unsigned k, input int unsigned r);
    logic [KMAX-1:0] mask;
    mask = '0;
    for (int unsigned col = 0; col < k; col++)
      for (int unsigned n = 0; n < 2 * t; n++)
        if (col_row(m, t, col, n) == r) mask[col] = 1'b1;
    return mask;
  endfunction

  // True when the sizes can be built: m a power of two, 2t-1 <= m (enough
  // Latin squares), and at least one combination per group when extended.
  function automatic bit valid_config(input int unsigned m, input int unsigned t,
                                      input bit ext);
    if (gf_poly(m) == 0 || t == 0 || 2 * t - 1 > m) return 1'b0;
    if (ext && ext_per_group(m, t) == 0) return 1'b0;
    if (data_bits(m, t, ext) > KMAX || check_bits(m, t) > RMAX) return 1'b0;
    return 1'b1;
  endfunction

endpackage
