// ols_ref_pkg: reference model for the testbenches of the OLS codec.
//
// It holds the parity check matrix of the extended double-error-correcting
// OLS code with m = 4 (16 check bits, 20 data bits) typed in row by row as
// lists of data-bit numbers (1-based, as printed), and a plain software
// encoder and one-step majority decoder built on it. Nothing here uses the
// construction in ols_pkg, so it serves as an independent check of the RTL.
// Rows 1-8 restricted to bits 1-16 are the single-error-correcting k = 16 code.
package ols_ref_pkg;

  localparam int unsigned RK  = 20;  // data bits, extended t = 2 code
  localparam int unsigned RNR = 16;  // check bits

  typedef int unsigned row_t[5];

  // Data bits taking part in each check equation; 0 pads the unextended rows.
  localparam row_t HROW [RNR] = '{
    '{ 1,  2,  3,  4, 17}, '{ 5,  6,  7,  8, 17}, '{ 9, 10, 11, 12, 17}, '{13, 14, 15, 16, 17},
    '{ 1,  5,  9, 13, 18}, '{ 2,  6, 10, 14, 18}, '{ 3,  7, 11, 15, 18}, '{ 4,  8, 12, 16, 18},
    '{ 1,  6, 11, 16, 19}, '{ 2,  5, 12, 15, 19}, '{ 3,  8,  9, 14, 19}, '{ 4,  7, 10, 13, 19},
    '{ 1,  7, 12, 14, 20}, '{ 2,  8, 11, 13, 20}, '{ 3,  5, 10, 16, 20}, '{ 4,  6,  9, 15, 20}
  };

  // Check bits of data word d for the first nr rows, using data bits 1..k.
  function automatic logic [RNR-1:0] ref_encode(input logic [RK-1:0] d,
                                                input int unsigned nr = RNR,
                                                input int unsigned k = RK);
    logic [RNR-1:0] c;
    c = '0;
    for (int unsigned r = 0; r < nr; r++)
      for (int unsigned n = 0; n < 5; n++)
        if (HROW[r][n] >= 1 && HROW[r][n] <= k) c[r] ^= d[HROW[r][n]-1];
    return c;
  endfunction

  // Number of failing equations (among the first nr rows) that contain data bit b (0-based).
  function automatic int unsigned ref_votes(input logic [RNR-1:0] s, input int unsigned b,
                                            input int unsigned nr = RNR);
    int unsigned v;
    v = 0;
    for (int unsigned r = 0; r < nr; r++)
      for (int unsigned n = 0; n < 5; n++)
        if (HROW[r][n] == b + 1 && s[r]) v++;
    return v;
  endfunction

  // Bits that a t = 2 majority decoder flips (3 of 4 failing equations).
  function automatic logic [RK-1:0] ref_flip(input logic [RNR-1:0] s);
    logic [RK-1:0] f;
    for (int unsigned b = 0; b < RK; b++) f[b] = ref_votes(s, b) >= 3;
    return f;
  endfunction

  function automatic int unsigned popcount(input logic [63:0] v);
    int unsigned n;
    n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction

  // Verdict of the t = 2 decoder's uncorrectable test for syndrome s: flips
  // plus check equations they leave unexplained exceed 2.
  function automatic bit ref_uncorrectable(input logic [RNR-1:0] s);
    logic [RK-1:0]  f;
    logic [RNR-1:0] res;
    f   = ref_flip(s);
    res = s ^ ref_encode(f);
    return popcount(64'(f)) + popcount(64'(res)) > 2;
  endfunction

endpackage
