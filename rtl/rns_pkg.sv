// rns_pkg: shared constants, types and constant functions of the RNS
// power-of-two scaler.
//
// The residue number system (RNS) base is the set of pairwise co-prime,
// odd moduli {13, 17, 29, 37, 41, 53}; its dynamic range is
// M = 515290009. A signed integer v with |v| <= (M-1)/2 is carried as the
// residues of its representative X = v mod M in [0, M): non-negative values
// occupy [0, (M-1)/2] and negative ones [(M+1)/2, M-1]. Next to the base
// residues the scaler carries one redundant residue X mod M_R (M_R = 5),
// which the parity detector needs. The base and the redundant modulus are
// the published configuration; the residue widths, the fraction precision
// FRAC_BITS and COARSE_BITS are choices of this implementation.
//
// All modular arithmetic by a constant is written as a small look-up table
// (a loop over every possible residue with a constant value per entry), the
// way RNS datapaths are usually mapped to logic. The functions below are
// evaluated at elaboration time wherever their arguments are constants.
package rns_pkg;

  localparam int N_MOD = 6;                                  // base size
  localparam int MODULI [N_MOD] = '{13, 17, 29, 37, 41, 53}; // RNS base
  localparam int M_R = 5;                                    // redundant modulus
  localparam int RW  = 6;                                    // base residue width
  localparam int RRW = 3;                                    // redundant residue width

  // Fraction precision of the fractional CRT. Each term y_i/m_i is rounded
  // up to FRAC_BITS bits, so the sum over-estimates X/M by less than
  // N_MOD * 2^-FRAC_BITS. That error must stay below 1/(2M) for the sign
  // test near M/2 and below 1/M for the integer part: 6 * 2^-34 = 3.5e-10
  // against 1/(2M) = 9.7e-10.
  localparam int FRAC_BITS = 34;
  localparam int SUM_W     = FRAC_BITS + 3;   // sum of six fractions < 6
  // Precision of the coarse fraction sum that tells alpha = 0 from alpha = 5
  // in the parity detector (truncation error 6 * 2^-3 < 1).
  localparam int COARSE_BITS = 3;

  typedef logic [RW-1:0]      res_t;    // one base residue
  typedef res_t [N_MOD-1:0]   rns_t;    // all base residues, index i = modulus i
  typedef logic [RRW-1:0]     rres_t;   // redundant residue
  typedef logic [SUM_W-1:0]   fsum_t;   // fixed-point fraction sum

  function automatic longint dyn_range();
    longint p = 1;
    for (int i = 0; i < N_MOD; i++) p = p * longint'(MODULI[i]);
    return p;
  endfunction

  localparam longint M = dyn_range();         // 515290009

  // Multiplicative inverse of a modulo m (m prime or co-prime to a).
  function automatic int mod_inv(longint a, int m);
    int r = 0;
    for (int k = 1; k < m; k++)
      if (((a % longint'(m)) * longint'(k)) % longint'(m) == 1) r = k;
    return r;
  endfunction

  // <M / m_i>_m
  function automatic int mhat_mod(int i, int m);
    return int'((M / longint'(MODULI[i])) % longint'(m));
  endfunction

  // <(M / m_i)^-1>_{m_i}
  function automatic int mhat_inv(int i);
    return mod_inv(M / longint'(MODULI[i]), MODULI[i]);
  endfunction

  // <2^-1>_m for odd m
  function automatic int inv2(int m);
    return (m + 1) / 2;
  endfunction

  // Look-up table: <x * c + a>_m for a residue x < 64 and constants c, a.
  function automatic res_t mod_lut(res_t x, int c, int a, int m);
    res_t r = '0;
    for (int k = 0; k < (1 << RW); k++)
      if (int'(x) == k) r = res_t'((k * c + a) % m);
    return r;
  endfunction

  // <a + b>_m for a, b < m
  function automatic res_t mod_add(res_t a, res_t b, int m);
    logic [RW:0] s = {1'b0, a} + {1'b0, b};
    if (int'(s) >= m) s = s - (RW+1)'(m);
    return s[RW-1:0];
  endfunction

  // Look-up table: ceil(y * 2^FRAC_BITS / m_i), the fraction y/m_i rounded up.
  function automatic fsum_t frac_ceil(int i, res_t y);
    fsum_t r = '0;
    for (int k = 0; k < (1 << RW); k++)
      if (int'(y) == k)
        r = fsum_t'(((longint'(k) << FRAC_BITS) + longint'(MODULI[i]) - 1)
                    / longint'(MODULI[i]));
    return r;
  endfunction

  // Look-up table: floor(y * 2^COARSE_BITS / m_i), the fraction truncated.
  function automatic logic [COARSE_BITS-1:0] frac_coarse(int i, res_t y);
    logic [COARSE_BITS-1:0] r = '0;
    for (int k = 0; k < (1 << RW); k++)
      if (int'(y) == k) r = COARSE_BITS'((k << COARSE_BITS) / MODULI[i]);
    return r;
  endfunction

endpackage
