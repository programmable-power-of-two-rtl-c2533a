// tb_rns_ref_pkg: reference arithmetic for the scaler testbenches.
//
// Works on whole integers (longint) with the plain % operator, independent
// of the look-up tables in the design: encodes an integer into residues,
// computes the CRT quantities y_i and alpha, and the expected results of
// halving and of scaling by 2^n with the scaler's rounding.
package tb_rns_ref_pkg;
  import rns_pkg::*;

  localparam longint TM = 64'd13 * 64'd17 * 64'd29 * 64'd37 * 64'd41 * 64'd53;
  localparam longint HALF = (TM - 1) / 2;
  localparam int     TMOD [6] = '{13, 17, 29, 37, 41, 53};

  function automatic longint pmod(longint a, longint m);
    longint r = a % m;
    if (r < 0) r = r + m;
    return r;
  endfunction

  // representative in [0, M) of a signed value
  function automatic longint rep(longint v);
    return pmod(v, TM);
  endfunction

  function automatic rns_t enc(longint x);
    rns_t r;
    for (int i = 0; i < 6; i++) r[i] = res_t'(pmod(x, longint'(TMOD[i])));
    return r;
  endfunction

  function automatic rres_t enc_r(longint x);
    return rres_t'(pmod(x, 5));
  endfunction

  function automatic longint inv_of(longint a, longint m);
    for (longint k = 1; k < m; k++) if (pmod(a * k, m) == 1) return k;
    return 0;
  endfunction

  // y_i = <(M/m_i)^-1 x_i>_{m_i}
  function automatic rns_t crt_y(longint x);
    rns_t r;
    for (int i = 0; i < 6; i++) begin
      longint m = longint'(TMOD[i]);
      r[i] = res_t'(pmod(pmod(x, m) * inv_of(TM / m, m), m));
    end
    return r;
  endfunction

  // alpha = (sum_i (M/m_i) y_i - X) / M
  function automatic longint crt_alpha(longint x);
    rns_t y = crt_y(x);
    longint s = 0;
    for (int i = 0; i < 6; i++) s = s + (TM / longint'(TMOD[i])) * longint'(y[i]);
    return (s - x) / TM;
  endfunction

  // the number whose y_i are given (used to reach alpha = 5)
  function automatic longint from_y(rns_t y);
    longint s = 0;
    for (int i = 0; i < 6; i++) s = s + (TM / longint'(TMOD[i])) * longint'(y[i]);
    return pmod(s, TM);
  endfunction

  function automatic longint floor_div(longint a, longint b);
    if (a >= 0) return a / b;
    return -((-a + b - 1) / b);
  endfunction

  function automatic longint ceil_div(longint a, longint b);
    return -floor_div(-a, b);
  endfunction

  // expected scaler result for exponent n: floor(ceil(v / 2^(n-1)) / 2)
  function automatic longint scale_ref(longint v, int n);
    return floor_div(ceil_div(v, longint'(1) << (n - 1)), 2);
  endfunction

  // random signed value in [-(M-1)/2, (M-1)/2]
  function automatic longint rand_v();
    longint r = (longint'($urandom) << 32 | longint'($urandom)) & 64'h7fff_ffff_ffff_ffff;
    return (r % TM) - HALF;
  endfunction

  // random representative with alpha = 5 (all y_i near m_i - 1)
  function automatic longint rand_alpha5();
    rns_t y;
    longint x;
    do begin
      for (int i = 0; i < 6; i++) y[i] = res_t'(TMOD[i] - 1 - int'($urandom % 3));
      x = from_y(y);
    end while (crt_alpha(x) != 5);
    return x;
  endfunction

  // signed value of a representative
  function automatic longint sval(longint x);
    return (x > HALF) ? x - TM : x;
  endfunction
endpackage
