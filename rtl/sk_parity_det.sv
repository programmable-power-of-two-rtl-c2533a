// sk_parity_det: parity of an RNS number by the Shenoy-Kumaresan method.
//
// The CRT writes the represented integer X in [0, M) as
//   X = sum_i (M/m_i) * y_i - alpha * M,   y_i = <(M/m_i)^-1 * x_i>_{m_i},
// with alpha = floor(sum_i y_i/m_i) in [0, N_MOD-1]. Shenoy-Kumaresan
// recovers alpha from the redundant residue x_r = <X>_{m_r}:
//   <alpha>_{m_r} = <M^-1 * (sum_i <M/m_i>_{m_r} * y_i - x_r)>_{m_r}.
// Since M/m_i and M are odd, <X>_2 = xor_i y_i[0] xor alpha[0].
//
// With the published m_r = 5 and six base moduli alpha can be 0..5, so its
// residue mod 5 does not tell 0 from 5. This design adds a coarse sum of the
// fractions y_i/m_i, truncated to COARSE_BITS bits, which is < 1 when
// alpha = 0 and > 4 when alpha = 5, and uses it to choose; the correction
// is generated only when M_R < N_MOD. This is an addition of this design.
//
// The y_i are also output: the sign detector reuses them.
// Purely combinational. Inputs: base residues x (each < m_i) and x_r < M_R.
// Outputs: parity (1 = X odd) and y.
module sk_parity_det
  import rns_pkg::*;
(
  input  rns_t  x,
  input  rres_t xr,
  output logic  parity,
  output rns_t  y
);

  localparam int MINV_R  = mod_inv(M, M_R);
  localparam int CSUM_W  = COARSE_BITS + 3;

  res_t                 acc_r;      // <sum_i <M/m_i>_{m_r} y_i - x_r>_{m_r}
  res_t                 alpha_r;    // <alpha>_{m_r}
  logic                 alpha_odd;  // alpha[0]
  logic [CSUM_W-1:0]    coarse;
  logic                 ypar;

  always_comb begin
    acc_r  = '0;
    coarse = '0;
    ypar   = 1'b0;
    for (int i = 0; i < N_MOD; i++) begin
      y[i]   = mod_lut(x[i], mhat_inv(i), 0, MODULI[i]);
      acc_r  = mod_add(acc_r, mod_lut(y[i], mhat_mod(i, M_R), 0, M_R), M_R);
      coarse = coarse + CSUM_W'(frac_coarse(i, y[i]));
      ypar   = ypar ^ y[i][0];
    end
    // subtract x_r: add its additive inverse
    acc_r   = mod_add(acc_r, mod_lut(res_t'(xr), M_R - 1, 0, M_R), M_R);
    alpha_r = mod_lut(acc_r, MINV_R, 0, M_R);
    alpha_odd = alpha_r[0];
    if (M_R < N_MOD) begin
      // alpha_r + M_R is a candidate only if it stays below N_MOD; it is
      // the true value when the coarse integer part reaches it minus one.
      if (int'(alpha_r) + M_R <= N_MOD - 1 &&
          int'(coarse[CSUM_W-1:COARSE_BITS]) >= int'(alpha_r) + M_R - 1)
        alpha_odd = alpha_r[0] ^ M_R[0];   // alpha = alpha_r + M_R
    end
    parity = ypar ^ alpha_odd;
  end

endmodule
