// scale2_stage: one pipelined scale-by-2 block of the RNS scaler.
//
// Divides a signed RNS number by two, rounding odd values up:
// v' = ceil(v / 2). The number actually halved is X when X >= 0 and
// Y = X + M when X < 0 (M odd, so Y mod 2 = not X mod 2, and Y has the same
// base residues as X). The parity detector gives X mod 2, the sign
// detector the sign; their xor is the parity of the halved number:
//   even : x_i' = <x_i * 2^-1>_{m_i}
//   odd  : x_i' = <(x_i + 1) * 2^-1>_{m_i}       (halve the even value+1)
// so no conversion out of the RNS and no addition of M is needed in the
// base channels. The redundant residue must describe the new representative
// (X + M [+1]) / 2 when X is negative, so its channel adds the constant
// <(m_r+1)/2 * <M>_{m_r}>_{m_r} = <2^-1 * M>_{m_r} in that case.
//
// The residue operations, the parity/sign/xor structure and the extra term
// of the redundant channel follow the published block diagrams. The mux
// select is the parity of the halved number (1 = odd takes the "+1"
// path); register placement is this design's: one register stage at the
// output, so the latency is one clock cycle and the throughput one number
// per cycle.
//
// One case needs more than the published block: v = -1 (X = M - 1) halves
// to (2M - 1 + 1) / 2 = M, whose base residues are those of 0 but whose
// residue mod m_r would be <M>_{m_r} instead of 0. This design detects
// X = M - 1 (every x_i = m_i - 1) and forces the redundant residue to 0.
//
// Ports: clk, rst_n (synchronous, active low, clears out_valid only),
// in_valid / in_x / in_xr (base residues and residue mod M_R),
// out_valid / out_x / out_xr one cycle later.
module scale2_stage
  import rns_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  rns_t  in_x,
  input  rres_t in_xr,
  output logic  out_valid,
  output rns_t  out_x,
  output rres_t out_xr
);

  localparam int HALF_M_R = int'((longint'(inv2(M_R)) * (M % longint'(M_R))) % longint'(M_R));

  logic  parity, sign, odd;
  rns_t  y;
  rns_t  x_n;
  rres_t xr_n;
  res_t  xr_h;
  logic  minus_one;   // X = M - 1, i.e. v = -1

  sk_parity_det u_par (.x(in_x), .xr(in_xr), .parity(parity), .y(y));
  sign_det      u_sgn (.y(y), .sign(sign));

  assign odd = parity ^ sign;

  always_comb begin
    for (int i = 0; i < N_MOD; i++)
      x_n[i] = mod_lut(in_x[i], inv2(MODULI[i]), odd ? inv2(MODULI[i]) : 0, MODULI[i]);
    // <(x_r [+1]) * 2^-1>_{m_r}
    xr_h = mod_lut(res_t'(in_xr), inv2(M_R), odd ? inv2(M_R) : 0, M_R);
    if (sign) xr_h = mod_add(xr_h, res_t'(HALF_M_R), M_R);
    minus_one = 1'b1;
    for (int i = 0; i < N_MOD; i++)
      if (int'(in_x[i]) != MODULI[i] - 1) minus_one = 1'b0;
    if (minus_one) xr_h = '0;
    xr_n = rres_t'(xr_h);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_x  <= x_n;
    out_xr <= xr_n;
  end

endmodule
