// scale2_last: the last scale-by-2 block of the scaler, with error
// correction.
//
// A chain of k blocks that each round odd values up computes
// w = ceil(v / 2^(k-1)) in front of the last block. This block halves w
// and rounds odd values down instead:
//   even : x_i' = <x_i * 2^-1>_{m_i}
//   odd  : x_i' = <<(x_i + 1) * 2^-1>_{m_i} - 1>_{m_i}   = (w - 1) / 2
// The result floor(ceil(v / 2^(k-1)) / 2) is v / 2^k rounded to the
// nearest integer with ties rounded down, so the error is at most 1/2
// (exactly 1/2 only for ties). As in the basic block, the
// halved number is X or X + M according to the sign, and the redundant
// residue is chosen among four values (even/odd times positive/negative):
//   <x_r 2^-1>,  <(x_r+1) 2^-1 - 1>,  <x_r 2^-1 + H>,  <(x_r+1) 2^-1 + H - 1>
// with H = <(m_r+1)/2 * <M>_{m_r}>_{m_r}. Those four expressions and the
// two base-channel ones are the published ones; the select encoding
// (odd = parity xor sign) and the single output register are this
// design's.
//
// Ports and timing are those of scale2_stage: one cycle of latency, one
// number per cycle.
module scale2_last
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
  rres_t xr_a, xr_b, xr_c, xr_d;

  sk_parity_det u_par (.x(in_x), .xr(in_xr), .parity(parity), .y(y));
  sign_det      u_sgn (.y(y), .sign(sign));

  assign odd = parity ^ sign;

  always_comb begin
    // (x + 1) * 2^-1 - 1 = x * 2^-1 + 2^-1 - 1 = x * 2^-1 + (m - 1) / 2
    for (int i = 0; i < N_MOD; i++)
      x_n[i] = mod_lut(in_x[i], inv2(MODULI[i]), odd ? (MODULI[i] - 1) / 2 : 0, MODULI[i]);
    xr_a = rres_t'(mod_lut(res_t'(in_xr), inv2(M_R), 0, M_R));                    // even, positive
    xr_b = rres_t'(mod_lut(res_t'(in_xr), inv2(M_R), (M_R - 1) / 2, M_R));        // odd, positive
    xr_c = rres_t'(mod_lut(res_t'(in_xr), inv2(M_R), HALF_M_R, M_R));             // even, negative
    xr_d = rres_t'(mod_lut(res_t'(in_xr), inv2(M_R),
                   (HALF_M_R + (M_R - 1) / 2) % M_R, M_R));               // odd, negative
    unique case ({sign, odd})
      2'b00:   xr_n = xr_a;
      2'b01:   xr_n = xr_b;
      2'b10:   xr_n = xr_c;
      default: xr_n = xr_d;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_x  <= x_n;
    out_xr <= xr_n;
  end

endmodule
