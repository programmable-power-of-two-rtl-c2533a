// frac_crt_base_ext: base extension of an RNS number to the redundant
// modulus M_R by the fractional CRT.
//
// From the base residues x_i it computes y_i = <(M/m_i)^-1 * x_i>_{m_i}
// (first pipeline stage), then the fixed-point sum of the fractions
// y_i/m_i, each rounded up to FRAC_BITS bits. Its integer part is the CRT
// overflow alpha = floor(sum_i y_i/m_i) exactly, because the rounding error
// (< 6 * 2^-34) is smaller than the gap 1/M between X/M and the next
// integer. The redundant residue then follows from the CRT modulo M_R:
//   x_r = <sum_i <M/m_i>_{m_r} * y_i - alpha * <M>_{m_r}>_{m_r}
// (second pipeline stage). The method and the two-cycle latency follow the
// published choice of the fractional CRT for this extension; the table
// precision and register placement are this design's.
//
// Ports: clk, rst_n (synchronous, active low, clears the valid bits),
// in_valid / in_x; out_valid / out_x (the base residues, delayed) / out_xr,
// two cycles after the input. One number per cycle.
module frac_crt_base_ext
  import rns_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  rns_t  in_x,
  output logic  out_valid,
  output rns_t  out_x,
  output rres_t out_xr
);

  localparam int M_MOD_R = int'(M % longint'(M_R));

  // stage 1: y_i
  logic v1;
  rns_t x1, y1;
  rns_t y_n;

  always_comb
    for (int i = 0; i < N_MOD; i++)
      y_n[i] = mod_lut(in_x[i], mhat_inv(i), 0, MODULI[i]);

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    x1 <= in_x;
    y1 <= y_n;
  end

  // stage 2: fraction sum, alpha, x_r
  fsum_t fsum;
  res_t  alpha;
  res_t  acc;
  rres_t xr_n;

  always_comb begin
    fsum = '0;
    acc  = '0;
    for (int i = 0; i < N_MOD; i++) begin
      fsum = fsum + frac_ceil(i, y1[i]);
      acc  = mod_add(acc, mod_lut(y1[i], mhat_mod(i, M_R), 0, M_R), M_R);
    end
    alpha = res_t'(fsum[SUM_W-1:FRAC_BITS]);
    // subtract alpha * <M>_{m_r}: add alpha * (m_r - <M>_{m_r})
    acc  = mod_add(acc, mod_lut(alpha, (M_R - M_MOD_R) % M_R, 0, M_R), M_R);
    xr_n = rres_t'(acc);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
    out_x  <= x1;
    out_xr <= xr_n;
  end

endmodule
