// sign_det: sign of an RNS number by the fractional CRT.
//
// Dividing the CRT by M/2 gives X_s = 2X/M = <sum_i 2 * y_i/m_i>_2, with
// y_i = <(M/m_i)^-1 * x_i>_{m_i}. X is negative (X >= (M+1)/2) exactly when
// the integer part of X_s is 1, i.e. when the fractional part of
// sum_i y_i/m_i is at least 1/2. That is the method the scaler uses.
//
// Each fraction y_i/m_i comes from a table, rounded up to FRAC_BITS bits
// (34 by default). Rounding up keeps X = 0 exact and never pushes X just
// below M/2 over the threshold; the total error 6 * 2^-34 is below
// 1/(2M), so X = (M+1)/2 is still seen as negative. The bit weighing 1/2
// in the sum is the sign. The precision and the rounding direction are
// this design's choice.
//
// Purely combinational. Input: the y_i, computed by the parity detector.
// Output: sign (1 = negative).
module sign_det
  import rns_pkg::*;
(
  input  rns_t y,
  output logic sign
);

  fsum_t sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < N_MOD; i++) sum = sum + frac_ceil(i, y[i]);
    sign = sum[FRAC_BITS-1];
  end

endmodule
