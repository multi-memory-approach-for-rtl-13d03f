// rng_pkg: types, constants and elaboration-time functions shared by the
// multi-memory random number generator.
//
// What lives here:
//   * dist_e          - which distribution an ICDF memory holds.
//   * LFSR42_TAPS     - feedback mask of the 42-bit LFSRs.  The 42-bit width is
//                       the one of the reference architecture; the polynomial
//                       x^42 + x^41 + x^20 + x^19 + 1 is this design's choice
//                       (a maximal-length entry of common LFSR tap tables).
//   * make_seed       - derives distinct, non-zero LFSR seeds from a base value
//                       and an index (SplitMix64 hash).  Only used at
//                       elaboration, to tie the seed inputs to constants.
//   * icdf_value      - the stored x-value of one ICDF table entry.  Entry i of a
//                       memory that covers the probabilities [u_lo, 1) holds
//                       F^-1(u_lo + (1 - u_lo) * (i + 0.5) / depth), scaled,
//                       rounded to the nearest integer and saturated.
//   * inv_norm        - inverse standard normal CDF (Acklam's rational
//                       approximation, relative error about 1e-9).
// None of the real-valued functions produce hardware: they fill ROM contents
// and parameters while the design is elaborated.
package rng_pkg;

  typedef enum logic [0:0] {
    EXPONENTIAL   = 1'b0,  // F^-1(u) = -scale * ln(1 - u)
    HALF_GAUSSIAN = 1'b1   // F^-1(u) =  scale * Phi^-1((1 + u) / 2), |X| of N(0, 1)
  } dist_e;

  localparam int unsigned LFSR42_W = 42;
  localparam logic [LFSR42_W-1:0] LFSR42_TAPS = 42'h300_000C_0000;  // bits 41,40,19,18

  function automatic logic [63:0] splitmix64(input logic [63:0] x);
    logic [63:0] z;
    z = x + 64'h9E37_79B9_7F4A_7C15;
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    return z ^ (z >> 31);
  endfunction

  // Distinct non-zero seed number `idx` of the generator group `base`.
  function automatic logic [63:0] make_seed(input int unsigned base, input int unsigned idx);
    logic [63:0] s;
    s = splitmix64({32'(base), 32'(idx)});
    if (s[41:0] == '0) s[0] = 1'b1;
    return s;
  endfunction

  // Inverse of the standard normal CDF, 0 < p < 1.
  function automatic real inv_norm(input real p);
    real q, r, num, den;
    const real P_LOW = 0.02425;
    if (p < P_LOW) begin
      q   = $sqrt(-2.0 * $ln(p));
      num = (((((-7.784894002430293e-03 * q - 3.223964580411365e-01) * q
             - 2.400758277161838e+00) * q - 2.549732539343734e+00) * q
             + 4.374664141464968e+00) * q + 2.938163982698783e+00);
      den = ((((7.784695709041462e-03 * q + 3.224671290700398e-01) * q
             + 2.445134137142996e+00) * q + 3.754408661907416e+00) * q + 1.0);
      return num / den;
    end else if (p <= 1.0 - P_LOW) begin
      q   = p - 0.5;
      r   = q * q;
      num = (((((-3.969683028665376e+01 * r + 2.209460984245205e+02) * r
             - 2.759285104469687e+02) * r + 1.383577518672690e+02) * r
             - 3.066479806614716e+01) * r + 2.506628277459239e+00) * q;
      den = (((((-5.447609879822406e+01 * r + 1.615858368580409e+02) * r
             - 1.556989798598866e+02) * r + 6.680131188771972e+01) * r
             - 1.328068155288572e+01) * r + 1.0);
      return num / den;
    end else begin
      q   = $sqrt(-2.0 * $ln(1.0 - p));
      num = (((((-7.784894002430293e-03 * q - 3.223964580411365e-01) * q
             - 2.400758277161838e+00) * q - 2.549732539343734e+00) * q
             + 4.374664141464968e+00) * q + 2.938163982698783e+00);
      den = ((((7.784695709041462e-03 * q + 3.224671290700398e-01) * q
             + 2.445134137142996e+00) * q + 3.754408661907416e+00) * q + 1.0);
      return -num / den;
    end
  endfunction

  // Stored value of entry `idx` of a memory of `depth` entries covering [u_lo, 1).
  function automatic longint unsigned icdf_value(input dist_e kind, input real scale,
                                                 input real u_lo, input int unsigned depth,
                                                 input int unsigned idx, input int unsigned data_w);
    real u, x, vmax;
    u = u_lo + (1.0 - u_lo) * (real'(idx) + 0.5) / real'(depth);
    if (kind == EXPONENTIAL) x = -scale * $ln(1.0 - u);
    else                     x = scale * inv_norm(0.5 + 0.5 * u);
    vmax = real'((64'd1 << data_w) - 64'd1);
    if (x < 0.0)  x = 0.0;
    if (x > vmax) x = vmax;
    return longint'($rtoi(x + 0.5));
  endfunction

endpackage
