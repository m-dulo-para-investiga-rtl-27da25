// One ROM level of the Gaussian noise generator.
//
// The half-normal inverse CDF z = sqrt(2)*erfinv(x) is tabulated over a
// recursively partitioned x axis: level 1 splits [0,1) into 512 equal
// segments; level k splits the last segment of level k-1 again into 512.
// Entry i of level k is z at the centre of its segment, whose distance to
// x = 1 (the tail probability 1-x) is (512 - i - 0.5) * 512^-k. Entries are
// unsigned 11-bit numbers with 8 fractional bits (Q3.8), so level 5 reaches
// z = 7.6, inside the 7.996 the word can hold.
//
// The table is computed at elaboration by a constant function: the inverse
// normal CDF uses the rational approximations of P. J. Acklam (relative
// error below 1.2e-9, far finer than the 2^-9 rounding of the word). Read
// is combinational (a ROM addressed by a 9-bit index).
module awgn_rom #(
  parameter int unsigned LEVEL = 1,   // 1..5
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = 11,
  parameter int unsigned FRAC  = 8
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [W-1:0]             data
);
  typedef logic [W-1:0] rom_t [DEPTH];

  // Upper-tail inverse of the standard normal CDF: z with P(Z > z) = pt,
  // 0 < pt <= 0.5.
  function automatic real inv_tail(input real pt);
    real c0, c1, c2, c3, c4, c5, d0, d1, d2, d3;
    real a0, a1, a2, a3, a4, a5, b0, b1, b2, b3, b4;
    real q, r, x;
    c0 = -7.784894002430293e-03; c1 = -3.223964580411365e-01; c2 = -2.400758277161838e+00;
    c3 = -2.549732539343734e+00; c4 =  4.374664141464968e+00; c5 =  2.938163982698783e+00;
    d0 =  7.784695709041462e-03; d1 =  3.224671290700398e-01; d2 =  2.445134137142996e+00;
    d3 =  3.754408661907416e+00;
    a0 = -3.969683028665376e+01; a1 =  2.209460984245205e+02; a2 = -2.759285104469687e+02;
    a3 =  1.383577518672690e+02; a4 = -3.066479806614716e+01; a5 =  2.506628277459239e+00;
    b0 = -5.447609879822406e+01; b1 =  1.615858368580409e+02; b2 = -1.556989798598866e+02;
    b3 =  6.680131188771972e+01; b4 = -1.328068155288572e+01;
    if (pt < 0.02425) begin
      q = $sqrt(-2.0 * $ln(pt));
      x = (((((c0*q + c1)*q + c2)*q + c3)*q + c4)*q + c5) / ((((d0*q + d1)*q + d2)*q + d3)*q + 1.0);
    end else begin
      q = pt - 0.5;
      r = q * q;
      x = (((((a0*r + a1)*r + a2)*r + a3)*r + a4)*r + a5)*q / (((((b0*r + b1)*r + b2)*r + b3)*r + b4)*r + 1.0);
    end
    return -x;
  endfunction

  function automatic rom_t gen_rom();
    rom_t t;
    real  seg, zz;
    int   v;
    seg = 1.0;
    for (int k = 0; k < int'(LEVEL); k++) seg = seg / real'(DEPTH);
    for (int i = 0; i < int'(DEPTH); i++) begin
      // 1-x = (DEPTH - i - 0.5) * seg; P(|Z| > z) = 1-x, so P(Z > z) = (1-x)/2
      zz = inv_tail((real'(DEPTH - i) - 0.5) * seg / 2.0);
      v = $rtoi(zz * real'(1 << FRAC) + 0.5);
      if (v > (1 << W) - 1) v = (1 << W) - 1;
      if (v < 0) v = 0;
      t[i] = W'(v);
    end
    return t;
  endfunction

  localparam rom_t ROM = gen_rom();

  assign data = ROM[addr];
endmodule
