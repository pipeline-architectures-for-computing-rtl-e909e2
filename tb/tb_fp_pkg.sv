// tb_fp_pkg -- reference conversions between the simulator's double-precision
// real and the design's floating-point format (moments_pkg: binary64 by
// default, binary32 also possible), used by the testbenches to work out
// expected values independently of the design's arithmetic units.
package tb_fp_pkg;
  import moments_pkg::*;

  // real -> fp_t, rounding the double to nearest, ties to even, when the
  // format is narrower; subnormal results flush to zero, overflow gives
  // infinity.
  function automatic fp_t to_fp(input real r);
    logic [63:0] d, fr;
    logic        s, up, guard, sticky;
    int          e;
    logic [FP_FRAC_W:0] mant;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'd0) return {s, (FP_W-1)'(0)};
    e  = int'(d[62:52]) - 1023 + int'(FP_BIAS);
    fr = {d[51:0], 12'd0};                      // fraction, MSB at bit 63
    guard  = (FP_FRAC_W < 52) ? fr[63 - FP_FRAC_W] : 1'b0;
    sticky = (FP_FRAC_W < 52) ? (64'(fr << (FP_FRAC_W + 1)) != 0) : 1'b0;
    mant = {1'b0, FP_FRAC_W'(fr >> (64 - FP_FRAC_W))};
    up   = guard & (sticky | mant[0]);
    mant = mant + (FP_FRAC_W+1)'(up);
    if (mant[FP_FRAC_W]) e = e + 1;
    if (e >= (1 << FP_EXP_W) - 1) return {s, {FP_EXP_W{1'b1}}, FP_FRAC_W'(0)};
    if (e <= 0)                   return {s, (FP_W-1)'(0)};
    return {s, FP_EXP_W'(e), mant[FP_FRAC_W-1:0]};
  endfunction

  // fp_t -> real (normal numbers and zero)
  function automatic real from_fp(input fp_t f);
    logic [63:0] d;
    logic [63:0] fr;
    int          e;
    e = int'(f[FP_W-2 -: FP_EXP_W]);
    if (e == 0) return 0.0;
    fr = 64'(f[FP_FRAC_W-1:0]) << (52 - FP_FRAC_W);
    d  = {f[FP_W-1], 11'(e - int'(FP_BIAS) + 1023), fr[51:0]};
    return $bitstoreal(d);
  endfunction

  // |got - want| <= tol * |want| (or both zero)
  function automatic bit close(input real got, input real want, input real tol);
    real diff, mag;
    diff = got - want;
    if (diff < 0.0) diff = -diff;
    mag = (want < 0.0) ? -want : want;
    return (diff <= tol * mag) || (diff == 0.0);
  endfunction

  // random normal number with unbiased exponent in [elo, ehi]
  function automatic fp_t rand_fp(input int elo, input int ehi);
    int e;
    e = int'(FP_BIAS) + elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), FP_EXP_W'(e), FP_FRAC_W'({$urandom, $urandom})};
  endfunction

  // largest finite value
  function automatic fp_t max_fp();
    return {1'b0, FP_EXP_W'((1 << FP_EXP_W) - 2), {FP_FRAC_W{1'b1}}};
  endfunction

endpackage
