// fp_mul -- combinational IEEE-754 multiplier in the format of moments_pkg
// (binary64 by default).
//
// The architectures use floating-point multipliers as black boxes; this is
// the simplest unit that does the job. Signs are XORed, exponents added and
// the (F+1) x (F+1)-bit significand product is normalised by at most one
// position and rounded to nearest, ties to even. Simplifications (this
// design's choice): subnormal inputs are read as zero and subnormal results
// are flushed to signed zero; exponent overflow, or an infinity/NaN operand,
// gives a signed infinity (NaN is not produced).
// Interface: a, b in; p out, same cycle. Registers live in the users.
module fp_mul
  import moments_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t p
);
  localparam int unsigned E  = FP_EXP_W;
  localparam int unsigned F  = FP_FRAC_W;
  localparam int unsigned SW = E + 3;               // signed exponent width
  localparam logic [E-1:0] EMAX = '1;

  logic               sign;
  logic [E-1:0]       ea, eb;
  logic [2*F+1:0]     prod;
  logic [F-1:0]       mant;
  logic               guard, sticky, round_up;
  logic [F:0]         mant_r;
  logic signed [SW-1:0] exp_c;

  always_comb begin
    sign   = a[FP_W-1] ^ b[FP_W-1];
    ea     = a[FP_W-2 -: E];
    eb     = b[FP_W-2 -: E];
    prod   = {1'b1, a[F-1:0]} * {1'b1, b[F-1:0]};
    exp_c  = $signed(SW'(ea)) + $signed(SW'(eb)) - $signed(SW'(FP_BIAS));
    if (prod[2*F+1]) begin
      mant   = prod[2*F -: F];
      guard  = prod[F];
      sticky = |prod[F-1:0];
      exp_c  = exp_c + SW'(1);
    end else begin
      mant   = prod[2*F-1 -: F];
      guard  = prod[F-1];
      sticky = |prod[F-2:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + (F+1)'(round_up);
    if (mant_r[F]) exp_c = exp_c + SW'(1);   // mantissa rounded up to 2.0

    if (ea == '0 || eb == '0)
      p = {sign, (FP_W-1)'(0)};
    else if (ea == EMAX || eb == EMAX || exp_c >= $signed(SW'(EMAX)))
      p = {sign, EMAX, F'(0)};
    else if (exp_c <= 0)
      p = {sign, (FP_W-1)'(0)};
    else
      p = {sign, exp_c[E-1:0], mant_r[F-1:0]};
  end
endmodule
