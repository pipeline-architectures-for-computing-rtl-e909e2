// fp_add -- combinational IEEE-754 adder in the format of moments_pkg
// (binary64 by default).
//
// The architectures use floating-point adders as black boxes; this is a
// plain single-path adder. The operand of larger magnitude is kept, the other
// is shifted right by the exponent difference into a field of F+4 bits (the
// significand plus guard, round and sticky), the two are added or
// subtracted, the result is renormalised with a leading-zero count and rounded
// to nearest, ties to even. Simplifications (this design's choice): subnormals
// are read and written as zero, an exact cancellation gives +0, overflow or an
// infinite operand gives infinity, NaN is not produced.
// Interface: a, b in; s out, same cycle.
module fp_add
  import moments_pkg::*;
(
  input  fp_t a,
  input  fp_t b,
  output fp_t s
);
  localparam int unsigned E  = FP_EXP_W;
  localparam int unsigned F  = FP_FRAC_W;
  localparam int unsigned G  = F + 4;         // significand, guard, round, sticky
  localparam int unsigned SW = E + 3;
  localparam int unsigned LZW = $clog2(G + 1);
  localparam logic [E-1:0] EMAX = '1;

  fp_t         hi_op, lo_op;
  logic [E-1:0] eh, el;
  logic [E-1:0] d;
  logic [F:0]   mh, ml;
  logic [G-1:0] fh, fl;
  logic [2*G-1:0] wide;
  logic [G:0]   sum;
  logic [G-1:0] norm;
  logic [LZW-1:0] lz;
  logic signed [SW-1:0] e;
  logic         round_up;
  logic [F:0]   mant_r;
  logic         sub;

  always_comb begin
    if (a[FP_W-2:0] >= b[FP_W-2:0]) begin hi_op = a; lo_op = b; end
    else                            begin hi_op = b; lo_op = a; end
    eh  = hi_op[FP_W-2 -: E];
    el  = lo_op[FP_W-2 -: E];
    mh  = (eh == '0) ? '0 : {1'b1, hi_op[F-1:0]};
    ml  = (el == '0) ? '0 : {1'b1, lo_op[F-1:0]};
    d   = eh - el;
    sub = hi_op[FP_W-1] ^ lo_op[FP_W-1];
    fh  = {mh, 3'b000};
    // align the smaller operand; bits shifted out are kept as sticky
    if (d >= E'(G)) begin
      wide = '0;
      fl   = {(G-1)'(0), (ml != '0)};
    end else begin
      wide = {ml, 3'b000, G'(0)} >> d;
      fl   = {wide[2*G-1 -: G-1], wide[G] | (wide[G-1:0] != '0)};
    end
    sum = sub ? ({1'b0, fh} - {1'b0, fl}) : ({1'b0, fh} + {1'b0, fl});
    e   = $signed(SW'(eh));
    lz  = '0;
    if (sum[G]) begin
      norm = {sum[G:2], sum[1] | sum[0]};
      e    = e + SW'(1);
    end else begin
      for (int i = G - 1; i >= 0; i--) begin
        if (sum[i]) begin
          lz = LZW'(G - 1 - i);
          break;
        end
      end
      norm = sum[G-1:0] << lz;
      e    = e - $signed(SW'(lz));
    end
    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r   = {1'b0, norm[G-2 -: F]} + (F+1)'(round_up);
    if (mant_r[F]) e = e + SW'(1);

    if (eh == EMAX || el == EMAX)
      s = {hi_op[FP_W-1], EMAX, F'(0)};
    else if (eh == '0)
      s = FP_ZERO;                         // both operands zero
    else if (sum == '0)
      s = FP_ZERO;                         // exact cancellation
    else if (e >= $signed(SW'(EMAX)))
      s = {hi_op[FP_W-1], EMAX, F'(0)};
    else if (e <= 0)
      s = {hi_op[FP_W-1], (FP_W-1)'(0)};
    else
      s = {hi_op[FP_W-1], e[E-1:0], mant_r[F-1:0]};
  end
endmodule
