// int_to_fp -- converts an unsigned integer (a counter value or a pixel) to
// the floating-point format of moments_pkg, rounding to nearest, ties to
// even (exact whenever W <= FP_FRAC_W + 1).
//
// The architectures feed counter values and grey levels straight into the
// floating-point units; the conversion stage is this design's own addition.
// Combinational. Parameter W is the integer width (1..63).
module int_to_fp
  import moments_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] i,
  output fp_t          f
);
  localparam int unsigned F = FP_FRAC_W;

  logic [63:0] v;
  logic [6:0]  msb;
  logic [63:0] sh;
  logic        guard, sticky, round_up;
  logic [F:0]  mant_r;

  always_comb begin
    v   = 64'(i);
    msb = 7'd0;
    for (int b = 0; b < W; b++)
      if (v[b]) msb = 7'(b);
    // leading one at bit 63; the fraction is the F bits below it
    sh       = v << (7'd63 - msb);
    guard    = sh[62-F];
    sticky   = (64'(sh << (F + 2)) != 64'd0);
    round_up = guard & (sticky | sh[63-F]);
    mant_r   = {1'b0, sh[62 -: F]} + (F+1)'(round_up);
    f        = (i == '0) ? FP_ZERO
             : {1'b0, FP_EXP_W'(32'(msb) + FP_BIAS + 32'(mant_r[F])), mant_r[F-1:0]};
  end
endmodule
