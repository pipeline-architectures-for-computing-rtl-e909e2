// moments_pkg -- types and constants shared by the image-moment engines.
//
// Every arithmetic value travelling between processing elements is a token
// holding one IEEE-754 binary floating-point number (fp_t). The format is set
// here, once for the whole design: FP_EXP_W exponent bits and FP_FRAC_W
// fraction bits. The default is binary64; binary32 (8, 23) also works. The
// architectures call only for "floating-point arithmetic units"; the format is
// this design's choice, made for range: a 1024 x 1024 moment of order
// m + n grows like 1024^(m+n+2), which leaves binary32 (largest value about
// 2^128) at m + n <= 10, while binary64 covers every order the power core can
// produce.
package moments_pkg;

  localparam int unsigned FP_EXP_W  = 11;
  localparam int unsigned FP_FRAC_W = 52;
  localparam int unsigned FP_W      = 1 + FP_EXP_W + FP_FRAC_W;
  localparam int unsigned FP_BIAS   = (1 << (FP_EXP_W - 1)) - 1;

  typedef logic [FP_W-1:0] fp_t;

  localparam fp_t FP_ZERO = '0;
  localparam fp_t FP_ONE  = {1'b0, FP_EXP_W'(FP_BIAS), FP_FRAC_W'(0)};

  // Phases of the modified PE B activity cycle (phase 1, 2, 3 of the
  // architecture; DRAIN waits for the MAC pipeline to empty between them).
  typedef enum logic [1:0] {
    PH_LINES = 2'd0,   // phase 1: accumulate H over N lines
    PH_DOT   = 2'd1,   // phase 2: P_j = sum (y)^g * H
    PH_CHAIN = 2'd2,   // phase 3: add P_j to the partial sum of PE B_{j-1}
    PH_DRAIN = 2'd3    // wait for the multiply-accumulate pipeline to empty
  } pe_phase_e;

endpackage
