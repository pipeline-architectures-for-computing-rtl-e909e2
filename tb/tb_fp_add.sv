// tb_fp_add -- checks the adder against double-precision sums rounded to the
// design's format. Operand exponents differ by at most 24, so that for
// binary32 the double sum is exact and the reference rounds only once; for
// binary64 the double sum is itself the correctly rounded result.
module tb_fp_add;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  fp_t a, b, s;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .s(s));

  task automatic check(input fp_t want, input string what);
    #1;
    checks++;
    if (s !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h + %h = %h, want %h", what, a, b, s, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = rand_fp(-11, 13);
      b = rand_fp(-11, 13);
      check(to_fp(from_fp(a) + from_fp(b)), "random");
    end
    // near cancellation: same exponent, opposite signs
    for (int i = 0; i < 1000; i++) begin
      a = rand_fp(0, 0);
      b = {~a[FP_W-1], a[FP_W-2:0] ^ (FP_W-1)'($urandom_range(255))};
      check(to_fp(from_fp(a) + from_fp(b)), "cancel");
    end
    // neighbouring exponents, opposite signs
    for (int i = 0; i < 1000; i++) begin
      a = rand_fp(0, 1);
      b = {~a[FP_W-1], FP_EXP_W'(FP_BIAS), FP_FRAC_W'({$urandom, $urandom})};
      check(to_fp(from_fp(a) + from_fp(b)), "near");
    end
    a = to_fp(3.0);  b = to_fp(-3.0); check(FP_ZERO, "x - x");
    a = FP_ZERO;     b = to_fp(3.0);  check(to_fp(3.0), "0 + x");
    a = to_fp(3.0);  b = FP_ZERO;     check(to_fp(3.0), "x + 0");
    a = FP_ZERO;     b = FP_ZERO;     check(FP_ZERO, "0 + 0");
    a = to_fp(16777216.0); b = FP_ONE; check(to_fp(16777216.0 + 1.0), "tie");
    a = max_fp();    b = max_fp();    check({1'b0, {FP_EXP_W{1'b1}}, FP_FRAC_W'(0)}, "overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
