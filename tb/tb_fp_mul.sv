// tb_fp_mul -- checks the multiplier against double-precision products
// rounded to the design's format (for binary32 the double product is exact, so
// there is one rounding only; for binary64 the double product is the
// correctly rounded result).
module tb_fp_mul;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  fp_t a, b, p;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input fp_t want, input string what);
    #1;
    checks++;
    if (p !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h * %h = %h, want %h", what, a, b, p, want);
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
      a = rand_fp(-47, 43);
      b = rand_fp(-47, 43);
      check(to_fp(from_fp(a) * from_fp(b)), "random");
    end
    // small integers, as in the power core
    for (int i = 1; i < 200; i++) begin
      a = to_fp(real'(i));
      b = to_fp(real'(i + 3));
      check(to_fp(real'(i) * real'(i + 3)), "integer");
    end
    a = FP_ZERO;         b = to_fp(3.0);  check(FP_ZERO, "zero");
    a = {1'b1, FP_ZERO[FP_W-2:0]}; b = to_fp(3.0); check({1'b1, FP_ZERO[FP_W-2:0]}, "neg zero");
    a = max_fp();        b = max_fp();    check({1'b0, {FP_EXP_W{1'b1}}, FP_FRAC_W'(0)}, "overflow");
    a = FP_ONE;          b = to_fp(-1.0); check(to_fp(-1.0), "1 * -1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
