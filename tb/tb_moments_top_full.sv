// tb_moments_top_full -- both engines at their default size (1024 x 1024
// image, BETA = 8, orders up to 15, binary64 arithmetic) through complete
// images: both engines compute M_{5,7} of image 0; then the parallel engine
// computes, in set mode, M_{3,0} .. M_{3,15} of image 1. Pixels are a fixed
// pseudo-random pattern. References are accumulated in double precision in a
// different order than the engines add, so the tolerance is 1e-9 (for a
// binary32 build of the package it must be raised to about 1e-3, and orders
// kept to m + n <= 10). Also reports the clocks each engine needed.
module tb_moments_top_full;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 1024, M = 1024, K = 4;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] m, n;
  logic s_pix_valid, s_pix_ready, s_mom_valid, s_mom_ready;
  logic p_pix_valid, p_pix_ready, p_mom_valid, p_mom_ready, p_set_mode;
  logic [7:0] s_pix, p_pix;
  fp_t s_mom, p_mom;
  int checks = 0, failures = 0;
  longint cycle = 0;

  moments_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pixel(input int x, input int y, input int img);
    fp_t h;
    h = 32'(x) * 32'h9E37_79B1 ^ 32'(y) * 32'h85EB_CA77 ^ 32'(img) * 32'hC2B2_AE3D;
    h = h ^ (h >> 15);
    return h[7:0];
  endfunction

  function automatic real moment(input int img, input int mm, input int nn);
    real s;
    s = 0.0;
    for (int x = 1; x <= N; x++)
      for (int y = 1; y <= M; y++)
        s += (real'(x) ** mm) * (real'(y) ** nn) * pixel(x, y, img);
    return s;
  endfunction

  task automatic check(input string what, input fp_t got, input real want);
    checks++;
    if (!close(from_fp(got), want, 1e-9)) begin
      failures++;
      $display("FAIL %s = %g want %g", what, from_fp(got), want);
    end else begin
      $display("%s = %g (reference %g)", what, from_fp(got), want);
    end
  endtask

  initial begin
    real want_s, want_p[$];
    longint t0;
    s_pix_valid = 0; p_pix_valid = 0; s_pix = 0; p_pix = 0;
    s_mom_ready = 1; p_mom_ready = 1;
    m = 5; n = 7; p_set_mode = 0;
    want_s = moment(0, 5, 7);
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cycle;
    fork
      // serial engine, image 0
      begin
        for (int x = 1; x <= N; x++)
          for (int y = 1; y <= M; y++) begin
            s_pix_valid <= 1;
            s_pix       <= pixel(x, y, 0);
            @(posedge clk);
            while (!s_pix_ready) @(posedge clk);
          end
        s_pix_valid <= 0;
      end
      begin
        @(posedge clk);
        while (!s_mom_valid) @(posedge clk);
        $display("serial: %0d clocks", cycle - t0);
        check("serial M(5,7)", s_mom, want_s);
      end
      // parallel engine, image 0
      begin
        for (int x = 1; x <= N; x++)
          for (int y = 1; y <= M; y++) begin
            p_pix_valid <= 1;
            p_pix       <= pixel(x, y, 0);
            @(posedge clk);
            while (!p_pix_ready) @(posedge clk);
          end
        p_pix_valid <= 0;
      end
      begin
        @(posedge clk);
        while (!p_mom_valid) @(posedge clk);
        $display("parallel: %0d clocks", cycle - t0);
        check("parallel M(5,7)", p_mom, want_s);
      end
    join
    // parallel engine, moment set of image 1
    for (int g = 0; g <= 15; g++) want_p.push_back(moment(1, 3, g));
    @(negedge clk);
    m = 3; n = 15; p_set_mode = 1;
    fork
      begin
        @(negedge clk);
        for (int x = 1; x <= N; x++)
          for (int y = 1; y <= M; y++) begin
            p_pix_valid <= 1;
            p_pix       <= pixel(x, y, 1);
            @(posedge clk);
            while (!p_pix_ready) @(posedge clk);
          end
        p_pix_valid <= 0;
      end
      for (int g = 0; g <= 15; g++) begin
        @(posedge clk);
        while (!p_mom_valid) @(posedge clk);
        check($sformatf("parallel set M(3,%0d)", g), p_mom, want_p[g]);
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
