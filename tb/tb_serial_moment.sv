// tb_serial_moment -- runs several small images through the serial processor
// with changing orders, random pixel gaps and result back-pressure, and checks
// each moment against a double-precision reference (relative error 1e-5, the
// floating-point rounding of binary32 accumulation). One image is sent with no
// gaps and an always-ready output to check the processing time against the
// bound N(M+1) + t_pow + 2 clocks, t_pow = K + 2.
module tb_serial_moment;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 4, M = 6, K = 3;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] m, n;
  logic pix_valid, pix_ready, mom_valid, mom_ready;
  logic [7:0] pix;
  fp_t mom;
  int checks = 0, failures = 0, cycle = 0;
  bit gaps, hold;
  real want;
  int t_first, t_done, stalls;
  logic [7:0] img [N][M];

  serial_moment #(.N(N), .M(M), .K(K), .PIX_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (mom_valid && !mom_ready) stalls++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) mom_ready <= hold ? ($urandom_range(3) == 0) : 1'b1;

  task automatic run_image(input int mm, input int nn);
    real ref_sum;
    @(negedge clk);   // configuration changes away from the clock edge
    m = K'(mm);
    n = K'(nn);
    ref_sum = 0.0;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) begin
        img[x][y] = 8'($urandom);
        ref_sum += ((x + 1.0) ** mm) * ((y + 1.0) ** nn) * img[x][y];
      end
    want = ref_sum;
    fork
      begin
        for (int x = 0; x < N; x++)
          for (int y = 0; y < M; y++) begin
            @(negedge clk);
            while (gaps && $urandom_range(3) == 0) begin
              pix_valid <= 0;
              @(negedge clk);
            end
            pix_valid <= 1;
            pix       <= img[x][y];
            @(posedge clk);
            while (!pix_ready) @(posedge clk);
            if (x == 0 && y == 0) t_first = cycle;
          end
        @(negedge clk);
        pix_valid <= 0;
      end
      begin
        @(posedge clk);
        while (!(mom_valid && mom_ready)) @(posedge clk);
        t_done = cycle;
        checks++;
        if (!close(from_fp(mom), want, 1e-5)) begin
          failures++;
          $display("FAIL M(%0d,%0d) = %g, want %g", mm, nn, from_fp(mom), want);
        end
      end
    join
  endtask

  initial begin
    pix_valid = 0; pix = 0; m = 0; n = 0; gaps = 0; hold = 0; stalls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // timing: no gaps, output always ready
    run_image(2, 3);
    checks++;
    // slots start one clock before the first pixel is accepted
    if (t_done - (t_first - 1) > N * (M + 1) + (K + 2) + 2) begin
      failures++;
      $display("FAIL time %0d clocks > bound %0d", t_done - t_first + 1, N * (M + 1) + K + 4);
    end
    $display("serial: one image in %0d clocks (bound %0d)", t_done - t_first + 1, N * (M + 1) + K + 4);
    gaps = 1;
    hold = 1;
    for (int i = 0; i < 20; i++) run_image($urandom_range(7), $urandom_range(7));
    run_image(0, 0);
    run_image(7, 7);
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL back-pressure never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
