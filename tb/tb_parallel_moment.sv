// tb_parallel_moment -- runs small images through the parallel architecture
// (N = 4 lines, M = 8 pixels, BETA = 4 PEs, so MU = 2 columns per PE) in
// single-moment and moment-set mode, with random pixel gaps and result
// back-pressure, and checks each moment against a double-precision reference
// (relative tolerance 1e-5). One gap-free image checks the processing time:
// with one pixel per clock the pixel stream sets the pace, so the bound used
// is N*M pixel clocks plus the PE-side terms beyond N*MU
// (t_pow + MU + 1 + BETA - 1, t_pow = K + 2) plus the depth of the router
// chain (2 clocks per router) and the phase-change clocks of a PE (2).
module tb_parallel_moment;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 4, M = 8, BETA = 4, K = 3, MU = M / BETA;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] m, n;
  logic set_mode;
  logic pix_valid, pix_ready, mom_valid, mom_ready;
  logic [7:0] pix;
  fp_t mom;
  int checks = 0, failures = 0, cycle = 0, stalls = 0, gaps_seen = 0;
  bit gaps, hold;
  int t_first, t_done;

  parallel_moment #(.N(N), .M(M), .BETA(BETA), .K(K), .PIX_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (mom_valid && !mom_ready) stalls++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) mom_ready <= hold ? ($urandom_range(3) == 0) : 1'b1;

  task automatic run_image(input int mm, input int nn, input bit sm);
    real want[$];
    logic [7:0] img[N][M];
    @(negedge clk);   // configuration changes away from the clock edge
    m = K'(mm);
    n = K'(nn);
    set_mode = sm;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) img[x][y] = 8'($urandom);
    for (int g = (sm ? 0 : nn); g <= nn; g++) begin
      real s;
      s = 0.0;
      for (int x = 0; x < N; x++)
        for (int y = 0; y < M; y++)
          s += ((x + 1.0) ** mm) * ((y + 1.0) ** g) * img[x][y];
      want.push_back(s);
    end
    fork
      begin
        for (int x = 0; x < N; x++)
          for (int y = 0; y < M; y++) begin
            @(negedge clk);
            while (gaps && $urandom_range(3) == 0) begin
              pix_valid <= 0;
              gaps_seen++;
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
        int g;
        g = sm ? 0 : nn;
        while (want.size() != 0) begin
          @(posedge clk);
          if (mom_valid && mom_ready) begin
            checks++;
            if (!close(from_fp(mom), want[0], 1e-5)) begin
              failures++;
              $display("FAIL M(%0d,%0d) set=%0d = %g, want %g", mm, g, sm, from_fp(mom), want[0]);
            end
            void'(want.pop_front());
            g++;
          end
        end
        t_done = cycle;
      end
    join
  endtask

  initial begin
    int bound;
    pix_valid = 0; pix = 0; m = 0; n = 0; set_mode = 0; gaps = 0; hold = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_image(2, 3, 0);
    bound = N * M + (K + 2) + MU + 1 + (BETA - 1) + 2 * BETA + 2;
    $display("parallel: one image in %0d clocks (bound %0d)", t_done - t_first + 1, bound);
    checks++;
    if (t_done - t_first + 1 > bound) begin
      failures++;
      $display("FAIL processing time");
    end
    run_image(3, 4, 1);
    gaps = 1;
    hold = 1;
    for (int i = 0; i < 12; i++) run_image($urandom_range(7), $urandom_range(7), 1'($urandom));
    run_image(7, 7, 1);
    run_image(0, 0, 0);
    checks++;
    if (stalls == 0 || gaps_seen == 0) begin
      failures++;
      $display("FAIL stalls %0d gaps %0d", stalls, gaps_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
