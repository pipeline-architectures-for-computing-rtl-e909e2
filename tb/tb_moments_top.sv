// tb_moments_top -- end-to-end test of both engines at a reduced size
// (N = 6 lines, M = 8 pixels, BETA = 2, orders up to 7). Each engine gets its
// own sequence of images with random orders; the parallel engine switches
// between single-moment and moment-set mode. Results are compared with a
// double-precision reference (relative tolerance 1e-5). The test counts each
// mechanism of the design and fails if one never occurred: pixel-source gaps,
// input back-pressure, result back-pressure on both engines, power-core
// tokens for x^m interleaved with y^n and issued after the y counter
// finished, both mode switches, and moment-set results.
module tb_moments_top;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 6, M = 8, BETA = 2, K = 3;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] m, n;
  logic s_pix_valid, s_pix_ready, s_mom_valid, s_mom_ready;
  logic p_pix_valid, p_pix_ready, p_mom_valid, p_mom_ready, p_set_mode;
  logic [7:0] s_pix, p_pix;
  fp_t s_mom, p_mom;
  int checks = 0, failures = 0;
  bit s_running, p_running;

  // mechanism counters
  int s_gap = 0, p_gap = 0, s_in_bp = 0, p_in_bp = 0, s_out_bp = 0, p_out_bp = 0;
  int pc_interleaved = 0, pc_x_only = 0, to_set = 0, to_single = 0, set_results = 0;

  moments_top #(.N(N), .M(M), .BETA(BETA), .K(K), .PIX_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    s_mom_ready <= $urandom_range(2) != 0;
    p_mom_ready <= $urandom_range(2) != 0;
  end

  // observation of the mechanisms
  always @(posedge clk) if (rst_n) begin
    if (s_pix_valid && !s_pix_ready) s_in_bp++;
    if (p_pix_valid && !p_pix_ready) p_in_bp++;
    if (s_mom_valid && !s_mom_ready) s_out_bp++;
    if (p_mom_valid && !p_mom_ready) p_out_bp++;
    if (dut.u_parallel.u_power.fire && dut.u_parallel.u_power.sel_x) begin
      if (dut.u_parallel.u_power.y_done) pc_x_only++;
      else                               pc_interleaved++;
    end
  end

  function automatic real moment(input logic [7:0] img[N][M], input int mm, input int nn);
    real s;
    s = 0.0;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++)
        s += ((x + 1.0) ** mm) * ((y + 1.0) ** nn) * img[x][y];
    return s;
  endfunction

  // both engines share m and n, so each image of either engine uses the
  // orders of the current round
  task automatic serial_image();
    logic [7:0] img[N][M];
    real want;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) img[x][y] = 8'($urandom);
    want = moment(img, int'(m), int'(n));
    fork
      for (int x = 0; x < N; x++)
        for (int y = 0; y < M; y++) begin
          @(negedge clk);
          while ($urandom_range(4) == 0) begin
            s_pix_valid <= 0; s_gap++; @(negedge clk);
          end
          s_pix_valid <= 1;
          s_pix       <= img[x][y];
          @(posedge clk);
          while (!s_pix_ready) @(posedge clk);
          #1 s_pix_valid <= 0;
        end
      begin
        @(posedge clk);
        while (!(s_mom_valid && s_mom_ready)) @(posedge clk);
        checks++;
        if (!close(from_fp(s_mom), want, 1e-5)) begin
          failures++;
          $display("FAIL serial M(%0d,%0d) = %g want %g", m, n, from_fp(s_mom), want);
        end
      end
    join
  endtask

  // IMAGES images back to back, so that a new image enters while the last
  // one is still in its dot-product and chain phases
  task automatic parallel_images(input bit sm, input int images);
    logic [7:0] img[N][M];
    logic [7:0] pix_q[$];
    real want[$];
    for (int i = 0; i < images; i++) begin
      for (int x = 0; x < N; x++)
        for (int y = 0; y < M; y++) begin
          img[x][y] = 8'($urandom);
          pix_q.push_back(img[x][y]);
        end
      for (int g = sm ? 0 : int'(n); g <= int'(n); g++) want.push_back(moment(img, int'(m), g));
    end
    fork
      while (pix_q.size() != 0) begin
        @(negedge clk);
        while ($urandom_range(4) == 0) begin
          p_pix_valid <= 0; p_gap++; @(negedge clk);
        end
        p_pix_valid <= 1;
        p_pix       <= pix_q.pop_front();
        @(posedge clk);
        while (!p_pix_ready) @(posedge clk);
        #1 p_pix_valid <= 0;
      end
      while (want.size() != 0) begin
        @(posedge clk);
        if (p_mom_valid && p_mom_ready) begin
          checks++;
          if (sm) set_results++;
          if (!close(from_fp(p_mom), want[0], 1e-5)) begin
            failures++;
            $display("FAIL parallel set=%0d = %g want %g", sm, from_fp(p_mom), want[0]);
          end
          void'(want.pop_front());
        end
      end
    join
  endtask

  initial begin
    bit sm;
    s_pix_valid = 0; p_pix_valid = 0; s_pix = 0; p_pix = 0;
    m = 0; n = 0; p_set_mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 12; round++) begin
      @(negedge clk);
      m  = K'($urandom_range(7));
      n  = K'($urandom_range(7));
      sm = (round % 3 == 1) || (round % 5 == 4);
      if (sm && !p_set_mode) to_set++;
      if (!sm && p_set_mode) to_single++;
      p_set_mode = sm;
      fork
        begin serial_image(); serial_image(); end
        parallel_images(sm, 3);
      join
    end
    $display("mechanisms: gaps %0d/%0d, input back-pressure %0d/%0d, output back-pressure %0d/%0d",
             s_gap, p_gap, s_in_bp, p_in_bp, s_out_bp, p_out_bp);
    $display("            x^m interleaved %0d, x^m after y %0d, to set %0d, to single %0d, set results %0d",
             pc_interleaved, pc_x_only, to_set, to_single, set_results);
    checks++;
    if (s_gap == 0 || p_gap == 0 || s_in_bp == 0 || p_in_bp == 0 || s_out_bp == 0 ||
        p_out_bp == 0 || pc_interleaved == 0 || pc_x_only == 0 || to_set == 0 ||
        to_single == 0 || set_results == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
