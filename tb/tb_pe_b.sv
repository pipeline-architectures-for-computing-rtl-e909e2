// tb_pe_b -- one PE B_j (neither first nor last) between stream drivers.
// Its left input gets N x^m tokens followed by the partial sums of the PEs to
// its left, its pixel queue N lines of MU pixels, its y queue MU tokens
// (y^n in single-moment mode, plain y in set mode). The right output must
// repeat the N x^m tokens and then deliver P_j + partial sum, once in single
// mode and n+1 times (g = 0..n) in set mode. Expected values come from a
// double-precision model (relative tolerance 1e-5). With every stream always
// valid, phase 1 must take one pixel per clock.
module tb_pe_b;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 3, MU = 4, K = 3;
  logic clk = 0, rst_n = 0;
  logic set_mode;
  logic [K-1:0] n;
  logic pix_valid, pix_ready, yv_valid, yv_ready, left_valid, left_ready, right_valid, right_ready;
  fp_t pix, yv, left_data, right_data;
  int checks = 0, failures = 0, cycle = 0;
  bit gaps;
  fp_t q_pix[$], q_yv[$], q_left[$];
  real exp_out[$];
  int t_pix_first, t_pix_last, n_pix;

  pe_b #(.N(N), .MU(MU), .K(K), .IS_FIRST(1'b0), .IS_LAST(1'b0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stream sources and sink
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (pix_valid && pix_ready) begin
      if (n_pix == 0) t_pix_first = cycle;
      t_pix_last = cycle;
      n_pix++;
      void'(q_pix.pop_front());
    end
    if (yv_valid && yv_ready)     void'(q_yv.pop_front());
    if (left_valid && left_ready) void'(q_left.pop_front());
    if (right_valid && right_ready) begin
      checks++;
      if (exp_out.size() == 0) begin
        failures++;
        $display("FAIL unexpected token %h", right_data);
      end else begin
        if (!close(from_fp(right_data), exp_out[0], 1e-5)) begin
          failures++;
          $display("FAIL right got %g want %g", from_fp(right_data), exp_out[0]);
        end
        void'(exp_out.pop_front());
      end
    end
  end

  always @(negedge clk) begin
    pix_valid   <= q_pix.size() != 0 && !(gaps && $urandom_range(3) == 0);
    pix         <= q_pix.size() ? q_pix[0] : 0;
    yv_valid    <= q_yv.size() != 0 && !(gaps && $urandom_range(3) == 0);
    yv          <= q_yv.size() ? q_yv[0] : 0;
    left_valid  <= q_left.size() != 0 && !(gaps && $urandom_range(3) == 0);
    left_data   <= q_left.size() ? q_left[0] : 0;
    right_ready <= !(gaps && $urandom_range(2) == 0);
  end

  task automatic run(input bit sm, input int nn);
    real xm[N], f[N][MU], h[MU], y[MU], s;
    set_mode = sm;
    n = K'(nn);
    for (int k = 0; k < MU; k++) h[k] = 0.0;
    for (int x = 0; x < N; x++) begin
      xm[x] = real'(1 + $urandom_range(50));
      q_left.push_back(to_fp(xm[x]));
      exp_out.push_back(xm[x]);
      for (int k = 0; k < MU; k++) begin
        f[x][k] = real'($urandom_range(255));
        q_pix.push_back(to_fp(f[x][k]));
        h[k] += xm[x] * f[x][k];
      end
    end
    for (int k = 0; k < MU; k++) begin
      y[k] = real'(1 + $urandom_range(20));
      q_yv.push_back(to_fp(sm ? y[k] : y[k] ** nn));
    end
    for (int g = 0; g <= (sm ? nn : 0); g++) begin
      real p;
      p = 0.0;
      for (int k = 0; k < MU; k++) p += (y[k] ** (sm ? g : nn)) * h[k];
      s = real'($urandom_range(1000));
      q_left.push_back(to_fp(s));
      exp_out.push_back(p + s);
    end
    while (exp_out.size() != 0) @(posedge clk);
  endtask

  initial begin
    pix_valid = 0; yv_valid = 0; left_valid = 0; right_ready = 0;
    set_mode = 0; n = 0; gaps = 0; n_pix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 2);
    checks++;
    if (t_pix_last - t_pix_first != N * MU - 1) begin
      failures++;
      $display("FAIL phase 1 took %0d clocks for %0d pixels", t_pix_last - t_pix_first + 1, N * MU);
    end
    run(1, 3);
    gaps = 1;
    for (int i = 0; i < 10; i++) run($urandom_range(1), $urandom_range(2**K - 1));
    run(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
