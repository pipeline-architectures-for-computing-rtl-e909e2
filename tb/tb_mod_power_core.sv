// tb_mod_power_core -- the shared power core must, per image, deliver y^n for
// y = 1..M on its y output and x^m for x = 1..N on its x output, in the order
// "MU-1 y tokens, then one x token" until the y counter is exhausted, then
// the remaining x tokens. In set mode the y output carries y itself. Nothing
// may come out before start. Outputs are held back at random.
module tb_mod_power_core;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 5, M = 6, MU = 3, K = 3;
  logic clk = 0, rst_n = 0;
  logic [K-1:0] m, n;
  logic set_mode, start;
  logic yn_valid, yn_ready, xm_valid, xm_ready;
  fp_t yn, xm;
  int checks = 0, failures = 0;
  bit want_tag[$];
  real want_y[$], want_x[$];

  mod_power_core #(.N(N), .M(M), .MU(MU), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    yn_ready <= $urandom_range(3) != 0;
    xm_ready <= $urandom_range(3) != 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (yn_valid && yn_ready) begin
      checks++;
      if (want_tag.size() == 0 || want_tag[0] != 1'b0 || from_fp(yn) != want_y[0]) begin
        failures++;
        $display("FAIL y token %g (want %g, tag %0d)", from_fp(yn),
                 want_y.size() ? want_y[0] : -1.0, want_tag.size() ? want_tag[0] : 9);
      end
      if (want_tag.size()) void'(want_tag.pop_front());
      if (want_y.size())   void'(want_y.pop_front());
    end
    if (xm_valid && xm_ready) begin
      checks++;
      if (want_tag.size() == 0 || want_tag[0] != 1'b1 || from_fp(xm) != want_x[0]) begin
        failures++;
        $display("FAIL x token %g (want %g)", from_fp(xm), want_x.size() ? want_x[0] : -1.0);
      end
      if (want_tag.size()) void'(want_tag.pop_front());
      if (want_x.size())   void'(want_x.pop_front());
    end
  end

  task automatic image(input int mm, input int nn, input bit sm);
    int xs, ys;
    m = K'(mm); n = K'(nn); set_mode = sm;
    xs = 0; ys = 0;
    while (xs < N || ys < M) begin
      for (int i = 0; i < MU - 1 && ys < M; i++) begin
        ys++;
        want_tag.push_back(1'b0);
        want_y.push_back(real'(ys) ** (sm ? 1 : nn));
      end
      if (xs < N) begin
        xs++;
        want_tag.push_back(1'b1);
        want_x.push_back(real'(xs) ** mm);
      end
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    while (want_tag.size() != 0) @(posedge clk);
  endtask

  initial begin
    m = 0; n = 0; set_mode = 0; start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // idle: nothing before start
    repeat (20) begin
      @(posedge clk);
      checks++;
      if (xm_valid || yn_valid) begin
        failures++;
        $display("FAIL output before start");
      end
    end
    image(2, 3, 0);
    image(5, 2, 1);
    image(7, 7, 0);
    image(0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
