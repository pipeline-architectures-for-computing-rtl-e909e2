// tb_power_core -- feeds random (init, x, e) tokens and checks that
// init * x^e comes out in order with its tag, that a token needs exactly K
// clocks when the output is never held, and that back-pressure loses nothing.
// Operands are small integers, so every expected value is exact.
module tb_power_core;
  import moments_pkg::*;
  import tb_fp_pkg::*;
  localparam int K = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  fp_t in_base, in_init, out_value;
  logic [K-1:0] in_exp;
  logic [7:0] in_tag, out_tag;
  typedef struct { fp_t value; logic [7:0] tag; int t_in; } exp_t;
  exp_t sb[$];
  int checks = 0, failures = 0, cycle = 0, stalls = 0;
  bit  hold_free;

  power_core #(.K(K), .TAG_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (out_valid && !out_ready) stalls++;
    if (out_valid && out_ready) begin
      checks++;
      if (sb.size() == 0 || out_value != sb[0].value || out_tag != sb[0].tag) begin
        failures++;
        $display("FAIL got %h tag %0d want %h tag %0d", out_value, out_tag,
                 sb.size() ? sb[0].value : 0, sb.size() ? sb[0].tag : 0);
      end
      if (hold_free && sb.size() != 0) begin
        checks++;
        if (cycle - sb[0].t_in != K) begin
          failures++;
          $display("FAIL latency %0d, want %0d", cycle - sb[0].t_in, K);
        end
      end
      if (sb.size() != 0) void'(sb.pop_front());
    end
    if (in_valid && in_ready) begin
      real v;
      exp_t e;
      v = from_fp(in_init);
      for (int i = 0; i < int'(in_exp); i++) v = v * from_fp(in_base);
      e.value = to_fp(v);
      e.tag   = in_tag;
      e.t_in  = cycle;
      sb.push_back(e);
    end
  end

  task automatic drive_random();
    int x, e;
    x = 1 + $urandom_range(6);
    e = $urandom_range(2**K - 1);
    if (x > 2 && e > 8) e = 8;
    in_valid <= ($urandom_range(4) != 0);
    in_base  <= to_fp(real'(x));
    in_init  <= to_fp(real'(1 + $urandom_range(3)));
    in_exp   <= K'(e);
    in_tag   <= 8'($urandom);
  endtask

  initial begin
    hold_free = 1;
    in_valid = 0; out_ready = 1; in_base = 0; in_init = 0; in_exp = 0; in_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: output always ready -> check latency K
    repeat (500) begin
      @(negedge clk);
      drive_random();
    end
    // phase 2: random back-pressure
    @(negedge clk);
    hold_free = 0;
    repeat (1500) begin
      @(negedge clk);
      drive_random();
      out_ready <= ($urandom_range(2) != 0);
    end
    @(negedge clk);
    in_valid <= 0;
    out_ready <= 1;
    repeat (2 * K + 4) @(posedge clk);
    checks++;
    if (sb.size() != 0 || stalls == 0) begin
      failures++;
      $display("FAIL %0d results never appeared, %0d stalls", sb.size(), stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
