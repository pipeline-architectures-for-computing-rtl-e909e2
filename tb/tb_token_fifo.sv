// tb_token_fifo -- random push/pop traffic against a scoreboard queue:
// order and values of the tokens, the fill level, full and empty flags, and
// one token per clock when both sides are always willing.
module tb_token_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [15:0] sb[$];
  int checks = 0, failures = 0, cycles = 0, pops = 0;
  bit  stream;

  token_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycles++;
    checks++;
    if (count != sb.size() || in_ready != (sb.size() < DEPTH) || out_valid != (sb.size() != 0)) begin
      failures++;
      $display("FAIL level: count=%0d model=%0d", count, sb.size());
    end
    if (out_valid && out_ready) begin
      checks++;
      pops++;
      if (out_data != sb[0]) begin
        failures++;
        $display("FAIL data %h want %h", out_data, sb[0]);
      end
      void'(sb.pop_front());
    end
    if (in_valid && in_ready) sb.push_back(in_data);
  end

  always @(negedge clk) begin
    in_valid  <= stream ? 1'b1 : ($urandom_range(3) != 0);
    out_ready <= stream ? 1'b1 : ($urandom_range(3) == 0 ? 1'b0 : 1'b1);
    in_data   <= 16'($urandom);
  end

  initial begin
    stream = 0;
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    // streaming: one token per clock
    stream = 1;
    repeat (20) @(posedge clk);
    pops = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (pops != 100) begin
      failures++;
      $display("FAIL throughput: %0d tokens in 100 clocks", pops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
