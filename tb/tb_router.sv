// tb_router -- a router with PERIOD = 3 must send tokens 0, 3, 6, ... of its
// input stream to its PE queue and all others, in order, to the next router,
// under random readiness on both outputs.
module tb_router;
  localparam int P = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, pe_valid, pe_ready, next_valid, next_ready;
  logic [15:0] in_data, pe_data, next_data;
  logic [15:0] seq;
  int checks = 0, failures = 0;
  int want_pe, want_next, n_pe, n_next;

  router #(.WIDTH(16), .PERIOD(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the input carries 0, 1, 2, ... ; token t belongs to the PE when t % P == 0
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) seq <= seq + 1;
    if (pe_valid && pe_ready) begin
      checks++;
      if (pe_data != 16'(want_pe)) begin
        failures++;
        $display("FAIL pe got %0d want %0d", pe_data, want_pe);
      end
      want_pe += P;
      n_pe++;
    end
    if (next_valid && next_ready) begin
      checks++;
      if (next_data != 16'(want_next)) begin
        failures++;
        $display("FAIL next got %0d want %0d", next_data, want_next);
      end
      want_next += (want_next % P == P - 1) ? 2 : 1;
      n_next++;
    end
  end

  assign in_data = seq;

  always @(negedge clk) begin
    in_valid   <= ($urandom_range(3) != 0);
    pe_ready   <= ($urandom_range(2) != 0);
    next_ready <= ($urandom_range(2) != 0);
  end

  initial begin
    seq = 0; want_pe = 0; want_next = 1; n_pe = 0; n_next = 0;
    in_valid = 0; pe_ready = 0; next_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    checks++;
    if (n_pe == 0 || n_next < n_pe) begin
      failures++;
      $display("FAIL too few tokens: pe %0d next %0d", n_pe, n_next);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
