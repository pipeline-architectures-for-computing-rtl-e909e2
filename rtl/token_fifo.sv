// token_fifo -- synchronous FIFO used as the data interchange device between
// processing elements, and as the image input buffer.
//
// The architectures become wavefront arrays by replacing each delay element
// with a FIFO: a PE fires when its operand tokens are present and its output
// queue has room. This FIFO gives that token semantics with a valid/ready
// handshake on both sides (a transfer happens in a cycle where valid and ready
// are both high). Storage is a circular array of DEPTH words; the head word is
// presented from the array, so a written token can be read on the next cycle.
// Push and pop may happen in the same cycle, so DEPTH >= 2 sustains one token
// per cycle. in_ready depends only on the fill level, never on out_ready.
// DEPTH and WIDTH are free; their defaults are this design's choice.
module token_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             push, pop;

  assign in_ready  = (count != ($clog2(DEPTH+1))'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // A token may never be written into a full FIFO or read from an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> count < ($clog2(DEPTH+1))'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> count != '0);
endmodule
