// router -- the R_i data distribution element of the parallel architectures.
//
// R_i sits on a chain of routers fed with a token stream. Of every PERIOD
// (= i) tokens it receives, it moves the first one into the queue of its own
// processing element and passes the other PERIOD-1 on to the next router
// R_{i-1}. With R_beta at the head of the chain and R_1 at the end, token
// number t (from 0) of a stream ends up at PE B_{1 + t mod beta}: the pixels
// of columns j, j+beta, j+2*beta, ... reach PE B_j, as the interleaved
// processing scheme requires. The same element distributes the y^n tokens.
// Routing rule follows the architecture; taking the first token of each
// group, the valid/ready handshake and the reset to the start of a group are
// this design's choices. Combinational between input and outputs; the FIFOs
// around it hold the tokens. Both data outputs are plain wires from in_data:
// only the valid/ready steering and the group counter are logic.
module router #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned PERIOD = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             pe_valid,   // token for this router's PE
  input  logic             pe_ready,
  output logic [WIDTH-1:0] pe_data,
  output logic             next_valid, // token passed to R_{i-1}
  input  logic             next_ready,
  output logic [WIDTH-1:0] next_data
);
  localparam int unsigned CW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] cnt;
  logic          mine;

  assign mine       = (cnt == '0);
  assign pe_valid   = in_valid && mine;
  assign next_valid = in_valid && !mine;
  assign pe_data    = in_data;
  assign next_data  = in_data;
  assign in_ready   = mine ? pe_ready : next_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cnt <= '0;
    else if (in_valid && in_ready)
      cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + CW'(1);
  end
endmodule
