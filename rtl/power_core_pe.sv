// power_core_pe -- one stage PE_i of the power core.
//
// Stage i holds two floating-point multipliers. The lower one squares the
// incoming power x^(2^i) to give x^(2^(i+1)) for the next stage; the upper one
// multiplies the running product by x^(2^i), and a multiplexer controlled by
// exponent bit b_i keeps either that product or the unchanged running product.
// Both results are registered (the "D" delay between stages), so each stage
// adds one clock of latency and accepts a new operand every clock while en is
// high. Structure as in the architecture; the enable used for back-pressure
// is this design's addition.
module power_core_pe
  import moments_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  logic bit_i,     // b_i of the exponent
  input  fp_t  acc_in,    // product of the selected x^(2^l), l < i
  input  fp_t  pw_in,     // x^(2^i)
  output fp_t  acc_out,
  output fp_t  pw_out     // x^(2^(i+1))
);
  fp_t prod, square;

  fp_mul u_mul_acc (.a(acc_in), .b(pw_in), .p(prod));
  fp_mul u_mul_sq  (.a(pw_in),  .b(pw_in), .p(square));

  always_ff @(posedge clk) begin
    if (en) begin
      acc_out <= bit_i ? prod : acc_in;
      pw_out  <= square;
    end
  end
endmodule
