// power_core -- pipelined generator of init * x^e (the "power core").
//
// The exponent e (K bits) is decomposed into its binary digits b_i, and
// x^e = product over i of x^(b_i * 2^i). A chain of K stages (power_core_pe)
// carries two values: the successive squares x, x^2, x^4, ... and the running
// product, which stage i multiplies by x^(2^i) when b_i = 1. The running
// product starts at init, which is 1.0 for a plain power; the serial moment
// processor starts it at the pixel value so that the core delivers
// f(x,y) * y^n. 2K multipliers are used, one result leaves per clock and the
// latency is K clocks, as the architecture states.
//
// Each token carries its own exponent and a TAG_W-bit tag through the
// pipeline, so successive tokens may use different exponents (x^m and y^n
// interleaved). Handshake: valid/ready. The whole pipeline advances when its
// last stage is empty or the consumer takes the result (en); in_ready equals
// en. Largest exponent is 2^K - 1. Defaults are this design's choice.
module power_core
  import moments_pkg::*;
#(
  parameter int unsigned K     = 4,
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  fp_t              in_base,   // x
  input  fp_t              in_init,   // 1.0, or a value to be scaled by x^e
  input  logic [K-1:0]     in_exp,    // e
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  input  logic             out_ready,
  output fp_t              out_value, // in_init * x^e
  output logic [TAG_W-1:0] out_tag
);
  fp_t              acc [K+1];
  fp_t              pw  [K+1];
  logic [K-1:0]     ex  [K+1];
  logic [TAG_W-1:0] tg  [K+1];
  logic             vld [K+1];
  logic             en;

  assign en       = !vld[K] || out_ready;
  assign in_ready = en;

  assign acc[0] = in_init;
  assign pw[0]  = in_base;
  assign ex[0]  = in_exp;
  assign tg[0]  = in_tag;
  assign vld[0] = in_valid;

  for (genvar i = 0; i < K; i++) begin : g_stage
    power_core_pe u_pe (
      .clk    (clk),
      .en     (en),
      .bit_i  (ex[i][i]),
      .acc_in (acc[i]),
      .pw_in  (pw[i]),
      .acc_out(acc[i+1]),
      .pw_out (pw[i+1])
    );
    always_ff @(posedge clk) begin
      if (en) begin
        ex[i+1] <= ex[i];
        tg[i+1] <= tg[i];
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  vld[i+1] <= 1'b0;
      else if (en) vld[i+1] <= vld[i];
    end
  end

  assign out_valid = vld[K];
  assign out_value = acc[K];
  assign out_tag   = tg[K];
endmodule
