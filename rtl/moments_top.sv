// moments_top -- the serial and the parallel moment engines side by side.
//
// Two members of the same family of moment processors, each with its own
// pixel stream and result stream: the serial pipeline processor (one
// multiply-accumulate PE behind one power core, one pixel per clock) and the
// enhanced parallel architecture with BETA PEs of type B, which also computes
// a whole set of moments M_{m,0} .. M_{m,n} when set_mode is high. Both take
// 8-bit grey levels in raster order and return IEEE-754 moments (binary64 by default).
// The two engines share only clock, reset and the orders m, n. Default sizes:
// 1024 x 1024 image, BETA = 8, orders up to 15.
module moments_top
  import moments_pkg::*;
#(
  parameter int unsigned N     = 1024,
  parameter int unsigned M     = 1024,
  parameter int unsigned BETA  = 8,
  parameter int unsigned K     = 4,
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [K-1:0]     m,
  input  logic [K-1:0]     n,
  // serial engine
  input  logic             s_pix_valid,
  output logic             s_pix_ready,
  input  logic [PIX_W-1:0] s_pix,
  output logic             s_mom_valid,
  input  logic             s_mom_ready,
  output fp_t              s_mom,
  // parallel engine
  input  logic             p_set_mode,
  input  logic             p_pix_valid,
  output logic             p_pix_ready,
  input  logic [PIX_W-1:0] p_pix,
  output logic             p_mom_valid,
  input  logic             p_mom_ready,
  output fp_t              p_mom
);
  serial_moment #(.N(N), .M(M), .K(K), .PIX_W(PIX_W)) u_serial (
    .clk(clk), .rst_n(rst_n), .m(m), .n(n),
    .pix_valid(s_pix_valid), .pix_ready(s_pix_ready), .pix(s_pix),
    .mom_valid(s_mom_valid), .mom_ready(s_mom_ready), .mom(s_mom));

  parallel_moment #(.N(N), .M(M), .BETA(BETA), .K(K), .PIX_W(PIX_W)) u_parallel (
    .clk(clk), .rst_n(rst_n), .m(m), .n(n), .set_mode(p_set_mode),
    .pix_valid(p_pix_valid), .pix_ready(p_pix_ready), .pix(p_pix),
    .mom_valid(p_mom_valid), .mom_ready(p_mom_ready), .mom(p_mom));
endmodule
