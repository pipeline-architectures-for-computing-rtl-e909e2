// parallel_moment -- enhanced parallel (wavefront) architecture for one
// moment M_{m,n}, or for the set M_{m,0} .. M_{m,n}, with BETA PEs of type B.
//
// Pixels arrive in raster order (line x = 1..N, pixel y = 1..M) as unsigned
// integers, are converted to floating point and enter the input buffer. A
// chain of routers R_beta .. R_1 deals them out so that PE B_j receives the
// columns j, j+beta, j+2*beta, ... (interleaved pixel processing; each PE owns
// MU = M/BETA columns). A single shared power core produces, per image, N
// x^m tokens, which enter PE B_1 and travel along the PE chain, and M y^n
// tokens, which a second router chain deals out into per-PE queues of MU+1
// places. After the N lines every PE forms its partial dot product P_j and the
// partial sums ripple from B_1 to B_beta, which delivers the moment (or, in
// set mode, the n+1 moments of the set, lowest g first) on mom_*.
//
// All links are FIFOs with valid/ready handshakes, so each PE fires as soon as
// its operands are present: the circuit accepts pixels at any rate up to one
// per clock. With one pixel per clock the pixel rate, not the PEs, bounds the
// time in this model: an image needs about N*M + N + M + BETA + MU clocks.
// The power core starts an image's powers when its first pixel reaches the
// head of the input buffer. m, n and set_mode may be changed only between
// images: after the last moment of one image has been delivered and before
// the first pixel of the next is offered.
// Organisation follows the architecture. Queue depths PHI and IBUF_DEPTH, the
// pixel width, the routing order and the handshakes are this design's
// choices. M must be a multiple of BETA.
module parallel_moment
  import moments_pkg::*;
#(
  parameter int unsigned N          = 1024, // image lines
  parameter int unsigned M          = 1024, // pixels per line
  parameter int unsigned BETA       = 8,    // PEs of type B
  parameter int unsigned K          = 4,    // power-core stages
  parameter int unsigned PIX_W      = 8,    // grey-level width
  parameter int unsigned PHI        = 2,    // depth of a link FIFO
  parameter int unsigned IBUF_DEPTH = 16    // image input buffer
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [K-1:0]     m,
  input  logic [K-1:0]     n,
  input  logic             set_mode,
  input  logic             pix_valid,
  output logic             pix_ready,
  input  logic [PIX_W-1:0] pix,
  output logic             mom_valid,
  input  logic             mom_ready,
  output fp_t              mom
);
  localparam int unsigned MU = M / BETA;

  if (MU * BETA != M) begin : g_bad_beta
    $error("parallel_moment: M must be a multiple of BETA");
  end

  localparam int unsigned PW = $clog2(N * M + 1);

  fp_t  fpix;
  logic [PW-1:0] pix_seen;    // pixels of the current image already dealt out
  int_to_fp #(.W(PIX_W)) u_pix (.i(pix), .f(fpix));

  // pixel path
  logic ib_valid, ib_ready;  fp_t ib_data;
  logic pr_in_valid [BETA+1];  logic pr_in_ready [BETA+1];  fp_t pr_in_data [BETA+1];
  logic pr_nx_valid [BETA+1];  logic pr_nx_ready [BETA+1];  fp_t pr_nx_data [BETA+1];
  logic pq_in_valid [BETA+1];  logic pq_in_ready [BETA+1];  fp_t pq_in_data [BETA+1];
  logic pq_valid    [BETA+1];  logic pq_ready    [BETA+1];  fp_t pq_data    [BETA+1];
  // y^n path
  logic yr_in_valid [BETA+1];  logic yr_in_ready [BETA+1];  fp_t yr_in_data [BETA+1];
  logic yr_nx_valid [BETA+1];  logic yr_nx_ready [BETA+1];  fp_t yr_nx_data [BETA+1];
  logic yq_in_valid [BETA+1];  logic yq_in_ready [BETA+1];  fp_t yq_in_data [BETA+1];
  logic yq_valid    [BETA+1];  logic yq_ready    [BETA+1];  fp_t yq_data    [BETA+1];
  // x^m / partial-sum chain: xl_* enters PE j, xr_* leaves it
  logic xl_valid    [BETA+1];  logic xl_ready    [BETA+1];  fp_t xl_data    [BETA+1];
  logic xr_valid    [BETA+1];  logic xr_ready    [BETA+1];  fp_t xr_data    [BETA+1];

  logic pc_yn_valid, pc_yn_ready, pc_xm_valid, pc_xm_ready;
  fp_t  pc_yn, pc_xm;

  token_fifo #(.WIDTH($bits(fp_t)), .DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pix_valid), .in_ready(pix_ready), .in_data(fpix),
    .out_valid(ib_valid), .out_ready(ib_ready), .out_data(ib_data),
    .count());

  mod_power_core #(.N(N), .M(M), .MU(MU), .K(K)) u_power (
    .clk(clk), .rst_n(rst_n), .m(m), .n(n), .set_mode(set_mode),
    .start(ib_valid && pix_seen == '0),
    .yn_valid(pc_yn_valid), .yn_ready(pc_yn_ready), .yn(pc_yn),
    .xm_valid(pc_xm_valid), .xm_ready(pc_xm_ready), .xm(pc_xm));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      pix_seen <= '0;
    else if (ib_valid && ib_ready)
      pix_seen <= (pix_seen == PW'(N * M - 1)) ? '0 : pix_seen + PW'(1);
  end

  // heads of the two router chains and of the PE chain
  assign pr_in_valid[1] = ib_valid;
  assign pr_in_data[1]  = ib_data;
  assign ib_ready       = pr_in_ready[1];
  assign yr_in_valid[1] = pc_yn_valid;
  assign yr_in_data[1]  = pc_yn;
  assign pc_yn_ready    = yr_in_ready[1];

  token_fifo #(.WIDTH($bits(fp_t)), .DEPTH(PHI)) u_xq0 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pc_xm_valid), .in_ready(pc_xm_ready), .in_data(pc_xm),
    .out_valid(xl_valid[1]), .out_ready(xl_ready[1]), .out_data(xl_data[1]),
    .count());

  for (genvar j = 1; j <= BETA; j++) begin : g_pe
    // router R_{BETA-j+1} of the pixel chain feeds PE B_j
    router #(.WIDTH($bits(fp_t)), .PERIOD(BETA - j + 1)) u_rpix (
      .clk(clk), .rst_n(rst_n),
      .in_valid(pr_in_valid[j]), .in_ready(pr_in_ready[j]), .in_data(pr_in_data[j]),
      .pe_valid(pq_in_valid[j]), .pe_ready(pq_in_ready[j]), .pe_data(pq_in_data[j]),
      .next_valid(pr_nx_valid[j]), .next_ready(pr_nx_ready[j]), .next_data(pr_nx_data[j]));

    token_fifo #(.WIDTH($bits(fp_t)), .DEPTH(PHI)) u_pq (
      .clk(clk), .rst_n(rst_n),
      .in_valid(pq_in_valid[j]), .in_ready(pq_in_ready[j]), .in_data(pq_in_data[j]),
      .out_valid(pq_valid[j]), .out_ready(pq_ready[j]), .out_data(pq_data[j]),
      .count());

    // router of the y^n chain and the MU+1 place y^n queue of PE B_j
    router #(.WIDTH($bits(fp_t)), .PERIOD(BETA - j + 1)) u_ry (
      .clk(clk), .rst_n(rst_n),
      .in_valid(yr_in_valid[j]), .in_ready(yr_in_ready[j]), .in_data(yr_in_data[j]),
      .pe_valid(yq_in_valid[j]), .pe_ready(yq_in_ready[j]), .pe_data(yq_in_data[j]),
      .next_valid(yr_nx_valid[j]), .next_ready(yr_nx_ready[j]), .next_data(yr_nx_data[j]));

    token_fifo #(.WIDTH($bits(fp_t)), .DEPTH(MU + 1)) u_yq (
      .clk(clk), .rst_n(rst_n),
      .in_valid(yq_in_valid[j]), .in_ready(yq_in_ready[j]), .in_data(yq_in_data[j]),
      .out_valid(yq_valid[j]), .out_ready(yq_ready[j]), .out_data(yq_data[j]),
      .count());

    if (j < BETA) begin : g_link
      token_fifo #(.WIDTH($bits(fp_t)), .DEPTH(PHI)) u_plink (
        .clk(clk), .rst_n(rst_n),
        .in_valid(pr_nx_valid[j]), .in_ready(pr_nx_ready[j]), .in_data(pr_nx_data[j]),
        .out_valid(pr_in_valid[j+1]), .out_ready(pr_in_ready[j+1]), .out_data(pr_in_data[j+1]),
        .count());
      token_fifo #(.WIDTH($bits(fp_t)), .DEPTH(PHI)) u_ylink (
        .clk(clk), .rst_n(rst_n),
        .in_valid(yr_nx_valid[j]), .in_ready(yr_nx_ready[j]), .in_data(yr_nx_data[j]),
        .out_valid(yr_in_valid[j+1]), .out_ready(yr_in_ready[j+1]), .out_data(yr_in_data[j+1]),
        .count());
      token_fifo #(.WIDTH($bits(fp_t)), .DEPTH(PHI)) u_xlink (
        .clk(clk), .rst_n(rst_n),
        .in_valid(xr_valid[j]), .in_ready(xr_ready[j]), .in_data(xr_data[j]),
        .out_valid(xl_valid[j+1]), .out_ready(xl_ready[j+1]), .out_data(xl_data[j+1]),
        .count());
    end else begin : g_tail
      // R_1 keeps every token; B_beta drives the moment output
      assign pr_nx_ready[j] = 1'b0;
      assign yr_nx_ready[j] = 1'b0;
      assign mom_valid      = xr_valid[j];
      assign mom            = xr_data[j];
      assign xr_ready[j]    = mom_ready;
    end

    pe_b #(.N(N), .MU(MU), .K(K), .IS_FIRST(j == 1), .IS_LAST(j == BETA)) u_b (
      .clk(clk), .rst_n(rst_n), .set_mode(set_mode), .n(n),
      .pix_valid(pq_valid[j]), .pix_ready(pq_ready[j]), .pix(pq_data[j]),
      .yv_valid(yq_valid[j]), .yv_ready(yq_ready[j]), .yv(yq_data[j]),
      .left_valid(xl_valid[j]), .left_ready(xl_ready[j]), .left_data(xl_data[j]),
      .right_valid(xr_valid[j]), .right_ready(xr_ready[j]), .right_data(xr_data[j]));
  end
endmodule
