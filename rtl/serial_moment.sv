// serial_moment -- serial pipeline processor for one moment M_{m,n}.
//
// Computes M_{m,n} = sum_{x=1..N} sum_{y=1..M} x^m * (y^n * f(x,y)) for an
// N-line, M-pixel-per-line grey-level image that arrives in raster order
// (line x = 1..N, pixel y = 1..M within a line).
//
// A line counter (1..N) and a pixel counter (0..M) step through N*(M+1) slots.
// In slot y = 0 the single power core computes 1.0 * x^m, which is stored in
// the x^m register. In slots y = 1..M the same core is started with the pixel
// value in place of 1.0 and so delivers f(x,y) * y^n; one more multiplier
// scales this by the stored x^m, and one adder accumulates the products. The
// accumulator is cleared by the first pixel of every image and the moment is
// delivered after the last. This is 2K + 1 multipliers and 1 adder, and one
// slot per clock, so an image takes N*(M+1) + K + 2 clocks from its first
// slot to its result (K = power-core latency, then the product and the
// accumulate registers), within the bound N(M+1) + t_pow + 2 of the
// architecture. Structure follows the architecture; counter-to-float
// conversion, 8-bit pixels and the valid/ready handshakes are this design's
// choices. Images follow each other with no gap. The x^m slot of a line is
// issued only when that line's first pixel is present; m and n are read per
// slot and may change once the last pixel of an image has been accepted.
module serial_moment
  import moments_pkg::*;
#(
  parameter int unsigned N     = 1024,  // image lines
  parameter int unsigned M     = 1024,  // pixels per line
  parameter int unsigned K     = 4,     // power-core stages, orders up to 2^K-1
  parameter int unsigned PIX_W = 8      // grey-level width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [K-1:0]     m,          // order in x (line index)
  input  logic [K-1:0]     n,          // order in y (pixel index)
  input  logic             pix_valid,
  output logic             pix_ready,
  input  logic [PIX_W-1:0] pix,
  output logic             mom_valid,
  input  logic             mom_ready,
  output fp_t              mom
);
  localparam int unsigned XW = $clog2(N + 1);
  localparam int unsigned YW = $clog2(M + 1);

  typedef struct packed {
    logic is_x;    // slot y = 0: result is x^m
    logic first;   // first pixel of the image
    logic last;    // last pixel of the image
  } slot_tag_t;

  logic [XW-1:0] cx;
  logic [YW-1:0] cy;
  logic          x_slot, issue, pc_in_ready, en;
  fp_t           fx, fy, fpix;
  slot_tag_t     tag_in, tag_out;
  logic          pc_out_valid;
  fp_t           pc_out;

  logic          a_valid, a_first, a_last;
  fp_t           a_prod, xm_reg, prod, acc, acc_sum;

  int_to_fp #(.W(XW))    u_cx  (.i(cx),  .f(fx));
  int_to_fp #(.W(YW))    u_cy  (.i(cy),  .f(fy));
  int_to_fp #(.W(PIX_W)) u_pix (.i(pix), .f(fpix));

  assign x_slot    = (cy == '0);
  // an x slot also waits for the line's first pixel, so that m and n are
  // read only once the image has begun
  assign issue     = pc_in_ready && pix_valid;
  assign pix_ready = pc_in_ready && !x_slot;
  assign tag_in    = '{is_x:  x_slot,
                       first: (cx == XW'(1)) && (cy == YW'(1)),
                       last:  (cx == XW'(N)) && (cy == YW'(M))};

  // slot counters: pixel index 0..M inside line index 1..N
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx <= XW'(1);
      cy <= '0;
    end else if (issue) begin
      if (cy == YW'(M)) begin
        cy <= '0;
        cx <= (cx == XW'(N)) ? XW'(1) : cx + XW'(1);
      end else begin
        cy <= cy + YW'(1);
      end
    end
  end

  power_core #(.K(K), .TAG_W($bits(slot_tag_t))) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pix_valid),
    .in_ready (pc_in_ready),
    .in_base  (x_slot ? fx : fy),
    .in_init  (x_slot ? FP_ONE : fpix),
    .in_exp   (x_slot ? m : n),
    .in_tag   (tag_in),
    .out_valid(pc_out_valid),
    .out_ready(en),
    .out_value(pc_out),
    .out_tag  (tag_out)
  );

  // the pipeline behind the core moves unless a finished moment is waiting
  assign en = !mom_valid || mom_ready;

  fp_mul u_mul (.a(xm_reg), .b(pc_out), .p(prod));
  fp_add u_add (.a(a_first ? FP_ZERO : acc), .b(a_prod), .s(acc_sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid   <= 1'b0;
      a_first   <= 1'b0;
      a_last    <= 1'b0;
      a_prod    <= FP_ZERO;
      xm_reg    <= FP_ZERO;
      acc       <= FP_ZERO;
      mom_valid <= 1'b0;
      mom       <= FP_ZERO;
    end else begin
      if (mom_valid && mom_ready) mom_valid <= 1'b0;
      if (en) begin
        // product stage: x^m register load, or x^m * (f * y^n)
        a_valid <= pc_out_valid && !tag_out.is_x;
        a_first <= tag_out.first;
        a_last  <= tag_out.last;
        a_prod  <= prod;
        if (pc_out_valid && tag_out.is_x) xm_reg <= pc_out;
        // accumulate stage
        if (a_valid) begin
          acc <= acc_sum;
          if (a_last) begin
            mom       <= acc_sum;
            mom_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
