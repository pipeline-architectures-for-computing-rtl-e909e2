// pe_b -- modified processing element B_j of the parallel architecture.
//
// PE B_j owns the image columns y = j, j+beta, ..., j+(MU-1)*beta (MU = M/beta)
// and keeps one accumulator H_y per column in a local buffer. Its activity
// cycle has three phases, as in the architecture:
//   phase 1 (N lines): for each line x it takes x^m from its left neighbour
//     (and passes the token on to the right), then for each of its MU pixels
//     f(x,y) computes H_y <- H_y + x^m * f(x,y); on line 1 the old H is
//     replaced by 0 instead of being read.
//   phase 2: P_j = sum_k (y_k)^n * H_{y_k}, consuming MU y^n tokens from its
//     y-distribution queue.
//   phase 3: waits for the partial sum P_1+...+P_{j-1} arriving from the left
//     on the same link that carried x^m, adds P_j, and sends the result right.
//     PE B_1 (IS_FIRST) adds 0 instead of waiting; PE B_beta (IS_LAST) sends
//     the sum out as the moment and does not pass x^m on.
// In moment-set mode (set_mode = 1) phases 2 and 3 are run n+1 times, for
// g = 0..n, giving M_{m,0} .. M_{m,n} one after another: the queue then
// carries the plain column indices y (exponent 1); in pass 0 they are stored
// in a local y buffer and P^(0) = sum H, and in pass g >= 1 every buffer entry
// is replaced by y * (y^(g-1) H) and accumulated into P^(g).
//
// One multiplier and one adder are shared by all phases. Multiply and
// accumulate are pipelined: the product is registered and added in the next
// clock. The element issues one operation per clock when its operands are
// present. Phase changes wait one clock for the pipeline to empty (the DRAIN
// state). x^m is taken and forwarded when a line starts rather than after it;
// this keeps the pixel queues short (this design's choice). Handshakes are
// valid/ready. set_mode and n must be held steady during an image.
module pe_b
  import moments_pkg::*;
#(
  parameter int unsigned N        = 1024, // image lines
  parameter int unsigned MU       = 128,  // columns per PE (M / beta)
  parameter int unsigned K        = 4,    // width of the order n
  parameter bit          IS_FIRST = 1'b0, // PE B_1
  parameter bit          IS_LAST  = 1'b0  // PE B_beta
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         set_mode,
  input  logic [K-1:0] n,
  // pixel queue from the lower router chain
  input  logic         pix_valid,
  output logic         pix_ready,
  input  fp_t          pix,
  // y^n (or y) queue from the upper router chain
  input  logic         yv_valid,
  output logic         yv_ready,
  input  fp_t          yv,
  // from PE B_{j-1}: N x^m tokens, then partial sums
  input  logic         left_valid,
  output logic         left_ready,
  input  fp_t          left_data,
  // to PE B_{j+1} (or the moment output for IS_LAST)
  output logic         right_valid,
  input  logic         right_ready,
  output fp_t          right_data
);
  localparam int unsigned KW = (MU > 1) ? $clog2(MU) : 1;
  localparam int unsigned LW = $clog2(N + 1);

  pe_phase_e     phase, after_drain;
  logic [LW-1:0] line;
  logic [KW-1:0] k;
  logic [K-1:0]  g;
  logic          have_xm;
  fp_t           xm;
  fp_t           hbuf [MU];
  fp_t           ybuf [MU];
  fp_t           p_acc;

  // stage-1 (product) register
  logic          s1_valid, s1_dot, s1_first, s1_wb;
  logic [KW-1:0] s1_k;
  fp_t           s1_prod;

  logic          take_xm, xm_avail, issue, last_k, chain_go;
  fp_t           xm_cur, mul_a, mul_b, mul_p, add_a, add_b, add_s;

  assign last_k   = (k == KW'(MU - 1));
  assign take_xm  = (phase == PH_LINES) && !have_xm && left_valid &&
                    (IS_LAST || right_ready);
  assign xm_avail = have_xm || take_xm;
  assign xm_cur   = have_xm ? xm : left_data;
  assign chain_go = (phase == PH_CHAIN) && (IS_FIRST || left_valid) && right_ready;

  always_comb begin
    issue = 1'b0;
    unique case (phase)
      PH_LINES: issue = xm_avail && pix_valid;
      PH_DOT:   issue = (set_mode && g != '0) ? 1'b1 : yv_valid;
      default:  issue = 1'b0;
    endcase
  end

  assign pix_ready = (phase == PH_LINES) && xm_avail;
  assign yv_ready  = (phase == PH_DOT) && !(set_mode && g != '0);

  always_comb begin
    left_ready = 1'b0;
    if (phase == PH_LINES)      left_ready = take_xm;
    else if (phase == PH_CHAIN) left_ready = !IS_FIRST && right_ready;
  end

  always_comb begin
    right_valid = 1'b0;
    right_data  = add_s;
    if (phase == PH_LINES) begin
      right_valid = !IS_LAST && !have_xm && left_valid;
      right_data  = left_data;
    end else if (phase == PH_CHAIN) begin
      right_valid = IS_FIRST || left_valid;
    end
  end

  // shared multiplier
  always_comb begin
    if (phase == PH_LINES) begin
      mul_a = xm_cur;
      mul_b = pix;
    end else begin
      mul_a = hbuf[k];
      if (!set_mode)     mul_b = yv;
      else if (g == '0)  mul_b = FP_ONE;
      else               mul_b = ybuf[k];
    end
  end
  fp_mul u_mul (.a(mul_a), .b(mul_b), .p(mul_p));

  // shared adder: accumulate stage, or the phase-3 chain sum
  always_comb begin
    if (phase == PH_CHAIN) begin
      add_a = p_acc;
      add_b = IS_FIRST ? FP_ZERO : left_data;
    end else if (s1_dot) begin
      add_a = (s1_k == '0) ? FP_ZERO : p_acc;
      add_b = s1_prod;
    end else begin
      add_a = s1_first ? FP_ZERO : hbuf[s1_k];
      add_b = s1_prod;
    end
  end
  fp_add u_add (.a(add_a), .b(add_b), .s(add_s));

  // accumulator buffers
  always_ff @(posedge clk) begin
    if (s1_valid) begin
      if (!s1_dot)    hbuf[s1_k] <= add_s;
      else if (s1_wb) hbuf[s1_k] <= s1_prod;
    end
    if (issue && phase == PH_DOT && set_mode && g == '0)
      ybuf[k] <= yv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_LINES;
      after_drain <= PH_LINES;
      line        <= LW'(1);
      k           <= '0;
      g           <= '0;
      have_xm     <= 1'b0;
      xm          <= FP_ZERO;
      p_acc       <= FP_ZERO;
      s1_valid    <= 1'b0;
      s1_dot      <= 1'b0;
      s1_first    <= 1'b0;
      s1_wb       <= 1'b0;
      s1_k        <= '0;
      s1_prod     <= FP_ZERO;
    end else begin
      // stage 2 side effects on the dot-product accumulator
      if (s1_valid && s1_dot) p_acc <= add_s;

      // stage 1
      s1_valid <= issue;
      if (issue) begin
        s1_prod  <= mul_p;
        s1_k     <= k;
        s1_dot   <= (phase == PH_DOT);
        s1_first <= (line == LW'(1));
        s1_wb    <= set_mode;
      end

      unique case (phase)
        PH_LINES: begin
          if (take_xm) xm <= left_data;
          if (issue) begin
            if (last_k) begin
              k       <= '0;
              have_xm <= 1'b0;
              if (line == LW'(N)) begin
                line        <= LW'(1);
                phase       <= PH_DRAIN;
                after_drain <= PH_DOT;
              end else begin
                line <= line + LW'(1);
              end
            end else begin
              k       <= k + KW'(1);
              have_xm <= 1'b1;
            end
          end else if (take_xm) begin
            have_xm <= 1'b1;
          end
        end
        PH_DOT: begin
          if (issue) begin
            if (last_k) begin
              k           <= '0;
              phase       <= PH_DRAIN;
              after_drain <= PH_CHAIN;
            end else begin
              k <= k + KW'(1);
            end
          end
        end
        PH_CHAIN: begin
          if (chain_go) begin
            if (set_mode && g != n) begin
              g     <= g + K'(1);
              phase <= PH_DOT;
            end else begin
              g     <= '0;
              phase <= PH_LINES;
            end
          end
        end
        PH_DRAIN: begin
          if (!s1_valid) phase <= after_drain;
        end
      endcase
    end
  end

  // x^m is forwarded only when the neighbour can take it
  a_fwd: assert property (@(posedge clk) disable iff (!rst_n)
                          (right_valid && phase == PH_LINES) |-> !have_xm);
endmodule
