// mod_power_core -- one power core shared between the x^m and y^n streams.
//
// The parallel architecture needs a new x^m only once per line and the M
// values y^n only once per image, so both come from one power core (W^k).
// A y counter (1..M), an x counter (1..N) and a group counter (1..MU) choose
// what enters the core: in each group of MU tokens the first MU-1 come from
// the y counter with exponent n, the last from the x counter with exponent m;
// once the y counter has finished, every token comes from the x counter. A
// tag travels with each token through the core and steers the demultiplexer
// at its output to the y^n stream (tag 0) or the x^m stream (tag 1). The core
// thus computes M + N powers per image. The core stays idle until start
// signals that the first pixel of an image is present, then issues one token
// per clock (as back-pressure allows) until the image's M + N powers are
// issued; m, n and set_mode are read as each token is issued.
// In moment-set mode the y stream carries y^1, the plain column indices.
// Selection scheme follows the architecture; the start condition, the
// handling of MU = 1 (all x first, then y) and the valid/ready handshakes are
// this design's choices. m, n and set_mode must be steady during an image.
module mod_power_core
  import moments_pkg::*;
#(
  parameter int unsigned N  = 1024,
  parameter int unsigned M  = 1024,
  parameter int unsigned MU = 128,
  parameter int unsigned K  = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] m,
  input  logic [K-1:0] n,
  input  logic         set_mode,
  input  logic         start,      // first pixel of an image is present
  output logic         yn_valid,
  input  logic         yn_ready,
  output fp_t          yn,
  output logic         xm_valid,
  input  logic         xm_ready,
  output fp_t          xm
);
  localparam int unsigned XW = $clog2(N + 1);
  localparam int unsigned YW = $clog2(M + 1);
  localparam int unsigned CW = $clog2(MU + 1);

  logic [XW-1:0] cx;
  logic [YW-1:0] cy;
  logic [CW-1:0] c;
  logic          x_done, y_done, sel_x, in_ready, fire, busy;
  logic          x_last, y_last;
  fp_t           fx, fy, out_value;
  logic [K-1:0]  exp_y;
  logic          out_valid, out_tag, out_ready;

  int_to_fp #(.W(XW)) u_fx (.i(cx), .f(fx));
  int_to_fp #(.W(YW)) u_fy (.i(cy), .f(fy));

  assign sel_x  = !x_done && (y_done || c == CW'(MU));
  assign fire   = in_ready && (busy || start);
  assign x_last = (cx == XW'(N));
  assign y_last = (cy == YW'(M));
  assign exp_y  = set_mode ? K'(1) : n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx     <= XW'(1);
      cy     <= YW'(1);
      c      <= CW'(1);
      x_done <= 1'b0;
      y_done <= 1'b0;
      busy   <= 1'b0;
    end else if (fire) begin
      busy <= 1'b1;
      if ((sel_x && x_last && y_done) || (!sel_x && y_last && x_done)) begin
        // last power of this image: wait for the next one
        busy   <= 1'b0;
        cx     <= XW'(1);
        cy     <= YW'(1);
        c      <= CW'(1);
        x_done <= 1'b0;
        y_done <= 1'b0;
      end else begin
        c <= (c == CW'(MU)) ? CW'(1) : c + CW'(1);
        if (sel_x) begin
          if (x_last) x_done <= 1'b1;
          else        cx <= cx + XW'(1);
        end else begin
          if (y_last) y_done <= 1'b1;
          else        cy <= cy + YW'(1);
        end
      end
    end
  end

  power_core #(.K(K), .TAG_W(1)) u_core (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (busy || start),
    .in_ready (in_ready),
    .in_base  (sel_x ? fx : fy),
    .in_init  (FP_ONE),
    .in_exp   (sel_x ? m : exp_y),
    .in_tag   (sel_x),
    .out_valid(out_valid),
    .out_ready(out_ready),
    .out_value(out_value),
    .out_tag  (out_tag)
  );

  // output demultiplexer
  assign out_ready = out_tag ? xm_ready : yn_ready;
  assign xm_valid  = out_valid && out_tag;
  assign yn_valid  = out_valid && !out_tag;
  assign xm        = out_value;
  assign yn        = out_value;
endmodule
