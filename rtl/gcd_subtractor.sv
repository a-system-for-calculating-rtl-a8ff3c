// gcd_subtractor -- pipelined selectable subtractor / reverse subtractor.
//
// z = s ? (b - a) : (a - b), in two's complement, modulo 2**W.
// The first stage is the input pre-processing: XOR gates complement one
// operand (a when s = 1, b when s = 0), so the rest is an adder computing
// x + y + 1. The adder is a radix-four parallel-prefix (Kogge-Stone style)
// tree: stage 1 forms generate g = x&y and propagate p = x^y, with the
// carry-in of 1 folded into bit 0 (g0 = x0|y0); each prefix stage combines
// four spans, span distance 1, 4, 16, ..., with the multi-input AND-OR
// G = G3 | P3G2 | P3P2G1 | P3P2P1G0; the last stage forms the sum
// p ^ {carries, 1}. W = 16 needs two prefix stages, five stages in all.
//
// Timing: stage i evaluates on ev[i] and returns to zero on clr[i]; z is
// valid while the last stage's power-clock is high. s must be valid when
// stage 0 evaluates.
//
// The XOR pre-processing, radix four and the parallel-prefix form follow the
// original design; the Kogge-Stone arrangement and the split into stages are
// this design's choice.
module gcd_subtractor
  import gcd_pkg::*;
#(
  parameter  int unsigned W  = GCD_WIDTH,
  localparam int unsigned NS = sub_stages(W)
) (
  input  logic          clk,
  input  logic          rst_l,
  input  logic [NS-1:0] ev,
  input  logic [NS-1:0] clr,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic          s,
  output logic [W-1:0]  z
);

  localparam int unsigned LV = NS - 3;

  // Stage registers 0 .. NS-2 hold {p, G, P} (stage 0: {unused, x, y}).
  logic [3*W-1:0] st_q [NS-1];

  // Stage 0: selective ones' complement.
  pfal_reg #(.WIDTH(3 * W)) u_pre (
    .clk(clk), .rst_l(rst_l), .ev(ev[0]), .clr(clr[0]),
    .d({{W{1'b0}}, (s ? ~a : a), (s ? b : ~b)}), .q(st_q[0])
  );

  // Stage 1: generate / propagate with carry-in 1.
  logic [W-1:0] x, y, g1, p1, pp1;
  always_comb begin
    x   = st_q[0][2*W-1:W];
    y   = st_q[0][W-1:0];
    p1  = x ^ y;
    g1  = x & y;
    g1[0] = x[0] | y[0];
    pp1 = p1;
    pp1[0] = 1'b0;
  end

  pfal_reg #(.WIDTH(3 * W)) u_gp (
    .clk(clk), .rst_l(rst_l), .ev(ev[1]), .clr(clr[1]),
    .d({p1, g1, pp1}), .q(st_q[1])
  );

  // Radix-four prefix stages.
  for (genvar l = 1; l <= LV; l++) begin : g_pre
    localparam int unsigned D = 1 << (2 * (l - 1));   // 4**(l-1)
    logic [W-1:0] gi, pi, go, po;
    assign gi = st_q[l][2*W-1:W];
    assign pi = st_q[l][W-1:0];

    always_comb begin
      for (int i = 0; i < int'(W); i++) begin
        logic [3:0] gg, pp;
        for (int k = 0; k < 4; k++) begin
          if (i - k * int'(D) >= 0) begin
            gg[k] = gi[i - k * int'(D)];
            pp[k] = pi[i - k * int'(D)];
          end else begin
            gg[k] = 1'b0;
            pp[k] = 1'b0;
          end
        end
        go[i] = gg[0] | (pp[0] & gg[1]) | (pp[0] & pp[1] & gg[2]) | (pp[0] & pp[1] & pp[2] & gg[3]);
        po[i] = &pp;
      end
    end

    pfal_reg #(.WIDTH(3 * W)) u_lvl (
      .clk(clk), .rst_l(rst_l), .ev(ev[l+1]), .clr(clr[l+1]),
      .d({st_q[l][3*W-1:2*W], go, po}), .q(st_q[l+1])
    );
  end

  // Last stage: sum.
  logic [W-1:0] pl;
  logic [W-2:0] gl;   // carries out of bits 0 .. W-2; the top carry is dropped
  assign pl = st_q[NS-2][3*W-1:2*W];
  assign gl = st_q[NS-2][2*W-2:W];

  logic [W-1:0] sum_q;
  pfal_reg #(.WIDTH(W)) u_sum (
    .clk(clk), .rst_l(rst_l), .ev(ev[NS-1]), .clr(clr[NS-1]),
    .d(pl ^ {gl, 1'b1}), .q(sum_q)
  );

  assign z = sum_q;

endmodule
