// gcd_comparator -- pipelined radix-four magnitude comparator.
//
// Produces neq (A != B), which decides whether the GCD loop runs again, and
// gt (A > B), which steers the subtractor and picks the subtrahend.
//
// Stage 0 forms, for every bit, eq = XNOR(a, b) and gt = a AND NOT b (the
// first input high, the second low). Each further stage merges groups of four
// neighbouring results: a group is equal when all four are equal (an AND),
// and greater when its most significant unequal member is greater
// (gt3 | eq3&gt2 | eq3&eq2&gt1 | eq3&eq2&eq1&gt0, an AND-OR). After
// clog4(W) merge stages one group covers the whole word. Operands narrower
// than a power of four are padded with equal, not-greater positions.
//
// Timing: stage i is a PFAL stage driven by ev[i]/clr[i] of its own
// controller; the outputs are valid while the last stage's power-clock is
// high and read as neq=1, gt=0 once it has returned to zero. W = 16 gives
// three stages.
//
// The XNOR/AND structure and the radix-four AND-OR merge follow the original
// design; one pipeline stage per merge level is this design's reading of it.
module gcd_comparator
  import gcd_pkg::*;
#(
  parameter  int unsigned W   = GCD_WIDTH,
  localparam int unsigned NST = cmp_stages(W)
) (
  input  logic           clk,
  input  logic           rst_l,
  input  logic [NST-1:0] ev,
  input  logic [NST-1:0] clr,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           neq,
  output logic           gt
);

  localparam int unsigned LV = NST - 1;
  localparam int unsigned PW = 1 << (2 * LV);   // 4**LV

  logic [PW-1:0] ap, bp;
  assign ap = PW'(a);
  assign bp = PW'(b);

  // Stage outputs: {eq, gt} of each group position.
  logic [2*PW-1:0] st_q [NST];

  // Stage 0: per-bit equality and greater-than.
  pfal_reg #(.WIDTH(2 * PW)) u_bits (
    .clk(clk), .rst_l(rst_l), .ev(ev[0]), .clr(clr[0]),
    .d({~(ap ^ bp), ap & ~bp}), .q(st_q[0])
  );

  // Radix-four merge stages.
  for (genvar l = 1; l < NST; l++) begin : g_lvl
    logic [PW-1:0] eq_in, gt_in, eq_d, gt_d;
    assign {eq_in, gt_in} = st_q[l-1];

    always_comb begin
      eq_d = '0;
      gt_d = '0;
      for (int unsigned j = 0; j < (PW >> (2 * l)); j++) begin
        logic [3:0] e, g;
        e = eq_in[4*j +: 4];
        g = gt_in[4*j +: 4];
        eq_d[j] = &e;
        gt_d[j] = g[3] | (e[3] & g[2]) | (e[3] & e[2] & g[1]) | (e[3] & e[2] & e[1] & g[0]);
      end
    end

    pfal_reg #(.WIDTH(2 * PW)) u_grp (
      .clk(clk), .rst_l(rst_l), .ev(ev[l]), .clr(clr[l]),
      .d({eq_d, gt_d}), .q(st_q[l])
    );
  end

  assign neq = !st_q[NST-1][PW];
  assign gt  =  st_q[NST-1][0];

endmodule
