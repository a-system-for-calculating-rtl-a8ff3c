// gcd_top -- asynchrobatic GCD engine (Euclid's algorithm by repeated
// subtraction).
//
// Control is four-phase bundled-data asynchronous logic built from
// C-elements; every data-path stage is an adiabatic (PFAL) stage whose local
// power-clock is produced by its own stage controller. Data moves as a single
// token around a loop:
//
//   input channel --> MX --> compare row (4 stages) --> DX --+--> output stage --> Z
//                     ^       operand mux, 3 comparator      |
//                     |       stages with operand buffers    +--> subtract row (5 stages)
//                     |                                      |    subtrahend bypass and
//                     +-- (subtrahend -> A, difference -> B) +    selectable subtractor
//                     ^                                      |
//                     +-- select <-- T0 <-- flag stage <-----+  (A!=B, loop-control path)
//
// The compare row ends with A!=B and A>B. DX sends the token to the output
// stage when A==B (Z = A) and into the subtract row otherwise, and always
// forks A!=B into the two-stage loop-control path. That bit returns to MX as
// its select token: 1 takes the looped pair, 0 a new pair from the input
// channel. Reset (rst_l low, RST_L) charges the T0 stage with "equal", so the
// first select token asks for new operands. The subtract row computes
// max - min with S = NOT(A>B) and carries min beside it, returning
// (A, B) = (min, max - min).
//
// Interfaces: input channel in_req/in_ack with in_a/in_b bundled; output
// channel out_req/out_ack with out_z valid while out_req is high; both
// four-phase. Operands are unsigned and must be non-zero (a zero operand
// never terminates, as in the repeated-subtraction algorithm itself).
//
// The structure, the stage counts, the T0 token and the (subtrahend ->
// A, difference -> B) ordering follow the original design; the clocked
// discrete-time form, the single-rail operand path and the subtractor select
// S = NOT(A>B) are this design's choices.
//
// Timing: clk is the step clock of the discrete-time model, one step per
// controller transition; the real circuit has no clock. A pass round the loop
// takes a fixed number of steps, so the latency is linear in the number of
// subtractions: 2 + 10*n steps from in_ack rising to the output request
// of the demultiplexer at W = 16. Stage counts follow the sixteen-bit
// reference design and grow with clog4(W).
module gcd_top
  import gcd_pkg::*;
#(
  parameter int unsigned W = GCD_WIDTH
) (
  input  logic         clk,
  input  logic         rst_l,
  input  logic         in_req,
  output logic         in_ack,
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  output logic         out_req,
  input  logic         out_ack,
  output logic [W-1:0] out_z
);

  localparam int unsigned NC = cmp_stages(W);   // comparator stages
  localparam int unsigned NT = 1 + NC;          // compare row: operand mux + comparator
  localparam int unsigned NS = sub_stages(W);   // subtract row

  // ---------------------------------------------------------------- control
  logic [NT-1:0] pc_t, ev_t, clr_t;   // compare row controllers
  logic [NS-1:0] pc_s, ev_s, clr_s;   // subtract row controllers
  logic          pc_o, ev_o, clr_o;   // output stage controller

  logic mx_out_req;
  logic mx_sel_req, mx_sel_ack, mx_sel;
  logic dx_in_ack, dx_t_req, dx_f_req, dx_fk_req, dx_fk_ack;

  // Data of the compare row's last stage.
  logic [W-1:0] a_t, b_t;
  logic         neq_t, gt_t;

  // Looped pair from the subtract row.
  logic [W-1:0] loop_a, loop_b;
  logic         loop_ack;

  // Request into / acknowledge back to each controller of the two rows.
  logic [NT-1:0] req_t, ack_t;
  logic [NS-1:0] req_s, ack_s;
  assign req_t = {pc_t[NT-2:0], mx_out_req};
  assign ack_t = {dx_in_ack, pc_t[NT-1:1]};
  assign req_s = {pc_s[NS-2:0], dx_t_req};
  assign ack_s = {loop_ack, pc_s[NS-1:1]};

  async_mux u_mx (
    .clk    (clk),
    .rst_l  (rst_l),
    .sel_req(mx_sel_req),
    .sel_ack(mx_sel_ack),
    .sel    (mx_sel),
    .in0_req(in_req),
    .in0_ack(in_ack),
    .in1_req(pc_s[NS-1]),
    .in1_ack(loop_ack),
    .out_req(mx_out_req),
    .out_ack(pc_t[0])
  );

  for (genvar i = 0; i < NT; i++) begin : g_ct
    swc_ctrl u_ctl (
      .clk   (clk),
      .rst_l (rst_l),
      .req_in(req_t[i]),
      .ack_in(ack_t[i]),
      .pc    (pc_t[i]),
      .ev    (ev_t[i]),
      .clr   (clr_t[i])
    );
  end

  async_demux u_dx (
    .clk   (clk),
    .rst_l (rst_l),
    .in_req(pc_t[NT-1]),
    .in_ack(dx_in_ack),
    .sel   (neq_t),
    .t_req (dx_t_req),
    .t_ack (pc_s[0]),
    .f_req (dx_f_req),
    .f_ack (pc_o),
    .fk_req(dx_fk_req),
    .fk_ack(dx_fk_ack)
  );

  for (genvar i = 0; i < NS; i++) begin : g_cs
    swc_ctrl u_ctl (
      .clk   (clk),
      .rst_l (rst_l),
      .req_in(req_s[i]),
      .ack_in(ack_s[i]),
      .pc    (pc_s[i]),
      .ev    (ev_s[i]),
      .clr   (clr_s[i])
    );
  end

  swc_ctrl u_ctl_out (
    .clk   (clk),
    .rst_l (rst_l),
    .req_in(dx_f_req),
    .ack_in(out_ack),
    .pc    (pc_o),
    .ev    (ev_o),
    .clr   (clr_o)
  );

  loop_flag_path u_t0 (
    .clk     (clk),
    .rst_l   (rst_l),
    .in_req  (dx_fk_req),
    .in_ack  (dx_fk_ack),
    .flag_in (neq_t),
    .out_req (mx_sel_req),
    .out_ack (mx_sel_ack),
    .flag_out(mx_sel)
  );

  // -------------------------------------------------------------- data path
  logic [W-1:0] a_m, b_m;

  operand_mux #(.W(W)) u_opmux (
    .clk   (clk),
    .rst_l (rst_l),
    .ev    (ev_t[0]),
    .clr   (clr_t[0]),
    .sel   (mx_sel),
    .ext_a (in_a),
    .ext_b (in_b),
    .loop_a(loop_a),
    .loop_b(loop_b),
    .a     (a_m),
    .b     (b_m)
  );

  gcd_comparator #(.W(W)) u_cmp (
    .clk  (clk),
    .rst_l(rst_l),
    .ev   (ev_t[NT-1:1]),
    .clr  (clr_t[NT-1:1]),
    .a    (a_m),
    .b    (b_m),
    .neq  (neq_t),
    .gt   (gt_t)
  );

  pfal_pipe #(.WIDTH(2 * W), .STAGES(NC)) u_opbuf (
    .clk  (clk),
    .rst_l(rst_l),
    .ev   (ev_t[NT-1:1]),
    .clr  (clr_t[NT-1:1]),
    .d    ({a_m, b_m}),
    .q    ({a_t, b_t})
  );

  // Subtract row: difference max - min, subtrahend min.
  gcd_subtractor #(.W(W)) u_sub (
    .clk  (clk),
    .rst_l(rst_l),
    .ev   (ev_s),
    .clr  (clr_s),
    .a    (a_t),
    .b    (b_t),
    .s    (!gt_t),
    .z    (loop_b)
  );

  subtrahend_bypass #(.W(W)) u_byp (
    .clk  (clk),
    .rst_l(rst_l),
    .ev   (ev_s),
    .clr  (clr_s),
    .a    (a_t),
    .b    (b_t),
    .gt   (gt_t),
    .q    (loop_a)
  );

  // Output stage: Z is the common value, taken from the A row.
  pfal_reg #(.WIDTH(W)) u_zbuf (
    .clk  (clk),
    .rst_l(rst_l),
    .ev   (ev_o),
    .clr  (clr_o),
    .d    (a_t),
    .q    (out_z)
  );

  assign out_req = pc_o;

endmodule
