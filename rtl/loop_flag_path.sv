// loop_flag_path -- the single-bit loop-control path that carries the T0
// token.
//
// Two pipeline stages, each a stage controller with a one-bit dual-rail
// PFAL buffer (pfal_buffer), carry the A!=B decision of a pass from the
// demultiplexer back to the select input of the input multiplexer, where it
// decides whether the next pass takes new operands (0) or the looped pair
// (1). The second stage is T0: the global reset leaves its controller charged
// and its bit at 0 ("operands were equal", false rail high), so after reset
// there is exactly one select token in the loop and it asks for a new
// operand pair. Resetting T0 this way follows the original design.
//
// Interface: four-phase input channel (in_req/in_ack/flag_in) and output
// channel (out_req/out_ack/flag_out); flag_out is the true rail of T0 and is
// valid while out_req is high. The data bit enters as a single wire and is
// expanded to its two rails at the first buffer.
module loop_flag_path (
  input  logic clk,
  input  logic rst_l,
  input  logic in_req,
  output logic in_ack,
  input  logic flag_in,
  output logic out_req,
  input  logic out_ack,
  output logic flag_out
);

  logic pc1, ev1, clr1, f1_h, f1_l;
  logic pc0, ev0, clr0, t0_l;

  swc_ctrl u_ctl1 (.clk(clk), .rst_l(rst_l), .req_in(in_req), .ack_in(pc0),
                   .pc(pc1), .ev(ev1), .clr(clr1));
  pfal_buffer u_buf1 (.clk(clk), .rst_l(rst_l), .ev(ev1), .clr(clr1),
                      .a_h(flag_in), .a_l(!flag_in), .z_h(f1_h), .z_l(f1_l));

  // T0: charged by reset, holding "equal" (false rail high).
  swc_ctrl #(.RESET_CHARGED(1'b1)) u_ctl0 (.clk(clk), .rst_l(rst_l), .req_in(pc1),
                                           .ack_in(out_ack), .pc(pc0), .ev(ev0), .clr(clr0));
  pfal_buffer #(.RESET_H(1'b0), .RESET_L(1'b1)) u_buf0 (
    .clk(clk), .rst_l(rst_l), .ev(ev0), .clr(clr0),
    .a_h(f1_h), .a_l(f1_l), .z_h(flag_out), .z_l(t0_l)
  );

  // While the token is held the bit is valid: exactly one rail is high.
  a_valid: assert property (@(posedge clk) disable iff (!rst_l) pc0 |-> (flag_out ^ t0_l));

  assign in_ack  = pc1;
  assign out_req = pc0;

endmodule
