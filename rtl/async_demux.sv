// async_demux -- control of the four-phase demultiplexer (DX) with a fork to
// the loop-control path.
//
// The incoming token (in_req, bundled with the comparator's A!=B result sel)
// is steered to the subtract loop (t_req) when sel is 1 and to the output
// stage (f_req) when sel is 0. At the same time it is forked to the
// loop-control path (fk_req), which carries sel back to the input multiplexer
// as its next select token. The incoming token is acknowledged by a C-element
// that waits for the steered output and the fork to acknowledge, and, in the
// return-to-zero phase, for both to release.
//
// The demultiplexer follows the original design; the fork, the C-element
// join of the acknowledges and the gate-level form are this design's choice.
//
// sel must be stable while in_req is high; in this engine it is held by the
// same stage register that drives in_req.
module async_demux (
  input  logic clk,
  input  logic rst_l,
  input  logic in_req,
  output logic in_ack,
  input  logic sel,
  output logic t_req,
  input  logic t_ack,
  output logic f_req,
  input  logic f_ack,
  output logic fk_req,
  input  logic fk_ack
);

  assign t_req  = in_req &&  sel;
  assign f_req  = in_req && !sel;
  assign fk_req = in_req;

  c_element u_join (.clk(clk), .rst_l(rst_l), .a(t_ack || f_ack), .b(fk_ack), .y(in_ack));

  a_one_route: assert property (@(posedge clk) disable iff (!rst_l) !(t_ack && f_ack));

endmodule
