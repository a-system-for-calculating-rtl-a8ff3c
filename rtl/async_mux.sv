// async_mux -- control of the four-phase bundled-data multiplexer (MX).
//
// Three channels meet here: a select channel carrying one bit (sel), input
// channel 0 (new operands) and input channel 1 (the pair returned by the
// subtract loop). The select channel is read as dual rail: sel_req & !sel
// chooses channel 0, sel_req & sel chooses channel 1. A C-element joins each
// choice with the request of its channel, so out_req rises only when a select
// token and a request on the chosen channel are both present, and falls only
// after both have been withdrawn. Each input acknowledge is a C-element of
// its choice and out_ack; the select channel is acknowledged together with
// the chosen input. The data multiplexing itself is done in the data path by
// operand_mux. A request on the channel that is not selected waits.
//
// The MUX element and its role follow the original design; this gate-level
// form is this design's choice.
//
// Protocol on every channel: four-phase (return-to-zero) handshake; sel must
// be stable while sel_req is high.
module async_mux (
  input  logic clk,
  input  logic rst_l,
  input  logic sel_req,
  output logic sel_ack,
  input  logic sel,
  input  logic in0_req,
  output logic in0_ack,
  input  logic in1_req,
  output logic in1_ack,
  output logic out_req,
  input  logic out_ack
);

  logic y0, y1;

  c_element u_y0 (.clk(clk), .rst_l(rst_l), .a(sel_req && !sel), .b(in0_req), .y(y0));
  c_element u_y1 (.clk(clk), .rst_l(rst_l), .a(sel_req &&  sel), .b(in1_req), .y(y1));
  c_element u_a0 (.clk(clk), .rst_l(rst_l), .a(y0), .b(out_ack), .y(in0_ack));
  c_element u_a1 (.clk(clk), .rst_l(rst_l), .a(y1), .b(out_ack), .y(in1_ack));

  assign out_req = y0 || y1;
  assign sel_ack = in0_ack || in1_ack;

  // Only one of the two choices may be active at a time.
  a_one_choice: assert property (@(posedge clk) disable iff (!rst_l) !(y0 && y1));

endmodule
