// subtrahend_bypass -- picks the subtrahend and carries it beside the
// subtractor.
//
// In the first subtract stage a multiplexer keeps the smaller operand
// (b when gt = A>B is 1, a otherwise); the value is then passed through
// bypass buffers, one per remaining subtractor stage, so that it leaves in
// the same stage as the difference. With W = 16: one multiplexer stage and
// four buffers.
module subtrahend_bypass
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
  input  logic          gt,
  output logic [W-1:0]  q
);

  logic [W-1:0] sel_q;

  pfal_reg #(.WIDTH(W)) u_sel (
    .clk(clk), .rst_l(rst_l), .ev(ev[0]), .clr(clr[0]),
    .d(gt ? b : a), .q(sel_q)
  );

  pfal_pipe #(.WIDTH(W), .STAGES(NS - 1)) u_buf (
    .clk(clk), .rst_l(rst_l), .ev(ev[NS-1:1]), .clr(clr[NS-1:1]),
    .d(sel_q), .q(q)
  );

endmodule
