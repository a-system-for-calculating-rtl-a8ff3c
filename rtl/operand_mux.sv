// operand_mux -- input data multiplexers of the first compare stage.
//
// The two operand registers of the first stage load either a new operand pair
// from the input channel (sel = 0) or the pair returned by the subtract loop
// (sel = 1): the subtrahend goes to A and the difference to B. sel is the
// loop-control bit held by the T0 stage, i.e. the A!=B result of the previous
// pass. Like every data-path stage the registers evaluate on ev and return to
// zero on clr.
module operand_mux #(
  parameter int unsigned W = gcd_pkg::GCD_WIDTH
) (
  input  logic         clk,
  input  logic         rst_l,
  input  logic         ev,
  input  logic         clr,
  input  logic         sel,
  input  logic [W-1:0] ext_a,
  input  logic [W-1:0] ext_b,
  input  logic [W-1:0] loop_a,
  input  logic [W-1:0] loop_b,
  output logic [W-1:0] a,
  output logic [W-1:0] b
);

  logic [2*W-1:0] pick;

  always_comb pick = sel ? {loop_a, loop_b} : {ext_a, ext_b};

  pfal_reg #(.WIDTH(2 * W)) u_reg (
    .clk  (clk),
    .rst_l(rst_l),
    .ev   (ev),
    .clr  (clr),
    .d    (pick),
    .q    ({a, b})
  );

endmodule
