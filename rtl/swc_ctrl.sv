// swc_ctrl -- pipeline-stage controller that owns one stage's power-clock.
//
// Each data-path stage of the engine has its own local power-clock, produced
// by a self-timed stepwise-charging controller. Its control part is a Muller
// C-element of the incoming request and the inverted acknowledge from the
// following stage, as in a four-phase Muller pipeline. The C-element output
// is at once the power-clock level of the stage (pc: high = charged), the
// request to the next stage and the acknowledge to the previous one.
//
// ev is high in the cycle before pc rises and clr in the cycle before it
// falls; data-path registers of the stage evaluate on ev and return to zero
// on clr, so their content is valid exactly while pc is high. The analog
// ramp of the power-clock (tank capacitors, stepwise charging) is not
// modelled: pc is a logic level.
//
// RESET_CHARGED = 1 makes the controller start charged, which is how the
// initial token of the loop (T0) is created by the global reset.
module swc_ctrl #(
  parameter bit RESET_CHARGED = 1'b0
) (
  input  logic clk,
  input  logic rst_l,
  input  logic req_in,   // request from the previous stage
  input  logic ack_in,   // acknowledge from the next stage
  output logic pc,       // power-clock level = request out = acknowledge out
  output logic ev,       // pc rises at the next clk edge: evaluate
  output logic clr       // pc falls at the next clk edge: return to zero
);

  c_element #(.RESET_VAL(RESET_CHARGED)) u_c (
    .clk  (clk),
    .rst_l(rst_l),
    .a    (req_in),
    .b    (!ack_in),
    .y    (pc)
  );

  assign ev  = !pc &&  req_in && !ack_in;
  assign clr =  pc && !req_in &&  ack_in;

endmodule
