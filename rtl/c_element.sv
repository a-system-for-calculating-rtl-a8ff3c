// c_element -- Muller C-element, the basic building block of the
// asynchronous control.
//
// The output copies the inputs when they agree and holds its value while they
// differ: it rises after both inputs are high and falls after both are low.
// The circuit is modelled in discrete time: the output register is updated on
// each rising edge of clk, so one clk cycle stands for one gate delay of the
// self-timed circuit. rst_l (active low, asynchronous) forces the output to
// RESET_VAL; the reset value is this design's choice, used to place the
// initial token of a loop.
module c_element #(
  parameter bit RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_l,
  input  logic a,
  input  logic b,
  output logic y
);

  always_ff @(posedge clk or negedge rst_l) begin
    if (!rst_l)      y <= RESET_VAL;
    else if (a == b) y <= a;
  end

endmodule
