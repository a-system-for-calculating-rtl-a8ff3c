// pfal_reg -- one adiabatic (PFAL) data-path stage, single-rail model.
//
// A Positive Feedback Adiabatic Logic gate evaluates while its power-clock
// ramps up, holds its output by positive feedback while the power-clock is
// high, and returns its output to zero as the power-clock ramps down. Here
// the stage is a register: when its controller signals ev (power-clock about
// to rise) it captures d, when it signals clr (power-clock about to fall) it
// clears to zero. The logic function of the stage is whatever drives d.
//
// The real gate is dual rail; this model keeps one rail, and a cleared
// (spacer) stage reads as all zeros. RESET_VAL is the content after rst_l,
// used for the stage that holds the loop's initial token.
module pfal_reg #(
  parameter int unsigned          WIDTH     = 16,
  parameter logic [WIDTH-1:0]     RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_l,
  input  logic             ev,
  input  logic             clr,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_l) begin
    if (!rst_l)   q <= RESET_VAL;
    else if (ev)  q <= d;
    else if (clr) q <= '0;
  end

endmodule
