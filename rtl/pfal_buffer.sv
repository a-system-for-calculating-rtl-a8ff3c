// pfal_buffer -- dual-rail PFAL buffer, the basic gate of the adiabatic data
// path.
//
// A PFAL buffer has a true rail and a false rail on each side (A_H/A_L in,
// Z_H/Z_L out) and is powered by its stage's power-clock. While the
// power-clock ramps up, the nFET evaluation path whose input rail is high
// pulls its output rail up and the cross-coupled inverters latch it; while
// the power-clock is high the outputs hold; as it ramps down both outputs
// return to zero, the spacer state. Here the ramp is replaced by the
// controller's ev (rise) and clr (fall) strobes, and each bit of the bus is
// one such buffer. An input whose rails are both low when ev arrives gives a
// spacer output; both rails high is not a valid input.
//
// RESET_H / RESET_L give the rails after rst_l, used to put a valid value
// into the stage that holds the loop's initial token. The gate's port names
// follow the PFAL buffer schematic; the strobes and the reset are this
// model's own.
module pfal_buffer #(
  parameter int unsigned      WIDTH   = 1,
  parameter logic [WIDTH-1:0] RESET_H = '0,
  parameter logic [WIDTH-1:0] RESET_L = '0
) (
  input  logic             clk,
  input  logic             rst_l,
  input  logic             ev,
  input  logic             clr,
  input  logic [WIDTH-1:0] a_h,
  input  logic [WIDTH-1:0] a_l,
  output logic [WIDTH-1:0] z_h,
  output logic [WIDTH-1:0] z_l
);

  always_ff @(posedge clk or negedge rst_l) begin
    if (!rst_l) begin
      z_h <= RESET_H;
      z_l <= RESET_L;
    end else if (ev) begin
      z_h <= a_h;
      z_l <= a_l;
    end else if (clr) begin
      z_h <= '0;
      z_l <= '0;
    end
  end

  // A dual-rail bit never has both rails high.
  a_rails: assert property (@(posedge clk) disable iff (!rst_l) (z_h & z_l) == '0);

endmodule
