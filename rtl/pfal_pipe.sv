// pfal_pipe -- chain of PFAL buffers, one per pipeline stage.
//
// Carries a word unchanged through STAGES stages, each driven by its own
// stage controller (ev/clr bit i belongs to stage i). It keeps operands in
// step with a pipelined unit that runs beside it (the comparator on the
// compare row, the subtractor on the subtract row). The output is valid
// while the last stage's power-clock is high.
module pfal_pipe #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned STAGES = 3
) (
  input  logic              clk,
  input  logic              rst_l,
  input  logic [STAGES-1:0] ev,
  input  logic [STAGES-1:0] clr,
  input  logic [WIDTH-1:0]  d,
  output logic [WIDTH-1:0]  q
);

  logic [WIDTH-1:0] stage_q [STAGES+1];

  assign stage_q[0] = d;

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    pfal_reg #(.WIDTH(WIDTH)) u_buf (
      .clk  (clk),
      .rst_l(rst_l),
      .ev   (ev[i]),
      .clr  (clr[i]),
      .d    (stage_q[i]),
      .q    (stage_q[i+1])
    );
  end

  assign q = stage_q[STAGES];

endmodule
