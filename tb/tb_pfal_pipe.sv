// tb_pfal_pipe -- checks the chain of PFAL buffers.
//
// A word is evaluated into stage 0, moved stage by stage with one ev pulse
// each, and must appear unchanged at the output after the last one; stage
// clears (first stage first, as in the pipeline) must return the output to
// zero only when the last stage is cleared.
module tb_pfal_pipe;
  localparam int unsigned WIDTH = 16, STAGES = 3;
  logic clk = 1'b0, rst_l = 1'b0;
  logic [STAGES-1:0] ev = '0, clr = '0;
  logic [WIDTH-1:0]  d = '0, q;

  pfal_pipe #(.WIDTH(WIDTH), .STAGES(STAGES)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [WIDTH-1:0] v;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_l = 1'b1;
    for (int i = 0; i < 200; i++) begin
      v = WIDTH'($urandom);
      @(negedge clk) d = v;
      for (int s = 0; s < STAGES; s++) begin
        ev[s] = 1'b1;
        @(negedge clk) ev[s] = 1'b0;
        d = WIDTH'($urandom);
        if (s < STAGES - 1) check(q == '0, "output valid too early");
      end
      check(q == v, $sformatf("word %0d: got %h expected %h", i, q, v));
      for (int s = 0; s < STAGES; s++) begin
        clr[s] = 1'b1;
        @(negedge clk) clr[s] = 1'b0;
        if (s < STAGES - 1) check(q == v, "output lost before its stage cleared");
      end
      check(q == '0, "output did not return to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
