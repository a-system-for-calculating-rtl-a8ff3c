// tb_subtrahend_bypass -- checks that the smaller operand is selected in the
// first stage (b when gt = 1, a when gt = 0) and appears unchanged after the
// fifth stage, with the inputs changing after the first evaluation.
module tb_subtrahend_bypass;
  import gcd_pkg::*;
  localparam int unsigned W  = 16;
  localparam int unsigned NS = sub_stages(W);
  logic clk = 1'b0, rst_l = 1'b0;
  logic [NS-1:0] ev = '0, clr = '0;
  logic [W-1:0]  a = '0, b = '0, q;
  logic          gt = 1'b0;

  subtrahend_bypass #(.W(W)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] x, y, exp;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_l = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      x = W'($urandom); y = W'($urandom);
      exp = (x > y) ? y : x;
      @(negedge clk);
      a = x; b = y; gt = (x > y);
      for (int k = 0; k < NS; k++) begin
        ev[k] = 1'b1;
        @(negedge clk) ev[k] = 1'b0;
        a = W'($urandom); b = W'($urandom); gt = 1'($urandom);
        if (k < NS - 1) check(q == '0, "subtrahend arrived early");
      end
      check(q == exp, $sformatf("min(%0d,%0d): got %0d", x, y, q));
      for (int k = 0; k < NS; k++) begin
        clr[k] = 1'b1;
        @(negedge clk) clr[k] = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
