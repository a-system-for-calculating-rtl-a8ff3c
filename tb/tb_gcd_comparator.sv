// tb_gcd_comparator -- checks the pipelined radix-four comparator.
//
// Operand pairs (random, equal, differing in a single random bit, and the
// extremes) are evaluated through the three stages one ev pulse at a time;
// neq and gt must equal a != b and a > b after the last stage, and the
// inputs may change once the first stage has evaluated. The stages are then
// cleared in pipeline order.
module tb_gcd_comparator;
  import gcd_pkg::*;
  localparam int unsigned W   = 16;
  localparam int unsigned NST = cmp_stages(W);
  logic clk = 1'b0, rst_l = 1'b0;
  logic [NST-1:0] ev = '0, clr = '0;
  logic [W-1:0]   a = '0, b = '0;
  logic           neq, gt;

  gcd_comparator #(.W(W)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    @(negedge clk);
    a = x; b = y;
    for (int s = 0; s < NST; s++) begin
      ev[s] = 1'b1;
      @(negedge clk) ev[s] = 1'b0;
      a = W'($urandom); b = W'($urandom);
    end
    check(neq == (x != y) && gt == (x > y),
          $sformatf("%0d vs %0d: neq=%b gt=%b", x, y, neq, gt));
    for (int s = 0; s < NST; s++) begin
      clr[s] = 1'b1;
      @(negedge clk) clr[s] = 1'b0;
    end
  endtask

  initial begin
    logic [W-1:0] x;
    check(NST == 3, "sixteen bits must give three comparator stages");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_l = 1'b1;
    run('0, '0); run('1, '1); run('1, '0); run('0, '1);
    run(16'h8000, 16'h7FFF); run(16'h7FFF, 16'h8000);
    for (int i = 0; i < 1500; i++) begin
      x = W'($urandom);
      case (i % 3)
        0: run(x, W'($urandom));
        1: run(x, x);
        default: run(x, x ^ (W'(1) << $urandom_range(0, W - 1)));
      endcase
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
