// tb_c_element -- checks the Muller C-element against its truth table.
//
// Random input pairs are applied for 2000 steps; after each clk edge the
// output must equal the inputs if they agreed before the edge and keep its
// previous value otherwise. Both reset values are checked.
module tb_c_element;
  logic clk = 1'b0, rst_l = 1'b0, a = 1'b0, b = 1'b0;
  logic y0, y1;

  c_element #(.RESET_VAL(1'b0)) dut0 (.clk(clk), .rst_l(rst_l), .a(a), .b(b), .y(y0));
  c_element #(.RESET_VAL(1'b1)) dut1 (.clk(clk), .rst_l(rst_l), .a(a), .b(b), .y(y1));

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic model0, model1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(y0 == 1'b0 && y1 == 1'b1, "reset values");
    b = 1'b1;          // inputs disagree: both outputs keep their reset values
    rst_l = 1'b1;
    model0 = 1'b0;
    model1 = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a = 1'($urandom);
      b = ($urandom_range(0, 2) == 0) ? 1'($urandom) : a;
      if (a == b) begin model0 = a; model1 = a; end
      @(negedge clk);
      check(y0 == model0 && y1 == model1,
            $sformatf("step %0d a=%b b=%b y=%b%b expected %b%b", i, a, b, y0, y1, model0, model1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
