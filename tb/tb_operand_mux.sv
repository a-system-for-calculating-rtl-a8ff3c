// tb_operand_mux -- checks the input data multiplexers: on ev the operand
// registers load the external pair when sel is 0 and the looped pair when
// sel is 1, and clear to zero on clr.
module tb_operand_mux;
  localparam int unsigned W = 16;
  logic clk = 1'b0, rst_l = 1'b0, ev = 1'b0, clr = 1'b0, sel = 1'b0;
  logic [W-1:0] ext_a = '0, ext_b = '0, loop_a = '0, loop_b = '0, a, b;

  operand_mux #(.W(W)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] ea, eb;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_l = 1'b1;
    for (int i = 0; i < 500; i++) begin
      ext_a = W'($urandom); ext_b = W'($urandom);
      loop_a = W'($urandom); loop_b = W'($urandom);
      sel = 1'($urandom);
      ea = sel ? loop_a : ext_a;
      eb = sel ? loop_b : ext_b;
      ev = 1'b1;
      @(negedge clk) ev = 1'b0;
      ext_a = ~ext_a; loop_b = ~loop_b; sel = !sel;   // inputs move on; the stage holds
      @(negedge clk);
      check(a == ea && b == eb, $sformatf("step %0d: got %h/%h expected %h/%h", i, a, b, ea, eb));
      clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      check(a == '0 && b == '0, "stage did not return to zero");
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
