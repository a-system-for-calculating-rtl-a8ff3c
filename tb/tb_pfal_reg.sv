// tb_pfal_reg -- checks the PFAL stage register: it loads d on ev, clears to
// zero on clr, holds otherwise, and resets to RESET_VAL.
module tb_pfal_reg;
  localparam int unsigned WIDTH = 16;
  logic clk = 1'b0, rst_l = 1'b0, ev = 1'b0, clr = 1'b0;
  logic [WIDTH-1:0] d = '0, q, q2;

  pfal_reg #(.WIDTH(WIDTH)) dut (.clk(clk), .rst_l(rst_l), .ev(ev), .clr(clr), .d(d), .q(q));
  pfal_reg #(.WIDTH(WIDTH), .RESET_VAL(16'hA5C3)) dut2 (.clk(clk), .rst_l(rst_l), .ev(1'b0),
                                                        .clr(1'b0), .d(d), .q(q2));

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [WIDTH-1:0] model;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(q == '0 && q2 == 16'hA5C3, "reset values");
    rst_l = 1'b1;
    model = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d = WIDTH'($urandom);
      // The controller never raises ev and clr together.
      case ($urandom_range(0, 2))
        0: begin ev = 1'b1; clr = 1'b0; model = d;  end
        1: begin ev = 1'b0; clr = 1'b1; model = '0; end
        default: begin ev = 1'b0; clr = 1'b0; end
      endcase
      @(negedge clk);
      ev = 1'b0; clr = 1'b0;
      check(q == model, $sformatf("step %0d q=%h expected %h", i, q, model));
      check(q2 == 16'hA5C3, "register without ev/clr changed");
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
