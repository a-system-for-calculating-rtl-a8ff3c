// tb_pfal_buffer -- checks the dual-rail PFAL buffer.
//
// Random dual-rail words (each bit true, false or spacer) are evaluated and
// cleared in random order: after ev both output rails must equal the input
// rails, after clr both must be zero, otherwise they hold. The reset values
// of a buffer with RESET_H / RESET_L set are checked too.
module tb_pfal_buffer;
  localparam int unsigned WIDTH = 8;
  logic clk = 1'b0, rst_l = 1'b0, ev = 1'b0, clr = 1'b0;
  logic [WIDTH-1:0] a_h = '0, a_l = '0, z_h, z_l, r_h, r_l;

  pfal_buffer #(.WIDTH(WIDTH)) dut (.*);
  pfal_buffer #(.WIDTH(WIDTH), .RESET_H(8'h0F), .RESET_L(8'hF0)) dut_r (
    .clk(clk), .rst_l(rst_l), .ev(1'b0), .clr(1'b0), .a_h(a_h), .a_l(a_l), .z_h(r_h), .z_l(r_l));

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [WIDTH-1:0] mh, ml, v, sp;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(z_h == '0 && z_l == '0, "reset to spacer");
    check(r_h == 8'h0F && r_l == 8'hF0, "reset to a valid word");
    rst_l = 1'b1;
    mh = '0; ml = '0;
    for (int i = 0; i < 1000; i++) begin
      v  = WIDTH'($urandom);
      sp = ($urandom_range(0, 3) == 0) ? WIDTH'($urandom) : '0;   // bits left as spacer
      a_h = v & ~sp;
      a_l = ~v & ~sp;
      case ($urandom_range(0, 2))
        0: begin ev = 1'b1; mh = a_h; ml = a_l; end
        1: begin clr = 1'b1; mh = '0; ml = '0; end
        default: ;
      endcase
      @(negedge clk);
      ev = 1'b0; clr = 1'b0;
      check(z_h == mh && z_l == ml, $sformatf("step %0d: rails %h/%h expected %h/%h", i, z_h, z_l, mh, ml));
    end
    check(r_h == 8'h0F && r_l == 8'hF0, "buffer without strobes changed");
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
