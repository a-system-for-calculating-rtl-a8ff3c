// tb_gcd_subtractor -- checks the pipelined selectable subtractor.
//
// For random operands, for carry-chain extremes and for both settings of s,
// z must equal a - b (s = 0) or b - a (s = 1) modulo 2**W after the five
// stage evaluations; the inputs change once the first stage has evaluated.
// The same is repeated at W = 8, a width that is not a power of four, and
// at W = 32, where the prefix tree has three levels.
module tb_gcd_subtractor;
  import gcd_pkg::*;

  logic clk = 1'b0, rst_l = 1'b0;
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int unsigned NS16 = sub_stages(16);
  localparam int unsigned NS8  = sub_stages(8);
  localparam int unsigned NS32 = sub_stages(32);

  logic [NS16-1:0] ev16 = '0, clr16 = '0;
  logic [NS8-1:0]  ev8  = '0, clr8  = '0;
  logic [NS32-1:0] ev32 = '0, clr32 = '0;
  logic [15:0] a16 = '0, b16 = '0, z16;
  logic [7:0]  a8  = '0, b8  = '0, z8;
  logic [31:0] a32 = '0, b32 = '0, z32;
  logic        s16 = 1'b0, s8 = 1'b0, s32 = 1'b0;

  gcd_subtractor #(.W(16)) dut16 (.clk(clk), .rst_l(rst_l), .ev(ev16), .clr(clr16),
                                  .a(a16), .b(b16), .s(s16), .z(z16));
  gcd_subtractor #(.W(8))  dut8  (.clk(clk), .rst_l(rst_l), .ev(ev8), .clr(clr8),
                                  .a(a8), .b(b8), .s(s8), .z(z8));
  gcd_subtractor #(.W(32)) dut32 (.clk(clk), .rst_l(rst_l), .ev(ev32), .clr(clr32),
                                  .a(a32), .b(b32), .s(s32), .z(z32));

  task automatic run16(input logic [15:0] x, input logic [15:0] y, input logic s);
    logic [15:0] exp;
    exp = s ? y - x : x - y;
    @(negedge clk);
    a16 = x; b16 = y; s16 = s;
    for (int k = 0; k < NS16; k++) begin
      ev16[k] = 1'b1;
      @(negedge clk) ev16[k] = 1'b0;
      a16 = 16'($urandom); b16 = 16'($urandom); s16 = 1'($urandom);
    end
    check(z16 == exp, $sformatf("W16 %0d,%0d s=%b: z=%0d expected %0d", x, y, s, z16, exp));
    for (int k = 0; k < NS16; k++) begin
      clr16[k] = 1'b1;
      @(negedge clk) clr16[k] = 1'b0;
    end
    check(z16 == '0, "W16 result did not return to zero");
  endtask

  task automatic run8(input logic [7:0] x, input logic [7:0] y, input logic s);
    @(negedge clk);
    a8 = x; b8 = y; s8 = s;
    for (int k = 0; k < NS8; k++) begin ev8[k] = 1'b1; @(negedge clk) ev8[k] = 1'b0; end
    check(z8 == (s ? y - x : x - y), $sformatf("W8 %0d,%0d s=%b: z=%0d", x, y, s, z8));
    for (int k = 0; k < NS8; k++) begin clr8[k] = 1'b1; @(negedge clk) clr8[k] = 1'b0; end
  endtask

  task automatic run32(input logic [31:0] x, input logic [31:0] y, input logic s);
    @(negedge clk);
    a32 = x; b32 = y; s32 = s;
    for (int k = 0; k < NS32; k++) begin ev32[k] = 1'b1; @(negedge clk) ev32[k] = 1'b0; end
    check(z32 == (s ? y - x : x - y), $sformatf("W32 %0d,%0d s=%b: z=%0d", x, y, s, z32));
    for (int k = 0; k < NS32; k++) begin clr32[k] = 1'b1; @(negedge clk) clr32[k] = 1'b0; end
  endtask

  initial begin
    check(NS16 == 5 && NS8 == 5 && NS32 == 6, "stage counts");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_l = 1'b1;
    for (int s = 0; s < 2; s++) begin
      run16(16'd65523, 16'd43682, 1'(s));
      run16(16'hFFFF, 16'h0001, 1'(s));
      run16(16'h0000, 16'h0001, 1'(s));
      run16(16'h8000, 16'h8000, 1'(s));
      run16(16'h0000, 16'hFFFF, 1'(s));
    end
    for (int i = 0; i < 1500; i++) run16(16'($urandom), 16'($urandom), 1'($urandom));
    for (int i = 0; i < 300; i++) run8(8'($urandom), 8'($urandom), 1'($urandom));
    for (int i = 0; i < 300; i++) run32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
