// tb_loop_flag_path -- checks the loop-control path and its reset token.
//
// After reset the output must already hold a token whose bit is 0 (equal),
// before any input. Then a stream of random bits is pushed in and read out
// with four-phase handshakes; the reset token must come out first, followed
// by the input bits in order.
module tb_loop_flag_path;
  logic clk = 1'b0, rst_l = 1'b0;
  logic in_req = 1'b0, flag_in = 1'b0, out_ack = 1'b0;
  logic in_ack, out_req, flag_out;

  loop_flag_path dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int N = 200;
  bit sent [$];

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_l = 1'b1;
    @(negedge clk);
    check(out_req && !flag_out, "no 'equal' token after reset");
    fork
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        flag_in = 1'($urandom);
        sent.push_back(flag_in);
        in_req = 1'b1;
        @(posedge clk iff in_ack);
        @(negedge clk) in_req = 1'b0;
        flag_in = 1'($urandom);
        @(posedge clk iff !in_ack);
      end
      for (int i = 0; i <= N; i++) begin
        bit exp;
        @(posedge clk iff out_req);
        exp = (i == 0) ? 1'b0 : sent.pop_front();
        check(flag_out == exp, $sformatf("token %0d: got %b expected %b", i, flag_out, exp));
        repeat ($urandom_range(0, 5)) @(posedge clk);
        @(negedge clk) out_ack = 1'b1;
        @(posedge clk iff !out_req);
        @(negedge clk) out_ack = 1'b0;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
