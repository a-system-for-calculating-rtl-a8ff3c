// tb_gcd_reference_tests -- the two reference workloads of the design, timed the
// way the original circuit was measured.
//
// The short test is GCD(2P, 3P) with the prime P = 21841 (3P = 65523 fits
// sixteen bits): result P after two subtractions. The long test is
// GCD(F24, F23) = GCD(46368, 28657): result 1 after 22 subtractions. Each is
// run twice, back to back, on the default sixteen-bit engine with an
// immediately answering environment. The delay is measured from the rising
// input request to the rising output request. It must be the same on the
// first and the second run (no start-up effect) and equal 6 + 10*n steps for
// n subtractions (3 steps until the input is acknowledged, 2 + 10*n until the
// demultiplexer requests the output stage, 1 to charge it).
module tb_gcd_reference_tests;
  import gcd_pkg::*;
  localparam int unsigned W = GCD_WIDTH;

  logic         clk = 1'b0, rst_l = 1'b0, in_req = 1'b0, out_ack = 1'b0;
  logic         in_ack, out_req;
  logic [W-1:0] in_a = '0, in_b = '0, out_z;

  gcd_top dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic run(input int unsigned a, input int unsigned b, input int unsigned g,
                     input int unsigned n, input string name);
    longint unsigned t0, lat [2];
    logic [W-1:0]    z;
    for (int r = 0; r < 2; r++) begin
      @(negedge clk);
      in_a = W'(a); in_b = W'(b); in_req = 1'b1;
      t0 = cycle;
      fork
        begin
          @(posedge clk iff in_ack);
          @(negedge clk) in_req = 1'b0;
          @(posedge clk iff !in_ack);
        end
        begin
          @(posedge clk iff out_req);
          lat[r] = cycle - t0;
          z = out_z;
          check(out_z == W'(g), $sformatf("%s run %0d: Z = %0d, expected %0d", name, r, out_z, g));
          @(negedge clk) out_ack = 1'b1;
          @(posedge clk iff !out_req);
          @(negedge clk) out_ack = 1'b0;
        end
      join
      check(lat[r] == 6 + 10 * n,
            $sformatf("%s run %0d: delay %0d steps, expected %0d", name, r, lat[r], 6 + 10 * n));
      $display("%s run %0d: Z = %0d after %0d steps", name, r, z, lat[r]);
    end
    check(lat[0] == lat[1], $sformatf("%s: first and second run differ", name));
  endtask

  initial begin
    int unsigned p;
    p = 21841;
    check(3 * p <= 2 ** W - 1, "3P must fit the data path");
    check(46368 <= 2 ** W - 1, "F24 must fit the data path");
    repeat (3) @(posedge clk);
    @(negedge clk) rst_l = 1'b1;
    run(2 * p, 3 * p, p, 2, "short test (2P, 3P)");
    run(46368, 28657, 1, 22, "long test (F24, F23)");
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
