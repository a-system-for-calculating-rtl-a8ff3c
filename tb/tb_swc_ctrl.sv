// tb_swc_ctrl -- checks the stage controller against a reference model.
//
// Random request and acknowledge levels drive two controllers (reset empty
// and reset charged). Each step, pc must follow C(req_in, !ack_in), ev must
// be high exactly when pc is about to rise and clr exactly when it is about
// to fall. A second part chains three controllers as a four-phase pipeline
// and passes tokens from a producer to a consumer, checking that every token
// arrives and that neighbouring stages follow the handshake order.
module tb_swc_ctrl;
  logic clk = 1'b0, rst_l = 1'b0;
  logic req = 1'b0, ack = 1'b0;
  logic pc0, ev0, clr0, pc1, ev1, clr1;

  swc_ctrl #(.RESET_CHARGED(1'b0)) dut0 (.clk(clk), .rst_l(rst_l), .req_in(req), .ack_in(ack),
                                         .pc(pc0), .ev(ev0), .clr(clr0));
  swc_ctrl #(.RESET_CHARGED(1'b1)) dut1 (.clk(clk), .rst_l(rst_l), .req_in(req), .ack_in(ack),
                                         .pc(pc1), .ev(ev1), .clr(clr1));

  // Three-stage Muller pipeline.
  logic       p_req = 1'b0, c_ack = 1'b0;
  logic [2:0] pc, ev, clr;
  for (genvar i = 0; i < 3; i++) begin : g_p
    swc_ctrl u (.clk(clk), .rst_l(rst_l),
                .req_in((i == 0) ? p_req : pc[(i == 0) ? 0 : i-1]),
                .ack_in((i == 2) ? c_ack : pc[(i == 2) ? 2 : i+1]),
                .pc(pc[i]), .ev(ev[i]), .clr(clr[i]));
  end

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic m0, m1, n0, n1;
    int   tokens_in, tokens_out;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(pc0 == 1'b0 && pc1 == 1'b1, "reset values");
    rst_l = 1'b1;
    m0 = 1'b0; m1 = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      req = 1'($urandom);
      ack = 1'($urandom);
      n0 = (req == !ack) ? req : m0;
      n1 = (req == !ack) ? req : m1;
      #1;
      check(ev0 == (!m0 && n0) && clr0 == (m0 && !n0), $sformatf("ev/clr step %0d", i));
      check(ev1 == (!m1 && n1) && clr1 == (m1 && !n1), $sformatf("ev/clr (charged) step %0d", i));
      @(negedge clk);
      check(pc0 == n0 && pc1 == n1, $sformatf("pc step %0d", i));
      m0 = n0; m1 = n1;
    end

    // Pipeline part: the producer and consumer follow the four-phase protocol.
    req = 1'b0; ack = 1'b0;
    tokens_in = 0; tokens_out = 0;
    fork
      for (int t = 0; t < 50; t++) begin
        @(negedge clk); p_req = 1'b1;
        @(posedge clk iff pc[0]);
        tokens_in++;
        @(negedge clk); p_req = 1'b0;
        @(posedge clk iff !pc[0]);
      end
      for (int t = 0; t < 50; t++) begin
        @(posedge clk iff pc[2]);
        tokens_out++;
        check(tokens_out <= tokens_in, "token left before it entered");
        repeat ($urandom_range(0, 4)) @(posedge clk);
        @(negedge clk); c_ack = 1'b1;
        @(posedge clk iff !pc[2]);
        @(negedge clk); c_ack = 1'b0;
      end
    join
    check(tokens_out == 50, $sformatf("%0d of 50 tokens arrived", tokens_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A stage may only charge while the previous one is charged, and only
  // discharge once the next one has taken the token.
  always @(posedge clk) if (rst_l) begin
    if (ev[1]) begin checks++; if (!pc[0] || pc[2]) begin failures++; $display("FAIL: stage 1 charged out of order"); end end
    if (clr[1]) begin checks++; if (pc[0] || !pc[2]) begin failures++; $display("FAIL: stage 1 discharged out of order"); end end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
