// tb_async_mux -- checks the four-phase multiplexer control against
// four-phase environments on all four channels.
//
// Each transfer: a select token with a random bit is offered; a request is
// raised on the selected channel, and sometimes also (too early) on the other
// one, which must then be left waiting. out_req must rise only for the
// selected channel, the selected input and the select channel must be
// acknowledged only after out_ack, and everything must return to zero.
module tb_async_mux;
  logic clk = 1'b0, rst_l = 1'b0;
  logic sel_req = 1'b0, sel = 1'b0, in0_req = 1'b0, in1_req = 1'b0, out_ack = 1'b0;
  logic sel_ack, in0_ack, in1_ack, out_req;

  async_mux dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Responder on the output channel, with random delays.
  initial begin
    forever begin
      @(posedge clk iff out_req);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      @(negedge clk) out_ack = 1'b1;
      @(posedge clk iff !out_req);
      @(negedge clk) out_ack = 1'b0;
    end
  end

  int unsigned n_sel [2] = '{0, 0};
  int unsigned n_wait = 0;

  initial begin
    bit s, early;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_l = 1'b1;
    for (int i = 0; i < 300; i++) begin
      s     = 1'($urandom);
      early = ($urandom_range(0, 3) == 0);
      @(negedge clk);
      if (early) begin
        // The other channel requests first and must not get through.
        if (s) in0_req = 1'b1; else in1_req = 1'b1;
        repeat (4) @(negedge clk);
        check(!out_req && !in0_ack && !in1_ack, "unselected request passed without a select token");
      end
      sel = s; sel_req = 1'b1;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      if (s) in1_req = 1'b1; else in0_req = 1'b1;
      @(posedge clk iff (s ? in1_ack : in0_ack));
      check(sel_ack, "select channel not acknowledged with the input");
      check(out_ack, "input acknowledged before the output");
      check(!(s ? in0_ack : in1_ack), "wrong input acknowledged");
      n_sel[s]++;
      @(negedge clk);
      if (s) in1_req = 1'b0; else in0_req = 1'b0;
      sel_req = 1'b0;
      @(posedge clk iff !(s ? in1_ack : in0_ack));
      check(!sel_ack, "select acknowledge did not return to zero");
      if (early) begin
        // Now serve the waiting request with a matching select token.
        @(negedge clk);
        sel = !s; sel_req = 1'b1;
        @(posedge clk iff (s ? in0_ack : in1_ack));
        n_wait++;
        @(negedge clk);
        if (s) in0_req = 1'b0; else in1_req = 1'b0;
        sel_req = 1'b0;
        @(posedge clk iff !(s ? in0_ack : in1_ack));
      end
    end
    check(n_sel[0] > 0 && n_sel[1] > 0 && n_wait > 0, "not every case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // out_req must only be high while a select token and its request are up.
  always @(posedge clk) if (rst_l && out_req && !out_ack) begin
    checks++;
    if (!sel_req || !(sel ? in1_req : in0_req)) begin
      failures++;
      $display("FAIL: out_req without a matching select and request");
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
