// tb_async_demux -- checks the demultiplexer control with its fork.
//
// Tokens with a random select bit are sent in; the request must appear on
// the loop output (t) when sel = 1 and on the result output (f) when sel = 0,
// and always on the fork. Each output is answered by its own four-phase
// responder with random delays; in_ack must rise only after both the steered
// output and the fork have acknowledged and fall only after both released.
module tb_async_demux;
  logic clk = 1'b0, rst_l = 1'b0;
  logic in_req = 1'b0, sel = 1'b0, t_ack = 1'b0, f_ack = 1'b0, fk_ack = 1'b0;
  logic in_ack, t_req, f_req, fk_req;

  async_demux dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned n_t = 0, n_f = 0, n_fk = 0;

  initial forever begin
    @(posedge clk iff t_req); n_t++;
    repeat ($urandom_range(0, 4)) @(posedge clk);
    @(negedge clk) t_ack = 1'b1;
    @(posedge clk iff !t_req);
    repeat ($urandom_range(0, 4)) @(posedge clk);
    @(negedge clk) t_ack = 1'b0;
  end
  initial forever begin
    @(posedge clk iff f_req); n_f++;
    repeat ($urandom_range(0, 4)) @(posedge clk);
    @(negedge clk) f_ack = 1'b1;
    @(posedge clk iff !f_req);
    repeat ($urandom_range(0, 4)) @(posedge clk);
    @(negedge clk) f_ack = 1'b0;
  end
  initial forever begin
    @(posedge clk iff fk_req); n_fk++;
    repeat ($urandom_range(0, 4)) @(posedge clk);
    @(negedge clk) fk_ack = 1'b1;
    @(posedge clk iff !fk_req);
    repeat ($urandom_range(0, 4)) @(posedge clk);
    @(negedge clk) fk_ack = 1'b0;
  end

  initial begin
    int unsigned et = 0, ef = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_l = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      sel = 1'($urandom);
      if (sel) et++; else ef++;
      in_req = 1'b1;
      @(posedge clk iff in_ack);
      check(fk_ack, "acknowledged before the fork");
      check(sel ? (t_ack && !f_ack) : (f_ack && !t_ack), "wrong output acknowledged");
      @(negedge clk);
      in_req = 1'b0;
      sel = 1'($urandom);   // select is free once the request is withdrawn
      @(posedge clk iff !in_ack);
      check(!fk_ack && !t_ack && !f_ack, "released before the outputs returned to zero");
    end
    repeat (10) @(posedge clk);
    check(n_t == et && n_f == ef && n_fk == et + ef,
          $sformatf("routed t=%0d f=%0d fork=%0d, expected %0d %0d %0d", n_t, n_f, n_fk, et, ef, et + ef));
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
