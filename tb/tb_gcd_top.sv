// tb_gcd_top -- end-to-end test of the GCD engine at its default width (16).
//
// Runs the two reference vectors of the design -- (2P, 3P) with P = 21841,
// which must give P after two subtractions, and the Fibonacci pair
// (F24, F23) = (46368, 28657), which must give 1 after 22 subtractions while
// every Fibonacci number from F24 down to 1 passes the end of the compare
// row -- then equal operands, a one, and random pairs. Results and the number
// of subtract passes are checked against a software Euclid model. The
// producer and consumer run freely, so a new pair often waits at the input
// multiplexer while the engine is busy, and the consumer delays its
// acknowledge at random (output back-pressure). Latency, from the input
// acknowledge to the demultiplexer's request to the output stage, must be
// L0 + n * T steps for n subtractions, with L0 and T taken from the first
// two vectors (T is 10 steps at W = 16); operations that were held up by a
// result still waiting at the output are not timed. Each control mechanism is
// counted and must occur at least once.
module tb_gcd_top;
  import gcd_pkg::*;

  localparam int unsigned W  = GCD_WIDTH;
  localparam int unsigned NT = 1 + cmp_stages(W);

  logic         clk = 1'b0;
  logic         rst_l = 1'b0;
  logic         in_req = 1'b0, out_ack = 1'b0;
  logic         in_ack, out_req;
  logic [W-1:0] in_a = '0, in_b = '0, out_z;

  gcd_top dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Software model: Euclid by repeated subtraction.
  function automatic void ref_gcd(input int unsigned a, input int unsigned b,
                                  output int unsigned g, output int unsigned n);
    n = 0;
    while (a != b) begin
      if (a > b) a = a - b;
      else       b = b - a;
      n++;
    end
    g = a;
  endfunction

  // Test vectors.
  localparam int NVEC = 48;
  int unsigned va [NVEC], vb [NVEC], vg [NVEC], vn [NVEC];

  // Mechanism counters.
  int unsigned n_mx_new, n_mx_loop, n_dx_loop, n_dx_out, n_sub_fwd, n_sub_rev;
  int unsigned n_in_wait, n_out_stall, n_t0_reset;

  // Per-operation observation.
  int unsigned passes_seen;
  bit [W-1:0]  seen_vals [$];
  bit          prev_pc_last = 1'b0;
  bit          prev_f_req = 1'b0;

  always @(posedge clk) begin
    if (rst_l) begin
      if (dut.u_mx.sel_req && !dut.u_mx.y0 && !dut.u_mx.y1 && dut.mx_sel == 1'b0 &&
          !dut.u_t0.u_ctl1.pc && n_mx_new == 0) n_t0_reset++;
      if (dut.u_mx.u_y0.a && dut.u_mx.u_y0.b && !dut.u_mx.y0) n_mx_new++;
      if (dut.u_mx.u_y1.a && dut.u_mx.u_y1.b && !dut.u_mx.y1) n_mx_loop++;
      if (dut.g_cs[0].u_ctl.ev) n_dx_loop++;
      if (dut.dx_f_req && !prev_f_req) begin
        t_out[n_dx_out] = cycle;
        n_dx_out++;
      end
      prev_f_req <= dut.dx_f_req;
      if (dut.g_cs[0].u_ctl.ev &&  dut.gt_t) n_sub_fwd++;
      if (dut.g_cs[0].u_ctl.ev && !dut.gt_t) n_sub_rev++;
      if (in_req && !in_ack && !dut.mx_sel_req) n_in_wait++;
      if (out_req && !out_ack) n_out_stall++;
      prev_pc_last <= dut.pc_t[NT-1];
      if (dut.pc_t[NT-1] && !prev_pc_last) begin
        passes_seen++;
        seen_vals.push_back(dut.a_t);
        seen_vals.push_back(dut.b_t);
      end
    end
  end

  longint unsigned t_acc [NVEC];
  longint unsigned t_out [NVEC];
  longint unsigned t_rel [NVEC];
  int unsigned     n_released = 0;
  int unsigned     passes_at [NVEC + 1];

  // Producer.
  initial begin : producer
    wait (rst_l);
    for (int i = 0; i < NVEC; i++) begin
      // The two calibration vectors start on an idle engine.
      if (i == 1) wait (n_released == 1);
      @(negedge clk);
      in_a   = W'(va[i]);
      in_b   = W'(vb[i]);
      in_req = 1'b1;
      @(posedge clk iff in_ack);
      t_acc[i] = cycle;
      @(negedge clk);
      in_req = 1'b0;
      in_a   = W'($urandom);   // bundled data may change after the handshake
      in_b   = W'($urandom);
      @(posedge clk iff !in_ack);
    end
  end

  // Consumer.
  initial begin : consumer
    int unsigned delay;
    longint unsigned l0, per, lat;
    bit fib_ok;
    wait (rst_l);
    passes_at[0] = 0;
    for (int i = 0; i < NVEC; i++) begin
      @(posedge clk iff out_req);
      check(out_z == W'(vg[i]),
            $sformatf("vec %0d gcd(%0d,%0d): got %0d, expected %0d", i, va[i], vb[i], out_z, vg[i]));
      passes_at[i+1] = passes_seen;
      check(passes_at[i+1] - passes_at[i] == vn[i] + 1,
            $sformatf("vec %0d: %0d compare passes, expected %0d", i,
                      passes_at[i+1] - passes_at[i], vn[i] + 1));
      lat = t_out[i] - t_acc[i];
      if (i == 0) l0 = lat;
      if (i == 1) begin
        per = (lat - l0) / longint'(vn[1] - vn[0]);
        l0  = l0 - per * vn[0];
        $display("latency model: %0d + %0d * subtractions steps", l0, per);
      end
      // A result still held at the output delays the next operation's
      // first pass, so only operations accepted after the previous result
      // was released are timed.
      if (i >= 1 && t_rel[i-1] <= t_acc[i])
        check(lat == l0 + per * vn[i],
              $sformatf("vec %0d: latency %0d, expected %0d", i, lat, l0 + per * vn[i]));
      if (i == 1) begin
        // Every Fibonacci number from F24 down to F1 = 1 must have passed.
        int unsigned f0, f1, ft;
        f0 = 1; f1 = 1;
        for (int k = 2; k <= 24; k++) begin
          fib_ok = 1'b0;
          foreach (seen_vals[j]) if (seen_vals[j] == W'(f1)) fib_ok = 1'b1;
          check(fib_ok, $sformatf("Fibonacci F%0d = %0d not seen", k, f1));
          ft = f0 + f1; f0 = f1; f1 = ft;
        end
      end
      seen_vals.delete();
      delay = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 12) : 0;
      repeat (delay) @(posedge clk);
      @(negedge clk);
      out_ack = 1'b1;
      @(posedge clk iff !out_req);
      @(negedge clk);
      check(out_z == '0, "output stage did not return to zero");
      out_ack = 1'b0;
      t_rel[i] = cycle;
      n_released++;
    end

    check(n_t0_reset  > 0, "initial T0 token never selected new operands");
    check(n_mx_new    == NVEC, $sformatf("MX took %0d new pairs", n_mx_new));
    check(n_mx_loop   > 0, "MX never took the looped pair");
    check(n_dx_loop   > 0, "DX never entered the subtract loop");
    check(n_dx_out    == NVEC, $sformatf("DX sent %0d results", n_dx_out));
    check(n_sub_fwd   > 0, "no forward subtraction (A-B)");
    check(n_sub_rev   > 0, "no reverse subtraction (B-A)");
    check(n_in_wait   > 0, "no input ever waited for the select token");
    check(n_out_stall > 0, "no output back-pressure");
    $display("mechanisms: t0=%0d mx_new=%0d mx_loop=%0d dx_loop=%0d dx_out=%0d fwd=%0d rev=%0d in_wait=%0d out_stall=%0d",
             n_t0_reset, n_mx_new, n_mx_loop, n_dx_loop, n_dx_out, n_sub_fwd, n_sub_rev,
             n_in_wait, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned g, n;
    va[0] = 43682; vb[0] = 65523;   // 2P, 3P
    va[1] = 46368; vb[1] = 28657;   // F24, F23
    va[2] = 1234;  vb[2] = 1234;    // equal at once
    va[3] = 1;     vb[3] = 37;
    va[4] = 65535; vb[4] = 65535;
    for (int i = 5; i < NVEC; i++) begin
      do begin
        va[i] = $urandom_range(1, 2**W - 1);
        vb[i] = $urandom_range(1, 2**W - 1);
        if (i % 3 == 0) begin   // force a common factor now and then
          g = $urandom_range(2, 300);
          va[i] = (va[i] % ((2**W - 1) / g) + 1) * g;
          vb[i] = (vb[i] % ((2**W - 1) / g) + 1) * g;
        end
        ref_gcd(va[i], vb[i], g, n);
      end while (n > 400);
    end
    for (int i = 0; i < NVEC; i++) ref_gcd(va[i], vb[i], vg[i], vn[i]);
    repeat (3) @(posedge clk);
    rst_l = 1'b1;
  end

endmodule
