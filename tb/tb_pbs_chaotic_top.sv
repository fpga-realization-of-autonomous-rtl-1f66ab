// tb_pbs_chaotic_top: end-to-end testbench of the chaotic generator at its
// default parameters.
//
// Phase 1: initial point (0.1, 0, 0), h = 0x00199999 (0.1), Start held
//   high for 250 steps. Each result is compared bit for bit with the
//   reference model iterated in the testbench, with one exact RK4 step from
//   the previous output (1e-5) and, for the first 100 steps, with the exact
//   trajectory (1e-4). The first Ready must come 142 cycles after Start,
//   every later one 142 cycles after the one before, and the outputs must
//   not move between Ready pulses. The initial-condition inputs are
//   scrambled after the first step: later steps must ignore them.
// Phase 2: Start is dropped during a step: that step completes, no further
//   result appears, and after Start returns the trajectory continues.
// Phase 3: reset, initial point (0, 0, 0.1): the generator restarts from
//   the new initial condition.
// Each mechanism (initial-condition load, feedback, output hold, pause and
// resume, reset) is counted and must have occurred.
module tb_pbs_chaotic_top;
  import pbs_pkg::*;
  import pbs_ref_pkg::*;

  logic CLK = 1'b0;
  logic RST = 1'b1;
  always #5 CLK = ~CLK;

  int unsigned cyc = 0;
  always @(posedge CLK) cyc <= cyc + 1;

  int checks = 0;
  int failures = 0;

  logic Start, Ready;
  fx_t  X_in, Y_in, Z_in, h, Xn_out, Yn_out, Zn_out;

  pbs_chaotic_top dut (
    .CLK(CLK), .RST(RST), .Start(Start), .X_in(X_in), .Y_in(Y_in), .Z_in(Z_in),
    .h(h), .Xn_out(Xn_out), .Yn_out(Yn_out), .Zn_out(Zn_out), .Ready(Ready));

  int n_init = 0, n_feedback = 0, n_hold = 0, n_pause = 0, n_reset = 0;

  initial begin
    repeat (200000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Waits for the next Ready, checking that the outputs hold meanwhile,
  // and returns the cycle count since t0.
  task automatic wait_ready(int unsigned t0, output int lat);
    fx_t hx, hy, hz;
    hx = Xn_out; hy = Yn_out; hz = Zn_out;
    @(negedge CLK);
    while (!Ready) begin
      if (Xn_out !== hx || Yn_out !== hy || Zn_out !== hz) begin
        checks++;
        failures++;
        $display("FAIL @%0d: output moved without Ready", cyc);
      end
      n_hold++;
      @(negedge CLK);
    end
    lat = int'(cyc - t0);
  endtask

  task automatic compare(pt_t e, string what);
    check(Xn_out === e.x && Yn_out === e.y && Zn_out === e.z,
          $sformatf("%s: got %h %h %h exp %h %h %h", what, Xn_out, Yn_out, Zn_out,
                    e.x, e.y, e.z));
  endtask

  function automatic pt_t dut_pt();
    return '{x: Xn_out, y: Yn_out, z: Zn_out};
  endfunction

  initial begin
    pt_t  e, prev;
    rpt_t r_traj, r_one;
    int unsigned t0;
    int lat;

    Start = 1'b0;
    h = 32'h0019_9999;
    X_in = to_fx(0.1);
    Y_in = '0;
    Z_in = '0;
    repeat (3) @(negedge CLK);
    RST = 1'b0;
    repeat (2) @(negedge CLK);

    // Phase 1: continuous run from the initial condition.
    e = '{x: X_in, y: Y_in, z: Z_in};
    r_traj = to_rpt(e);
    Start = 1'b1;
    t0 = cyc;
    for (int n = 0; n < 250; n++) begin
      prev = e;
      e = fx_step(prev, h);
      r_one = rk4_real_step(to_rpt(prev), to_real(h));
      r_traj = rk4_real_step(r_traj, to_real(h));
      wait_ready(t0, lat);
      t0 = cyc;
      check(lat == 142, $sformatf("step %0d took %0d cycles", n, lat));
      compare(e, $sformatf("step %0d", n));
      check(absr(to_real(Xn_out) - r_one.x) < 1e-5 && absr(to_real(Yn_out) - r_one.y) < 1e-5 &&
            absr(to_real(Zn_out) - r_one.z) < 1e-5, $sformatf("step %0d: local error", n));
      if (n < 100)
        check(absr(to_real(Xn_out) - r_traj.x) < 1e-4 && absr(to_real(Yn_out) - r_traj.y) < 1e-4 &&
              absr(to_real(Zn_out) - r_traj.z) < 1e-4, $sformatf("step %0d: trajectory", n));
      if (n == 0) begin
        n_init++;
        X_in = $urandom; Y_in = $urandom; Z_in = $urandom;
      end else begin
        n_feedback++;
      end
      e = dut_pt();
    end
    $display("after 250 steps: x=%f y=%f z=%f", to_real(Xn_out), to_real(Yn_out), to_real(Zn_out));

    // Phase 2: pause in the middle of a step, then resume.
    repeat (60) @(negedge CLK);
    Start = 1'b0;
    prev = e;
    e = fx_step(prev, h);
    wait_ready(t0, lat);
    check(lat == 142, "step in progress finishes after Start low");
    compare(e, "step finished during pause");
    t0 = cyc;
    repeat (3 * 142) begin
      @(negedge CLK);
      check(!Ready, "no result while Start low");
    end
    n_pause++;
    Start = 1'b1;
    t0 = cyc;
    for (int n = 0; n < 5; n++) begin
      prev = e;
      e = fx_step(prev, h);
      wait_ready(t0, lat);
      t0 = cyc;
      check(lat == 142, "latency after resume");
      compare(e, "resumed trajectory");
      n_feedback++;
    end

    // Phase 3: reset returns to the (new) initial condition.
    Start = 1'b0;
    RST = 1'b1;
    X_in = '0;
    Y_in = '0;
    Z_in = 32'h0019_9999;
    repeat (2) @(negedge CLK);
    RST = 1'b0;
    check(Xn_out == 0 && Yn_out == 0 && Zn_out == 0 && !Ready, "reset clears outputs");
    n_reset++;
    @(negedge CLK);
    Start = 1'b1;
    t0 = cyc;
    e = '{x: X_in, y: Y_in, z: Z_in};
    for (int n = 0; n < 20; n++) begin
      prev = e;
      e = fx_step(prev, h);
      wait_ready(t0, lat);
      t0 = cyc;
      check(lat == 142, "latency after reset");
      compare(e, $sformatf("after reset, step %0d", n));
      if (n == 0) begin
        n_init++;
        $display("first point from (0, 0, 0.1): %h %h %h", Xn_out, Yn_out, Zn_out);
      end else begin
        n_feedback++;
      end
    end

    $display("initial loads %0d, feedback steps %0d, hold cycles %0d, pauses %0d, resets %0d",
             n_init, n_feedback, n_hold, n_pause, n_reset);
    check(n_init >= 2 && n_feedback > 0 && n_hold > 0 && n_pause > 0 && n_reset > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
