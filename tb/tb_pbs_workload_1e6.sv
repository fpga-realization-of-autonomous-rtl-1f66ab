// tb_pbs_workload_1e6: long run of the chaotic generator, 10^6 results.
//
// The generator runs with Start held high from the initial point
// (0.1, 0, 0) with h = 0x00199999 (0.1), the configuration used to produce
// a data set of 10^6 points. Every result is compared bit for bit with the
// reference model, and every Ready must come exactly 142 cycles after the
// one before (the whole run takes 142 x 10^6 cycles, 0.39 s at 359.71 MHz).
//
// With a = 1, b = 1.1, c = 0.4 the system's trajectory from this point is
// not bounded: the exact solution leaves the attractor region near t = 27
// (about 274 steps) and grows without limit, so the Q8.24 words overflow
// and wrap from then on. The testbench reports the first step at which the
// fixed-point result departs from an exact RK4 step by more than 1e-3 and
// checks that this happens no earlier than step 250; after that it still
// checks that hardware and model agree bit for bit.
module tb_pbs_workload_1e6;
  import pbs_pkg::*;
  import pbs_ref_pkg::*;

  localparam int N_STEPS = 1000000;

  logic CLK = 1'b0;
  logic RST = 1'b1;
  always #5 CLK = ~CLK;

  longint unsigned cyc = 0;
  always @(posedge CLK) cyc <= cyc + 1;

  int checks = 0;
  int failures = 0;

  logic Start, Ready;
  fx_t  X_in, Y_in, Z_in, h, Xn_out, Yn_out, Zn_out;

  pbs_chaotic_top dut (
    .CLK(CLK), .RST(RST), .Start(Start), .X_in(X_in), .Y_in(Y_in), .Z_in(Z_in),
    .h(h), .Xn_out(Xn_out), .Yn_out(Yn_out), .Zn_out(Zn_out), .Ready(Ready));

  initial begin
    repeat (143 * N_STEPS + 1000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    pt_t  e;
    rpt_t r;
    longint unsigned t0;
    int   bad_lat, bad_val, first_escape;
    bad_lat = 0;
    bad_val = 0;
    first_escape = -1;
    Start = 1'b0;
    h = 32'h0019_9999;
    X_in = to_fx(0.1);
    Y_in = '0;
    Z_in = '0;
    repeat (3) @(negedge CLK);
    RST = 1'b0;
    @(negedge CLK);
    e = '{x: X_in, y: Y_in, z: Z_in};
    Start = 1'b1;
    t0 = cyc;
    for (int n = 0; n < N_STEPS; n++) begin
      if (first_escape < 0) r = rk4_real_step(to_rpt(e), to_real(h));
      e = fx_step(e, h);
      @(negedge CLK iff Ready);
      if (cyc - t0 != 142) bad_lat++;
      t0 = cyc;
      if (Xn_out !== e.x || Yn_out !== e.y || Zn_out !== e.z) begin
        if (bad_val < 5)
          $display("step %0d: got %h %h %h exp %h %h %h", n, Xn_out, Yn_out, Zn_out,
                   e.x, e.y, e.z);
        bad_val++;
      end
      if (first_escape < 0 &&
          (absr(to_real(e.x) - r.x) > 1e-3 || absr(to_real(e.y) - r.y) > 1e-3 ||
           absr(to_real(e.z) - r.z) > 1e-3))
        first_escape = n;
      if (n % 100000 == 0) $display("step %0d", n);
    end
    checks++;
    if (bad_lat != 0) begin failures++; $display("%0d steps not 142 cycles", bad_lat); end
    checks++;
    if (bad_val != 0) begin failures++; $display("%0d results differ from the model", bad_val); end
    checks++;
    if (first_escape >= 0 && first_escape < 250) begin
      failures++;
    end
    $display("%0d results in %0d cycles; first departure from exact RK4 at step %0d (t = %0.1f)",
             N_STEPS, cyc, first_escape, 0.1 * real'(first_escape));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
