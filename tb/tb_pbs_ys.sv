// tb_pbs_ys: self-checking testbench for the RK4 update block.
//
// For 300 random cases: pulse 'prep' (h/6 is computed), wait a random
// number of cycles that is at least the 5 the h/6 product needs, then
// pulse 'start' with random slope triples. The next point must match the
// reference model bit for bit and 'done' must come 15 cycles after the
// start edge, as a single-cycle pulse.
module tb_pbs_ys;
  import pbs_pkg::*;
  import pbs_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0;
  int failures = 0;

  logic  prep, start, done;
  vec3_t st, k1, k2, k3, k4, nxt;
  fx_t   h;

  pbs_ys dut (
    .clk(clk), .rst(rst), .prep(prep), .start(start), .state(st), .h(h),
    .k1(k1), .k2(k2), .k3(k3), .k4(k4), .next(nxt), .done(done));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t rnd(real lo, real hi);
    real u;
    u = real'($urandom_range(0, 1000000)) / 1000000.0;
    return to_fx(lo + (hi - lo) * u);
  endfunction

  function automatic vec3_t rvec();
    vec3_t v;
    v.x = rnd(-3.0, 3.0);
    v.y = rnd(-3.0, 3.0);
    v.z = rnd(-6.0, 6.0);
    return v;
  endfunction

  function automatic pt_t pt(vec3_t v);
    return '{x: v.x, y: v.y, z: v.z};
  endfunction

  initial begin
    pt_t exp_n;
    int unsigned t0;
    prep = 1'b0;
    start = 1'b0;
    st = '0; k1 = '0; k2 = '0; k3 = '0; k4 = '0; h = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 300; t++) begin
      st = rvec();
      h  = rnd(0.001, 0.2);
      k1 = rvec(); k2 = rvec(); k3 = rvec(); k4 = rvec();
      exp_n = fx_update(pt(st), h, pt(k1), pt(k2), pt(k3), pt(k4));
      @(negedge clk);
      prep = 1'b1;
      @(negedge clk);
      prep = 1'b0;
      repeat (5 + $urandom_range(0, 20)) @(negedge clk);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != 15) begin
        failures++;
        $display("latency %0d", cyc - t0);
      end
      checks++;
      if (nxt.x !== exp_n.x || nxt.y !== exp_n.y || nxt.z !== exp_n.z) begin
        failures++;
        $display("got %h %h %h exp %h %h %h", nxt.x, nxt.y, nxt.z,
                 exp_n.x, exp_n.y, exp_n.z);
      end
      @(negedge clk);
      checks++;
      if (done) begin
        failures++;
        $display("done longer than one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
