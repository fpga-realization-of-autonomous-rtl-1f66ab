// tb_pbs_rk4_core: self-checking testbench for the RK4 generator unit.
//
// Starts 100 single steps from random points with random h and compares
// the result with the bit-exact reference model, and with a
// double-precision RK4 step (within 1e-5). 'ready' must rise 141 cycles
// after the edge that samples 'go' and last one cycle; between steps the
// outputs must hold.
module tb_pbs_rk4_core;
  import pbs_pkg::*;
  import pbs_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0;
  int failures = 0;

  logic  go, ready;
  vec3_t st, out;
  fx_t   h;

  pbs_rk4_core dut (.clk(clk), .rst(rst), .go(go), .state(st), .h(h), .out(out), .ready(ready));

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

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    pt_t  p, e;
    rpt_t r;
    int unsigned t0;
    vec3_t last;
    go = 1'b0;
    st = '0;
    h = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 100; t++) begin
      st = '{x: rnd(-2.5, 1.5), y: rnd(-2.0, 2.0), z: rnd(-3.0, 3.0)};
      h  = rnd(0.01, 0.2);
      p  = '{x: st.x, y: st.y, z: st.z};
      e  = fx_step(p, h);
      r  = rk4_real_step(to_rpt(p), to_real(h));
      last = out;
      @(negedge clk);
      go = 1'b1;
      t0 = cyc;
      @(negedge clk);
      go = 1'b0;
      while (!ready) begin
        @(negedge clk);
        if (!ready && out !== last) begin
          checks++;
          failures++;
          $display("output changed before ready");
        end
      end
      checks++;
      if (cyc - t0 != 141) begin
        failures++;
        $display("latency %0d", cyc - t0);
      end
      checks++;
      if (out.x !== e.x || out.y !== e.y || out.z !== e.z) begin
        failures++;
        $display("got %h %h %h exp %h %h %h", out.x, out.y, out.z, e.x, e.y, e.z);
      end
      checks++;
      if (absr(to_real(out.x) - r.x) > 1e-5 || absr(to_real(out.y) - r.y) > 1e-5 ||
          absr(to_real(out.z) - r.z) > 1e-5) begin
        failures++;
        $display("far from exact RK4: %f %f %f vs %f %f %f", to_real(out.x),
                 to_real(out.y), to_real(out.z), r.x, r.y, r.z);
      end
      @(negedge clk);
      checks++;
      if (ready) begin
        failures++;
        $display("ready longer than one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
