// tb_pbs_k_stage: self-checking testbench for the four slope stages.
//
// Instantiates K1..K4 side by side with independent inputs. For each of
// 200 random trials (points and slopes drawn in a range typical of the
// attractor, h drawn around 0.1) every stage is started once; the slope
// triple it returns is compared bit for bit with the reference model, and
// the number of cycles from the start edge to 'done' is checked (20 for
// K1, 35 for the others). 'k' must also hold after 'done'.
module tb_pbs_k_stage;
  import pbs_pkg::*;
  import pbs_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0;
  int failures = 0;

  logic  start [4];
  vec3_t st, kp;
  fx_t   h;
  vec3_t k [4];
  logic  done [4];

  for (genvar s = 0; s < 4; s++) begin : g_stage
    pbs_k_stage #(.STAGE(s + 1)) dut (
      .clk(clk), .rst(rst), .start(start[s]), .state(st), .h(h),
      .k_prev(kp), .k(k[s]), .done(done[s]));
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic run_stage(int s);
    pt_t p_st, p_kp, exp_k;
    int unsigned t0;
    int lat;
    p_st = '{x: st.x, y: st.y, z: st.z};
    p_kp = '{x: kp.x, y: kp.y, z: kp.z};
    exp_k = fx_kstage(s + 1, p_st, h, p_kp);
    @(negedge clk);
    start[s] = 1'b1;
    t0 = cyc;
    @(negedge clk);
    start[s] = 1'b0;
    while (!done[s]) @(negedge clk);
    lat = int'(cyc - t0);
    checks++;
    if (lat != ((s == 0) ? 20 : 35)) begin
      failures++;
      $display("K%0d latency %0d", s + 1, lat);
    end
    checks++;
    if (k[s].x !== exp_k.x || k[s].y !== exp_k.y || k[s].z !== exp_k.z) begin
      failures++;
      $display("K%0d got %h %h %h exp %h %h %h", s + 1, k[s].x, k[s].y, k[s].z,
               exp_k.x, exp_k.y, exp_k.z);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (done[s] || k[s].z !== exp_k.z || k[s].x !== exp_k.x) begin
      failures++;
      $display("K%0d output not held after done", s + 1);
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) start[s] = 1'b0;
    st = '0;
    kp = '0;
    h  = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      st.x = rnd(-2.5, 1.5);
      st.y = rnd(-2.0, 2.0);
      st.z = rnd(-3.0, 3.0);
      kp.x = rnd(-3.0, 3.0);
      kp.y = rnd(-3.0, 3.0);
      kp.z = rnd(-6.0, 6.0);
      h    = rnd(0.001, 0.2);
      for (int s = 0; s < 4; s++) run_stage(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
