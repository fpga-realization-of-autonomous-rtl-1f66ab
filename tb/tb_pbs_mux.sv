// tb_pbs_mux: self-checking testbench for the initial-condition
// multiplexer.
//
// A small model of the generator answers each 'go' with 'ready' after a
// random delay. Checked: the first step after reset starts from the
// initial condition, all later ones from the fed-back value; 'go' is a
// single pulse one cycle after the launching edge; no step is launched
// while Start is low, and a restart continues from the feedback; a reset
// returns to the initial condition; 'state' holds during a step.
module tb_pbs_mux;
  import pbs_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic  run, ready, go;
  vec3_t init, fb, st;

  pbs_mux dut (.clk(clk), .rst(rst), .run(run), .init(init), .feedback(fb),
               .ready(ready), .state(st), .go(go));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (state %h go %b)", what, st, go);
    end
  endtask

  // Waits for 'go', checks the launched point, holds for a random time,
  // then answers with 'ready' and a new feedback value.
  task automatic one_step(vec3_t expect_state, vec3_t next_fb, bit stop = 1'b0);
    int n;
    n = 0;
    while (!go && n < 10) begin @(negedge clk); n++; end
    check(go, "go pulse");
    check(st == expect_state, "launched point");
    @(negedge clk);
    check(!go, "go lasts one cycle");
    repeat ($urandom_range(1, 6)) begin
      @(negedge clk);
      check(st == expect_state, "state held during step");
      check(!go, "no launch during step");
    end
    fb = next_fb;
    ready = 1'b1;
    if (stop) run = 1'b0;
    @(negedge clk);
    ready = 1'b0;
  endtask

  initial begin
    vec3_t v [8];
    run = 1'b0;
    ready = 1'b0;
    for (int i = 0; i < 8; i++) v[i] = '{x: $urandom, y: $urandom, z: $urandom};
    init = v[0];
    fb = v[7];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    check(!go, "no launch while Start low");
    // Start high: first step from the initial condition.
    run = 1'b1;
    @(negedge clk);
    one_step(v[0], v[1]);
    // Continuous operation: the feedback is loaded on the ready edge.
    one_step(v[1], v[2]);
    // Drop Start during a step: it ends and nothing new launches.
    one_step(v[2], v[3], 1'b1);
    check(!go, "no launch after Start low");
    init = v[5];
    repeat (5) begin @(negedge clk); check(!go, "paused"); end
    // Restart: continues from the feedback, not the initial condition.
    run = 1'b1;
    @(negedge clk);
    one_step(v[3], v[4]);
    // Reset: back to the initial condition.
    run = 1'b0;
    rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run = 1'b1;
    @(negedge clk);
    one_step(v[5], v[6]);
    one_step(v[6], v[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
