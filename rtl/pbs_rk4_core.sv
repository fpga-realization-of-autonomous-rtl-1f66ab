// pbs_rk4_core: RK4 generator unit of the Pandey-Baghel-Singh system.
//
// One fourth-order Runge-Kutta step of
//     dx/dt = y,  dy/dt = z,  dz/dt = -a*x - b*y - c*z - x^2
// is computed from the point 'state' with step size 'h'. Four slope
// stages run in a chain (K1 starts on 'go', each later stage on the 'done'
// of the one before, since it needs that stage's slopes); the Ys block
// weights the slopes 1:2:2:1 and adds h/6 of the sum to the state; the
// filter stage puts the result on 'out' and raises 'ready' for one cycle.
//
// Timing: with 'go' high in cycle 0, the stages issue their first
// operations on edge 0: K1 takes edges 0..19, K2 20..54, K3 55..89, K4
// 90..124, Ys 125..139, and the filter samples the result on edge 140, so
// 'ready' is high in cycle 141. h/6 is computed during K1. 'state' and 'h'
// must hold from 'go' until 'ready'.
module pbs_rk4_core
  import pbs_pkg::*;
#(
  parameter fx_t A = COEF_A,
  parameter fx_t B = COEF_B,
  parameter fx_t C = COEF_C
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  go,
  input  vec3_t state,
  input  fx_t   h,
  output vec3_t out,
  output logic  ready
);

  vec3_t k1, k2, k3, k4, next;
  logic  d1, d2, d3, d4, ys_done;

  pbs_k_stage #(.STAGE(1), .A(A), .B(B), .C(C)) u_k1 (
    .clk(clk), .rst(rst), .start(go), .state(state), .h(h),
    .k_prev('0), .k(k1), .done(d1));

  pbs_k_stage #(.STAGE(2), .A(A), .B(B), .C(C)) u_k2 (
    .clk(clk), .rst(rst), .start(d1), .state(state), .h(h),
    .k_prev(k1), .k(k2), .done(d2));

  pbs_k_stage #(.STAGE(3), .A(A), .B(B), .C(C)) u_k3 (
    .clk(clk), .rst(rst), .start(d2), .state(state), .h(h),
    .k_prev(k2), .k(k3), .done(d3));

  pbs_k_stage #(.STAGE(4), .A(A), .B(B), .C(C)) u_k4 (
    .clk(clk), .rst(rst), .start(d3), .state(state), .h(h),
    .k_prev(k3), .k(k4), .done(d4));

  pbs_ys u_ys (
    .clk(clk), .rst(rst), .prep(go), .start(d4), .state(state), .h(h),
    .k1(k1), .k2(k2), .k3(k3), .k4(k4), .next(next), .done(ys_done));

  pbs_filter u_filter (
    .clk(clk), .rst(rst), .valid(ys_done), .in(next), .out(out),
    .ready(ready));

endmodule
