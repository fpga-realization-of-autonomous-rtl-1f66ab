// pbs_chaotic_top: RK4-based Pandey-Baghel-Singh chaotic signal generator.
//
// Produces the trajectory of the autonomous chaotic system
//     dx/dt = y,  dy/dt = z,  dz/dt = -x - 1.1*y - 0.4*z - x^2
// by repeated fourth-order Runge-Kutta steps in Q8.24 fixed point. The
// initial point (X_in, Y_in, Z_in) and the step size h are inputs. While
// Start is high the generator computes one step every 142 clock cycles,
// feeding each result back as the start of the next, and presents it on
// Xn_out, Yn_out, Zn_out with a one-cycle Ready pulse.
//
// Structure: pbs_mux (initial condition or fed-back point) and
// pbs_rk4_core (slope stages K1..K4, update block Ys, output filter).
//
// Timing: the first result's Ready rises on the 142nd rising edge of CLK
// counted from the one that first samples Start high (RST low), and each
// further result 142 edges after the one before. X_in, Y_in, Z_in are read
// once, on the first edge; h must hold while Start is high. RST is
// synchronous and active high; it returns the generator to the initial
// condition. The port names, the 142-cycle step and the mux/feedback
// structure follow the published generator; the internal schedule and the
// fixed-point rounding (products truncated toward minus infinity) are this
// design's own.
module pbs_chaotic_top
  import pbs_pkg::*;
#(
  parameter fx_t A = COEF_A,  // system constant a (Q8.24), 1.0
  parameter fx_t B = COEF_B,  // system constant b (Q8.24), 1.1
  parameter fx_t C = COEF_C   // system constant c (Q8.24), 0.4
) (
  input  logic CLK,
  input  logic RST,
  input  logic Start,
  input  fx_t  X_in,
  input  fx_t  Y_in,
  input  fx_t  Z_in,
  input  fx_t  h,
  output fx_t  Xn_out,
  output fx_t  Yn_out,
  output fx_t  Zn_out,
  output logic Ready
);

  vec3_t init, state, out;
  logic  go;

  assign init = '{x: X_in, y: Y_in, z: Z_in};

  pbs_mux u_mux (
    .clk(CLK), .rst(RST), .run(Start), .init(init), .feedback(out),
    .ready(Ready), .state(state), .go(go));

  pbs_rk4_core #(.A(A), .B(B), .C(C)) u_core (
    .clk(CLK), .rst(RST), .go(go), .state(state), .h(h), .out(out),
    .ready(Ready));

  assign Xn_out = out.x;
  assign Yn_out = out.y;
  assign Zn_out = out.z;

endmodule
