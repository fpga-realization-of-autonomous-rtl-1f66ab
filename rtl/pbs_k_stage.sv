// pbs_k_stage: one slope stage (K1, K2, K3 or K4) of the RK4 step.
//
// Stage s evaluates the right-hand side of the Pandey-Baghel-Singh system
//     f = y,   g = z,   delta = -a*x - b*y - c*z - x^2
// at a probe point p. For K1 the probe point is the current state; for
// K2 and K3 it is  state + (h/2) * k_prev,  for K4  state + h * k_prev,
// where k_prev is the slope triple of the stage before. The outputs are
//     k.x = k_s = p.y,   k.y = lambda_s = p.z,   k.z = xi_s = delta(p).
//
// The stage owns one multiply-accumulate unit and drives it through a
// fixed sequence of operations (each OP_CYCLES = 5 cycles long):
//     K2..K4 only:  p.x = x + hs*kp.x,  p.y = y + hs*kp.y,  p.z = z + hs*kp.z
//     all stages:   acc = 0 - a*p.x,  acc -= b*p.y,  acc -= c*p.z,  acc -= p.x*p.x
// so K1 takes 20 cycles and K2..K4 take 35. h/2 is an arithmetic right
// shift of h.
//
// Interface: 'start' (one-cycle pulse) begins the stage; 'state', 'h' and
// 'k_prev' must hold until 'done'. 'done' is a one-cycle pulse in the cycle
// after the last result is written, and the stage's 'k' output holds from
// then until the stage is started again, so the next stage can be started
// by 'done' directly. The sequencing and the sharing of one multiplier per
// stage are this design's choices; the equations are the RK4 ones.
module pbs_k_stage
  import pbs_pkg::*;
#(
  parameter int unsigned STAGE = 1,        // 1..4
  parameter fx_t         A     = COEF_A,
  parameter fx_t         B     = COEF_B,
  parameter fx_t         C     = COEF_C
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  vec3_t state,
  input  fx_t   h,
  input  vec3_t k_prev,
  output vec3_t k,
  output logic  done
);

  localparam logic [2:0] FIRST_OP = (STAGE == 1) ? 3'd3 : 3'd0;
  localparam logic [2:0] LAST_OP  = 3'd6;

  logic       busy;
  logic [2:0] op;
  fx_t        px_q, py_q, pz_q;
  fx_t        px, py, pz, hs;

  logic mac_start, mac_done, mac_sub;
  fx_t  mac_add, mac_a, mac_b, mac_res;

  assign hs = (STAGE == 4) ? h : (h >>> 1);

  // Probe point: the state itself for K1, the registered sums otherwise.
  assign px = (STAGE == 1) ? state.x : px_q;
  assign py = (STAGE == 1) ? state.y : py_q;
  assign pz = (STAGE == 1) ? state.z : pz_q;

  // Issue the first operation on 'start', each following one on the
  // 'done' of the one before.
  assign mac_start = (!busy && start) || (busy && mac_done && op != LAST_OP);

  logic [2:0] issue_op;
  assign issue_op = busy ? op + 3'd1 : FIRST_OP;

  always_comb begin
    mac_add = '0;
    mac_a   = '0;
    mac_b   = '0;
    mac_sub = 1'b0;
    unique case (issue_op)
      3'd0: begin mac_add = state.x; mac_a = hs; mac_b = k_prev.x; end
      3'd1: begin mac_add = state.y; mac_a = hs; mac_b = k_prev.y; end
      3'd2: begin mac_add = state.z; mac_a = hs; mac_b = k_prev.z; end
      3'd3: begin mac_add = '0;      mac_a = A;  mac_b = px; mac_sub = 1'b1; end
      3'd4: begin mac_add = mac_res; mac_a = B;  mac_b = py; mac_sub = 1'b1; end
      3'd5: begin mac_add = mac_res; mac_a = C;  mac_b = pz; mac_sub = 1'b1; end
      3'd6: begin mac_add = mac_res; mac_a = px; mac_b = px; mac_sub = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      op   <= FIRST_OP;
      px_q <= '0;
      py_q <= '0;
      pz_q <= '0;
    end else begin
      if (mac_start) begin
        busy <= 1'b1;
        op   <= issue_op;
      end else if (busy && mac_done && op == LAST_OP) begin
        busy <= 1'b0;
      end
      if (busy && mac_done) begin
        unique case (op)
          3'd0: px_q <= mac_res;
          3'd1: py_q <= mac_res;
          3'd2: pz_q <= mac_res;
          default: ;
        endcase
      end
    end
  end

  assign done = busy && mac_done && op == LAST_OP;
  assign k    = '{x: py, y: pz, z: mac_res};

  pbs_fx_mac u_mac (
    .clk    (clk),
    .rst    (rst),
    .start  (mac_start),
    .addend (mac_add),
    .op_a   (mac_a),
    .op_b   (mac_b),
    .sub    (mac_sub),
    .result (mac_res),
    .done   (mac_done)
  );

  // A new start must not arrive while the stage is working.
  a_no_overlap: assert property (@(posedge clk) disable iff (rst) busy |-> !start);

endmodule
