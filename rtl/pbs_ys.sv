// pbs_ys: RK4 update block (Ys).
//
// Forms the next point of the trajectory from the current one and the four
// slope triples:
//     x(n+1) = x(n) + (h/6) * (k1 + 2*k2 + 2*k3 + k4)
// and likewise for y with lambda_1..4 and z with xi_1..4.
// The weighted sums are plain adders and shifts (Q8.24, wrap-around); the
// three multiply-adds by h/6 run one after another on one
// multiply-accumulate unit, 5 cycles each, 15 cycles in all.
//
// h/6 itself is h * (1/6), computed once per step by the same unit. It is
// started by 'prep' at the beginning of the step, while the slope stages
// are still busy, so it adds no cycles to the step. 'start' (the K4 stage's
// 'done') begins the update; 'state', 'h' and 'k1'..'k4' must hold until
// 'done'. 'done' is a one-cycle pulse and 'next' is valid in that cycle
// (it is read by the filter stage on that edge). The overlap of the h/6
// product with K1 is this design's choice.
module pbs_ys
  import pbs_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  prep,    // step begins: compute h/6
  input  logic  start,   // slopes ready: compute the next point
  input  vec3_t state,
  input  fx_t   h,
  input  vec3_t k1,
  input  vec3_t k2,
  input  vec3_t k3,
  input  vec3_t k4,
  output vec3_t next,
  output logic  done
);

  typedef enum logic [2:0] {IDLE, H6, WAIT_K, UPD_X, UPD_Y, UPD_Z} ys_state_e;

  ys_state_e st;
  fx_t       h6_q, xn_q, yn_q;
  vec3_t     sum;

  logic mac_start, mac_done;
  fx_t  mac_add, mac_a, mac_b, mac_res;

  assign sum.x = k1.x + (k2.x <<< 1) + (k3.x <<< 1) + k4.x;
  assign sum.y = k1.y + (k2.y <<< 1) + (k3.y <<< 1) + k4.y;
  assign sum.z = k1.z + (k2.z <<< 1) + (k3.z <<< 1) + k4.z;

  // Operand selection for the operation being issued this cycle.
  always_comb begin
    mac_start = 1'b0;
    mac_add   = '0;
    mac_a     = '0;
    mac_b     = '0;
    unique case (st)
      IDLE: if (prep) begin
        mac_start = 1'b1; mac_a = h; mac_b = ONE_SIXTH;
      end
      WAIT_K: if (start) begin
        mac_start = 1'b1; mac_add = state.x; mac_a = h6_q; mac_b = sum.x;
      end
      UPD_X: if (mac_done) begin
        mac_start = 1'b1; mac_add = state.y; mac_a = h6_q; mac_b = sum.y;
      end
      UPD_Y: if (mac_done) begin
        mac_start = 1'b1; mac_add = state.z; mac_a = h6_q; mac_b = sum.z;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      h6_q <= '0;
      xn_q <= '0;
      yn_q <= '0;
    end else begin
      unique case (st)
        IDLE:   if (prep) st <= H6;
        H6:     if (mac_done) begin h6_q <= mac_res; st <= WAIT_K; end
        WAIT_K: if (start) st <= UPD_X;
        UPD_X:  if (mac_done) begin xn_q <= mac_res; st <= UPD_Y; end
        UPD_Y:  if (mac_done) begin yn_q <= mac_res; st <= UPD_Z; end
        UPD_Z:  if (mac_done) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  assign done = (st == UPD_Z) && mac_done;
  assign next = '{x: xn_q, y: yn_q, z: mac_res};

  pbs_fx_mac u_mac (
    .clk    (clk),
    .rst    (rst),
    .start  (mac_start),
    .addend (mac_add),
    .op_a   (mac_a),
    .op_b   (mac_b),
    .sub    (1'b0),
    .result (mac_res),
    .done   (mac_done)
  );

  // The slopes must not be announced before h/6 is known.
  a_start_after_h6: assert property (@(posedge clk) disable iff (rst)
                                     start |-> st == WAIT_K);

endmodule
