// pbs_fx_mac: multi-cycle fixed-point multiply-accumulate unit.
//
// Computes  result = addend +/- trunc(op_a * op_b)  on Q8.24 numbers. The
// full 64-bit product is shifted right by 24 bits (rounding toward minus
// infinity) and its low 32 bits are added to or subtracted from the
// addend, with two's-complement wrap-around.
//
// Timing: an operation is issued by a one-cycle 'start' pulse; the operands
// are sampled on that edge. The product passes MUL_STAGES pipeline
// registers (the register layout of an FPGA DSP multiplier), and the sum is
// written MUL_STAGES + 1 edges after the issue edge, together with a
// one-cycle 'done' pulse. 'result' then holds until the next operation
// finishes, so a caller can issue the next operation on the edge that sees
// 'done' and chain 'result' into its operands. With the default depth an
// operation takes 5 cycles. Operations are not overlapped.
//
// This unit is the arithmetic element shared by the slope stages and the
// update block; its depth is this design's choice, set so that one RK4
// step takes 142 cycles.
module pbs_fx_mac
  import pbs_pkg::*;
#(
  parameter int unsigned STAGES = MUL_STAGES
) (
  input  logic clk,
  input  logic rst,      // synchronous, active high
  input  logic start,    // issue one operation
  input  fx_t  addend,
  input  fx_t  op_a,
  input  fx_t  op_b,
  input  logic sub,      // 1: subtract the product, 0: add it
  output fx_t  result,
  output logic done
);

  fx_t  a_q, b_q, add_q;
  logic sub_q;
  // Pipeline registers, packed so that they map to flip-flops.
  logic [STAGES-1:0][2*WIDTH-1:0] prod_q;
  logic [STAGES-1:0][WIDTH-1:0]   add_p;
  logic [STAGES-1:0]              sub_p;
  logic [STAGES:0]                valid_p;

  // Operand registers.
  always_ff @(posedge clk) begin
    if (start) begin
      a_q   <= op_a;
      b_q   <= op_b;
      add_q <= addend;
      sub_q <= sub;
    end
  end

  // Product pipeline.
  always_ff @(posedge clk) begin
    prod_q[0] <= a_q * b_q;
    add_p[0]  <= add_q;
    sub_p[0]  <= sub_q;
    for (int i = 1; i < int'(STAGES); i++) begin
      prod_q[i] <= prod_q[i-1];
      add_p[i]  <= add_p[i-1];
      sub_p[i]  <= sub_p[i-1];
    end
  end

  // Valid chain, reset so that no stale 'done' appears after reset.
  always_ff @(posedge clk) begin
    if (rst) begin
      valid_p <= '0;
    end else begin
      valid_p[0] <= start;
      for (int i = 1; i <= int'(STAGES); i++) valid_p[i] <= valid_p[i-1];
    end
  end

  fx_t prod_fx;
  fx_t add_last;
  assign prod_fx  = fx_t'($signed(prod_q[STAGES-1]) >>> FRAC);
  assign add_last = fx_t'(add_p[STAGES-1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= valid_p[STAGES];
      if (valid_p[STAGES])
        result <= sub_p[STAGES-1] ? add_last - prod_fx : add_last + prod_fx;
    end
  end

endmodule
