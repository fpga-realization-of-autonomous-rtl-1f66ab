// pbs_filter: output filter stage.
//
// Lets a point through to the generator outputs only in a cycle where the
// update block reports a finished result; at all other times the outputs
// keep the last valid point, so the partial values that appear inside the
// datapath while a step is being computed never reach the pins. After
// reset the outputs are zero until the first result.
//
// Timing: 'in' is sampled on the edge that sees 'valid'; 'out' changes on
// that edge and 'ready' is high for exactly the following cycle. How the
// hold is built (an enabled register) is this design's choice.
module pbs_filter
  import pbs_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  valid,
  input  vec3_t in,
  output vec3_t out,
  output logic  ready
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out   <= '0;
      ready <= 1'b0;
    end else begin
      ready <= valid;
      if (valid) out <= in;
    end
  end

endmodule
