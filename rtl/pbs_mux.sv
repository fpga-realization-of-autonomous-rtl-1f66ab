// pbs_mux: initial-condition multiplexer and step launcher.
//
// The generator iterates x(n+1) = RK4(x(n)). For the first step the
// multiplexer passes the user's initial condition (X_in, Y_in, Z_in); for
// every later step it passes the generator's own last output, fed back.
// Its select line is set by the first 'ready' after reset and stays set
// until the next reset, so a generator that is paused (Start low) and
// restarted continues its trajectory; only a reset goes back to the
// initial condition.
//
// While 'run' (the Start/enable input) is high, the multiplexer loads the
// selected point into its state register and pulses 'go' to start a step:
// on the first edge that sees 'run' while idle, and afterwards on each
// edge that sees 'ready' (the end of the step before). 'state' holds for
// the whole step. A step in progress always finishes; Start low only
// prevents the next one.
//
// Timing: the load happens on the edge that samples 'run' (or 'ready');
// 'go' is high for the cycle after it. The registered output and the
// launch handshake are this design's choices.
module pbs_mux
  import pbs_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  run,        // Start / enable
  input  vec3_t init,       // initial condition
  input  vec3_t feedback,   // last output of the generator
  input  logic  ready,      // the generator finished a step
  output vec3_t state,      // point the next step starts from
  output logic  go          // one-cycle pulse: a step begins
);

  logic busy;
  logic sel;                // 0: initial condition, 1: feedback
  logic load;

  assign load = run && (busy ? ready : 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= '0;
      go    <= 1'b0;
      busy  <= 1'b0;
      sel   <= 1'b0;
    end else begin
      go <= load;
      if (ready) sel <= 1'b1;
      if (load) begin
        state <= (sel || ready) ? feedback : init;
        busy  <= 1'b1;
      end else if (ready) begin
        busy  <= 1'b0;
      end
    end
  end

endmodule
