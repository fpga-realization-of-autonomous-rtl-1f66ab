// tb_pbs_filter: self-checking testbench for the output filter stage.
//
// Drives a new random value on the input every cycle and raises 'valid'
// at random. The outputs must be zero after reset, must change only on a
// 'valid' edge (to the value presented then), and 'ready' must be high in
// exactly the cycle after each 'valid'.
module tb_pbs_filter;
  import pbs_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic  valid, ready;
  vec3_t din, dout, model;
  logic  model_ready;
  int    passed = 0;
  int    held = 0;

  pbs_filter dut (.clk(clk), .rst(rst), .valid(valid), .in(din), .out(dout), .ready(ready));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = 1'b0;
    din = '0;
    repeat (3) @(negedge clk);
    din = '{x: 32'h1234_5678, y: 32'h9abc_def0, z: 32'h0f0f_0f0f};
    @(negedge clk);
    checks++;
    if (dout !== '0 || ready !== 1'b0) begin
      failures++;
      $display("outputs not cleared by reset");
    end
    rst = 1'b0;
    model = '0;
    model_ready = 1'b0;
    for (int t = 0; t < 5000; t++) begin
      din = '{x: $urandom, y: $urandom, z: $urandom};
      valid = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      model_ready = valid;
      if (valid) begin
        model = din;
        passed++;
      end else begin
        held++;
      end
      @(negedge clk);
      checks++;
      if (dout !== model || ready !== model_ready) begin
        failures++;
        $display("cycle %0d: out %h ready %b, expected %h %b", t, dout, ready, model, model_ready);
      end
    end
    checks++;
    if (passed == 0 || held == 0) failures++;
    $display("passed %0d, held %0d", passed, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
