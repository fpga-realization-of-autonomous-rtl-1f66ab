// tb_pbs_fx_mac: self-checking testbench for the multiply-accumulate unit.
//
// Issues 2000 operations with random operands (including the extreme
// codes), random add/subtract and random gaps between operations. Each
// result must equal addend +/- floor(a*b / 2^24) modulo 2^32, computed here
// with 64-bit arithmetic, and 'done' must come 4 cycles after the issue
// cycle (5 cycles per back-to-back operation) as a single pulse.
module tb_pbs_fx_mac;
  import pbs_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0;
  int failures = 0;

  logic start, sub, done;
  fx_t  addend, a, b, result;

  pbs_fx_mac dut (.clk(clk), .rst(rst), .start(start), .addend(addend), .op_a(a),
                  .op_b(b), .sub(sub), .result(result), .done(done));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fx_t pick();
    unique case ($urandom_range(0, 5))
      0: return 32'sh7fff_ffff;
      1: return 32'sh8000_0000;
      2: return fx_t'($urandom_range(0, 32'h0400_0000)) - 32'sh0200_0000;
      default: return fx_t'($urandom);
    endcase
  endfunction

  initial begin
    logic signed [63:0] p;
    fx_t expect_r;
    int unsigned t0;
    start = 1'b0;
    sub = 1'b0;
    addend = '0;
    a = '0;
    b = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      addend = pick();
      a = pick();
      b = pick();
      sub = 1'($urandom_range(0, 1));
      p = 64'(a) * 64'(b);
      expect_r = sub ? addend - fx_t'(p >>> 24) : addend + fx_t'(p >>> 24);
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      addend = $urandom;   // operands may change after the issue edge
      a = $urandom;
      b = $urandom;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - t0 != 5) begin
        failures++;
        $display("op %0d: done after %0d cycles", t, cyc - t0);
      end
      checks++;
      if (result !== expect_r) begin
        failures++;
        $display("op %0d: got %h expected %h", t, result, expect_r);
      end
      if ($urandom_range(0, 1)) begin
        @(negedge clk);
        checks++;
        if (done || result !== expect_r) begin
          failures++;
          $display("op %0d: done not a single pulse or result not held", t);
        end
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
