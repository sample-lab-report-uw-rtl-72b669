// singlePress_tb: self-checking test of the key-press pulse generator.
//
// Presses of 1, 2, 3, 4 and 20 cycles are applied, then a long run of random
// key values, then a reset while the key is held. A reference model built
// from the sampled key history predicts `out` after every clock edge: out is
// high when the key was pressed two edges ago and released three edges ago
// (two synchronizer flops plus the one-bit FSM). For the scripted presses it
// also checks that exactly one pulse appears, two cycles after the key goes
// low. A watchdog ends the run if it hangs.
module singlePress_tb;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic reset, key, out;
  int   checks = 0, failures = 0;
  logic [2:0] h;   // h[0]: key at the last edge, h[1]: one edge before, h[2]: two before

  singlePress dut (.clk, .reset, .key, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("%t FAIL %s: out=%b expected %b", $time, what, out, exp);
    end
  endtask

  // One clock edge with the given key value, then compare with the model.
  task automatic step(input logic k);
    key = k;
    @(posedge clk);
    h = {h[1:0], k};
    #1 check(~h[1] & h[2], "model");
  endtask

  // Scripted press of `len` cycles followed by a release of 8 cycles.
  task automatic press(input int len);
    int pulses, first;
    pulses = 0;
    first  = -1;
    for (int c = 0; c < len + 8; c++) begin
      step(c < len ? 1'b0 : 1'b1);
      if (out) begin
        pulses++;
        if (first < 0) first = c;
      end
    end
    checks++;
    if (pulses != 1 || first != 1) begin
      failures++;
      $display("FAIL press of %0d cycles: %0d pulses, first after %0d edges", len, pulses, first + 1);
    end
  endtask

  initial begin
    reset = 1'b1; key = 1'b1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    h = 3'b111;
    check(1'b0, "after reset");
    press(1); press(2); press(3); press(4); press(20);
    for (int i = 0; i < 2000; i++) step(1'($urandom_range(1)));
    // Reset while the key is held: the chain restarts as "released", so the
    // held key is seen as a fresh press and gives one pulse (the model agrees).
    key = 1'b0;
    repeat (4) @(posedge clk);
    #1 reset = 1'b1;
    @(posedge clk);
    #1 reset = 1'b0;
    h = 3'b111;
    check(1'b0, "during reset");
    for (int i = 0; i < 10; i++) step(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
