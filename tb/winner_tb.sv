// winner_tb: self-checking test of the winner FSM.
//
// From the Game On state every combination of FL, FR, L and R is tried, the
// winning one last (FR with a lone right tug), then all sixteen combinations
// are applied to show the Player 1 result holds. After a reset the same is
// done for Player 2 (FL with a lone left tug). Finally every single input
// combination is tried once from Game On, each followed by a reset, and a
// random sequence runs against a reference model. The 7-segment output
// (active-low {g..a}) is checked after every edge: blank 1111111, "1"
// 1111001, "2" 0100100. The result must appear on the first edge after the
// winning tug. A watchdog ends the run if it hangs.
module winner_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam logic [6:0] BLANK = 7'b1111111, ONE = 7'b1111001, TWO = 7'b0100100;

  logic clk = 1'b0;
  logic reset, FL, FR, L, R;
  logic [6:0] hex;
  int   model;     // 0 playing, 1 Player 1 won, 2 Player 2 won
  int   checks = 0, failures = 0;

  winner dut (.clk, .reset, .FL, .FR, .L, .R, .hex);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    logic [6:0] exp;
    exp = (model == 1) ? ONE : (model == 2) ? TWO : BLANK;
    checks++;
    if (hex !== exp) begin
      failures++;
      $display("%t FAIL %s: hex=%b expected %b", $time, what, hex, exp);
    end
  endtask

  task automatic do_reset();
    {FL, FR, L, R} = '0;
    reset = 1'b1;
    @(posedge clk);
    #1 reset = 1'b0;
    model = 0;
    check("reset");
  endtask

  task automatic step(input logic [3:0] in);   // in = {FL, FR, L, R}
    {FL, FR, L, R} = in;
    @(posedge clk);
    if (model == 0) begin
      if (in[2] && in[0] && !in[1]) model = 1;
      else if (in[3] && in[1] && !in[0]) model = 2;
    end
    #1 check($sformatf("FL FR L R = %b", in));
  endtask

  initial begin
    reset = 1'b0;
    do_reset();
    // Player 1: every combination without FL, the win (FR, lone R) last
    for (int i = 0; i < 8; i++) if (3'(i) != 3'b101) step({1'b0, 3'(i)});
    checks++;
    if (hex !== BLANK) begin failures++; $display("FAIL early win"); end
    step(4'b0101);
    checks++;
    if (hex !== ONE) begin failures++; $display("FAIL no Player 1 win"); end
    for (int i = 0; i < 16; i++) step(4'(i));
    // Player 2: every combination with FL, the win (FL, lone L) last
    do_reset();
    for (int i = 0; i < 8; i++) if (3'(i) != 3'b010 && 3'(i) != 3'b110 && 3'(i) != 3'b101) step({1'b1, 3'(i)});
    step(4'b1010);
    checks++;
    if (hex !== TWO) begin failures++; $display("FAIL no Player 2 win"); end
    for (int i = 0; i < 16; i++) step(4'(i));
    // Each single combination from Game On
    for (int i = 0; i < 16; i++) begin
      do_reset();
      step(4'(i));
    end
    // Random
    do_reset();
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(29) == 0) do_reset();
      else step(4'($urandom_range(15)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
