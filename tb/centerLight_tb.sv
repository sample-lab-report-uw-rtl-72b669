// centerLight_tb: self-checking test of the centre playfield light.
//
// Checks that the light resets lit, then applies all sixteen combinations of
// L, R, NL and NR from the dark state and from the lit state, one edge each,
// and finally a long random sequence with occasional resets. The expected
// next state comes from the game's rules written as a truth table: a lit
// light stays lit only when L equals R; a dark light lights only for a lone
// left tug with the right neighbour lit or a lone right tug with the left
// neighbour lit. A watchdog ends the run if it hangs.
module centerLight_tb;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 1'b0;
  logic reset, L, R, NL, NR, lightOn;
  logic model;
  int   checks = 0, failures = 0;

  centerLight dut (.clk, .reset, .L, .R, .NL, .NR, .lightOn);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expect_next(logic lit, logic [3:0] in);  // in = {L,R,NL,NR}
    case ({lit, in})
      5'b1_0000, 5'b1_0001, 5'b1_0010, 5'b1_0011,
      5'b1_1100, 5'b1_1101, 5'b1_1110, 5'b1_1111: return 1'b1;
      5'b0_1001, 5'b0_1011, 5'b0_0110, 5'b0_0111: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  task automatic check(input string what);
    checks++;
    if (lightOn !== model) begin
      failures++;
      $display("%t FAIL %s: lightOn=%b expected %b", $time, what, lightOn, model);
    end
  endtask

  task automatic do_reset();
    {L, R, NL, NR} = '0;
    reset = 1'b1;
    @(posedge clk);
    #1 reset = 1'b0;
    model = 1'b1;
    check("reset state");
  endtask

  task automatic step(input logic [3:0] in);
    {L, R, NL, NR} = in;
    @(posedge clk);
    model = expect_next(model, in);
    #1 check($sformatf("L R NL NR = %b", in));
  endtask

  initial begin
    reset = 1'b0;
    do_reset();
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++) begin
        do_reset();
        if (s == 0) step(4'b1000);      // a lone left tug turns it off
        step(4'(i));
      end
    do_reset();
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(49) == 0) do_reset();
      else step(4'($urandom_range(15)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
