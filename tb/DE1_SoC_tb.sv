// DE1_SoC_tb: end-to-end test of the whole tug-of-war game at its only size.
//
// The board top is driven through its pins: SW[9] resets, KEY[3] is the left
// player and KEY[0] the right player (active-low). A reference model keeps the
// flag position (LEDR index 7..3, or none once a player has won) and the
// winner. Every press is checked for its timing: the LEDs and HEX5 must not
// have moved two edges after the key goes low and must show the model's new
// state on the third edge. The LEDs and HEX5 are compared with the model again
// after the key is released, so a held key must not tug twice.
//
// The run replays the sequence of the game's demonstration (right twice to
// LEDR3, then left across to a Player 2 win; reset; left twice to LEDR7, then
// right to a Player 1 win with simultaneous presses mixed in), then plays
// random games. It counts how often each mechanism happened: a left move, a
// right move, a simultaneous press that moves nothing, a long hold, each
// player's win, a press ignored after a win, and a reset in mid-game. A
// mechanism that never happened counts as a failure. A watchdog ends the run
// if it hangs.
module DE1_SoC_tb;
  timeunit 1ns; timeprecision 1ps;

  localparam logic [6:0] BLANK = 7'b1111111, ONE = 7'b1111001, TWO = 7'b0100100;

  logic       CLOCK_50 = 1'b0;
  logic [9:0] SW;
  logic [3:0] KEY;
  logic [9:0] LEDR;
  logic [6:0] HEX0, HEX1, HEX2, HEX3, HEX4, HEX5;

  int pos;       // LEDR index of the flag, 0 when it has left the field
  int won;       // 0 playing, 1 or 2 the winning player
  int checks = 0, failures = 0;
  int n_left = 0, n_right = 0, n_both = 0, n_hold = 0;
  int n_p1 = 0, n_p2 = 0, n_frozen = 0, n_midreset = 0;

  DE1_SoC dut (.CLOCK_50, .SW, .KEY, .LEDR, .HEX0, .HEX1, .HEX2, .HEX3, .HEX4, .HEX5);

  always #10 CLOCK_50 = ~CLOCK_50;

  initial begin
    repeat (200000) @(posedge CLOCK_50);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    logic [9:0] exp_led;
    logic [6:0] exp_hex;
    exp_led = (pos == 0) ? 10'b0 : 10'b1 << pos;
    exp_hex = (won == 1) ? ONE : (won == 2) ? TWO : BLANK;
    checks++;
    if (LEDR !== exp_led || HEX5 !== exp_hex ||
        {HEX0, HEX1, HEX2, HEX3, HEX4} !== {5{BLANK}}) begin
      failures++;
      $display("%t FAIL %s: LEDR=%b HEX5=%b expected %b %b",
               $time, what, LEDR, HEX5, exp_led, exp_hex);
    end
  endtask

  task automatic do_reset();
    SW[9] = 1'b1;
    repeat (2) @(posedge CLOCK_50);
    #1 SW[9] = 1'b0;
    pos = 5; won = 0;
    check("after reset");
  endtask

  // Press the left and/or right key for `hold` cycles, then release.
  task automatic press(input bit left, input bit right, input int hold);
    int old_pos = pos;
    if (hold > 3) n_hold++;
    KEY[3] = ~left;
    KEY[0] = ~right;
    repeat (2) @(posedge CLOCK_50);
    #1 check("two edges after press (no change yet)");
    @(posedge CLOCK_50);
    if (left ^ right) begin
      if (won != 0 || pos == 0) n_frozen++;
      else if (left) begin
        n_left++;
        if (pos == 7) begin pos = 0; won = 2; n_p2++; end
        else pos++;
      end else begin
        n_right++;
        if (pos == 3) begin pos = 0; won = 1; n_p1++; end
        else pos--;
      end
    end else if (left && right) n_both++;
    #1 check($sformatf("tug L=%0d R=%0d from %0d", left, right, old_pos));
    repeat (hold > 3 ? hold - 3 : 0) @(posedge CLOCK_50);
    #1 KEY = 4'b1111;
    repeat (4) @(posedge CLOCK_50);
    #1 check("after release");
  endtask

  initial begin
    SW = '0;
    KEY = 4'b1111;
    repeat (2) @(posedge CLOCK_50);
    #1;
    do_reset();
    // demonstration sequence, first game: right by two, then left to a Player 2 win
    press(0, 1, 1); press(0, 1, 1);
    repeat (5) press(1, 0, 2);
    press(1, 0, 1); press(0, 1, 1);        // ignored after the win
    // second game: left by two, then right to a Player 1 win with simultaneous presses
    do_reset();
    press(1, 0, 1); press(1, 0, 1);
    press(0, 1, 1); press(1, 1, 2); press(0, 1, 3); press(1, 1, 1);
    press(0, 1, 10); press(0, 1, 1); press(0, 1, 1);
    press(1, 0, 1);                        // ignored after the win
    // random games
    for (int g = 0; g < 40; g++) begin
      do_reset();
      for (int p = 0; p < 60; p++) begin
        int kind;
        kind = $urandom_range(9);
        if (kind == 0 && won == 0 && p > 0) begin
          n_midreset++;
          do_reset();
        end else begin
          press(kind < 5, kind >= 4 && kind != 9, $urandom_range(1, 6));
        end
        if (won != 0 && $urandom_range(3) == 0) break;
      end
    end
    $display("moves left=%0d right=%0d both=%0d held=%0d p1_wins=%0d p2_wins=%0d ignored_after_win=%0d mid_game_resets=%0d",
             n_left, n_right, n_both, n_hold, n_p1, n_p2, n_frozen, n_midreset);
    checks++; if (n_left     == 0) begin failures++; $display("FAIL no left move");        end
    checks++; if (n_right    == 0) begin failures++; $display("FAIL no right move");       end
    checks++; if (n_both     == 0) begin failures++; $display("FAIL no simultaneous press"); end
    checks++; if (n_hold     == 0) begin failures++; $display("FAIL no long hold");        end
    checks++; if (n_p1       == 0) begin failures++; $display("FAIL no Player 1 win");     end
    checks++; if (n_p2       == 0) begin failures++; $display("FAIL no Player 2 win");     end
    checks++; if (n_frozen   == 0) begin failures++; $display("FAIL no press after a win"); end
    checks++; if (n_midreset == 0) begin failures++; $display("FAIL no mid-game reset");   end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
