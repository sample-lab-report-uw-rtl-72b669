// winner: decides and displays which player won, and holds the result.
//
// A three-state Moore FSM. In GAME_ON, a lit far-right light (FR) with a
// right-only tug (R and not L) pulls the flag off the right end: Player 1, the
// right player, wins. A lit far-left light (FL) with a left-only tug wins for
// Player 2. P1_WIN and P2_WIN are absorbing: every input keeps the state
// until reset, so the result freezes. The output is a function of the state
// only: blank while playing, "1" or "2" on an active-low 7-segment display.
//
// Interface: clk, reset (active-high, synchronous), FL and FR (end lights),
// L and R (one-cycle press pulses), hex (active-low segments {g..a}).
// Timing: the state, and so hex, changes on the clock edge after the winning
// pulse, the same edge on which the end light goes dark.
//
// States, their encoding, the win conditions and the sticky win states are
// the game's design.
module winner (
  input  logic       clk,
  input  logic       reset,
  input  logic       FL,
  input  logic       FR,
  input  logic       L,
  input  logic       R,
  output logic [6:0] hex
);
  import tug_pkg::*;

  win_state_t ps, ns;

  always_comb begin
    ns = ps;
    unique case (ps)
      GAME_ON: begin
        if (FR & R & ~L)      ns = P1_WIN;
        else if (FL & L & ~R) ns = P2_WIN;
      end
      P1_WIN:  ns = P1_WIN;
      P2_WIN:  ns = P2_WIN;
      default: ns = GAME_ON;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) ps <= GAME_ON;
    else       ps <= ns;
  end

  always_comb begin
    unique case (ps)
      P1_WIN:  hex = HEX_ONE;
      P2_WIN:  hex = HEX_TWO;
      default: hex = HEX_BLANK;
    endcase
  end

endmodule
