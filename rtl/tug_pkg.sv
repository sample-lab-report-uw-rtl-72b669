// tug_pkg: constants, types and the shared light next-state rule of the
// tug-of-war game.
//
// The 7-segment patterns are active-low with segment g in bit 6 and segment a
// in bit 0, as on the DE1-SoC board: a 0 lights a segment. The winner state
// encoding (Game On = 0, P1 Win = 1, P2 Win = 2) follows the game's
// description; the light rule is shared by normalLight and centerLight, which
// differ only in the state they reset to.
package tug_pkg;

  // Active-low 7-segment patterns, {g,f,e,d,c,b,a}.
  localparam logic [6:0] HEX_BLANK = 7'b111_1111;
  localparam logic [6:0] HEX_ONE   = 7'b111_1001;
  localparam logic [6:0] HEX_TWO   = 7'b010_0100;

  // Winner FSM states.
  typedef enum logic [1:0] {
    GAME_ON = 2'd0,
    P1_WIN  = 2'd1,
    P2_WIN  = 2'd2
  } win_state_t;

  // Next state of one playfield light.
  //  - a tug counts only if exactly one player pulls (L xor R);
  //  - a lit light goes dark on any tug (only one light can be lit, so the
  //    neighbour inputs are ignored while lit);
  //  - a dark light turns on when the tug pulls the flag into it from a lit
  //    neighbour: right neighbour lit and a left tug, or left neighbour lit and
  //    a right tug.
  function automatic logic light_next(input logic lit, input logic L,
                                      input logic R, input logic NL,
                                      input logic NR);
    if (lit) return ~(L ^ R);
    else     return (NR & L & ~R) | (NL & R & ~L);
  endfunction

endpackage
