// centerLight: Moore FSM for the centre playfield LED, where the flag starts.
//
// Identical to normalLight except that reset turns it on. Each clock the
// light follows tug_pkg::light_next: a lit light goes out on any tug (exactly
// one of L, R high), and a dark light turns on when a neighbour is lit and the
// tug pulls the flag toward it (NR with L, or NL with R).
//
// Interface: clk, reset (active-high, synchronous), L and R (one-cycle press
// pulses of the left and right players), NL and NR (left and right neighbour
// lights), lightOn (the state). Timing: lightOn changes on the clock edge
// after the pulse.
//
// The transition rules and the lit reset state are the game's design.
module centerLight (
  input  logic clk,
  input  logic reset,
  input  logic L,
  input  logic R,
  input  logic NL,
  input  logic NR,
  output logic lightOn
);
  import tug_pkg::*;

  always_ff @(posedge clk) begin
    if (reset) lightOn <= 1'b1;
    else       lightOn <= light_next(lightOn, L, R, NL, NR);
  end

endmodule
