// DE1_SoC: top level of a two-player tug-of-war game on a DE1-SoC board.
//
// Five LEDs, LEDR7 (far left) to LEDR3 (far right), form the rope; one lit
// LED is the flag, which starts at LEDR5. The right player (Player 1) pulls
// with KEY[0], the left player (Player 2) with KEY[3]. Each key goes through a
// singlePress, so one press, however long, is one tug. A tug counts only if
// exactly one player pulls in that cycle. Each LED is a small FSM
// (normalLight, or centerLight for LEDR5) that sees both tugs and its two
// neighbours, so the flag moves one LED per tug. When the flag is at an end
// and is pulled off it, the winner FSM shows the player's number on HEX5 and
// holds it; all playfield LEDs are then dark, so no further tug moves
// anything until reset. lightNum reports the flag's position for simulation;
// its output drives nothing.
//
// Interface: CLOCK_50 (clock), SW[9] (active-high synchronous reset; other
// switches unused), KEY[3:0] (active-low buttons), LEDR[9:0], HEX0..HEX5
// (active-low 7-segment). LEDR9, LEDR8, LEDR2..0 and HEX0..HEX4 stay off.
// Timing: a press reaches the lights and the winner two clock cycles after the
// key goes low, and they change on the following edge.
//
// The structure (nine instances of five module types), the key and LED
// assignment and the freeze after a win follow the game's design. Tying the
// missing outer neighbours to 0 and blanking the unused outputs are this
// design's choices. SW[8:0], KEY[2:1] and the lightNum output are
// deliberately unused, so lint reports them as unused signals.
module DE1_SoC (
  input  logic       CLOCK_50,
  input  logic [9:0] SW,
  input  logic [3:0] KEY,
  output logic [9:0] LEDR,
  output logic [6:0] HEX0,
  output logic [6:0] HEX1,
  output logic [6:0] HEX2,
  output logic [6:0] HEX3,
  output logic [6:0] HEX4,
  output logic [6:0] HEX5
);
  import tug_pkg::*;

  logic       clk, reset;
  logic       L, R;        // one-cycle tug pulses, left and right player
  logic [4:0] field;       // field[4] = LEDR7 (far left) ... field[0] = LEDR3 (far right)
  logic [3:0] num;         // flag position, for simulation only

  assign clk   = CLOCK_50;
  assign reset = SW[9];

  singlePress leftKey  (.clk, .reset, .key(KEY[3]), .out(L));
  singlePress rightKey (.clk, .reset, .key(KEY[0]), .out(R));

  // A light's left neighbour is the next higher LEDR index.
  normalLight light7 (.clk, .reset, .L, .R, .NL(1'b0),     .NR(field[3]), .lightOn(field[4]));
  normalLight light6 (.clk, .reset, .L, .R, .NL(field[4]), .NR(field[2]), .lightOn(field[3]));
  centerLight light5 (.clk, .reset, .L, .R, .NL(field[3]), .NR(field[1]), .lightOn(field[2]));
  normalLight light4 (.clk, .reset, .L, .R, .NL(field[2]), .NR(field[0]), .lightOn(field[1]));
  normalLight light3 (.clk, .reset, .L, .R, .NL(field[1]), .NR(1'b0),     .lightOn(field[0]));

  winner judge (.clk, .reset, .FL(field[4]), .FR(field[0]), .L, .R, .hex(HEX5));

  assign LEDR = {2'b00, field, 3'b000};

  lightNum position (.leds(LEDR), .num);

  assign HEX0 = HEX_BLANK;
  assign HEX1 = HEX_BLANK;
  assign HEX2 = HEX_BLANK;
  assign HEX3 = HEX_BLANK;
  assign HEX4 = HEX_BLANK;

endmodule
