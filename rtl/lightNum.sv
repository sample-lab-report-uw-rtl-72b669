// lightNum: test aid that names the lit LED.
//
// Purely combinational. It scans the LED bus from bit 0 upward and reports the
// index of the lowest lit bit, or 0 when none is lit. In the game only one
// playfield LED (LEDR7..LEDR3) is ever lit, so the result is simply the
// flag's position, and 0 means the flag has left the playfield. One 4-bit
// number replaces the individual LED signals when looking at a simulation.
//
// Interface: leds (the 10-bit LEDR bus), num (4 bits). No clock.
//
// What the module reports is the game's design; scanning for the lowest lit
// bit, and reading the whole LEDR bus rather than only the playfield, are
// this design's choices.
module lightNum (
  input  logic [9:0] leds,
  output logic [3:0] num
);

  always_comb begin
    num = 4'd0;
    for (int i = 9; i >= 0; i--)
      if (leds[i]) num = 4'(i);
  end

endmodule
