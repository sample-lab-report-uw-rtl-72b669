// singlePress: turns an asynchronous, active-low push button into a single
// one-clock pulse per press.
//
// The key first passes through a chain of SYNC_STAGES flip-flops (two by
// default) that brings it into the clock domain. A two-state Mealy FSM then
// remembers whether the synchronised key was already down in the previous
// cycle; `out` is high in the one cycle where the synchronised key is down and
// the FSM is still in its released state. Holding the key produces no further
// pulses; a new pulse needs a release first.
//
// Interface: clk, reset (active-high, synchronous), key (active-low, 0 =
// pressed, may change at any time), out (active-high pulse).
// Timing: a press that is sampled at clock edge k gives a pulse in the cycle
// after edge k+1, i.e. two cycles after the key goes low, lasting one cycle.
//
// The two-flop synchronizer, the Mealy pulse FSM and the two-cycle latency are
// the game's design. The synchronizer is written inline rather than as a
// submodule, and resetting the chain to "released" is this design's choice.
module singlePress #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic reset,
  input  logic key,
  output logic out
);

  logic [SYNC_STAGES-1:0] sync;   // sync[SYNC_STAGES-1] is the synchronised key
  logic                   held;   // FSM state: 1 = key was down last cycle
  logic                   pressed;

  always_ff @(posedge clk) begin
    if (reset) sync <= '1;
    else       sync <= {sync[SYNC_STAGES-2:0], key};
  end

  assign pressed = ~sync[SYNC_STAGES-1];

  always_ff @(posedge clk) begin
    if (reset) held <= 1'b0;
    else       held <= pressed;
  end

  // Mealy output: depends on the state and the current input.
  assign out = pressed & ~held;

endmodule
