# Tug-of-war game for the DE1-SoC board

Two players fight over a "flag": one lit LED in a row of five red LEDs
(LEDR7 on the left to LEDR3 on the right). The flag starts in the middle, at
LEDR5. The right player (Player 1) pulls with push button KEY[0], the left
player (Player 2) with KEY[3]. Every press moves the flag one LED toward the
player who pressed, unless both pressed in the same clock cycle. Pull the flag
off your own end of the row and your number appears on HEX5. The game then
freezes until SW[9], the reset, is raised.

The design is deliberately small: 13 flip-flops and no arithmetic. Its
interest lies in how it is split. There is no counter holding "the position".
Each LED is its own two-state machine that talks only to its two neighbours.

## Structure

```
KEY[3] ─► singlePress (leftKey)  ─► L ─┐
KEY[0] ─► singlePress (rightKey) ─► R ─┤  (L and R go to every light and the winner)
                                       ▼
        light7 ◄─► light6 ◄─► light5 ◄─► light4 ◄─► light3
       (normal)    (normal)   (center)   (normal)   (normal)
          │FL                                          │FR
          └──────────────► winner ◄────────────────────┘ ─► HEX5
LEDR[7:3] = lights ─► lightNum ─► num (for simulation only)
```

The top, `DE1_SoC`, has nine instances of five module types. None of the
modules has submodules of its own. All flip-flops use `CLOCK_50` and the
active-high, synchronous reset `SW[9]`. Unused outputs (LEDR9, LEDR8, LEDR2..0,
HEX0..HEX4) are held off.

| File | Role |
|---|---|
| `rtl/tug_pkg.sv` | 7-segment constants, the winner state enum, and `light_next`, the light transition rule |
| `rtl/singlePress.sv` | key synchronizer and one-pulse-per-press FSM |
| `rtl/normalLight.sv` | one playfield LED, resets dark |
| `rtl/centerLight.sv` | the centre LED, resets lit |
| `rtl/winner.sv` | Game On / P1 Win / P2 Win FSM driving HEX5 |
| `rtl/lightNum.sv` | combinational: index of the lit LED, 0 if none |
| `rtl/DE1_SoC.sv` | board top |

## Turning a button into one tug: `singlePress`

The buttons are asynchronous to the clock, active-low and held for many
cycles. Each key first passes through two flip-flops, a synchronizer
(`SYNC_STAGES = 2`). A one-bit Mealy machine then remembers whether the
synchronised key was already down in the previous cycle. Its output,
`out = pressed & ~held`, is high for exactly one cycle per press. The pulse
depends on the current input, which makes the machine Mealy.

Timing: if the key goes low before clock edge *k*, the pulse is high between
edges *k+1* and *k+2*. The lights and the winner act on edge *k+2*. So a tug
shows on the LEDs two cycles after the press, and takes effect on the third
edge. Holding the key gives no further pulses. Reset puts the synchronizer and
the FSM into the "released" state. This means a key held through a reset
counts as a new press once reset is released.

## Moving the flag: `normalLight` and `centerLight`

Each LED is a one-bit Moore machine whose output is its state. Its inputs are
the two tug pulses `L` and `R` and its neighbours' states `NL` and `NR`. The
rule lives in `tug_pkg::light_next`:

* A tug is real only if exactly one player pulled (`L ^ R`). A simultaneous
  press cancels out.
* A lit LED goes dark on any real tug, in either direction.
* A dark LED lights when the tug pulls the flag into it. That is a left tug
  with its right neighbour lit (`NR & L & ~R`), or a right tug with its left
  neighbour lit (`NL & R & ~L`).
* Only one LED is ever lit, so a lit LED ignores `NL` and `NR`.

On each tug, the lit LED goes dark and its neighbour on the pulling side
lights, both on the same edge. The flag therefore moves by one LED. The two
modules differ only in reset: `centerLight` (LEDR5) resets lit and
`normalLight` resets dark. The two end LEDs have no outer neighbour. Their
`NL` (LEDR7) or `NR` (LEDR3) input is tied to 0.

## Ending the game: `winner`

This Moore FSM has three states, encoded GAME_ON = 0, P1_WIN = 1 and
P2_WIN = 2. From GAME_ON:

* far-right LED lit (`FR`) and a lone right tug: P1_WIN;
* far-left LED lit (`FL`) and a lone left tug: P2_WIN.

Both win states hold on every input until reset. HEX5 is active-low with
segment g in bit 6: `1111111` (blank) while playing, `1111001` ("1") and
`0100100` ("2").

How the game freezes: the winning tug also turns the end LED off, and no LED
turns on because the flag has nowhere to go. From then on every LED is dark,
so no neighbour can relight one. The sticky winner state keeps the display.
No extra gating of the key pulses is needed.

## Test aid: `lightNum`

`lightNum` turns the LED bus into a 4-bit number: the index of the lowest lit
LED, or 0 when none is lit. During a game this is the flag position, 3 to 7,
and 0 after a win. The top instantiates it but leaves its output unconnected.
It is useful when probing `dut.num` in a waveform.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `singlePress_tb` | presses of 1, 2, 3, 4 and 20 cycles (one pulse each, two cycles late), 2000 random cycles against a history model, reset with the key held |
| `normalLight_tb`, `centerLight_tb` | reset state, all 16 input combinations from both states, random sequences with resets |
| `winner_tb` | every input from Game On with the win last, all 16 inputs in each win state, random sequences |
| `lightNum_tb` | all 1024 bus values |
| `DE1_SoC_tb` | the whole board through its pins (see below) |

`DE1_SoC_tb` replays a demonstration game. It starts with a reset, moves the
flag right twice to LEDR3, then left all the way to a Player 2 win. After a
second reset it moves the flag left twice to LEDR7, then right to a Player 1
win, with simultaneous presses mixed in. Then it plays 40 random games. After
every press it checks that nothing has changed two edges after the key went
low, and that the LEDs and HEX5 match a reference model on the third edge. It
checks them again after the key is released. It counts left moves, right
moves, cancelled simultaneous presses, long holds, wins for each player,
presses ignored after a win and resets in mid-game. A mechanism that never
happened counts as a failure. The top has no parameters, so this runs the
design at full size, in well under a second.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/tug_pkg.sv tb/DE1_SoC_tb.sv --top-module DE1_SoC_tb
./obj_dir/VDE1_SoC_tb
```

Substitute any other testbench name. `-Irtl` lets Verilator find the modules
by file name. The package must be listed first.

## Implementation figures

The RTL has 13 flip-flops: 3 in each `singlePress`, 1 per LED and 2 for the
winner state. A synthesis tool may re-encode the winner FSM, for example
one-hot, which adds a flip-flop. The ports are the 67 board pins the design
uses: `CLOCK_50`, `SW[9:0]`, `KEY[3:0]`, `LEDR[9:0]` and 6 × 7 HEX segments.
The design was built for a Cyclone V 5CGXFC7C7F23C8 (DE1-SoC). On that part a
compilation of this design is reported at about 12 ALMs and 13 registers, with
no memory, DSP blocks or PLLs.

## Where this RTL makes its own choices

The following follow the original game: the behaviour of every block, the
state encodings, the key and LED assignment, the two-cycle key latency and the
freeze after a win. The following are choices made here:

* The synchronizer and pulse FSM reset to "released".
* The end LEDs' missing neighbour inputs are tied to 0.
* `lightNum` reads the whole 10-bit LEDR bus and reports the lowest lit bit.
* Unused LEDs and HEX displays are driven off.
* The light rule is shared through a package function instead of being
  written out twice.
* The clock period in the testbenches (20 ns on the top) is arbitrary. The
  design has no timing requirement beyond one clock domain.
