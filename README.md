# Simon memory game core

This is a small chip core that plays the memory game Simon. It shows a
growing random sequence of colours (red, blue, green and yellow) on four
lamps. The player must repeat the sequence on four buttons. Each round adds
one term. A correct repetition of a 63-term sequence wins, and all four lamps
light. A wrong button loses, and only the red and green lamps light. The score
output always shows the current sequence length. A reset button starts a new
game.

The core is one finite-state machine with a small datapath. Around it sit a
free-running 2-bit counter that supplies the "random" colours, a 64 x 2-bit
SRAM that holds the sequence, and a button decoder. All storage is built from
two-phase, level-sensitive latches.

## One round, cycle by cycle

The controller is a Moore machine with nine states. Its state codes are
fixed in `simon_pkg`.

| State | Code | What happens | Next |
|---|---|---|---|
| START | 0111 | Writes the registered counter value into memory at `curr_pos`. At this point `curr_pos` equals `score`, so the term is appended. | PRE_OUTPUT |
| PRE_OUTPUT | 0001 | `score += 1`, `curr_pos = 0` | OUTPUT_SEQ |
| OUTPUT_SEQ | 0010 | While `curr_pos != score`: reads `mem[curr_pos]`, lights its lamp and increments `curr_pos` | itself until `curr_pos == score`, then POST_OUT |
| POST_OUT | 0011 | `curr_pos = 0` | INPUT_SEQ |
| INPUT_SEQ | 0100 | Reads `mem[curr_pos]`, enables the buttons and sets `cheat_out = {1, colour}` | CHECK on a valid press, else stays |
| CHECK | 0101 | Compares the button with `mem[curr_pos]` and increments `curr_pos` | CHECK_WIN on a match, else LOSE |
| CHECK_WIN | 0110 | (no outputs) | INPUT_SEQ if terms remain. Otherwise WIN if `score == 63`, else START |
| LOSE | 1000 | Red and green lamps on | stays until reset |
| WIN | 0000 | All four lamps on | stays until reset |

Reset forces START through a multiplexer in front of the state register. It
also clears `score` and `curr_pos`. The colour counter is never reset. Any
unused state code goes to START.

Timing for a round of `n` terms, counted in clock cycles from START:

- Playback: the lamps show the `n` terms on cycles 2 to n+1, one colour per
  cycle. On cycle n+2 the machine is still in OUTPUT_SEQ, with no lamp lit,
  and detects the end of the sequence.
- Player's turn: the first input request (`cheat_out[2] = 1`) comes on cycle
  n+4.
- Each correct press then takes three cycles: INPUT_SEQ (at least one cycle),
  CHECK and CHECK_WIN.

A complete 63-stage game therefore takes about 63·64/2·4 ≈ 8 300 cycles plus
the player's waiting time.

Each colour is shown for a single clock cycle. The lamps are meant to be
watched at a slow clock, or through external stretching. The core itself
does not stretch them.

## Button timing

The buttons are expected to be debounced off chip. The button decoder
(`input_handler`) is combinational, and the controller reads it in two
consecutive states:

1. **INPUT_SEQ** detects the press: the valid bit moves the machine to CHECK.
2. **CHECK** compares the colour, so the button must still be pressed then.

CHECK_WIN ignores the buttons. The next INPUT_SEQ reads them again, so a
button that is still held there counts as a second press. A well-formed press
is therefore a pulse two cycles long:

- it starts in a cycle where `cheat_out[2]` is 1;
- it lasts through the next cycle;
- it is released before the cycle after that.

The included testbenches drive presses this way. When no button or several
buttons are pressed, the decoder outputs "no press", so mashing buttons
during INPUT_SEQ does nothing.

There is one quirk. If the button changes to "several buttons" during CHECK,
the decoder outputs 000. That reads as red, so the press passes if red was
expected.

## Colour source

`rng_counter` is a 2-bit counter that counts every cycle from power-up. The
START state writes the counter value from the cycle before START, captured by
one register in the datapath. Randomness comes entirely from the player's
reaction time, which decides the cycle in which each round begins. If the
player always reacts at the same cycle, the same sequence repeats. Colour
codes: red 0, blue 1, green 2, yellow 3.

## Sequence memory

`sequence_mem` has 64 words of 2 bits. It is split as in a custom SRAM:

- `decoder6_64` decodes the 6-bit address into word lines.
- `sram_64x2_nodec` is the cell array. In each row, AND gates combine the
  word line with the read and write enables.
- `sram_cell` holds one bit.

Writes are level-sensitive: the word follows `writeval` while `writeen` is
high. The core opens the write only during ph2 of the START cycle
(`write_en & ph2`), when address and data are stable. Reads are
combinational. `readval` is 00 while `readen` is low. The transistor-level
cell drives a shared, possibly floating bit line. Here each cell's gated
output is ORed into the result instead. The address is `curr_pos[5:0]`. Only
63 words are ever used, so `curr_pos[6]` is unused.

## Clocking

The core uses two non-overlapping clock phases, `ph1` and `ph2`. Every
register (`flop`, `flopr`, `flopenr`) has two latches:

- a master latch, open during `ph2`;
- a slave latch, open during `ph1`.

A register therefore samples its input at the end of `ph2`, and its output
changes when `ph1` rises. One clock cycle is a `ph2` pulse followed by a
`ph1` pulse. Reset and the buttons are sampled like data, at the end of
`ph2`.

Synthesis infers latches by design. Lint tools report every register
feedback path, such as a counter or the state register, as a combinational
loop. Each of these paths crosses a ph2 latch and a ph1 latch, which are
never open at the same time. The phases must not overlap; an assertion in
`simon_top` checks this during simulation.

## Pins (`simon_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `ph1`, `ph2` | in | 1 | non-overlapping clock phases |
| `reset` | in | 1 | start/restart (synchronous) |
| `red`, `yellow`, `green`, `blue` | in | 1 | buttons |
| `r_out`, `y_out`, `g_out`, `b_out` | out | 1 | lamps |
| `score` | out | 7 | current sequence length |
| `cheat_out` | out | 3 | `{1, expected colour}` during INPUT_SEQ, else 000 |
| `state` | out | 4 | FSM state, for observation |

`cheat_out` lets a test harness or a microcontroller play the game
automatically. The parameter `MAX_STAGES_P` (default 63) sets the win
threshold. It may be lowered for short tests, but must stay below 64.

## Module map

```
simon_top
├── rng_counter            free-running 2-bit colour counter (flop)
├── sequence_mem           64 x 2 SRAM
│   ├── decoder6_64
│   └── sram_64x2_nodec    → 128 × sram_cell
├── input_handler          buttons → {valid, colour}
└── simonprocessing
    ├── simoncontroller
    │   ├── simonstatelogic   next state + state register (flop)
    │   └── simonoutputlogic  Moore outputs
    └── simondatapath      score, curr_pos (flopenr), colour register (flop)
```

`simon_pkg` holds the state and colour enums, the decoder output struct and
the sizes. The register helpers are `latch`, `latchr`, `flop`, `flopr` and
`flopenr`.

## Simulation

Every block has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M`. The shared reference model of the
controller is `tb/simon_ref_pkg.sv`. Example for the whole core:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/simon_pkg.sv \
          tb/simon_top_tb.sv --top-module simon_top_tb
./obj_dir/Vsimon_top_tb
```

`simon_top_tb` runs the core at its default size and plays three games:

- a full 63-stage win, with random idle cycles and rejected multi-button
  presses;
- a loss at stage 7;
- a reset in the middle of a game.

It learns the sequence from the lamps and predicts every new term from its
own copy of the colour counter. It also checks the cycle timing listed
above. At the end it checks that a win, a loss, a restart, a multi-button
press, idle waiting and a different sequence in the second game all
happened.

The unit testbenches cover the following:

- the controller: random stimulus against the reference model, with every
  transition required to occur;
- the datapath and the registers: against reference counters;
- the memory: exhaustive and random accesses against a reference array;
- the decoder and the button decoder: exhaustively.

## Departures and open points

- **Win threshold.** The game is won when a 63-term sequence has been
  repeated. This follows the stated 63-stage capacity. A literal comparison
  with 32, or a final score of 64, would not match that capacity.
- **Memory write timing.** The write is a level-sensitive pulse qualified
  with `ph2`. An edge-triggered write on `write_en` would race with the
  address and data registers.
- **Bit line and tri-state bus.** The tri-state bit line of the SRAM and the
  tri-state selection bus in the button decoder are modelled as AND-OR logic.
  They have the same function, and no high-impedance state is needed.
- **Old sequence after reset.** Reset does not clear the old sequence in
  memory. Each word is rewritten before it is read again, so the old terms
  are never seen.
- **Power-up.** Before the first reset, the state register holds an arbitrary
  value and the core may start playing on its own. A reset is required after
  power-up.
- **`state` port.** The `state` observation port is an addition.
- **Not modelled.** The pad ring and power pins are not modelled.
