# Simon Says: FPGA logic for a microcontroller-run memory game

Simon Says is a memory game. Three coloured LEDs (red, yellow, green) light
in a random order, one more entry at a time, and the player must repeat the
sequence on a keypad. The first mistake ends the game. A two-digit display
then shows the best score since power-up.

The game is split between two chips:

* A **microcontroller** runs the game in software. It chooses the pattern,
  times the playback, checks the player's answers and keeps the high score.
* An **FPGA** does everything that is fast, timing-critical or electrical.
  It scans and debounces the keypad, drives the LEDs and the multiplexed
  display, makes the three game-speed clocks, and provides a random number.

This repository holds the FPGA part as synthesizable SystemVerilog. The
microcontroller is represented only by a behavioural model in the
testbench.

```
              +---------------------------- simon_fpga ----------------------------+
 keypad  ---> | poll_demux -> keypad_decoder -> hold_reg -> AND key_held ->         |
 4 cols  <--- |      ^              debounce ------^------------'   keypress_output -+--> speed_key
 4 rows       |      |                                                  |           |
              | counter_22bit --(speed clocks)--> clk_mux ---------------------------+--> speed_clk_out
              |      |                                     led_mux <----'            |--> game_led (LEDs + MC)
              | rand_counter --------------------------------------------------------+--> rand_out
              | hiscore -> hs_decoder -> hold_reg x2 -> seg_display -----------------+--> seg_n, digit_sel(_n)
              +--------------------------------------------------------------------+
```

## One clock, 2 MHz

Everything runs on a single 2 MHz clock, with an asynchronous, active-high
reset. A free-running 22-bit counter (`counter_22bit`) provides all the
slower timing:

| counter bits | period at 2 MHz   | use                                         |
|--------------|-------------------|---------------------------------------------|
| 16:15        | 16.4 ms per step  | which keypad column is driven               |
| rising 13    | every 8.2 ms      | debounce sample (`db_tick`, one-cycle pulse)|
| 19           | 0.52 s            | fast game clock                             |
| 20           | 1.05 s            | medium game clock                           |
| 21           | 2.10 s            | slow game clock                             |

The display has its own 4-bit refresh counter (`seg_display`). Its top
bit switches between the two digits every 8 clocks.

## The keypad path

This is the least obvious part of the design. Several mechanisms must work
together for one press to be read exactly once.

**Scanning.** The keypad is a 4x4 switch matrix. Its four sense lines are
pulled high on the board. `poll_demux` drives one of the four column lines
low at a time, stepping every 2^15 clocks. A closed key joins its row's
sense line to its column line. So that sense line reads low only while
the FPGA drives that key's column.

**Debouncing.** The AND of the four sense lines is 1 when nothing is pressed
in the driven column. `debounce` samples it every 8.2 ms with a five-state
machine:

* two "pressed" samples in a row raise `key_held`;
* two "idle" samples in a row clear it;
* anything in between leaves it unchanged.

One bounce or glitch therefore neither starts nor ends a press. A column
is driven for 2^15 clocks, which holds exactly two debounce samples. So a
steadily held key is accepted within one scan round (about 66 ms) plus one
sample.

**Freezing the scan.** While `key_held` is high, `poll_demux` stops on the
current column. The pressed key's row therefore stays low for as long as
the key is held. This is also what lets the debouncer see the release.

**Decoding and holding.** `keypad_decoder` maps the one driven column and
the one low row to the value printed on the key:

```
            col_n[3] col_n[2] col_n[1] col_n[0]
row_n[2]:      1        2        3        C
row_n[0]:      4        5        6        D
row_n[1]:      7        8        9        E
row_n[3]:      A        0        B        F
```

Any other combination gives `F`. The decoded key is loaded into a
`hold_reg` by the debouncer's one-cycle `press` pulse. That is the same
clock edge on which `key_held` rises, so the stored key is never stale.
The stored key is then ANDed with `key_held`. The result is non-zero only
while the key is held, so two presses of the same key appear as two
separate pulses.

**Meaning of the keys** (`keypress_output`):

| key | output                  | meaning to the microcontroller   |
|-----|-------------------------|----------------------------------|
| 1   | `game_led` = 001        | red                              |
| 2   | `game_led` = 010        | yellow                           |
| 3   | `game_led` = 100        | green                            |
| 4   | `speed_key` = 3         | start a game, slow (2 s)         |
| 5   | `speed_key` = 1         | start a game, medium (1 s)       |
| 6   | `speed_key` = 2         | start a game, fast (0.5 s)       |

Each speed code equals the `speed_sel` code the microcontroller then
writes back to choose the game clock.

## LEDs and the microcontroller handshake

The three game LEDs are driven by `led_mux`:

* `led_sel` = 0: the LEDs show the keys the player is pressing;
* `led_sel` = 1: they show the microcontroller's `pattern`.

The same three lines go back to the microcontroller. It takes a rising
edge on any of them, while `led_sel` = 0, as the player's answer. No
separate strobe is needed. `key_enable` (the debounced key-held signal) is
also provided.

A game runs as follows:

1. The microcontroller waits for a non-zero `speed_key` and sets
   `speed_sel`.
2. It reads `rand_out` and appends the LED `1 << rand_out` to its pattern.
3. It plays the pattern back, one step on each rising edge of
   `speed_clk_out`: all off, entry 1 on, off, entry 2 on, and so on.
4. It sets `led_sel` = 0 and compares each answer with the pattern.
5. After a complete correct answer it pulses `correct` and goes back to
   step 2.
6. On a wrong answer it puts the high score on `hiscore` and raises
   `game_over`.

`correct` and `game_over` are also buffered straight to the green and red
right/wrong LEDs.

`clk_mux` is a plain combinational multiplexer. Changing `speed_sel` can
therefore produce one short period. This is harmless because the
microcontroller only changes it when a game starts.

`rand_counter` counts 0, 1, 2, 0, … on every clock. The microcontroller
reads it at a moment set by the player's timing, so the value is
effectively random. It is always a valid LED number.

## High-score display

`hiscore` (6 bits, binary) is split into tens and ones (`hs_decoder`,
mod/div 10). Both digits are loaded into two `hold_reg`s on the rising
edge of `game_over`, which first passes a two-flop synchronizer. The digits
are loaded 3 clocks after `game_over` rises and stay until the next game
over.

`seg_display` puts one digit at a time on the shared segment lines:

* `digit_sel` = 1: the ones digit;
* `digit_sel` = 0: the tens digit.

`digit_sel` and `digit_sel_n` switch the two digit transistors, so each
digit lights only while its own value is on the lines. Segments are
active low, `seg_n[6]` = a … `seg_n[0]` = g. The 9 is drawn without the
bottom segment.

## Board signals

| port            | dir | width | original signal / microcontroller port       |
|-----------------|-----|-------|----------------------------------------------|
| `key_col_n`     | out | 4     | keypad columns                               |
| `key_row_n`     | in  | 4     | keypad sense lines (pull-ups on board)       |
| `key_enable`    | out | 1     | debounced key held, port E6                  |
| `speed_key`     | out | 2     | speed code, port C1:C0                       |
| `game_led`      | out | 3     | LEDs red/yellow/green, port E0/E1/E2         |
| `rand_out`      | out | 2     | random number 0..2, port E4:E3               |
| `speed_clk_out` | out | 1     | selected game clock, port E5                 |
| `pattern`       | in  | 3     | pattern LEDs, port B2/B3/B4                  |
| `led_sel`       | in  | 1     | LED source select, port B6                   |
| `speed_sel`     | in  | 2     | clock select, bit 0 = B7, bit 1 = B5         |
| `hiscore`       | in  | 6     | high score, port C2..C7 (C2 = bit 0)         |
| `correct`       | in  | 1     | answer right, port B1                        |
| `game_over`     | in  | 1     | answer wrong / game over, port B0            |
| `led_correct`   | out | 1     | green right LED                              |
| `led_wrong`     | out | 1     | red wrong LED                                |
| `seg_n`         | out | 7     | segments a..g, active low                    |
| `digit_sel(_n)` | out | 1+1   | digit transistor drives                      |

## Where this RTL differs from the original hardware

The blocks, counter taps, codes and mappings are those of the original
FPGA design. The circuit style is modernised:

* **Single clock domain.** The original clocked the debouncer from a
  counter bit and the scan register from a gated clock (`CLK & ~Enable`).
  It also clocked the key and score flip-flops directly from `Enable` and
  from the microcontroller's game-over line. Here each of these is a clock
  enable or a load pulse on the 2 MHz clock.
* **Debouncer output.** The original built the key-held output as a
  combinational feedback loop (a latch). Here it is a flip-flop updated
  together with the state, with identical values in every state.
  The debouncer's reset is asynchronous here; the original used a
  synchronous one.
* **Key register timing.** The key code is loaded on the same edge that
  raises `key_held`. Loading it one clock later would let the previous key
  show for one cycle. A microcontroller polling the LED lines could catch
  that glitch and read the wrong colour.
* **Synchronizer.** `game_over` passes two flip-flops before its edge is
  detected. The original used it directly as a clock.
* **Tables as arithmetic.** The keypad decoder is a row/column lookup and
  the score decoder is mod/div 10, instead of full case tables. Every
  input gives the same result as the original tables.
* `rand_counter` has a reset. Its original source is not known; it is
  built from its described behaviour.

Not included: the microcontroller and its program, the keypad switches,
the resistors, the display digits and their transistors, and the LEDs.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs. With Verilator 5, for example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/simon_pkg.sv tb/tb_debounce.sv --top-module tb_debounce -o sim
./obj_dir/sim
```

The whole-game test is built the same way with `tb/tb_simon_fpga.sv` and
`--top-module tb_simon_fpga`; `-y tb` lets Verilator find its keypad and
microcontroller models.

The unit testbenches check against independently computed values:

* all 256 keypad line combinations;
* all 64 scores;
* the full 22-bit counter wrap, including the period of the slow clock;
* random stimulus against reference models for the stateful blocks.

`tb/tb_simon_fpga.sv` plays four complete games on the full-size design
with every parameter at its default: at fast, medium and slow speed, and
a final fast game that reaches level 11. This covers 108 s of game time,
about 216 million clocks, and takes a little over two minutes to
simulate. It uses `tb/keypad_model.sv` (switch matrix) and
`tb/simon_mc_model.sv` (the microcontroller's game program). The player
presses every key with contact bounce. The test checks:

* glitch rejection;
* one accepted press per key press, within the scan-and-debounce bound;
* the scan freezing while a key is held;
* the LED and speed codes;
* all three game-clock periods;
* patterns growing by one entry per level, earlier entries unchanged;
* the right/wrong LEDs;
* the high score on both display digits: 3, 3 kept after lower scores,
  then 10.

Assertions in `poll_demux`, `debounce` and `simon_fpga` also check, in any
simulation run with assertions enabled, that:

* at most one column is driven;
* `key_held` changes only at sample instants;
* the scan stays put while a key is held.

It counts how often each mechanism occurred and fails if one never did.

For faster experiments, override the counter taps on `simon_fpga`, for
example `CNT_WIDTH=14, POLL_LSB=7, DB_BIT=5, SPEED_LSB=11`. Scale the
testbench's `DB_PERIOD` (2^(DB_BIT+1)), `SCAN_ROUND` (2^(POLL_LSB+2)) and
clock-period check to match.

## How far to trust it

* Every block is checked on its own and in the full game. Each unit
  testbench has been shown to fail on a deliberately broken copy of its
  module.
* The microcontroller model follows the original program's flow. It is not
  the real program, so timing interactions with the real firmware have
  not been simulated. Examples are its polling speed and the order in
  which it reads its ports.
* Nothing has been tested on an FPGA.
