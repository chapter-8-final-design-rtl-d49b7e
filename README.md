# Three-button infrared remote control for a small robot

This design sends the state of three push buttons from one logic board to
another over an infrared link. The receiving board puts the button state out
as a 3-bit bus that drives the robot's motor control logic. The link is one
wire: the infrared LED's on/off signal. Timing, bit values and frame
boundaries therefore all have to be recovered from the pulse train itself.

The design has two halves, each a small datapath under a seven-state
controller:

* The **transmitter** packs the buttons into a 9-bit frame and sends it over
  and over as long and short light pulses.
* The **receiver** turns the pulses back into bits, finds where a frame
  starts, checks the frame, and updates its output.

## Line code and frame

Every bit takes four clock periods on the line:

| bit | line, four clocks | pulse |
|-----|-------------------|-------|
| 1   | `1 1 1 0`         | long  |
| 0   | `1 0 0 0`         | short |

Every bit therefore begins with a rising edge. This is what the receiver
locks onto.

A frame is nine bits, bit 8 first:

| bits  | content                                   |
|-------|-------------------------------------------|
| [8:6] | start pattern `010`                       |
| [5:3] | buttons `{A, B, C}`                       |
| [2:0] | inverted buttons `{~A, ~B, ~C}` (checksum) |

The receiver accepts a frame only if `[5:3] + [2:0] == 3'b111`. That holds
exactly when the second group is the complement of the first.

Before each frame the transmitter spends one clock with the line low while it
loads the next frame. A frame therefore takes 1 + 9 × 4 = **37 clocks**. The
buttons are sampled once per frame, in that load clock.

## Transmitter (`ir_transmitter`)

The transmitter has three blocks:

* `tx_shift_register`: 9-bit parallel-load register. It shifts toward bit 8,
  with a 0 fed into bit 0, and bit 8 is the bit being sent. After a whole
  frame has gone out it holds all zeros.
* `tx_counter`: 4-bit counter. It is loaded with 9 and counts down once per
  bit.
* `tx_fsm`: the controller. Its states are:

| state | line | action                                                                            |
|-------|------|-----------------------------------------------------------------------------------|
| 0     | 0    | load the counter with 9 and the shift register with the frame                     |
| 1     | 1    | count down and shift; go to 2 if the bit (bit 8 before the shift) is 1, else to 4 |
| 2, 3  | 1    | second and third clock of a long pulse                                            |
| 4, 5  | 0    | second and third clock of a short pulse                                           |
| 6     | 0    | end of bit: back to 1 while count ≠ 0, to 0 when the frame is done                |

A 1 goes through states 1‑2‑3‑6 and a 0 through 1‑4‑5‑6, which produces the
`1110` and `1000` codes. `IR_Out` is decoded from the state register. It is
the plain pulse train, with no carrier modulation.

## Receiver (`ir_receiver`)

The receiver has five blocks.

### Decoder (`rx_decoder`)

`IR_In` comes from another board's clock domain, so it first passes through a
two-flop synchroniser. The decoder waits for a rising edge. `SAMPLE_DELAY`
clocks later (default 2) it samples the line again:

* still high: a long pulse, decoded as 1;
* already low: a short pulse, decoded as 0.

It then raises `signalValid` for one clock, with the bit on `signal`.

The decision is made at a fixed time after the rising edge, not at the
falling edge. Because of this, decoded bits come exactly four clocks apart
whatever their values (five clocks across the frame gap). A falling-edge
decoder would put a 0 that follows a 1 only two clocks behind it, which the
controller below cannot absorb.

With equal clock frequencies on both boards, a short pulse is 1 clock high
and a long pulse 3 clocks high, and the sample at clock 2 falls between them.
If the receiver clock is k times faster, set `SAMPLE_DELAY` to about 2k.

### Shift register (`rx_shift_register`)

Each decoded bit is shifted in at bit 0. The newest three bits are therefore
always in `[2:0]`. A complete frame sits in the same layout as in the
transmitter. `clearShiftRegister` empties the register.

### Counter (`rx_counter`)

Loaded with 9 and counted down once per received bit:

* count = 6 means three bits are held;
* count = 0 means the frame is complete.

It also has a `countUp` input, used while searching for the start pattern.

### Error check (`rx_error_check`)

* `startResult`: `[2:0] == 010`.
* `signalResult`: `[5:3] + [2:0] == 111`.

Both comparisons are registered every clock. Each output is gated by its
request line, `checkStart` or `checkSignal`. The controller only asks one or
more clocks after the last shift, so the registered value always matches the
current register contents.

### Controller (`rx_fsm`): finding the frame

This is the least obvious part of the design. The receiver may be switched on
in the middle of a frame, and a reset or a rejected frame also leaves it out
of step. It finds frame boundaries with a sliding start-pattern search.

| state | action                                                                                                                                                               |
|-------|----------------------------------------------------------------------------------------------------------------------------------------------------------------------|
| 0     | load the counter with 9, clear the shift register                                                                                                                    |
| 1     | wait for `signalValid`. When it arrives, shift the bit in, count down and go to 2                                                                                    |
| 2     | count = 6 → 3; count = 0 → 5; otherwise → 1                                                                                                                          |
| 3     | start pattern in `[2:0]`? yes → 1 (collect the remaining six bits); no → 4                                                                                           |
| 4     | count up (back to 7) → 1. The next bit brings the count to 6 again, so the newest three bits are checked again: the window slides one bit at a time until `010` shows up |
| 5     | checksum good → 6; bad → 0 (discard and search again)                                                                                                                |
| 6     | copy the buttons `[5:3]` to `Data` → 0                                                                                                                               |

How much time each path needs, counted from a bit's strobe to being back in
state 1:

| path      | clocks |
|-----------|--------|
| 2‑1       | 2      |
| 2‑3‑4‑1   | 4      |
| 2‑5‑6‑0‑1 | 5      |

The decoder delivers bits exactly 4 clocks apart, and 5 after the last bit of
a frame. Every strobe is therefore caught, but with no margin. Because of
this, the two boards must run at the same clock frequency, or the receiver
must run faster with `SAMPLE_DELAY` scaled to match.

A false lock is possible when `010` also appears inside the data. The frame
read that way then almost always fails the checksum, the controller restarts,
and the next real frame lines up. Once one frame has been accepted, the
receiver stays aligned, because it restarts exactly at the next frame.

`Data` keeps its value between accepted frames and resets to `000`.
Simulation with equal clocks shows three things:

* `Data` changes 9 clocks after the rising edge of a frame's last pulse
  arrives on `IR_In`.
* A button change reaches `Data` within three frames on a clean link.
* A frame with a corrupted data bit is dropped without disturbing `Data`.

## Top level (`ir_remote_top`)

The top places the two halves side by side. Each has its own clock and reset
(`tx_*`, `rx_*`), because in use they sit on different boards. The LED and
the infrared receiver are optical parts, not logic, so `IR_Out` and `IR_In`
are both ports. Tie them together for an ideal link, or put a channel model
between them. `Data = {A, B, C}` goes to the motor control logic, which is
not part of this design.

| port                   | dir | meaning                                      |
|------------------------|-----|----------------------------------------------|
| `tx_clock`, `tx_reset` | in  | transmitter clock, synchronous active-high reset |
| `A`, `B`, `C`          | in  | buttons (expected debounced)                 |
| `IR_Out`               | out | LED drive, 1 = on                            |
| `rx_clock`, `rx_reset` | in  | receiver clock, synchronous active-high reset |
| `IR_In`                | in  | infrared receiver output, 1 = light          |
| `Data[2:0]`            | out | received buttons                             |

The only top-level parameter is `SAMPLE_DELAY` (default 2). The frame length
(9), counter width (4) and start pattern (`010`) are constants in
`ir_remote_pkg`. The frame layout `[5:3]`/`[2:0]` is built into the
controller and the error check, so those constants are not meant to be
changed on their own.

## What follows the original lab and what is this design's choice

Taken from the lab description:

* the block partitioning and the port names;
* the 9-bit frame with start bits, buttons and inverted buttons, and the
  `010` start pattern (the example it gives);
* the 1110/1000 codes;
* both state diagrams, with the count-down counters;
* the checksum rule.

Chosen here, where the description is silent or ambiguous:

* **Start-check count.** The lab's prose says the start bits are checked
  when "the count will be 3", while its receiver diagram tests count = 6.
  The diagram is followed: with a counter that counts down from 9, a count
  of 6 means three bits are held.
* **Where "load shift register / count down" happen.** The receiver
  diagram prints these actions without a clear state. They are issued on the
  transition from state 1 to state 2, when a bit arrives, so that state 2
  sees the updated count.
* **The decoder's insides.** The lab gives only its purpose. The
  synchroniser, the sample point after the rising edge and the
  `signalValid` strobe are this design's. The strobe to the controller is an
  extra connection that the lab's block diagram does not show.
* **The transmitter's shift.** It is done in state 1, which no state of the
  diagram is labelled with. State 0 drives the line low.
* **Resets and priorities.**
  * All resets are synchronous and active high.
  * The shift registers and the error check have no reset; none is drawn,
    and none is needed.
  * Priorities: load before shift, clear before shift, and
    reset > load > down > up in the counters.
* **The error check registers its comparisons.**
* **The frame order `{A, B, C}`.**

Not covered: carrier modulation for real IR receiver modules, button
debouncing, and the motor logic that consumes `Data`. The transmitter's
`signalSize` outputs are the constant 9, as its block diagram draws them as
controller outputs. They show up as constant outputs in synthesis.

## Files and simulation

`rtl/` holds one module or package per file:

* `ir_remote_pkg`: constants, state enums, frame builder;
* the transmitter and its blocks: `ir_transmitter`, `tx_fsm`,
  `tx_shift_register`, `tx_counter`;
* the receiver and its blocks: `ir_receiver`, `rx_decoder`,
  `rx_shift_register`, `rx_counter`, `rx_error_check`, `rx_fsm`;
* the top: `ir_remote_top`.

`rx_counter` carries an assertion that `countUp` and `countDown` are never
raised together.

`tb/tb_<module>.sv` is a self-checking testbench for each module. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Checks per level:

* **Block testbenches:** compare against reference models written in the
  testbench. They also check the timing: the 37-clock frame, the decoder's
  4-clock bit spacing and 5-clock latency, and the 9-clock `Data` latency.
* **`tb_ir_remote_top`:** runs the whole link at default parameters.
  * Setup: two clocks 3 ns out of phase, and the receiver released in
    mid-frame.
  * Stimulus: all button values, with data bits corrupted on the link every
    third step.
  * It counts long and short pulses, start-pattern slides, start-pattern
    hits, accepted frames, rejected frames and `Data` updates. It fails if
    any of them never happens.

Example, from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/ir_remote_pkg.sv \
    tb/tb_ir_remote_top.sv --top-module tb_ir_remote_top -Mdir obj
./obj/Vtb_ir_remote_top
```

Replace `tb_ir_remote_top` with any other testbench name to run that block's
test. Every test finishes in well under a second.
