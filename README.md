# Microprogrammed two-axis pulse interpolator

A numerically controlled lathe or a robot on a continuous path needs a stream
of single-step pulses for each axis. The stream has to trace a straight line
or an arc, run at a programmed feed rate, ramp up smoothly at the start,
ramp down smoothly at the end, and report when the move is complete. Earlier
interpolators used separate hard-wired circuits for each of these jobs. This
design does all of them in one microprogrammed bit-slice machine:

- a 24-bit ALU built from six 2901-style 4-bit slices and a lookahead carry
  generator;
- a 2910-style microprogram sequencer;
- a 512 x 36-bit microprogram memory with a pipeline register;
- a small I/O unit.

One 16-microcycle firmware loop runs all four jobs in turn: feed-rate
division, the remaining-distance count, exponential speed up/down and one
step of linear or circular interpolation. With a 250 ns microcycle the loop
runs at 250 kHz, so the machine can emit up to 250,000 steps per second.

The interpolation uses the *algebraic arithmetic* (discriminant) method. A
signed discriminant `D` says which side of the path the current point is on.
Each step moves one axis by one unit towards the path and updates `D` with
one addition. No multiplication is needed while a move runs.

## The algorithms

### Linear move

Coordinates are taken relative to the start point, and `(Ze, Xe)` is the end
point. The discriminant is `D = Ze*X - Xe*Z`:

| condition | step  | update        |
|-----------|-------|---------------|
| `D >= 0`  | Z + 1 | `D <- D - Xe` |
| `D < 0`   | X + 1 | `D <- D + Ze` |

A move of `Ze + Xe` steps ends exactly on the end point. `|D|` never exceeds
`max(Ze, Xe)`, so no point is more than one length unit off the line.

### Circular move (counter-clockwise, first quadrant)

Coordinates are taken relative to the centre. The discriminant is
`D = Z^2 + X^2 - R^2`:

| condition | step  | update                                   |
|-----------|-------|------------------------------------------|
| `D >= 0`  | Z - 1 | `D <- D - (2Z' + 1)`, `Z'` = new Z value |
| `D < 0`   | X + 1 | `D <- D + (2X + 1)`, `X` = old X value   |

The firmware first applies the Z decrement and then subtracts `2Z'+1` using
the new value. This is the same as subtracting `2Z - 1` with the old value.

### Axis-end guards

Before taking a step, the firmware checks whether that axis has already
reached its end coordinate. If it has, the step goes to the other axis.

- A line along one axis stays on that axis, even when the discriminant would
  drift (for example, a start value of `D = -1` on a horizontal line).
- An arc cannot overshoot its end in Z or X.

### Feed rate

Each reference pulse `Fr` adds the feed word `Fc` to a 24-bit accumulator
`Fd`. A carry out of `Fd` is a feed pulse `Fi`. The feed-pulse rate is
therefore `Fr * Fc / 2^24`, which is exactly proportional to `Fc`. `Fr`
typically comes from a spindle encoder, so the feed follows the spindle.

Each feed pulse decrements the *whole distance* counter `WUD`. When `WUD`
reaches zero, the move stops generating feed pulses.

### Speed up/down

A second accumulator pair smooths the pulse train:

- each feed pulse raises the speed register `SDA` by one speed unit `SDK`;
- every loop pass adds `SDA` to `SDC`;
- a carry out of `SDC` is an output pulse `Fo`, which also lowers `SDA` by
  `SDK`.

With `SDK = 2^(24-n)` this is an n-bit first-order lag:

- the output rate rises as `Fo = Fi * (1 - exp(-Fa*t / 2^n))`;
- after the distance counter empties, it decays as `exp(-Fa*t / 2^n)`;
- `Fa` is the loop rate, the clock divided by 16.

Every feed pulse raises `SDA` once and every output pulse lowers it once. The
move therefore ends when `SDA` is back to zero, and the number of steps equals
`WUD` exactly.

At a high feed over a short distance, the ramp-down starts before the speed
has reached the static feed. The step-rate profile is then a peak rather than
a plateau.

## The 16-microcycle loop

Most of the subtlety of the design is here. Every path through the loop,
whatever happens in it, takes exactly 16 microwords. This makes the loop a
fixed-rate sampler at `Fa = clock / 16`, on which the speed equations above
rely. Shorter paths are padded with idle words.

| part | work |
|------|------|
| A  feed | `Fd += Fc`. If a reference pulse is pending (`Ipulse` flag) and the addition carried: `WUD -= 1`, `SDA += SDK`. If there was no pulse, the addition is undone. If there was a pulse but no carry, the `WUD` decrement is undone. The pending pulse is then cleared (I/O code D5). |
| B  speed | `SDC += SDA`, `SDA -= SDK`. Without a carry from `SDC`, the decrement is undone and part C is skipped. |
| C  step | Test `D < 0`, test the axis-end guard, update `D` and the coordinate. Write the new coordinate to the X or Z position register (D0/D1) and pulse the axis output (D2/D3). A linear step takes 2 words and a circular step 3. |
| D  distance | `Fc <- input register`. If `WUD != 0`, start the next pass. Otherwise enter the speed-down passes: part B and C only, padded to 16 words, until `SDA == 0`. Then pulse D4 (distribution end) and return to the idle routine. |

Conditions are tested **one word after** the ALU operation that produced them.
This is because the status register latches the flags at the end of every
word. The code therefore often pairs an ALU word with a conditional jump in
the next word, and the undo operations sit on the fall-through path.

A reference pulse is synchronised and held in the `Ipulse` flag until part A
consumes it. Reference pulses closer together than one loop pass (16 clocks)
merge into one.

## Hardware

### CPU: `cpu24`, `alu_slice4`, `carry_lookahead`

`alu_slice4` is a 2901-style 4-bit slice:

- a 16 x 4 two-port register file (A read, B read/write) and a Q register;
- eight source pairs (`AQ AB ZQ ZB ZA DA DQ DZ`);
- eight functions (`R+S`, `S-R`, `R-S`, `OR`, `AND`, `~R&S`, `XOR`, `XNOR`);
- generate/propagate, carry and overflow outputs.

Subtraction is done as an addition with carry-in: carry set means "no borrow".

`cpu24` chains six slices through a `carry_lookahead` unit, which works like
a 2902 extended to six groups. It produces the 24-bit flags:

- carry and overflow from the top slice;
- negative from bit 23;
- zero as the AND of the six slice zero outputs.

The destination field is only 2 bits wide: `NOP`, `RAMF` (write F to B, Y=F),
`QREG` (write F to Q) and `RAMA` (write F to B, Y=A). Shifts are therefore
not available, and the firmware does not need them.

### Sequencer: `seq2910`

`seq2910` is a 2910-style sequencer:

- 12-bit microprogram counter;
- 5-deep subroutine/loop stack;
- register/counter;
- all sixteen instructions (`JZ CJS JMAP CJP PUSH JSRP CJV JRP RFCT RPCT CRTN
  CJPP LDCT LOOP CONT TWB`);
- the `PL`, `MAP` and `VECT` enables.

The condition input `CC` is active low. `CCEN_n = 0` forces the condition
true, so the instruction acts unconditionally. Only 9 address bits reach the
512-word memory.

### Microprogram memory: `micro_memory`, `interp_fw_pkg`

The ROM image is computed at elaboration by `interp_fw_pkg::build_rom()`, so
there is no data file. `micro_memory` registers the addressed word into the
pipeline register on each clock. `INIT` clears the pipeline register to a
`JZ` word, which restarts the sequencer at address 0.

Microword layout (36 bits):

| bits    | field   | meaning |
|---------|---------|---------|
| 35:33   | src     | ALU source pair |
| 32:30   | fn      | ALU function |
| 29:28   | dst     | ALU destination |
| 27:24   | a       | register A address |
| 23:20   | b       | register B address |
| 19      | cin     | carry in |
| 18:15   | seq     | sequencer instruction |
| 14:7    | br      | branch address (8 bits) |
| 6:4     | cond    | condition select |
| 3       | ccen_n  | 0 = unconditional |
| 2:0     | io      | I/O code, decoded to D0..D7 |

There are 17 bits of CPU control, 16 bits of sequencer control and 3 bits of
I/O control. The condition select chooses one of:

- 0 carry, 1 zero, 2 negative, 3 overflow;
- 4 `PMSI` (command start), 5 `Ipulse` (reference pulse pending);
- 6 and 7 constant 0.

### Control path: `status_reg`, `cond_mux`, `start_addr_latch`, `pulse_flags`

- **`status_reg`** latches C/Z/N/V every microcycle.
- **`cond_mux`** drives the sequencer's `CC_n`.
- **`start_addr_latch`** is the control register. The host writes a command's
  start address into it. When the sequencer asserts `MAP_n` (instruction
  `JMAP`), the latch drives the branch bus. Otherwise the microword's branch
  field drives the bus (`PL_n`).
- **`pulse_flags`** holds the two request flags:
  - `PMSI` is set by the host's start request and cleared by D6;
  - `Ipulse` is set by a synchronised rising edge of `Fr` and cleared by D5.

### I/O unit: `io_decoder`, `io_regs`

`io_decoder` expands the 3-bit I/O field into one-hot strobes:

| code | strobe | effect |
|------|--------|--------|
| 0 | D0 | load X-position register from ALU output Y |
| 1 | D1 | load Z-position register from ALU output Y |
| 2 | D2 | X step pulse |
| 3 | D3 | Z step pulse |
| 4 | D4 | distribution end |
| 5 | D5 | clear `Ipulse` |
| 6 | D6 | clear `PMSI` |
| 7 | D7 | none |

`io_regs` holds three registers:

- the 24-bit input register, loaded by `FBSTB` from the host and read on the
  ALU's D port;
- the X and Z position registers.

While `sample` is high, the position registers ignore loads, so the host reads
a consistent pair. A load dropped this way is made up at that axis's next
step.

### Top: `interpolator_top`

The top wires the blocks as described above. The host-side ports are plain
signals. The host's 8-bit bus adapter and parallel ports are not part of the
design.

## Using it from a host

All host traffic is a *command*:

1. Put the data word on `host_data` and pulse `fbstb`.
2. Put the command's start address on `ctrl_data` and pulse `ctrl_wr`.
3. Pulse `pmsi_req`.

The idle routine at address 0 waits for `PMSI`, clears it and jumps through
the control register. A data-accept command copies the input register into
one working register and returns to idle.

| address | command | register |
|---------|---------|----------|
| 0x10 | load Zk (start Z) | R1 |
| 0x11 | load Xi (start X) | R2 |
| 0x12 | load Ze (end Z) | R3 |
| 0x13 | load Xe (end X) | R4 |
| 0x14 | load Dk (start discriminant) | R5 |
| 0x15 | load WUD (number of steps) | R6 |
| 0x16 | load SDK (speed unit, `2^(24-n)`) | R11 |
| 0x20 | linear move; data word = feed word `Fc` | R7 |
| 0x60 | circular move; data word = feed word `Fc` | R7 |

The working registers also include `Fd` (R8), `SDA` (R9) and `SDC` (R10).
Each move command clears these registers and then enters its loop.

For a move, the host supplies:

- **linear:** `Zk = Xi = 0`, the end `(Ze, Xe)` relative to the start,
  `Dk = 0` and `WUD = Ze + Xe`;
- **circular:** start and end relative to the centre,
  `Dk = Zs^2 + Xs^2 - R^2` (normally 0) and `WUD` equal to the total number of
  unit steps on the arc (`|Zs - Ze| + |Xe - Xs|`).

The feed word stays in the input register for the whole move. Part D of
every loop pass copies it into `Fc`. Writing a new word with `fbstb` alone
therefore changes the feed rate from the next pass on, with the speed lag
smoothing the change. This is a feed override.

During the move:

- each step shows as a one-clock pulse on `x_pulse` or `z_pulse`;
- the new coordinate appears on `x_pos` or `z_pos`;
- `dist_end` pulses once when the move is done.

A new command is accepted only from the idle routine, that is, after
`dist_end`.

`init` is a synchronous reset. It clears the pipeline register, the status
and request flags, the control register and the input/position registers.
Working registers are not cleared; the data-accept commands define them.

## Where this design departs from the published one

The original description gives the architecture, the field widths of the
microword, the I/O strobes, the algorithms and a flow chart of the loop. It
does not give the microcode, the bit order of the microword or any command
protocol. Those are this design's own, as is everything listed below.

- **Microcode and padding.** The firmware was written from the flow chart and
  the equations. Its word sequence and idle padding are its own. Only the
  16-word loop length is taken from the original.
- **Speed accumulator width.** The original increments `SDA` by one and
  detects overflow of an n-bit `SDC`, with n unspecified. Here `SDA`/`SDC` are
  full 24-bit words and the host chooses n through `SDK = 2^(24-n)`.
- **Feed word.** `Fc` is a 24-bit fraction of the reference rate. The
  original flow chart reloads `Fc` from the feed data on every pass. Here the
  feed data is the word left in the input register by the move command.
- **Branch-source enables.** `MAP` enables the control register and `PL` the
  microword branch field, as in the block diagram and the usual 2910 use.
  One sentence of the original pairs them the other way round.
- **CCEN polarity.** `CCEN_n = 0` makes a jump unconditional, following the
  original text. This is the inverse of the 2910 data sheet. To use a real
  2910, invert microword bit 3.
- **Fourth status flag.** Carry, zero and negative are named; the fourth flag
  on the 4-bit status bus is taken to be overflow.
- **Axis-end guards.** The flow chart compares the end and present
  coordinates. Here the guard fires once an axis has reached its end.
- **Sample.** The original only says that `sample` keeps the position
  registers unchanged. Dropping loads while it is high is this design's
  choice.
- **Not included:**
  - other commands the original only names (rapid traverse, handle pulse
    feed, dwell): their data and algorithms are not given;
  - the host computer;
  - the 8255 parallel ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_alu_slice4` | all sources, functions and destinations against a reference model; carry/overflow/G/P |
| `tb_carry_lookahead` | every group carry against ripple addition |
| `tb_cpu24` | random 24-bit operations and flags against a 24-bit model |
| `tb_seq2910` | each of the 16 instructions, the stack, the counter, the enables |
| `tb_micro_memory` | walks every control path of both commands and checks each pass is 16 words and reloads `Fc`; checks the idle and data-accept routines and the pipeline register |
| `tb_status_reg`, `tb_cond_mux`, `tb_start_addr_latch`, `tb_pulse_flags`, `tb_io_decoder`, `tb_io_regs` | the small blocks, exhaustively or by directed cases |
| `tb_interpolator_top` | the whole machine, at its default size, on seven moves |
| `tb_feedrate_linearity` | feed data 10, 20, ..., 100: exactly F x 8 steps per 2048 reference pulses, proportional to F; a feed change from 20 to 80 in the middle of a move |
| `tb_speed_profile` | low feed: ramp up, plateau at the static rate, ramp down; high feed: ramp-down begins before the static rate is reached |

`tb_interpolator_top` runs seven moves:

- a 37 x 23 line;
- lines along each axis;
- a quarter circle of radius 20 with a `sample` hold;
- an arc from (12,5) to (5,12);
- the two moves of the published results: a 14-step line (9 x 5) and a
  12-step quarter circle of radius 6. For every step it checks:

- the axis, against an independent discriminant model;
- that the point is no more than one length unit off the line or arc;
- the position registers, and that the step interval is a multiple of 16
  clocks.

At the end of each move it checks the end point, the step count and
`dist_end`. It also counts that feed pulses, reference pulses that gave no feed pulse, ramp-up,
plateau, ramp-down, both guards and both axes all occurred.

## Simulating

Any Verilator 5 build will do. The packages come first:

```sh
verilator --binary --timing -Wno-fatal --top-module tb_interpolator_top \
  rtl/interp_pkg.sv rtl/interp_fw_pkg.sv \
  $(ls rtl/*.sv | grep -v _pkg.sv) tb/tb_interpolator_top.sv
./obj_dir/Vtb_interpolator_top
```

Replace the top module and the last file to run any other testbench.

To change the firmware, edit `emit_command` / `build_rom` in
`rtl/interp_fw_pkg.sv`. Keep every path of the loop at `LOOP_CYCLES` words;
`tb_micro_memory` checks this.
