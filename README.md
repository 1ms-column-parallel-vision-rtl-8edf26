# CPV: a 1 ms column-parallel vision system in SystemVerilog

This is a register-transfer model of the Column Parallel Vision (CPV) system:
a 128 x 128 photo-detector array with column-parallel 8-bit A/D converters,
feeding a 128 x 128 array of bit-serial SIMD processing elements (S3PE). A
summation circuit reduces the PE outputs to one number per instruction. A
small program-driven controller runs the show and shares its main memory with
a host DSP. The use it was built for is visual feedback at a 1 ms frame
cycle, for example tracking a moving target by its area and centroid.

Everything digital is synthesizable RTL. The sensor (photodiodes and ADCs) is
a behavioural model. The host DSP network and the pan/tilt active-vision head
(AVS-II) are not modelled: they are bought-in processors and motors running
software, and the source description does not design them. The host's side
of the system is brought out as ports instead: a port on the shared memory,
plus `start` and `halted`.

## Block diagram

```
 scene ──► pd_adc_array ──pix_col[128]──► pe_array (128 x 128 s3pe)
             ▲  (behavioural)              │  8 x 16 pe_chip tiles, 16 x 8 PEs each
             │ col_sel/conv_start/done     │  each PE row has a pixel shift register
             │                             │  own bits ──► summation_circuit ──┐
             │                        X/Y border I/O                           │ sum
             │                             ▲▼                                  ▼
             └──────── frame_sync ◄── cpv_controller ────────────────────────────
                                       PC, IR, decoder, A/B, ctrl_alu, SUM
                                       buffer_memory_1d (16 x 128 bits)
                                       main_memory 32 x 64k, dual port ◄──► host
```

| Module | What it is |
|---|---|
| `cpv_system` | Top level. Wires the blocks below together. |
| `cpv_pkg` | Both instruction formats, the opcodes and some helper functions for writing programs. |
| `s3pe` | One processing element. |
| `shift_segment` | One chip's piece of a PE row's pixel shift register. |
| `pe_chip` | 16 columns x 8 rows of PEs, i.e. one FPGA of the original machine. |
| `pe_array` | 8 x 16 chips with the neighbour wiring between them and the array border I/O. |
| `summation_circuit` | Combinational count of the ones in all 16384 PE output bits. |
| `pd_adc_array` | Behavioural sensor: a writable scene and one column of 128 conversions at a time. |
| `frame_sync` | Frame readout sequencer. Requests each column and strobes the shift registers. |
| `main_memory` | 32-bit x 65536 dual-port RAM, shared by the controller and the host. |
| `buffer_memory_1d` | Sixteen 128-bit lines. Captures or drives the PE array border; also readable and writable as 32-bit words. |
| `ctrl_alu` | The controller's 32-bit ALU. |
| `cpv_controller` | The sequencer that runs the program. |

Reset is synchronous and active low everywhere (`rst_n`). There is one clock.

## Processing element (S3PE)

Each PE has:

- a 24-bit local memory;
- A and B registers, plus a carry flag C;
- an 8-bit pixel register;
- a one-bit ALU.

The whole array executes one 22-bit broadcast instruction per clock:

```
[21:18] op   [17:15] dir   [14:10] src   [9:5] dst   [4] wm   [3] cnd   [2:0] bsel
```

- **Operand.** Each instruction reads one operand bit X at address `src`.
  `dir` chooses whose bit: the PE's own, or the north (row-1), east (col+1),
  south (row+1) or west (col-1) neighbour's. All PEs use the same address.
- **Address map.** Addresses 0-23 are the local memory. Address 24 is bit
  `bsel` of the pixel register. Address 25 reads constant 1. Addresses 26-31
  read 0.
- **Operations.**
  - `LDA`, `LDB` load X into A or B.
  - `MOV`, `AND`, `OR`, `XOR`, `ANDN` and `NOT` combine A with X.
  - `ADD` and `SUB` are full-adder steps through C. Use `SEC` before a
    subtraction.
  - `CLC` and `SEC` clear or set C. `STC` outputs C.
- **Result.** Every op that produces a result R also loads A with R, so logic
  operations chain without a store.
- **Write.** R goes to `mem[dst]` when `wm` is set. If `cnd` is also set,
  only PEs with B = 1 write, which gives a per-PE write mask.
- **Output.** `own_bit`, the bit at `src`, is what the neighbours see, what the
  summation circuit counts and what leaves the array border.

**Bit-serial arithmetic.** Add n-bit numbers held LSB first at a and b into s:

```
CLC; for k in 0..n-1: LDA a+k ; ADD b+k -> s+k ; STC -> s+n
```

**Edges.**

- X border: the west neighbour of column 0 is `x_in[row]`, and `x_out[row]`
  is the own bit of the last column.
- Y border: the north neighbour of row 0 is `y_in[col]`, and `y_out[col]` is
  the own bit of the last row.
- The east and south borders read 0.

**Pixel path.**

1. Each PE row has an 8-bit shift register running from column 0 to the last
   column.
2. `frame_sync` asks the sensor for columns 127, 126, …, 0 in turn. Each
   converted column is shifted in, one pixel per row.
3. After 128 shifts, every pixel sits in the stage of its own column's PE.
4. A `latch` pulse copies all stages into the pixel registers at once.

The next frame can then shift in while the PEs work on the current one.

## Controller

The controller runs a 32-bit instruction set with the opcode in `[31:28]` and
a 16-bit immediate or address in `[15:0]`:

| op | mnemonic | effect |
|---|---|---|
| 0 | NOP | nothing |
| 1 | PEI | broadcast `[21:0]` to the PEs. `[27]`: capture the summation result into SUM. `[26]`/`[25]`: capture the X/Y border into the current buffer line. |
| 2 | LDI | A ← imm |
| 3 | LD | A ← M[imm] |
| 4 | ST | M[imm] ← A |
| 5 | LDB | B ← M[imm] |
| 6 | ALU | A ← A op B. `[3:0]`: add, sub, and, or, xor, shl1, shr1, A←B, or B←A |
| 7 | LDS | A ← SUM |
| 8 | EDGE | current buffer line ← `[4:0]`. Border drive on/off ← `[16]`. |
| 9 | BRD | A ← buffer word[imm] |
| A | BWR | buffer word[imm] ← A |
| B | BR | go to imm if `[19:16]` holds: always, A = 0, A ≠ 0 or A < 0 |
| C | FRM | `[0]` starts a frame transfer. `[1]` waits for it to finish. `[2]` latches the pixel registers (after the wait, if both are set). |
| D | HALT | stop and raise `halted` |

Instruction timing:

- Each instruction takes a fetch clock and an execute clock. `LD` and `LDB`
  take one more clock for the memory read.
- A PE instruction reaches the array registered and is valid for exactly one
  clock. A `PEI` instruction therefore uses the PE array once every two
  clocks.
- The summation result and the border bits are sampled at the end of that
  clock, so a `PEI` can read a bit plane and count it in the same
  instruction.

Buffer word addressing: line *l* holds words *l*·4 … *l*·4+3 (128 bits = four
32-bit words).

**Host protocol.**

1. Write the program from address 0 through the `host_*` port. The port reads
   synchronously, one clock of latency. If both ports write the same address in
   the same clock, the controller wins.
2. Pulse `start`.
3. Wait for `halted`.
4. Read the results back through the same port.

## Timing

- **Frame transfer.** One column takes the sensor's conversion latency plus
  one clock. The sensor model answers 5 clocks after a request
  (`ADC_CYCLES = 4` plus its output register). A column therefore takes 6
  clocks, and a 128 x 128 frame takes 128 x 6 = 768 clocks. The frame
  transfer runs in the background: the PE array can work on the latched
  previous frame meanwhile.
- **Instruction rate.** The original machine ran one instruction in 330 ns.
  Here a PE instruction costs 2 clocks, so matching that rate needs only about
  6 MHz. No clock frequency is built in.
- **Step counts of the listed operations.**
  - 3-bit data input: 3 PE instructions.
  - Self windowing: 6 PE instructions (`LDA w; OR N w; OR E w; OR S w; OR W w; AND img -> w`).

  Both match the original step counts. The original also lists a 41-step
  filter, but not its kernel, so that one has not been reproduced.

## Target tracking, as exercised by the end-to-end test

The end-to-end testbench acts as the host and runs the following program twice:

1. `FRM 7`: transfer a frame, wait for it to finish, then latch.
2. Input the three top pixel bits: `MOV pix[5..7] -> m0..m2`.
3. Threshold them: `m3 = (v >= 5)`, computed as `m2 AND (m1 OR m0)` in three PE steps.
4. Self-window against the previous target: `m4 = m3 AND dilate4(m4)`.
5. Measure the area. A `PEI` that reads `m4` with SUM capture, then `LDS`
   and `ST`.
6. Take the first moments. The controller writes the column-index and
   row-index bit patterns into the buffer and drives them in from the Y and
   X borders. Each pattern is shifted across the array with `MOV N`/`MOV W`
   in a counted loop (`ALU sub`, `BR nonzero`). This builds one coordinate
   bit plane per bit. Then for each plane k the program computes
   area(m4 AND plane k) and accumulates sum = 2·sum + area. The results are
   Σx and Σy; the centroid is Σx / area, Σy / area.

A distractor that does not touch the previous target disappears in the
self-windowing step. That is how a tracker locks onto one target.

## Parameters

The top's defaults are the full system: 128 x 128 PEs in 16 x 8 chips, a
32 x 65536 main memory, 24 local memory bits and 8-bit pixels.

| Parameter | Default | Origin |
|---|---|---|
| `ROWS`, `COLS` | 128 | sensor and PE array resolution |
| `CHIP_ROWS`, `CHIP_COLS` | 8, 16 | PEs per FPGA. Which of 16 and 8 is the width was chosen here. |
| `MAIN_DEPTH` | 65536 | main memory 32 x 64k |
| `BUF_LINES` | 16 | own choice |
| `ADC_CYCLES` | 4 | own choice (sensor model only) |

`ROWS` and `COLS` must be multiples of the chip size. The end-to-end test
uses 32 x 32.

## Choices made here rather than taken from the original

- **Both instruction sets.** Encoding, opcodes, the A←R chaining, and B as a
  write mask.
- **Readout direction.** Pixels are read out one column at a time, and each
  PE row has its own shift register. The original's text says both "selected
  row" and "selected column". Its figure shows a shift register along each PE
  row fed 128-wide, and that is what is built.
- **Chip orientation.** Each chip is 16 PEs wide and 8 high.
- **Border I/O.** X enters on the west and leaves on the east; Y enters on the
  north and leaves on the south. The buffer's size and word mapping are also
  chosen here.
- **Sensor model.** The conversion latency and the scene-writing port.
- **Memory behaviour.** Main memory reads are synchronous with one clock of
  latency, and the controller wins write collisions.

## Simulation

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. Block tests build with Verilator 5, for
example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_s3pe \
    rtl/cpv_pkg.sv rtl/s3pe.sv tb/tb_s3pe.sv
./obj_dir/Vtb_s3pe
```

Testbenches that need more modules find them through `-y rtl`, or you can
list the files.

Which sizes were simulated:

- The end-to-end test `tb_cpv_system` runs the tracking program above on a
  32 x 32 system made of 4 x 2 chips. It checks:
  - the frame-transfer clock count;
  - the frame-1 area and the self-windowed frame-2 area;
  - the masked write;
  - Σx and Σy;
  - a border capture.

  It also counts every mechanism it used.
- The summation circuit, sensor model, frame sequencer, main memory and buffer
  were simulated at full size (128 x 128, 64k words).
- `pe_chip` was simulated at its full 16 x 8 size.
- The 128 x 128 `pe_array` and `cpv_system` compile and lint at full size.
  The end-to-end test was also run once at the full 128 x 128 and passed all
  21 checks, including the 768-clock frame transfer. The simulation takes
  seconds, but a Verilator build of 16384 PEs takes about 13 minutes of C++
  compilation. That version is therefore not kept among the testbenches, and
  the regular end-to-end test stays at 32 x 32.

For each module there is also a deliberately broken copy (for example, an
adder that drops a carry term, or a branch that tests only one bit). The
block's testbench has been confirmed to fail when run against it.
