# Pipelined 4-point and 8-point Hadamard transform

The discrete Hadamard transform (DHT) multiplies a vector by a matrix whose
entries are all +1 or -1, so it needs no multiplier at all: only additions and
subtractions. This RTL computes the 4-point and 8-point transforms of 16-bit
two's-complement samples with a fully pipelined network of registered
carry look-ahead adders and subtractors. It accepts one new vector per clock.
A small prototype system wraps the 8-point core. That system reads samples
(for instance image pixels) from a 64 x 16 single-port RAM eight at a time,
transforms them, and writes the results back in place.

The structure follows a published FPGA implementation of the 4-point and
8-point fast Hadamard transform. Where this RTL had to choose something the
source leaves open, or where the source contradicts itself, the choice is
stated below and in the opening comment of each file.

## The transform and its output order

For N = 2^m points, `y(k) = sum_n H(k,n) x(n)`. The matrix is built by
Sylvester's recursion:

```
H2 = [1  1]      H2N = [HN  HN]
     [1 -1]            [HN -HN]
```

so `H(k,n) = (-1)^popcount(k & n)`. Written out for four points:

```
y0 = x0 + x1 + x2 + x3
y1 = x0 - x1 + x2 - x3
y2 = x0 + x1 - x2 - x3
y3 = x0 - x1 - x2 + x3
```

The outputs appear in this natural (Sylvester) order on both cores. For the
input (1, 2, 3, 4) the 4-point core gives (10, -2, -4, 0). For (1, ..., 8)
the 8-point core gives (36, -4, -8, 0, -16, 0, 0, 0).

The source's own simulation waveforms and its synthesized 4-point schematic
show outputs 1 and 2 exchanged. There, y1 = x0+x1-x2-x3 and the waveform
reads (10, -4, -2, 0). Its matrix, equations, stage table and block diagram
all give the order above, and this RTL follows them. If you need the other
order, swap the `sum` connections of `Inst_c_l_addr6` and `Inst_c_l_addr7`
in `dht_4.sv`.

Each row of H is orthogonal to the others, and `H * H = N * I`. So running
the transform twice returns the input scaled by N: the inverse transform is
the same hardware followed by a division by N.

## Arithmetic: 16 bits everywhere

Every port and every intermediate value is `W` = 16 bits wide, as in the
source. A 4-point output can need 18 bits and an 8-point output 19 bits.
Results that do not fit wrap modulo 2^16 without any indication.
Inputs such as (0x7FFF, 0x7FFF, 0x7FFF, 0x7FFF) wrap. With image data
(8-bit pixels) nothing wraps: 8 x 255 fits easily.

All modules take a `W` parameter. Set it to 18 (4-point) or 19 (8-point),
with the inputs sign-extended, and the transform becomes exact.

## Building blocks: AM and SM

| module | role | function |
|---|---|---|
| `c_l_addr` | adder module (AM) | `sum <= a_in + b_in + carry_in`, `carry_out <=` carry |
| `cla_sub`  | subtractor module (SM) | `sum <= a_in - b_in - carry_in`, `carry_out <=` borrow |
| `cla_core` | shared combinational adder | `s = a + b + cin` |

Both modules register their result on the rising clock edge: **every module
is one pipeline stage.** The source draws a clock pin on each module but
never says what it clocks; registering the output is the reading used here.
The carry pins are kept because the source's module symbols have them. The
transform ties `carry_in` to 0 and leaves `carry_out` open. On the
subtractor these pins are a borrow in and a borrow out. That is a choice of
this RTL.

`cla_core` is a block carry look-ahead adder. The source says only that the
modules use a "carry look-ahead" adder. Here the word is split into 4-bit
groups. In each group, every internal carry is a two-level AND-OR of the
bit generate/propagate signals and the group carry-in. The carry into the
next group comes from the group generate/propagate, so carries ripple only
from group to group. Subtraction is `a + ~b + 1` on the same core. A
synthesis tool targeting an FPGA will usually map either module onto its
dedicated carry chain anyway.

## 4-point core (`dht_4`): two butterfly layers

The 12 additions of the direct formula shrink to 8 = N log2 N modules in two
layers:

```
stage 1 (Inst_c_l_addr1..4)      stage 2 (Inst_c_l_addr5..8)
tmp0 = x0 + x1   (AM)            y0 = tmp0 + tmp1   (AM)
tmp1 = x2 + x3   (AM)            y1 = tmp2 + tmp3   (AM)
tmp2 = x0 - x1   (SM)            y2 = tmp0 - tmp1   (SM)
tmp3 = x2 - x3   (SM)            y3 = tmp2 - tmp3   (SM)
```

Ports: `clk`, `x0..x3`, `y0..y3`. **Latency 2 clocks.** There is no reset
and no valid flag: a vector applied before rising edge *t* shows its
transform after edge *t+1*. The pipeline accepts a new vector on every
clock. Track validity outside the core by counting clocks.

## 8-point core (`dht_8`): one butterfly layer plus two 4-point cores

From `H8 = [H4 H4; H4 -H4]`:

```
(y0..y3) = H4 (x0+x4, x1+x5, x2+x6, x3+x7)
(y4..y7) = H4 (x0-x4, x1-x5, x2-x6, x3-x7)
```

Four AMs and four SMs (`Inst_c_l_addr1..8`) form the sums and differences of
inputs four apart. The sums feed `Inst_dht_4_1`, which produces y0..y3. The
differences feed `Inst_dht_4_2`, which produces y4..y7. The total is
8 + 2 x 8 = 24 modules in three layers.

Ports: `clk`, `x80..x87`, `y80..y87` (y8k is row k). **Latency 3 clocks**,
and one vector per clock.

Row 6, for example, is y6 = x0 + x1 - x2 - x3 - x4 - x5 + x6 + x7. This
follows the 8 x 8 matrix and the block diagram of the source.

## Prototype system: running the core over a memory

In the source, the prototype flow loads image pixels into an FPGA memory
and transforms them there. The memory comes from the FPGA vendor's IP
library: a LUT-based single-port RAM of 64 words x 16 bits, with address
`a[5:0]`, data `d[15:0]`, `we`, `clk` and read data `spo[15:0]`. The flow
then stores the results back into memory. The source does not describe how
the data is moved. `dht_mem_ctrl` is this RTL's own sequencer for that job.

```
          +--------------------------- dht_system ---------------------------+
start --> | dht_mem_ctrl  --dht_x[0..7]-->  dht_8  --dht_y[0..7]-->  dht_mem_ctrl |
          +--------|mem_a, mem_d, mem_we|------------------^ mem_spo-------------+
                   v                                       |
              single-port RAM (outside): write on clk edge, asynchronous read
```

The memory sits outside `dht_system`, so any single-port RAM with an
asynchronous read and a synchronous write can be attached. That covers
distributed/LUT RAM on most FPGAs. A behavioural model is in
`tb/dist_mem_model.sv`.

The sequencer has four states (`dht_pkg::seq_state_e`):

| state | cycles | what happens |
|---|---|---|
| IDLE  | - | wait for `start` |
| READ  | POINTS | `mem_a = base + i`; `mem_spo` captured into input register `x[i]` |
| WAIT  | LATENCY | the core's pipeline fills with the (now constant) group |
| WRITE | POINTS | `mem_we = 1`, `mem_a = base + i`, `mem_d = y[i]` |

After each WRITE burst, `base` advances by POINTS. After the last group,
`done` pulses for one clock and the sequencer returns to IDLE. A pass over
the memory takes `1 + (DEPTH/POINTS) * (2*POINTS + LATENCY)` clocks from
the start pulse to `done`. With the defaults that is 1 + 8 x 19 = 153
clocks. `start` is ignored while `busy`. `rst_n` is an asynchronous,
active-low reset. Only the sequencer has a reset: the datapath needs none,
because it flushes within 3 clocks.

Reads and writes never overlap, so a single port is enough. The results
overwrite the samples they came from. Starting a second pass therefore
applies the transform again and leaves `N * x` in memory. The end-to-end
test relies on this.

`dht_system` has these parameters:

| parameter | default | meaning |
|---|---|---|
| `POINTS` | 8 | 8 uses `dht_8`; 4 uses `dht_4` alone (latency 2) |
| `W` | 16 | sample width |
| `DEPTH` | 64 | memory words; must be a multiple of POINTS |
| `AW` | 6 | memory address width |

## Where this RTL departs from or goes beyond the source

- Output order is the matrix order, not the order of the source's waveforms
  and 4-point schematic (see above).
- Each adder/subtractor module registers its output, which gives a 2-clock
  (4-point) and 3-clock (8-point) latency. The source also reports a
  "maximum combinational path delay" for its cores, which a fully registered
  pipeline would not have. That figure cannot be reproduced from this RTL.
- The internals of the carry look-ahead adder (4-bit groups) and the borrow
  meaning of the subtractor's carry pins are this RTL's choices.
- The memory sequencer, its handshake and the in-place write-back are this
  RTL's own. The memory itself is not included.
- Loading an image into the memory and reading the results out is left to
  the user. In the source, that is done by the FPGA tool's memory
  initialisation file and by host software.
- Timing and area results of the source (about 285 MHz for 4 points and
  238 MHz for 8 points on a Spartan-3) are properties of that tool flow.
  Nothing here reproduces or checks them.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_c_l_addr`, `tb_cla_sub` | 1,200 random and corner-case operands (full carry/borrow chains, signed wrap) at W = 16 and W = 7; one-clock latency |
| `tb_dht_4`, `tb_dht_8` | a new vector every clock (600 vectors: the worked examples, overflow corners, random); every output compared with `sum_n (-1)^popcount(k&n) x(n) mod 2^16` exactly 2 or 3 clocks later |
| `tb_dht_mem_ctrl` | sequencer with a stand-in core of the same latency that scrambles lane order; memory contents, 153-cycle pass, one `done` pulse, `start` ignored while busy, two passes |
| `tb_dht_system` | whole system at default parameters: 64-sample memory, forward pass checked against the reference (including the (1..8) example and wrapping groups), second pass checked against 8·x; counts read, wait and write-back phases, `done` pulses and wrapped results, and requires each to occur |
| `tb_dht_system_4pt` | the same with `POINTS = 4` (161-cycle pass, second pass gives 4·x) |

Each of these testbenches was also run against a deliberately broken copy of
its module, and each caught the fault. The faults were: carry-in ignored,
subtractor operands swapped, y1/y2 exchanged, one x(i)-x(i+4) pair reversed,
one clock too little waiting, and two core lanes crossed in the system.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dht_pkg.sv \
    tb/tb_dht_system.sv --top-module tb_dht_system -Mdir obj -o sim
./obj/sim
```

Substitute any other testbench name. The package `rtl/dht_pkg.sv` must come
first; the remaining files are found through `-Irtl -Itb`. All the
testbenches finish in well under a second. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/dht_pkg.sv rtl/<module>.sv`.
The only warnings left are for the intentionally open `carry_out` pins, for
package constants a given module does not use, and for the reset in the
sequencer's assertion.

## Files

- `rtl/dht_pkg.sv`: width, latencies, memory size, sequencer state type
- `rtl/cla_core.sv`: block carry look-ahead adder
- `rtl/c_l_addr.sv`, `rtl/cla_sub.sv`: registered adder and subtractor modules
- `rtl/dht_4.sv`, `rtl/dht_8.sv`: the transform cores
- `rtl/dht_mem_ctrl.sv`: memory sequencer
- `rtl/dht_system.sv`: top level, core plus sequencer, memory port brought out
- `tb/dist_mem_model.sv`: behavioural single-port RAM (64 x 16, asynchronous read)
- `tb/tb_*.sv`: testbenches
