# A TPU-like neural-network accelerator in SystemVerilog

This is a small inference accelerator built like Google's TPU, meant as a
realistic machine-learning benchmark circuit for FPGA architecture studies.
At its core is an 8x8 output-stationary systolic array. It multiplies two
8x8 int8 matrices per operation and sends the result straight through a
fixed post-processing chain:

1. partial-sum accumulation;
2. normalization;
3. average pooling;
4. ReLU or TanH activation.

The result is written back into the memory that holds the activations. One
layer's output is therefore the next layer's input, and a whole network runs
from two on-chip memories without the host touching the data between layers.

Next to it is the design it grew from. That is a stand-alone 4x4 systolic
multiplier behind an AXI4-Lite register slave, first brought up next to an
ARM host on a PYNQ board. Both are in this RTL. They stand side by side
under one top, `tpu_system_top`, and share only the clock and reset.

Everything is int8 with two's-complement wrap-around. Products and sums keep
their low 8 bits; there is no widening and no saturation. This keeps the
circuit small and regular, as a benchmark needs. The price is that results
wrap as soon as a dot product leaves -128..127.

## Block structure

```
            APB                       host BRAM ports (load / unload)
             |                            |                 |
      +-------------+              +-------------+   +-------------+
      | apb_config  |              |  BRAM A     |   |  BRAM B     |
      | (registers) |              |  64b x 2048 |   |  64b x 2048 |
      +-------------+              |  activations|   |  weights    |
             |                     +-------------+   +-------------+
      +-------------+    read / write   |   ^              |
      |  tpu_ctrl   |-------------------+   |              |
      |  (FSM)      |              +----------------+  +----------------+
      +-------------+              | systolic_setup |  | systolic_setup |
                                   |  (A, columns)  |  |  (B, rows)     |
                                   +----------------+  +----------------+
                                          | lanes from left   | lanes from top
                                       +------------------------------+
                                       | matmul: 8x8 grid of pe       |
                                       +------------------------------+
                                          | one column of C per clock
                 accumulators -> norm -> pool -> activation --> BRAM A (write-back)
```

| File | Role |
|---|---|
| `tpu_pkg.sv` | Register addresses, bit positions, accumulator-mode and activation enums |
| `bram_dp.sv` | True dual-port RAM, synchronous read, 1 clock latency |
| `apb_config.sv` | APB slave and all configuration / status registers |
| `tpu_ctrl.sv` | Operation FSM and the accelerator-side port of BRAM A |
| `systolic_setup.sv` | Reads N words per BRAM and skews them into the array |
| `pe.sv` | Processing element: operand flops, multiplier, product flop, accumulator |
| `matmul.sv` | N x N grid of `pe`, result capture and column shift-out |
| `accumulators.sv` | N x N partial-sum store with Disabled / Save / Add modes |
| `norm.sv` | (x - mean) * inv_var per lane, with a validity mask |
| `pool.sv` | Average of 2 or 4 adjacent lanes |
| `activation.sv` | ReLU, or an 11-segment piece-wise-linear TanH |
| `tpu_top.sv` | The TPU-like accelerator |
| `matmul_axi_ip.sv` | The 4x4 AXI4-Lite prototype peripheral |
| `tpu_system_top.sv` | Both designs side by side |

Every `tb/<module>_tb.sv` is a self-checking testbench for the module of the same name.

## Data layout and how a large layer is tiled

Each BRAM word is 64 bits and holds 8 int8 elements; byte i is lane i.
The two operands are stored in different orders:

- **A (activations, BRAM A)** is stored column by column. Word k holds
  column k of the 8x8 tile, A[0..7][k].
- **B (weights, BRAM B)** is stored row by row. Word k holds row k,
  B[k][0..7].

With this layout, the word read in clock k carries exactly the operands
that step k of the dot products needs. Element k of every row of A and
element k of every column of B arrive together.

**C (results)** comes out one column per clock and is written to BRAM A
column by column, in the same order as A. That is why a result can
immediately be the A operand of the next layer.

Each matrix has a start address and a stride, both counted in words. Word
k of an operation is read from `base + k*stride`, and result column j is
written to `addr_c + j*stride_c`.

**Matrices larger than 8x8** are split into 8x8 tiles. Take a 24x24 matrix
stored column-major: each column is 3 words. Tile row ti is word ti of
each column, so every tile uses stride 3.

One output tile needs three passes over K:

1. The first pass runs in Save mode. The accumulators take the 8x8 partial
   result, and nothing is written to memory.
2. The second pass runs in Add mode.
3. The third pass runs in Add mode. Each Add pass adds to the stored sums
   and writes the new sums out through normalization, pooling and
   activation. The last pass therefore leaves the finished tile in BRAM A.

The accumulators hold a single tile, so each output tile's passes must run
back to back. In the 24x24 example, a layer takes 9 tiles x 3 passes = 27
operations, and the testbench runs two such layers in a row.

Two points to note about tiling:

- An Add pass that is not the last also writes its intermediate result.
  The last pass overwrites it, so nothing goes wrong. The intermediate
  write also passes through norm/pool/activation, but the value stored in
  the accumulators is the raw sum.
- All passes of one tile use the same C address. The partial results
  therefore never survive in memory, and only the last pass's output,
  normalized, pooled and activated, remains.

## The systolic array and its timing

This is the part that needs the most care when changing the design.

**Operand skew.** `systolic_setup` starts reading when the start pulse
arrives, one word per clock, for N clocks. Lane i of each word is then
delayed by i clocks. If start is high in cycle s:

| Event | Cycle |
|---|---|
| Address of word k | s+1+k |
| BRAM data of word k | s+2+k |
| Lane i of word k at the array edge | s+2+k+i |

Row i of the array therefore sees A[i][k] at s+2+k+i, and column j sees
B[k][j] at s+2+k+j. Each PE passes its operands right and down with one
clock of delay. So PE(i,j) receives both A[i][k] and B[k][j] in the same
clock, s+2+k+i+j. Outside that window every lane carries zero. A PE's
accumulator therefore stops changing once the last operand pair has passed
through.

**PE pipeline.** Each `pe` has four steps:

1. operand flops;
2. multiplier into a product flop;
3. adder into the accumulator flop;
4. `a_out` and `b_out`, taken from the operand flops, feed the neighbours.

An operand pair reaches the accumulator 3 clocks after it appears at the
PE's inputs. The last pair arrives at PE(N-1,N-1) at s+2+(N-1)+2(N-1), so
every accumulator holds its final value by cycle s+3N+2.

**Capture and shift-out.** The outputs become ready as a wave from the
top-left corner to the bottom-right. The matmul does not write each result
as soon as it is ready. It waits for the whole wave, then copies all N x N
accumulators into an output register in cycle s+3N+2. From there it shifts
out one column per clock: column j is valid in cycle s+3N+3+j. `done`
rises after the last column, at s+4N+3.

Waiting costs a few clocks. In return, every memory word leaves the array
already in column order, with no transposing logic. The PE accumulators are
cleared by the next start, so a new operation can follow.

**Pipeline after the array.** The four stages each take one clock. Each
stage carries a valid bit, the column index and N lanes:

- `accumulators`
- `norm`
- `pool`
- `activation`

`tpu_ctrl` writes each valid column to BRAM A at `addr_c + col*stride_c`.
BRAM A's accelerator port is shared between two uses:

- the operand reads, which happen first;
- the result writes, in cycles s+3N+7 .. s+4N+6, long after the last
  read in cycle s+N.

The two never overlap.

**Whole operation.** START is written through APB. The start pulse follows
1 clock later. DONE rises 4N+9 clocks after the START write: 41 clocks at
N=8. That figure is:

- 1 clock to the start pulse;
- 4N+3 clocks of matmul;
- 4 clocks of pipeline drain;
- 1 clock to set DONE.

The matmul performs N^3 = 512 multiply-accumulates per operation. All 64
PEs work at once while the operands stream through. Peak throughput is 64
MACs per clock.

## Post-processing units

**Accumulators.** The ACCUM register sets the mode:

| Value | Mode | Behaviour |
|---|---|---|
| 0 | Disabled | Each column passes through unchanged |
| 1 | Save | The column is stored and nothing goes downstream |
| 2 | Add | The column is added to the stored one, stored, and sent on |

**Normalization.** Each element becomes `(x - MEAN) * INV_VAR`, keeping the
low 8 bits. This is the inference-time half of batch normalization: the
mean and the inverse variance are constants written by software, so no
divider is needed.

VALID_MASK marks the rows and columns of a tile that hold real data.
Element (i, j) is normalized only when mask bit i and mask bit j are both
set. Padding zeros of a partly filled tile therefore stay zero.

**Pooling.** The POOL_KERNEL_SIZE register sets the window: 1, 2 or 4.
Pooling works inside one output column, i.e. on one batch element. Output
lane i is the average of input lanes iW .. iW+W-1, and the upper lanes
become zero.

The average is an arithmetic right shift, which rounds toward minus
infinity. With window 1, or any other value, the data passes through.

**Activation.** ACTIVATION_CSR bit 0 selects the function:

- **0, ReLU:** `max(0, x)`.
- **1, TanH:** a piece-wise-linear `y = a*x + b`. A comparator chain finds
  which of 11 input ranges x falls in, and picks the slope a and intercept
  b from two 11-entry tables.

The int8 input -128..127 stands for about -4..4, and the output -127..127
for -1..1:

| x | y |
|---|---|
| x >= 90 | 127 |
| 39 .. 89 | 99 |
| 28 .. 38 | 2x + 46 |
| 16 .. 27 | 3x + 18 |
| 1 .. 15 | 4x |
| 0 | 0 |
| -15 .. -1 | 4x |
| -27 .. -16 | 3x - 18 |
| -38 .. -28 | 2x - 46 |
| -89 .. -39 | -99 |
| x <= -90 | -127 |

The product and the intercept are registered, and the add comes after the
register. This shortens the path through the multiplier.

Note that the table is not monotonic: 2x+46 reaches 122 at x = 38, and the
next segment is the constant 99. The coefficients are kept exactly as
given, so that results match the reference table. Anyone who wants a
smoother curve should change the 39..89 segment in `activation.sv`.

## Registers and the host sequence (`apb_config`, `tpu_ctrl`)

APB has zero wait states, and registers are decoded by their full address.

| Addr | Register | Meaning |
|---|---|---|
| 0x00 | ENABLES | bit 0 matmul, 1 norm, 2 pool, 3 activation |
| 0x02 | POOL_KERNEL_SIZE | bits 2:0, window 1/2/4 |
| 0x04 | START / DONE | bit 0 START, bit 31 DONE |
| 0x08 | MEAN | int8 |
| 0x0A | INV_VAR | int8 |
| 0x0E | MATRIX_A_ADDR | word address in BRAM A |
| 0x12 | MATRIX_B_ADDR | word address in BRAM B |
| 0x16 | MATRIX_C_ADDR | word address in BRAM A for the result |
| 0x20 | VALID_MASK | N bits, reset all ones |
| 0x24 | ACCUM | 0 Disabled, 1 Save, 2 Add |
| 0x2E | A stride | words, reset 1 |
| 0x32 | B stride | words, reset 1 |
| 0x36 | C stride | words, reset 1 |
| 0x3A | ACTIVATION_CSR | bit 0: 0 ReLU, 1 TanH |

One operation runs like this:

1. Load A and B through the host BRAM ports.
2. Write the configuration registers.
3. Write 1 to 0x04. This sets START and clears DONE.
4. Poll 0x04 until bit 31 is set. The controller clears START when it sets
   DONE, and `done_irq` pulses for one clock at the same moment.
5. Read the results through the host port of BRAM A.

If the matmul enable is 0, a START completes at once and memory is not
touched. While an operation runs, the host must not write BRAM A in the
regions being read or written. Nothing in the hardware prevents it.

`tpu_ctrl` states: IDLE -> MATMUL (waits for the matmul's `done`) ->
DRAIN (4 clocks for the pipeline) -> FINISH (sets DONE) -> IDLE.

## The 4x4 prototype peripheral (`matmul_axi_ip`)

This peripheral uses the same `systolic_setup` and `matmul` modules at
N=4. Around them are:

- an AXI4-Lite slave with ten 32-bit registers;
- a small FSM;
- three block-RAM master ports (A, B, C), each with a 15-bit byte address,
  32-bit data and 4-bit write enables.

These ports fit a vendor block-RAM port, which the host fills through a
BRAM controller or a DMA engine.

| Addr | Register |
|---|---|
| 0x00 | START: write 1 to run, write 0 to clear |
| 0x04 | DONE: read 1 when finished, write 1 to clear |
| 0x14 | STATE: 0 idle, 1 running, 2 done |
| 0x24 | SANITY: reads 0x4D4D0404 |
| others | Scratch read/write registers |

Memory layout:

- BRAM A holds A column by column: word k at byte address 4k, element
  A[i][k] in byte i.
- BRAM B holds B row by row.
- C is written column by column at byte addresses 0, 4, 8, 12.

The host sequence is:

1. write 0 to START and DONE;
2. load the BRAMs;
3. write 1 to START;
4. poll DONE;
5. write 0 to START and 1 to DONE;
6. read C.

DONE rises 4N+4 = 20 clocks after the FSM's start pulse. A host program
that reads C's word i as row i gets the transpose of A*B. Keep this in mind
when comparing with a software result.

## What is specified and what is this design's choice

The following comes from the reference description:

- the block structure and dataflow;
- the 8x8x8 int8 array with one word per clock from each BRAM;
- the operand skew and output-stationary PEs;
- waiting for all results before shifting columns out;
- column-major A and C, row-major B;
- write-back to BRAM A;
- the three accumulator modes;
- normalization as (x - mean) * inverse variance with a validity mask;
- pooling windows 1, 2 and 4;
- ReLU and the 11-segment TanH table with registered products;
- two 64-bit x 2048 BRAMs;
- the APB register addresses listed above, except 0x24 and 0x2E;
- the prototype's ten AXI registers, START/DONE/STATE/SANITY addresses and
  BRAM port widths.

The following are this design's own choices, and are the places to check
first when matching another implementation:

- **Addresses.** The A-stride register (0x2E) and the accumulator-mode
  register (0x24, encoding 0/1/2) are not specified.
- **Stride unit.** Strides are counted in words, not elements. A 24x24
  matrix therefore uses stride 3, not 24.
- **START/DONE handshake.** A write to 0x04 loads START and clears DONE.
  Finishing sets DONE and clears START.
- **`done_irq` output.** The reference design only polls.
- **Exact clock counts.** These follow from the pipeline described above.
  The FSM's state encoding is also this design's.
- **Save mode sends nothing downstream.** Add sends its sum downstream.
- **Pooling.** It works inside one column, rounds toward minus infinity,
  and pads the upper lanes with zeros.
- **Wrap-around arithmetic.** Normalization products keep the low 8 bits.
- **Reset.** The reset is synchronous; APB and AXI reset are active low.
  Reset values are strides 1, mask all ones, window 1.
- **Memory behaviour.** BRAM reads have one clock of latency. Writes are
  whole-word, and on a write the read port returns the old data.
- **Prototype details.** The SANITY value, the state encoding and the AXI
  handshake details are this design's.

Departures and limits:

- **Host side not included.** DMA, interconnect, processor and DRAM are
  not part of this RTL. The TPU is driven through APB and raw BRAM ports.
  The prototype's memories are outside the module.
- **Port counts differ.** The port list is not the original one, so
  primary I/O counts from place-and-route reports do not compare.
- **No overflow protection.** There is no saturation and no widened
  accumulation.

## Simulating

Every testbench is self-contained and prints
`TB_RESULT checks=<n> failures=<n>` at the end. It also has a watchdog, so
a hang is reported as a failure. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/tpu_pkg.sv tb/tpu_system_top_tb.sv \
          --top-module tpu_system_top_tb -Mdir obj_sys -o sim
./obj_sys/sim
```

Replace the testbench name for any other block, e.g. `tb/matmul_tb.sv` with
`--top-module matmul_tb`. `-Irtl` lets Verilator find the modules by file
name. Adding `+verilator+rand+reset+2` to the simulation run starts all
state at random values. The testbenches do not rely on zero-initialised
state.

| Testbench | What it covers |
|---|---|
| `tpu_system_top_tb` | End to end, at the default size |
| `tpu_top_tb` | The TPU part alone |
| `matmul_axi_ip_tb` | The prototype peripheral |
| `matmul_tb`, `systolic_setup_tb`, `pe_tb` | The array, skew and PE against reference arithmetic |
| `accumulators_tb`, `norm_tb`, `pool_tb`, `activation_tb` | The post-processing stages; the TanH test is exhaustive over all 256 inputs |
| `apb_config_tb`, `tpu_ctrl_tb`, `bram_dp_tb` | Registers, FSM timing, memory |

The end-to-end test `tpu_system_top_tb` runs with every parameter at its
default:

- **Layer test:** two fully connected layers of 8 inputs x batch 8 x 8
  neurons. The first uses normalization and ReLU, the second pooling by 2
  and TanH.
- **Tiled test:** two 24x24 layers, 27 operations each, with strides 3.
  It exercises Save/Add accumulation, the validity mask, pooling by 4 and
  TanH.
- **Matmul disabled:** one START with the matmul turned off.
- **Prototype:** two 4x4 multiplies on the prototype peripheral.

A reference model in the testbench predicts every word written to BRAM A.
The testbench also counts each mechanism and fails if one never happened:

- each accumulator mode;
- normalization and the mask;
- pooling by 2 and by 4;
- ReLU and TanH;
- non-unit strides;
- the matmul-disabled start;
- the prototype run.

It also checks the operand read rate, N words in N consecutive clocks, on
every operation. It finishes in well under a second.

## Changing the size

`N` (array size), `DWIDTH` (element width) and `AWIDTH` (BRAM depth) are
parameters of `tpu_top`. The BRAM word is `N*DWIDTH` bits. The TanH
breakpoints and the pooling windows are written for 8-bit data, and the
register map assumes N <= 32 for the validity mask. The unit testbenches
run at N=8, the prototype's at N=4; other sizes have not been simulated.
