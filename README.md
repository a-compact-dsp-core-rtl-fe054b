# DSP-lite: a compact microcoded DSP core with static floating-point arithmetic

DSP-lite is a small DSP core that sits beside a host processor in a system-on-chip.
It runs signal-processing kernels (filters, FFTs, DCTs) that were scheduled completely
at compile time. The core has no instruction decoder, no general register file, no
branch unit and no hardware for exponents. Its control is a list of 64-bit
microinstructions. Each one sets every multiplexer, address and unit control for one
clock cycle, and the list is replayed once per iteration of the kernel.

The core rests on two ideas:

* **Static floating point (SFP).** Every value is a 16-bit two's-complement fraction
  (sign bit, then 15 fraction bits, values in [-1, 1)). As in floating point, each
  value has an exponent, but the exponent is known at compile time and never stored.
  A compile-time range analysis decides where each value must be halved or doubled to
  stay within [0.5, 1) in magnitude. It then inserts those shifts into the schedule.
  The hardware needs only an adder, a fractional multiplier and a shifter, each with
  cheap 1-bit scalers. This costs about the same as integer arithmetic, and the
  precision stays close to that of floating point.
* **A stream interface unit (SIU) in place of a register file.** Each functional unit
  reads its operands from a small memory of its own, called its input queue. Every
  result goes back through a 4-by-4 switch into whichever queues the schedule names.
  Because data movement is fixed at compile time, the queues are plain addressed
  memories. Every address is supplied by the microinstruction.

This repository holds synthesizable SystemVerilog for the whole core: datapath, SIU,
sequencer, program memory, ping-pong I/O buffer and an AMBA AHB slave. It also holds
self-checking testbenches, including two complete kernels run through the bus.

## Block structure

```
            AHB slave  ──── registers (start, swap, program, remappers)
               │  │
   program ────┘  └──── host side of the ping-pong I/O buffer
   memory                        │
   1024 x 64                     │ (other bank)
      │                          │
   system controller ──► siu_engine ◄──── engine side of the I/O buffer
   (fetch, iterations,      │
    drain, bank select)     ├─ load unit  I ─┐
                            ├─ adder    + ───┤  result buses
                            ├─ multiplier x ─┤  ──► 4-by-4 switch ──► adder queue (2R/1W, 16)
                            └─ shifter  >> ──┘                    ├─► mult queue  (2R/1W, 16)
                                                                  ├─► shift queue (1R/1W, 8)
                                                                  └─► store register O
```

| Module | Role |
|---|---|
| `dsplite_top` | The core. Its only ports are an AHB slave port. |
| `ahb_slave` | Bus decoding, control and configuration registers, and host access to the memories |
| `system_controller` | Fetches slots `pc_start .. pc_start+N-1` repeatedly, counts iterations, drains the pipeline and owns the ping-pong bank select |
| `microcode_mem` | 1024 x 64-bit program memory with synchronous read |
| `io_buffer` | Two 2048 x 16-bit banks. One belongs to the engine and the other to the host. |
| `siu_engine` | The datapath: remappers, queues, switch, functional units and load/store unit |
| `siu_queue_mem` | Input queue: a register array with NR read ports, one write port and write-to-read bypass |
| `siu_switch` | The 4-by-4 crossbar from the result buses to the queues and to O |
| `addr_remapper` | Rotates virtual addresses from iteration to iteration |
| `sfp_adder`, `sfp_multiplier`, `sfp_shifter` | The three SFP units |
| `load_store_unit` | The I (load) and O (store) ports to the engine's I/O bank |
| `dsplite_pkg` | Widths, sizes, source codes and the microinstruction record |

## The SFP units

All units take their operands into input registers at the end of the issue cycle.
They compute in the next cycle and hold the result in an output register. A result is
therefore on its bus two cycles after issue, and the multiplier, which has one more
pipeline stage, needs three. The schedule must account for these latencies exactly,
because nothing in the hardware checks for hazards.

| Unit | Operation | Latency |
|---|---|---|
| adder/subtractor | 17-bit `(A >> sa) ± (B >> sb)`, then the output is either `sum[16:1]` (normalise, meaning halve) or `sum[15:0]` | 2 |
| multiplier | 16 x 16 fractional product. The duplicate sign bit is dropped, giving `P[30:15]`, or `P[29:14]` when the `<<1` normaliser is on. The product is rounded to nearest by adding the bit below the kept LSB. | 3 |
| barrel shifter | left shift, or right shift with sign or zero fill, by 0..15 bits | 2 |
| load (I) | word from the input half of the engine's I/O bank | 2 |

Because the adder works in 17 bits, a sum with the output normaliser on cannot
overflow. With the normaliser off, and in the multiplier's corner case -1 x -1, results
wrap around. There is no saturation, so the compile-time range analysis must prevent
overflow. The 1-bit scalers truncate, and only the multiplier rounds.

## How a schedule drives the SIU

This is the part that needs the most care when writing programs. A microinstruction
executed in cycle *t* does two independent things:

* **Read fields start operations.** `add_ra0/add_ra1`, `mul_ra0/mul_ra1` and `shf_ra`
  address the unit's own queue. The words read, together with the unit's control bits
  in the same microinstruction, are registered at the end of *t*. `ld_va` starts a
  load in the same way.
* **Write fields capture results.** `add_wsel/add_wa` (and the same pair for the
  multiplier and shifter queues) take the value that is on the selected result bus
  *during cycle t* and write it at the end of *t*. `st_sel/st_va` capture a result in
  the O register, and it is written into the output half of the I/O bank at the end of
  *t+1*.

An operation issued at slot *u* on a unit with latency *P* therefore lands in a queue
through the write fields of slot *u+P*. A later slot *v* reads it through its read
fields. If *v = u+P*, the queue's bypass delivers the word in the cycle it is written,
so no extra cycle of buffering is needed. Each queue has a single write port, so at
most one result per cycle can enter any one queue. The scheduler must resolve these
port conflicts, because nothing in the hardware arbitrates. One result may fan out to
several queues in the same cycle. An all-zero microinstruction is a no-op.

Source codes for the write selects: `0` none, `1` I (load), `2` adder, `3` multiplier,
`4` shifter. Store source: `0` none, `1` adder, `2` multiplier, `3` shifter.

### Microinstruction layout (bit 63 first)

| Bits | Field | Meaning |
|---|---|---|
| 63:60, 59:56 | `add_ra0`, `add_ra1` | adder operand addresses (adder queue) |
| 55:52 | `add_wa` | adder-queue write address |
| 51:49 | `add_wsel` | source written into the adder queue |
| 48:45 | `add_ctl` | `scale_a`, `scale_b`, `norm`, `sub` |
| 44:41, 40:37 | `mul_ra0`, `mul_ra1` | multiplier operand addresses |
| 36:33 | `mul_wa` | multiplier-queue write address |
| 32:30 | `mul_wsel` | source written into the multiplier queue |
| 29 | `mul_norm` | `<<1` normaliser on the product |
| 28:26 | `shf_ra` | shifter operand address |
| 25:23 | `shf_wa` | shifter-queue write address |
| 22:20 | `shf_wsel` | source written into the shifter queue |
| 19:14 | `shf_ctl` | `amt[3:0]`, `left`, `arith` |
| 13:8 | `ld_va` | virtual load address |
| 7:6 | `st_sel` | store source |
| 5:0 | `st_va` | virtual store address |

The 64-bit width is part of the original design, but this field split is not. It
follows from the queue depths chosen here (see *Sizes*).

## Rotating addresses

A periodic schedule uses the same microinstructions in every iteration. Values that
must survive into a later iteration, such as delay-line taps and filter states, would
therefore be overwritten unless their location moves. Each memory (the three queues,
the load port and the store port) has an `addr_remapper` with a stride register, a
bound register and an iteration offset:

    physical = (virtual - stride * iteration) mod bound

With bound 8 and stride 1, virtual address 3 is physical 3, 2, 1, 0 in iterations 0
to 3. A word written at virtual 3 in one iteration is read at virtual 4 in the next
iteration and at virtual 5 in the one after. Rotation happens at the clock edge that
ends the last slot of an iteration. Every access uses the offset of the cycle in which
it happens, and this matters when a pipelined operation completes in the following
iteration.

The offset is kept as a running sum (stride added modulo the bound once per
iteration), so no multiplier is needed. This design adds two conventions:

* Virtual addresses at or above the bound are not remapped. Coefficients can then
  stay in place in the same queue as a rotating history (the biquad testbench does
  this).
* A stride of `bound-1` walks forward by one word per iteration. The I/O remappers
  (bound 1024) use it to stream through a block of samples.

## Host view: bus map and run protocol

The AHB slave accepts 32-bit word transfers. It ignores HSIZE and treats every
non-idle transfer as a word. Writes have no wait states and reads have one. HRESP is
always OKAY.

| Byte address | Register or region |
|---|---|
| `0x0000` CTRL (W) | bit 0 start, bit 1 swap ping-pong banks. The swap takes effect only while idle. |
| `0x0004` STATUS (R) | bit 0 busy, bit 1 done, bit 2 bank owned by the engine |
| `0x0008` PC_START | first microinstruction of the program |
| `0x000C` PROG_LEN | N, the number of slots per iteration |
| `0x0010` ITER_COUNT | number of iterations to run |
| `0x0014` CYCLES (R) | busy cycles of the last run |
| `0x0020 + 8k` | stride of remapper k (0 adder queue, 1 multiplier queue, 2 shifter queue, 3 load, 4 store) |
| `0x0024 + 8k` | bound in bits 10:0, enable in bit 16 |
| `0x2000–0x3FFF` | program memory: entry = `addr[12:3]`, with `addr[2]` selecting the upper half |
| `0x4000–0x5FFF` | the host's I/O bank: word = `addr[12:2]`, data in bits 15:0, sign-extended on read |

Each 2048-word bank is split in two halves. Loads read words 0–1023 and stores write
words 1024–2047, so a block's inputs and results do not collide.

A typical sequence:

1. Write the microcode and the remapper registers.
2. Fill the free bank.
3. Swap the banks.
4. Write PC_START, PROG_LEN and ITER_COUNT, then start.
5. Poll STATUS until `done` is set.
6. Swap the banks again and read the results.

While a run is in progress, the host or a DMA can fill and drain the other bank. A run
of I iterations of N slots keeps the core busy for exactly `1 + N*I + 3` cycles: one
start cycle, then one cycle per slot, then three drain cycles so that the last store
completes. The result of an operation that finishes after the last slot is lost.
Software-pipelined programs therefore run a few extra iterations, as the FIR example
does.

Before each run the queues hold whatever the previous run left, and the remapper
offsets restart at zero. A short set-up program (one iteration) is the intended way to
place constants into the queues.

## Worked example: y[n] = a·x[n] + b·x[n-1]

`tb/tb_dsplite_top.sv` compiles this two-tap filter by hand into N = 4 slots.
Consecutive iterations overlap. In iteration k:

| Slot | Reads and issues | Writes and stores |
|---|---|---|
| 0 | load x[k]; shift y[k-2] right by 2 (bypass) | y[k-2] into the shifter queue; store y[k-2] |
| 1 | – | a·x[k-1] into adder-queue word 0 |
| 2 | a·x[k] (x[k] by bypass); adder: a·x[k-1] + (2b·x[k-2] >> 1), normalised | x[k] into multiplier-queue word 2; 2b·x[k-1] into adder-queue word 1; store y[k-2] >> 2 |
| 3 | 2b·x[k] with the `<<1` normaliser | – |

The product 2b·x[k-1] is written at adder-queue word 1. The adder queue rotates by one
word per iteration, so one iteration later the same product is read at word 2. This is
the one-iteration delay of the filter. Outputs appear two iterations after their
inputs, so the run lasts M + 2 iterations.

`tb/tb_dsplite_biquad.sv` runs a direct-form biquad in a 13-slot schedule that does
not overlap iterations. Its x and y histories rotate in the multiplier queue, and its
five coefficients sit above the bound. The published figure for a biquad on this core
is 16 cycles per sample. That schedule also carries the scaling shifts chosen by the
range analysis, which this hand schedule leaves out.

`tb/tb_dsplite_lattice.sv` runs a two-stage FIR lattice filter in 9 slots. Every
addition uses the output normaliser, so each stage halves its outputs. This is the
static floating-point bookkeeping in miniature: the data never overflow, and a
compiler would record an exponent of +1 per stage. One multiplication is issued a
slot later than its operands allow. Issued on time, its product would reach the adder
queue in the same slot as an adder result, and that queue has only one write port.

`tb/tb_dsplite_fft.sv` runs radix-2 decimation-in-time butterflies in 19 slots per
iteration. The butterfly uses the adder in subtract mode, with its input pre-scaler and
its output normaliser, so both outputs are `(A ± W·B)/4`. The load and store
remappers advance 6 and 4 words per iteration (strides 1018 and 1020, modulo 1024).
The testbench computes a complete 8-point FFT as three runs of four butterflies, and
the host reorders the data between stages. The result matches a floating-point DFT,
scaled by 1/64, to within about one LSB.

`tb/tb_dsplite_dct.sv` computes an 8x8 two-dimensional DCT. The 8-point row
transform is a 48-slot program with 22 multiplications and 28 additions. It uses an
even/odd factorisation, and every addition halves its result. The seven cosine
constants are held in multiplier-queue words 9–15. The program was placed by a list
scheduler with these rules:

* The operation with the longest remaining path is issued first.
* A result is placed in a slot only where every queue that consumes it has a free
  write port. An output also needs the store port free.
* Queue words are reused as soon as their last reader has issued.

Eight iterations transform the rows. The host transposes the result, and eight more
iterations transform the columns. The output is the orthonormal 2-D DCT divided by
16, within about one LSB.

## Sizes, and how far they can be trusted

| Quantity | Value | Origin |
|---|---|---|
| data word | 16 bit | original design |
| microinstruction | 64 bit | original design |
| unit latencies | adder, shifter 2; multiplier 3 | original design |
| adder width, 1-bit scalers and normalisers | 17 bit; two input `>>1`, output `>>1`; multiplier output `<<1` | original design |
| program memory | 1024 words | chosen to match an 8 KB program memory |
| I/O buffer | 2 x 2048 words | chosen to match an 8 KB data memory |
| queue depths | 16 / 16 / 8 | chosen: small register files of the size the original SIU area suggests, and the depths for which the fields fill 64 bits |
| virtual I/O address | 6 bits (64 words) | chosen to fit the 64-bit microinstruction. It holds one 8x8 block. |

The original design specifies these points only at the level of function. Their
realisation here is this design's own, and they are the first places to revisit when
matching a particular toolchain:

* the microinstruction fields;
* the write-to-read bypass;
* rounding only in the multiplier;
* the pass-through of addresses above the bound;
* the split of each I/O bank into an input half and an output half;
* the run, drain and swap protocol;
* the complete AHB register map.

The original queues were 1-read/1-write memories. Here the adder and multiplier queues
have two read ports each, matching the two-operand units drawn in the core's block
diagram.

Not included:

* the compile-time tool chain (range analysis, shift insertion, ILP scheduling, spill
  insertion), which produces the microcode;
* the 24-bit SFP variant;
* the host processor, the system DMA and the rest of the platform.

A stored value cannot be loaded back within a run. Loads see only the input half of
the bank and stores only the output half. The original tool chain spills values that
outlive the queues by storing them and loading them again, and this design cannot
do that. The DCT example works around it with a host transposition between its two
passes. Inside the engine, a value can still be parked in the shifter queue by a
shift of 0.

The lattice, FFT and DCT programs here are small schedules of this design's own, not
the published ones. Their cycle counts therefore differ from the published figures:
12 cycles for the lattice filter, 268 for the FFT and 688 for the 8x8 DCT.

## Simulation

Every testbench prints one line, `TB_RESULT checks=N failures=F`, and then finishes.
A watchdog ends a run that hangs. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dsplite_pkg.sv \
          tb/tb_dsplite_top.sv --top-module tb_dsplite_top -o sim
./obj_dir/sim
```

| Testbench | What it exercises |
|---|---|
| `tb_sfp_adder`, `tb_sfp_multiplier`, `tb_sfp_shifter` | Thousands of random operations against integer models, with exact latency checks |
| `tb_siu_queue_mem` | Random reads and writes with a reference array and the bypass |
| `tb_addr_remapper` | The bound-8/stride-1 rotation, random configurations and above-bound pass-through |
| `tb_siu_switch` | Every source and destination combination, including fan-out |
| `tb_load_store_unit` | Load latency 2 and store placement in the output half |
| `tb_io_buffer` | Bank ownership and swapping |
| `tb_microcode_mem` | Half-word writes and read-back |
| `tb_system_controller` | Fetch sequence, iteration steps, busy time and bank swap |
| `tb_ahb_slave` | Registers, pulses, memory paths and wait states |
| `tb_siu_engine` | A hand-scheduled program checked slot by slot, and a remapped loop |
| `tb_dsplite_top` | FIR example end to end at default sizes. It also checks that the bypass, iteration steps, stores, both bank swaps and read wait states each occurred. |
| `tb_dsplite_biquad` | Biquad end to end at default sizes, with a recursive feedback path |
| `tb_dsplite_lattice` | Two-stage lattice filter end to end, with scaling by the adder's normaliser |
| `tb_dsplite_dct` | 8x8 2-D DCT (two passes of eight 1-D transforms), bit-exact, plus comparison with a floating-point DCT |
| `tb_dsplite_fft` | 32 random butterflies and a complete 8-point FFT, bit-exact, plus comparison with a floating-point DFT |

All of these testbenches pass. The core has no parameters, so every top-level
testbench simulates it at its full size: 1024 program words, two banks of 2048 words
and queues of 16, 16 and 8 words. The largest workload simulated is the 8x8 DCT, at
2 x 388 busy cycles. The block-level testbenches also use the sizes the core uses. Each completes in well under a second. The end-to-end
checks compare the outputs with a bit-accurate integer model of the arithmetic. They
do not compare against floating point, so they test the hardware, not the quality of
any scaling plan.
