# Pipelined loop sets for a Fast DCT: two FSMs synchronised by per-element ready flags

A 2-D DCT of 8x8 blocks is usually written as two loop sets in sequence:
a column pass that reads the image and writes an intermediate array `tmp`,
and a row pass that reads `tmp` and writes the result `dct_o`. Mapped to
hardware in the obvious way, one global controller runs the first loop set
to completion and only then starts the second.

This design runs the two loop sets at the same time. Each has its own FSM
and datapath, and both start in the same clock cycle. They share the
intermediate array through a dual-port memory. Next to that memory is a
dual-port table with one bit per element. The column pass sets an element's
bit when it stores it. The row pass reads the bit together with the data
and takes the element only if the bit is set; otherwise it reads it again.
No FIFO is needed, and no handshake between the two controllers. This works
even though `tmp` is written column by column and read row by row, which is
why a FIFO could not be used here.

At the default size (5400 blocks, a 720x480 image) a run takes 777,730
cycles. Running the two passes one after the other on the same datapaths
would take 1,555,200 cycles.

## The computation

Arrays hold 16-bit signed elements, 64 per block, stored block after block
and row-major inside a block. For `NUM_FDCTS` blocks each array has
`SIZE = 64*NUM_FDCTS` elements.

**Column pass (Loops 1,2, FSM 1).** A pointer `i1` starts at 0. For each
block and each column `j = 0..7`, the pass does three things:

- It loads the eight elements `img[i1 + 8k]`, `k = 0..7`: one column,
  stride 8.
- It computes the 8-point DCT `F0..F7` of that column.
- It stores `F[k]` to `tmp[i1 + 8k]` and sets `tab[i1 + 8k]`.

`i1` then advances by 1. After the eighth column it advances by a further
56, to the next block. So `tmp` is produced in the order 0, 8, 16, ..., 56,
1, 9, 17, ... inside each block.

**Row pass (Loop 3, FSM 2).** For row `r = 0 .. 8*NUM_FDCTS-1`, with
`i1 = 8r`, the pass does three things:

- It loads `tmp[i1 + 0] .. tmp[i1 + 7]`, waiting on each flag.
- It computes the 8-point DCT of that row.
- It stores the results to `dct_o[i1 + 0] .. dct_o[i1 + 7]`.

So `tmp` is consumed in the order 0, 1, 2, 3, ...

## How the two controllers stay in step

This is the heart of the design. The rules are few, but each one matters.

**The wait rule.** FSM 2 presents one address to both the `tmp` memory and
the ready table (`flag_table`) in the same cycle. Both are synchronous
RAMs, so data and flag come back together one cycle later.

- If the flag is set, the element goes into the datapath and the next
  element's address is presented in that same cycle.
- If the flag is not set, the same address is presented again, and
  `loop3_stall` is high for that cycle.

The next address depends on the flag that has just returned. So no read is
ever wasted, and each unset flag costs exactly one cycle.

**Data and flag are written together.** FSM 1 writes `tmp[a]` and sets
`tab[a]` in the same cycle, at the same address.

**Both memories are read-first.** A read of an address that is written in
the same cycle returns the old contents, in both memories. So when FSM 2
reads an element in the cycle it is stored, it sees the old data with the
flag still clear, and it reads again. It can never see new data with an old
flag, or an old flag with new data. If you replace `dp_ram` or `flag_table`
with vendor RAMs, keep this property. Write-first on both memories would
also be safe. Mixing the two behaviours is not safe.

**Clearing the table.** The scheme needs a table that starts every run all
zero. Clearing all `SIZE` bits before each run would cost `SIZE` cycles,
more than the run itself saves. Instead, `flag_table` keeps a phase bit:

- `start` toggles the phase.
- A set writes the current phase value into the entry.
- An entry reads as ready when it equals the current phase.

Every element is written exactly once per run. So when a run ends, every
entry holds that run's phase, and all of them read as "not ready" once the
next run toggles the phase. Only the very first run needs real zeros. For
that, the table sweeps itself to zero after reset, one entry per cycle
(`SIZE` cycles, with `ready` low meanwhile).

The phase trick depends on that one-write-per-element property. A loop set
that writes an element twice, or that leaves some elements unwritten, would
need an explicit clear. The scheme itself does not handle repeated writes
to one element either: FSM 2 could take the first value.

**Ordering.** The row pass can never finish before the column pass, because
the last row of the last block needs the last column's stores. The top
asserts this.

## Schedule and performance

Each loop set has one port on each memory it uses. Per column or row it
spends:

| phase | cycles | what happens |
|-------|--------|--------------|
| LOAD  | 9 (+ waits) | 8 pipelined reads; the last value arrives one cycle later |
| COMP  | 1 | `F0..F7` registered |
| STORE | 8 | one result per cycle |

That gives 18 cycles per column or row, and 144 per block, for each pass.

Row 0 of a block needs elements 0..7. These are the first store of each of
the block's eight columns. So FSM 2 starts right behind FSM 1 and waits on
almost every element of the first block: about 130 wait cycles with this
schedule. After that, FSM 1 is always one block ahead, and FSM 2 never
waits again. Timing does not depend on the data.

- Column pass: `144*NUM_FDCTS` cycles.
- Whole run: `144*NUM_FDCTS + waits` cycles, about `144*NUM_FDCTS + 130`.
- Two passes one after the other: `288*NUM_FDCTS` cycles.

With this balanced schedule the gain tends to 2 as the number of blocks
grows: 1.63 at 4 blocks, 2.00 at 5400. The scheme was originally evaluated
on 5400 blocks against a global-FSM implementation, and showed a speedup of
1.48. That figure depends on the datapaths and memory ports of that
implementation, which are not reproduced here.

## Arithmetic of the DCT (`dct8_kernel`)

The datapath needs an 8-point DCT. This one is a direct sum of products
with coefficients `round(2^13 * cos((2n+1)k*pi/16))`. It is not a fast
butterfly network. Only the output scaling is fixed by the stores of the
column pass:

- `F0` and `F4` are stored unshifted. Here they are signed sums of the
  inputs, with no multiplication. `F4` therefore carries a gain of sqrt(2)
  compared with a textbook DCT.
- `F1, F2, F3, F5, F6, F7` have 13 fraction bits and are shifted right by
  13, arithmetically.
- Every result is truncated to 16 bits, as a C `short` would be.

The row pass uses the same kernel; its scaling is this design's own choice.
Any other 8-point DCT with the same interface can be dropped into
`dct8_kernel`. The results will then differ in their low bits from the
reference model in `tb/tb_dct_ref.sv`.

To stay free of overflow, inputs should fit in 9 signed bits (pixel values
or pixel differences). Larger inputs wrap, as they would in 16-bit C code.

## Modules

| file | role |
|------|------|
| `rtl/lp_pkg.sv` | constants (`N=8`, `M=64`, 16-bit data, 13 fraction bits), types, coefficient function |
| `rtl/loop_pipeline_top.sv` | top: memories, ready table, both FSMs and datapaths |
| `rtl/loop12_fsm.sv` | FSM 1: column pass addresses, loads, compute, stores and flag sets |
| `rtl/loop3_fsm.sv` | FSM 2: row pass with the wait rule, stores to `dct_o` |
| `rtl/loop_datapath.sv` | datapath of one loop set: 8 input registers, kernel, 8 result registers, store selector (two instances) |
| `rtl/dct8_kernel.sv` | combinational 8-point DCT |
| `rtl/dp_ram.sv` | one array memory: one write port and one synchronous read-first read port (`img`, `tmp`, `dct_o`) |
| `rtl/flag_table.sv` | the 1-bit ready table with reset sweep and phase bit |

Parameters of the top are `NUM_FDCTS` (default 5400), `SIZE = 64*NUM_FDCTS`
and `ADDR_W = $clog2(SIZE)` (19 at the default). At the default size the
storage is as follows:

- Three 345,600 x 16-bit memories.
- One 345,600 x 1-bit table.
- About 620 flip-flops.
- Two kernels, each with 48 constant multiplications.

## Using the top

1. Reset (`rst_n` low). Wait for `ready`. The table clears itself in `SIZE`
   cycles, and the image may be loaded meanwhile.
2. Write the image through `img_we`, `img_waddr` and `img_wdata`.
3. Pulse `start` while `ready` is high. A `start` during a run is ignored.
4. `loop12_busy` and `loop3_busy` show the two passes. `loop12_done`
   pulses at the end of the column pass. `loop3_stall` marks the wait
   cycles. `done` pulses when the last row has been stored.
5. Read the result through `out_re` and `out_raddr`. `out_rdata` is valid
   one cycle after `out_re`.

Do not write `img` during a run. The next run can start straight away,
without a reset.

## Departures from the original scheme

The following choices are this design's own:

- The cycle schedule.
- The single port per loop set on each memory.
- Read-first memories.
- The phase bit.
- The self-clearing sweep after reset.
- The host interface.
- The DCT arithmetic.

The original scheme describes the structure and the synchronisation rule.
It does not give the DCT computations or any of the details listed above.
The global-FSM implementation it was compared against is not included.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/lp_pkg.sv tb/tb_dct_ref.sv tb/tb_loop_pipeline_top.sv \
    --top-module tb_loop_pipeline_top -Mdir obj && obj/Vtb_loop_pipeline_top
```

Substitute the testbench to run another one (the packages are listed first; `-y` finds the modules):

| testbench | what it checks |
|-----------|----------------|
| `tb_dct8_kernel` | kernel against the reference on fixed and random vectors |
| `tb_loop_datapath` | gather in random order, compute, result hold, store selection |
| `tb_dp_ram` | read-back, read-first collision, hold while not reading |
| `tb_flag_table` | sweep length, set/read, read during set, four runs reusing the table |
| `tb_loop12_fsm` | every address, capture index, compute and store of FSM 1; 144 cycles per block |
| `tb_loop3_fsm` | wait rule against a model in which elements appear in random order; stall count; 144 cycles per block plus waits |
| `tb_loop_pipeline_top` | end to end, 4 blocks, two runs without reset; checks every output; counts overlap, wait and table reuse |
| `tb_loop_pipeline_full` | one full-size run (5400 blocks) at the default parameters; checks every output and the cycle counts (a few seconds of simulation) |

`tb/tb_dct_ref.sv` is the reference model. It computes its coefficients
from `$cos` on its own, separately from the RTL package.
