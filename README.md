# MathRAM: a block RAM that computes

An FPGA block RAM holds far more bits on its bitlines than it can hand to the
routing: a 16 Kbit block is physically 128 rows by 128 columns, yet only 32
bits per port leave it. A MathRAM puts a tiny 1-bit processing element (PE)
under every one of those 128 columns and uses the RAM's two ports to read two
rows at once. One clock cycle then reads one bit of two operands for 128
elements, combines them in the PEs and writes one result bit per element back
into a third row, all without the data ever touching the FPGA routing.
Arithmetic is done bit-serially, so any precision (4-bit, 8-bit, 13-bit,
floating-point) is just a different instruction sequence.

This repository is SystemVerilog RTL for that block, following the MathRAM
architecture proposed for FPGAs (FPGA 2022): the PE, the dual-port array, the
control that turns a RAM write into an instruction, the soft-logic
transposer that prepares data, and a column of chained MathRAMs. Where the
published description leaves a detail open, the choice made here is stated
below and in the opening comment of each file.

## Two modes

A configuration bit selects the mode of each block:

* **Memory mode.** An ordinary true dual-port 16 Kbit RAM. Its width is
  configurable per block: 16K x 1, 8K x 2, 4K x 4, 2K x 8, 1K x 16 or 512 x 32.
  No address is special.
* **Hybrid mode.** The block is a 512 x 32 RAM *and* a 128-lane SIMD engine.
  A port-A write to address `0x1ff` is not stored: its data word is an
  instruction, executed in that same cycle. All other addresses are ordinary
  storage, usable from both ports, and results are read like any other data.
  In silicon the hybrid-mode cycle is longer (read, compute and write happen in
  one cycle; roughly 25 % slower than a plain BRAM) but that is a timing
  property and does not appear in the RTL.

## The data layout: everything is transposed

Computation works on *columns*. Element `e` of a vector lives in column `e`,
and its bit `m` lives in row `base + m`. An 8-bit vector of 128 elements
therefore occupies 8 rows; an instruction that reads rows `i+m` and `j+m` and
writes row `k+m` processes bit `m` of all 128 elements at once.

With 32-bit hybrid-mode words, address `a` maps to row `a[8:2]` and columns
`32*a[1:0] .. 32*a[1:0]+31`, so one row is four consecutive addresses. (In
general the bit address `address * width` is split into row = upper 7 bits,
first column = lower 7 bits.) Row 127, columns 96..127 is the reserved word at
`0x1ff`; the other 31 words of that row, and any instruction's destination,
can still use it.

Data arrive from the fabric in normal (element) order, so they must be
transposed on the way in: that is the job of `mathram_swizzle`.

## The instruction word

| bits    | field         | meaning |
|---------|---------------|---------|
| 31:30   | `predicate`   | which columns write: 0 all, 1 where mask = 1, 2 where carry = 1, 3 where carry = 0 |
| 29:28   | `write_sel`   | what is written: 0 external data, 1 TR output, 2 sum (TR xor carry), 3 neighbour's TR |
| 27      | `port`        | 0: write through port 1 (A), 1: through port 2 (B) |
| 26      | `c_en`        | carry latch loads majority(A, B, carry) |
| 25      | `m_en`        | mask latch loads the TR output |
| 24:21   | `truth_table` | TR_3..TR_0, the output for (A,B) = 11, 10, 01, 00 |
| 20:14   | `dst_row`     | row written |
| 13:7    | `src2_row`    | row sensed on port 2 (operand B) |
| 6:0     | `src1_row`    | row sensed on port 1 (operand A) |

The package `mathram_pkg` holds this as the packed struct `instr_t`, the
enums for the codes and `make_instr()` to build words. The field positions of
predicate, write_sel, port, c_en, m_en and truth_table follow the published
format; the order of the three row fields and the numeric codes of the
predicate and write-select muxes are this implementation's choice.

## The processing element

One PE (`mathram_pe`) per column, all driven by the same decoded instruction:

```
 A (port 1) ─┬──────────────┐
 B (port 2) ─┼─┐            │
             │ │   TR = truth_table[{A,B}] ──┬──> mask latch (m_en)
             │ │                             ├──> to both neighbour PEs
             │ │                             └─ xor carry ──> sum
             └─┴──> majority(A,B,carry) ──> carry latch (c_en)
 predicate = {1, mask, carry, ~carry}[pred_sel]
 write data port 1 = {d_in1, TR, sum, right PE's TR}[write_sel]
 write data port 2 = {d_in2, TR, sum, left PE's TR}[write_sel]
 we1 = wps1 & predicate & ~port      we2 = wps2 & predicate & port
```

With `truth_table` = XOR and `write_sel` = sum the PE is a full adder whose
carry is kept in the carry latch from one bit to the next. Any other 2-input
Boolean function is one instruction per bit. The mask latch, loaded from TR,
makes writes conditional per column (an `if` over the vector), and the carry
and not-carry predicates give the data-dependent selection that
floating-point alignment and comparisons need.

The carry and mask latches are modelled as flip-flops that capture at the end
of the cycle and reset to 0; the sum written in a cycle uses the carry left
by the previous cycle.

## One hybrid-mode cycle

`mathram_ctrl` compares port A's address with `0x1ff` and ANDs the result with
the mode bit. When it fires, the row muxes in front of the two row decoders
switch: port 1 senses `src1_row`, port 2 senses `src2_row`, and both write
rows become `dst_row`. The PEs compute on the two sensed 128-bit rows and the
write strobes let each PE write its result bit on the chosen port, if its
predicate allows. The array (`mathram_array`) applies the write at the clock
edge, so the next instruction, one cycle later, already sees the result:
instructions can be issued every cycle.

During an instruction cycle port B's own request is ignored (its row decoder
is in use), and the ports' read-data registers keep their old value. Reads
have one cycle of latency in both modes.

## Programs

These sequences are software, not hardware, but they are what the cycle
counts of the architecture refer to, and the testbenches run them.
A row that is all zeros (`Z`) is kept for clearing; in the tests it is row 126.

**N-bit addition, N+1 cycles.** For `m = 0..N-1`:
`dst = k+m, src1 = i+m, src2 = j+m, truth_table = XOR, write_sel = sum, c_en = 1`.
Then one more instruction with `src1 = src2 = Z, truth_table = 0, write_sel = sum,
c_en = 1, dst = k+N`: TR is 0 so the sum is the carry, which is stored, and the
majority of (0, 0, carry) clears the carry for the next operation.

**N x N multiplication, N² + 3N − 2 cycles** (product `P` of 2N rows, multiplicand
`M`, multiplier `Q`):

1. N cycles: `P[m] = M[m] AND Q[0]`.
2. N cycles: `P[N..2N-1] = 0` (TR = 0 on `Z`, with `c_en` set, which also clears the carry).
3. For each `k = 1..N-1` (N+2 cycles each): load the mask with `Q[k]`
   (`truth_table = A`, `m_en = 1`, destination a scratch row); N predicated
   adds `P[k+m] = P[k+m] + M[m]` under `predicate = mask`; one predicated carry
   write to `P[k+N]` from `Z`, which also clears the carry in every column.

Total `2N + (N−1)(N+2) = N² + 3N − 2`.

**Shifts.** `write_sel` = neighbour with `port = 0` writes column `c` with column
`c−1`'s TR output (a shift towards higher columns); with `port = 1` column `c`
gets column `c+1`'s (towards lower columns). Columns 0 and 127 take their
neighbour from the `chain_lo_in` / `chain_hi_in` pins, which in a column of
blocks come from the adjacent MathRAMs.

**Reduction.** Summing across lanes combines the two: copy the field, shift the
copy down by d lanes (d single-lane shifts of every bit row), and add it back,
for d = 1, 2, 4, ... Shifting by d costs d x (field width) cycles, so the shifts
dominate: 512 lanes of 17-bit sums take 9002 cycles.

**Floating point.** There is no floating-point unit; a floating-point operation
is a longer program. A multiply, for example, is an XOR for the sign, an
exponent add and bias subtract, an integer multiply of the significands (with
the hidden one written in as a row of ones), and then normalisation: the mask
is loaded from the top bit of the product, and mask-predicated copies and a
mask-predicated exponent increment are applied only in lanes whose product
overflowed. Addition also needs an exponent comparison and an alignment
shift by the exponent difference; the carry and not-carry predicates are meant
for such data-dependent steps. That sequence is not part of the tests.

## The swizzle unit

`mathram_swizzle` is soft logic that sits in front of port A. Elements
(default 16 bits) arrive one per cycle on a ready/valid interface and are
written into a circular buffer of 64 entries. As soon as 32 elements (one
quarter of a row) are present it emits 16 words: word `m` is bit `m` of those
32 elements, sent to address `(base_row + m) * 4 + quarter`. While one half of
the ring drains, the other half fills, so a full-rate stream is accepted
without gaps as long as the element is at most 32 bits and port A is free.
After 128 elements the quarter counter wraps. Only the inbound direction
exists; results are read back transposed.

## A column of MathRAMs

`mathram_column` is the top level: `N_BLOCKS` MathRAMs (default 4) stacked in
one FPGA column. Column 127 of block `k` is the left neighbour of column 0 of
block `k+1`, so a shift instruction issued to several blocks in the same cycle
moves data across block boundaries as if they were one 512-lane row. Each
block has its own swizzle unit; the fabric's port-A requests take priority
and the swizzle waits (`swz_wait`), back-pressuring its element stream when its
ring fills. All per-block signals are packed arrays indexed by block.

## Interfaces and timing at a glance

| module | key ports | timing |
|---|---|---|
| `mathram` | `mode`, `width_cfg`, port A/B (`en, we, addr[13:0], wdata[31:0], rdata[31:0]`), `chain_*`, `instr_exec` | writes and instructions at the clock edge; `rdata` valid the cycle after a read |
| `mathram_pe` | `a, b, d_in1/2, from_left/right`, instruction fields, `wps1/2` → `tr, wd1/2, we1/2` | combinational; carry/mask latch at the edge |
| `mathram_array` | per port: `rd_row, rd_data[127:0], wr_row, wr_data, wr_en` | combinational read, write at the edge; port 2 wins a same-bit collision |
| `mathram_port_decoder` | `width, addr` → `row, wr_mask, wr_row_data, rd_word` | combinational |
| `mathram_ctrl` | mode, port requests → row steering, PE controls | combinational |
| `mathram_swizzle` | `in_valid/ready/data`, `out_valid/ready/addr/data`, `base_row` | one element in and one word out per cycle |
| `mathram_column` | all of the above per block, `col_lo/hi_in/out` | as `mathram` |

Configuration inputs (`mode`, `width_cfg`, `cfg_*`) are meant to be static;
change them only under reset.

## Choices made in this implementation

The published description fixes the geometry (128 x 128, 16 Kbit), the two
modes, the 512 x 32 hybrid shape, the reserved address `0x1ff`, the
instruction fields, the PE's parts and connections, the neighbour links inside
a block and between blocks, and the cycle counts of addition and
multiplication. The following are this implementation's own:

* order of the three row fields in the instruction; codes of the predicate and
  write-back muxes; TR index order `{A,B}`;
* the value passed to neighbours (the TR output) and which neighbour feeds
  which port;
* the set of memory-mode widths and the address-to-row/column mapping;
* one-cycle registered reads; read registers hold during instructions;
* port B cannot issue instructions, and its writes to `0x1ff` in hybrid mode
  are dropped;
* same-bit write collisions between the ports keep port 2's data;
* the carry-write-and-clear step, which requires one all-zero row;
* the swizzle's ring depth, handshakes and word order; the port-A
  arbitration in the column; four blocks per column.

Not implemented: the analog parts (precharge, sense amplifiers, write drivers;
only their logic function is in `mathram_array`), the surrounding FPGA fabric
(logic blocks, DSPs, routing, crossbars), any DRAM interface, the longer
hybrid-mode clock, and the published floating-point instruction sequences
(the datapath supports them; a floating-point multiply sequence of this
design's own is run in the tests, floating-point addition is not).

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_mathram_pe` | 2000 random cycles against a reference PE model; an 8-bit bit-serial add |
| `tb_mathram_array` | fill and random dual-port masked writes/reads against a shadow array |
| `tb_mathram_port_decoder` | row, mask, aligned data and read word for all widths |
| `tb_mathram_ctrl` | instruction detection, row steering and PE controls against a reference |
| `tb_mathram_swizzle` | three batches with gaps and a long stall; no lost cycle at full rate; transposed placement |
| `tb_mathram` | AND, 8-bit add (checks N+1 = 9 cycles), 4x4 multiply (checks N²+3N−2 = 26 cycles), carry/not-carry predication, shifts with chain pins, memory mode at every width |
| `tb_mathram_column` | the full-size top: swizzle streaming with port-A contention and back-pressure, a 16-bit add, a mask-predicated copy, a shift crossing block boundaries, a memory-mode block; counts that each of these happened |

Five more testbenches run whole workloads on the full-size column (four
blocks, 512 lanes), with all four blocks executing the same program:

| testbench | workload | MathRAM cycles measured |
|---|---|---|
| `tb_workload_moving_average` | 16-bit moving-average filter, samples streamed in through the swizzle units, window sums formed by add-and-shift across all 512 lanes | 5288 for 128 taps, 10536 for 256 taps (40 + 41 per tap) |
| `tb_workload_mvm_int8` | 512 x 4 unsigned 8-bit matrix-vector product (one matrix row per lane, the vector broadcast), 18-bit accumulators | 438 = 18 + 4 x (86 multiply + 19 accumulate) |
| `tb_workload_raid_search` | XOR parity over four 16-row "disks" and rebuild of a lost disk; search of 512 16-bit words for a key | 48 for parity, 33 (1 + 2 per key bit) for the search |
| `tb_workload_reduction` | sum of 512 8-bit values by a log-step add-and-shift tree, shifts crossing the block boundaries; every lane ends with the sum of itself and all lanes above it | 9002 = 9 x (17 copy + 18 add) + 511 x 17 shift |
| `tb_workload_hfp8_mul` | 8-bit floating-point multiply (1 sign, 4 exponent bits with bias 7, 3 mantissa bits, normal numbers, truncated), normalisation by a mask loaded from the top product bit; checked bit for bit and against the real product | 53 |

Each compares every lane's result with integer arithmetic. The cycle counts cover the in-memory compute for one batch of 512 lanes only. The published filter results (105648 cycles for 128 taps, 210628 for 256) are for the whole application on an FPGA, including moving data in from DRAM, so they are not directly comparable. The moving-average
test takes about a second; the others run in well under a second. To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Irtl \
    rtl/mathram_pkg.sv tb/tb_mathram_column.sv --top-module tb_mathram_column
./obj_dir/Vtb_mathram_column
```

Replace the testbench name to run another. The RTL is synthesizable; the
cell array is written as a memory array with per-bit write enables so that a
synthesis tool can map or keep it as storage.
