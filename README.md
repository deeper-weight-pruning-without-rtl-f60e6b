# CSD bit-column accelerator for pruned DNN weights

A convolution or fully connected layer is a long chain of multiply-accumulates,
`F = sum_i A_i * W_i`. Splitting each weight into its digits turns this into
`F = sum_b 2^b * sum_i A_i * w_i^b`: for every digit position `b` only the
activations whose weight has a non-zero digit there need to be added. If those
non-zero digits are packed upwards column by column, a group of `k` weights
shrinks to `k'` rows, and `k'` cycles replace `k`. This "bit-column
condensation" is limited by the densest column.

This RTL implements an accelerator in which the weights are written in
**canonical signed digits (CSD)**, digits `0`, `+1` and `-1`, chosen so that
each weight has as few non-zero digits as possible and no sign digit at all.
Fewer non-zero digits mean shorter columns and fewer cycles. The hardware has
three ideas that make CSD cheap:

1. **One stored bit per digit.** A ternary digit would normally need two bits.
   Here each column is sorted so that all `-1` come first, then all `+1`,
   then the zeros, and one flag bit per column is enough to decode the column
   from one memory bit per row.
2. **Subtraction by one's complement plus carry.** A `-1` digit sends `~A` to
   the adder tree together with a carry of 1, so `-A = ~A + 1` costs no
   separate subtractor.
3. **The sign column does the bit-0 work.** CSD weights have no sign digit, so
   the adder tree that would hold the top bit position is free. It takes half
   of the bit-0 digits, which is the densest column in practice.

The design is an implementation of the architecture in B. Ahn and T. Kim,
"Deeper Weight Pruning without Accuracy Loss in Deep Neural Networks". Where
the paper is silent the choices are this design's own; they are listed at the
end.

## Organization

```
 load ports ─► lane_buffer[0..15] ─► flag_decoder x16 ─► splitter ─┐
               (A, rows, flags)       (one per column)              │ 16 columns
                                                                    ▼  from every lane
                                              bit_adder_tree[0..15] (S_0..S_15)
                                                                    │
                                                              shift_add ─► out_data
 start/num_rows ─► csd_controller (row address, first row, done)
```

* **Lane.** One group of `k` weights (the pruning stride) with its `k`
  activations. There are 16 lanes, so one operation is a dot product of
  16 x k terms. Every lane has its own buffer, its own 16 flag decoders and its
  own splitter. All lanes step through their condensed rows in lock step.
* **Column.** One of 16 physical bit-columns. Column `c` of every lane feeds
  adder tree `c`, which adds the 16 lanes' contributions each cycle and
  accumulates them over the rows in its register `S_c`.
* **Row.** One condensed row of a lane: per column one stored bit and one
  activation index (4 bits for `k = 16`). One row is processed per cycle.

### Column map

| physical column | 16-bit mode          | int8 mode                          |
|-----------------|----------------------|------------------------------------|
| 0, 1            | bit 0 (split in two) | group 0, bit 0 (split in two)      |
| 2 .. 7          | bits 1 .. 6          | group 0, bits 1 .. 6               |
| 8, 9            | bits 7, 8            | group 1, bit 0 (split in two)      |
| 10 .. 15        | bits 9 .. 14         | group 1, bits 1 .. 6               |

Bit 15 (bit 7 for 8-bit weights) is the sign position, which CSD weights do
not use. In **int8 mode** each row carries two 8-bit column groups. Both use
the lane's activations and indexes, and their results are added. Splitting
each column list of an 8-bit weight set in two halves therefore halves the
number of rows, which doubles the throughput for 8-bit weights.

## The single-bit ternary encoding

This is the least obvious part of the design and the part any weight compiler
must match exactly.

For each column of a lane, take the `k'` digits (after condensation) and sort
them: all `-1`, then all `+1`, then all `0` (zeros include the padding rows).
Then:

| column holds     | flag | memory bit per row                      |
|------------------|------|-----------------------------------------|
| no `+1`          | 0    | 1 for each `-1`, 0 otherwise            |
| at least one `+1`| 1    | 1 for each `+1`, 0 otherwise            |

Decoding walks down the rows with a running flag. The flag starts from the
stored flag on the first row and drops to 0 at the first 1 -> 0 transition
of the memory bits:

| running flag | memory bit | digit |
|--------------|------------|-------|
| 0            | 0          | 0     |
| 0            | 1          | -1    |
| 1            | 0          | -1    |
| 1            | 1          | +1    |

Example (four rows, four columns):

| column | flag | bits    | digits         |
|--------|------|---------|----------------|
| a      | 1    | 0 0 1 0 | -1 -1 +1 0     |
| b      | 0    | 1 0 0 0 | -1 0 0 0       |
| c      | 1    | 1 1 0 0 | +1 +1 0 0      |
| d      | 0    | 0 0 0 0 | 0 0 0 0        |

In column a the flag is still 1 on the two leading zeros (-1). It falls at
the 1 -> 0 step into row 3, which therefore decodes to 0. A lane's storage is
`(k' + 1) x 16` bits of digits and flags plus `k' x 16 x log2 k` bits of
indexes.

`flag_decoder` holds the running flag and the previous memory bit. It outputs
the memory bit and the effective flag of the current row. The splitter turns
that pair into `0`, `+A` (1,1) or `~A` with carry 1 (flag XOR bit = 1).

## Datapath details

* **splitter**: per column a 16:1 multiplexer picks `A[idx]`. The activation
  is sign-extended to 17 bits, so `-A` is exact even for `-32768`. The
  column's operand is then `A`, `~A` or 0, and its carry is `flag ^ bit`.
* **bit_adder_tree**: `S <= (first ? 0 : S) + sum(operands) + popcount(carries)`.
  The accumulator width is `A_W + 1 + log2(LANES x ROWS)` = 25 bits, so a full
  set cannot overflow.
* **shift_add**: reduces `S_0..S_15` in the paired pattern
  `pair = S_2j + (S_2j+1 << 1)`, `quad = pair + (pair << 2)`,
  `group = quad + (quad << 4)`. The upper group is shifted by 8 in 16-bit mode
  and unshifted in int8 mode. `S_0` (and `S_8` in int8 mode) is doubled so that
  both halves of bit 0 carry equal weight, and the total is shifted right by
  one at the end. With both halves of bit 0 doubled, the sum is always even,
  so the shift is exact. The result is 42 bits wide.

## Interface and timing

Top module `csd_accel` (default parameters `LANES = 16`, `K = 16`
activations per lane, `A_W = 16`, `ROWS = 16`).

| port                                  | meaning |
|---------------------------------------|---------|
| `act_we, act_lane, act_addr, act_data`| write activation `act_addr` of lane `act_lane` (signed, 16 bits) |
| `row_we, row_lane, row_addr, row_w, row_idx` | write condensed row `row_addr` of a lane: 16 memory bits and 16 four-bit indexes |
| `flag_we, flag_lane, flag_data`       | write the 16 column flags of a lane |
| `start, num_rows, int8`               | run one set of `num_rows` = k' rows (1..16) |
| `busy`                                | a set is running; do not write the buffers |
| `out_valid, out_data`                 | one-cycle strobe and the 42-bit signed result |

The three write ports are independent and may be used in the same cycle.
`start` is taken only when idle. Rows are processed on the `k'` cycles after
the start edge. `out_valid` rises `k' + 1` cycles after the start edge, and
`out_data` holds the result until the next one. Every lane runs `k'` rows. A
lane whose columns are shorter is padded with all-zero rows, which decode to 0
whatever their index. Writing while `busy` is high is flagged by an assertion.
The result goes to the output activation function, which is outside this
design, as is the accumulation of one output over several sets.

Reset (`rst_n`, active low, synchronous) clears the buffers, decoders,
accumulators and the output.

## Preparing weights

The weight preparation runs offline and is not part of the RTL. For each
weight:

1. Write its magnitude in a minimal or near-minimal signed-digit form on
   positions 0..B-2.
2. If the weight is negative, negate every digit. This removes the sign.

The paper enumerates several such forms per weight. It then chooses among them
with a multi-objective shortest-path search, so as to balance the column
lengths across a lane.

Next, condense each lane's digits column by column. Each digit keeps the
index of its activation. The bit-0 digits are spread over columns 0 and 1.
Finally, sort and encode each column as above. `tb/csd_tb_pkg.sv` and the
testbenches contain a reference implementation of the condensing and encoding
steps (not of the path search).

## Verification

Every module has a self-checking testbench in `tb/`:

| testbench            | what it checks |
|----------------------|----------------|
| `tb_flag_decoder`    | the four-column example above, then 400 random sorted columns with padding |
| `tb_splitter`        | operand + carry = digit x A[idx] for random data including +-extremes |
| `tb_bit_adder_tree`  | accumulation over 1..16 rows, clear, hold when idle |
| `tb_shift_add`       | both modes against the column weights in the table above |
| `tb_lane_buffer`     | write/read of all fields, no write without enable |
| `tb_csd_controller`  | row sequence, first/done/busy timing, start ignored while busy |
| `tb_csd_accel`       | end to end at the default size: 200 sets (one is the 8-bit example -55, +12, -32), exact dot products, latency k'+1 |
| `tb_csd_workloads`   | CSD-converted weights for B = 8/16 and k = 8/16/32 |

`tb_csd_accel` condenses random digit patterns itself and counts the
mechanisms it exercised. It fails if any never occurred. The mechanisms are:
flag-0 and flag-1 columns, the flag reset, subtraction, bit 0 over two
columns, padded columns, both modes, and k' = 1 and k' = 16.

`tb_csd_workloads` draws weights from a bell-shaped distribution; the trained
AlexNet and VGG-16 weights are not included. It converts them to CSD (the
non-adjacent form, or the plain binary magnitude when the non-adjacent form
would need the sign position) and checks every result. It also prints the
average cycles per set. The k = 32 configuration uses an instance with
`K = 32, ROWS = 32`. A typical run:

```
B= 8 k= 8  none  8.00  two's-complement condensed  7.10  CSD rows  5.55  CSD cycles  3.05
B= 8 k=16  none 16.00  two's-complement condensed 12.00  CSD rows  9.50  CSD cycles  5.05
B= 8 k=32  none 32.00  two's-complement condensed 22.10  CSD rows 16.95  CSD cycles  8.75
B=16 k= 8  none  8.00  two's-complement condensed  7.50  CSD rows  6.25  CSD cycles  6.25
B=16 k=16  none 16.00  two's-complement condensed 13.20  CSD rows 10.45  CSD cycles 10.45
B=16 k=32  none 32.00  two's-complement condensed 23.30  CSD rows 18.50  CSD cycles 18.50
```

These numbers come from synthetic weights and from a simple alternation for
bit 0 instead of the path search. They show the trend, not the paper's
figures.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/csd_pkg.sv tb/csd_tb_pkg.sv tb/tb_csd_accel.sv --top-module tb_csd_accel
obj_dir/Vtb_csd_accel
```

Each testbench ends with `TB_RESULT checks=N failures=M` and has a cycle
watchdog. All of them run in seconds.

## Sizes and scaling

At the defaults, coarse synthesis gives about 7,000 word-level cells, 5,300
flip-flops and 20,480 buffer bits. Most of that is the 16 x 16 activation
multiplexers and the 16 lane buffers. `K` (the pruning stride the hardware
holds), `ROWS`, `LANES` and `A_W` are parameters. The number of columns is
fixed at 16, because the shift-and-add tree is built for it. A stride of 8
runs on the default instance using the first 8 activations. A stride of 32
needs `K = 32, ROWS = 32`.

## Where this design departs from, or goes beyond, the paper

* The paper gives the lanes, the per-column adder trees, the splitter, the
  decoding rules and the shift-and-add tree. The following are this design's
  own choices: the buffer organization and load ports, the controller, the
  accumulator and result widths, the reset behaviour, and the use of signed
  activations.
* The on-chip memory (eDRAM) that fills the buffers is not modelled; the load
  ports stand in for it. There is no double buffering, so loading and
  computing do not overlap.
* The output activation function is not included.
* The adder trees are written as plain sums, with no pipelining. The
  architecture figure also shows connections from the accumulation stage back
  towards the splitter side whose purpose the text does not explain. They are
  not implemented.
* In int8 mode both 8-column groups of a row share the lane's activations and
  indexes, and the two group results are added into one output. How the paper
  maps 8-bit sets onto the two halves is not spelled out.
* The requirement that no weight uses the sign digit position is left to the
  weight preparation. The hardware has no adder tree for bit 15 (bit 7 in int8
  mode).

## Files

* `rtl/csd_pkg.sv`: shared constants, width functions, controller state type
* `rtl/flag_decoder.sv`, `rtl/splitter.sv`, `rtl/bit_adder_tree.sv`,
  `rtl/shift_add.sv`, `rtl/lane_buffer.sv`, `rtl/csd_controller.sv`: the blocks
* `rtl/csd_accel.sv`: top level
* `tb/csd_tb_pkg.sv`: reference ternary ordering and column encoder
* `tb/csd_workload_runner.sv`: driver used by `tb_csd_workloads`
* `tb/tb_*.sv`: testbenches
