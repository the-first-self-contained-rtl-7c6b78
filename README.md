# Parallel radix sorter: one bit per clock, no external memory

This design sorts N unsigned K-bit numbers held entirely in on-chip registers.
It uses a least-significant-bit-first radix sort. Every element is handled in
parallel, and one bit of the key is processed per clock cycle. Sorting on `b`
bits therefore takes `b` clocks after the numbers are loaded, whatever their
values. The time grows linearly with the key width and does not depend on N,
though the logic does grow with N. The order is ascending or descending. The
number of key bits is chosen at run time for each sort.

Each radix pass is a *stable partition* on one bit. Elements that belong in
front move left, all others move right, and each group keeps its order. Once
the LSB pass and every pass above it have run, the array is sorted on those
bits. The hardware for one pass is three combinational stages between the
array register's output and its input:

```
            +-------------------+   data_out (sorted when `sorted` = 1)
 data_in -->|  element_array    |------------------------------------------>
   (N x K)  |  N x K registers  |--+
            +-------------------+  | elements (N x K)
                     ^             v
                     |      +-------------+  pred   +------------+  prefix
                     |      | predication |-------->| prefix_sum |----------+
                     |      +-------------+  (N)    +------------+ (N x W)  |
                     |             |  elements, pred                        |
                     |             v                                        |
                     |      +------------------------------------------+    |
                     +------|  compaction: address per element, scatter |<---+
          reordered (N x K) +------------------------------------------+
```

`radix_sorter` is the top level. It holds the three stages and the array,
plus a bit-index register and a three-state controller.

## One pass, stage by stage

### Predication (`predication.sv`)

There is one multiplexer per element. It selects the bit of the current pass
and compares it with the order flag:

    pred[j] = (elements[j][bit] == is_descending)

`pred[j] = 1` means the element goes to the left group. With
`is_descending = 0`, the elements with a 0 in this bit lead, which gives an
ascending sort. With `is_descending = 1`, the elements with a 1 lead, which
gives a descending sort.

### Prefix sum (`prefix_sum.sv`, `prefix_iteration.sv`)

This stage computes the inclusive prefix sum `prefix[i] = pred[0] + ... + pred[i]`.
It uses a Kogge-Stone network of `ceil(log2 N)` layers. Layer `l` adds, into
each lane `j >= 2^(l-1)`, the lane `2^(l-1)` positions to its left. Lanes to
the left of that offset pass their value through unchanged. One layer is the
module `prefix_iteration`. Lanes are `W = ceil(log2(N+1))` bits wide, which
is log2(N)+1 for a power-of-two N. That is just enough to hold `prefix[N-1] = N`.

### Compaction (`compaction.sv`)

This is the key step. Each element computes its destination on its own,
without looking at any other element's address:

    pred[i] = 1:  addr[i] = prefix[i] - 1
    pred[i] = 0:  addr[i] = i - prefix[i] + (pred[N-1] + prefix[N-2])

- `prefix[i] - 1` is the number of left-group elements before `i`.
- `i - prefix[i]` is the number of right-group elements before `i`.
- `pred[N-1] + prefix[N-2]` equals `prefix[N-1]`, the size of the left group.
  The right group starts at that address.

The addresses form a permutation of 0..N-1. The move is built as a one-hot
decoder per element, with each output slot ORing the N decoded candidates;
exactly one is active. The addresses are also brought out on the `addr` port.

Worked example (4 elements of 3 bits, descending, on 2 bits):

| pass  | array     | pred    | prefix  | addr    | result    |
|-------|-----------|---------|---------|---------|-----------|
| bit 0 | 0 3 2 1   | 0 1 0 1 | 0 1 1 2 | 2 0 3 1 | 3 1 0 2   |
| bit 1 | 3 1 0 2   | 1 0 0 1 | 1 1 1 2 | 0 2 3 1 | 3 2 1 0   |

## Controller and interface (`radix_sorter.sv`)

| port            | dir | width           | meaning |
|-----------------|-----|-----------------|---------|
| `clk`, `rst_n`  | in  | 1               | clock; asynchronous active-low reset |
| `start`         | in  | 1               | load `data_in` and start a sort; ignored while `busy` |
| `is_descending` | in  | 1               | 0 = ascending, 1 = descending; latched at `start` |
| `num_bits`      | in  | clog2(K+1)      | key = this many LSBs; latched at `start`; values above K act as K |
| `data_in`       | in  | `logic [K-1:0] [N]` | numbers to sort, element 0 first |
| `data_out`      | out | `logic [K-1:0] [N]` | array contents; element 0 is the smallest (ascending) or largest |
| `busy`          | out | 1               | a pass is being applied this clock |
| `sorted`        | out | 1               | sort complete; result held until the next `start` |
| `bit_index`     | out | clog2(K)        | bit of the current pass |

States: `ST_IDLE` after reset, then `ST_SORT` while passes run, then
`ST_DONE`. A `start` is accepted in `ST_IDLE` and in `ST_DONE`.

Timing:

- The clock edge that samples `start` loads the array.
- The edge `b+1` applies the pass on bit `b`.
- `sorted` rises right after edge `num_bits`. That is `num_bits` clocks after
  the load clock; with `num_bits = 0`, `sorted` rises right after the load.
- `busy` is high for exactly `num_bits` clocks.

The passes are stable, so numbers with equal keys keep their input order. Bits
above `num_bits` travel with their number and are not part of the key.

Two concurrent assertions check the controller:

- the bit index stays below the bit count;
- a sort ends on its last pass.

A clocked immediate assertion checks that the compaction addresses of every
pass form a permutation.

## Parameters and size

| parameter | default | meaning |
|-----------|---------|---------|
| `N`       | 8       | elements sorted at once (N >= 2; need not be a power of two) |
| `K`       | 3       | bits per element |

The defaults are in `radix_sort_pkg` (`DEFAULT_N`, `DEFAULT_K`). They follow
the small example size of eight 3-bit numbers. No chip size is fixed here:
scale both as needed. The logic grows as follows:

- predication: N muxes of K:1;
- prefix sum: about N·log2 N adders of log2 N + 1 bits;
- compaction: N² address comparisons, each driving K AND/OR gates;
- registers: N·K bits of array plus a few control bits (state, bit index, bit count, order flag).

The critical path is the bit mux, then log2 N adder levels, then the address
arithmetic, then the N-input OR.

## How far it can be trusted

Each module has a self-checking testbench that compares it with an
independent model. The model works out the expected values in the testbench
itself.

- `tb_predication`: random elements, every bit index, both order flags.
- `tb_prefix_iteration`: offsets 1, 2 and 4.
- `tb_prefix_sum`: the worked example, then random and extreme vectors for
  N = 16 and N = 11.
- `tb_compaction`: both passes of the worked example (addresses and data),
  then random stable-partition checks for N = 8 and N = 6.
- `tb_element_array`: reset, load, update and priority.
- `tb_radix_sorter` runs the top at its default parameters.
  `tb_radix_sorter_wide` runs it at N = 16, K = 8.
  `tb_radix_sorter_example` runs it at N = 4, K = 3 and starts with the
  worked example. All three check:
  - the array after every pass against a stable partition;
  - the final result against a stable insertion sort on the masked key;
  - the latency, `busy`, `bit_index`, and that the result is held.

  They also count each behaviour and fail if one never happens: ascending and
  descending sorts, full and partial bit counts, a zero bit count, a clamped
  bit count (when the port width allows one), a `start` ignored while busy,
  and a restart from `ST_DONE`.

Each testbench was also run against a deliberately broken copy of its module,
and each one reported failures.

## Choices made by this design

- The overall structure is the published one: the three stages, the layer
  offsets, the address formula, and a register array written back every pass.
  So is the run-time order flag and bit count.
- These details are this design's own:
  - the `start`/`busy`/`sorted` handshake;
  - the asynchronous reset;
  - the priority of load over write-back in the array;
  - clamping `num_bits` to K;
  - a bit index beyond K reading as 0;
  - support for N that is not a power of two.
- One full pass per clock, with all three stages combinational, is the
  natural reading of the structure. No pipelining was added.
- In the original, the numbers enter and leave through general-purpose I/O
  pads as full parallel buses. Here `data_in` and `data_out` are plain ports.
  No pad cells or pin multiplexing are included.
- Using several sorters side by side, each sorting one section of a longer
  sequence and merged at a higher level, is a way to use the block. It is not
  part of this RTL.

## Simulating

All files are SystemVerilog-2017. `radix_sort_pkg.sv` must be read first.
With Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/radix_sort_pkg.sv \
          tb/tb_radix_sorter.sv --top-module tb_radix_sorter
./obj_dir/Vtb_radix_sorter
```

Any other testbench runs the same way; replace the file and top name. Each
testbench prints one line, `TB_RESULT checks=<n> failures=<m>`. Each one
finishes in well under a second.

Files:

- `rtl/radix_sort_pkg.sv`: default sizes, controller state enum
- `rtl/radix_sorter.sv`: top level and controller
- `rtl/element_array.sv`: the N x K register array
- `rtl/predication.sv`: bit select and compare
- `rtl/prefix_sum.sv`: Kogge-Stone prefix sum
- `rtl/prefix_iteration.sv`: one layer of the prefix sum
- `rtl/compaction.sv`: address computation and scatter
- `tb/`: one testbench per module, plus the two extra top-level sizes
