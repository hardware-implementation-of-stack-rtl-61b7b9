# Stack-based LRU and FIFO replacement for set-associative caches

When a set-associative cache misses, something has to decide which way of
the set to throw out. True LRU is the best of the simple policies but is
expensive to track; FIFO is cheaper and close behind. This design keeps the
replacement state of each set as a small **stack of way numbers**: with `n`
ways there are `n` rows of `log2(n)` bits, and the row at the bottom always
names the way to replace. The same stack serves both policies; only the rule
for updating it differs:

| event                | LRU stack                                   | FIFO stack        |
|----------------------|---------------------------------------------|-------------------|
| hit on the top row   | nothing changes                             | nothing changes   |
| hit on a lower row   | that row moves to the top, rows above it shift down | nothing changes |
| miss                 | bottom row moves to the top, all others shift down  | same as LRU |

Storage is `n*log2(n)` flip-flops per set: 8, 24, 64 and 160 bits for 4, 8,
16 and 32 ways, against `n(n-1)/2` for a reference-matrix LRU. The stack is
built from identical rows that cascade, so the associativity is one
parameter.

The RTL contains the two stack circuits, the row cells they are made of, a
tag RAM, and a top level `stack_cache` that joins them into the directory of
a 32 KB, 4-way cache with 32-byte blocks. The data array, the refill path to
memory and the rest of the cache controller are not part of it; the top
gives them the hit/miss, hit way and victim way they need.

## The LRU stack in detail (`lru_stack`, `lru_row`)

Row 0 is the top (most recently used way), row `n-1` the bottom (least
recently used way, output `lru_addr`). Every row except the top has three
parts:

* **storage**: `log2(n)` D flip-flops sharing one enable (`stack_reg`);
* **comparator** (`row_comparator`): the stored way number is decoded to
  one-hot (`address_decoder`) and ANDed line by line with the tag RAM's
  one-hot `match` lines; the OR of the products, `cmp`, is high only when
  this row holds the way that hit;
* **one OR gate** forming the row's enable: `en[k] = cmp[k] | en[k+1]`.
  The bottom row's `en[k+1]` input is the `miss` line.

The OR gates form a chain from the bottom up. A hit at row `k` raises
`en[k]`, and through the chain `en[k-1] ... en[1]`; rows below `k` stay
disabled. A miss enters at the bottom and enables every row. The top row has
no comparator and simply shares row 1's enable, so a hit on the top row
enables nothing and the stack is left alone.

An enabled row `j > 0` loads the row above it (`rows[j-1]`), which is the
shift down. The top row instead loads the **transfer lines**, a
`log2(n)`-bit bus onto which the selected row puts its content: a middle row
drives it when its own comparator fires, the bottom row when its enable is
high (its comparator or `miss`). Since at most one row is selected, the bus
is a one-hot AND-OR.

Example with 4 ways, stack top-to-bottom `3 2 1 0`; three accesses in turn,
each starting from the stack the previous one left:

| access      | rows enabled | transfer lines | new stack (top..bottom) | `lru_addr` |
|-------------|--------------|----------------|-------------------------|------------|
| hit way 3   | none         | 0              | `3 2 1 0`               | 0          |
| hit way 1   | 2, 1, 0      | 1              | `1 3 2 0`               | 0          |
| miss        | 3, 2, 1, 0   | 0              | `0 1 3 2`               | 2          |

The whole update takes one rising clock edge. The longest combinational path
is the miss rippling through `n-1` OR gates to the top row's enable, so the
cycle time is roughly `(n-1)*t_OR` plus the flip-flop's clock-to-output and
setup: it grows linearly with associativity. The RTL writes the chain as
that ripple; a synthesis tool is free to restructure it.

The match lines must be one-hot or all zero, and all zero when `miss` is
high. `lru_stack` asserts both.

## The FIFO stack (`fifo_stack`)

The FIFO circuit has no comparators and one input, `miss`, which enables all
rows at once. On a miss the bottom row wraps round to the top and all other
rows shift down; the bottom row then names the way filled longest ago
(`fifo_addr`). Hits do not touch it.

## Power-up order

The `precharge` input (asynchronous, active high) presets row `k` of every
stack to way `n-1-k`, so the bottom row starts at way 0. Each miss then
rotates the bottom way to the top, and an empty set is filled in the order
0, 1, 2, ... with both policies, before any valid block is evicted. In
`stack_cache` the same signal clears the tag RAM's valid bits. Any
permutation would do as the initial order; this one is a choice of the
design.

## The cache directory (`stack_cache`, `tag_ram`)

A request is a byte address with `req_valid`. It is split into block offset
(`log2(BLOCK_BYTES)` bits, unused here), set index (`log2(SETS)` bits) and
tag (the rest; 19 bits at the defaults).

* `tag_ram` compares the tag with every valid way of the indexed set in
  parallel and returns one-hot `match`, or `miss` when none holds it. Tags
  and valid bits are flip-flops so that all ways are read at once.
* Each of the `SETS` sets has its own stack (`lru_stack` or `fifo_stack`,
  chosen by the `POLICY` parameter). Only the indexed set's stack sees the
  match and miss lines.
* `victim_way` is the bottom row of the indexed set's stack. On a miss the
  directory writes the new tag into that way and the stack moves it to the
  top, both on the same edge.

So one access is one cycle: `hit`, `miss`, `match`, `hit_way` and
`victim_way` are combinational from the request, and the state changes at
the rising edge that ends the cycle. With `req_valid` low nothing changes.

### Parameters

| module         | parameter     | default      | meaning |
|----------------|---------------|--------------|---------|
| `stack_cache`  | `POLICY`      | `POLICY_LRU` | `POLICY_LRU` or `POLICY_FIFO` (`stack_repl_pkg::policy_e`) |
|                | `WAYS`        | 4            | associativity, a power of two, at least 2 |
|                | `SETS`        | 256          | sets (a power of two); 256 x 4 x 32 B = 32 KB |
|                | `BLOCK_BYTES` | 32           | block size |
|                | `ADDR_W`      | 32           | address width |
| `lru_stack`, `fifo_stack` | `WAYS` | 4   | rows of the stack |
| `tag_ram`      | `WAYS`, `SETS`, `TAG_W` | 4, 256, 19 | |

### Ports of `stack_cache`

| port         | dir | width          | meaning |
|--------------|-----|----------------|---------|
| `clk`        | in  | 1              | clock, rising edge |
| `precharge`  | in  | 1              | power-up initialisation, asynchronous, high |
| `req_valid`  | in  | 1              | an access is presented this cycle |
| `req_addr`   | in  | `ADDR_W`       | byte address |
| `hit`        | out | 1              | block present |
| `miss`       | out | 1              | block absent; `victim_way` is refilled at the edge |
| `match`      | out | `WAYS`         | one-hot way that hit |
| `hit_way`    | out | `log2(WAYS)`   | binary way that hit |
| `victim_way` | out | `log2(WAYS)`   | way the indexed set would replace |

## Files

| file | contents |
|------|----------|
| `rtl/stack_repl_pkg.sv` | policy type, initial row order |
| `rtl/address_decoder.sv` | row address to one-hot |
| `rtl/row_comparator.sv` | decoder plus AND-OR against the match lines |
| `rtl/stack_reg.sv` | one row of enabled flip-flops with precharge value |
| `rtl/lru_row.sv` | cascadable LRU row: storage, comparator, enable OR |
| `rtl/lru_stack.sv` | LRU control circuit of one set |
| `rtl/fifo_stack.sv` | FIFO control circuit of one set |
| `rtl/tag_ram.sv` | tag and valid storage with parallel compare |
| `rtl/stack_cache.sv` | top: directory with one stack per set |
| `tb/cache_ref_pkg.sv` | reference cache model and synthetic address stream |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the sweeps |
| `tb/assoc_sweep_pair.sv` | LRU and FIFO caches of one associativity on one stream |

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/stack_repl_pkg.sv tb/cache_ref_pkg.sv tb/tb_stack_cache.sv \
        --top-module tb_stack_cache -o sim
    ./obj_dir/sim

Replace `tb_stack_cache` with any other testbench; modules are found by file
name through `-I`.

| testbench | what it shows |
|-----------|---------------|
| `tb_address_decoder`, `tb_row_comparator` | exhaustive truth tables at 4 and 8 or 32 ways |
| `tb_lru_row` | comparator, enable OR and load-when-enabled of one row |
| `tb_lru_stack` | 4, 8 and 32 ways against a list model, every row after every edge; top-row hits, moving hits and misses all occur |
| `tb_fifo_stack` | 4 and 16 ways; fill order 0, 1, 2, ...; hits leave the order alone |
| `tb_tag_ram` | lookups against an array model, write-then-read timing |
| `tb_stack_cache` | four small directories (LRU/FIFO, 1 to 4 sets, 2 to 8 ways) under random traffic with idle cycles; fills, evictions and each kind of hit counted |
| `tb_stack_cache_full` | the default 32 KB, 4-way LRU directory, 40,000 accesses checked one by one |
| `tb_sweep_2way` ... `tb_sweep_32way` | 32 KB caches of 2 to 32 ways, LRU and FIFO side by side on one stream, miss rates printed |

The address stream is synthetic (instruction fetches with loops, a hot data
region and scattered data) and only 30,000 accesses long, so cold misses
weigh heavily and the miss rates are not those of any real program. What
they do show is that the two policies behave as intended on the same
stream, LRU missing less than FIFO at every associativity:

| ways | LRU miss rate | FIFO miss rate |
|------|---------------|----------------|
| 2    | 16.28 %       | 17.13 %        |
| 4    | 15.38 %       | 17.33 %        |
| 8    | 15.15 %       | 17.81 %        |
| 16   | 15.02 %       | 17.94 %        |
| 32   | 14.92 %       | 18.06 %        |

## How far to trust it, and where it is this design's own

Taken from the circuit description: the row organisation, the comparator as
decoder plus AND with the match lines, the OR enable chain with `miss`
entering at the bottom, the top row loading from transfer lines selected by
the comparators, the shift-down of the rows above, the FIFO rotate on miss,
`n*log2(n)` bits per set, and one update per rising clock edge.

Choices made here where the description is silent or not digital:

* The initial order (row `k` = way `n-1-k`) and an asynchronous precharge.
* Match lines are driven all zero on a miss. In the original circuit they
  float and the comparators are pseudo-nMOS wired-ORs; here everything is
  two-state logic with the same function, and the transfer lines are an
  AND-OR instead of pass switches.
* The bottom row drives the transfer lines when its enable is high, which
  covers both a hit on that row and a miss.
* The tag RAM's internals: a parallel compare over flip-flop storage, with a
  valid bit per way.
* The multi-set arrangement, the 32-bit address split and the tag refill on
  a miss, which stand in for the cache controller.
* The policy is chosen at elaboration (`POLICY`), not switched at run time.

Verification status: every testbench above passes under Verilator 5, and
each module-level testbench fails against a copy of its module with one
deliberate bug (a cut enable chain, a wrong transfer-line select, a wrong
refill way, and so on). All RTL lints cleanly with `verilator -Wall` apart
from the notes below and elaborates in Yosys with the slang front end. After
coarse synthesis the 4-way LRU stack is 8 flip-flops and about 30
word-level cells; the default directory holds 2,048 stack bits, 1,024
valid bits and 19,456 tag bits.

Not reproduced: the circuit-level results (operating frequency of a
full-custom implementation) and the miss-rate figures for real program
traces, which need traces this design does not have.

Lint notes: `stack_cache` leaves the `rows` outputs of the stacks open (they
exist for observation and testing) and does not use the block-offset bits
of the address.
