# PB-CAM with a Block-XOR parameter extractor

A content-addressable memory (CAM) finds a search word by comparing it with
every stored word at once. Those comparisons cost most of a CAM's power. A
precomputation-based CAM (PB-CAM) saves most of them by storing a short
*parameter* next to each word. The parameter is a few bits computed from the
word. A search then runs in two parts:

1. The parameter of the search word is computed and compared with all stored
   parameters. These are 4-bit comparisons.
2. Full 14-bit word comparisons run only for the entries whose parameter
   matched. All other word comparators stay idle.

How much this saves depends on how evenly the parameter spreads the words
over its codes. A parameter that counts the ones in the word is bell-shaped.
For random 14-bit words, up to 3432 of the 2^14 words share the most likely
ones count. This design uses a **Block-XOR** parameter instead, which is
almost uniform. At most 1152 words share a code, and the mean is 1096 when
the CAM holds every 14-bit value once.

This repository is synthesizable SystemVerilog for that CAM at 2^14 words of
14 bits, with 4-bit parameters.

## The Block-XOR parameter

The 14-bit word is cut into four blocks, and each block's parity (the XOR of
its bits) becomes one parameter bit:

| parameter bit | block       | width |
|---------------|-------------|-------|
| A0            | data[3:0]   | 4     |
| A1            | data[7:4]   | 4     |
| A2            | data[11:8]  | 4     |
| A3            | data[13:12] | 2     |

Half of the values of any block have parity 0 and half have parity 1. So the
16 raw codes are equally likely, with 8·8·8·2 = 1024 words each.

One code must be kept free to mark an empty entry. Here that is the all-ones
code, 1111. When the raw parameter comes out as 1111, a multiplexer outputs
the first block, data[3:0], as the parameter instead. The select signal is
S = A3·A2·A1·A0. Because A0 = 1 in that case, the first block has odd parity.
An odd-parity block can never be 1111, so the empty code is never produced.

The 1024 words that had the raw code 1111 are spread over the eight 4-bit
values with odd parity (1, 2, 4, 7, 8, 11, 13, 14), 128 on each. The final
distribution is:

- each odd-parity code: 1024 + 128 = 1152 words;
- each even-parity code other than 1111: 1024 words;
- code 1111: no words; it means "entry empty".

This is the figure that matters for power. No search with a matching
parameter compares more than 1152 words in the second part.

`rtl/block_xor_extractor.sv` is generic in `DATA_W` and `PARAM_W`. It needs
ceil(DATA_W/PARAM_W) = PARAM_W: one block per parameter bit, and a first
block as wide as the parameter it replaces. Other widths stop elaboration
with an error.

## Organisation

```
            wr_data ──► block_xor_extractor ──► (empty code if !wr_valid) ──┐
                                                                             ▼
srch_data ─► block_xor_extractor ─► srch_param ─► param_memory ── phit[DEPTH] (comparator enables)
    │                                                                         ▼
    └────────────────────────────────────────────────────────► data_memory ── match[DEPTH], cmp_count
                                                                              ▼
                                                                     match_encoder ─► hit, addr, multi
                                                                              ▼
                                                                       result register
```

| module                | role |
|-----------------------|------|
| `pbcam_pkg`           | default sizes: `DATA_W`=14, `PARAM_W`=4, `DEPTH`=16384 |
| `block_xor_extractor` | combinational parameter extractor described above |
| `param_memory`        | `DEPTH` × 4-bit parameters with asynchronous reset to empty; parallel compare gives `phit` |
| `data_memory`         | `DEPTH` × 14-bit words; word `i` is compared only when `phit[i]` is set; `cmp_count` counts the enabled comparators |
| `match_encoder`       | hit flag, lowest matching address, multiple-match flag |
| `pbcam`               | top level: the write and search ports, and the result register |

Both parts of a search are built as plain parallel logic. The power saving
comes from gating: a data comparator whose enable is low gives "no match" and
does not need to evaluate. The RTL writes this as `enable && equal`. A
low-power implementation would use the enable to stop the match line from
precharging. `cmp_count` shows, per search, how many word comparisons
the second part needed.

## Interface and timing (`pbcam`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_i`, `rst_ni` | in | 1 | clock; asynchronous active-low reset, which empties every entry |
| `wr_en_i` | in | 1 | write `wr_addr_i` at this rising edge |
| `wr_valid_i` | in | 1 | 1: store `wr_data_i` and its parameter; 0: empty the entry |
| `wr_addr_i` | in | 14 | entry address |
| `wr_data_i` | in | 14 | word to store |
| `srch_en_i`, `srch_data_i` | in | 1, 14 | start a search for `srch_data_i` |
| `rslt_valid_o` | out | 1 | one clock after `srch_en_i` |
| `rslt_hit_o`, `rslt_addr_o` | out | 1, 14 | found; lowest matching address |
| `rslt_multi_o` | out | 1 | two or more entries hold the word |
| `rslt_param_o` | out | 4 | parameter of the search word |
| `rslt_cmp_count_o` | out | 15 | number of words compared in the second part |

- **Throughput:** one search can start in every clock, at the same time as a
  write.
- **Write ordering:** a search sees the contents from before a write in the
  same clock.
- **Result timing:** the result is registered, so it appears exactly one
  clock after the request. It holds until the next search.
- **Assertion:** an immediate assertion in `pbcam` checks that the search
  parameter is never the empty code.

## Where this RTL departs from, or adds to, the method

The method fixes the block/XOR structure, the block widths, the
multiplexer, the reserved code and the two-part search. The method does not
specify the following, so they are this design's own choices:

- Which data bits make up which block, and that the "first" block is
  data[3:0]. The 1152/1024 distribution holds for any such assignment.
- A search takes a single clock, with a registered result. The method
  targets a 10 ns search access time, but this RTL has no timing constraint
  or pipelining for it.
- The write port, emptying an entry by writing the empty code, and the reset
  behaviour.
- Lowest-address priority and the multiple-match flag.
- The `cmp_count` output, which exists so that the comparison savings can be
  observed.

Not included:

- **Ones-count extractor.** The ones-count parameter extractor of the
  earlier PB-CAM appears only as the comparison point. Its statistics are
  quoted above, but it is not built.
- **Circuit-level parts.** Power, delay and power-delay figures depend on
  the circuit and the process. Match-line precharge and the memory cells
  are examples. Neither is modelled here.
- **Cell counts.** The match encoder and the comparator count are loops over
  all entries. A synthesis front end that unrolls loops needs a high unroll
  limit for 2^14 entries, and synthesis at that size is slow. No cell counts
  are quoted.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_block_xor_extractor` | all 2^14 words against an independent bit-counting model; codes with odd parity get exactly 1152 words, even ones 1024, and 1111 none |
| `tb_param_memory` (64 entries) | reset to empty; random writes, including the empty code; hit vector for all 16 search parameters after every write |
| `tb_data_memory` (64 entries) | gated compares and the comparator count against a model, with random enables and many duplicates |
| `tb_match_encoder` (64 entries) | hit, lowest address and multiple match for empty, one-hot, two-hot and dense vectors |
| `tb_pbcam` (64 entries) | 6000 random clocks of writes, removals and searches against a model; see the list below |
| `tb_pbcam_full` (defaults) | see below |

`tb_pbcam` checks every search result, including the one-clock latency. It
fails if any of these events never happens:

- a hit;
- a search filtered out by the parameter compare alone;
- a parameter hit whose data did not match;
- a multiple match;
- the extractor's substitution path;
- removal of an entry;
- a write and a search in the same clock;
- a reset.

`tb_pbcam_full` uses the full-size CAM with no parameter overrides. It works
as follows:

1. Writes each 14-bit value `i` to entry `i`.
2. Searches all 16384 values. Each search must hit at its own address, with
   the expected comparison count, one clock after the request. The maximum
   count must be 1152 and the distribution must match the one above.
3. Removes an entry and writes a duplicate, to check a miss and a multiple
   match at full size.

This testbench takes about 30 s with verilator. The others take under a
second.

## Simulating

With Verilator 5 (all files are IEEE 1800-2017):

```
verilator --binary --timing --assert --top-module tb_pbcam_full \
    -y rtl -y tb +libext+.sv rtl/pbcam_pkg.sv tb/pbcam_ref_pkg.sv \
    tb/tb_pbcam_full.sv -o sim
./obj_dir/sim
```

Replace `tb_pbcam_full` with any other testbench name. To resize the CAM,
override `DEPTH` on `pbcam`, or change the defaults in `pbcam_pkg`. `DEPTH`
must be a power of two, because addresses are `$clog2(DEPTH)` bits.
Changing `DATA_W` requires a `PARAM_W` that satisfies the block rule above.
For 14 bits, that means `PARAM_W` = 4.
