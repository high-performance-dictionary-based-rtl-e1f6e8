# PASTA string matcher in SystemVerilog

This is an implementation of PASTA, a dictionary string matcher for deep packet inspection from
"High Performance Dictionary-Based String Matching for Deep Packet Inspection". Each input stream
takes one byte per clock. The matcher reports every occurrence of every dictionary word.

It matches a word in two parts:

* **The head** is the first R*S = 32 characters. The *Pipelined Affix Search Relay* (PASR)
  matches it at every input offset. The relay is a chain of R = 4 pipelined binary search trees
  (pBSTs). Each tree compares an 8-character window of the input.
* **The tail** is everything after the first 32 characters. The *Tail Acceleration Finite
  Automaton* (TAFA) follows it. The TAFA is an Aho-Corasick automaton that holds only the states
  deeper than 32 characters. It is stored as 128-bit "branches". Each branch can consume up to
  8 characters per clock.

The relay hands each reached 32-character state (a *tail root*) to the TAFA. It does this through
a ring buffer of records `{affix index, input pointer}`.

## Files

| File | Contents |
|---|---|
| `rtl/pasta_pkg.sv` | Constants (S=8, R=4, 15 levels, 16-bit affix index, 20-bit pointers). Also the branch record type and the modular pointer compare. |
| `rtl/pbst.sv` | One pipelined binary search tree with one memory per level. It holds a shared tree and has one search pipeline per stream. |
| `rtl/pasr.sv` | The relay of R pBSTs with per-stream input delay lines. It produces match outputs and tail-root records. |
| `rtl/tail_ring.sv` | The ring buffer of tail roots, a FIFO. It drops records whose root is 0. |
| `rtl/input_buffer.sv` | The character ring the TAFA reads from. It has an unaligned 8-character read and back-pressure. |
| `rtl/branch_mem.sv` | The branch transition memory: 2^18 branches of 128 bits, with one read port per stream. |
| `rtl/tafa_cmp.sv` | The comparator. It matches one branch against 8 input characters. |
| `rtl/tafa.sv` | The TAFA controller: tail-root intake, goto and failure transitions, roll-back and match output. |
| `rtl/pasta_top.sv` | The two-stream top. It has one relay with shared pBSTs and a shared branch memory. Each stream has its own ring, input buffer and TAFA. |
| `tb/pasta_tb_pkg.sv` | The dictionary compiler used by the tests. It turns a word list into pBST node images and branch images. |
| `tb/*_tb.sv` | One self-checking testbench per module. `pasta_top_full_tb` runs the top at full size. |

## How it works

### Relay (PASR)

Segment r of the dictionary holds characters [8(r-1), 8r) of every word. Each entry is keyed by
the *affix index* of the word's previous segment. Shorter entries are padded with zero characters.

An entry carries three extra fields:

* an 8-bit *containment bitmap*: bit k-1 set means a word ends after k characters of the segment;
* a *padding bit*: 1 means the entry is a full 8 characters;
* its affix index: the 1-based rank of the entry in its sorted segment.

An entry that is a prefix of another entry with the same key is merged into that entry's bitmap.

pBST-r keeps segment r as a complete binary tree of 15 levels (32767 nodes of 89 bits). Level i
is its own memory. The children of node a are at 2a and 2a+1. The affix index is not stored: it
equals the in-order rank, (2a+1) << (14-i). The loader fills unused slots with an all-ones node
that never matches.

A search for the input offset q enters pBST-1 when character q+7 arrives. It moves down one level
per accepted character. At each node:

* the bitmap bits reached by the window are ORed in;
* a full 8-character match passes its affix index to the next tree.

Later trees take their window from a delay line of the input. Timing is fixed:

* a report for start q of stage r (from 1) appears when character q + 7 + 15r is accepted;
* a full match in the last tree pushes `{index, q+32}` into the ring buffer.

### Tail automaton (TAFA)

A branch holds the following fields:

| Bits | Field | Meaning |
|---|---|---|
| [19:0] | `next_br` | First child branch |
| [39:20] | `fail_br` | Failure branch |
| [42:40] | `n` | Last valid path |
| [45:43] | `r` | Roll-back |
| [47:46] | `m` | Mode |
| [55:48] | `ma_msk` | Match mask |
| [63:56] | `in_msk` | Input mask |
| [127:64] | `path_labels` | Path labels |

Mode m splits the 8 label bytes into 8/2^m paths of 2^m characters.

Each clock, the controller compares the branch with the 8 characters at its pointer p:

* **A path matches completely.** The controller goes to `next_br + path` and advances p by 2^m.
* **No path matches and `fail_br` is non-zero.** The controller goes there and moves p back by
  r characters.
* **No path matches and `fail_br` is zero.** The tail is over.

Word ends are reported as `{branch, p, 8-bit vector}`, where bit k means a word ends at p+k. They
are reported for every matched label byte whose `ma_msk` bit is set.

When idle, the controller takes the next record from the ring buffer. It drops records whose
pointer is not beyond p, because the state already reached covers them. It drops covered records
while busy too. This keeps a long tail from filling the ring.

### Flow control

A stream is held back (`in_ready` low) in two cases:

* its ring buffer is full;
* the next character would overwrite one its TAFA still needs. The TAFA keeps `TAFA_GUARD`
  characters behind its pointer for roll-backs.

After the last character, send R*LEVELS + 8 zero characters to flush the relay. Dictionary
characters must be non-zero.

## Interface of `pasta_top`

* **Loading.**
  * `pbst_cfg_*` writes one node: stage, level, address and the 89-bit node
    `{index, 64-bit label, bitmap, padding bit}`.
  * `br_cfg_*` writes one 128-bit branch.
  * A tail root with affix index d is expected at branch number d.
* **Input.** Per stream there are `in_valid`, `in_char` and `in_ready`. A character is taken when
  valid and ready are both high.
* **Relay matches.** `pm_valid[lane][r]`, `pm_ptr` and `pm_hits`. Bit k-1 of `pm_hits` means a
  word of length 8r+k starts at `pm_ptr`, with r counted from 0.
* **Tail matches.** `tm_valid`, `tm_br`, `tm_ptr` and `tm_vec`. Bit k of `tm_vec` means a word
  ends at `tm_ptr+k`.
* **Monitoring.** `ev` pulses TAFA events: start, discard, goto, stride, fail, roll, end and wait.
  `tail_drop` flags a dropped root-0 record.

Parameters: `NLANES=2`, `NR=4`, `NLEVELS=15`, `BR_ADDR_W=18`, `RING_DEPTH=1024`,
`INBUF_DEPTH=4096` and `TAFA_GUARD=64`. Both depths must be powers of two.

## Design choices not fixed by the source

* Memory reads are asynchronous, and each stream has its own read port. A block-RAM build with
  registered reads would add one pipeline register per pBST level. It would also change the TAFA
  to a two-cycle loop or need a prefetch.
* `n` is the number of the last valid path (0..7), so 8 paths fit in 3 bits.
* `in_msk` can cut a path short.
* `ma_msk` reports word ends inside a path even when the rest of the path fails.
* A failure into the relay part is encoded as `fail_br = 0`.
* The ring pointer names the first character after the tail root.
* Pointers are 20 bits wide and wrap around. They are compared modulo 2^20.
* Flow control, the loading ports and the match output formats are this implementation's own.
* The branch memory has 2^18 entries (4 MB). That is more than the FPGA's on-chip RAM, so it is
  meant to be an SRAM. It is modelled as an array here.

## What is not included

* The dictionary compiler is a testbench class, not hardware or a production tool.
* It uses all four modes, but only for the shapes it recognises. Mode 3 is used for a chain of
  single-child states. Modes 2 and 1 are used when every child starts a chain of 4 or 2 states.
  Mode 0 is used otherwise.
* It does not produce states with more than 8 children. The controller would handle them
  (m = 0 branches chained by `fail_br` with r = 0), but this is not tested.
* Branches are evaluated with asynchronous memory reads. A registered-read (block-RAM) version
  of the pBST levels and the branch memory is not provided.
* With all 15 levels filled, one pBST needs 2.9 Mb of node memory. The published build states
  48 block RAMs per pBST, which is about 1.8 Mb. The RTL keeps the full tree, so it is larger
  than that build.

## Verification

Every module has a self-checking testbench that compares against brute-force search of random
text with a random dictionary. Each prints `TB_RESULT checks=N failures=M`.

* `pasta_top_tb` is a reduced instance (2 stages, small buffers). It checks every match. It also
  requires that each mechanism occurs: each relay stage reporting, tail start and discard,
  transitions in each mode, failures with and without roll-back, tail end, waiting for input, and
  both kinds of back-pressure.
* `pasta_top_full_tb` runs the default configuration. It loads all 4 x 32767 tree nodes and a
  full-width branch memory. It also checks the rate: a stream offered a character every clock
  takes one every clock.
* The pBST testbench also loads a 3-character, 3-level tree with a small hand-worked example. The
  dictionary is {AN, ANGRY, CA, COMM, COMMA, COMMAND, COMMON, DOG, DOGMA}. The test checks
  bitmaps, full matches and affix indices for both segments.
* The pBST and relay testbenches check the fixed latency. The TAFA testbench uses behavioural
  models of its ring, buffer and memory.

To run a testbench with Verilator 5 from the top folder:

```
verilator --binary --timing --assert -Wno-fatal -Wno-WIDTH -y rtl -Irtl -Itb \
  rtl/pasta_pkg.sv tb/pasta_tb_pkg.sv tb/pasta_top_tb.sv --top-module pasta_top_tb -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in the file of the same name. Replace `pasta_top_tb`
with any other testbench name. The full-size test takes about a minute to build and run.
