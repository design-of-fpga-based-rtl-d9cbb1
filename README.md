# LZ77 compression engine with a run-time choice between speed and ratio

LZ77 compresses data by replacing a string that occurred before with a
(length, distance) pair, an *LD pair*. How much it compresses depends on how
many earlier strings are compared with the current one: more comparisons find
longer matches but cost time. Hardware LZ77 engines usually fix this trade-off
when they are built. This engine lets the host pick it for every chunk it
compresses, with no change to the hardware:

* **TF mode (throughput first)**: each target string gets a fixed share of the
  comparators. Comparisons beyond that share are dropped, so the pipeline never
  waits for them.
* **CF mode (compression-ratio first)**: every comparison is made. When the
  comparisons of one cycle do not fit into the comparators, the work is spread
  over several cycles and the front of the pipeline stalls.

Both modes use **dynamic skip**. First, a small tag stored next to every
dictionary entry removes comparisons that cannot produce a match. Then, in TF
mode, a target that needs fewer comparators than its share hands the spare ones
to the next target. In CF mode, the filtering makes more unit operations fit
into a single cycle.

The RTL is SystemVerilog-2017. The architecture, its block structure, the two
modes, dynamic skip and all the main sizes follow a published FPGA design of
this engine. The points where that description is silent were filled in here;
they are listed under [Design choices](#design-choices-not-taken-from-the-architecture-description).

## Sizes

| parameter (lz77_pkg) | value | meaning |
|---|---|---|
| `NSTR` | 2 | target strings searched per cycle (one *unit operation* per target) |
| `NSC` | 4 | string comparators |
| `NWAY` | 4 | ways of the hash memory = histories per target (n) |
| `HASH_ENTRIES` | 4096 | buckets per way |
| `NBANK` | 8 | hash-memory banks (own choice) |
| `DM_BYTES` | 32768 | data memory = chunk size |
| `TAG_BITS` | 7 | filtering tag |
| `HB_DEPTH` | 32 | hFIFO entries |
| `MIN_LEN`, `MAX_LEN` | 3, 258 | match lengths (8-bit length code = len-3) |
| `DIST_BITS` | 14 | distance field, so distances are 1..16383 |

## Pipeline

```
 host ──► DM (32 KB) ◄──────────────────────────────┐ windows
           │ prefetch                               │
           ▼                                        │
          ISB ─► DMU (hash, 4 ways, 8 banks) ─► HF (tags) ─► HB: hFIFO ─► DMAS ─┘
                                                                           │ issue record
                                                        SC x4 ◄────────────┘
                                                          │
                                                          ▼
                                                   MS (longest, lazy) ─► tokens
                                                          │ cur
                                         engine controller ─► cur to ISB, HB, MS
```

| cycle | stage | module |
|---|---|---|
| t | The ISB presents positions `pos`, `pos+1` with their bytes. The DMU hashes both, reads their buckets and inserts them. The HF filters the histories. The entries are written into the hFIFO. | `input_stream_buffer`, `dictionary_mgmt_unit`, `history_filter`, `history_fifo` |
| t+1 (or later) | The DMAS picks entries and histories. Their addresses go to the DM. | `dm_addr_selector`, `history_buffer` |
| t+2 | The DM windows arrive. Four comparators measure match lengths. The MS selects the longest match and applies lazy matching. | `data_memory`, `string_comparator`, `match_selector` |
| t+3 | Tokens appear on `tok_valid`/`tok`. | `lz77_accel` |

* **ISB** (`input_stream_buffer`): steps through the chunk two positions per
  cycle. It reads its bytes one cycle ahead from a DM port.
* **DMU** (`dictionary_mgmt_unit`): the hash table. A bucket holds the four most
  recent positions with that hash, newest first, and all four are read in one
  access. Each of the 8 banks has one port. If both targets of a cycle hash
  into the same bank, the second target waits one cycle and the ISB stalls.
  This *bank conflict* is the main reason why the engine falls short of 2
  bytes/cycle. A history is valid only if it lies 1..16383 bytes back in the
  current chunk.
* **HF** (`history_filter`): keeps a 7-bit tag per history in a tag memory that
  mirrors the hash memory. A history whose tag differs from the target's tag
  cannot start a 3-byte match, so it is dropped. The HF reports the surviving
  histories, packed, and their number, *nHist*.
* **HB** (`history_buffer` = `history_fifo` + `dm_addr_selector`): explained
  below.
* **DM** (`data_memory`): has one host write port and seven read ports: one for
  the ISB, two for target strings and four for histories. Each read port
  returns a 258-byte window starting at any byte address.
* **SC** (`string_comparator`): gives the length of the common prefix of the
  target and one history. The length is capped at 258 and at the end of the
  chunk.
* **MS** (`match_selector`): see [Output and lazy matching](#output-and-lazy-matching).
* **Engine controller** (`engine_controller`): captures `start`, `mode`,
  `dyn_skip` and `chunk_len` together, so a mode change costs nothing. It owns
  `cur`, the first byte not yet represented in the output.

## The history buffer: where the mode takes effect

Every target written into the hFIFO carries `is_valid`, `cindex` (its
position), its literal byte, `nHist` and up to four history positions
(`hindex`, nearest first). The FIFO has two write pointers and two read
pointers. In each cycle the DM address selector looks at the entries at RP1
and RP2 and decides two things: which histories go to the four comparators,
and by how much the read pointers move.

An entry needs `nHist` comparators. It needs none if it is invalid or if
`cindex < cur`, because then it lies inside a string that an LD pair has
already replaced. Such an entry leaves the FIFO at once.

**TF mode.** Both visible entries leave every cycle. Each gets `NSC/NSTR = 2`
comparators. With dynamic skip, a target that needs fewer than 2 gives the rest
to the next one, in order. The histories cut off are always the most distant
ones.

| nHist RP1 / RP2 | comparators | RPs move |
|---|---|---|
| 1 / 4 | 1 + 3 | +2 |
| 3 / 4 | 2 + 2 (one history of each dropped) | +2 |
| 4 / 4, no dynamic skip | 2 + 2 | +2 |

**CF mode.** Nothing is dropped, and all histories of one target are compared
in the same cycle. Entries leave in order as long as their histories fit into
the four comparators.

| nHist RP1 / RP2 | comparators | RPs move |
|---|---|---|
| 4 / 4 | 4 + 0 | +1 (RP2 waits) |
| 2 / 2 | 2 + 2 | +2 |
| 0 / 4 | 0 + 4 | +2 |

When CF keeps an entry back, the hFIFO fills. Once fewer than two slots are
free, `full` holds the DMU and the ISB. This is the CF stall. Tag filtering
lowers nHist, so more cycles fit the "2 / 2" row. That is why dynamic skip
speeds up CF. In TF it replaces useless comparisons with useful ones, which
improves the ratio.

## Output and lazy matching

The MS receives results in position order, one or two per cycle. For each
target it takes the longest match among that target's comparators, and the
nearer history on a tie. It then applies zlib-style lazy matching:

1. A match of at least 3 bytes is held pending for one position.
2. If the next position has a strictly longer match, the pending position is
   emitted as a literal, and the longer match becomes pending.
3. Otherwise the pending match is emitted as an LD pair, and `cur` advances
   past it.
4. A position without a match is emitted as a literal.

Results below `cur` are ignored. This is how the unit operations inside a
replaced string are invalidated. When `cur` passes the ISB after a long match,
the ISB jumps to `cur`. The replaced bytes are never searched and never
inserted into the dictionary. This is why data with long matches compresses
at more than 2 bytes/cycle.

Tokens leave on `tok_valid[1:0]` / `tok[1:0]` in stream order, with slot 0
first. Each `token_t` holds:

* `is_pair`: 1 for an LD pair, 0 for a literal;
* `literal`: the byte (valid for a literal);
* `len_code`: the match length minus 3;
* `ld_dist`: the distance.

`done` pulses in the cycle in which the last tokens appear. `cycles` then holds
the number of cycles the chunk took.

## Using the top (`lz77_accel`)

1. Hold `rst_n` low, then release it.
2. Write the chunk through `dm_wr_en`/`dm_wr_addr`/`dm_wr_data`, one byte per
   cycle, while `busy` is low.
3. Pulse `start` for one cycle, with `mode` (`MODE_TF`/`MODE_CF`), `dyn_skip`
   and `chunk_len` (1..32768) valid in the same cycle.
4. Collect tokens until `done`. The next chunk may use another mode.

The output cannot be stalled. The `ev_*` outputs pulse on internal events
(bank conflict, hFIFO full, TF drop, TF share lending, CF split, lazy match,
ISB jump, tag filtering) and are meant for measurement.

## Measured behaviour

`tb_workload_chunks` compresses a 96 KB synthetic text file in three 32 KB
chunks:

| configuration | bytes/cycle | compression ratio* |
|---|---|---|
| TF, dynamic skip | 2.03 | 2.196 |
| CF, dynamic skip | 1.57 | 2.245 |
| TF, no dynamic skip | 2.01 | 2.153 |
| CF, no dynamic skip | 1.52 | 2.245 |

\*The ratio counts 9 bits per literal and 23 bits per LD pair.

These results follow the expected pattern:

* TF is faster than CF.
* CF compresses better than TF.
* Dynamic skip raises TF's ratio and CF's speed.

The published FPGA figures (1.76 / 1.58 bytes/cycle on the Canterbury corpus)
are not directly comparable. The data is different, and TF here exceeds 2
bytes/cycle because the ISB jumps over replaced strings. CF without dynamic
skip is faster here than the roughly 1.24 bytes/cycle reported for that
configuration, because invalid entries and unfilled ways need no comparator.

## Design choices not taken from the architecture description

* **Compare width.** Each comparator checks a full 258-byte window in one
  cycle, and the DM provides such windows at any byte address. On an FPGA this
  would mean replicated, banked RAM plus a wide compare; the description does
  not say how long strings are compared. It is the largest cost in this RTL.
* **Hash memory.** The bank count (8), the hash function (a 12-bit XOR fold of
  three bytes), the tag function (upper-bit mix), newest-first replacement and
  a per-bucket valid bit cleared at each start are all own choices. A bucket
  is read combinationally and written at the clock edge, so later targets see
  earlier inserts.
* **Invalidation.** It uses a broadcast `cur` compare instead of clearing
  per-stage valid bits. The effect is the same.
* **Register boundaries and flow control.** The register boundaries above are
  own choices, as are: full at fewer than two free slots, no output
  backpressure, a 1-byte host write port, and one-cycle start/done pulses.
* **Lazy matching.** zlib's `max_lazy_match` cut-off is not applied.
* **Not built.** The deflate system around the engine (16 engines, Huffman
  encoders, bit packers) is not part of this RTL.

## Simulation

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog.

```
verilator --binary --timing --assert -Irtl rtl/lz77_pkg.sv tb/tb_lz77_accel.sv \
          --top-module tb_lz77_accel -Mdir obj && ./obj/Vtb_lz77_accel
```

| testbench | covers |
|---|---|
| `tb_lz77_accel` | Full engine at default sizes: a 4000-byte chunk and a full 32 KB chunk in TF, CF and both without dynamic skip. Output is decoded and compared. Checks that every mechanism (bank conflict, hFIFO full, TF drop and lending, CF split, tag filtering, lazy match, ISB jump, mode switch) occurs. Takes a few seconds. |
| `tb_workload_chunks` | 96 KB file, chunk by chunk, in all four configurations. Reports bytes/cycle and ratio. |
| `tb_dictionary_mgmt_unit` | Against a reference hash table, including the bank-conflict service pattern and the 16383-byte limit. |
| `tb_dm_addr_selector` | The worked TF/CF examples, plus random entries against an exhaustive reference. |
| `tb_history_filter`, `tb_history_fifo`, `tb_history_buffer`, `tb_match_selector`, `tb_string_comparator`, `tb_input_stream_buffer`, `tb_data_memory`, `tb_engine_controller` | Block-level checks against models written in the testbench. |

The hash and tag functions live in `lz77_pkg` (`lz_hash`, `lz_tag`). Changing
them changes which collisions the filter catches, but not the correctness of
the output, because every match is verified byte by byte by a comparator.
