# Multi-character content scanner with unique-substring alignment detection

A network intrusion detection system must find thousands of fixed strings
(signatures) in the payload of every packet at line rate. Taking several
characters per clock raises the throughput, but a signature can then start in
any lane of the input word, and the straightforward cure, one copy of every
comparator per lane, multiplies the logic by the number of lanes.

This design reads **four characters (32 bits) per clock** and avoids most of
that replication. It first finds out *where* a possible signature is aligned,
using a short substring that identifies the signature, then shifts the data
into place once and matches every signature as if one character arrived per
clock. The shifting logic and the comparators are shared by all the
signatures of a set, because the way the signature database is partitioned
guarantees that only one of them can be a candidate at any moment.

The RTL is SystemVerilog (IEEE 1800-2017), fully synthesizable, and
parameterized by signature tables kept in a package.

## Partitioning the signature database

The hardware is generated from a signature database that has been split
off-line. The split itself is software and is not part of this RTL; the tables
in `rtl/cs_pkg.sv` hold its result.

* **Short signatures** (seven characters or fewer) gain nothing from the
  scheme and go to the naive matcher (below).
* **u-sets.** The long signatures are grouped into sets in which every
  signature contains a *u-substring*: a substring that occurs in no other
  signature of the same set. Seeing a u-substring in the data is then a
  necessary condition for its signature, and for no other signature of the set.
  U-substrings are usually short (one to four characters), so detecting them at
  every alignment is cheap.
* **h-sets and t-sets (security threshold).** With four characters per clock,
  two u-substrings of a set may be seen in the same word, one of them from an
  impostor (data that contains the u-substring but is not the signature). Each
  u-set is therefore split again so that, whenever two u-substrings of the set
  fire in the same word, the *earlier* one belongs to the true candidate. The
  split puts signatures with long prefixes before their u-substring into an
  h-set and signatures with long suffixes after it into a t-set; signatures that
  fit neither rule go to the naive matcher.

Every h-set or t-set becomes one **matching engine**. Rules a table must obey
for the hardware to be correct:

1. each u-substring occurs exactly once in its own signature and in no other
   signature of the same set;
2. the set satisfies the security-threshold property above: when u-substrings
   of two signatures of the set start within four characters of each other,
   the earlier one must be the genuine one. An impostor u-substring that starts
   one to three characters *before* a genuine one in the same word hides the
   genuine signature. With a correctly partitioned set this cannot happen inside
   a real signature, but it is the one way a signature can be missed, so the
   partitioner must check it.

## Data path

```
in_chars[4] --> 4 decoders --> shared pipeline of character lines (DEPTH x 4 x 256 bits)
                                   |            |                          |
                         matching_engine 0   matching_engine 1  ...   naive_matcher
                         (h-set)             (t-set)
```

### Character lines and the shared pipeline (`char_decoder`, `char_pipeline`)

Each input character is decoded into a 256-bit one-hot *character line*, so
that "is this character an 'a'" is a single wire. Lane 0 carries the earliest
character of the word. The lines shift through `DEPTH` register stages that all
engines and the naive matcher read. Inside the RTL the pipeline is addressed by
*age*: `win[0]` is the newest character, `win[4*r + 3 - l]` is lane `l` of stage
`r`. A lane whose `in_valid` bit is low decodes to all zeros and can match
nothing, so partial words and gaps between packets are safe.

### Inside a matching engine (`matching_engine`)

1. **u-substring matching (`usub_matcher`).** The signatures of a set are laid
   out as a matrix whose rows are aligned on the first character of their
   u-substrings (column `U`). All u-substrings are compared at one common
   pipeline stage `SC`, in four versions, one per lane `a` in which the
   u-substring can begin. The hits of all u-substrings for the same lane are
   ORed, giving four bits. The ORs are pipelined trees of six-input reductions.
2. **Alignment codification (`align_encoder`).** A priority encoder turns the
   four bits into the lane of the candidate. The lowest lane, the earliest
   character, wins (see the security threshold above). The encoder also reports
   a double detection (`cand_multi`).
3. **Alignment correction (`char_matrix`).** Column `j` of the matrix always
   refers to the character `U - j` positions before the u-substring, so it is
   one of four consecutive character lines, chosen by a 4-to-1 multiplexer
   driven by the alignment code. A multiplexer exists only for a
   (column, character) pair that some signature uses. Signatures that share a
   character in the same column share its multiplexer.
4. **Signature matching (`sig_matcher`).** From here on the data is aligned, so
   every signature has one comparator, not four. Each group of six characters
   is one 6-input LUT comparator, registered; longer signatures AND their
   comparators in a pipelined tree (12 characters: two comparators and one
   2-input AND).
5. **Identifier encoding (`onehot_encoder`).** A pipelined one-hot to binary
   encoder gives the index of the matching signature within the set. An
   assertion flags two signatures of one set matching in the same clock, which
   a correctly partitioned table rules out.

The engine works out its geometry from its table at elaboration time
(`rtl/cs_geom.svh`): the u-substring column `U`, the matrix width `NCOL`, the
common stage `SC = ceil((longest u-substring - 1) / 4)`, and the stage `TAP` that
the matrix reads. The matrix reads the pipeline when the alignment code is
ready, `LA = 2 + tree_levels(NSIG)` clocks after detection. If the signatures'
tails have not yet entered the pipeline by then, the code is held `D` more
clocks. The engine stops elaboration with an error if the pipeline window
(`DEPTH * 4` characters) is too short for its table.

### Short signatures (`naive_matcher`)

Short signatures and the left-over signatures are matched the classic
multi-character way: each signature's comparator is built four times, once for
each lane its last character can land in. The output is a hit per signature
and per lane, not an identifier, because several short signatures can end in
the same word.

## Interface and timing of `content_scanner`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (clears the pipeline and all match flags) |
| `in_chars` | in | 4 x 8 | input word, lane 0 earliest |
| `in_valid` | in | 4 | lane carries a character |
| `match_valid[e]` | out | NENG | engine `e` found a signature |
| `match_id[e]` | out | NENG x 3 | index of that signature in engine `e`'s table |
| `cand_valid[e]`, `cand_align[e]`, `cand_multi[e]` | out | | u-substring seen, its lane, several seen in one word |
| `n_hit[k][a]` | out | 5 x 4 | short signature `k` ended in lane `a` |

A word is accepted every clock; there is no back-pressure. Latencies, counted
from the clock in which a character is presented:

* engine match: `LATENCY` clocks after the clock that carried the **first
  character of the u-substring** (9 for both example sets: pipeline entry 1,
  common stage 1, u-substring register 1, OR tree 1, priority encoder 1, matrix
  1, comparators 1, AND tree 1, identifier encoder 1). Every signature of an
  engine reports with the same latency;
* short signature: 2 clocks after the clock that carried its **last character**.

At 125 MHz the input rate is 4 Gbit/s; 6.4 Gbit/s needs 200 MHz.

## The example database

`cs_pkg` holds a small hand-partitioned database of NIDS-style strings (it is
illustrative, not a real rule set):

* engine 0, h-set (u-substring near the end): `/etc/passwd`,
  `cmd.exe?/c+dir`, `SITE EXEC %p`, `GET /default.ida?`,
  `Authorization: Basic`, `Content-Disposition: form-data`;
* engine 1, t-set (u-substring at the start): `xp_cmdshell`,
  `<script>alert(`, `/bin/sh -i`, `Qsuperuser`, `%c1%1c../winnt`;
* naive matcher: `root`, `%00`, `wget `, `cmd.exe`, `passwd`.

A signature entry is `'{str: "...", len: L, uoff: o, ulen: n}`, the string
literal, its length, and the offset and length of its u-substring. To use
another database, fill the `H_SIGS`-style tables, list each set in `NENG`,
`ENG_NSIG` and `ENG_SIGS` (padded to `MAXSET` entries), widen `MAXLEN` if a
signature is longer than 64 characters, and set `DEPTH` of the top so that the
window covers the widest matrix: at least `4*TAP + 4 + U` characters, which the
engines check. The naive matcher needs `N_NSIG`/`N_SIGS`; its output width
follows. A real rule set, with tables of thousands of entries, is best emitted
into the package by the partitioning program.

## Departures and limits

* **Same latency for all signatures.** In the original design, a signature's
  result arrives after a number of clocks that depends on its length. Here every
  AND tree is padded to the depth of the longest signature, so the identifier
  encoder never sees results of two different candidates in one clock.
* **Single-signature sets** are handled by the naive matcher, not by a separate
  multi-character automaton.
* **u-substrings** are compared in one registered step whatever their length.
* **Outputs are per engine.** No global identifier numbering, no result buffer.
* **Not included:** the off-line partitioning program, and the evaluation
  platform around the scanner (PCI Express end-point, DMA, packet input buffer
  and identifier output buffer).
* **Capacity.** The example holds 11 engine signatures (163 characters) and 5
  short ones. The original evaluation used a 3095-signature rule set of 84,403
  characters in seven h/t-sets plus 885 naive signatures, reaching 6.4 Gbit/s
  on an FPGA. The RTL is parameterized for that, but such tables are not
  provided. The largest engines simulated hold 35 and 96 generated signatures
  (see Verification).

## Files

| file | content |
|---|---|
| `rtl/cs_pkg.sv` | constants, types, tree-depth helpers, example database, engine table |
| `rtl/cs_geom.svh` | geometry functions included by the modules that take a signature table |
| `rtl/char_decoder.sv`, `rtl/char_pipeline.sv` | decoders and shared pipeline |
| `rtl/usub_matcher.sv`, `rtl/align_encoder.sv`, `rtl/char_matrix.sv`, `rtl/sig_matcher.sv`, `rtl/onehot_encoder.sv` | the five stages of an engine |
| `rtl/reduce_tree.sv` | pipelined OR/AND tree of 6-input reductions |
| `rtl/matching_engine.sv`, `rtl/naive_matcher.sv` | an h/t-set engine, the short-signature matcher |
| `rtl/content_scanner.sv` | top |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_stream_pkg.sv` | stream builder and reference matcher used by the scanner testbenches |

## Verification

Every testbench compares against values it computes itself and ends with
`TB_RESULT checks=N failures=M`. A watchdog ends a hung run as a failure.

* Unit benches: all 256 characters through the decoder; the pipeline window
  against a stream model; the alignment encoder on all 16 vectors; the
  u-substring matcher against string search at the common stage; the matrix
  column by column; the comparators with exact and one-off signatures; a
  40-input identifier encoder (three tree levels).
* `tb_matching_engine` and `tb_content_scanner` run a random stream of
  background bytes (0x80-0xFF, which no example signature uses), whole
  signatures at every alignment, near misses, signatures broken by an invalid
  lane, lone u-substrings and deliberate double detections. The reference finds
  every occurrence of every signature by string comparison and predicts the
  clock and identifier of each report. The exact latencies above are checked.
  `tb_content_scanner` runs the top at its default parameters. It also counts
  each mechanism (matches in every part, every alignment in each engine, double
  detections, near misses, invalid-lane breaks, impostors, several short hits
  in one clock) and fails if any never happened.
* `tb_engine_workload` builds two engines from signature sets generated at
  elaboration, sized like mid-sized partitions of a real rule set: an h-set of
  35 signatures (713 characters) and a t-set of 96 signatures (1097
  characters, one of them 44 characters long). They need three-level OR and
  encoder trees, and the t-set needs the alignment delay (D = 5, latency 19).
  Every signature is placed twice in the stream, some as near misses. This is
  the largest size simulated. An engine the size of the largest real partition
  (1289 signatures, about 46,000 characters) was still being elaborated by
  Verilator after ten minutes and has not been simulated. Building this bench
  takes about a minute.

Running a bench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_content_scanner rtl/cs_pkg.sv tb/tb_stream_pkg.sv tb/tb_content_scanner.sv
./obj_dir/Vtb_content_scanner
```

Replace the top module and the last file for another bench (`tb_stream_pkg.sv`
is only needed by the naive, engine and scanner benches).
