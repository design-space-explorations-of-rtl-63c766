# HP-TCAM: a ternary CAM built from ordinary RAM

A ternary content-addressable memory (TCAM) compares a search key with every
stored word at once. Each stored bit may be 0, 1 or "don't care" (x). The TCAM
returns the lowest address whose word matches. Real TCAM cells are large,
power-hungry and cannot be built on an FPGA. This design gives the same
function with plain synchronous RAMs: block RAMs on an FPGA, SRAM macros on
an ASIC.

The default instance is a 512-word by 36-bit TCAM. It answers one search per
clock cycle, five cycles after the key is applied.

## The idea: hybrid partitioning

The TCAM table (ENTRIES words of W bits) is cut in two directions:

* **Vertically** into N sub-words of w = W/N bits. A 36-bit word with N = 4
  becomes four 9-bit sub-words.
* **Horizontally** into L **layers** of K = ENTRIES/L consecutive addresses.
  With L = 2, layer 0 holds addresses 0–255 and layer 1 holds 256–511.

Each of the L×N pieces is a **hybrid partition** of K entries by w bits. For
each partition the design answers two questions about the key's sub-word:

1. Does this sub-word occur in the partition at all?
2. If it does, which of the layer's K addresses store a ternary sub-word that
   matches it?

A plain "sub-word → address bitmap" RAM would answer both. It needs 2^w rows
of K bits, though most rows would be empty. The design instead stores only
the rows of sub-words that occur, packed densely. A small index table finds
the packed row. Address k of a layer matches the key exactly when all N
bitmaps have bit k set. ANDing the N bitmaps therefore gives every matching
address in the layer. A priority encoder then picks the lowest one.

## The tables of one partition

### Bit position table (BPT)

The BPT holds one **presence bit** for each of the 2^w binary sub-words. The
bits are stored as 2^(w−B) rows of 2^B bits. Each row also holds a **last
index** (LI) of w+1 bits. A sub-word is split into two fields:

| field | bits | use |
|---|---|---|
| BPTA (row address) | upper w−B bits | selects the row |
| BPI (bit position indicator) | lower B bits | selects the presence bit in the row |

LI of row r is the number of presence bits set in rows 0 … r−1, minus one. It
is stored in two's complement, so row 0 holds −1.

### APT address generator (APTAG)

The APTAG turns a present sub-word v into its rank among the present
sub-words, counted from 0:

    APTA = LI(row) + popcount(row bits [BPI:0])

The count includes the sub-word's own bit, so it is at least 1 for a present
sub-word. Row 0 therefore gives LI = −1 + count ≥ 0. The sum is taken modulo
2^w.

### Address position table (APT)

The APT has 2^w rows of K bits. The row at rank j belongs to the j-th present
sub-word. Bit k of that row is set when address k of the layer matches that
sub-word. Ranks at or above the number of present sub-words are never read.
The design writes them as zero.

### Worked example (w = 4, B = 2, K = 4)

One partition holds these ternary sub-words at addresses 0–3 (bit strings,
x = don't care): `0x01`, `1101`, `0111`, `1101`.

* The binary sub-words that occur are 0001, 0101, 0111 and 1101 (decimal 1,
  5, 7 and 13).
* The BPT rows of 4 bits are:

  | row | presence bits | LI |
  |---|---|---|
  | 0 | {1} | −1 |
  | 1 | {5, 7} | 0 |
  | 2 | none | 2 |
  | 3 | {13} | 2 |

* The APT ranks are: 0 → 0001, 1 → 0101, 2 → 0111, 3 → 1101.
* The APT rows, written as the bits for addresses 3…0, are: rank 0 = `0001`,
  rank 1 = `0001`, rank 2 = `0100`, rank 3 = `1010`.

A search for 0111 reads BPT row 1, at bit position 3. That bit is set. The
count of bits 0…3 of row 1 is 2, so APTA = 0 + 2 = 2. The APT row is `0100`,
so only address 2 matches this sub-word.

### Loading the tables

The tables are loaded by the host through two row-write ports. The hardware
does not convert ternary entries itself. For each layer l and partition p:

1. For every binary value v of w bits, form the K-bit vector `row(v)`. Bit k
   of `row(v)` is set when entry l·K+k is valid and
   `((v ^ value_p) & care_p) == 0`. Here `value_p` and `care_p` are the
   entry's bits of sub-word p; a clear care bit means "don't care".
2. Presence bit of v = `|row(v)`.
3. Walk v upwards, keeping `rank`, the number of present values seen so far.
   - At each row start, v = r·2^B, write `LI[r] = rank − 1`.
   - For each present v, write APT row `rank` with `row(v)`, then add 1 to
     `rank`.
   - Write all other APT rows as zero.

A don't-care bit in a stored sub-word makes it appear under every binary
value it matches. A sub-word with d don't-care bits matches 2^d binary
values, so its address bit is set in 2^d APT rows. The APT still needs at
most 2^w rows.

To change one entry, the host recomputes the rows of every partition the
entry touches and rewrites them. A search in flight while rows are rewritten
may see old or new contents. Reading and writing the same row in one cycle
returns the old row.

## Search pipeline

All layers search the key at the same time. Inside a layer, all N partitions
work in parallel:

| cycle (key applied in 0) | work | module |
|---|---|---|
| 1 | BPT row read; presence bit selected by BPI | `hp_tcam_bpt` |
| 2 | 1's counter over row bits [BPI:0], registered with LI | `hp_tcam_aptag` |
| 3 | adder LI + count drives the APT read address; APT row read | `hp_tcam_aptag`, `hp_tcam_apt` |
| 4 | 1-bit AND of the N presence bits; K-bit AND of the N APT rows | `hp_tcam_and` |
| 5 | local priority encoder in each layer, then global priority encoder; result registered | `hp_tcam_lpe`, `hp_tcam_gpe` |

`result_valid` rises in cycle 5 for a key applied in cycle 0. A new key can
be applied every cycle, and nothing ever stalls. An assertion in `hp_tcam`
checks the fixed latency.

A search can fail in two places:

* **1-bit AND is 0.** Some sub-word is absent from its partition. The APT
  row read in that case belongs to some other sub-word. The 1-bit AND forces
  the layer's K-bit result to zero.
* **K-bit AND is empty.** Every sub-word occurs, but not together in any one
  entry.

**Priority.** Within a layer, the lowest set bit wins. Across layers, the
lowest-numbered layer that found a match wins. The match address is
`l·K + PMA`, where PMA is the layer's potential match address. The result is
the lowest matching address overall, as in a conventional TCAM.

## Interface (`hp_tcam`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset, which clears only the pipeline valid bits |
| `search_valid`, `search_key` | in | 1, W | start a search; sub-word p is `search_key[p*w +: w]` |
| `bpt_we`, `bpt_layer`, `bpt_part`, `bpt_addr` | in | 1, log2 L, log2 N, w−B | write one BPT row |
| `bpt_wbits`, `bpt_wli` | in | 2^B, w+1 | presence bits and LI of the row |
| `apt_we`, `apt_layer`, `apt_part`, `apt_addr`, `apt_wdata` | in | 1, log2 L, log2 N, w, K | write one APT row |
| `result_valid`, `match`, `match_addr` | out | 1, 1, log2 ENTRIES | result, 5 cycles after the search |

The table RAMs are not reset, in the same way as block RAMs. Load every row
before searching.

## Parameters and configurations

| parameter | default | meaning |
|---|---|---|
| `ENTRIES` | 512 | TCAM words |
| `W` | 36 | word width; must be divisible by N |
| `L` | 2 | layers; ENTRIES/L addresses each |
| `N` | 4 | sub-words; w = W/N |
| `B` | 4 | log2 of the presence bits per BPT row; needs B < w |

The 512×36 table was studied in four partitionings. The default is Case 1,
which had the lowest energy per bit per search. The others are reached by
setting `L` and `N`:

| case | L | N | w | K | APTs | BPTs (B = 4) | RAM bits |
|---|---|---|---|---|---|---|---|
| 1 (default) | 2 | 4 | 9 | 256 | 8 × 512×256 | 8 × 32×26 | 1,055,232 |
| 2 | 4 | 4 | 9 | 128 | 16 × 512×128 | 16 × 32×26 | 1,061,888 |
| 3 | 2 | 3 | 12 | 256 | 6 × 4096×256 | 6 × 256×29 | 6,336,000 |
| 4 | 4 | 3 | 12 | 128 | 12 × 4096×128 | 12 × 256×29 | 6,380,544 |

The APTs dominate: L·N·2^w·K = N·2^w·ENTRIES bits. Fewer, wider sub-words
grow this exponentially. More layers add BPTs and encoders but no APT
bits. All four configurations have the same five-cycle latency and
one-search-per-cycle throughput.

## Choices made in this design

These points are not fixed by the architecture. They are this
implementation's own choices:

* **B = 4.** The architecture allows any row width of two or more bits.
* **Stage assignment.** The pipeline has five stages: BPT read, counter,
  adder with APT read, AND, encoders. The APTAG spans two cycles. Its adder
  output goes directly into the APT's address register, so the APT read
  shares the APTAG's second cycle.
* **Gating instead of stopping.** A layer whose 1-bit AND fails still reads
  its APTs. Its result is then forced to zero. The latency stays fixed, and
  the output is the same as stopping the search.
* **Priority.** The lowest address wins. Layer l covers addresses l·K to
  l·K+K−1.
* **Loading.** The host converts entries into rows; see the loading steps
  above. There is no hardware insert or delete.
* **Key split.** Sub-word 0 is the least significant w bits of the key.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=… failures=…`.

| testbench | covers |
|---|---|
| `tb_hp_tcam` | Full default design (512×36, L = 2, N = 4) end to end. It loads a random ternary table, runs 300 back-to-back searches, rewrites 64 entries, then runs 300 more. Each result is checked against a direct ternary search, and so is its arrival exactly 5 cycles later. It counts the mechanisms: match, mismatch, BPT miss, empty K-bit AND, several matches in a layer, matches in several layers, a match only above layer 0, back-to-back searches and table updates. It fails if any mechanism never occurred. |
| `tb_hp_tcam_cases` | The same run for Cases 1–4 side by side |
| `tb_hp_tcam_layer` | One layer against a direct search, 4-cycle layer latency |
| `tb_hp_tcam_bpt`, `_aptag`, `_apt`, `_and`, `_lpe`, `_gpe` | Each unit against values computed in the testbench |

`tb/hp_tcam_ref_pkg.sv` holds the reference model. It does the direct
ternary search and the entry-to-row conversion described above.
`tb/hp_tcam_driver.sv` is the stimulus and checker shared by the end-to-end
testbenches.

Running with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_hp_tcam \
        rtl/hp_tcam_pkg.sv tb/hp_tcam_ref_pkg.sv tb/tb_hp_tcam.sv \
        tb/hp_tcam_driver.sv rtl/hp_tcam*.sv
    ./obj_dir/Vtb_hp_tcam

For another testbench, replace the top module and its file. `tb_hp_tcam_cases`
also needs `tb/hp_tcam_case.sv`. Every test runs in seconds.

Trust and limits:

* The design has been checked only in simulation, with random tables and
  keys. It has not been synthesised to a target or timed.
* In Cases 3 and 4 the largest RAMs are 4096×256 bits. They would need to be
  split into block-RAM-sized pieces by the synthesis tool.
* The priority encoders are plain linear scans and K = 256 is wide. At high
  clock rates the encoder cycle may need its own pipeline stage. Latency
  would then grow by one.

## Files

| file | content |
|---|---|
| `rtl/hp_tcam_pkg.sv` | default sizes, latency |
| `rtl/hp_tcam.sv` | top: L layers + global priority encoder, write decode |
| `rtl/hp_tcam_layer.sv` | one layer: N × (BPT, APTAG, APT), AND stage, LPE |
| `rtl/hp_tcam_bpt.sv` | bit position table |
| `rtl/hp_tcam_aptag.sv` | APT address generator (1's counter + adder) |
| `rtl/hp_tcam_apt.sv` | address position table |
| `rtl/hp_tcam_and.sv` | 1-bit AND and K-bit AND |
| `rtl/hp_tcam_lpe.sv` | local priority encoder |
| `rtl/hp_tcam_gpe.sv` | global priority encoder and output register |
