# Selective pattern compression scan architecture

Scan testing has two costs. The tester has to store and send every bit of
every test pattern. Shifting those bits through a long scan chain also makes
every cell along the way toggle, so the chip draws far more power in shift
than in normal use. This design cuts both costs with a second, much shorter
scan chain and a set of small decoders.

Most ATPG patterns are mostly don't-care (X) bits. Patterns whose X share is
at or above a chosen **X-bit omit ratio** are encoded offline into short codes.
They are shifted into a short **compressed scan chain (CSC)**. The CSC is cut
into **compressed scan units**, each feeding a **decoder**, and the decoders
write the full pattern into the circuit's **normal scan chain (NSC)** in one
parallel transfer cycle. The long NSC does not move while the codes are
shifted in. Patterns with few X bits, which would not compress well, are
shifted into the NSC the ordinary way.

The RTL covers the CSC, its units and decoders, the NSC, and a top level that
puts two encodings of one worked example side by side. It is plain
synthesizable SystemVerilog-2017.

## The two decoder schemes

Each decoder is a fixed table from code to segment pattern. The schemes differ
in which side of that table is fixed:

| | code width per decoder | cells per decoder |
|---|---|---|
| **VIFO** (variable in, fixed out) | 1, 2 or 3 bits, set by how many distinct merged patterns the segment has | fixed (4 here) |
| **FIVO** (fixed in, variable out) | fixed n = 3, 4 or 5 (the last decoder may be narrower) | variable: each segment grows until its merged patterns need all 2^n codes; at most 256 |

FIVO usually compresses better, because one n-bit code can cover a long
stretch of cells. The 256-cell limit caps decoder fan-out.

Both schemes use the same RTL (`spc_scan_arch`). Only the parameters change:
the per-segment code widths, the output widths and the table contents.

## How the decoder tables are made

The tables are not generic logic. Each one is the output of an offline
encoding flow for one particular test set. For a worked example, see
`rtl/spc_pkg.sv` and `tb/spc_tb_pkg.sv`. The flow:

1. **Selection.** Every pattern whose X share is below the omit ratio goes to
   the NSC group; the rest go to the CSC group.
2. **Merging.** The CSC group is cut into segments. In each segment,
   compatible patterns are merged (`XX11` and `1XX1` become `1X11`) until a
   short list of distinct segment patterns is left. Remaining X bits become 0.
   Each merged pattern gets an index.
3. **Code assignment.** Indices are mapped to codes. The mapping is chosen so
   that the code strings shifted into the CSC toggle as little as possible.
   For 3-bit codes the flow checks all 8! permutations. The chain's state
   before a pattern is taken as 0.

In hardware only the composite mapping code → merged pattern exists, so
`csu_decoder` is a constant table `pattern = ROM[code*OUT_W +: OUT_W]`.
Synthesis reduces it to logic. A code that no pattern uses decodes to all
zeros.

## Bit order: the one thing to get right when changing tables

Any pattern is written as a string whose first character is shifted in first.
Both chains shift from the scan-in towards the far end:

* After a full load, the NSC vector `q[SPL-1:0]` reads exactly like the
  pattern string: first character at `q[SPL-1]`, which is the far end and
  drives the scan-out. The CSC vector `csc_q` is the same for the code
  string.
* Segment 1 is the first part of the pattern. It belongs to **Decoder 1**,
  which sits at the far end of both chains. The last segment's decoder
  (Decoder N) is next to the scan-ins.
* Within a code, the first bit shifted in is the most significant.
* The flat `ROM` parameter concatenates the segment tables with segment 1 at
  the least significant end. Inside a segment table, entry `c` sits at
  `[c*OUT_W +: OUT_W]`, and the MSB of an entry is the segment's first
  pattern bit.

## Worked example (the default parameters)

The defaults are a 21-cell chain and a 17-pattern test set, with omit ratio
0.3. Three patterns stay uncompressed and fourteen are compressed.

* **VIFO**: six decoders driving 4,4,4,4,4,1 cells from 2,2,3,2,1,1-bit codes.
  The CSC is 11 bits long, so a compressed load takes 11 shifts plus 1
  transfer instead of 21 shifts.
* **FIVO**: two 3-bit decoders driving 11 and 10 cells. The CSC is 6 bits
  long, so a load takes 6 shifts plus 1 transfer.

Data shifted in for the whole set:

| | bits | formula |
|---|---|---|
| uncompressed | 357 | 17 × 21 |
| VIFO | 217 | 3 × 21 + 14 × 11 |
| FIVO | 147 | 3 × 21 + 14 × 6 |

Example: the first compressed pattern is `X0001XXXX0001XXXXXXXX`. VIFO sends
`01000101010`, which decodes to `000010100000110001010`. FIVO sends `110001`,
which decodes to `000010000000100000001`.

## Scan operations and timing

The tester applies one `scan_op_e` operation per clock (`spc_pkg`):

| op | CSC | NSC |
|---|---|---|
| `SCAN_HOLD` | hold | hold |
| `SCAN_SHIFT_NSC` | hold | shift one bit from `nsi`; `nso` = far-end cell |
| `SCAN_SHIFT_CSC` | shift one bit from `csi` | **hold** (no toggling) |
| `SCAN_TRANSFER` | hold | load all decoder outputs in parallel |
| `SCAN_CAPTURE` | hold | capture `func_d` from the circuit under test |

Typical sequences:

* **Uncompressed pattern:** SPL × `SCAN_SHIFT_NSC`, then `SCAN_CAPTURE`. The
  previous response leaves on `nso` during the shifts.
* **Compressed pattern:** CSC_LEN × `SCAN_SHIFT_CSC`, then `SCAN_TRANSFER`,
  then `SCAN_CAPTURE`. If the previous response has to be observed, unload it
  first with SPL × `SCAN_SHIFT_NSC` and any fill on `nsi`.

All flip-flops use an asynchronous active-low reset `rst_n` and reset to 0.
Decoders are combinational, so the transfer cycle sees decoded data one clock
after the last CSC shift. `spc_scan_arch` asserts two rules: the CSC changes
only in `SCAN_SHIFT_CSC`, and only the five defined operations are applied.

The operation set, its encoding and the choice to unload responses only
through the NSC are this design's own. The scheme itself only requires that
compressed shifting leaves the NSC alone and that a transfer moves the
decoded pattern into it.

## Modules

| file | role |
|---|---|
| `rtl/spc_pkg.sv` | `scan_op_e`, `MAX_FANOUT` = 256, worked-example widths and tables for both schemes |
| `rtl/csu_decoder.sv` | code → segment pattern table; elaboration error if OUT_W > 256 |
| `rtl/compressed_scan_unit.sv` | IN_W shift flip-flops + decoder |
| `rtl/compressed_scan_chain.sv` | units chained Decoder N … Decoder 1; checks the width parameters against each other |
| `rtl/normal_scan_chain.sv` | SPL mux-scan cells: shift / parallel load / capture / hold |
| `rtl/spc_scan_arch.sv` | one CSC + one NSC; default is the VIFO example |
| `rtl/spc_top.sv` | VIFO and FIVO example architectures side by side (`vifo_*`, `fivo_*` ports) |

To target another test set, run your encoding flow and set these parameters
on `spc_scan_arch`:

* `NUM_SEG`
* `SEG_IN_W[]` and `SEG_OUT_W[]`: unpacked `int unsigned` arrays, element 0 =
  segment 1
* `SPL` = sum of `SEG_OUT_W`
* `CSC_LEN` = sum of `SEG_IN_W`
* `ROM_BITS` = sum of 2^`SEG_IN_W` × `SEG_OUT_W`
* `ROM`

Elaboration stops if these sums disagree. `tb/spc_bench_unit.sv` shows how to
compute all of them with constant functions.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. Example run:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/spc_pkg.sv tb/tb_spc_top.sv --top-module tb_spc_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_csu_decoder` | VIFO segment-3 and FIVO segment-1 tables reproduce the example's merged patterns for all 14 compressed patterns; unused codes give 0 |
| `tb_compressed_scan_unit` | a code is in place after exactly IN_W shifts; serial output delayed by IN_W; hold without `shift_en` |
| `tb_compressed_scan_chain` | each of the 14 VIFO code strings (11 shifts) decodes to the expected 21 bits and meets every care bit of the original pattern |
| `tb_normal_scan_chain` | 3000 random operations against a bit-array reference model |
| `tb_spc_scan_arch` | full 17-pattern flow on the VIFO default: routing by omit ratio, loads, captures, responses on `nso`, NSC quiet during CSC shift, 12-cycle compressed loads, 217-bit volume |
| `tb_spc_top` | the same flow on both schemes at once at default size; requires 217 and 147 bits, that every mechanism (NSC shift, CSC shift, transfer, capture, separate unload) occurs, and that loading the set toggles fewer scan cells than shifting every decompressed pattern serially (about 1400 and 800 transitions against 3600 and 3000) |
| `tb_spc_bench_scale` | benchmark-length chains with stand-in tables: 1464 cells with 136 patterns (116 compressed) for FIVO n = 3/4/5 and VIFO, plus FIVO n = 3 on 214 cells; includes a 256-cell decoder |

`tb/spc_tb_pkg.sv` holds the example as the encoding flow leaves it:

* the original X patterns;
* the merged patterns by index;
* the segment indices of every compressed pattern;
* the code strings.

The expected values are built from these, independently of the tables in
`rtl/spc_pkg.sv`.

## Limits and departures

* **Only the worked example has real decoder contents.** No tables are
  available for the ISCAS'89 benchmark test sets (chains of 214 to 1763
  cells). The RTL takes those sizes as parameters, and `tb_spc_bench_scale`
  runs them with hash-generated tables. Their compression figures are
  therefore not reproduced.
* **The encoding flow is not hardware and is not included.** This covers
  pattern selection, merging and code assignment.
* **Multiple scan chains.** The scheme can be applied per partition of a
  split scan chain, each partition encoded on its own. Here that means one
  `spc_scan_arch` per partition with its own parameters and its own `op`. No
  partitioned configuration is provided.
* **VIFO segments too diverse to encode.** A VIFO segment whose merged
  patterns need more than 8 codes is meant to be left unencoded. No special
  hardware is provided for it. Such a segment can be described with the
  existing parameters as a 4-bit code and an identity table, so its raw
  bits pass through the compressed chain. That reading is this design's own.
* **Circuit under test.** It is not included; `func_d` and `q` are its
  interface.
* **Design additions.** `csc_so`, the far-end output of the CSC, is an
  addition for testing the chain itself. The reset-to-0 of all cells matches
  the all-zero initial chain state that the code assignment assumes.
