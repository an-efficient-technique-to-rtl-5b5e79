# NB-XOR decompressor for low-power scan test data

Scan test patterns from ATPG are mostly don't-cares. Filling those so that each
scan vector has as few transitions as possible (minimum-transition-count or
"MTC" filling: every X copies the nearest specified bit before it) cuts the
switching during scan shift, and so the test power. But it costs compression.
An MTC-filled vector is long runs of 0s *and* 1s, roughly half and half, and
the usual run-length codes (Golomb, FDR) only pay off on data that is mostly 0s.

The fix is a cheap, reversible transform. Replace every scan bit by the XOR of
that bit and the bit shifted in just before it ("neighbouring-bit XOR", NB-XOR).
A run of equal bits becomes a run of 0s, and only the edges between runs stay
as 1s. The transformed stream is typically 90-98 % zeros and codes very well.
On chip, undoing the transform takes **one XOR gate and one flip-flop**. The
core's scan chain is not touched.

This repository holds synthesizable SystemVerilog for that decompressor:

```
 tester ──TE──► decoder ──TNB──► (XOR)──► [f/f] ──TD──► scan-in of the core's single scan chain
 (coded        (Golomb or FDR)     ▲         │
  stream)                          └─────────┘  flip-flop output loops back into the XOR
```

- **TE** is the coded stream stored on the tester.
- **TNB** is the NB-XOR difference stream.
- **TD** is the restored MTC-filled scan data.

The encoder side runs in software before test: MTC filling, the NB-XOR
transform, then run-length coding. It is not hardware. The testbenches include
a reference model of it.

## The transform and its inverse

Put the whole test set in scan order, vector after vector, first-shifted bit
first: b[0], b[1], ... The difference stream is:

```
d[0] = b[0]
d[j] = b[j-1] XOR b[j]     for j > 0
```

The stream runs across vector boundaries. The first difference bit of a vector
is taken against the *last bit of the previous vector*, not against 0. Only
the very first bit of the test set is compared with 0.

Example (30-bit chain, leftmost bit shifted first):

```
cube       1xxxxx111xxxx0000xx00011111xxx
MTC fill   111111111111100000000011111111    21 ones
NB-XOR     100000000000010000000001000000     3 ones
```

The inverse is `b[j] = b[j-1] XOR d[j]`. The flip-flop always holds b[j-1], the
last bit restored. It is cleared to 0 at the start of a test set, and after
that it keeps its value across the capture cycles between vectors. This
matters. If the flip-flop were cleared per vector, or changed during capture,
the first bit of every vector would come out wrong.

`rtl/inv_nbxor.sv` implements exactly this. Next to the flip-flop it keeps a
valid flag, so that the scan side can pause:

- A difference bit is accepted (`nb_ready`) when the flip-flop's bit has been
  shifted out, or is being shifted out in this cycle.
- The flip-flop loads `ff ^ nb_bit` only on an accepted bit.
- `td_bit` is the flip-flop output itself, with one register stage of latency.
- With both sides always ready, one bit passes per cycle.

## The decoders

Both codes cut the difference stream into runs: L zeros followed by a 1.

**Golomb, group size M** (a power of two; 4 by default, 8 also tested). A run
is coded as:

- floor(L/M) ones;
- a 0;
- L mod M in log2(M) bits, MSB first.

Each prefix 1 stands for a whole group of M zeros that has no terminating 1.

| L (M=4) | codeword |
|---|---|
| 0 | 000 |
| 3 | 011 |
| 4 | 1000 |
| 9 | 11001 |

**FDR** (frequency-directed run-length). Runs are grouped as A1 = {0,1},
A2 = {2..5}, A3 = {6..13}, and in general Ak = {2^k-2 .. 2^(k+1)-3}. A run in
group Ak is coded as:

- k-1 ones, then a 0 (this names the group);
- a k-bit tail holding L-(2^k-2), MSB first.

| L | codeword |
|---|---|
| 0 | 00 |
| 1 | 01 |
| 2 | 1000 |
| 5 | 1011 |
| 6 | 110000 |

`rtl/golomb_decoder.sv` and `rtl/fdr_decoder.sv` are four-state machines:
prefix → tail → emit zeros → emit the 1. In each cycle a decoder either reads
one code bit (`te_ready` high) or emits one decoded bit (`nb_valid` high),
never both. Cost per run:

| code | cycles per run |
|---|---|
| Golomb | floor(L/M) + 1 + log2(M) reading, then L + 1 emitting |
| FDR, group Ak | 2k reading, then L + 1 emitting |

The FDR decoder's run counter is `RUN_W` = 20 bits wide. That allows groups up
to A19, i.e. runs of up to 2^20 - 3 zeros, which is longer than any of the
evaluated test sets. A longer prefix means a malformed stream, and an
assertion flags it.

**Trailing zeros.** If the difference stream ends in 0s, the encoder codes the
last run as if a 1 followed it. The decoder then produces one extra 1 after
the real data. The scan controller never shifts it, because it stops after the
last vector, and the next `init` clears it. There is one Golomb corner case:
if that last run is a whole number of groups, its closing codeword
(0 + tail) is only needed for the padding 1. It is then read after the last
scan bit has already been delivered.

## Top level: `nbxor_decomp_top`

The top holds both decoders in front of one `inv_nbxor`. `code_sel` is taken
when `init` is high and picks which decoder the test set uses. The other
decoder sees no traffic.

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | single clock; asynchronous active-low reset |
| `init` | in | start of a test set: clears both decoders and the flip-flop, and registers `code_sel`; no code bit is taken while it is high |
| `code_sel` | in | `nbxor_pkg::code_e`: `CODE_GOLOMB` (0) or `CODE_FDR` (1) |
| `te_valid`, `te_bit`, `te_ready` | in/in/out | coded stream from the tester, valid/ready |
| `td_valid`, `td_bit`, `td_ready` | out/out/in | restored scan bit to the chain's scan-in; `td_ready` is the scan shift enable (low during capture) |

Parameters:

| parameter | default | meaning |
|---|---|---|
| `GOLOMB_M` | 4 | Golomb group size (power of two, at least 2) |
| `RUN_W` | 20 | FDR run-counter width (at least 3) |

**Timing.** If the tester never starves and the chain never pauses, a test set
takes:

```
(code bits) + (scan bits) + 1 cycles
```

This counts from the cycle after `init` to the last scan bit. The end-to-end
testbenches check this count exactly. Code bits that only close a trailing
Golomb run are not counted, because they are read afterwards.

**Integrating with a core.** Drive `td_ready` from the scan controller. Hold it
high for exactly one chain length per vector, then low for capture. Pulse
`init` once per test set, not once per vector.

Synthesized size (generic cells, coarse synthesis):

| module | word-level cells | flip-flop bits |
|---|---|---|
| `inv_nbxor` | 12 | 2 |
| Golomb decoder (M=4) | 69 | 10 |
| FDR decoder (RUN_W=20) | 75 | 54 |
| `nbxor_decomp_top` | 167 | 67 |

## What is this design's own

These parts are specified by the technique:

- the transform;
- the XOR-plus-flip-flop inverse, with the flip-flop starting at 0 and its
  output driving scan-in;
- the use of the Golomb (groups 4 and 8) and FDR codes;
- the single scan chain.

These choices are this implementation's own:

- **The decoder.** The decoder stage is specified only as a generic block.
  This design offers the two table-free codes the technique is evaluated
  with, Golomb and FDR, and picks one per test set.
- **Decoder internals.** The state machines and counters are the simplest
  form that decodes these standard codes.
- **Clocking and flow control.** There is one clock, with valid/ready on both
  streams. A real tester interface might run at a slower clock with a
  synchronizer, which is not modelled here.
- **`init`**, and registering the code selection on it.
- **`RUN_W` = 20** and the trailing-run convention.

**Not built.** The run-length Huffman code (also evaluated) needs a code table
built per test set, and no table is available. The core under test and the
tester are outside the design. The testbenches model both: a shift-register
scan chain, and a driver with random gaps.

## Verification

Everything is in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it does |
|---|---|
| `tb_inv_nbxor` | random difference bits with random gaps and stalls against a running-XOR model; held bit stays stable while stalled; `init` clears; 64 bits in 65 cycles |
| `tb_golomb_decoder` | M=4 and M=8; corner runs (0, 1, M-1, M, M+1, multiples of M, long), 400 random runs under random gaps and stalls, a stream ending in 0s, `init` mid-codeword; exact cycle count |
| `tb_fdr_decoder` | RUN_W=20 and RUN_W=5; both ends of groups A1..A11, and the longest run a 5-bit counter holds; random runs with gaps and stalls; exact cycle count |
| `tb_nbxor_decomp_top` | end to end at default parameters. Runs the 30-bit example above (checks 21 and 3 ones), random test sets in both codes, a code switch, tester starvation, shift pauses, capture windows, and sets ending in 0s. Counts each mechanism and fails if any never occurs. Checks the exact cycle count on the undisturbed sets |
| `tb_iscas_workloads` | full size, default parameters: six test sets with the sizes of six ISCAS'89 benchmark circuits, each coded with Golomb-4 and with FDR; 1.34 M scan bits, every one checked |
| `tb_iscas_golomb8` | the same sets through a top built with `GOLOMB_M = 8` |

Shared testbench code:

- `nbxor_ref_pkg` holds the reference encoder side: MTC fill, zero fill, the
  weighted-transition metric, NB-XOR, and the Golomb and FDR encoders.
- `nbxor_scan_harness` plays tester and scan controller, and compares the
  chain contents after every vector.

Running one testbench with plain Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_nbxor_decomp_top \
  -y rtl -y tb +libext+.sv rtl/nbxor_pkg.sv tb/nbxor_ref_pkg.sv tb/tb_nbxor_decomp_top.sv
obj_dir/Vtb_nbxor_decomp_top
```

The full-size run takes a few seconds. The testbenches use `$urandom` only, so
no constraint solver is needed.

### Workload sizes and what the full-size run shows

| circuit | test data (bits) | chain length | vectors | don't-cares |
|---|---|---|---|---|
| s5378 | 23754 | 214 | 111 | 73 % |
| s9234 | 39273 | 247 | 159 | 73 % |
| s13207 | 165200 | 700 | 236 | 93 % |
| s15850 | 76986 | 611 | 126 | 84 % |
| s38417 | 164736 | 1664 | 99 | 68 % |
| s38584 | 199104 | 1464 | 136 | 82 % |

The chain lengths are those of the benchmarks' single-chain full-scan
versions. Each one divides the test-data size exactly.

The decompressor stores no vector, so any of these sets fits. The only
size-dependent limit is the FDR run counter, and 2^20 exceeds every set.

The real ATPG cubes are not included. The testbenches generate synthetic cubes
with the same size and don't-care share, with specified bits in short
same-valued clusters. On that data the trend matches the technique's claim:

| | share of 0s | compression, Golomb-4 / Golomb-8 / FDR |
|---|---|---|
| after MTC filling | about 50 % | — |
| after NB-XOR | 92-98 % | 56-71 % / 60-81 % / 54-83 % |

MTC filling also cuts the weighted-transition power estimate by about 70 %
against zero filling.

These numbers describe the synthetic data, not the published benchmark
results. The workload runs check correctness and timing; they do not
reproduce the published figures.

## Files

- `rtl/nbxor_pkg.sv`: `code_e` and default sizes
- `rtl/inv_nbxor.sv`
- `rtl/golomb_decoder.sv`
- `rtl/fdr_decoder.sv`
- `rtl/nbxor_decomp_top.sv`
- `tb/`: the testbenches listed above, the reference package and the harness
