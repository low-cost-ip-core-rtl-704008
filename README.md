# Tri-template test decompressor for scan-tested IP cores

A scan-tested IP core needs far more test data than a tester can push through
a few pins, yet nearly all of that data is don't-care: only a few percent of
the bits in a typical ATPG test cube are specified. This design puts a tiny
decoder between **I** tester channels and up to **2^I − 3** internal scan
chains of the core. Each *slice* (the bits entering all chains on one shift)
is built from one of three templates (the previous slice, all 0 or all 1),
and then only the bits that disagree with the care bits of the slice are
flipped, one per clock. The core is not modified, and no netlist, fault
simulation or extra ATPG run is needed to encode a test set: any pre-computed
set of cubes can be encoded.

With 5 channels the decoder feeds 29 chains; with 7 channels, 125.

## The code space

Every clock the I channel bits carry one code out of 2^I:

| code (I = 3) | general code | meaning | mode | SCE |
|---|---|---|---|---|
| 000 … 100 | 0 … S−1 | flip bit k of the slice being built | flipping | 0 |
| 101 | 2^I − 3 | template: keep the previous slice | template | 1 |
| 110 | 2^I − 2 | template: all 0 | template | 1 |
| 111 | 2^I − 1 | template: all 1 | template | 1 |

So an I-input decoder has 2^I − 3 flip codes, and that is the largest number
of chains it can serve. With fewer chains (S < 2^I − 3) the unused flip codes
do nothing.

The hardware is an I-to-2^I one-hot decoder, one T flip-flop per chain and an
OR gate:

* flip line k drives T of flip-flop k (toggle);
* the *all 0* line drives RESET of every flip-flop, the *all 1* line drives SET;
* the *previous* line touches nothing, so every flip-flop holds;
* the OR of the three template lines is **SCE**, the shift clock enable of the
  scan chains and of the response compactor.

## Timing: a slice is shifted by the next template

The flip-flops hold the slice under construction. On a template cycle
two things happen on the same clock edge: the chains shift in the slice the
flip-flops hold now, which is the one the preceding flips have just
finished, and the flip-flops load the template of the next slice. Hence:

* A slice costs one template cycle plus one cycle per flipped bit.
* A slice reaches the chains only when the **next** template arrives. The
  last slice of a vector is shifted by the first template of the following
  vector, and the last vector of a test needs one extra template code.
* The first template after reset shifts the reset value (all 0) of the
  flip-flops. That shift belongs to no vector.

Worked example, 3 channels and 5 chains of 5 cells (one 25-bit vector). The care bits of
slice 1 are all 0, those of slice 2 all 1. Slice 3 has care bits 0 and 3
at 1 and bit 2 at 0. Slice 4 needs bits 0 and 3 at 1 and bits 1 and 4 at 0.
Slice 5 has no conflicting care bits. The codes are

```
110 | 111 | 110 000 011 | 101 | 110 | (next template)
all0  all1  all0 f0  f3   prev  all0
```

That is 7 codes (21 bits instead of 25), and 7 cycles: five templates and two
flips. Choosing *all 1* for slice 3 would have cost one flip there (bit 2), but
then slice 4 would have needed two flips from any template. Choosing *all 0*
lets slice 4 reuse slice 3 unchanged. The decoder testbench replays this
stream.

## Capture

A counter counts SCE cycles, which are shifted slices. When it reaches
`slices_per_vector` (the chain length) the vector is complete. `capture` is
raised for the next cycle only, and the core captures its response. In that
capture slot the decoder ignores the channels: no flip, no template, SCE low.
The tester sends one don't-care code in that slot, so the cycle cost of a
vector is *slices + flips + 1*. After the slot, the next template codes shift
the response out into the compactor while the next vector shifts in.

The counter does not count the first SCE after reset (see above). The
compactor is enabled only after the first capture, so the unknown power-up
contents of the chains never reach the signature.

At the end of a test, the tester sends one template code, which shifts the
last slice in, then the don't-care code of the capture slot, then
`slices_per_vector` template codes, which shift the last response out.

## Response compaction

`ttbc_misr` is a multiple-input signature register as wide as the number of
chains. It takes one scan-out bit per chain on every SCE cycle once
`ora_en` is set. Its default polynomial is primitive for the configurations
used here: x^29 + x^27 + 1 for 29 chains; for 13, 61 and 125 chains the usual
maximal-length LFSR tables are used. A MISR cannot tolerate unknown (X)
values in the responses. For cores whose responses contain X, an X-tolerant
space compactor should replace it, and this design does not provide one.

## Encoding a test set (off-chip)

The encoder runs on a workstation. For each slice, with the template of the
previous slice already fixed, it tries the three templates. For each it
counts the flips needed for the current slice, plus the fewest flips any
template needs for the following slice given the current result. It keeps
the template with the lowest sum. This two-slice look-ahead costs 9
evaluations per slice instead of 3^n for an exhaustive search. Don't-care
bits keep the template's value. Codes are then emitted as the template code
followed by one flip code per conflicting care bit.

The encoder is implemented in SystemVerilog inside the end-to-end
testbenches (`choose`, `gen_cube` and the main loop of `tb/tb_ttbc_top.sv`).

## Data volume

For T vectors of N scan cells, S = 2^I − 3 balanced chains and care-bit
density D, with 0/1 care bits equally likely and only the all-0/all-1
templates, the compressed volume is

    TDV = I·(N/S)·T + I·D·N·T/2      (bits)

against N·T uncompressed. The shift cycles are TDV / I. Comparing against
plain scan with I chains of the same total length, the fraction saved is
1 − I/S − I·D/2. The *previous slice* template and uneven care-bit
distributions only lower the volume further, so this is a bound.

`tb_ttbc_top` encodes random cubes sized like six ISCAS'89 test sets (same N,
T and D, random care positions and values) and streams them through the
design at 5 channels. Measured (seed 1):

| workload | N | T | D | chain length | compressed bits | vs. uncompressed | published for the original cube set, I = 5 |
|---|---|---|---|---|---|---|---|
| s5378  | 214  | 111 | 27.4 % | 8  | 15,190 | 23,754 (−36.1 %) | 15,030 |
| s9234  | 247  | 159 | 27.0 % | 9  | 25,075 | 39,273 (−36.2 %) | 23,705 |
| s13207 | 700  | 236 | 6.8 %  | 25 | 42,040 | 165,200 (−74.6 %) | 43,350 |
| s15850 | 611  | 126 | 16.4 % | 22 | 33,110 | 76,986 (−57.0 %) | 31,950 |
| s38417 | 1664 | 99  | 31.9 % | 58 | 119,545 | 164,736 (−27.4 %) | 87,850 |
| s38584 | 1464 | 136 | 17.7 % | 51 | 89,735 | 199,104 (−54.9 %) | 88,070 |

For every workload the measured size stays below the analytic estimate
above (for example 42,040 against 56,567 bits for s13207), and the bench
checks that. Random cubes have no correlation between neighbouring slices, so the
*previous slice* template helps them less than it helps real ATPG cubes.
This shows most clearly for s38417. The original cube sets are not included.
`tb_ttbc_top_sweep` repeats the run at 4, 6 and 7 channels (13, 61 and 125
chains).

## Files

| file | contents |
|---|---|
| `rtl/ttbc_pkg.sv` | template enum, code-space helpers, MISR tap table |
| `rtl/ttbc_tff.sv` | T flip-flop with synchronous SET/RESET |
| `rtl/ttbc_bin_decoder.sv` | N-to-2^N one-hot decoder with enable |
| `rtl/ttbc_decoder.sv` | the tri-template decoder (`I`, `S = 2^I−3`) |
| `rtl/ttbc_capture_ctrl.sv` | slice counter, capture pulse, compactor enable |
| `rtl/ttbc_misr.sv` | response compactor |
| `rtl/ttbc_top.sv` | decoder + capture control + compactor; scan chains of the core are external |
| `tb/tb_*.sv` | one self-checking bench per module, plus `tb_ttbc_top_sweep` and its `tb_ttbc_harness` |

`ttbc_top` parameters: `I` (default 5), `S` (default 2^I − 3 = 29) and `CW`
(the counter width, default 16). Its ports:

* inputs: `ch[I-1:0]` (the tester channels) and `slices_per_vector` (held
  constant during a test);
* to the core: `scan_in[S-1:0]`, `scan_en` and `capture`;
* from the core: `scan_out[S-1:0]`;
* results and status: `signature`, `flip`, `slice_cnt` and `vector_cnt`.

The core must shift its chains on every rising edge where `scan_en` is high,
taking `scan_in` and presenting the next `scan_out`. It must capture on the
edge where `capture` is high. Reset (`rst_n`, active low) is asynchronous.

## Choices not fixed by the method

* Where the capture cycle goes: here a single slot after each complete vector,
  in which the channels are ignored. The method only says that the on-chip
  counter derives load and capture from the template count.
* SET/RESET of the T flip-flops are synchronous, and all state resets to 0.
* `slices_per_vector` is a port rather than a fixed constant, so one build
  serves cores with different chain lengths.
* The MISR is gated until the first capture, and its polynomials are the ones
  listed above.
* The default configuration is 5 channels and 29 chains.

## Simulating

Each bench prints `TB_RESULT checks=… failures=…`. For example, to run the
end-to-end bench at the default size:

```
verilator --binary --timing --assert --top-module tb_ttbc_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/ttbc_pkg.sv tb/tb_ttbc_top.sv
./obj_dir/Vtb_ttbc_top
```

Use the same command with `tb_ttbc_decoder`, `tb_ttbc_capture_ctrl`,
`tb_ttbc_misr`, `tb_ttbc_tff`, `tb_ttbc_bin_decoder` or `tb_ttbc_top_sweep`.
Every bench runs in well under a second. Each reports how often every
mechanism occurred (flips, each template, captures, ignored slots, compactor
shifts) and counts a failure if one never occurred. The simulator is
two-state, so the benches reset or initialise everything they read.
