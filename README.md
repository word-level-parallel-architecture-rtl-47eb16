# Word-level JPEG 2000 block decoder

JPEG 2000 codes each code-block of wavelet coefficients bit-plane by bit-plane. Each plane is
coded in three passes: significance propagation, magnitude refinement and cleanup. Every coded
decision goes through an adaptive binary arithmetic coder (the MQ coder). A conventional
decoder works through the planes one after another. Its time per block therefore grows with the
number of planes, and it keeps large per-sample state memories between planes.

This design decodes **all ten magnitude bit-planes of a code-block at the same time**:

- Each plane has its own context formation (CF) and its own arithmetic decoder.
- A column of four samples goes from the CF of plane 9 down to plane 0, about four columns
  behind the plane above.
- A CF decodes one sample per cycle, so the block leaves the bottom plane at **one coefficient
  per cycle, whatever the number of planes**.
- No per-sample state memory is needed. Everything a plane needs from the planes above
  (significance, sign, first-refinement and first-pass flags) travels with the column.

The price is that the bit stream must be coded in the **parallel mode** of JPEG 2000:

- stripe-causal contexts: the stripe below counts as insignificant;
- every pass terminated;
- probability models reset at every pass.

Each pass of each plane is then an independent stream. The 30 streams (10 planes × 3 passes) are
decoded side by side.

## Block diagram

```
             bit-stream windows (30)                       line buffer (2 x 12 x 32)
                    │  ▲ byte pointers                        │ previous-stripe row
                    ▼  │                                      ▼
   ┌─────────────── srb: coding states of 10 planes x 3 passes ─────────────┐
   │ arithmetic register + pointer per stream, 19 context states per pass     │
   └──▲──────┬────────────▲──────┬───────────────────▲──────┬─────────────────┘
      │      ▼            │      ▼                   │      ▼
     fad 9 (AD0-UD-UD-AD1) fad 8          ...        fad 0        (no pipeline stage)
      ▲      │            ▲      │                   ▲      │
      │      ▼            │      ▼                   │      ▼
 ──► cf 9 ─────────────► cf 8 ────────────► ... ──► cf 0 ──────► coefficients (4 / column)
 columns  │ d9             │ d8                        │ d0           ▲
          ▼                ▼                           ▼              │
        rb 9 ───────────► rb 8 ───────────► ... ──►  rb 0 ────────────┘   (mrb: magnitudes)
```

- `ebc_decoder` is the top.
- `pcf` is the chain of ten `cf` blocks.
- `mrb` is the chain of ten `rb` blocks.
- `fad`, `srb` and `line_buffer` are as drawn.
- `ebcd_pkg` holds the shared types, the MQ probability table, the MQ decoding step and the
  context tables.

## How one plane decodes without waiting for the others

### The column-switching scan

In the standard order, plane k needs three sweeps over a stripe: pass 1, then pass 2, then
pass 3. Decoding plane k in one sweep is possible because of the following rule:

- A sample's pass-1 membership depends on neighbours to its right.
- Those neighbours may themselves become significant in pass 1.
- So the pass-1 sub-scan runs one column ahead of the pass-2/3 sub-scan.

The decoding order then follows directly:

1. When column c has had its pass-1 samples decoded, and column c+1 is in the window, column c's
   remaining samples are decoded in row order.
2. Those samples are pass 2 if already significant, otherwise pass 3.
3. Meanwhile pass 1 has moved on to column c+1.

Within each pass the decisions still come in exactly the standard order. Because each pass has
its own stream and its own context states, that order is all the arithmetic decoder needs.

### The window and its controller

A CF holds five column slots, C0 to C4:

- New columns enter C0 from the plane above.
- Pass 1 works on C1 (or C2).
- Passes 2 and 3 work on C2 (or C3).
- C4 keeps a finished column until the plane below has taken it.

The controller chooses one sample per cycle. It acts in four ways, named after the sub-scan and
the slot:

| state  | what is decoded                                                   |
|--------|-------------------------------------------------------------------|
| P1@C1  | next pass-1 sample of C1 (C2 waits for its pass-2/3 scan)         |
| NP1@C2 | next pass-2/3 sample of C2, once C1 has no pass-1 sample left     |
| P1@C2  | a pass-1 sample of C2 when nothing older is waiting               |
| NP1@C3 | pass-2/3 sample of C3 after a column that was entirely pass 1     |

The window moves ("forward") when either of these happens:

- a column's four samples were all decoded in pass 1 (condition 0);
- a column's pass-2/3 scan ends (condition 4).

It moves only if the next column is available and C4 is free. A column is only decoded once the
column to its right has arrived, or when it is the last column of the stripe. The choice of
sample, pass and contexts is made in the same cycle that decodes the sample.

### What a neighbour looks like from each pass

Each slot is read through a processing element (`cf_pe`). It reports two kinds of significance:

- **As seen by a pass-1 or pass-2 sample:** significant in an upper plane, or made significant by
  pass 1 of this plane.
- **As seen by a pass-3 sample:** significant above, or any 1 already decoded in this plane.

This reproduces what a sequential decoder would see at the point that sample is decoded.

The sample above the stripe (the previous stripe's last row) is complete by then. For it, three
things decide:

- its significance from the planes above,
- its bit in this plane,
- whether its first 1 was coded in pass 1.

Refinement needs one more fact: whether this is the sample's first refinement. The flag is set
when the first 1 of the sample sits in the plane just above.

### Run-length mode in one cycle

In pass 3, a column qualifies for run-length mode when all of the following hold:

- its four samples are insignificant and not yet visited;
- the whole neighbourhood is insignificant.

For such a column the four-symbol decoder decodes, in one cycle:

1. the run decision;
2. if the run decision is 1, the two-bit position of the first 1 (uniform context);
3. that sample's sign (context 9, no XOR).

The samples up to that 1 are marked decoded at once. Such a column can therefore take fewer than
four cycles.

### Four symbols per cycle

`fad` chains four combinational MQ decoding steps:

1. AD0 decodes the magnitude, refinement or run decision.
2. Two uniform decoders (UD) decode the run position.
3. AD1 decodes the sign.

Two multiplexers, steered by AD0's decision, pick the path:

| mode     | decoders used   | when                                       |
|----------|-----------------|--------------------------------------------|
| 1 symbol | AD0             | refinement, or a 0 bit                     |
| 2 symbol | AD0 + AD1       | a 1 bit and its sign                       |
| 4 symbol | AD0 + UD + UD + AD1 | a run decision of 1, its position and its sign |

Each arithmetic step works on a byte window starting at the stream's pointer. The step reports
how many bytes it consumed. The register bank writes back the arithmetic register, the pointer
and the one or two context states in the same cycle. There is no pipeline register between
context formation and decoding, which is what keeps one sample per cycle per plane.

### Magnitudes and the previous stripe

Each plane's decoded bits join a column's magnitude in the register bank of that plane (`rb`).
That bank moves in step with the plane's window.

When the last column of a stripe row leaves plane 0, its bottom sample is written into the line
buffer. The entry is 12 bits: the magnitude, the sign, and a flag saying whether its first 1 came
in pass 1. When the column below it (next stripe) enters plane 9, this entry is read:

- the sign and the pass flag travel with the column;
- the magnitude goes down the register banks, so each plane gets its own bit of it.

For 64-wide blocks the ten planes hold about 40 columns, fewer than a stripe row, so the entry
above is always final before it is needed. For 32-wide blocks it is not: the column above may
still be inside planes 2..0 when the column below wants to enter plane 9. So the 12 × 64 buffer
is used as two 12 × 32 halves:

- half B takes the row above as it leaves plane 3. Its bits 9..3 are final there, as are its
  sign and pass flag as far as planes 9..3 can see them. This is what plane 9 reads, and what
  the register banks pass down as far as plane 3.
- half A takes the final row as it leaves plane 0. Plane 2 reads the low bits, the final sign and
  pass flag from it when the column enters plane 2. If the row above has not left plane 0 yet,
  plane 2 waits; in practice it seldom does.

For 64-wide blocks both halves form one 64-entry buffer, split by column number.

## Interface (`ebc_decoder`)

| port | dir | meaning |
|------|-----|---------|
| `start_i`, `band_i`, `cb32_i`, `nplanes_i` | in | Start a block. Give its band (LL/HL/LH/HH; selects the zero-coding table), its size (1: 32×32, 0: 64×64) and its number of coded planes (1–10). |
| `bs_addr_o[10][3]` | out | Byte pointer of each plane's and pass's stream. |
| `bs_win_i[10][3]` | in | The 8 bytes from that pointer on, combinationally, with 0xFF past the end of the segment. |
| `coef_valid_o`, `coef_index_o`, `coef_sign_o`, `coef_mag_o` | out | One column of four coefficients per valid cycle, in stripe order. The index is stripe × width + column, and row r is sample (4·stripe + r, column). |
| `busy_o`, `done_o` | out | Block in progress. `done_o` pulses after the last column. |
| `dbg_*[10]` | out | Per-plane scan state, pass, run-length and sign activity, for monitoring. |

Timing:

- Two set-up cycles follow `start_i`: one to reset the context states, one to initialise all 30
  arithmetic registers.
- The first column leaves after it has crossed the ten planes.
- A 64×64 block then completes in about 4150–4300 cycles: 4096 samples plus the fill latency.
- A 32×32 block completes in about 1080–1170 cycles.

Streams must be in the parallel mode described above. Planes at or above `nplanes_i` are
treated as empty and pass columns straight through.

## Where this design departs from the architecture it follows

- **32×32 blocks.**
  - The intended scheme feeds partially decoded coefficients back from plane 3 to plane 9, and
    that is what is built.
  - How planes 2..0 get the rest of the row above is this design's own: they read the final
    row from the other half of the line buffer, as described above.
  - A 32×32 block takes about 1080–1170 cycles: 1024 samples plus the fill latency.
- **Rate at 54 MHz.** The target is HDTV 720p 4:2:2 at 30 fps, which is 55.3 M samples/s.
  - With 64×64 blocks this design gives about 0.96 coefficient per cycle, including fill
    latency. That is about 52 M samples/s at 54 MHz.
  - With 32×32 blocks it gives about 0.9 coefficient per cycle, about 48 M samples/s.
  - The fill latency of one block is not overlapped with the next block.
- **Coding-state storage.**
  - All 19 context states are kept per pass, but each pass writes only those it uses; the rest
    are constants.
  - The arithmetic register is 52 bits (A, C, CT) plus a 12-bit byte pointer.
  - The intended storage is 399 bits per plane with a 56-bit register.
- **First-refinement flag.** It is a separate bit per sample, not a special code folded into
  the other state bits.
- **Controller.** The scan controller is a per-cycle choice made from per-slot flags, not a state
  register with explicit transitions. The four states appear only as a status output.
- **Reused decoding for signs.** Signs are decoded by the second arithmetic decoder of each
  plane's four-symbol decoder, not by a separate sign-plane coder.
- **Own choices.** The bit-stream port, the block control and the output format are this
  design's own.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

`tb/ebc_ref_pkg.sv` is a reference model, written independently of the RTL. It contains:

- a JPEG 2000 MQ **encoder**, with carry propagation, 0xFF bit stuffing and the standard flush;
- a plain sequential block encoder in the parallel mode.

For random code-blocks it produces the 30 pass streams and a log of every coded decision with
its context.

| testbench | what it checks |
|-----------|----------------|
| `tb_ebc_decoder` | Whole decoder at full size (10 planes, 64×64, default parameters). Covers 64×64 and 32×32 blocks, all bands, 1–10 planes and densities from 5 % to 100 %, with every coefficient compared. Checks decode time: a W×W block in at most W² + 256 cycles. Counts each scan state, condition 0, run-length runs with and without a 1, two-symbol decodes, refinements, empty planes and both block sizes; one that never happens is a failure. |
| `tb_cf` | One plane alone, with columns built from the reference's state and an oracle decoder that replays the reference's decisions per pass. Every context the CF asks for must match, in order, and every column handed down must match. Runs free-running (at most one cycle per sample) and with random stalls at both ends. |
| `tb_fad` | 1-, 2- and 4-symbol modes against streams from the reference MQ encoder. |
| `tb_mq_decoder`, `tb_uniform_decoder` | Decision-by-decision decoding of reference-encoded streams. |
| `tb_srb` | Initial states, initialisation, and random write-back against a model. |
| `tb_cf_pe`, `tb_rb`, `tb_line_buffer` | Exhaustive or random, against models. |

Simulating with Verilator (the package files first):

```
verilator --binary --timing -Wno-fatal rtl/ebcd_pkg.sv $(ls rtl/*.sv | grep -v pkg) \
          tb/ebc_ref_pkg.sv tb/tb_ebc_decoder.sv --top-module tb_ebc_decoder
./obj_dir/Vtb_ebc_decoder
```

The full-size end-to-end test runs in about a second.

Synthesis of the top gives the following, with no latches:

- about 41 k generic cells;
- about 10.4 k flip-flop bits;
- the 768-bit line buffer.

The coding-state registers are the largest part.

## Changing it

- **Number of planes and magnitude width.** These are `NPL` and `MAGW` in `ebcd_pkg`. The chain
  length, the register banks and the state bank all follow these constants.
- **Block width.** The largest block width is `CBW`. The 32×32 mode is selected at run time.
- **Look-ahead window.** `WIN` bytes (8) covers the worst case of one cycle's four decisions.
