# Word-level embedded block decoder for JPEG 2000

JPEG 2000 codes every code-block of wavelet coefficients bit-plane by
bit-plane. The plane with the most significant bit comes first. Each plane is
coded in three passes:

- significance propagation, called "Pass 1" here;
- magnitude refinement;
- cleanup.

A conventional decoder walks through these passes one after the other. It
keeps a state memory for every coefficient (significant yet? refined yet?
visited in this plane?) and decodes one binary symbol per cycle. A 64 x 64
block with N planes therefore costs roughly N x 4096 cycles.

This RTL decodes **all magnitude bit-planes at the same time**, using one
hardware stage per plane. Each stage decodes one sample bit per cycle, so the
whole decoder delivers about one finished coefficient per cycle, whatever N
is. No per-coefficient state memory is needed. A sample's state at plane k is
rebuilt on the fly from the bits that the stages above have already decoded.
Those bits travel down the chain together with the sample's column.

This only works in the JPEG 2000 **parallel mode**, which has two parts:

- **Vertically causal contexts.** Samples of the next stripe count as
  insignificant.
- **Pass termination.** Every coding pass is a separately terminated MQ code
  stream, with the probability models reset at its start.

A code stream without these options cannot be decoded by this design.

## Data flow

```
 column feeder ──► stage N-1 ──► stage N-2 ──► … ──► stage 0 ──► coefficients
   ▲  (empty columns,  CF + FAD + Mag.REB                         │
   │   prev-stripe word)                                          │
   └──────────── line buffer (12 x 64) ◄── last row of a stripe ◄─┘
```

- The **column feeder** (`ebc_feeder`) pushes an "empty" code-block into the
  top stage, column by column. Its order is: stripe 0, x = 0..63, then
  stripe 1, and so on. After the last column it sends 5N + 2 flush columns.
- Every stage holds five columns. When it has decoded the oldest one at its
  plane, it hands that column on to the next lower plane.
- Stage 0 emits a column of four finished coefficients: a 10-bit magnitude
  and a sign for each.
- The bottom row of each stripe is written into the **line buffer**. The
  feeder reads it back as the "row above" for the next stripe.
- A column of stripe s + 1 is only fed once the column above it has left
  stage 0. With 64 columns per stripe and at most 50 in flight, this never
  costs a cycle.

Each stage `k` has three parts:

| part | module | job |
|---|---|---|
| context formation (CF) | `ebc_cf` (+ `ebc_cf_fsm`, `ebc_pe`, `ebc_pe_prev`) | holds the column window, chooses the next sample, classifies its pass, forms its contexts, updates the state with the decoded bits |
| four-symbol arithmetic decoder (FAD) | `ebc_fad` | decodes up to four MQ symbols for one sample in one cycle |
| magnitude register bank | `ebc_mag_reb` | carries the magnitude bits of planes above k next to the CF's columns and adds bit k when a column leaves |

The sign does not go through the register bank. It stays in the PE registers,
which pass it on to the CF of the next plane. Whichever stage finds a
coefficient significant decodes its sign.

## What a processing element stores

Each column slot of a CF holds four current-stripe PEs. Each PE is a 5-bit
register (`pe_reg_t`):

| bit | meaning at plane k |
|---|---|
| `dh` (d-hat) | significant at some plane above k |
| `d`  | before the visit: "first refinement pending" (only with `dh`). After the visit: the decoded bit |
| `v`  | visited (decoded) in plane k |
| `c`  | the visit was in the cleanup pass |
| `sign` | sign, valid once significant |

From these bits:

- **φ = d̂ | (d & v)** says whether the sample counts as significant for a
  later neighbour.
- The pass of a sample follows from d̂ and its neighbours:
  - d̂ = 1: refinement;
  - otherwise, any significant neighbour: Pass 1;
  - otherwise: cleanup.
- The first-refinement flag is stored as the unused code
  (d̂, d, v) = (1, 1, 0). That saves a register bit.

When a column moves to plane k-1:

- d̂ becomes d̂ | d;
- d becomes ~d̂ & d, so "became significant at k" turns into "first
  refinement pending at k-1";
- v and c are cleared.

The extra bit `c` makes the contexts exactly those of the standard's
sequential order. There, a plane's Pass 1 and refinement pass run over the
whole block before its cleanup pass. So a neighbour that became significant
in *this plane's cleanup* must not count for Pass 1 or refinement decisions,
even when it was decoded earlier in time. The PEs therefore give two
significance values:

- φ, used for cleanup and for sign contexts in cleanup;
- φ_mr = d̂ | (d & v & ~c), used for Pass 1 and refinement.

The previous-stripe row above a column is read from the coefficient word in
the line buffer, `{cf, sign, magnitude}`. In it, `cf` says "became
significant in a cleanup pass". `ebc_pe_prev` derives the same two
significance values from that word.

## Column-switching scan (`ebc_cf_fsm`)

This is the core of the design. One plane could be decoded one column at a
time if two conditions held:

- every Pass 1 decision could see the final significance of the column to its
  right;
- every refinement or cleanup decision could see the Pass 1 results of the
  column to its right.

The controller meets both by running the **Pass 1 sub-scan one column ahead
of the non-Pass 1 (refinement + cleanup) sub-scan**. It alternates between
them. The columns sit in slots C4 (oldest) … C0 (newest). The four states
are:

| state | sub-scan |
|---|---|
| P1@C1 | Pass 1 samples of C1 |
| NP1@C2 | refinement/cleanup samples of C2 |
| P1@C2 | Pass 1 samples of C2 |
| NP1@C3 | refinement/cleanup samples of C3 |

It moves between them on five conditions:

| cond | meaning |
|---|---|
| 0 | the column's four samples were all Pass 1 |
| 1 | no Pass 1 sample left |
| 2 | Pass 1 samples left |
| 3 | refinement/cleanup samples left |
| 4 | none left |

The transitions:

- P1@C1:
  - 1 → NP1@C2;
  - 0 → switch, then NP1@C3.
- NP1@C2: 4 → switch, then P1@C1.
- NP1@C3: 4 → switch, then P1@C2.
- P1@C2:
  - 1 → P1@C1;
  - 0 → switch, then stay in P1@C2.
- Conditions 2 and 3 keep the current state.

A **switch** shifts all five slots one place left and takes a new column into
C0. Only samples that really need decoding are visited, so a plane costs as
many cycles as it has samples (4 per column on average).

Details that are this design's own:

- **Empty sub-scans cost no cycle.** Conditions 1 and 4 are evaluated before
  the decode. The selection logic follows up to three empty sub-scans in the
  same cycle.
- **Bubbles.** If a non-Pass 1 sub-scan is empty, the controller switches
  without decoding. This is rare, because the run-length rule and condition 0
  cover most such cases.
- **Held switch.** A switch needs two things: a new column from the plane
  above, and C4 already taken by the plane below. If either is missing, the
  switch is held pending and nothing is decoded. These are the only stalls
  apart from the arithmetic decoder waiting for bytes.

Because each plane's window moves forward and backward with its own data, two
neighbouring planes drift against each other. C4 is the buffer that absorbs
this drift. A column waits in C4 until the next lower CF takes it, which can
only happen once every sample of the column is final at plane k. Columns are
handed down with a valid/take handshake and a "sent" flag on C4.

Run-length coding of the cleanup pass is handled in a single cycle. It applies
when a cleanup sub-scan starts at row 0 of a column whose four samples are
insignificant, unvisited and have no significant neighbour. One request then
decodes the run symbol, the two position symbols and the sign.

## Four-symbol arithmetic decoder (`ebc_fad`)

Each stage sees three independent MQ code streams, one per pass. The FAD keeps
for each stream:

- the MQ registers A, C and CT;
- its nineteen context states;
- a 12-byte window, filled from that pass's byte input at one byte per cycle.

A request from the CF is one of three kinds:

| kind | symbols |
|---|---|
| `REQ_ZCSC` | magnitude bit with a zero-coding context, then the sign if the bit is 1 |
| `REQ_MR` | one refinement bit |
| `REQ_RUN` | run bit; if 1, two uniform bits and the sign |

The symbols are decoded as a chain of standard MQ decode/renormalise steps in
one combinational path, and the answer comes in the same cycle.

The FAD acknowledges only when the window surely holds every byte that the
chain may read. Otherwise the CF stalls for that cycle. After the last byte of
a segment, the byte source must supply 0xFF bytes, as the standard's decoder
expects.

## Interface of `ebc_decoder_top`

Parameters:

| name | default | meaning |
|---|---|---|
| `NPLANES` | 10 | magnitude bit-planes = stages |
| `CB_W`, `CB_H` | 64 | code-block size. `CB_W` must exceed 5 x `NPLANES` |
| `WIN` | 12 | byte window per pass stream |

Ports:

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `start` | in | one-cycle pulse that begins a code-block |
| `num_planes[3:0]` | in | magnitude planes of this block (1..NPLANES). Stages above it pass columns through. Hold stable until `done` |
| `band` | in | LL/HL/LH/HH, selects the zero-coding table. Hold stable until `done` |
| `bs_data[k][p]`, `bs_valid`, `bs_ready` | in/in/out | byte stream of plane k, pass p (0 = Pass 1, 1 = refinement, 2 = cleanup). A byte is consumed when valid & ready |
| `coef_valid`, `coef_x`, `coef_stripe` | out | one output column |
| `coef_mag[r]`, `coef_sign[r]` | out | magnitude and sign of row r (0 = top) of that column |
| `done` | out | every column of the block has been output |

The plane numbering is the usual one. A block with M planes uses the segments
of planes M-1 … 0, and the top plane has only a cleanup segment.

Columns come out in raster order of stripes. The first column appears after
about 5N columns of fill. After that the decoder delivers about one
coefficient per cycle, provided the byte streams keep up.

## Where this RTL departs from the published architecture

- **32 x 32 code-blocks are not supported.** The original feeds partially
  decoded coefficients back from the CF of plane 3 to serve as the previous
  row when a stripe is shorter than the pipeline. How the lower planes would
  complete the missing bits is not described, so that path is not built.
  Here `CB_W` must be larger than the 5 x NPLANES columns the chain holds.
- **Latency is up to 5N columns, not 4N.** Each CF has five slots: four
  window columns plus the C4 buffer. The published figure counts only the
  four window columns.
- **The `c` bit in every PE and the `cf` bit in the line-buffer word are
  additions.** They make the Pass 1 and refinement contexts equal to the
  sequential order of the standard. The published PE stores only
  (d̂, d, v) and the sign. The line buffer keeps the published size
  (12 bits x 64). Its twelfth bit is used for this flag, which is this
  design's reading.
- **The handshakes are this design's own.** This covers the column hand-over
  (valid/take, "sent" flag on C4), the held switch, the bubble switch, the
  flush columns and the byte interface of the FAD. The published text names
  only a forward and a switch signal.
- **Pass classification** uses "at least one significant neighbour" for
  Pass 1, as in the standard.
- **The FAD internals are this design's own.** That covers the three per-pass
  decoders, the byte window and the stall rule. The published architecture
  only states that the FAD decodes up to four symbols per sample per cycle.
- **Code-blocks are decoded one at a time.** The next block starts after
  `done`, so the pipeline fill is paid per block. The sustained rate is
  therefore about 1.08 cycles per sample rather than exactly one.
- **`num_planes` is an addition.** It lets one 10-stage decoder handle blocks
  with fewer planes by switching the upper stages to pass-through.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_ebc_decoder_top` | full size, defaults: four random 64 x 64 blocks (10, 6, 3 and 10 planes; all four bands; sparse to dense). Every coefficient and sign against the original, column order, cycles per block, and that every mechanism occurs: Pass 1 / refinement / cleanup decodes, run-length with and without a one, condition-0 switches, bubbles, FAD stalls, held switches, pass-through stages, line-buffer use, stuffed bytes |
| `tb_ebc_workload` | sustained rate over twelve 6-plane 64 x 64 blocks back to back (at most 1.15 cycles per sample), with every coefficient checked |
| `tb_ebc_cf` | a 3-plane, 16 x 16 chain built from the real modules. Decoded coefficients, no C4 overwrite, no Pass 1 decode without a neighbour, all decode kinds per plane |
| `tb_ebc_cf_fsm` | the controller against a column model. Legal selections, top-to-bottom order, no column leaving C3 unfinished, one decode or switch per cycle at full rate, and that condition 0, bubbles and held switches occur |
| `tb_ebc_fad` | 9000 random requests over three interleaved streams, including four-symbol run decodes and 0xFF stuffing |
| `tb_ebc_pe`, `tb_ebc_pe_prev` | exhaustive / random checks of the state equations |
| `tb_ebc_mag_reb`, `tb_ebc_line_buffer`, `tb_ebc_feeder` | against reference models. The feeder test also checks the stripe interlock and the full column rate |

The code streams come from `tb/tb_ebc_ref_pkg.sv`, a reference encoder:

- the MQ encoder of the standard;
- a sequential coder for the three passes, causal mode, every pass
  terminated.

It shares only the context tables (`ebc_pkg`) with the RTL.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
  rtl/ebc_pkg.sv tb/tb_ebc_ref_pkg.sv tb/tb_ebc_decoder_top.sv \
  --top-module tb_ebc_decoder_top -o sim && ./obj_dir/sim
```

The full-size test finishes in about a second of simulation time.

## Measured performance and capacity

On 64 x 64 blocks (4096 samples), from the start pulse to `done` and
including pipeline fill and flush:

| planes | cycles per block | cycles per sample |
|---|---|---|
| 3 | 3645 | 0.89 |
| 6 | 4453 | 1.09 |
| 10 | ~4600 | 1.12 |

Sustained over twelve six-plane blocks decoded one after another
(`tb_ebc_workload`), the decoder needs **1.078 cycles per sample**. The
blocks do not overlap: each one starts only after the previous block's
`done`, so every block pays its own pipeline fill and flush.

The published architecture quotes one sample per cycle (W² cycles per block)
and 54 MSamples/s at 54 MHz. It uses that figure to support HDTV 720p
(1280 x 720, 4:2:2) at 30 frames/s, which needs about 55.3 MSamples/s.

At 54 MHz this RTL reaches about 50 MSamples/s, or 27 frames/s of 720p.
30 frames/s would need about 60 MHz, or overlapping consecutive code-blocks.
No timing analysis was done, so the clock rate the RTL reaches in a given
technology is unknown.

Synthesised without memories, the 10-plane decoder has about 68,000 generic
cells and 13,000 flip-flops. Most of them are the per-plane MQ decoder chains.
For comparison, the published design reports about 138,000 NAND2 gates.

## Files

- `rtl/ebc_pkg.sv`: shared types (PE register, column, FAD request and
  response) and the JPEG 2000 tables (MQ Qe and next-state tables, zero-coding,
  sign-coding and refinement contexts).
- `rtl/ebc_decoder_top.sv`: the stage chain, the output and the line-buffer
  write.
- `rtl/ebc_cf.sv`, `rtl/ebc_cf_fsm.sv`, `rtl/ebc_pe.sv`, `rtl/ebc_pe_prev.sv`:
  context formation.
- `rtl/ebc_fad.sv`: arithmetic decoder.
- `rtl/ebc_mag_reb.sv`, `rtl/ebc_line_buffer.sv`, `rtl/ebc_feeder.sv`:
  magnitude bank, line buffer and column feeder.
- `tb/`: testbenches and the reference encoder package.
