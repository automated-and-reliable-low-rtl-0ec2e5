# EEG artefact-removal SoC

An EEG recording is easily spoiled by two kinds of interference:

- **Muscle activity.** This is broadband, high-power energy above about 16 Hz.
- **Eye blinks.** A blink is a large negative dip in the frontal channels, lasting a few hundred milliseconds, with most of its energy in the theta band.

This design removes both from a single-channel record in hardware. It needs only adders, comparators, one squarer, a shift-and-subtract divider and two memories the size of the record. It also removes wide-band noise by soft-thresholding wavelet coefficients.

Everything works on a Haar wavelet decomposition of the record:

- **Denoising.** Small detail coefficients at the two finest levels are shrunk toward zero.
- **Muscle removal.** The finest two detail bands are cut into frames. A frame is cleared when its power is above the average of the per-frame maxima.
- **Blink removal.** A negative level-4 approximation coefficient marks a possible blink. The time-domain samples around it are collected, and their negative values are averaged into a *global mean* (GM). Every sample of the reconstructed record that lies below GM is raised to GM.

The co-processor sits as a slave on an AHB-Lite bus beside a memory. A 32-bit processor drives the bus as master. The processor is not part of this RTL: its bus signals are the ports of the top level. The processor loads a record, starts a run, polls for completion and reads the cleaned record back.

## Block structure

```
eeg_soc_top                      top level; processor-side AHB master signals are ports
└── top_ahb                      the bus
    ├── ahb_decoder              HADDR[31:28] -> slave select
    ├── ahb_mux                  data-phase routing of HRDATA/HREADYOUT/HRESP
    ├── ahb_mem                  1024 x 32 zero-wait memory (byte/half/word writes)
    ├── ahb_default_slave        ERROR for unmapped addresses
    └── ahb_peripheral           register interface
        └── eeg_coprocessor      sequencer and two coefficient memories
            ├── coef_ram  (X)    samples / approximations, N x 24
            ├── coef_ram  (D)    detail bands d1..d4,      N x 24
            ├── haar_dwt         forward and inverse transform engine
            ├── wavelet_denoise  soft threshold of d1, d2
            ├── muscle_artefact_removal
            └── blink_artefact_removal
                └── seq_divider  restoring divider for the mean
```

Packages: `eeg_pkg` holds the default sizes, the 24-bit coefficient type, the detail-band offset function and the soft-threshold function. `ahb_pkg` holds the transfer-type and size encodings, the response codes and the address map.

## Default configuration

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 2560 | samples per record: 10 s at 256 Hz |
| `LEVELS` | 4 | decomposition depth; a4 covers 0–8 Hz at 256 Hz |
| `X` | 86 | d1 coefficients per muscle frame (must be even) |
| `WIN` | 51 | blink window half-width in samples: 0.2 s at 256 Hz |
| `DN_LEVELS` | 2 | detail levels that are soft-thresholded |
| `MEM_WORDS` | 1024 | words in the bus memory |
| `COEF_W` | 24 | coefficient width (package constant) |

Input samples are 16-bit two's complement. `N` must be a multiple of 2^LEVELS.

## How the co-processor works

### Memory layout and the integer Haar transform

The design uses two single-port memories, each N words of 24 bits, with a one-cycle registered read:

- **X** holds the record. After the forward transform it holds a4 in words 0 … N/16−1.
- **D** holds the detail bands back to back. Band dz starts at word `N − (N >> (z−1))`. So d1 is at 0 … N/2−1, d2 at N/2 … 3N/4−1, and so on.

The forward butterfly is `a = x[2k] + x[2k+1]`, `d = x[2k] − x[2k+1]`. The inverse is `x[2k] = (a + d) >>> 1`, `x[2k+1] = (a − d) >>> 1`. This is the Haar transform without the 1/√2 factor at each level. Two consequences follow:

- A level-z coefficient is 2^(z/2) times the orthonormal one. Sixteen-bit samples therefore need at most 20 bits at level 4, which fits in 24.
- The inverse is exact as long as the details are left alone. Once they are changed, the inverse rounds toward −∞.

The engine reads two words and writes one for each forward butterfly. It reads two and writes two for each inverse butterfly. It works in place on X, level by level.

### One decomposition shared by three algorithms

Conceptually, denoising, muscle removal and blink removal are three blocks in a chain, and each decomposes its own input. Haar analysis of a re-synthesised signal gives back the coefficients it was built from. So the chain can share a single decomposition:

1. **FWD** – forward transform, 4 levels.
2. **CAP** – record the sign of each a4 coefficient (a bit vector of N/16 bits). This is the blink detector's input. Denoising and muscle removal do not touch a4, so capturing it now is exact.
3. **DEN** – soft threshold of d1 and d2.
4. **MUS** – muscle frame detection and clearing on d1 and d2.
5. **INV** – inverse transform gives the cleaned record f′.
6. **BLK** – GM computation and clamping on f′.

This order matches the conceptual chain (denoise, then muscle, then blink). The only difference is that blink detection reads a4 before reconstruction instead of re-decomposing f′, and the two give the same a4.

### Denoising

`d' = sign(d) · max(|d| − thr_z, 0)` for every coefficient of d1 and d2. `thr_z` is a run-time input, one per level. In the SoC it is a register the processor writes. Setting it to 0 disables denoising. No rule for choosing the threshold is built in. A universal threshold computed in software from the noise estimate of d1 is the usual choice. Remember that level-z coefficients carry the 2^(z/2) scale.

### Muscle frames

d1 is cut into frames of `X` coefficients. d2 is cut into frames of `X/2` coefficients. d2 stands in for the zero-padded, interleaved d2 of the same length as d1; zero padding adds no power. The number of frames is `S = ceil((N/2)/X)`, which is 15 at the defaults. The last frame holds the remainder (76 coefficients).

For frame b, the unit computes:

- P1_b = 2·Σ d1², the doubling giving level 1 the same scale as level 2;
- P2_b = Σ d2²;
- M_b = max(P1_b, P2_b).

A frame of level z is cleared when `P_z,b · S > Σ_b M_b`. This compares it with the mean of the maxima without dividing. Powers are kept in 64 bits. The flags of the cleared frames (`FLAGS1`, `FLAGS2`) are kept for the host to read.

### Blink windows and the global mean

A negative a4[m] stands for time samples 16m … 16m+15. Its window is `[16m − WIN, 16m + 15 + WIN]`, clipped to the record. Overlapping windows count a sample once.

Capture is done in the CAP phase, before reconstruction. In the BLK phase the unit makes two passes over f′:

1. Sum the negative samples that lie inside any window, and count them.
2. GM = −(|sum| / count), truncated toward zero by a 40-bit restoring divider. Every sample of the record below GM is set to GM.

If no window holds a negative sample, the record is left unchanged.

Only this *GM clamp* variant is built. The same framework allows two others: zeroing the artefact samples, or choosing between GM and a per-window local mean. Of the three, the GM clamp was the most accurate.

### Timing of one run

Every phase is a fixed-length loop. Let P = N/2 + N/4 + N/8 + N/16 and M = N/2 + N/4.

| Phase | Cycles | At defaults |
|---|---|---|
| FWD | 3P + 1 | 7,201 |
| CAP | 2·(N/16) + 1 | 321 |
| DEN | 2M + 1 | 3,841 |
| MUS | 3M + S + 2 | 5,777 |
| INV | 3P + 1 | 7,201 |
| BLK | 4N + 43, or 2N + 2 if no window sample | 10,283 |
| hand-overs | 6 | 6 |
| **total** | | **34,630** |

`CYCLES` reports the measured length, and the testbenches check it against this formula. Loading and reading back the record over the bus adds 2 cycles per sample write (address and data phase, pipelined) and 3 per sample read.

## The bus

`top_ahb` is a single-master AHB-Lite interconnect.

| HADDR[31:28] | Slave |
|---|---|
| 0x0 | `ahb_mem`, 4 KB (address bits above the array size are ignored, so it repeats) |
| 0x4 | `ahb_peripheral` |
| other | `ahb_default_slave`: two-cycle ERROR for NONSEQ/SEQ, OKAY for IDLE/BUSY |

The decoder's slave number is registered in `ahb_mux` whenever HREADY is high, so the response always comes from the slave that owns the data phase. HREADY goes back to every slave. The multiplexor asserts the AHB rule that an ERROR lasts two cycles, with HREADYOUT low in the first.

The memory has zero wait states. It writes byte lanes little-endian according to HSIZE and HADDR[1:0]. Reads always return the full word.

### Peripheral register map (base 0x4000_0000)

| Offset | Name | Access | Content |
|---|---|---|---|
| 0x000 | CTRL | W | bit 0: start (ignored while busy) |
| 0x004 | STATUS | R | bit 0 busy, bit 1 done (cleared by the next start) |
| 0x008 | GM | R | global mean of the last run, sign-extended |
| 0x00C | WIN_COUNT | R | negative samples found in blink windows |
| 0x010 | CLAMPED | R | samples raised to GM |
| 0x014 | FLAGS1 | R | cleared d1 frames, bit b = frame b |
| 0x018 | FLAGS2 | R | cleared d2 frames |
| 0x01C | CYCLES | R | length of the last run |
| 0x040 + 4z | THR[z] | RW | soft threshold for detail level z+1 |
| 0x8000 + 4i | SAMPLE[i] | RW | record sample i: bits 15:0 written, reads sign-extended |

Registers respond with no wait state. A sample read takes one wait state, because the sample memory has a registered read port. A sample access is answered with ERROR in two cases: while a run is in progress, or when i ≥ N. Other offsets read as zero. Accesses must be 32-bit, and an assertion flags any other size.

`OUT_DATA[7:0]` shows the upper byte of the most recent sample read through the bus. `clk_1` toggles each time it updates. Together they give an external pin-level view of the cleaned record as software streams it out.

### Typical software sequence

```
for z in 0..1:   write 0x4000_0040 + 4z, threshold_z
for i in 0..N-1: write 0x4000_8000 + 4i, sample_i
write 0x4000_0000, 1
poll  0x4000_0004 until bit 1 is set
read  0x4000_8000 + 4i for the cleaned record, 0x4000_0008.. for results
```

## Where this design departs from the method it implements

- **One shared transform instead of one per block.** This is exact for the approximation band, as explained above.
- **No 1/√2 scaling.** Power comparisons scale level 1 by 2. The GM and clamp values are in sample units, because reconstruction undoes the scale.
- **The last muscle frame is short.** 1280 d1 coefficients are not a multiple of 86. The method assumes the frame size divides the record evenly.
- **Only the GM-clamp blink variant is built.** Clamping applies to the whole record, not just to the windows.
- **Denoising thresholds are software's job.** There is no threshold estimator in hardware.
- **The register map, address map, memory size, coefficient width and the roles of `OUT_DATA`/`clk_1` are this design's own choices.**
- **Reset.** `rst` is active low throughout. It is the same net as the processor's HRESETn.
- **Not included:**
  - the FastICA stage that splits a multi-channel recording into components (the co-processor processes one component at a time);
  - the processor;
  - the FPGA clock generator.

## Record sizes other than the default

The default build takes exactly one 2560-sample record. Other sampling rates need a rebuild:

- **160 Hz for 10 s** is 1600 samples. Use `N=1600, WIN=32`.
- **173.6 Hz and 500 Hz** give 1736 and 5000 samples. Neither is a multiple of 16, so the record has to be trimmed or padded to one.
- **`X`** can be any even number. Odd frame sizes such as 33, 43 or 107 are not supported, because the level-2 frame is X/2 coefficients.
- **Multi-channel recordings** are processed one component after another. Each costs one run plus the bus transfers.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. Expected values come from `tb/eeg_ref_pkg.sv`, an independent behavioural model. It computes the transform, denoising, muscle detection (with a real-valued mean) and blink removal directly on arrays. It also generates synthetic EEG with a muscle burst and a blink.

| Testbench | What it covers |
|---|---|
| `tb_haar_dwt` | forward coefficients of every band and exact reconstruction, cycle count |
| `tb_wavelet_denoise` | soft threshold on d1/d2 with different thresholds, d3/d4 untouched |
| `tb_muscle_artefact_removal` | frame flags and cleared coefficients, short last frame, cycle count |
| `tb_blink_artefact_removal` | GM, window count, clamped samples, the no-window case |
| `tb_eeg_coprocessor` | full run on artefact and clean records against the model, run length |
| `tb_ahb_decoder`, `tb_ahb_mux`, `tb_ahb_mem` | address decode, data-phase routing and two-cycle ERROR, byte lanes |
| `tb_ahb_peripheral`, `tb_top_ahb` | register map, wait state, ERROR when busy or out of range (reduced N=256) |
| `tb_eeg_soc_top` | the whole SoC at default parameters, driven as the processor would |
| `tb_eeg_workloads` | eight co-processor builds in parallel; see below |

`tb_eeg_soc_top` is the end-to-end test. It leaves every parameter at its default and drives the bus with a processor-like master, using pipelined transfers. It counts each bus and algorithm mechanism, and fails if any of them never happens:

- a wait state;
- each kind of ERROR (default slave, busy, out of range);
- back-to-back pipelined transfers;
- byte and halfword writes;
- a cleared muscle frame;
- a clamped blink sample;
- a non-zero denoising threshold;
- an `OUT_DATA` update.

A full run takes about ten seconds of wall-clock time under Verilator.

### Evaluation workloads

`tb_eeg_workloads` runs the co-processor on synthetic records that follow nine artefact patterns:

| Case | Muscle bursts (0.5 s) | Blinks (0.4 s) |
|---|---|---|
| I | none | none |
| II | alternate seconds | none |
| III | three at random | none |
| IV | none | alternate seconds |
| V | random | alternate |
| VI | alternate | alternate, in the same seconds |
| VII | alternate | alternate, in the other seconds |
| VIII | alternate | random |
| IX | random | random |

It runs these cases on eight builds:

- the default build, with all nine cases;
- builds with frame size X = 4, 10, 20, 66, 122 and 170, with cases II and III;
- a 160 Hz build (N = 1600, WIN = 32), with cases I and IX.

Each run is checked against the reference model bit for bit, including its run length. The testbench also prints the correlation of input and output with the clean record, as a rough quality figure. In these synthetic records:

- The output correlates with the clean record at about 0.94 for the muscle-only cases, against about 0.3–0.4 at the input.
- On a clean record it stays at 0.95. The GM clamp shaves the deepest troughs of ordinary activity too, so some cost on clean data is expected.

To run a testbench with plain Verilator, give the packages first and the other files after them. Lint warnings are not fatal for this design, so pass `-Wno-fatal`:

```
verilator --binary -Wno-fatal --top-module tb_eeg_soc_top \
    rtl/eeg_pkg.sv rtl/ahb_pkg.sv tb/eeg_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg) tb/tb_eeg_soc_top.sv
./obj_dir/Vtb_eeg_soc_top
```

To run a block on its own, replace the last file and the top module name with those of its testbench. Most block testbenches run at the default sizes. `tb_ahb_mem`, `tb_ahb_peripheral` and `tb_top_ahb` set smaller parameters on the unit they test.

Remaining lint warnings are understood:

- asynchronous-reset nets used in assertion `disable iff`;
- unused low address bits;
- the upper quotient bits of the divider, which cannot be set because |sum| ≤ count · 2^23.
