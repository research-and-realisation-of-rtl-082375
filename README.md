# Modified Turbo Block Code (MTBC) encoder and SOVA turbo block decoder

A turbo code sends each block of data through two recursive convolutional encoders. The second encoder sees the data in interleaved order. The decoder runs two soft-in/soft-out decoders in turn, and each one passes its extrinsic information to the other. When such a code is used on independent blocks, the end of each trellis is a problem. Tail bits can bring the first encoder back to the zero state. The second encoder, which sees the bits in a different order, normally ends in an unknown state. Its decoder then has to guess at the block end, and that limits how low the error rate can go (the error curve flattens).

The *modified turbo block code* terminates both halves. It relies on a property of the recursive code. The recursion polynomial G(D) = 1 + D² + D³ (octal 13) divides the *reset polynomial* 1 + D⁷. So an input pattern 1 + D^(7n) (two ones a multiple of 7 apart) takes the encoder from state 0 back to state 0. The encoder runs a single RSC over the stream

```
 [ N data bits | 3 tail bits | N0 zero bits | the N+3 data+tail bits, interleaved ]
 \_______ first half: ends in state 0 _______/ \_ second half: ends in state 0 _/
```

- The tail bits end the first half in state 0.
- The zero bits pad the first half to a multiple of 7 (N0 = 7i − (N+3)).
- The interleaver is constrained to move every bit by a multiple of 7 positions.

Every data or tail bit that is 1 then adds the pattern D^t(1 + D^(7n)) to the stream. That pattern returns the encoder to state 0, so by linearity the second half also ends in state 0. Both component decoders therefore work on trellises that start and end in state 0. The block length N can be anything up to N_MAX; it does not have to be a multiple of 7.

This repository contains both halves of the design as SystemVerilog:

- `mtbc_encoder`: the encoder, one coded bit per clock.
- `turbo_decoder`: the decoder core. It holds one received block and iterates a SOVA (soft-output Viterbi) decoder over it, one trellis step per clock.

`mtbc_top` places the two side by side. The channel between them (modulation, noise, quantisation) is left to the user; the testbenches model it.

## The component code

| item | value |
|---|---|
| RSC code | {13, 15} octal, memory 3, 8 states, rate 1/2 |
| recursion | 1 + D² + D³ (13) |
| parity | 1 + D + D³ (15) |
| reset polynomial | 1 + D⁷, l = 7 |
| tail bits | 3; each one equals the feedback sum, so the register input becomes 0 |

The octal numbers are read with the D⁰ coefficient first. The two polynomials differ only in the D and D² terms, which is the family of "good" pairs G1 + G2 = D·H(D) that the design is based on. `mtbc_pkg` holds the polynomials as `G_FB`/`G_FF`, the trellis functions (`rsc_next`, `rsc_par`, `rsc_pred`) and the word lengths. State bit `st[k-1]` is the register value delayed by k clocks. The two predecessors of a state differ only in `st[2]`.

## Encoder (`mtbc_encoder`)

The block passes through four phases. Each phase sets the three switches of the classic block diagram (S1 data/tail, S2 direct/interleaver, S3 zero insertion):

| phase | cycles | RSC input | to interleaver | output |
|---|---|---|---|---|
| DATA | N (plus source stalls) | `d_bit` (valid/ready) | written | X = data, Y first half |
| TAIL | 3 | `rsc_tail_logic` | written | X = tail, Y first half |
| ZERO | N0 + 1 | 0 | — | none (encoder output dropped) |
| INTL | K = N + 3 | interleaver output | read | Y second half |

- **N0 without a divider.** A modulo-7 counter of the stream position gives N0: the ZERO phase shifts zeros until the counter reaches 0. That phase always costs one extra idle cycle.
- **Puncturing.** Parity bits pass through `puncturer`, which has one keep pattern per half. The default keeps the even positions of the first half and the odd positions of the second. The result is K systematic bits and K parity bits, a rate of about 1/2.
- **Outputs.** `x_valid`/`x_bit` and `y_valid`/`y_bit`/`y_half` are single-cycle strobes.
- **Run time.** One block takes N + 3 + N0 + 1 + K busy cycles when the source does not stall. For example, N = 440 gives N0 = 5 and 440 + 3 + 5 + 1 + 443 = 892 cycles.
- **Termination check.** An assertion checks that the encoder is in state 0 when the zero phase begins. `mtbc_top` checks that the encoder is in state 0 again after the second half.

### The interleaver table, and the one rule it must obey

`mtbc_interleaver` is a bit buffer written in natural order and read through a table: output position q delivers input position `perm[q]`. The table lives in `perm_ram` and is written from the host, so different random interleavers can be tried without rebuilding. There is no built-in default table. The table must be loaded before the first block.

**The termination of the second half holds only if `perm[q] mod 7 == q mod 7` for every q.** Put another way: write the block into a matrix with 7 columns, and shuffle only within a column. The RTL does not check this rule. A table that breaks it still encodes and decodes, but the second half then ends in an arbitrary state. In that case the decoder's flush, which assumes state 0, becomes an approximation, and the assertion in `mtbc_top` fires. The testbenches build valid tables by shuffling each residue class modulo 7 at random (`mtbc_ref_pkg::ref_make_perm`).

## SOVA decoder (`sova_decoder`)

A single-pass, register-exchange soft-output Viterbi decoder. It has four parts.

**Branch metrics (`sova_bmu`).** Soft values are 4-bit two's complement log-likelihood ratios; a positive value means bit 1. The metric of a branch labelled (u, p) is
`bm = u·(ys + la) + p·yp`
where ys is the systematic value, la the a-priori value and yp the parity value. A punctured parity value is 0. With 0/1 weights, the difference between two path metrics comes out directly in the units of the input LLRs.

**Add-compare-select (`sova_acs`).**
- For each of the 8 states, the larger of the two extended path metrics survives.
- The unit outputs the decision, the decoded bit of the surviving branch, and the metric difference Δ.
- All internal words are 7 bits. After each step the metrics are normalised so that the best state is 0, and they are clipped at −64. Δ is clipped at 63.
- On a tie, the predecessor whose oldest bit is 0 wins.

**Register-exchange path memory (`sova_rex`).** Each state keeps the 28 most recent decisions (hard bits) and their reliabilities. On every step:
1. Each state copies the registers of its surviving predecessor, shifted by one.
2. It inserts its new decision, with Δ as the reliability.
3. Where survivor and competitor disagree on an older decision, that reliability becomes min(old, Δ). This update is applied only to the newest `SOFT_DEPTH` = 14 positions, the first half of the truncation path. The older half is copied unchanged, which costs less logic.

The decoder output is the oldest entry of the best state's register.

**Block end (flush).** Both halves of an MTBC block end in state 0. After the last step the controller therefore gives 27 flush cycles, which read the remaining decisions out of state 0's register.

**Soft output and extrinsic value.**
- The soft output `out_llr` is ±reliability, with the sign of the decision.
- The extrinsic value is `out_llr − (ys + la)` of the same position, saturated to 4 bits. The intrinsic values travel beside the decisions in a 28-deep delay line.

**Timing.** One step per clock. The decision about step i leaves TP − 1 = 27 clocks after step i's clock edge, in input order, so output order needs no correction.

## Turbo decoder (`turbo_decoder`)

One SOVA is time-shared between the two component decoders.

**One iteration is two passes.**

| pass | reads | writes |
|---|---|---|
| 1 (natural order) | ys = SYS[j], la = EXT[j], yp = PAR1[j] | E1[j] |
| 2 (interleaved order) | ys = SYS[PERM[q]], la = E1[PERM[q]], yp = PAR2[q] | EXT[PERM[q]] and HARD[PERM[q]] |

Pass 2 writes through PERM, which is the deinterleaving. Each pass costs K + TP + 3 cycles, so I iterations take `I · 2 · (K + TP + 3) + 1` cycles from `start` to `done`. For N = 448 and 3 iterations that is 2893 cycles.

**Two modes.**
- **Mode 1** (`cfg_mode2 = 0`): exactly one iteration. It uses the extrinsic values the host has loaded into EXT and leaves the new ones there. The host can therefore run the iteration loop itself and watch each step.
- **Mode 2**: `cfg_iter` iterations (1 to 15). It starts from zero a-priori values, and the host reads the decoded bits from HARD.

**Host bus.** Word-wide, with an asynchronous read. Writes are ignored while the decoder is busy. The `host_sel` codes are defined in `mtbc_pkg::host_sel_t`:

| `host_sel` | space | contents | access |
|---|---|---|---|
| 0 SYS | K entries | systematic values (4-bit signed, bits 3:0) | read/write |
| 1 PAR1 | K entries | first-half parity, 0 where punctured | read/write |
| 2 PAR2 | K entries | second-half parity, 0 where punctured | read/write |
| 3 EXT | K entries | extrinsic / a-priori values of decoder 1 | read/write |
| 4 PERM | K entries | interleaver table (9 bits) | read/write |
| 5 HARD | K entries | decoded bits (bit 0) | read only |

In `mtbc_top`, a PERM write goes to the encoder and the decoder at once, so the two always use the same interleaver.

## Sizes and parameters

| parameter | default | meaning |
|---|---|---|
| `N_MAX` | 448 | largest block (the block length of the hardware measurements) |
| `K_MAX` | 451 | N_MAX + 3 memory entries |
| `TP` | 28 | truncation path length |
| `SOFT_DEPTH` | TP/2 | positions that receive the soft update |
| `W_IN` / `W_INT` (package) | 4 / 7 | input/output and internal word lengths |
| `PPER`, `PAT1`, `PAT2` (top and encoder; `PERIOD` in the puncturer) | 2, 01, 10 | puncturing period and keep patterns for the two parity halves |

All memories are register arrays with asynchronous reads. An FPGA tool maps them to distributed RAM; an ASIC flow maps them to flip-flops.

The default pattern gives rate 1/2. The document's patterns for rate 5/7 are not known, so this design picks its own: period 5, keeping `00001` in the first half and `00100` in the second half. For N = 440 this sends 621 bits (rate 0.709), against the 619 quoted in the document. With `TP = 56` this gives the longer truncation path used for the higher rate. `tb_mtbc_median` runs this configuration.

## How far it can be trusted, and where it departs

Verified by simulation:
- The encoder matches an independent bit-level reference for lengths from 4 to 448, with random source stalls, and terminates both halves.
- At the default size, blocks sent over a simulated BPSK channel (amplitude 4, noise σ = 2.2, a few percent raw bit errors) decode without error after 3 iterations. More iterations reduce the errors at σ = 3.0.
- Mode 1 demonstrably uses the loaded extrinsic values.

Measured bit error rate at the default size (N = 448, rate 1/2, TP = 28), BPSK over AWGN with 4-bit inputs, 400 blocks (179,200 bits) per point, a fresh random interleaver per block (`tb_turbo_ber +BLOCKS=400`):

| Eb/N0 | uncoded BPSK | 1 iteration | 2 iterations | 3 iterations |
|---|---|---|---|---|
| 1.0 dB | 5.6e-2 | 1.0e-1 | 9.3e-2 | 8.7e-2 |
| 1.5 dB | 4.6e-2 | 6.2e-2 | 4.1e-2 | 3.2e-2 |
| 2.0 dB | 3.8e-2 | 3.2e-2 | 1.2e-2 | 6.7e-3 |
| 2.5 dB | 3.0e-2 | 1.4e-2 | 2.5e-3 | 8.8e-4 |
| 3.0 dB | 2.3e-2 | 4.1e-3 | 1.7e-4 | 4.5e-5 |

The "uncoded" column is the theoretical BPSK rate at the same Eb/N0. Each iteration gains less than the one before it. The document reports the same behaviour and puts part of it down to the missing weighting of extrinsic values and the short word lengths. No interleaver was optimised, and the runs are too short for rates below about 1e-5. The curves have not been compared against a floating-point model.

Choices made in this design that a user may want to change:

- **SOVA structure.** A single register-exchange pass, not a two-step SOVA. The older half of the path memory gets no soft update.
- **Extrinsic values.** The extrinsic value is the soft output minus the intrinsic value, clipped to 4 bits, with no scaling between iterations.
- **Metric arithmetic.** Path metrics are normalised to the best state and clipped; the clipping deliberately limits the 7-bit internal range.
- **Interleaver.** A loadable table that must preserve positions modulo 7, rather than a fixed row-in/column-out array. A plain row/column read order does not keep the positions modulo 7 that the termination needs. The interleavers optimised by search are not part of the RTL.
- **Host link.** The host bus stands in for a PC link such as a parallel port. No link protocol is implemented.
- **Encoding in hardware.** The encoder is RTL here, although a test system may equally run the encoder in software and load only the decoder.
- **Reset.** Control state uses an active-low asynchronous reset (`rst_n`). Memories are not reset and must be written before use.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mtbc_pkg.sv tb/mtbc_ref_pkg.sv tb/tb_mtbc_top.sv --top-module tb_mtbc_top
./obj_dir/Vtb_mtbc_top
```

Replace `tb_mtbc_top` with any testbench name. All of them run in a few seconds at most.

| testbench | what it exercises |
|---|---|
| `tb_mtbc_top` | End to end at default size: encode, channel, decode in mode 2 and mode 1. It counts tail insertion, zero insertion, puncturing, both modes, corrected errors, saturated extrinsic values and variable block lengths. |
| `tb_mtbc_median` | The top with `TP = 56` and the assumed period-5 pattern, N = 440, 2 iterations: bit count, streams, decoding, cycle count |
| `tb_turbo_ber` | Bit error rate at five Eb/N0 points for 1, 2 and 3 iterations (12 blocks per point; `+BLOCKS=n` for more). It checks that iterations and coding gain both show from 2 dB upwards. |
| `tb_mtbc_encoder` | X/Y streams against the reference, cycle count, termination |
| `tb_turbo_decoder` | Decoding, iteration gain, mode 1 a-priori use, host read-back, exact cycle count |
| `tb_sova_decoder` | One pass: decisions, 27-cycle latency, exact extrinsic values |
| `tb_sova_rex` | Path memory against a reference model, soft-update depth limit |
| `tb_sova_acs`, `tb_sova_bmu` | ACS and branch metrics against enumerated references |
| `tb_rsc_encoder`, `tb_rsc_tail_logic`, `tb_mtbc_interleaver`, `tb_puncturer` | The encoder parts |

`tb/mtbc_ref_pkg.sv` holds the independent reference models:
- a bit-level RSC and the MTBC frame builder;
- the residue-preserving random interleaver;
- an approximately Gaussian noise source (sum of 12 uniform samples) and a 4-bit quantiser.
