# One-octave wavelet filter bank in residue arithmetic with distributed arithmetic

This design computes one octave of a discrete wavelet transform (DWT) and of
its inverse. It splits the dynamic range across several small, independent
residue channels, and computes every filter inside a channel by
distributed arithmetic (DA), so no multiplier is used anywhere.

- **Residue number system (RNS).** An integer X with 0 ≤ X < M is stored as
  its remainders `|X|_m` modulo a set of pairwise coprime moduli. M is the
  product of the moduli. Sums and products with constants can be done on each
  remainder separately, and the result is exact while the true value stays
  inside M. The default set is {32, 31, 29, 27, 25, 23}. Every channel is
  5 bits wide, and M = 446,623,200 (about 2^28.7). Signed values use the
  upper half of the range as negative numbers.
- **Distributed arithmetic.** A fixed-coefficient inner product
  `y = Σ c_k·x_k` is evaluated one bit plane at a time. The bits of weight l
  from all N buffered samples form an N-bit address. A table indexed by that
  address holds the sum of the coefficients whose bit is set. The partial sums
  from the tables are then added with their weights 2^l. Here each x_k is a
  5-bit residue, so one sample needs only n_j = 5 bit planes, however wide the
  original binary input was. That is why throughput does not drop as input
  precision grows. Only the number of channels grows.

In one channel, the analysis bank turns a pair of input residues
(x(2n), x(2n−1)) into one approximation residue and one detail residue:

    a(n) = Σ_k g_k · x(2n−k)      d(n) = Σ_k h_k · x(2n−k)      (mod m)

The synthesis bank turns an (â(n), d̂(n)) pair into two reconstructed samples,
one at an even index and one at an odd index:

    x(2n)   = Σ_i ( gb_{2i}   â(n−i) + hb_{2i}   d̂(n−i) )
    x(2n+1) = Σ_i ( gb_{2i+1} â(n−i) + hb_{2i+1} d̂(n−i) )      (mod m)

Binary-to-residue converters sit on the inputs. Scaling residue-to-binary
converters sit on the outputs.

## The scaled modulo accumulator (`scaled_mod_acc`)

DA needs the running sum to be doubled before each new table word is added.
In binary this is just a shift. Modulo m it is not, and a separate
"times 2 mod m" table in the feedback loop would slow the loop down. This
accumulator therefore performs the whole step at once:

    y ← |2y + x|_m,  with 0 ≤ y, x < m

Since 2y + x < 3m, the correct result is one of three candidates:

| candidate | value       | correct when       |
|-----------|-------------|--------------------|
| s1        | 2y + x      | 2y + x < m         |
| s2        | 2y + x − m  | m ≤ 2y + x < 2m    |
| s3        | 2y + x − 2m | 2m ≤ 2y + x        |

All three are computed in parallel:

- s1 uses an ordinary carry-propagate adder.
- s2 reduces the three operands {2y, x, −m} with a row of carry-save adders
  (one 3-input function per bit) followed by a carry-propagate adder.
- s3 does the same with {2y, x, −2m}.

The carry-save row removes one carry chain. The path from y back to y
therefore holds one carry-propagate adder plus a multiplexer. The
multiplexer uses the sign bits of s3 and s2:

- s3 if s3 ≥ 0;
- otherwise s2 if s2 ≥ 0;
- otherwise s1.

The datapath is n_j + 2 bits wide, which holds every value from −2m to 3m.

Timing:

- MSB-first bit planes: after n_j steps, y holds `|Σ_l 2^l Φ(l)|_m`. Φ(l) is
  the table word for bit plane l.
- `first` marks the first step of a frame. In that step the old value is
  replaced by zero, so no separate clear cycle is needed.
- The output is registered.

The encoding of the select signals is this design's own. It is equivalent to
the three-way rule above. The testbench checks every (y, x) pair for m = 29
and m = 32, then 4000 random steps with frame restarts.

## DA tables (`da_rom`)

A single parameterised table serves every filter bank. Its contents are
computed during elaboration from the coefficient parameters:

    word(addr) = | 2^SHIFT · ( Σ_{k<KA} COEF_A[OFF+STRIDE·k]·addr[k]
                             + Σ_{k<KB} COEF_B[OFF+STRIDE·k]·addr[KA+k] ) |_m

The parameters cover the different cases:

- OFF and STRIDE pick one polyphase phase.
- The KA/KB split gives the synthesis tables, which are addressed by â bits
  and d̂ bits at the same time.
- SHIFT gives the pre-scaled tables of the parallel banks.

The table is an `always_comb` read of a constant array, so a synthesis tool
can map it to logic or to ROM.

## Channel architectures

Every channel has the same outside view:

- `load` is the sample strobe. The channel takes a new input pair in that
  cycle.
- `out_valid` is a one-cycle pulse. It marks the cycle in which the output
  pair holds a new result.

The bit-serial channels use the helper `da_bit_ctrl` to sequence a frame of
n_j bit-clock cycles. In each cycle, the MSBs of a shifted copy of the sample
buffer address the tables, and the accumulators take the table words.

| module | structure | tables per band | accumulators | rate | latency (load → out_valid) |
|---|---|---|---|---|---|
| `rns_da_dwt` | analysis, serial | one 2^N-word table each for g and h | 2 | 1 pair / n_j cycles | n_j |
| `rns_da_dwt_poly` | analysis, K polyphase sub-filters | K tables of 2^(N/K) words | 2K | 1 pair / n_j cycles | n_j + ⌈log2 K⌉ |
| `rns_pda_dwt` | analysis, parallel | one table per bit plane (K·n_j), each holding 2^l·Φ | none | 1 pair / cycle | ⌈log2(K·n_j)⌉ |
| `rns_da_idwt` | synthesis, serial | one 2^N-word table for even outputs and one for odd outputs, each addressed by N/2 â bits and N/2 d̂ bits | 2 | 1 pair / n_j cycles | n_j |
| `rns_da_idwt_poly` | synthesis, 4K tables of 2^(N/(2K)) words | separate g and h tables for even and odd outputs | 4K | 1 pair / n_j cycles | n_j + ⌈log2 2K⌉ |
| `rns_pda_idwt` | synthesis, parallel | 2K·n_j tables per output | none | 1 pair / cycle | ⌈log2(2K·n_j)⌉ |

- **Sample buffers.** The analysis buffer holds the N most recent samples,
  newest first: `hist[k] = x(2n−k)`. Each load shifts it by two samples,
  which is the decimation by two. The synthesis buffers hold the N/2 most
  recent â and d̂.
- **Adding partial results.** The polyphase and parallel channels add their
  partial results with `mod_adder_tree`:
  - a binary tree of `mod_adder`s;
  - each `mod_adder` computes a + b and a + b − m side by side and picks one
    by the borrow;
  - there is one register per level, and the inputs are padded with zeros up
    to a power of two.
- **Why the serial synthesis form is preferred.** It groups the even
  coefficients of both synthesis filters into one two-input filter, and the
  odd coefficients into another. It therefore needs only two accumulators,
  where the polyphase form needs four.

Each of these channels runs in its own modulus. The only thing that differs
from modulus to modulus is the table contents.

## Converters

**`b2r_conv`: binary to residue.** It takes a B-bit two's-complement sample.

- The B−1 magnitude bits are cut into 4-bit groups x̄_i.
- A 16-word table maps each group to `|x̄_i · 2^(4i)|_m`.
- The sign bit adds the constant `|−2^(B−1)|_m`.
- A modulo adder tree sums the parts.
- For B = 14 there are four groups plus the sign term, and the latency is
  3 cycles.

**`ecrt_r2b`: scaling residue to binary.** This is the epsilon-CRT form of
the Chinese remainder theorem. The theorem writes X/M as
`Σ_j |r_j·M_j⁻¹|_{m_j} / m_j` modulo 1, where M_j = M/m_j.

- Each term becomes a table of `round(2^n · |r·M_j⁻¹|_{m_j} / m_j)`.
- The terms are added modulo 2^n in an ordinary binary adder. Overflow wraps,
  and that wrap is exactly the "modulo 1".
- The result is `X·2^n/M`, read as a signed n-bit number (n = OUT_W = 16).
- It is not X itself. Each table entry contributes at most ½ unit of rounding
  error, so the error is at most L/2 units.
- The output is registered: one cycle of latency.

The converter therefore returns a scaled result, not the full-precision
integer. The exact residues are also brought out of the top, and the residue
checks in the testbenches use them.

## Top level (`rns_dwt_top`)

`rns_dwt_top` builds one analysis bank and one synthesis bank:

- One `b2r_conv` per modulus for each of the four inputs.
- L channels chosen by `ARCH`:
  - `ARCH_SERIAL` (default): `rns_da_dwt` + `rns_da_idwt`.
  - `ARCH_POLY`: `rns_da_dwt_poly` with K = 2 + `rns_da_idwt_poly` with K = 1.
  - `ARCH_PARALLEL`: `rns_pda_dwt` + `rns_pda_idwt`.
- One `ecrt_r2b` for each of the four outputs.

Timing:

- **A single clock.** The "sample clock" is a one-cycle strobe `sclk` from
  `sclk_gen`. It pulses every RW cycles for the serial architectures and
  every cycle for the parallel one.
- **Inputs.** Present `x_even`, `x_odd`, `a_hat` and `d_hat` in a cycle where
  `sclk` is high.
- **Stalls.** Dropping `en` stops the strobe, which stalls the pipeline
  cleanly.
- **Results.**
  - The residues (`*_res`, `*_res_valid`) appear 4 + (channel latency) cycles
    after the strobe.
  - The binary outputs (`a_out`, `d_out`, `xr_even`, `xr_odd`) appear one
    cycle later.
  - With the defaults that is 9/10 cycles (serial), 10/11 (polyphase) and
    7/8 (parallel) for analysis. For synthesis it is 9/10, 10/11 and 8/9.

Parameters: `MODULI`, `L`, `RW` (bits per residue), `IN_W`, `SYN_W`, `OUT_W`,
`N` and the four coefficient arrays. The moduli must be pairwise coprime and
each must need exactly RW bits. Elaboration stops with an error if either
rule is broken.

**Dynamic range.** The default coefficients sum to at most 3820 in absolute
value. A 14-bit input therefore gives |a|, |d| ≤ 2^13·3820 ≈ 2^24.9, well
inside ±M/2 ≈ ±2^27.7. The synthesis input is 16 bits. Its worst case,
2^15·(Σ|gb_even| + Σ|hb_even|), also fits. The 6-bit set
{64, 63, 61, 59, 55} (RW = 6) works as well.

## Coefficients

The default filters are the 8-tap Daubechies orthogonal pair (four vanishing
moments), scaled by 2^11 and rounded to integers:

    g  = {-22, 67, 63, -383, -57, 1292, 1464, 472}
    h  = {-472, 1464, -1292, -57, 383, 63, -67, -22}
    gb = {472, 1464, 1292, -57, -383, 63, 67, -22}
    hb = {-22, -67, 63, 383, -57, -1292, 1464, -472}

Analysis followed by synthesis reproduces the input delayed by N−1 = 7
samples and multiplied by 2^22 (the coefficient scale twice) and by the two
converter scalings. Any other integer filters can be passed as parameters.
The channels take N = 16 with K = 2, and the testbenches use a 16-tap
Daubechies-8 set in that mode.

## Verification

Every block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs.

| testbench | what it checks |
|---|---|
| `tb_scaled_mod_acc` | every (y, x) pair, then random residues with frame restarts and idle cycles; m = 29 and 32 |
| `tb_mod_adder`, `tb_mod_adder_tree` | every residue pair (m = 31 combinational, m = 25 registered); random vectors through a 5-input tree, including latency |
| `tb_da_rom` | table words against a reference sum, including OFF/STRIDE/SHIFT |
| `tb_rns_da_dwt`, `tb_rns_da_dwt_poly`, `tb_rns_pda_dwt` | 300 random frames, m = 29, 8 taps; values and the exact output cycle |
| `tb_rns_da_idwt`, `tb_rns_da_idwt_poly`, `tb_rns_pda_idwt` | the same for the synthesis channels |
| `tb_dwt16_poly`, `tb_dwt16_par`, `tb_idwt16_poly`, `tb_idwt16_par` | 16 taps, K = 2, m = 61 |
| `tb_b2r_conv`, `tb_ecrt_r2b` | converters against integer models; the epsilon-CRT error bound |
| `tb_sclk_gen` | strobe period and hold while disabled |
| `tb_rns_dwt_top` | all three architectures end to end, 300 pairs each (see below) |
| `tb_rns_dwt_mod6` | serial and parallel tops with 6-bit moduli {64, 63, 61, 59, 55} |
| `tb_rns_dwt_full` | the top with all defaults; 512-sample round trip |

**End-to-end tests.** `tb_rns_dwt_top` and `tb_rns_dwt_mod6` share the
checker `tb_top_harness`. The checker:

- convolves the binary stimulus in integer arithmetic;
- compares every residue output exactly;
- compares the scaled outputs within 4 units;
- checks the latency from the strobe.

It also counts strobes, stalls (`en` low), back-to-back frames, negative
inputs and negative results, and it fails if any of these never occurred.

**Full-size test.** `tb_rns_dwt_full` sends a test signal (two sines and a
step) through analysis. It then feeds the scaled outputs back into synthesis
and requires the reconstruction to match the input within 1 % RMS at a delay
of 7 samples. The measured error is about 0.22 %.

**Running a test.** With plain Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/rns_dwt_pkg.sv \
        tb/tb_rns_dwt_full.sv --top-module tb_rns_dwt_full
    ./obj_dir/Vtb_rns_dwt_full

Verilator finds the other modules by file name through `-I`. `-Wno-fatal` is
needed only because the testbenches carry a `timescale` and the RTL does not.
Any other testbench runs the same way with its own name.

## Departures and open points

- **Filter coefficients.** The reference filter bank does not list its
  coefficients. The Daubechies-4 set above, at 12-bit precision, is an
  assumption.
- **Decision logic of the accumulator.** It is selected from sign bits as
  described above. Only the three-way rule is taken as given.
- **Synthesis sample indexing.** The even and odd outputs use the same â and
  d̂ history (the N/2 newest of each), which matches the analysis equations.
- **Polyphase synthesis.** It uses four accumulators (one per table) and two
  modulo adders.
- **Clocking.** There is one clock with a strobe. No divided clock is used.
- **Reset.** The design uses an asynchronous active-low reset that clears
  the registers. The reference says nothing about reset.
- **Pipeline depths** of the adder trees and converters are this design's
  own: one register per adder level.
- **Synthesis inputs.** The synthesis bank has its own inputs. How the
  analysis outputs would be rescaled between octaves is left open, so the
  octaves are not chained. Only one octave is built.
- **Not built:**
  - the conventional two's-complement DA filter banks, which serve only as a
    comparison;
  - a multi-octave cascade;
  - a full-precision (non-scaling) CRT converter.
