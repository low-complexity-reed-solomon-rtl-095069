# Multi-mode Reed-Solomon codec, GF(2^8), n ≤ 255, t ≤ 8

This RTL encodes and decodes Reed-Solomon codes over GF(2^8). The code can change from one codeword to the next: any length n up to 255 symbols, and any correction capability t from 1 to 8, with k = n − 2t message symbols. It covers the usual storage and transmission codes, including (255,239,8) for STM-16/OC-192, (204,188,8) for DVB, (208,192,8) and (182,172,5) for DVD, (32,28,2) and (28,24,2) for CD, and (72,64,4) for HDD. It also covers the variable-length codes of CCSDS and xDSL.

The decoder accepts and produces one 8-bit symbol per clock. It is built around three ideas that keep it small:

* **One array of 16 constant-multiplier cells** serves as both the encoder and the syndrome calculator. A thermometer decoder switches on only the 2t cells a mode needs.
* **A serial key-equation solver.** This is an inversionless Berlekamp–Massey solver that computes one coefficient per clock with three general multipliers. The discrepancy and the update decision are retimed, so no path is longer than one multiply and one add. The same multiplier then computes the error evaluator.
* **A shortened-code compensator inside the solver.** Two multipliers scale each output coefficient by (α^io)^j, where io = 255 − n. The Chien search can then start directly at the first received symbol of a shortened word.

The design follows a published multi-mode codec architecture (a master's thesis on low-complexity RS codecs). The section "Where this RTL departs from the original design" lists what differs.

## Code conventions

* Field: GF(2^8) with primitive polynomial p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D) and α = 2.
* Generator: g(x) = ∏_{i=0}^{2t−1} (x + α^i). The first consecutive root is α^0 (b = 0).
* Syndromes: S_i = R(α^i) for i = 0..2t−1.
* Forney: with b = 0, the error value is simply e = Ω(X⁻¹) / Λ_odd(X⁻¹). Λ_odd is the sum of the odd-degree terms of Λ.
* Codewords are systematic and sent highest power first. The k message symbols come first, then the 2t parity symbols. Symbol p of the stream (p = 0..n−1) is the coefficient of x^(n−1−p).
* A shortened code (n < 255) is the full-length code with 255 − n leading zero symbols that are never sent.

## Block structure

```
              rs_codec_top
 tx ──► rs_encoder ──► rs_noise_model ──► rs_decoder ──► data_out
        (rs_enc_sc,       (self-test          │
         t_decoder)        channel)           ├─ rs_enc_sc (syndrome mode) ─► syndrome bank
                                              ├─ rs_kes  (+ rs_compensator)
                                              ├─ rs_csee
                                              └─ rs_rx_buffer (received symbols)
```

| file | role |
|---|---|
| `rtl/rs_pkg.sv` | field constants and functions: multiply, square, inverse (a^254), α^e, mode check |
| `rtl/t_decoder.sv` | t → enable lines t1..t8 (`~(all-ones << t)`) |
| `rtl/rs_enc_sc.sv` | the 16 α^i cells, in encoder or syndrome mode, plus the syndrome bank |
| `rtl/rs_encoder.sv` | encoder: symbol counter, message/parity multiplexer, valid/ready |
| `rtl/rs_kes.sv` | serial key-equation solver |
| `rtl/rs_compensator.sv` | (α^io)^j scaling with two multipliers |
| `rtl/rs_csee.sv` | Chien search and Forney evaluator |
| `rtl/rs_rx_buffer.sv` | circular buffer holding received symbols until corrected |
| `rtl/rs_decoder.sv` | receive controller and the three pipeline stages |
| `rtl/rs_noise_model.sv` | random symbol-error injector, at most t errors per word |
| `rtl/rs_codec_top.sv` | encoder → noise model → decoder |

## The shared α^i cell array (`rs_enc_sc`)

Cell i (i = 0..15) holds one register r_i and multiplies it by the constant α^i. The constants are 1, 2, 4, …, 38. Line k of the t-decoder, ANDed with the "symbol this cycle" strobe, enables cells 2k−2 and 2k−1. A mode with capability t therefore uses cells 0..2t−1.

**Syndrome mode.** Each cell runs Horner's rule, r_i ← α^i·r_i + rx. After n symbols, r_i = S_i. On the last symbol the results go into the syndrome bank, so the cells can start on the next word in the following cycle.

**Encoder mode.** The encoder uses the factored form of the generator. Dividing by g(x) is the same as passing the message through 2t first-order stages 1/(1 + α^i z⁻¹). In this array, the products α^l·r_l are summed by a chain of adders, and cell i stores out + Σ_{l≤i} α^l r_l.

* **Message phase.** The message symbol goes straight to the output.
* **Parity phase.** The sum of all 2t products is output as the next parity symbol. This parity symbol drives the cascade back toward zero. After 2t parity symbols the word is a multiple of g(x) and the cells are clear.

The encoder needs no g(x) taps, so any t works with the same constant multipliers. The price is a long adder chain: its critical path grows with 2t.

A codeword may follow the previous one with no gap. The `first` strobe makes the cells act as if they were clear.

## The serial key-equation solver (`rs_kes`)

The solver finds a scalar multiple of the error locator Λ(x) and the evaluator Ω(x) = Λ(x)S(x) mod x^2t. It is the hardest part of the design. The steps below follow the RTL.

**Recurrence.** There are 2t iterations, i = 1..2t. Iteration i runs steps j = 0, 1, …, J_i with J_i = max(δ_i, 1). Here δ_i is the degree after iteration i, clamped to 8. Each step computes one coefficient:

```
Λ_j^(i) = Δc · Λ_j^(i−1)  +  Δ^(i−1) · C_{j−1}^(i−1)        (two multipliers)
```

Δc is the last nonzero discrepancy and C is the correction polynomial. No division is used.

**Discrepancy one cycle late.** The next discrepancy is Δ^(i) = Σ_j Λ_j^(i) S_{i−j}. A third multiplier computes it from a *registered* copy of Λ_j^(i) and a registered syndrome select. The select starts at i and counts down with j. So the product of coefficient j is added during step j+1. The partial sum is cleared at j = 1.

The last product, for Λ_{J}, falls into step j = 0 of the next iteration. That step needs no discrepancy, because C_{−1} = 0. Δ^(i−1) is therefore in its register by j = 1.

**Decision at j = 1.** The Berlekamp–Massey decision is

```
keep = (Δ^(i−1) = 0)  or  (i ≤ 2·δ_{i−1})
δ_i  = keep ? δ_{i−1} : i − δ_{i−1}
```

It is formed at step j = 1, not j = 0. That keeps the comparison out of the multiplier path. The step count follows from it:

* J_i depends on δ_i, so step j = 0 is never the last step of an iteration.
* The pair {j, δ} = {1, 0} ends an iteration.
* Every iteration takes J_i + 1 cycles. Over all 2t iterations that is at most 2t(t+1) cycles.

**Storage.** Two register arrays of 9 symbols hold Λ and x·C. x·C is stored one place up, so that address j returns C_{j−1}. A role bit says which array holds Λ. No coefficient is written at j = 0. From j = 1 on, each new Λ_j goes to one of the two arrays, depending on the decision:

* **keep.** Λ^(i) is written back into the Λ array. At the end of the iteration the C array is shifted up one place, giving C ← x·C.
* **update** (C ← Λ^(i−1)). Λ^(i) is written into the old C array. The untouched old Λ array is shifted up and becomes the new x·C, the role bit flips, and Δc ← Δ^(i−1).

Writing Λ_j into the C array is safe for two reasons. Address j of that array is read in the same cycle it is written. Addresses above J already hold zeros, because deg C^(i−1) ≤ i − δ_{i−1} = δ_i.

**Ω phase.** After iteration 2t, Ω_k = Σ_{q≤k} Λ_q S_{k−q} for k = 0..δ−1. This reuses the discrepancy multiplier and the syndrome select. Row k visits q = 0..k, one product per cycle. The compensator scales Λ_k when row k starts and Ω_{k−1} when that row completes. The power (α^io)^k advances once per row. This phase takes δ(δ+1)/2 + 2 cycles, or 1 cycle when δ = 0.

**Cycle count.** From the start cycle to `out_valid`:

```
cycles = 1 + Σ_{i=1}^{2t} (max(δ_i,1) + 1) + (δ(δ+1)/2 + 2)
```

When all syndromes are zero, the iterations are skipped (`noerr_o`) and the count is 2. For t = 8 with 8 errors this is about 130 cycles, and never more than 183. A 255-symbol word therefore hides the solver completely.

**Failure flag.** `fail_o` is set when the final degree exceeds t.

## Chien search and Forney (`rs_csee`)

The solver delivers Λ_j·(α^io)^j and Ω_j·(α^io)^j. Each term register is multiplied by α^j every cycle. Cycle p therefore evaluates Λ(x) and Λ_odd(x) at x = α^(io+1+p) = α^−(n−1−p). That point is the inverse locator of stream position p, so the first received symbol is tested first and no cycles are spent on the shortened-away positions. The Ω term registers start one cycle late, so Ω is evaluated at the same point one cycle later. Three registers follow, so that each path holds only one slow element:

1. The zero test of Λ and the sum Λ_odd are registered.
2. inv(Λ_odd) and Ω of the same position are registered. The inverse is a combinational a^254 circuit.
3. e = Ω·inv(Λ_odd) is registered, or 0 at non-roots.

The first error value appears 4 cycles after the load. The block is busy for n cycles and takes the next load one cycle later.

At the end of the word the block gives a verdict. The word is uncorrectable if the solver flagged it, if the number of roots differs from deg Λ, or if Λ_odd is zero at a root. An uncorrectable word passes through unchanged, with `out_fail` on its last symbol.

## Receive controller, pipeline and stalls (`rs_decoder`)

The three stages work on three codewords at once:

* the syndrome cells on word w+2;
* the solver on word w+1;
* the Chien/Forney block on word w.

Received symbols wait in `rs_rx_buffer`, a 1024-entry circular buffer. At most 3·255 symbols are ever in flight. Each symbol leaves the buffer XORed with its error value.

The controller counts symbols and samples (n, t) with the first symbol of each word. On the last symbol it fills the syndrome bank and stores n, t and α^(255−n) with the bank. The solver starts one cycle later.

The bank stays busy until the solver hands its result to the Chien block. If the next word reaches its last symbol before then, `in_ready` drops and that symbol waits (`stall_o`). This happens when n is small compared with the solver time, for example a 24-symbol word with t = 8. It also happens when the Chien block is still busy.

The Chien block needs n+1 cycles per word, so the sustained rate is n symbols per n+1 cycles. For (255,239,8), forty back-to-back words pass in 10624 cycles, first message symbol to last corrected symbol. The original three-stage design quotes 10751 cycles for the same forty words.

If the last input symbol of a word is in cycle c, the solver starts in cycle c+1 and its first output symbol comes out in cycle c + K + 4, where K is the solver cycle count given above, provided the Chien block is free.

## Self-test channel (`rs_noise_model`, `rs_codec_top`)

The top chains encoder, noise model and decoder. The noise model corrupts a symbol (XOR with `rand_val`) when all of these hold:

* it is enabled;
* `rand_loc` equals the `snr` setting;
* fewer than t errors have been put into the current word.

With 5-bit values and an external random source, each symbol is hit with probability 1/32. That is about 8 per 255-symbol word, capped at t. The random generators are outside the top, so a testbench or an LFSR can drive them.

## Interfaces and timing

* **Top, message side.** `tx_valid`/`tx_ready`/`tx_data`. The encoder holds `tx_ready` low during the 2t parity cycles.
* **Mode.** `n_i` and `t_i` are sampled with the first message symbol of each codeword. They must stay constant while that codeword's message is being offered, because the decoder samples them when the same symbol reaches it. Assertions check that every sampled mode is codable: 1 ≤ t ≤ 8 and 2t < n ≤ 255.
* **Output.** `out_valid`, `data_out`, `out_sop`, `out_eop`, `out_fail` and `out_corr` run for n consecutive cycles per word, with no back-pressure.
* **Observation.** `enc_*`, `noise_err` and `noise_count` show the channel. `stall_o` and `kes_skip_o` show the decoder's stalls and solver skips.
* **Reset.** Asynchronous, active-low reset on every register. The assertions sit inside the clocked blocks, so they are not evaluated during reset.

Parameters, with defaults: `TM = 8` (largest t; the cell array has 2·TM cells), `DEPTH = 1024` (receive buffer), `LW = 5` (width of the SNR and location values).

## Verification

Each block has a self-checking testbench in `tb/`. The testbenches compare against `tb/rs_ref_pkg.sv`, a reference model written independently of the RTL. It provides:

* a bit-serial field multiplier;
* g(x) in expanded form and a long-division encoder, which for t = 8 gives the widely published (255,239) generator with coefficients 1, 59, 13, 104, …, 36, 59;
* Horner syndromes;
* Berlekamp–Massey with division.

| testbench | what it shows |
|---|---|
| `tb_t_decoder` | all t = 0..8 |
| `tb_rs_enc_sc` | syndromes and parity for 60 + 60 random words of random (n, t), with idle cycles |
| `tb_rs_encoder` | random modes under back-pressure; exactly n cycles per word back to back across mode changes |
| `tb_rs_compensator` | (α^io)^k sequences for random n |
| `tb_rs_kes` | Λ and Ω up to a common scale, degree, fail and skip flags, and the exact cycle count against the formula above and the 2t(t+1) + δ(δ+1)/2 bound (see the list below) |
| `tb_rs_csee` | error values per position, first/last flags, 4-cycle latency, n-cycle busy time, and all three failure verdicts |
| `tb_rs_rx_buffer` | random traffic against a queue, including full and wrap |
| `tb_rs_noise_model` | cycle-exact gate model, the at-most-t limit, and a hit rate near 1/32 |
| `tb_rs_decoder` | 60 words over 14 modes, with corrections, stalls and skips |
| `tb_rs_codec_top` | full size, default parameters, described in the paragraph below |

`tb_rs_kes` runs the seven special words of the original verification plan:

* eight errors;
* four errors chosen so that S_0 = S_1 = 0;
* no error;
* eight errors of value 1;
* two equal errors;
* two errors;
* one error.

It also runs 300 random cases over n and t, and 20 syndrome sets with degree above t.

`tb_rs_codec_top` runs two phases, and the end-to-end checks cover both:

* **Phase 1.** 40 × (255,239,8) with the noise model on at SNR 11111. It checks the total cycle count against 10751 and that no stall occurs.
* **Phase 2.** 160 words cycling through the application modes, including random CCSDS and xDSL lengths and short t = 8 words.
* **Checks.** Every channel symbol is compared with the reference encoder, and every decoded symbol with the transmitted word. Stalls, solver skips, mode switches, shortened codes, injections and corrections are each counted, and the test fails if any of them never happens.

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog. To run one with plain Verilator:

```
verilator --binary --timing --top-module tb_rs_codec_top \
    rtl/rs_pkg.sv tb/rs_ref_pkg.sv rtl/t_decoder.sv rtl/rs_enc_sc.sv \
    rtl/rs_encoder.sv rtl/rs_noise_model.sv rtl/rs_compensator.sv rtl/rs_kes.sv \
    rtl/rs_csee.sv rtl/rs_rx_buffer.sv rtl/rs_decoder.sv rtl/rs_codec_top.sv \
    tb/tb_rs_codec_top.sv
./obj_dir/Vtb_rs_codec_top
```

For a smaller testbench, list `rs_pkg.sv`, `rs_ref_pkg.sv`, the modules under test and the testbench. All testbenches run in seconds.

## Where this RTL departs from the original design

* **Solver storage.** The original keeps Λ and C in registers addressed per step. A data-stream controller re-routes C so that the decision can come late. Here the same effect comes from two arrays that swap roles plus the pre-shifted x·C. The arithmetic, the schedule and the cycle count per iteration are the same.
* **Compensation timing.** Λ_j is scaled during the Ω phase, row by row, not as each coefficient first becomes valid. Total solver time is δ(δ+1)/2 + 2 cycles after the last iteration, not δ(δ+1)/2.
* **Chien/Forney pipeline.** The original places three registers and evaluates Ω one cycle after the root test, as here, but the exact cut points are this design's own. The inverse is a combinational a^254 circuit, not a table.
* **Receive memory.** The original shows two SRAMs with a memory controller. Here one register-array FIFO is used, sized for three words.
* **Handshakes, stall policy, failure verdicts.** Valid/ready on the inputs, holding the last symbol while the syndrome bank is occupied, the root-count and Λ_odd = 0 checks, and passing failed words uncorrected are this design's own choices. The original streams one symbol per clock and mentions only a decode-fail counter.
* **Not built.**
  * The single-mode LFSR encoder with g(x) taps. The original discusses it only as a baseline; its taps survive in the reference model.
  * The random generators of the noise model.
  * FPGA and ASIC results: 11,597 gates and 1.37 ns (730 MHz, 5.84 Gb/s) in 0.18 µm for the original decoder. This RTL has not been mapped to a library, so neither gate count nor clock rate is claimed. The encoder's adder chain and the Chien block's 9-term sum, followed by the zero test, are the likely long paths.
* **Modes.** CCSDS lengths n = 15 and 16 with t = 8 leave no message symbols and cannot be coded. All other listed application modes fit the default parameters.
