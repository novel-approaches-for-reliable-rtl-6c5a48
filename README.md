# Reliable and efficient circuits: three independent designs

This repository holds synthesizable SystemVerilog for three unrelated circuits. A single top
level, `thesis_circuits_top`, places them side by side; they share no signals.

1. **Adaptive multi-path BCH decoder.** It protects DRAM stacked on a processor, where hot
   spots make some regions far more error-prone than others. Each 511-bit codeword of the binary
   (511,448) BCH code, which corrects up to 7 errors, is sent to the cheapest decoder that can
   handle the errors expected from its region's temperature.
2. **NULL Convention Logic (NCL) adder pipeline.** This is a clockless, dual-rail, 4-bit
   ripple-carry adder between two delay-insensitive registers. It is the circuit on which
   gate-diffusion-input (GDI), hybrid CMOS/GDI and "GNCL" transistor realisations are compared.
3. **EQSNG stochastic edge detector.** It does Roberts-cross edge detection in stochastic
   computing, with quasi-random (Sobol) number generators. It stops as soon as the output is
   accurate enough, which saves energy.

All three designs pass their own testbenches, and each testbench was also shown to fail against
a deliberately broken copy of its module. Everything runs with plain Verilator 5 (see
[Simulating](#simulating)).

---

## 1. Adaptive multi-path BCH decoder

### Idea

A full 7-error BCH decoder is slow and large. Most words, however, come from cool regions and
carry few or no errors. The decoder therefore has:

- An **n_EEB estimator** (`neeb_estimator`). It turns the temperature reading of the word's DRAM
  region into an *estimated number of error bits*, n_EEB, between 0 and 8 (8 meaning "more than
  7").
- **Four decoding paths** BCH1..BCH4 (`bch_path`, T = 1, 3, 5, 7). They decode the *same*
  (511,448) code but stop looking for errors after T of them, so the smaller paths are much
  cheaper.
- A **dispatcher** (`bch_path_dispatcher`). It gives each word the idle path with the smallest
  T ≥ n_EEB. If that path is busy, the word goes to the next stronger idle path. If none is
  idle, the word waits in a **storage buffer** (`bch_storage_buffer`, a FIFO of `SIZE_BUF`
  words).
- A **bypass** for two cases:
  - Words with n_EEB = 0 need no decoding and are returned unchanged in the next cycle
    (`out_path = 0`).
  - Words with n_EEB > 7 cannot be corrected. They are returned unchanged with `out_fail = 1`
    (`out_path = 7`).

### Inside one path (`bch_path`)

Each path works bit-serially on a 511-bit register, in this order:

| Stage | Module | Work | Cycles |
|---|---|---|---|
| Syndromes | `bch_syndrome` | Horner's rule, bit r₅₁₀ first. Only the odd syndromes are accumulated; even ones are squares (s₂ⱼ = sⱼ²) | 511 |
| Key equation, T = 1 and 3 | `bch_elp_peterson` | Closed-form Peterson solution: Λ₁ = s₁, Λ₂ = (s₁²s₃ + s₅)/(s₁³ + s₃), Λ₃ = (s₁³ + s₃) + s₁Λ₂ | 1 |
| Key equation, T = 5 and 7 | `bch_elp_sibm` | Simplified inversionless Berlekamp–Massey for binary codes, one iteration per cycle | T |
| Chien search | `bch_chien` | Evaluates Λ at α⁰, α¹, … by Horner's rule. A zero at αᶜ flips bit (511 − c) mod 511 | 511 |

- If all syndromes are zero, the path skips the last two stages.
- Cycle counts from `start` to `done` are:
  - 513 for an error-free word;
  - 1026 for the Peterson paths;
  - 1026 + T for the SiBM paths.
- If the Chien search finds a different number of roots than the degree of Λ, the word had more
  errors than the path can correct. The path then raises `fail` and returns the word as
  received. Because of the dispatch rule, this only happens when the temperature estimate was
  too low.

The Galois field GF(2⁹) is generated by x⁹ + x⁴ + 1 (`gf9_pkg`). This is this implementation's
choice; any primitive polynomial of degree 9 gives an equivalent code. The code's generator
polynomial is the product of the minimal polynomials of α¹, α³, …, α¹³. The testbench package
computes it and uses it to encode test words.

### Decoder interface (`adaptive_bch_decoder`)

- **Input:** `in_valid`/`in_ready` with the received word, a caller-chosen `in_tag` and the
  region's temperature `in_temp`. `in_ready` drops when the word would need the storage buffer
  and the buffer is full.
- **Output:** `out_valid`/`out_ready`. Results can leave out of order, so each carries its tag
  together with:
  - the corrected word and its 448 data bits (the top bits of the systematic codeword);
  - the path used, the number of bits corrected, the n_EEB estimate and the failure flag.

  When several results are ready at once, priority is the bypass first, then BCH1..BCH4.
- **Configuration:** `cfg_we`/`cfg_idx`/`cfg_thr` rewrite the eight temperature thresholds of the
  estimator. n_EEB is the number of thresholds the temperature reaches. The reset values are
  50, 60, 70, 80, 85, 90, 95 and 100.

### Where this departs from the original design

- **Estimator.** The original estimates a bit-error probability from temperature and derives
  n_EEB for a chosen confidence level, but gives no formulas. Here that whole mapping is a
  programmable threshold table: software computes the thresholds for the desired confidence.
- **SiBM structure.** The original uses a processing-element array for SiBM. Here the same
  recursion runs serially, one iteration per clock. The resulting Λ is a nonzero multiple of the
  true locator, which has the same roots.
- **Timing.** The original reports latencies in nanoseconds from an FPGA prototype. This RTL is
  bit-serial, so the paths differ only in the key-equation stage. No clock period is implied.
- **This implementation's own choices:** the tags, the output arbitration, the valid/ready
  handshakes and the FIFO order of the buffer.

### Serial decoding at fixed bit-error probabilities (`tb_bch_serial_workload`)

This testbench decodes words one at a time, 100 words for each bit-error probability. Error
counts are binomial over 511 bits, and n_EEB equals the true count. For one seed:

| p_BE | bypass | BCH1 | BCH2 | BCH3 | BCH4 | flagged | average latency (cycles) |
|---|---|---|---|---|---|---|---|
| 0.04    | 0  | 0  | 0  | 0 | 0 | 100 | 1   |
| 0.004   | 19 | 27 | 44 | 9 | 1 | 0   | 832 |
| 0.0004  | 76 | 22 | 2  | 0 | 0 | 0   | 247 |
| 0.00004 | 98 | 2  | 0  | 0 | 0 | 0   | 22  |

Both extremes decode almost nothing:

- **At 0.04** nearly every word has more than 7 errors and is flagged in one cycle.
- **At 0.00004** nearly every word is clean and takes the bypass.

The hotspot-like 0.004 case is about three to four times slower on average than 0.0004, the
rate of regions outside hotspots.

### Parallel decoding under hotspot traffic (`tb_bch_parallel_workload`)

This testbench runs the decoder with storage buffers of 4, 8 and 16 words. Each buffer size
gets nine traffic mixes:

- **Bit-error probabilities, hot/cold:** 0.003/0.002, 0.009/0.002 and 0.011/0.005.
- **Share of hot words:** 40 %, 60 % or 80 %.
- **Words per mix:** 100, each with a binomially drawn error count.
- **Input rate:** back to back. Input stalls only while the decoder refuses a word.
- **Sensors:** modelled as exact, so n_EEB equals the true error count.

Every result is checked. Average latency, in clock cycles from acceptance to result, for one
seed:

| p_hot/p_cold | buffer | 40/60 | 60/40 | 80/20 |
|---|---|---|---|---|
| 0.003/0.002 | 4  | 1452 | 1461 | 1483 |
| 0.009/0.002 | 4  | 1648 | 1640 | 2073 |
| 0.011/0.005 | 4  | 1866 | 1970 | 2042 |
| 0.003/0.002 | 8  | 1978 | 2275 | 2131 |
| 0.009/0.002 | 8  | 2154 | 2621 | 2932 |
| 0.011/0.005 | 8  | 3127 | 3023 | 2953 |
| 0.003/0.002 | 16 | 3335 | 3449 | 3552 |
| 0.009/0.002 | 16 | 3567 | 3858 | 5101 |
| 0.011/0.005 | 16 | 5369 | 4905 | 4688 |

How to read these numbers:

- **Hot traffic is slower.** More hot words and higher error probabilities raise the latency,
  as in the original study. With 100 words per mix the sampling noise is a few hundred cycles.
- **Bigger buffers look slower here, for a reason the original does not share.** Every path is
  bit-serial and takes over 1000 cycles, while words arrive back to back, so the buffer is almost
  always full. A deeper buffer therefore only adds waiting time after acceptance.
- **The original's figures are not comparable.** It reports about 16 to 30 ns, with larger buffers mostly a little
  faster. Those figures came from a separate cycle-level model with far
  shorter path latencies, not from RTL.

---

## 2. NCL adder pipeline

### NULL Convention Logic in brief

- Every bit is a pair of rails `{rail1, rail0}`: `01` is DATA0, `10` is DATA1, `00` is NULL.
- DATA and NULL wavefronts alternate, so a receiver knows a result is complete when every bit has
  left NULL. No clock is needed.
- The building block is the **threshold gate** THmn (`ncl_th_gate`):
  - Its output rises once the weighted number of high inputs reaches m.
  - It then *holds* until every input is low: Z = set + Z′·(any input).
  - Weighted versions such as TH34w2 count input 0 twice.
- `ncl_th24comp` is the TH24comp gate, with set = (A + B)(C + D). The adder does not use it,
  so the top level brings one out on its own ports (`th24_a`, `th24_z`).

In RTL each gate is a level-sensitive latch with an asynchronous reset to NULL. The GDI, hybrid
and GNCL circuits compared in the original work are transistor-level realisations of this same
logic function. They are not modelled here, and neither are the regenerative buffers.

### Structure

```
 a,b,ci ─► [ncl_di_register] ─► ncl_rca (4 × ncl_full_adder) ─► [ncl_di_register] ─► s,co
     ko ◄── ncl_completion                    ncl_completion ◄──┘  ◄── ki
```

- **`ncl_full_adder`**
  - The carry rails come from two TH23 gates (majority).
  - Each sum rail is a TH34w2 gate. Its weight-2 input is the carry rail of the *opposite*
    polarity; its other three inputs are the input rails of the sum's own polarity.
  - The adder is input-complete: the sum is DATA only after all three inputs are DATA.
- **`ncl_di_register`**
  - Each rail passes through a TH22 gate together with the request `ki`. With ki = 1 a DATA
    wavefront passes and is held; with ki = 0 a NULL wavefront passes.
  - Each bit reports `ko = NOR(rails)`.
- **`ncl_completion`** combines the `ko` bits into one request, using a tree of TH44 gates and a
  final THgg gate. It rises only when every bit is NULL and falls only when every bit is DATA.
- **`ncl_rca_pipeline`** wires these together.
  - A sender presents DATA while `ko = 1` and NULL while `ko = 0`.
  - A receiver sets `ki = 1` to request DATA and `ki = 0` to request NULL.
  - With a slow receiver the pipeline holds one result at its output and the next operand set at
    its input.

Tools report the handshake ring as a combinational loop (Verilator's UNOPTFLAT). This is
inherent to clockless logic and is not an error.

---

## 3. EQSNG stochastic edge detector

### Idea

- In stochastic computing a value p/256 is a bit stream with that density of ones.
- If all pixel streams are generated from the *same* random number, they are maximally
  correlated. An XOR of two such streams then computes |a − b|.
- The Roberts-cross edge value ½(|p₀₀ − p₁₁| + |p₀₁ − p₁₀|) is therefore two XOR gates and a
  multiplexer driven by a 0.5-density select stream (`sc_roberts_cross`).
- Quasi-random (Sobol) numbers make the ones count converge much faster than LFSR numbers. The
  run can therefore stop after a handful of cycles once the image is good enough. Energy is power
  × cycles.

### Data path (`eqsng_edge_detector`)

| Block | Module | Function |
|---|---|---|
| Direction-vector RAM | `qsng_direction_ram` | 2 dimensions × 8 vectors × 8 bits, writable. Reset holds Sobol dimension 0 (vₖ = 2⁸⁻ᵏ) and dimension 1 (vₖ = mₖ·2⁸⁻ᵏ, mₖ = 1, 3, 5, 15, 17, 51, 85, 255) |
| LD generator | `qsng_ld_generator` | 8-bit counter X. Each bit Xₖ gates vector Vₖ (AND), and the gated vectors are XORed into the low-discrepancy number. Dimension 0 visits every value once per 256 cycles |
| Comparators | inside the detector | Stream bit = (LD number < pixel). All four pixels use dimension 0; the select stream is dimension 1 < 128 |
| Roberts cross | `sc_roberts_cross` | `z = sel ? x00^x11 : x01^x10` |
| Stochastic to binary | `sc_to_binary` | Counts the ones of `z` |
| Run control | `eqsng_controller` | See the sequence below |

The controller's sequence:

1. `start` latches the power figure.
2. The counters are cleared.
3. One stream cycle runs at a time until `target_met` is high (and at least one cycle has run),
   or until `max_cycles` is reached.
4. At the end the controller reports `cycles`, `energy = power × cycles` and `hit_limit`.

After a run, `ones / cycles` estimates the edge value ÷ 256. After a full 256-cycle run, `ones`
is within a few counts of the exact ½(|p₀₀ − p₁₁| + |p₀₁ − p₁₀|).

### Where this departs from the original design

- **Accuracy verdict.** The original judges accuracy by computing the PSNR of the whole output
  image in software. Here that verdict enters as the input `target_met`; nothing computes PSNR in
  hardware.
- **Cycle limit.** `max_cycles` is an addition, so that an unreachable target still ends the run.
- **Window size.** The detector handles one 2×2 window per run. A full image needs it repeated or
  replicated.
- **Vector values.** The Sobol direction vectors are standard values chosen here; the original
  does not list its own.

---

## Parameters (defaults)

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `adaptive_bch_decoder` | `SIZE_BUF` | 4 | Storage buffer depth. Sizes 8 and 16 were also studied; set the parameter to use them |
| | `TAG_W`, `TEMP_W` | 8, 8 | Tag and temperature widths (own choice) |
| `bch_path` | `T` | 7 | Errors corrected (1, 3, 5, 7 inside the decoder) |
| `ncl_rca_pipeline`, `ncl_rca` | `WIDTH` | 4 | Adder width |
| `eqsng_edge_detector` | `NB` | 8 | Pixel and LD-number width (streams of 2⁸ bits) |
| | `PW` | 16 | Width of the power figure (own choice) |

## What is not here

- The temperature sensors, the DRAM and the BCH encoder appear only as ports or inside
  testbenches.
- The NCL up-counter increment circuits, multipliers and ALU are not included: their gate
  structure was not available.
- The GDI and transistor-level cells are not RTL.
- PSNR computation is not part of the hardware.

---

## Simulating

Each testbench in `tb/` is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/gf9_pkg.sv tb/bch_tb_pkg.sv --top-module tb_thesis_circuits_top tb/tb_thesis_circuits_top.sv
./obj_dir/Vtb_thesis_circuits_top
```

Omit `tb/bch_tb_pkg.sv` for testbenches that do not decode BCH words.

**Main testbenches**

- **`tb_thesis_circuits_top`** runs all three designs at full size and at the same time.
  - It counts every mechanism and fails if one never occurs: bypass, uncorrectable word, each
    path, stronger-path fallback, buffer use, input refusal, parallel decoding, DATA/NULL
    wavefronts, two operand sets in flight, EQSNG early stop and cycle limit.
  - Among the EQSNG runs are the cycle counts of the original evaluation (4 to 80 cycles).
- **`tb_adaptive_bch_decoder`** checks, besides random traffic, the isolated-word latency
  (1025 clock edges from acceptance to result on BCH1) and the bypass latency (one cycle).
- **`tb_bch_path`** checks the exact cycle counts listed above.
- **`tb_bch_serial_workload`** runs the fixed-probability serial decoding (see the table above).
- **`tb_bch_parallel_workload`** runs the hotspot traffic mixes at buffer sizes 4, 8 and 16
  (see the table above).

**Reference models.** The BCH reference model (`bch_tb_pkg`) uses log/antilog tables and its own
generator polynomial, independent of the RTL's arithmetic.

**Simulator pitfall.** When driving the asynchronous NCL pipeline, give every handshake step a
nonzero delay. Zero-delay (`#0`) changes of the inputs can leave Verilator's scheduler with stale
values in the combinational loop.
