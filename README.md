# Opportunistic-write STT-MRAM cache with Lazy ECC

STT-MRAM cells switch stochastically: most bits of a word flip within a few
nanoseconds, but the slowest anti-parallel transitions have a long tail. A
conventional STT-MRAM cache sizes its write pulse for that tail (about 11.6 ns
for a 64-bit word at a 10^-18 word error rate), which makes it far too slow for
an L1 cache. This design instead **cuts the write pulse short** (an
*opportunistic write*, 3.63 ns) and lets a strong BCH code absorb the few bits
that did not finish switching, together with the extra retention failures of
cells built with a low thermal stability factor.

Strong BCH codes are slow to decode (about 10 cycles at 2 GHz for four-error
correction), which would undo the gain on every read. The central idea is that
**detecting** an error is much faster than **correcting** it (one cycle versus
ten). So on a read the raw, unchecked data goes to the processor at once, and
in parallel a one-cycle detector checks it. Only if the detector finds an
error is the word thrown out of the pipeline, corrected, written back and
fetched again. This is called *Lazy ECC*. Since errors are rare, the average
read latency is almost the bare array read time.

Errors grow exponentially with temperature (retention failures), and every
error costs a long recovery. Above a threshold temperature (80 °C for the cell
parameters used here) the design therefore switches to *conventional ECC*:
every read waits for the full decoder and is delivered checked.

The RTL models the data memory of a 16 KB L1 instruction cache built this
way, with the processor's first fetch stage that takes and reverts the
speculative words.

## Block structure

```
                 temp_i (on-chip thermal sensor)
                    |
            +----------------+
            |ecc_mode_selector|-- mode (Lazy / conventional) --+
            +----------------+                                 |
                                                               v
 req_* -->+-------------------------------------------------------------+
          | lazy_ecc_controller                                         |
          |   bch_encoder --------> write data                          |
          |   bch_detector  (syndromes, 1 cycle)                        |
          |   bch_corrector (Berlekamp-Massey + Chien, 9 cycles)        |
          |   sequencer: read / check / correct / write back / refetch  |
          +-------------------------------------------------------------+
               | mem_*                         | rsp_*, chk, revert
               v                               v
       +----------------+            +--------------------+
       | stt_mram_array |            | fetch_revert_stage |--> s2_* (pipeline stage 2)
       | 2048 x 92 bits |            +--------------------+
       +----------------+
        ^ wr_fail_mask_i, ret_* (cell physics: unfinished writes, retention flips)
```

| Module | Role |
|---|---|
| `lazy_ecc_pkg` | field constants, GF(2^7) multiply, generator-polynomial construction, `ecc_mode_e` |
| `bch_encoder` | systematic BCH encoder, combinational |
| `bch_detector` | decoder stage 1: syndromes and error flag, one register stage |
| `bch_corrector` | decoder stage 2: error locator, error positions, correction |
| `stt_mram_array` | the data array with read/write latencies and fault inputs |
| `ecc_mode_selector` | temperature threshold, Lazy or conventional mode |
| `lazy_ecc_controller` | contains the three ECC blocks, sequences every access |
| `fetch_revert_stage` | first processor pipeline stage: squash on revert, NOP insertion |
| `lazy_ecc_icache_top` | connects all of the above |

## The code

A binary BCH code over GF(2^7) (field polynomial x^7 + x^3 + 1), shortened to
protect a 64-bit word. Correcting `T` errors takes `7*T` parity bits. The
default is `T = 4`, giving a 92-bit codeword. The generator polynomial is the
product of the minimal polynomials of α, α^3, α^5 and α^7. It is computed at
elaboration time (`bch_gen_poly`); for T = 1..4 it is 0x89, 0x4377, 0x26D9E3
and 0x1C9C26B9. Codeword bit *i* is the coefficient of x^i. Bits `[P-1:0]`
are parity and bits `[P+63:P]` are the data, so the unchecked data can be taken
straight from the array output.

* **Encoder.** Parity = d(x)·x^P mod g(x). This is linear in the data, so
  the remainder of x^(P+k) is tabulated for each data bit k at elaboration, and
  the remainders of the set bits are XORed together.
* **Detector.** S_j = c(α^j) for odd j is an XOR of constants. The even
  syndromes are squares: S_2j = S_j². Any non-zero odd syndrome means an error.
  The result is registered, so the verdict comes exactly one cycle after the
  data.
* **Corrector.** Inversionless Berlekamp–Massey, one iteration per clock for
  2T clocks. Then a fully parallel Chien search evaluates Λ(α^-i) at all 92
  positions in one cycle and flips the bits where it is zero. If the number of
  roots differs from the locator's degree, the word had more than `T` errors:
  `fail_o` is set and the word is returned unchanged. (With more than T errors,
  a word can also land within T bits of another codeword and be miscorrected
  silently. This is inherent to any T-error-correcting code.)
  The work takes 2T+1 = 9 cycles. `CORR_CYCLES` (default 9) sets the latency
  and can only stretch it, so that detection plus correction takes the
  10-cycle (4.71 ns) decoding time budgeted for this code.

## Read and write sequences

One cycle is 0.5 ns (2 GHz). Cycle 0 is the cycle in which the request is
taken.

| Access | What happens | Cycles |
|---|---|---|
| write | encode, opportunistic write pulse, `wr_ack_o` | 9 |
| Lazy read, clean | unchecked data (`rsp_spec_o=1`) at 2, clean verdict at 3 | 2 |
| Lazy read, 1..T errors | unchecked data at 2; `revert_o` at 3; correction done at 12; corrected data re-encoded and written back (9); refetch; checked-again data at 23, verdict at 24 | 23 |
| Lazy read, more than T errors | `revert_o` at 3; raw data with `rsp_fail_o` at 12, not written back | 12 |
| conventional read | always detect and correct; corrected data (`rsp_spec_o=0`) at 12; no write-back | 12 |

The 23-cycle recovery is t_R + t_D + t_E + t_W + t_R: read 2, decode 10,
encode-and-write 9, read 2. So the expected Lazy read latency is
`TER·23 + (1−TER)·2` cycles, where TER is the total (write + retention) error
rate per read. For any realistic TER this is close to 2 cycles. Conventional
reads always take 12.

On the processor side, `fetch_revert_stage` registers each delivered word in
stage 1. An unchecked word moves to stage 2 only in the cycle its clean
verdict arrives. On `revert_o` it is squashed instead. Whenever no verified
word is ready, stage 2 receives a NOP word (two Alpha `BIS R31,R31,R31`
no-ops). As a result the pipeline runs on NOPs for the whole recovery, and the
corrected word enters stage 2 25 cycles after the fetch, against 4 cycles for a
clean fetch and 14 for a conventional one.

The controller takes one access at a time (`req_ready_o` is high only when it
is idle). It samples the ECC mode when it takes a request, so a mode change
never splits an access.

## Opportunistic write and the cell model

`stt_mram_array` is a plain synchronous memory with the cell physics supplied
from outside:

* `wr_fail_mask_i` is sampled with a write. A 1 marks a cell whose switching
  did not finish before the pulse ended. Such a cell keeps its old value, which
  only matters where the new bit differs.
* `ret_en_i`/`ret_addr_i`/`ret_mask_i` flip stored cells at any time
  (retention failures).

With both inputs at zero the array is an ordinary memory. How often cells fail
depends on the pulse length, the thermal stability factor and the temperature.
Drive the inputs from whatever statistics you want to study. For reference:
with Δ = 30 and I_w/I_c = 3, the pulse can be cut from about 12 ns to below
4 ns if up to three unfinished bits per 64-bit word are accepted.

The array takes a new operation in the last cycle of the previous one, so the
write-back and the refetch follow each other with no gap. A read taken in the
cycle a write ends already sees the new word.

## Adaptive mode

`ecc_mode_selector` registers `temp_i >= TEMP_TH ? MODE_CONV : MODE_LAZY`. The
sensor reading is in signed degrees Celsius. The underlying criterion is the
total error rate against a threshold error rate. The error rate rises
monotonically with temperature, so comparing the temperature is equivalent.
The 80 °C default belongs to cells with Δ = 30 and this write margin. Other
cells need another threshold. There is no hysteresis.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `T` | 4 | errors corrected per 64-bit word (1..4) |
| `WORDS` | 2048 | array words (16 KB of data) |
| `READ_CYCLES` | 2 | array read latency (0.90 ns), at least 2 |
| `WRITE_CYCLES` | 9 | encode + opportunistic write (4.17 ns) |
| `CORR_CYCLES` | 9 | corrector latency after detection, at least 2T+1 |
| `TEMP_TH` | 80 | switch to conventional ECC at this temperature (°C) |

## Where this departs from, or adds to, the published scheme

* The published scheme has the *processor* refetch the word after write-back.
  Here the controller issues the refetch itself. The timing is the same.
* `T = 1` gives a single-error-correcting Hamming code, not the SECDED code
  used as the weakest setting in the original evaluation.
* In conventional mode only the read handling changes. The write pulse stays
  as short as in Lazy mode. A "more conservative write" in the hot mode is
  mentioned in passing in the original text, but its mode switch is described
  as a change of ECC handling only, and that reading is followed here.
* The decoder algorithms (Berlekamp–Massey, parallel Chien search), the field
  polynomial, the bit layout, all handshakes, the NOP encoding, the
  handling of uncorrectable words and the fault-input ports are this design's
  own choices.
* Not built: the processor core, its commit-stage flush for the data-cache
  case, cache tags and replacement (16 KB 4-way, 64 B lines), the 512 KB L2,
  the thermal sensor and the MTJ cell itself.
* The latencies (2/1/9/9 cycles) are the published 65 nm figures converted to
  2 GHz cycles. They are parameters, not properties of this RTL's logic depth.

## Simulating

All files are SystemVerilog-2017 and use no vendor primitives. The package
must come first. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lazy_ecc_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_lazy_ecc_icache_top.sv \
  --top-module tb_lazy_ecc_icache_top
./obj_dir/Vtb_lazy_ecc_icache_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`. `tb_ref_pkg` is an
independent reference: long division by the generator polynomials written out
as constants, and syndromes from its own power table.

| Testbench | What it shows |
|---|---|
| `tb_bch_encoder` | all four codes against long division; zero syndromes |
| `tb_bch_detector` | syndromes against the reference, 1..6-bit errors flagged, 1-cycle verdict |
| `tb_bch_corrector` | 0..4 errors corrected with exact count; 5..6 flagged; 9-cycle latency |
| `tb_stt_mram_array` | latencies, unfinished cells keep old values, retention flips, back-to-back operations |
| `tb_ecc_mode_selector` | −40..125 °C sweep both ways, switch exactly at 80 °C |
| `tb_fetch_revert_stage` | random clean/bad/checked words; only verified words reach stage 2, NOPs otherwise |
| `tb_lazy_ecc_controller` | every latency in the table above, write-back repairs the array, conventional mode |
| `tb_lazy_ecc_icache_top` | end to end at default parameters: program load with unfinished writes, fetches across a 25 → 95 → 40 °C temperature profile with retention flips, an uncorrectable word; counts every mechanism |
| `tb_bch_codes` | the weaker codes T = 1, 2, 3 end to end through encoder, detector and corrector at the shortest latency (2T+1) |
| `tb_fault_campaign` | 3000 random 1..4-bit errors over the whole array; every one recovered in 25 cycles, 21 extra cycles each |

The whole design at default size simulates in about a second.
