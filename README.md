# Fast-locking ADPLL with dynamic phase control

A 2.4 GHz all-digital PLL normally faces a trade-off. A narrow loop gives low jitter but settles slowly after a channel hop. A wide loop settles fast but passes more TDC and divider noise. This design uses two modes to get around that:

- **Frequency acquisition (FA).** After a channel change, a coarse auxiliary TDC (ATDC) measures how far the feedback clock is from the reference and in which direction. That measurement drives two paths:
  - **Phase compensation.** The multi-modulus divider's ratio is shortened or lengthened for one cycle, so the next feedback edge moves toward the reference edge. This keeps the accumulated phase error small.
  - **Frequency compensation.** The loop filter's integrator gets an extra step of `±m·KI_FC`. Here `m` is the ATDC level. This pushes the DCO toward the new frequency much faster than the small proportional and integral gains alone could.
- **Phase tracking (PT).** Once the ATDC has seen no coarse error for a while, it is switched off and the divider returns to its nominal tap. The loop then runs as a plain narrow-band type-II TDC loop, so FA adds no noise once the loop is locked.

The RTL is a complete loop:

- synthesizable logic for the digital parts;
- behavioural models (with real delays) for the four analog or timing parts: PFD, main TDC front end, ATDC and DCO.

With a 5 MHz reference it locks at 2.49 GHz. It completes hops of 5 to 25 MHz in 2.2–4.4 µs. The same model with fast lock off needs 269 µs for a 10 MHz hop.

## Signal flow

```
 f_ref ─┬─► pfd ──UP/DN──┬─► mtdc_frontend ──therm──► mtdc_encoder ──code──┐
        │     ▲          │        │ Sign, NEXT                               │
        │     │ f_fb     └─► atdc ─S[2:0]─► fastlock_ctrl ──level m, mode    │
        │     │                              (clocked by NEXT)     │         ▼
        │  mm_divider ◄─ level m, Sign ─────────────────────────────┴──► dlf (ki_controller inside)
        │     ▲   │ md2                                                      │ 8 + 8 bits
        │     │   ▼                                                          ▼
        │   prescaler34 ◄──────────── f_out ◄── dco ◄── dco_decoder ◄── mash2_dsm
        │                                        ▲  R/P/C (48 lines)
        └─ reset synchroniser                    └── band_sipo (4-bit band)
```

`adpll_top` wires the blocks as above.

- **`next` domain.** The main TDC raises `next` once per reference period, after its conversion is done. That pulse clocks the DLF and the mode controller.
- **`pres` domain.** The prescaler output clocks the sigma-delta modulator and the DCO decoder. It runs at about 620 MHz.
- **Divider.** The divider counts prescaler cycles.

## The divider and phase compensation

This is the least obvious part of the design (`mm_divider.sv`, `prescaler34.sv`).

**Counting.** A 7-bit counter counts prescaler output cycles from 0 to 127.

- `MD1 = (count >= fcw)`.
- `MD1` enters a 7-stage shift register `C1..C7`, clocked by the prescaler. The register is cleared when the counter wraps.
- The prescaler mode `MD2` is taken from one tap `Ck` of the register. The prescaler divides by 3 while `MD2` is low and by 4 while it is high.
- Tapping later delays the start of the ÷4 cycles by `k` prescaler cycles, so `k` more cycles run at ÷3. The divide ratio is therefore

```
N = 3·(fcw + k) + 4·(128 − fcw − k) = 512 − fcw − k
```

**Tap selection.**

- In PT, and in the conventional mode, `k = 4`, so `N = 508 − fcw`. For example, `fcw = 10` gives N = 498, which is 2.49 GHz from 5 MHz.
- In FA the tap is `4 + m` when the reference leads (`Sign = 0`). That shortens the cycle by `m` DCO periods.
- It is `4 − m` when the feedback leads (`Sign = 1`), which lengthens the cycle. `m` is 1..3.
- The tap is latched once per divider cycle, when the count equals `fcw`. This is before any shift register stage has gone high, so a change never produces a partial count.

**Prescaler polarity.** The design choice here is "MD2 high = ÷4". This is what the ratio equation and the 3-bit example (tap C4 in lock, C6 to shorten by two) require. A description of the transistor-level prescaler suggests the opposite polarity, but that contradicts the equation.

## Loop filter and gains

**The filter (`dlf.sv`, `ki_controller.sv`).** The DLF is a PI filter updated on every `next` pulse.

- The 5-bit TDC magnitude and `Sign` form a 6-bit two's-complement error.
- `ki_controller` forms `KP·err` (14 bits) and `KI·err + (Sign ? −1 : +1)·m·KI_FC` (15 bits). Each gain is a power of two given as a signed shift. `KI_FC` may be the sum of two powers.
- The integrator is 17 bits wide. The output word is `integrator + P-term`, 16 bits wide.
- **Overflow.** If the integrator or the output would leave the 16-bit range, its overflow detector fires (`dlf_ovf`) and the value holds instead of wrapping.

**Units.** One LSB of the 16-bit word is 1/256 of a DCO fine code, which is 200 kHz. So one LSB is 781 Hz.

- The upper 8 bits go to the DCO decoder.
- The lower 8 bits go to the 2nd-order MASH sigma-delta modulator. Its −1..+2 output is added to the integer code at the prescaler rate.

**Gain values.** The gains are run-time inputs, not parameters. The testbenches use

| Gain | Setting | Value |
|---|---|---|
| KP | `kp_sh = 5` | 2^5 |
| KI | `ki_sh = 1` | 2^1 |
| KI_FC | `kifc_sh_a = 11`, `kifc_sh_b = 9` | 2^11 + 2^9, i.e. 10 DCO codes (2 MHz) per ATDC level per reference cycle |

**How these compare with the analysed design.** The analysis uses a 5 MHz reference, N = 480, 200 kHz/code, 5 ps TDC steps, 60° phase margin and unity-gain bandwidths of 80 kHz (PT) and 300 kHz (FA). In the LSB units above it gives:

| Gain | Analysed value | This design |
|---|---|---|
| KP | ≈ 6.7 ≈ 2^2.5 | 2^5 |
| KI | ≈ 0.39 ≈ 2^-1.5 | 2^1 |
| KI_FC | ≈ 10.4 DCO codes per ATDC level | 10, so it matches |

KP and KI are larger here. A shifter cannot give half powers of two, so the analysed KP and KI round to KP = 2^3 and KI = 2^-2. With those values:

- A 10 MHz hop locks in 3.2 µs (`tb_adpll_hops`).
- A gain sweep of this model gave about 20 µs for 25 MHz hops. After FA ends, the leftover error lies between the main TDC's range (155 ps) and the first ATDC threshold (613 ps), and the narrow loop removes it slowly.

The larger KP and KI were therefore chosen by that sweep. They are a tuning choice, not a derived result. Set `kp_sh`/`ki_sh` to 3/−2 for the analysed loop.

## Mode control (`fastlock_ctrl.sv`)

**Entering FA.** With `fl_en = 1`, the controller enters FA in two cases:

- after reset;
- whenever `fcw` changes.

**In FA:**

- The ATDC is enabled.
- Its 3-bit thermometer output becomes the level `m = 0..3`. That level drives both the divider and the KI controller.

**Leaving FA.** After 8 consecutive comparisons with `S0 = 0`, the controller switches to PT. In PT:

- the ATDC is disabled;
- `m` is forced to 0.

**Conventional mode.** With `fl_en = 0` the loop is an ordinary type-II ADPLL. Use this mode for comparison.

## Quantizers and DCO

**PFD (`pfd.sv`).** Two flip-flops with D tied high. They are reset 300 ps after both are set. That hold time is longer than the whole main TDC range.

**Main TDC front end (`mtdc_frontend.sv`).**

- **Phase selector.** `Sign` is 0 when UP leads. It is set at each leading edge and held until the next leading edge, so the divider can use it later in the reference period.
- **Delay line.** The uneven-step Vernier line is modelled as 9 cells of 5 ps, then 11 cells of 10 ps. This covers 155 ps, which is code 31.
- **Output.** It produces a thermometer code, then pulses `next` 1 ns after the later edge.

**Encoder (`mtdc_encoder.sv`).** This is synthesizable.

- 3-input gates turn the thermometer into a 1-of-N code and remove isolated bubbles.
- Each hot line reads a row of Gray-coded values. The rows are ORed together.
- A Gray-to-binary stage gives the 5-bit code.

**ATDC (`atdc.sv`).** Stage `j` is set when the UP/DN skew is at least `(j+1)·613 ps`. 613 ps is more than the whole main TDC range, so the two quantizers do not overlap.

**DCO.**

- **Decoder (`dco_decoder.sv`).** It maps the 8-bit code (plus the modulator output) onto a 16×16 varactor matrix:
  - full rows `R[i] = i < row`;
  - the partial row `P[i] = i == row`;
  - the columns `C[j] = j < col`.

  All 48 lines are registered. A cell is on when `R[i] | P[i]&C[j]`.
- **Model (`dco.sv`).** `f = 2390 MHz + 16 MHz·band + 0.2 MHz·(cells on)`. It recomputes its half-period at every edge.
- **Band register (`band_sipo.sv`).** The 4-bit band is shifted in MSB first. It resets to band 5, which covers 2470–2521 MHz.

## Departures and assumptions

- **Gains.** The testbench gains differ from the analysed values (see above).
- **Prescaler polarity.** MD2 high means ÷4 (see above).
- **`Sign` timing.** `Sign` is held for the whole reference period instead of being reset by `next` before each comparison.
- **Divider taps.** The shift register has 7 taps (C1..C7). The nominal tap is C4, and the ATDC moves it by at most ±3.
- **Reset alignment.** A two-flop synchroniser on `f_ref` releases the PFD, prescaler and divider together, so the first feedback edge lands near a reference edge. Without it, a random start-up phase can drive the loop the wrong way into the DLF limits.
- **Lock detection.** FA ends after 8 quiet comparisons. This count is an assumption.
- **One gain set.** The same KP and KI are used in FA and PT. Only one pair of values was specified. The shift inputs can still be changed at run time, for example by switching them whenever the `mode` output changes.
- **Behavioural models.** The PFD, TDC front end, ATDC and DCO are behavioural models with ideal delays. The DCO's band step (16 MHz, about 69 % overlap between bands) and linear tuning are assumptions.
- **No noise.** The models have no noise sources, so jitter, phase noise and spurs cannot be evaluated in simulation.
- **DSM dither.** The dither source is a 15-bit LFSR added to the sigma-delta LSB.
- **Clock domains.** The DSM and decoder run on the prescaler output. The DLF runs on `next`.
- **Conventional loop.** With the gains above, the conventional loop settles a 10 MHz hop in 269 µs. Fast lock takes 2.4 µs.
- **Output range.** With a 5 MHz reference the locked output is limited to N ≤ 508, which is 2.54 GHz.
- **Not included.** Supply regulators, pads and ESD structures have no logic function.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | Checks | What is compared |
|---|---|---|
| `tb_mtdc_encoder` | 39 | every clean code, plus bubbles at the transition |
| `tb_ki_controller` | 6000 | random errors, levels and shifts against a reference model |
| `tb_dlf` | 1202 | per-cycle reference model, including overflow hold |
| `tb_mash2_dsm` | 18 | output range, window averages, dither mean |
| `tb_dco_decoder` | 759 | all codes and offsets, R/P/C lines and cell count |
| `tb_band_sipo` | 81 | all bands, shift-without-load, reset |
| `tb_prescaler34` | 399 | cycle lengths for random mode sequences |
| `tb_mm_divider` | 40 | N for every tap and `fcw`, with the prescaler |
| `tb_fastlock_ctrl` | 2011 | FA entry, lock count, re-entry on `fcw` change, random sequence against a model |
| `tb_pfd` | 80 | pulse widths for random skews |
| `tb_mtdc_frontend` | 180 | code and `Sign` for random skews |
| `tb_atdc` | 80 | thresholds, enable |
| `tb_dco` | 12 | frequency per band and code |
| `tb_adpll_top` | 21 | whole loop at default settings, every mechanism |
| `tb_adpll_hops` | 31 | lock-time workloads (below) |

### End-to-end test (`tb_adpll_top`)

The test uses a 5 MHz reference and `init_code = 0x8000`. It runs this sequence:

1. Lock from reset at N = 498 (2.49 GHz).
2. Hop 10 MHz down.
3. Hop 25 MHz up.
4. Hop 5 MHz down.
5. Run the conventional loop over a 10 MHz hop. It must settle, and take longer than fast lock (269 µs here).
6. Re-enable fast lock.
7. Rewrite the band over the serial port and hop at the same time.
8. Set `fcw = 0` to drive the filter into its limits.

The lock time is the last moment the frequency selected by the tuning word (`2390 + 16·band + 0.2·word/256` MHz) was more than ±100 ppm from `N·5 MHz`. After that moment it stays within the band. After the initial lock and after the 10 MHz hop, the test also times the reference and feedback edges directly. The skew must stay inside the main TDC range of 155 ps. It measures 19 ps and 5 ps. Results:

| Event | Lock time |
|---|---|
| Initial lock | 2.0 µs |
| 10 MHz hop | 2.4 µs |
| 25 MHz hop | 3.2 µs |
| 5 MHz hop | 2.8 µs |
| Relock after band change | 3.2 µs |

The test counts each mechanism and fails if any of them never happens:

- FA entries and PT entries;
- shortened and lengthened divider cycles;
- KI_FC steps;
- conventional-mode updates;
- band writes;
- DLF overflow.

The whole run takes under a second of wall-clock time.

### Lock-time workloads (`tb_adpll_hops`)

This test also runs at the default settings. It checks each of the following:

- **Channel hops.** Hops of 5, 10, 15, 20 and 25 MHz, up and down, inside band 5. All lock within 5 µs. The slowest are the 15 MHz hops, at 4.2–4.4 µs. The others take 2.2–3.2 µs.
- **Analysed gains.** A 10 MHz hop with KP and KI rounded from the analysed values locks in 3.2 µs.
- **Conventional loop.** The same 10 MHz hop with fast lock off settles in 269 µs, 112 times slower than with fast lock.
- **N = 480 (2400 MHz).** The band is written to 0 over the serial port, and the loop locks there.

The run covers 2 ms of loop time in a few seconds.

### Running

With Verilator 5 (`--timing` is needed for the behavioural delays):

```
verilator --binary --timing --assert -Irtl --top-module tb_adpll_top \
          rtl/adpll_pkg.sv tb/tb_adpll_top.sv -Mdir obj_top
./obj_top/Vtb_adpll_top
```

Run other blocks the same way, with their testbench as the top module. The package must come first. `-Irtl` lets Verilator find the other modules by name. Every file uses `` `timescale 1ps/1fs ``.
