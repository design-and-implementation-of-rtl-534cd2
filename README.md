# Sub-threshold wireless BFSK transmitter

A low-rate radio transmitter built almost entirely from digital logic. A binary
data stream (32 kbit/s, voice-grade) is sent as binary frequency shift keying
(BFSK): a `0` transmits one tone, a `1` a tone three times higher. A
numerically controlled oscillator (NCO) generates both tones, so the phase
stays continuous when the data changes. Its samples drive a current-steering
DAC, a one-transistor common-source amplifier and an on-chip coil antenna.

The silicon that this RTL describes runs its logic below the transistor
threshold voltage (0.6 V), where power is tiny but delay depends
exponentially on process, voltage and temperature. Two ideas make that
usable:

* all logic is built from identical dynamic PLAs (8 inputs, 6 outputs,
  12 product terms), so every gate level has the same, data-independent delay;
* a closed loop sets the NMOS body (bulk) voltage of all PLAs so that the
  delay of one reference PLA lines up with an external *beat clock* (BCLK).
  A forward body bias speeds the PLAs up and a lower one slows them down.

This repository gives synthesizable RTL for the digital modulator, the test
pin control and the phase detector. It also gives behavioural (simulation
only) models of the dynamic PLA, the reference PLA path, the charge pump, the
DAC and the amplifier, so the whole transmitter, including the body-bias
loop, can be simulated end to end.

## Signal path and timing

```
bit_in ─► phase accumulator ─► sine table ─► [mux] ─► thermometer ─► DAC ─► amplifier ─► antenna
          (9 bit, +59/+177)    (8 bit)        ▲ pad_in  (15+4 bits)   model   model      (anton)
              reg ↓clk            reg ↓clk    │            reg ↓clk
                                  └─► pad_out (sdrouten)
```

* **Falling-edge registers.** In silicon each stage is a network of dynamic
  PLAs that precharges while `clk` is low and evaluates while it is high. A
  stage's inputs must therefore hold still during the high phase, so every
  register (`phase`, `nco_out`, `dac_code`) is clocked on the **falling**
  edge. A data bit present at falling edge *n* sets the phase at *n*. The
  sample for that phase appears at *n+1* and its DAC code at *n+2*. One sample
  is produced per clock.
* **Tones.** `f = f_clk × Δθ / 512`, with Δθ = 59 for data 0 and 177 for
  data 1. With `f_clk = 40 × 32 kHz = 1.28 MHz` this gives 147.5 kHz and
  442.5 kHz. At the 1 MHz used for the spectrum test it gives 115.2 kHz and
  345.7 kHz.
* **Reset** (`rst`, active high, asynchronous) clears all three registers.

### Sine table (`sine_lut`)

Only a quarter wave is stored: 128 seven-bit magnitudes,
`Q[k] = floor(127.5 · sin(2π(k + 0.5)/512))`, computed at elaboration. The
half-step offset makes the quarter exactly mirror-symmetric, so the table is
folded with bit inversions alone:

* `phase[7]` set (2nd and 4th quadrant): address `~phase[6:0]`;
* `phase[8]` clear: sample `{1, Q}` = 128 + Q;
* `phase[8]` set: sample `{0, ~Q}` = 127 − Q.

The sample is unsigned, centred on 127.5, and within half a step of
`127.5 + 127.5·sin`. It is unsigned because the DAC legs can only add
current.

### Thermometer code and DAC

The 4 MSBs of the sample become 15 thermometer bits (`therm[i] = MSB > i`).
The 4 LSBs stay binary. The result is the 19-bit `dac_code_t` struct
`{therm[14:0], bin[3:0]}`. A small change in the sample then switches only a
few DAC legs. In the DAC model each thermometer leg carries 16 unit currents
(transistor W/L 20.8 against 1.3 for the smallest binary leg). The binary
legs carry 1, 2, 4 and 8 units. So the number of units switched on equals the
8-bit sample.

### Test pins (`pad_io_ctrl`)

Eight bidirectional pins (`pad_in` / `pad_out` / `pad_oe`) let the modulator
and the DAC be used apart:

| `sdrouten` | `dacin` | pins                 | thermometer stage input |
|-----------|---------|----------------------|-------------------------|
| 0         | 0       | idle                 | NCO register            |
| 1         | 0       | drive the NCO sample | NCO register            |
| x         | 1       | inputs               | `pad_in`                |

## The body-bias loop

This is the least conventional part of the design.

* **Dynamic PLA (`dyn_pla`, behavioural).** While `clk` is low, wordlines
  and output lines precharge. When `clk` rises, each wordline stays high only
  if none of its connected bit-lines (input literals) is high. Each output is
  pulled low if a connected wordline stays high (NOR-NOR). A maximally loaded
  dummy wordline switches in every cycle and is the last to do so. From it
  comes `completion`, which rises when evaluation is done (`T_eval` = 35 ns
  at zero bias) and falls when precharge is done (`T_pchg` = 45 ns).
  `clkout = completion & clk` clocks the next PLA, so in a multilevel
  network the evaluations ripple level by level.
* **Reference path (`ref_pla_path`, behavioural).** Ten cascaded PLAs. The
  monitored PLA sits at depth 10 of the 19 levels of the slowest block, so its
  completion lands near the middle of the evaluation window.
* **Phase detector (`phase_detector`, RTL).**
  `pullup_n = NAND(bclk, ~completion)` goes low while BCLK is high but the PLA
  has not finished (too slow). `pull_dn = NOR(bclk, ~completion)` goes high
  while the PLA has finished but BCLK is still low (too fast). Each pulse is
  as wide as the phase error.
* **Charge pump (`charge_pump`, behavioural).** The bulk voltage ramps up at
  0.2 mV/ns during `pullup_n` pulses and down during `pull_dn` pulses,
  clamped to 0–450 mV. It can be forced from outside (`bulk_force_*`).
  Every PLA's dummy wordline swings fully in each cycle and couples into the
  bulk node. The node is pulled up during precharge and down during
  evaluation. With the bulk capacitor this ripple is 25 mV, so the model adds
  +12.5 mV while `clk` is low and −12.5 mV while it is high.
* **Delay vs. bias law (model choice).** Delay = `T × 450 / (450 + V_bulk[mV])`.
  The delay halves at 450 mV, about the speed-up the technology data suggest.
* **Delay vs. supply.** The measured maximum speed grows with the square of
  the supply, so the PLA models also scale their delays by
  `(600 / V_DD[mV])²`. The top's `vdd_mv` input feeds only these models. A
  supply dip therefore slows the reference PLA, and the loop answers with
  more forward bias.

BCLK rises a chosen delay *D* after `clk` and falls with it. Raising the
BCLK duty cycle (smaller *D*) makes the loop speed the logic up, and lowering
it slows the logic down.

One effect of modelling the gates as described: BCLK falls together with
`clk`, but the reference completion only falls after its precharge time. So
each cycle also carries a short `pull_dn` pulse of about `T_pchg`. The loop
still locks, but with the completion lagging BCLK by about that width. With
*D* = 250 ns the model settles near 100 mV with completion at about 285 ns.

## Standard-cell copy and test PLA

The die also carries a second instance of the same modulator, built from
standard cells at 2.5 V. It has its own `clkstd`, `resetstd` and
`bit_in_std` pins. Only its 8-bit NCO output (`stdout`) leaves the chip, and
it has no DAC. The top instantiates `bfsk_modulator` a second time for it.
`test_pla` is a lone PLA whose two outputs go high in every precharge and low
in every evaluation, to check the basic cell.

## Files

| file | kind | content |
|------|------|---------|
| `rtl/bfsk_pkg.sv` | package | widths, increments, `dac_code_t` |
| `rtl/phase_accumulator.sv` | RTL | 9-bit phase register |
| `rtl/sine_lut.sv` | RTL | quarter-wave sine table |
| `rtl/bin2therm.sv` | RTL | 8 → 15 + 4 bit converter |
| `rtl/bfsk_modulator.sv` | RTL | the three stages and their registers |
| `rtl/pad_io_ctrl.sv` | RTL | test pin direction control |
| `rtl/phase_detector.sv` | RTL | NAND/NOR phase detector |
| `rtl/dyn_pla.sv`, `rtl/ref_pla_path.sv`, `rtl/test_pla.sv` | behavioural | PLA timing models |
| `rtl/charge_pump.sv`, `rtl/dac.sv`, `rtl/cs_amplifier.sv` | behavioural | analog models |
| `rtl/bfsk_transmitter_top.sv` | top | the whole die |

The behavioural models use delays, `real` arithmetic and `$realtime`. They are
for simulation only; for synthesis take `bfsk_modulator`, `pad_io_ctrl` and
`phase_detector`. Analog quantities on the top's ports are integers:
`bulk_mv` in millivolts, and `dac_out_uv`, `amp_out_uv` and `antenna_uv` in
microvolts. Pads, ESD cells, level shifters, supply domains, the bulk
capacitor and the antenna coil have no logic function and are not modelled.

## Simulation

Every testbench in `tb/` checks itself and ends with
`TB_RESULT checks=N failures=M`. Example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_bfsk_transmitter_top \
    rtl/bfsk_pkg.sv tb/tb_bfsk_transmitter_top.sv -Mdir obj && obj/Vtb_bfsk_transmitter_top
```

* `tb_bfsk_transmitter_top` runs the top at default parameters at 1.28 MHz
  for about 1900 clocks. A reference model checks every sample, DAC code,
  analog value and the standard-cell output. The test also counts each
  mechanism: both tones, tone switches, pins out, pins in, antenna on and
  off, speed-up and slow-down pulses, lock near BCLK, a forced bulk voltage,
  the test PLA toggling and a mid-stream reset. A mechanism that never
  happens counts as a failure. The DAC must swing 0.22 V peak, the level the
  link budget asks for (1 mW into 50 Ω). The amplifier must swing at least
  that; it reaches 0.3 V, limited by its 0.6 V supply. Two loop experiments follow:
  * With BCLK fixed at 250 ns, the supply steps from 600 mV to 550 mV and
    then to 650 mV. The bulk must rise at the lower supply and fall at the
    higher one, with the completion still locked. It settles at about
    103 mV, 208 mV and 22 mV.
  * BCLK is held high for 12 cycles, which must drive the bulk to its
    450 mV limit. It is then held low for 12 cycles, which must drain the
    bulk to 0 V.
* `tb_bfsk_workload_1mhz` runs the measured operating point: 1 MHz clock,
  data alternating at 32.25 kHz. It takes a DFT of the DAC output and finds
  the tones at 117.5 kHz and 343.5 kHz; the silicon measured 113 kHz and
  342 kHz. On the antenna node, the largest component between the two
  tones is 15.4 dB below the stronger tone. The chip showed about 11 dB, and
  10 dB still demodulated in the link simulations.
* `tb_nco_sfdr` measures the spectral purity of the 8-bit NCO samples.
  With constant data each tone repeats every 512 samples, so a 512-point DFT
  of one period is exact. Both tones reach 61.6 dB spurious free dynamic
  range, above the 54 dB (6 dB per accumulator bit) the design aims for.
* `tb_npla_throughput` cascades 19 PLA models, the depth of the NCO stage.
  It shows that a 711 ns cycle (45 ns precharge + 19 × 35 ns evaluation,
  about 1.4 MHz) completes and a 650 ns cycle does not. At 450 mV forward
  bias, 385 ns is enough. It then sweeps the supply from 0.4 V to 0.62 V at both bulk
  limits. The maximum clock rises from 0.63 MHz to 1.50 MHz at zero bias and
  doubles at 450 mV.
* Each block has its own `tb_<module>.sv`. The sine table, the converter and
  the DAC tests are exhaustive.

## Deviations and open points

* **Second increment.** The source text prints 117 for the second
  increment. It also states that the second tone is three times the first,
  and the measured tones agree with 3 × 59 = 177. This RTL uses 177.
* **Printed tone values.** The quoted 151.04 / 453.12 kHz at
  `f_clk = 40 × R_B` do not follow from Δθ = 59 / 177 at 1.28 MHz
  (147.5 / 442.5 kHz); they would need 1.31 MHz.
* **This design's own choices:**
  * data 0 selects the lower tone;
  * asynchronous reset;
  * the sample encoding;
  * `dacin` wins over `sdrouten`;
  * pin 1 is the LSB;
  * the test PLA personality;
  * all analog model constants (pump slope, bias law, DAC LSB of 1.725 mV
    chosen for a 0.22 V peak swing, amplifier gain 1.5 and operating point);
  * the square shape of the bulk ripple and its absence on a forced node.
* **PLA network.** The modulator is written as RTL, not as the 31 mapped
  PLAs (4 + 24 + 3 for the three stages) of the original network. Only the
  reference path is modelled at PLA level. The 1.4 MHz throughput limit of
  the 19-level network shows only in the PLA timing model
  (`tb_npla_throughput`), not in the RTL modulator, which has no clock limit
  of its own in simulation.
* **Not modelled.** The frequency-programmable (software radio) variant,
  which was not built.
