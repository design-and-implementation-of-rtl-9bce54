# PSK/FSK programmable sine wave generator (direct digital synthesis)

A direct digital synthesiser (DDS) makes a sine wave out of arithmetic. A phase
register gains a fixed increment, the *tuning word*, every clock; the top bits
of that phase address a sine table; the table output goes to a DAC. The output
frequency is

    Fout = FREQWORD * f(sysclk) / 2^32

so a 32-bit word gives a frequency step of f(sysclk)/2^32, and a new frequency
takes effect within a few clocks. Adding a constant to the phase before the
table shifts the carrier's phase without touching its frequency:

    Pout = PHASEWORD * 2*pi / 2^8 radians

Both properties make digital modulation easy. **FSK** switches between two
tuning words according to the data bit. **PSK** keeps one tuning word and
switches the phase word between 0 and 180 degrees. This RTL has a numerically
controlled oscillator (NCO) with an 8-bit sine output. In front of it sits a
modulator that keys the NCO with a pseudo-random Gold-code data stream. The
DAC and the anti-alias low-pass filter after `dacout` are analog parts. They
are not part of the RTL.

```
 pnclk ─► pn_generator ─ idata ─► psk_fsk_modulator ─ freqword/fwwrn_n ─┐
                       └ qdata    (mode, freqword0/1)  phaseword/pwwrn_n ┤
                                                                         ▼
 nco:  load_freq_word ─► phase_accumulator ─ phase ─► phase_modulator ─ modphase ─► sine_lookup ─► dacout
       (sync, stagger)   (4 x 8-bit CLA sections)  ▲   (CLA add)                     (¼-wave sine_rom)
                         └► sin_o / cos_o          │                └► msin / mcos
       load_phase_word ─ syncphswd ────────────────┘
```

## The pipelined phase accumulator and the staggered word load

This is the least obvious part of the design. A 32-bit add in one clock would
set the clock period. So the accumulator is cut into four 8-bit sections, each
a carry-lookahead adder (`cla_adder`) with its own sum register
(`pipe[0..3]`). The carry out of section *k* is **registered** and enters
section *k+1* one clock later. Section *k* therefore holds byte *k* of the true
phase *k* clocks late. The top section, the only one brought out, equals the
top byte of an ideal 32-bit accumulator delayed by 3 clocks.

That equality holds only if the tuning word reaches the sections with the same
skew. Byte *k* of a new word must arrive *k* clocks after byte 0. Otherwise, for
a few clocks, the upper sections would add the new word's bytes to carries made
with the old word. `load_freq_word` provides the skew:

1. `FREQWORD` is captured into `fwreg` on the rising edge of the active-low
   strobe `fwwrn_n`. The strobe may be fully asynchronous to `sysclk`.
2. The strobe is sampled by a metastability flip-flop and a second register.
   Their rising-edge decode is registered as `loadp[0]` and shifted on through
   `loadp[1..3]`.
3. `loadp[k]` copies byte *k* of `fwreg` into byte *k* of `syncfreq`.

The testbenches check this property cycle by cycle against an unpipelined
reference accumulator, including across word changes.

The phase word has no such problem. `load_phase_word` synchronises the strobe
in the same way and loads all 8 bits of `syncphswd` at once.
`phase_modulator` adds `syncphswd` to the 8-bit phase (modulo 256) and
registers the sum as `modphase`.

### Timing

Call e0 the first `sysclk` rising edge after a strobe's rising edge:

| event | edge |
|---|---|
| strobe sampled by the metastability flop | e0 |
| `loadp[0]` / `load` asserted | e1 |
| `syncfreq` byte 0 .. byte 3 updated | e2 .. e5 |
| new tuning word first added to the phase | e3 |
| new frequency visible in `phase` / `modphase` / `dacout` | e6 / e7 / e8 |
| `syncphswd` updated | e2 |
| new phase offset visible in `modphase` / `dacout` | e3 / e4 |

Each strobe must be low across at least one `sysclk` rising edge. The word
must be stable at the strobe's rising edge. Frequency writes must be at least
6 clocks apart and phase writes at least 4. `resetn` is asynchronous and active
low. It clears every register, so the carrier stops at 0 radians.

## Sine lookup and the output format

Only a quarter of the sine period is stored. `sine_rom` has 64 words of
7 bits:

    amp[i] = round(127 * sin((i + 0.5) * pi / 128)),   i = 0..63

The samples sit at the centres of the phase steps. This makes the quarter
exactly mirror-symmetric, so `sine_lookup` reads the second and fourth quarters
at the bit-inverted address `~modphase[5:0]`. The phase MSB becomes the
amplitude MSB:

* first half period (`modphase[7] = 0`): `dacout = {0, amp}`, i.e. +amp
* second half (`modphase[7] = 1`): `dacout = {1, ~amp}`, i.e. -amp-1

`dacout` is a **two's-complement** sample in -128..+127. The wave is symmetric
about -1/2 LSB. An offset-binary DAC needs `dacout[7]` inverted. `dacout` is
registered and changes on the `sysclk` rising edge. `dacclk` is `sysclk`
brought back out, so the DAC can latch `dacout` with the same delay through
the pads.

The square-wave outputs are high during the positive part of their wave:
`sin_o = ~phase[7]` and `cos_o = ~(phase[7] ^ phase[6])`, both from the
unmodulated phase. `msin` and `mcos` are the same functions of `modphase`, so
they carry the phase modulation.

## Modulation (`psk_fsk_modulator`) and test data (`pn_generator`)

`pn_generator` holds two 5-bit Gold-code generators clocked by `pnclk`. Each
XORs two LFSRs, with feedback polynomials x^5+x^2+1 and x^5+x^4+x^3+x^2+1.
Each produces a sequence of period 31. The I and Q generators differ in one
start state, so `idata` and `qdata` are different Gold sequences. `idata` keys
the carrier. `qdata` is only an output.

The modulator synchronises the data bit into `sysclk` and multiplexes the words:

| mode | data 0 | data 1 |
|---|---|---|
| FSK (`mode = 0`) | `freqword0`, phase 0 | `freqword1`, phase 0 |
| PSK (`mode = 1`) | `freqword0`, phase 0x80 (180°) | `freqword0`, phase 0 |

When a selected word differs from the one last written, the modulator writes
it into the NCO through the NCO's own word pins. This happens after a data
change, a mode change, a reprogrammed `freqword0/1`, or reset. The matching
strobe is pulled low for `STROBE_LOW` = 2 clocks, and writes are at least
`WRITE_GAP` = 8 clocks apart. Count clocks from the first `sysclk` edge that
samples a data change. The strobe falls at clock 3 and rises at clock 5. The
first `dacout` sample with the new frequency (FSK) comes at clock 14. The first
sample with the new phase (PSK) comes at clock 10. `pnclk` must be slower
than `sysclk`/10 so that every bit is written. An assertion checks that a
word does not move while its strobe is low.

## Modules

| file | role |
|---|---|
| `dds_pkg.sv` | widths, `mod_mode_e` enum, 180° phase constant |
| `dds_top.sv` | top: PN generator + modulator + NCO |
| `nco.sv` | NCO with the word pins and the output pins |
| `load_freq_word.sv`, `load_phase_word.sv` | strobe synchronisers and word loading |
| `phase_accumulator.sv` | 4-section pipelined accumulator, `sin_o`/`cos_o` |
| `phase_modulator.sv` | phase offset adder |
| `sine_lookup.sv`, `sine_rom.sv` | quarter-wave to full-wave amplitude |
| `cla_adder.sv` | parameterised carry-lookahead adder |
| `pn_generator.sv`, `gold_code_gen.sv` | Gold-code test data |
| `psk_fsk_modulator.sv` | FSK/PSK word multiplexer and NCO writer |

Parameters: `FREQ_W` = 32 and `SECT_W` = 8 on the NCO and its accumulator
parts; `PHASE_W` = 8. The sine table is fixed at 64 × 7 bits. `dds_top` has no
parameters.

## How far it follows the original architecture, and what is chosen here

These parts follow the original architecture: the pin set and word formats;
the capture of each word on its strobe's rising edge with a two-flop
synchroniser; the four delayed load strobes and the staggered byte loading;
the 32-bit accumulator in 8-bit CLA sections with registered carries; the
registered phase adder; the quarter-wave 64 × 7 ROM with the phase MSB as the
amplitude MSB; `dacclk` as `sysclk` fed back; two 5-bit Gold-code generators
on `pnclk`; and FSK/PSK as a multiplexer on the data bit with a constant
180° phase word for PSK.

These are this design's own choices:

* the registered edge decode in the synchronisers (latencies as in the table)
* the flat lookahead inside `cla_adder`
* the ROM's sample points and full scale of 127
* the two's-complement reading of `dacout`
* the polarity of the square-wave outputs
* the Gold polynomials and seeds, and the use of `idata` as the modulating bit
* the `mode` input, and the way the modulator writes words into the NCO

The FSK bit mapping puts `freqword0` on a 0. In PSK, a 1 goes at 0 rad and a
0 at pi. The NCO's internal `phase` and `modphase` are brought out of `nco`
for observation. The DAC and the low-pass filter are not modelled.

Synthesis with an open-source flow gives about 210 flip-flop bits and a
448-bit ROM. Area and power depend on the cell library and are not comparable
with any particular ASIC result.

## Simulation

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb --top-module tb_dds_top \
  rtl/dds_pkg.sv tb/tb_dds_top.sv -o sim && obj_dir/sim
```

* `tb_dds_top` is the end-to-end test at the default sizes, with a 200 ns
  `sysclk`. It runs FSK, PSK, a tuning-word change and FSK again, about 4,500
  clocks. Reference models in the testbench predict the PN sequences, every
  word the modulator writes, and `dacout`/`msin`/`mcos` on every clock. It
  checks Fout = FREQWORD·f/2^32 by counting periods. It fails if any of these
  never happened: FSK switch, PSK flip, mode switch, reprogramming, a carry
  between each pair of sections, phase wrap, or both half waves.
* `tb_nco` drives the NCO pins with strobes that are not aligned to `sysclk`
  and checks every output on every clock against the reference.
* The unit testbenches cover the rest: `tb_cla_adder` (exhaustive),
  `tb_sine_rom` and `tb_sine_lookup` (every address/phase against `$sin`),
  `tb_phase_accumulator`, `tb_load_freq_word`, `tb_load_phase_word`,
  `tb_phase_modulator`, `tb_pn_generator` and `tb_psk_fsk_modulator`.

All of them pass. Each was also run against a deliberately broken copy of its
module, and each caught the fault.
