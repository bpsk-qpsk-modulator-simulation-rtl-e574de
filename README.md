# BPSK/QPSK digital IF modulator

This is a phase-shift-keying modulator that takes a serial NRZ bit stream and
produces digital IF samples of a carrier whose phase carries the data. In
BPSK each bit sets the carrier phase to 0° or 180°. In QPSK each pair of bits
selects one of four phases: ±45° or ±135°. The modulator generates its
carrier with a direct digital synthesizer (DDS). It needs no multipliers:
the symbol values are ±1, so a multiplier only keeps or inverts a carrier's
sign, and the "multiplication" is a bitwise inversion of the carrier samples.

```
              clk_b domain             |          clk domain
                                       |
 din ──►┌───────────────┐  out_iq(0)   |  ┌───────────┐     ┌──────────────────────┐
        │ symbol_mapper │──────────────┼─►│ word_sync │────►│ iq_output_stage      │
 bq  ──►│  (B/Q PSK)    │  out_iq(1)   |  │ (3 bits)  │     │  out_i = ±cos        │
        └───────────────┘  mode        |  └───────────┘     │  out_q = ±sin        ├──► if_out (11 b)
                                       |                     │  if = out_i - out_q  │
 phase_inc ────────────────────────────┼──►┌─────┐ cosine ──►│   (QPSK)  or out_i   │
                                       |   │ dds │ sine ────►│   (BPSK)             │
                                       |   └─────┘           └──────────────────────┘
```

The output is

    QPSK:  if = m_I · cos(2π f_c t) − m_Q · sin(2π f_c t)
    BPSK:  if = m_I · cos(2π f_c t)

where m_I and m_Q are ±1 (bit 1 → +1, bit 0 → −1).

## Files

| file | contents |
|---|---|
| `rtl/psk_pkg.sv` | default sizes, `mode_e` (BPSK/QPSK), `iq_sym_t` (the two keying bits) |
| `rtl/symbol_mapper.sv` | bit stream → I/Q keying bits, in the bit clock domain |
| `rtl/word_sync.sv` | carries the symbol and its mode into the sample clock domain |
| `rtl/dds_phase_accumulator.sv` | increment register and phase accumulator |
| `rtl/dds_sincos_lut.sv` | phase quantiser and cosine/sine table |
| `rtl/dds.sv` | the synthesizer: accumulator plus table |
| `rtl/iq_output_stage.sv` | sign keying of both carriers and the output adder |
| `rtl/psk_modulator.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches, one per module plus two for the whole modulator |

## Modulation type and symbol mapping

`bq` selects the modulation type: 0 is BPSK and 1 is QPSK (`psk_pkg::mode_e`).
`din` and `bq` are sampled on the rising edge of `clk_b`.

* **QPSK.** The mapper takes bits in pairs. The first bit of a pair (the odd
  bit: 1st, 3rd, …) keys the I channel. The second (even) bit keys the Q
  channel. Both are registered together on `out_iq` by the `clk_b` edge
  that samples the second bit, and held for two bit periods.
* **BPSK.** Every bit is registered on the I channel by the `clk_b` edge that
  samples it. The Q bit is held at 0, and the output stage ignores it.

`out_iq` is a packed struct `{q, i}`. So `out_iq = 2'b01` means I = 1, Q = 0.
The resulting carrier phases are:

| mode | `out_iq` {q,i} | m_I, m_Q | carrier phase |
|---|---|---|---|
| BPSK | x0 | −1 | 180° |
| BPSK | x1 | +1 | 0° |
| QPSK | 00 | −1, −1 | −135° |
| QPSK | 01 | +1, −1 | −45° |
| QPSK | 10 | −1, +1 | +135° |
| QPSK | 11 | +1, +1 | +45° |

The mapper also outputs the mode that belongs to the symbol on `out_iq`.
That mode changes only together with the symbol. If `bq` changes, the pairing
restarts, and a QPSK pair that was half collected is dropped. That is the
only way a bit is lost.

## Two clocks

The bit stream arrives on its own clock `clk_b`. The synthesizer and the
output stage run on the sample clock `clk` (100 MHz in the reference
configuration). The design assumes nothing about how the two clocks relate.
The three bits {mode, q, i} go through `word_sync` as one word:

1. Two flip-flop stages resynchronise each bit.
2. A third stage lets the output register take the word only when it has
   been the same on two successive `clk` edges.

Bits of one update can be resolved on different `clk` edges, so without the
third stage the output stage could briefly see a mix of the old and new
symbol (for example a QPSK symbol with the new I bit and the old Q bit).
With it, only complete symbols reach the output stage. The only condition is
that the word stays constant for at least three `clk` periods. A bit period of
three or more sample clocks meets it, since a symbol lasts at least one bit
period.

The top brings out `out_iq` and `out_bq`. They are the symbol and mode that
the output stage is using, in the `clk` domain. Note that they are not the
mapper's own registers.

## Direct digital synthesizer

```
phase_inc ─►[reg]─► (+) ─►[acc]─┬─► top ADDR_W bits ─► ROM 2^ADDR_W × (cos,sin) ─►[reg]─► cosine, sine
                     ▲          │
                     └──────────┘
```

* **Phase accumulator.** A register captures the phase increment. The
  accumulator adds that registered increment to itself every clock, modulo
  2^ACC_W. Its value is the carrier phase as a fraction of a full turn, so

      f_c = phase_inc · f_clk / 2^ACC_W.

  With the default 32-bit accumulator, a 10 MHz carrier from a 100 MHz clock
  needs `phase_inc = round(0.1 · 2^32) = 429496730`. That gives 10.0000000093 MHz,
  or ten samples per carrier period.
* **Quantiser.** Only the top `ADDR_W` = 9 bits of the phase address the
  table. The rest is truncated.
* **Table.** The table holds a full period of both cosine and sine as
  two's-complement samples of `SAMPLE_W` = 10 bits:
  `cos[k] = round(511·cos(2πk/512))`, `sin[k] = round(511·sin(2πk/512))`.
  It is computed at elaboration by a constant function from these formulas,
  so it follows the parameters. There is no data file. The read is
  synchronous, as in a block RAM. 512 words of 20 bits is 10 Kbit, which fits
  one 18 Kbit FPGA block RAM.
* **Reset.** Reset clears the increment register and the accumulator. The
  carrier therefore starts at phase 0. There is no separate phase-offset
  input.

Truncating the phase to 9 bits limits the phase resolution to 0.70°. The
worst-case amplitude error is about 511·2π/512 ≈ 6.3 LSB per carrier.

## Sign keying and the output adder

The output stage is a two-stage pipeline:

1. **Keying.** `out_i = out_iq.i ? cosine : ~cosine` and
   `out_q = out_iq.q ? sine : ~sine`, both registered. The inversion is
   bitwise (one's complement), so a keyed-off sample c becomes −c−1, not −c.
   This costs an offset of at most one LSB and avoids an adder per channel.
   It also never overflows: the inverse of −512 is +511.
2. **Adder.** In QPSK, `if_out = out_i − out_q`. In BPSK, `if_out = out_i`,
   sign-extended. The output is one bit wider than a carrier sample (11 bits).
   Its range is −1023…+1023 in QPSK and −512…+511 in BPSK, so it never
   wraps.

The mode is delayed through the first stage together with the carrier
samples, so a mode change and the symbol it came with reach the adder on the
same edge.

## Timing

| path | latency |
|---|---|
| `din` → mapper `out_iq` | registered by the sampling `clk_b` edge (QPSK: the edge of the second bit) |
| mapper output → `out_iq`/`out_bq` ports | 3 or 4 `clk` edges |
| `out_iq`/`out_bq` ports, `cosine`/`sine` → `if_out` | 2 `clk` edges |
| `phase_inc` → accumulator | 1 edge; the accumulator value reaches the table output after 1 more |

Counting `clk` edges from the first edge after reset is released as n = 0,
the carrier samples after edge n belong to phase (n − 1)·K. The IF sample
after edge n uses the carrier after edge n − 2 and the port symbol after
edge n − 2. The output stage accepts a new sample every clock.

All registers except the table's output register are cleared by one
asynchronous, active-low `rst_n`, which serves both clock domains. After
reset the mapper outputs the BPSK symbol 0.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ACC_W` | 32 | phase accumulator and `phase_inc` width |
| `ADDR_W` | 9 | quantised phase width; table depth 2^ADDR_W |
| `SAMPLE_W` | 10 | carrier sample width; `if_out` is `SAMPLE_W+1` bits |

`psk_modulator`, `dds`, `dds_sincos_lut`, `dds_phase_accumulator` and
`iq_output_stage` take these parameters, and the defaults come from
`psk_pkg`. When you change `ADDR_W` or `SAMPLE_W`, the table is rebuilt
automatically. A larger `ADDR_W` lowers the phase error but doubles the
memory per bit.

With the defaults, coarse synthesis gives:

* 113 flip-flops outside the table: mapper 5, synchroniser 12,
  increment/accumulator 64, output stage 32;
* one 10,240-bit memory.

## What is taken from the reference design and what is not

These parts follow the modulator this RTL implements:

* the split into symbol mapper, DDS and sign-keying output stage;
* the mapping of odd bits to I and even bits to Q;
* the unused Q channel in BPSK;
* the register structure of the synthesizer and its frequency formula;
* 10-bit carriers and an 11-bit output;
* one's-complement sign keying;
* the subtraction in QPSK and the two-register output pipeline;
* the 100 MHz clock and 10 MHz carrier used in the tests.

The reference builds its DDS from a vendor core. Here it is written out from
the structure that the core implements.

These are this design's own choices:

* the accumulator width (32), the table depth (512), the amplitude (511),
  rounding, and truncation in the quantiser;
* the `word_sync` crossing between `clk_b` and `clk`, and the extra mode
  output of the mapper that makes it possible;
* the `out_bq` port;
* delaying the mode with the symbol in the output stage (the reference reads
  the mode input directly at the adder);
* when a QPSK pair is presented, and dropping half a pair on a mode change;
* reset behaviour;
* the absence of a carrier phase-offset input.

The reference implementation reports 98 flip-flops for its FPGA build. This
RTL has more (113) mainly because of the 12-bit synchroniser and the
registered mode. The table also sits in one block RAM here.

A matching demodulator is not part of this design.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog if it hangs. They compare against values worked out in the
testbench, not against the RTL's own signals.

| testbench | what it checks |
|---|---|
| `tb_symbol_mapper` | random bits in segments of random length that alternate between modes, including odd QPSK segments; exact symbol, mode and hold time after every edge |
| `tb_dds_phase_accumulator` | phase after edge n equals (n−1)·K mod 2^32 for several K, including 0, 2^32−1 and the 10 MHz word; wrap-around |
| `tb_dds_sincos_lut` | every table entry within ½ LSB of 511·cos/sin; one-edge read latency; low phase bits ignored |
| `tb_dds` | samples match the closed-form phase; 200 ± 1 upward sine zero crossings in 2000 samples at 10 MHz |
| `tb_iq_output_stage` | random and extreme samples, all 8 symbol/mode combinations; exact output two edges later |
| `tb_psk_modulator` | whole modulator at default sizes with asynchronous clocks: the symbol at the output stage is always a complete symbol from 3–4 edges earlier; every IF sample is exact; it counts BPSK bits, the four QPSK symbols, switches both ways, dropped half pairs, 180° flips and accumulator wraps, and fails if any of them never happened |
| `tb_psk_workloads` | the reference runs (BPSK 0,1,0,1 and QPSK 00,01,10,11 at 100 MHz/10 MHz): IF against the ideal unquantised equations, and each symbol's carrier phase measured by correlation to within 3° (measured errors are below 2°) |

To run one with Verilator (from the repository root, package first):

```
verilator --binary --timing --assert -Irtl --top-module tb_psk_modulator \
    rtl/psk_pkg.sv tb/tb_psk_modulator.sv \
    rtl/symbol_mapper.sv rtl/word_sync.sv rtl/dds_phase_accumulator.sv \
    rtl/dds_sincos_lut.sv rtl/dds.sv rtl/iq_output_stage.sv rtl/psk_modulator.sv
./obj_dir/Vtb_psk_modulator
```

Each testbench runs in well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/psk_pkg.sv rtl/psk_modulator.sv`. The
only warning left is that the table ignores the low 23 phase bits, which is
the quantiser's intent.
