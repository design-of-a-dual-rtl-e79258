# FPGA co-processor for a two-processor Holter ECG recorder

A Holter recorder is a portable ECG recorder worn for hours or days.
Its signal is weak, in the 0.05–5 mV range, and it is buried in two kinds of
noise:

- slow baseline wander from breathing and electrode movement;
- fast noise from muscles and mains pick-up.

This design splits the recorder between two processors. An STM32
microcontroller runs the recorder: keys, LCD plot and SD-card storage. An
FPGA reads the ADC and cleans the signal with a stationary Haar wavelet
filter. The filter removes baseline wander by subtracting a deep wavelet
approximation. This is a *wavelet transform scale-factor estimate*, or WTSE:
one high-level sub-band is used as the estimate of the low-frequency noise.
The filter then suppresses fast noise by thresholding the fine detail bands
before it rebuilds the signal. The microcontroller fetches the cleaned
signal over its FSMC parallel memory bus, as if the FPGA were an SRAM.

This repository holds the FPGA side as synthesizable SystemVerilog. It also
holds self-checking testbenches with behavioural models of the ADC and of
the STM32 bus.

```
 ECG amp ─► TLC1549 ─serial─► tlc1549_ctrl ─► pingpong_buffer ─► swt_wtse_filter ─► frame RAM ─► fsmc_slave ◄─FSMC─► STM32
            (10-bit ADC)        (CS/CLK/DOUT)    (RAMA / RAMB)     (8+4 level SWT,               (registers,
                                                                    WTSE, RAM1-RAM4)              frame window)
```

## The de-noising filter (`swt_wtse_filter`)

### Transform

The filter uses the undecimated (stationary, "à trous") Haar transform.
Sub-bands are never down-sampled. Instead, the two Haar taps at level *j* sit
2^j samples apart. Every level therefore keeps the full frame length and
stays aligned with the input sample by sample. This costs memory, but the
signal rebuilds without the block artefacts that a decimated transform
produces. Each step needs only an add or a subtract and a shift, with no
multiplier. The filters are scaled by 1/2 rather than 1/√2, so every level
stays inside the 10-bit input range:

```
A_{j+1}[n] = floor((A_j[n] + A_j[n-2^j]) / 2)        (haar_analysis)
D_{j+1}[n] = floor((A_j[n] - A_j[n-2^j]) / 2)
```

The inverse averages the two estimates of each sample that an undecimated
transform provides, with a soft threshold `T` on the details:

```
A_j[n] = floor((A_{j+1}[n] + T(D_{j+1}[n]) + A_{j+1}[n+2^j] - T(D_{j+1}[n+2^j])) / 2)   (haar_synthesis)
T(d)   = sign(d) * max(|d| - thr_j, 0)
```

With every threshold at zero, the inverse undoes the forward step to within
1 LSB per level.

### The 17 passes over a frame

The filter works on frames of `N` = 1024 samples, about 2.8 s at
360 samples/s. A frame is processed in 17 passes. Each pass streams the whole
frame, one sample per clock. Indices wrap around inside the frame, which is
the usual periodic extension of a block SWT.

| pass  | operation | reads | writes |
|-------|-----------|-------|--------|
| 1–8   | eight-level decomposition; only the approximations are kept | x (input bank), then W0/W1 | W0/W1 alternately; A_8 ends in W1 |
| 9     | WTSE: `c[n] = x[n] − A_8[n+128]` removes the baseline | x, W1 | W0; the input bank is released |
| 10–13 | four-level decomposition of `c` | W0/W1 | A_j in W0/W1; D_1..D_4 in RAM1–RAM4 |
| 14–17 | four-level reconstruction with thresholds THR4..THR1 | W0/W1, RAM4..RAM1 | W1/W0; the last pass writes the output frame RAM |

Notes on the passes:

- A_8 is a 256-sample moving average, about 0.7 s at 360 Hz. It follows the
  baseline but not the QRS complex, so `c` is the ECG with its drift and
  DC offset removed.
- The eight causal averaging levels delay A_8 by 127.5 samples. The WTSE
  pass therefore reads it 128 samples ahead, which centres the estimate
  on x[n]. Without this correction, a 0.5 Hz wander comes out almost
  unattenuated, because the late copy is subtracted with a large phase
  error.
- The four thresholds are registers. Raise them to remove more fast noise.
  The defaults (6, 4, 2, 0 LSB) are mild.
- Each pass takes N + 1 clocks: N reads plus one clock to drain the
  one-stage read pipeline. A frame therefore takes 17·(N+1) = 17,425 clocks,
  which is 0.7 ms at 25 MHz. About 71 million clocks pass between frames,
  so the filter is idle more than 99.9 % of the time.

### Pipeline details

- All RAMs have registered reads.
- In every pass, all read ports get the same two addresses: `n`, and
  `n − 2^j` (analysis) or `n + 2^j` (synthesis, and `n + 128` in the WTSE
  pass).
- The data come back one clock later. The combinational datapath then
  writes the result at address `n` in that same clock.
- The one-clock drain at the end of each pass makes sure that the next pass
  reads what the last one wrote.

### Output hold-off

Before the last reconstruction pass, the filter waits until `out_free` is
high, that is, until the processor has acknowledged the previous output
frame. A slow processor therefore never sees a frame change while it is
reading it.

Samples are carried as 16-bit two's complement (`holter_pkg::sample_t`). The
output is signed, because the baseline has been removed.

## Acquisition (`tlc1549_ctrl`)

The TLC1549 is a 10-bit SAR ADC with a three-wire serial interface.

1. Every `SAMPLE_PERIOD` clocks (69,444 at 25 MHz, so 360 Hz), the
   controller pulls CS low.
2. It waits `CS_SETUP` clocks (1.44 µs).
3. It gives ten I/O clocks of `CLK_HALF` = 13 clocks per phase
   (about 0.96 MHz). It samples DATA OUT just before each rising edge.
4. The tenth falling edge starts the next conversion. The controller then
   raises CS and waits `CONV_CYCLES` clocks (21 µs).

The word read in one cycle comes from the conversion started in the cycle
before. The first word after enable is therefore stale and is dropped.

## Double buffering and flow control (`pingpong_buffer`)

Two banks, RAMA and RAMB, of `N` samples each alternate between the two
sides:

- A write selector fills one bank from the ADC.
- A read selector presents the older full bank to the filter through two
  read ports.

The filter releases the bank after pass 9. Between them, the bank exchange
and the output hold-off give three levels of slack:

1. The processor may be up to about one frame time late with its
   acknowledge before anything backs up.
2. After that, the filter stalls with a finished frame.
3. If both banks then fill, new samples are dropped and the sticky STATUS
   overrun bit is set. The frames already buffered stay intact. The next
   frame the processor receives is then built from samples with a gap in
   them.

## Processor interface (`fsmc_slave`)

The FPGA sits on an FSMC chip select in asynchronous SRAM mode 1, 16 bits
wide, with separate address and data pins. The address pins carry
half-word addresses. The FSMC data bus is split into `fsmc_d_in`,
`fsmc_d_out` and `fsmc_d_oe`; the tristate pad is outside the top. The
FPGA drives the bus only while NE and NOE are both low.

When `a[10]` is 1, `a[9:0]` addresses word *n* of the de-noised frame.
When `a[10]` is 0, the address selects a register:

| addr | name   | access | meaning |
|------|--------|--------|---------|
| 0    | CTRL   | RW | bit 0: acquisition enable |
| 1    | STATUS | R  | bit 0: frame ready; bit 1: filter busy; bit 2: overrun (sticky) |
| 2    | ACK    | W  | bit 0: frame consumed (clears "frame ready"); bit 2: clear overrun |
| 3    | FRAMES | R  | frames completed, modulo 2^16 |
| 4–7  | THR1–THR4 | RW | soft thresholds of detail levels 1–4, in ADC LSBs |
| 8    | ID     | R  | 0xEC61 |

Only `a[3:0]` is decoded in the register region. The nine registers
therefore repeat every 16 half-words, and offsets 9–15 read as zero.

The intended processor loop has four steps:

1. Write the thresholds and set `CTRL = 1`.
2. Poll STATUS until bit 0 is set.
3. Read the 1024 frame words, store them and plot the newest 200.
4. Write `ACK = 1`.

Bus pins are synchronised into the FPGA clock with two flip-flops. A write
is committed when the synchronised NWE is seen rising. Read data are valid
four FPGA clocks after the address changes. With a 72 MHz HCLK and the
25 MHz FPGA clock, the FSMC timing must meet three limits:

- ADDSET ≥ 4 HCLK, so that NWE is high for at least one FPGA clock;
- write DATAST ≥ 8 HCLK;
- read ADDSET + DATAST ≥ 15 HCLK. The bus model in the testbenches uses
  4 + 18.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `holter_fpga_top` | `FRAME_LEN` | 1024 | frame length (power of two, ≥ 16) |
| | `SAMPLE_PERIOD` | 69444 | clocks per sample (360 Hz at 25 MHz) |
| | `ADC_CLK_HALF`, `ADC_CS_SETUP`, `ADC_CONV` | 13, 36, 525 | ADC serial timing in clocks |
| `holter_pkg` | `DW` | 16 | internal sample width |
| | `BASE_LEVELS`, `DEN_LEVELS` | 8, 4 | decomposition depths |
| | `THR1_DEF`..`THR4_DEF` | 6, 4, 2, 0 | reset values of the thresholds |

If you change the number of levels, also change the pass sequencing in
`swt_wtse_filter`. The work-RAM ping-pong assumes an even `BASE_LEVELS`, and
there is one detail RAM per `DEN_LEVELS` level.

**Resources at the defaults.**

- Memory: 135,168 RAM bits. This is 2 × 1024 × 10 for the input banks,
  plus 7 × 1024 × 16 for two work RAMs, four detail RAMs and the output
  RAM. It is about half of the 276 kbit of block RAM in an EP4CE6
  Cyclone IV.
- Arithmetic: no multipliers; the datapath needs only adders.

## Files

- `rtl/holter_pkg.sv`: widths, sample type, register map, default thresholds.
- `rtl/sdp_ram.sv`: RAM with one write port and two registered read ports.
  Every buffer is one of these.
- `rtl/haar_analysis.sv`, `rtl/haar_synthesis.sv`: the two combinational
  wavelet steps.
- `rtl/swt_wtse_filter.sv`: the 17-pass sequencer, its RAMs and the datapath.
- `rtl/tlc1549_ctrl.sv`, `rtl/pingpong_buffer.sv`, `rtl/fsmc_slave.sv`.
- `rtl/holter_fpga_top.sv`: the top.
- `tb/*_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/swt_ref_pkg.sv`: an integer software model of the whole filter, plus a
  synthetic ECG generator.
- `tb/tlc1549_model.sv`: ADC model. It checks CS set-up and conversion time.
- `tb/stm32_fsmc_model.sv`: STM32 FSMC bus model with `write16` and `read16`
  tasks.

## Simulating

Any testbench builds the same way with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/holter_pkg.sv tb/swt_ref_pkg.sv tb/holter_fpga_top_tb.sv \
  --top-module holter_fpga_top_tb -Mdir obj
./obj/Vholter_fpga_top_tb
```

The testbenches:

- `holter_fpga_top_tb` runs six frames end to end at reduced sizes
  (256-sample frames, 200-clock sample period). It checks every word the
  processor model reads against the software model. The processor
  deliberately acknowledges one frame three frame-times late, so the test
  sees the bank exchange, the output hold-off and input overrun. It counts
  each of them and fails if one never happens. It runs in well under a
  second.
- `holter_fpga_top_full_tb` uses the top at its default parameters. It
  acquires one full 1024-sample frame at 360 Hz from the ADC model (about
  71 million clocks), filters it and reads it out over the bus. It also
  checks the filter time of 17·(N+1)+1 clocks and the sample period. It
  runs in about 30 s.
- `denoise_quality_tb` measures the filter on a synthetic 360 Hz ECG
  (75 beats/min). The ECG carries a 0.5 Hz, ±150 LSB baseline wander and
  ±14 LSB uniform noise.
  - The wander falls from 108 to 26 LSB rms. A 256-sample average passes
    about 80 % of a 0.5 Hz wave, so the remaining part is the limit of
    eight levels.
  - Against the noise-free output, the noise left falls from 8.5 LSB rms
    with zero thresholds to 4.4 LSB with the default thresholds and 4.0 LSB
    with 16/10/6/2.
  - The R peaks keep their height within 10 %.
- `swt_wtse_filter_tb` runs the filter alone at N = 1024 on three frames.
  Its checks:
  - exact match with the software model;
  - a frame time of 17·(N+1) clocks;
  - the output hold-off;
  - with zero thresholds, output within 4 LSB of the baseline-free signal `c`;
  - removal of a ramp baseline.

## How far to trust it, and what is this design's own

**Taken from the original design description** (the paper "Design of a
dual-core Holter System Based on STM32 and FPGA"):

- the STM32 + FPGA split, the FSMC link and the enable from the processor;
- the FPGA operating a TLC1549 10-bit serial ADC from a 25 MHz clock;
- two alternating input RAMs;
- a stationary Haar transform with up-sampled two-tap filters;
- eight decomposition levels feeding a WTSE baseline removal;
- four decomposition levels with the details stored in RAM1–RAM4;
- four reconstruction levels;
- the FPGA waiting until the processor is ready before sending data.

**Chosen here**, because the description does not give it:

- **WTSE:** the WTSE step is implemented as subtraction of the level-8
  approximation, with the 128-sample delay compensation.
- **Detail de-noising:** detail de-noising is soft thresholding with
  programmable per-level thresholds. The default thresholds are arbitrary
  and were not tuned on real ECG.
- **Arithmetic:** the 1/2 filter scaling and the averaging inverse.
- **Framing:** block processing with wrap-around at the frame edges. The
  first and last ~128 samples of a frame mix with the other end of the
  frame through the deep baseline levels. A streaming version with
  overlapping frames would avoid this.
- **Sizes and rates:** frame length, 360 Hz sample rate and all ADC timings.
  The ADC timings come from the TLC1549 data sheet.
- **Bus:** the register map, the ACK hand-shake and the overrun policy, and
  the bus timing requirements.

**Verification:** the filter has been checked bit for bit against an
independent integer model. Its de-noising has been measured on synthetic
signals only. It has not been
run on MIT-BIH records or on hardware. Each testbench has also been run
against a deliberately broken copy of its module, and it failed there.

**Not included**, because these parts are not logic in the FPGA:

- the analog front end: AD620 instrumentation amplifier, TLV2254 followers,
  right-leg and shield drive;
- the STM32 firmware (LCD, SD card, keys, GSM module);
- the FPGA's PLL, external SDRAM and configuration flash, for which the
  description gives no use in the signal path.
