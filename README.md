# Pipelined additive sound synthesizer

This is an audio synthesizer that builds each output sample as the sum of up to
256 independent sinusoids (partials). Each partial has its own amplitude A,
frequency F and phase Φ, and any of these may change between two output
samples. So the output can be any signal in the audible band, which makes the
synthesizer usable as the decoder of a parametric (sinusoidal) audio codec.

The design does not instantiate 256 oscillators. It uses **one** sine generator,
pipelined and time-shared. In every clock it takes the parameters of the next
partial and produces one partial sample. At 256 partials and a 48 kHz output
rate, the clock is 256 × 48 000 = **12.288 MHz**. That is also the standard
256·fs audio master clock, so the I²S output can run from the same clock.

Around the synthesizer sits a small runtime system. Parameters come from a
computer over a serial (RS232/UART) link. They are written into three parameter
memories, one each for amplitude, frequency and phase. The output samples go
out over I²S to a stereo D/A converter.

```
 uart_rxd ─► uart_rx ─► ctrl_fsm ─┬─► param_ram (A)  ─┐
                                  ├─► param_ram (F)  ─┼─► synthesizer ══ async_fifo ══► i2s_tx ─► bclk/lrck/sdata
                                  └─► param_ram (Φ)  ─┘   (clk domain)               (mclk domain)
```

## How one partial sample is computed

### Position in the period

A sine period is addressed by a 19-bit **position**, where one full period is
2^19 units. The position splits into three fields:

| bits   | field   | meaning                                     |
|--------|---------|---------------------------------------------|
| 18:17  | quarter | Q1..Q4 of the period                        |
| 16:8   | index   | entry of the 512-entry quarter table        |
| 7:0    | weight  | interpolation weight between two entries    |

Each partial k keeps an accumulated position p[k] in a 256 × 19-bit memory
inside `position_calc`. For every output sample:

```
sample position = (p[k] + Φ[k]) mod 2^19
p[k]           <= (p[k] + F[k]) mod 2^19
```

The modulo is the natural wrap of the 19-bit adder. The output frequency is
therefore f = F · 48 000 / 2^19 Hz. For example, F = 2^17 is 12 kHz, a quarter
period per sample: a 12 kHz partial of zero phase gives 0, +peak, 0, −peak.
Φ is a fixed phase offset in the same units, so Φ = 2^17 is 90°. The position
memory is cleared by a 256-cycle sweep after reset, and no partial is issued
until the sweep is done.

### Quarter symmetry

Only the first quarter of the sine is stored. With m the position inside the
quarter (17 bits) and Q = 2^17 a quarter period:

| quarter | value         | table position used | sign |
|---------|---------------|---------------------|------|
| Q1      | sin(m)        | m                   | +    |
| Q2      | sin(Q − m)    | 2^17 − m            | +    |
| Q3      | −sin(m)       | m                   | −    |
| Q4      | −sin(Q − m)   | 2^17 − m            | −    |

The mirrored position 2^17 − m can equal 2^17, which is exactly π/2. That point
lies one entry beyond the table. It is encoded as "last entry, full weight":
index 511 with weight 256. For this reason the weight is 9 bits wide
(0 to 256), not 8.

### Two tables for two neighbours

Linear interpolation needs the entry at the index and the entry after it. The
design reads them in one cycle from two read-only tables, both 512 × 16 bits:

* table A (`rtl/sine_rom_a.hex`): entry i = round(65535 · sin(i · π/1024)), for i = 0 … 511
* table B (`rtl/sine_rom_b.hex`): entry i = round(65535 · sin((i+1) · π/1024)), for i = 0 … 511

Table B is table A shifted by one entry. One address therefore gives both
neighbours, and the last B entry is sin(π/2) = 65535, so no 513th entry is
needed. To change the table resolution, regenerate both files from these
formulas and change `ROM_AW` in `synth_pkg`.

### Interpolation, amplitude, sign

```
mag = 256·a + (b − a)·w          24 bits unsigned (16 integer + 8 fraction bits)
s   = ±(mag · A) >> 16           25 bits signed; A is an unsigned 16-bit fraction (A/65536)
```

Full scale of `mag` is 65535 · 256 = 16 776 960, so a partial at A = 65535 swings
about ±2^24. The frame sum is accumulated at 25 + log2(N) bits. It is then
saturated to the 25-bit output. A sum beyond ±2^24 clips, and the sticky
`clipped` flag records it. Keeping ΣA ≤ 65536 guarantees no clipping.

## The frame pipeline

A **frame** is one output sample. In a frame the issue counter in `synthesizer`
walks k = 0 … N_COMP−1, one partial per clock. The partial index is the read
address of the parameter memories. Side information travels down the pipeline
in delay lines: valid, sign, amplitude, and the first and last markers.

| cycle after issue | stage |
|---|---|
| 0  | partial k issued; parameter memories and position memory read |
| 1  | A, F, Φ available; p[k] + F written back; p[k] + Φ registered |
| 2  | quarter decoded, mirrored, split into index and weight |
| 3  | table address registered |
| 4  | two table entries available |
| 5–7 | interpolation (difference, product, sum) |
| 8–9 | amplitude product, sign |
| 10 | accumulation (first replaces the sum, others add) |
| 11 after the last partial | frame sum written to the FIFO |

So a frame takes N_COMP clocks, and frames follow each other with no gap. The
first output sample appears N_COMP + 10 clocks after `run` rises. A partial is
read and written back once per frame. Its position memory therefore never sees
a read-after-write hazard, as long as N_COMP ≥ 2.

**Flow control.** A frame starts only if `run` is high and the output FIFO can
take the frames already in the pipeline plus this one. Otherwise the start of
the frame waits, and `stall` is high while it does. The generator never pauses
inside a frame.

**Parameter updates.** Each partial's parameters are read once per frame, in its
issue cycle. A write reaches the first frame whose read of that partial comes
after it. So parameters may be rewritten while frames run back to back, and
every output sample can have its own parameters.

## Runtime system

**Serial commands (`uart_rx`, `ctrl_fsm`).** The link is 8N1, LSB first, with
`CLKS_PER_BIT` = 107 clocks per bit (115 200 baud at 12.288 MHz). A parameter
write is five bytes:

```
0x80 | sel     sel: 0 = amplitude, 1 = frequency, 2 = phase
index          partial number 0..255
v[23:16] v[15:8] v[7:0]   value, most significant byte first
```

Only the low 16 bits (A) or 19 bits (F, Φ) are kept. While the FSM waits for a
header it ignores bytes with bit 7 clear and the header 0x83. If a byte is
lost, four zero bytes bring the FSM back to waiting for a header. This may
complete one write with a wrong value, which the sender should then repeat.
Bytes with a framing error are dropped. There is no reply channel.

**Parameter memories (`param_ram`).** These are simple dual-port RAMs with a
synchronous read and zero initial contents. A partial that was never written
stays silent.

**Output FIFO (`async_fifo`).** This is a 16-entry dual-clock FIFO with
Gray-coded pointers. The synthesizer writes on `clk`, and the I²S side reads on
`mclk`. On the intended board both are the same 12.288 MHz clock. They are kept
separate so that a reader on an unrelated clock works too. The read side is
first-word fall-through.

**I²S (`i2s_tx`, `sync_fifo`, `i2s_serializer`).** A 4-entry FIFO pulls from
the output FIFO. The serializer sends Philips-format I²S:

* BCLK is MCLK/4, with two 32-bit slots per frame. At 12.288 MHz that gives 48 kHz.
* The 25-bit sample is sent MSB first and left-justified, padded with seven zeros.
* The MSB comes one BCLK after the LRCK edge. Data changes on the falling edge of BCLK.
* The mono sample goes to both the left and the right slot.
* If no sample is waiting at the start of a frame, the frame is sent silent, and the sticky `underflow` flag is set.

Top-level ports of `synth_system`:

| port | dir | meaning |
|---|---|---|
| clk, rst_n | in | synthesizer clock and active-low asynchronous reset |
| uart_rxd | in | serial line from the computer, idle high |
| run | in | enables frame generation; checked at frame boundaries |
| mclk, mrst_n | in | I²S master clock (256·fs) and its reset |
| i2s_bclk, i2s_lrck, i2s_sdata | out | to the D/A converter |
| frame_count | out | output samples produced (clk domain) |
| stall | out | a frame is waiting for FIFO room |
| clipped | out | sticky: a frame sum saturated |
| underflow | out | sticky (mclk domain): an I²S frame found no sample |

## Accuracy

A full-amplitude partial was stepped through one quarter period in 2048 samples
and compared sample by sample with the ideal sine. The worst error was about 136
LSB of 2^24, which is a per-sample peak SNR of 101.8 dB, taken as
20·log10(2^24 / |error|). The error is set mainly by rounding the 16-bit table
and by the linear interpolation between entries spaced π/1024 apart. A denser
table (larger `ROM_AW`) reduces it.

The published figure for this architecture is a minimum of 86.02 dB. Its PSNR
definition and table contents are not known, so the two numbers are not
strictly comparable.

## Where this implementation makes its own choices

These points follow the published description of the architecture:

* one pipelined, time-shared generator producing one partial sample per clock
* 256 partials, a 48 kHz output rate and a 12.288 MHz clock
* a 512-entry quarter table of 16-bit samples, read from two ROMs
* quarter symmetry
* linear interpolation to 24 bits
* amplitude and sign giving 25 bits
* an accumulator cleared per output sample
* an output FIFO toward unsynchronized modules
* the runtime chain: UART, control FSM, three parameter RAMs, synthesizer, I²S with FIFO and serializer

The following are this implementation's choices:

* **Position and parameter formats.** The 19-bit position with an 8-bit weight, F as a phase step, Φ as a constant offset added to the accumulated position, and A as a 16-bit fraction.
* **Table contents.** The table formula above, and the split into a table and a one-entry-shifted copy.
* **Pipeline depth.** It is 10 stages to the accumulator. The original generator is described as taking over 20 clocks per partial sample. Throughput is the same.
* **Overflow rule.** The wide accumulator with saturation.
* **Flow control and status.** The frame-boundary stall, and the run, stall, clipped, underflow and frame_count signals.
* **Serial link.** The baud rate, the frame format and the five-byte command protocol.
* **Clocking and I²S.** The separate I²S clock domain, the FIFO depths, and the I²S variant, slot width and mono-to-stereo duplication.
* **Reset.** Reset behaviour, including the clearing sweep of the position memory.

The design has not been mapped to an FPGA here. Generic synthesis of the whole
runtime top gives about 530 flip-flop bits. It has two multipliers (17 × 10 and
24 × 16 bits) and the two 512 × 16 tables. The per-partial position memory
(256 × 19) and the three parameter memories are inferred as RAM. The RS232 level
shifter and the D/A converter are off-chip parts and are not included.

## Files

| file | content |
|---|---|
| `rtl/synth_pkg.sv` | shared widths, the parameter-triple struct `synth_par_t`, quarter and selector enums |
| `rtl/synth_system.sv` | top: runtime system |
| `rtl/synthesizer.sv` | frame sequencing, pipeline, flow control, output FIFO |
| `rtl/position_calc.sv` | per-partial position memory, quarter mapping |
| `rtl/sine_rom.sv`, `rtl/sine_rom_a.hex`, `rtl/sine_rom_b.hex` | quarter tables |
| `rtl/interpolator.sv` | linear interpolation |
| `rtl/amp_sign.sv` | amplitude scaling and sign |
| `rtl/accumulator.sv` | frame sum with saturation |
| `rtl/async_fifo.sv` | dual-clock output FIFO |
| `rtl/param_ram.sv` | parameter memory |
| `rtl/uart_rx.sv`, `rtl/ctrl_fsm.sv` | serial receiver and command decoder |
| `rtl/i2s_tx.sv`, `rtl/sync_fifo.sv`, `rtl/i2s_serializer.sv` | I²S output |
| `rtl/delay_line.sv` | register chain for pipeline side information |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_synth_system.sv` | end-to-end test at 8 partials: serial writes, stall, parameter changes, clipping, underflow, unrelated clocks |
| `tb/tb_synth_system_full.sv` | end-to-end test at full size (256 partials, 12.288 MHz, 115 200 baud) |
| `tb/tb_workload_256.sv` | full load: all 256 partials written over the serial link, output checked bit-exact |
| `tb/tb_precision.sv` | quarter-period accuracy test at full size |
| `tb/tb_ref_pkg.sv` | bit-exact reference model computed from `$sin`, independent of the table files |
| `tb/uart_tx_model.sv`, `tb/i2s_monitor.sv` | serial sender and I²S receiver for the testbenches |

## Simulating

Run from the repository root, because the tables are loaded by the relative
paths `rtl/sine_rom_a.hex` and `rtl/sine_rom_b.hex`. Each testbench ends with a
line `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/synth_pkg.sv tb/tb_ref_pkg.sv \
  tb/tb_synth_system_full.sv --top-module tb_synth_system_full -o sim
./obj_dir/sim
```

Replace the testbench name to run another test. `tb_synth_system_full` runs the
top at its default parameters and takes a few seconds. The testbenches use
`$urandom` stimulus, and each has a watchdog.

When changing the design, keep these in step:

* the delay-line depths in `synthesizer.sv` must match the latencies of `position_calc` (3), `sine_rom` (1), `interpolator` (3) and `amp_sign` (2);
* `N_COMP` sets the clock needed for 48 kHz (N_COMP × 48 kHz);
* the serializer expects MCLK = 256·fs with `MCLK_PER_BCLK` = 4.
