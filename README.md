# DDS function generator with UART and I2C configuration

A direct digital synthesis (DDS) core turns one fixed reference clock into a
sine, square, triangle or ramp of almost any frequency. Every clock, a 32-bit
phase accumulator adds a frequency word. The top bits of the accumulator
address a sine table, and the other waveforms are built from the same
address. Frequency, phase offset, amplitude and waveform live in a small
register set. An external controller loads it over a UART or an I2C bus. The
generator also has an external trigger and can do FSK or PSK on a sine
carrier, with the modulating data coming from an input pin. Its output is one
12-bit offset-binary sample per clock, plus an inverted clock for a DAC.

At the default 100 MHz reference:

| property | value |
|---|---|
| frequency | Fout = FCR x 100 MHz / 2^32, step 23.3 mHz |
| highest useful output | about 40 MHz for sine and square, 10 MHz for triangle and ramp |
| phase offset | 10 bits (0.35 degrees) |
| output | 12 bits, offset binary: 0x000 is the minimum, 0x800 the zero line, 0xFFF the maximum |
| amplitude | 8-bit scale factor, applied about 0x800 |
| UART | receive only, 8N1, 1200 to 38400 bit/s chosen by a 4-bit input |
| I2C | slave receiver, 7-bit address 1001100, standard and fast mode |

The D/A converter and the reconstruction filter are not part of this RTL.

## Block map

```
 uart_sin ─► uart_rx ◄──uart_clk── uart_baudgen ◄── sel_baud
               │  └──reset_uclk──────────►┘
               │ data_all[112:0], soft_reset
 scl, sda ─► i2c_slave_rx ──sub-address/data──► main_ctrl ◄── fpsk_data
               ▲──────── slave address ────────┘  │ freq_reg, phase_reg
                                                  ▼
 trigger, trig_enb ─────────────────────────────► dds (+ dds_ram) ──► max_output
                                                  │ ram_addr_out          │
                                     wave_amp,    ▼                       ▼
                                     work_mode ─► wave_logic ──► wave_out, sync_clk
```

| file | role |
|---|---|
| `rtl/fgen_pkg.sv` | widths, constants, the configuration struct and the work-mode decode |
| `rtl/func_gen.sv` | top level, wiring and reset distribution |
| `rtl/dds.sv` | phase accumulator, phase offset, trigger logic, quadrant mapping |
| `rtl/dds_ram.sv` | 256 x 12 quarter-sine table |
| `rtl/wave_logic.sv` | square, triangle and ramp construction, amplitude scaling, output mux, DAC clock |
| `rtl/main_ctrl.sv` | configuration registers, UART and I2C loading, FSK/PSK switching |
| `rtl/uart_rx.sv` | start-edge detection, byte reception, packet register, soft-reset commands |
| `rtl/uart_baudgen.sv` | bit-centre receive clock |
| `rtl/i2c_slave_rx.sv` | I2C slave receiver with sub-address auto-increment |

## The phase path

This is the heart of the design, and the part whose timing matters most.

**Accumulator and address.** `acc` is 32 bits wide and adds `freq_reg` on
every clock while the generator runs. Only its top 10 bits are used. The
10-bit phase offset is added to them, modulo 1024, and the result is the table
address `ram_addr_out`. A full period therefore has 1024 points. When the
generator starts, the accumulator is zero, so the first address is the phase
offset itself. Changing the offset while the generator runs shifts the
waveform at once. That is the mechanism PSK uses, and it also causes a visible
step in the output.

**Quarter-wave table.** `dds_ram` stores one quadrant only, 256 words of
12 bits: entry i = 2048 + round(2047 x sin((2i+1) x pi / 1024)). The
half-step sampling makes the quadrant exactly mirror-symmetric. Address bit 8
mirrors the table index: in the second and fourth quadrants the low 8 bits
are inverted. Address bit 9 selects the lower half period, where the data word
is inverted (0xFFF - x). The full period thus spans 0x000 to 0xFFF with no
special cases. The table is computed at elaboration with `$sin`. No data file
is needed, and changing `LUT_AW` changes the table.

**Latency.** The table read is registered and so is the quadrant correction.
A sample therefore appears on `max_output` two clocks after its address. The
waveform logic delays the address by the same two clocks, so the square,
triangle and ramp line up with the sine. One more register after the
amplitude multiplier gives `wave_out` three clocks after the address.

**Trigger.** With `trig_enb` low, the accumulator starts on the first clock
after reset. With `trig_enb` high, it stays at zero until a rising edge on
`trigger`. Until then `max_output` and `wave_out` hold 0x800 and
`sample_valid` stays low. Once started, the generator runs until the next
reset (hard or soft); later trigger edges do nothing. `trigger` is registered
once and edge-detected. Count clock edges from the first edge that samples
`trigger` high:

| edge | what happens |
|---|---|
| 1 | trigger registered |
| 2 | run flag set, first address valid |
| 3 | table read |
| 4 | first sample on `max_output` (trigger delay 4 clocks) |
| 5 | first sample on `wave_out` |

The 4-clock budget leaves no room for a second synchroniser flop. A noisy or
truly asynchronous trigger source should be cleaned up before it reaches this
input.

## Waveforms and amplitude

`wave_logic` builds the other shapes from the (delayed) table address `a`:

| waveform | sample |
|---|---|
| sine | `max_output` from the table |
| square | 0xFFF while a < 512, else 0x000 (in phase with the sine's positive half) |
| triangle | rises 0x000 to 0xFFF over the first half period, falls over the second |
| ramp | the address itself, widened to 12 bits as `{a, a[9:8]}` |

The chosen sample is then scaled about the zero line:

    wave_out = 0x800 + ((sample - 0x800) * amplitude) >>> 8

For example, sine sample 0x864 with amplitude 0xF0 gives 0x85D. Amplitude 0
gives a flat 0x800, and 0xFF gives 255/256 of full swing. One multiplier sits
after the multiplexer. Putting one per waveform before it would give the same
numbers.

`sync_clk` is `~clk`. Samples change on the rising edge of `clk`, so a DAC
that latches on the rising edge of `sync_clk` samples in the middle of the
data eye.

Triangle and ramp change by only one step per table address. Above about
10 MHz they degrade faster than the sine and square do.

## Configuration registers and work modes

`main_ctrl` holds the register set (`fgen_pkg::cfg_t`):

| I2C sub-address | register | UART packet byte |
|---|---|---|
| 1 | amplitude (8 bits) | 1 |
| 2-5 | frequency word 1, bits 31..24, 23..16, 15..8, 7..0 | 2-5 |
| 6-9 | frequency word 2, same order | 6-9 |
| 10, 11 | phase 1: bits 9..8 (in bits 1..0 of the byte), then bits 7..0 | 10, 11 |
| 12, 13 | phase 2, same layout | 12, 13 |
| 14 | work mode (bits 4..0) | 14 |

Work mode:

| mode | waveform | frequency register | phase register |
|---|---|---|---|
| `0ssfp` | ss = 00 sine, 01 square, 10 triangle, 11 ramp | f = 0: 1, f = 1: 2 | p = 0: 1, p = 1: 2 |
| `10000` | sine, FSK | `fpsk_data` = 0: 1, 1: 2 | 1 |
| `10001` | sine, PSK | 1 | `fpsk_data` = 0: 1, 1: 2 |

Other codes with bit 4 set give a sine, using the `f`/`p` selection of bits 1
and 0. `fpsk_data` passes a two-flop synchroniser. The selected
frequency/phase pair is registered, so the DDS sees a modulation change three
clocks after the pin changes. The frequency switches phase-continuously,
because the accumulator is never reset. The phase switch is an instant jump
of (phase2 - phase1).

## Loading over the UART

`uart_baudgen` and `uart_rx` work together through two signals:

* The receiver holds `reset_uclk` high while idle. A falling edge on the
  synchronised `uart_sin` (a start bit) drops it.
* The baud generator then produces eight rising edges on `uart_clk`. The first
  comes 1.5 bit times after the start edge and the rest follow one bit time
  apart, which puts each edge in the middle of a data bit. There is no edge
  for the start or the stop bit. `sel_baud` is taken into the baud register
  only while `reset_uclk` is high. Codes 1 to 6 give 1200, 2400, 4800, 9600,
  19200 and 38400 bit/s; any other code gives no clock. One bit time is
  round(CLK_HZ / baud) clocks, for example 2604 at 38400 bit/s. These counts
  are worked out at elaboration into a 16-entry constant table, so the
  hardware is just an 18-bit counter and comparators (no divider).
* The receiver shifts the line in LSB first on each `uart_clk` edge. After the
  eighth bit it waits for the line to be high (the stop bit) and raises
  `reset_uclk` again. There is no framing or parity check.

Bytes form packets:

```
 90 | amplitude | f1[31:24] f1[23:16] f1[15:8] f1[7:0] | f2 ... | 000000,p1[9:8] | p1[7:0] | 000000,p2[9:8] | p2[7:0] | 000,mode
```

The header (decimal 90) clears the data-ready flag `data_all[112]`. The 14
bytes then shift into `data_all[111:0]`, the amplitude ending up in bits
111:104 and the mode in bits 7:0. The 14th byte sets the flag. The controller
copies the whole register set on the flag's rising edge, so a packet is
applied exactly once and does not overwrite later I2C writes.

Outside a packet, byte 0x98 holds the *soft reset* and 0x99 releases it. Other
bytes are ignored, and inside a packet these values are ordinary data. The
soft reset resets the controller (all configuration lost), the DDS, the
waveform logic and the I2C receiver. The UART blocks keep running so that the
release command can arrive. After the release, the output stays at 0x800
until a new configuration is loaded.

## Loading over I2C

`i2c_slave_rx` oversamples SCL and SDA with the system clock. It needs a clock
well above 4 MHz for fast mode; at 100 MHz there are 250 clocks per bit. A
write transfer looks like this:

```
S | 1001100 0 | A | sub-address | A | data | A | data | A | ... | P
```

Each data byte goes to the current sub-address, and the sub-address then
increments. One transfer from sub-address 1 can therefore load all 14
registers. Each write takes effect as soon as its byte is acknowledged, so a
32-bit frequency word passes through three intermediate values while its four
bytes are written. The slave acknowledges its address, the sub-address and
every data byte by pulling SDA low (`sda_drive_low`, for an open-drain pad)
for the ninth clock. It does not acknowledge other addresses or read
requests. Repeated START is supported. The address comes from the `I2C_ADDR`
parameter of the top.

## Resets and clocks

Everything runs on the single clock `clk`. All resets are synchronous and
active high. `reset` clears every block. The soft reset (see above) is ORed
in for everything except the UART path. Asynchronous inputs (`uart_sin`,
`scl`, `sda_in` and `fpsk_data`) pass two-flop synchronisers. `trigger` has
one register, as explained above.

## What follows the original design and what does not

This RTL reimplements a published DDS function generator design from its
description. It follows that description on these points: the widths, the
256 x 12 quarter-sine table, quantise-then-add-offset addressing, the 2-clock
address-to-sample and 4-clock trigger delays, the register set, the I2C
sub-address map and address, the UART packet format and 113-bit packet
register, the baud-rate table and bit-centre receive clock, the soft-reset
command bytes, and the inverted DAC clock.

Where the description is silent or self-contradictory, this design makes its
own choices:

* **Modulation mode codes.** The original mode table gives FSK and PSK the
  same two codes as two of the square-wave modes. Here they are moved to
  `10000` and `10001`.
* **Amplitude scaling.** The description says "multiply, divide by 255", but
  its worked example (0x864 at amplitude 0xF0 gives 0x85D) matches scaling
  about 0x800 with a shift by 8. The example was followed.
* **Waveform shapes.** The exact square, triangle and ramp formulas, the
  half-step table sampling and the quadrant arithmetic are this design's own.
* **Trigger.** Holding the output at 0x800 before the trigger and ignoring
  later trigger edges are this design's own choices.
* **Loading.** Loading UART packets on the flag's rising edge, and accepting
  the soft-reset commands only between packets, are this design's own
  choices.
* **Baud generator.** Silence on unused baud codes, and loading the baud code
  only between characters, are this design's own choices.
* **Synchronisers and the I2C receiver.** The synchronisers, and the
  oversampling structure of the I2C receiver, are implementation choices.
* **Multiplier count.** One amplitude multiplier replaces the original's four.

Not included: the DAC and the output filter, and any way to read registers
back.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/fg_ref_pkg.sv` holds the reference model they share: the sine of the full
phase angle, the waveform shapes and the scaling.

| testbench | covers |
|---|---|
| `tb_dds_ram` | every table word against the sine formula, read latency |
| `tb_dds` | address and sample every clock against an independent accumulator model, trigger delay of 4 clocks, first address = phase offset, reset values |
| `tb_uart_baudgen` | all six rates at 100 MHz: first edge at 1.5 bits, spacing, exactly 8 edges, high time, unused codes, restart |
| `tb_uart_rx` | packet layout, data-ready flag, soft-reset commands inside and outside packets, transmitter 2 % fast |
| `tb_i2c_slave_rx` | ACK/NACK on the bus, 14-byte auto-increment burst, foreign address, read request, standard and fast mode, repeated START |
| `tb_main_ctrl` | the two example packets, every sub-address, all modes, FSK/PSK switching and latency, reset |
| `tb_wave_logic` | every waveform over all addresses at several amplitudes, the 0x864 x 0xF0 example, DAC clock |
| `tb_func_gen` | the whole design at default parameters: UART load, trigger wait and delay, I2C loads, all four waveforms, amplitude, FSK, PSK, soft reset hold and release, free-running start; each mechanism is counted |
| `tb_fg_workloads` | the whole design: 40 MHz sine and square, 10 MHz triangle and ramp, 500 Hz sine loaded at 1200 bit/s, lowest-frequency step; output period count checked against FCR x 100 MHz / 2^32 |
| `tb_fg_spectrum` | spectral purity of the DDS: 4096-point DFT of the sine output at three frequency words with phase truncation active; spurious-free range measured at 59.3 dB, at least 57 dB required (the design target is about 60 dB for a 1024-point table) |

To run one with Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal --top-module tb_func_gen -Irtl -Itb -y rtl -y tb \
    rtl/fgen_pkg.sv tb/fg_ref_pkg.sv tb/tb_func_gen.sv
./obj_dir/Vtb_func_gen
```

`-Wno-fatal` keeps Verilator's width warnings about testbench arithmetic from
stopping the build; the RTL itself lints cleanly apart from unused-signal
notes. All testbenches run at the default parameters. `tb_func_gen` simulates
about 12 ms of 100 MHz operation, and `tb_fg_workloads` about 140 ms
(roughly 10 s of wall time).

## Changing the design

* **Reference clock.** Set `CLK_HZ` on `func_gen`. The baud divisors follow
  from it. The frequency formula keeps its form with the new clock.
* **Table size.** `LUT_AW` and `PHASE_W` in `fgen_pkg` set the table size
  (PHASE_W = LUT_AW + 2). The testbench reference functions assume 1024
  points.
* **Slave address.** Set `I2C_ADDR` on `func_gen`.
