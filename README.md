# SFET2 / SFEA2 time-of-flight front-end logic

This repository contains the digital logic of the scintillator front-end boards
for a time-of-flight (TOF) system. It follows the SFET2/SFEA2 specification.
Each SFET2 board serves five TOF counter channels and does three jobs:

* **Trigger signals.** It tells the pre-trigger (SPT2) quickly that a counter
  was hit. This uses two fixed-length logic pulses per channel: HT (high
  threshold) and SHT (super-high threshold).
* **Time measurement.** It measures the time of every low-threshold (LT)
  crossing with an HPTDC (the CERN high-performance TDC). A fast trigger (FT)
  selects the hits that fall in a *history window* around it, from 10 µs
  before the FT to 6 µs after.
* **Charge measurement.** It integrates each pulse, holds the result and
  digitises it with serial ADCs.

SFEA2 is the same board with four anticoincidence (ACC) channels and no
HT/SHT sums. One crate holds four SFET2 boards (a–d) and one SFEA2, so 20 TOF
and 4 ACC inputs. Each board sends its words to the DAQ board SDR2 on its own
link, numbered 1–5.

The comparators, DACs, shapers, ADCs and the HPTDC itself are analog parts or
bought chips. They appear here as ports. Behavioural models of the HPTDC, its
JTAG port and the serial ADC are provided for simulation.

## Signal path of one board

```
 LT[4:0] ──────────────────────────────► TDC ch 0..4 ┐
 FT ───────────────────────────────────► TDC ch 5    │
 HT[4:0] ──► trigger_fpga ─► HT  250 ns ─► SPT2      │  tdc_input_map
          └────────── OR ──────────────► TDC ch 6    │  (combinational)
 SHT[4:0] ─► trigger_fpga ─► SHT 250 ns ─► SPT2      │
          └────────── OR ──────────────► TDC ch 7    ┘

 sfet2_fpga (40 MHz):
   FT ─► edge_catcher ─► ft_trigger_delay ─► HPTDC trigger
                     └─► charge_readout ─► sample / adc_en / adc_clk ─► charge
   HPTDC serial ─► hptdc_serial_rx ─► tdc_word_formatter ─┐
   temperature (latched at FT) ─► temperature word ───────┴─► word_fifo ─► 26-bit words
   tdc_init_seq ─► jtag_master ─► HPTDC JTAG, reset; 10 ms PLL wait ─► tdc_ready

 tof_crate: 5 × board  ─► 5 × sdr2_link_packer ─► 16-bit raw event words, link 1..5
```

All logic runs on one 40 MHz clock (25 ns). Inputs from the comparators and
the FT are asynchronous to it.

## HT/SHT pulse forming (`pulse_former`, `trigger_fpga`)

An HT or SHT comparator output can be as short as 7–8 ns, which is less than
one clock period. Sampling it would miss hits. `edge_catcher` therefore lets
the comparator edge itself clock a capture flip-flop. The capture passes
through a two-stage synchroniser and is then cleared, which gives one clock
pulse per edge two or three cycles after the edge.

`pulse_former` turns that pulse into a 250 ns output with a retriggerable
counter:

* A hit reloads the counter, so a hit during the pulse stretches the output
  to end 250 ns after the latest hit. This is the extension rule of the
  specification.
* Between separate pulses the output is low for at least one clock.

Two consequences of the clock come from this design, not from the
specification:

* Lengths are quantised to 25 ns.
* Hits less than about 50 ns apart merge into one.

HT and SHT have no mask.

## Time measurement and the history window

The HPTDC keeps hits in its L1 buffer. On a trigger it reads out the hits
whose time lies in a match window that starts a trigger latency before the
trigger. `ft_trigger_delay` delays the synchronised FT by `trig_delay` clock
cycles before it becomes the HPTDC trigger. The delay line is a shift register
with a run-time tap, so FTs that arrive closer together than the delay are all
kept. This follows the requirement of no dead time after FT.

The crate test uses a delay of 240 cycles (6 µs), and the HPTDC is set to a
latency and match window of 640 cycles (16 µs). The window seen is then
FT − 10 µs … FT + 6 µs, which is the minimum the specification asks for. The
delay and the HPTDC settings are run-time choices. Change `trig_delay` only
when no FT is in flight: pulses already in the line would otherwise leave at
the new tap.

On each board the HPTDC inputs are assigned as follows:

| TDC ch | SFET2 | SFEA2 |
|---|---|---|
| 0–4 | LT of channels 1–5 | ACC 1–4 on 0–3; ch 4 unused |
| 5 | FT | FT |
| 6 | OR of the five HT (optional, `SUM_HT_EN`) | off |
| 7 | OR of the five SHT (optional, `SUM_SHT_EN`) | off |

The sums let offline analysis tell a real particle from an LT noise glitch:
the glitch has no matching HT hit. These sums are recorded in the HPTDC
history as well.

## Word formats

**HPTDC word, 32 bits.** The layout is assumed (see below):
`[31:28]` type, `[27:24]` TDC id, `[23:21]` channel, `[20:0]` time.

* Type 0100 is a leading edge and 0101 a trailing edge.
* Type 0110 is an error word, which is counted in `tdc_errors`.
* All other words are dropped.

**Board output word, 26 bits.**

* time word: `{0, S, chan[2:0], inter[1:0], edge_time[18:0]}`. S = 1 marks a
  trailing edge. Bits 23:0 are the HPTDC's channel and time.
* temperature word: `{2'b10, 8'h00, temperature[15:0]}`.

For each FT the temperature word is sent first, then the event's time words.
The output buffer (`word_fifo`, 16 words) has a valid/ready handshake. Words
that arrive while it is full are counted in `lost_words`.

**SDR2 raw event words, 2 × 16 bits, most significant first.**

* `word0 = {0, link[2:0], fpga[23:12]}`
* `word1 = {S, link[2:0], fpga[11:0]}`

Links are SFET2a–d = 1–4 and SFEA2 = 5. A temperature word thus puts
temperature bits 15–12 in word0 and bits 11–0 in word1. Bit 25 of the board
word is not carried, because the temperature words are recognised by their
place at the head of each board's event.

## HPTDC bring-up (`tdc_init_seq`, `jtag_master`)

After reset, or when `tdc_reinit` is pulsed, `tdc_init_seq` runs these steps:

1. It holds the HPTDC reset.
2. It loads the `SETUP_LEN`-bit setup register through JTAG.
3. It loads the register a second time and compares the bits shifted out with
   the bits shifted in. A difference sets `cfg_error`.
4. It releases the reset and waits `PLL_INIT_CYCLES` = 400 000 cycles, the
   10 ms the PLL needs.
5. It sets `tdc_ready`.

`jtag_master` performs one IEEE 1149.1 operation per start:

* It walks Test-Logic-Reset, loads the instruction register, then shifts the
  data register LSB first and captures TDO.
* TCK runs at half the system clock.
* An operation takes 2·(16 + IR_LEN + dr_len) + 1 cycles.

The instruction length (5), the setup instruction code and the length of the
setup chain (647) are parameters. They are assumed values, since the HPTDC
register map is outside this design.

## Charge readout (`charge_readout`)

The shapers integrate continuously.

* **Hold.** `sample` rises 68 cycles (1.7 µs) after the FT, which ends the
  sensitive interval at FT + 1.7 µs. It holds the shaper outputs.
* **Conversion.** `adc_en` rises at the same time. `adc_clk` (clk/2) then
  clocks in 12 bits per channel, MSB first, one data line per ADC. The ADC
  changes its data on the falling edge, and the FPGA samples at that same
  edge.
* **Result.** `charge_valid` follows 68 + 2·12 + 2 cycles after the FT.

Twelve bits cover the required range: 50 MIP at 60 counts per MIP is 3000
counts. An FT that arrives during a conversion gets no charge measurement and
is counted in `missed_charge`. The time data is not affected.

## Deviations from the specification and open points

These are this design's choices:

* The HPTDC word type codes and the board's temperature flag are assumed.
  The meaning of S (here: trailing edge) is assumed too.
* The HPTDC serial protocol is assumed:
  * a start bit of 1, then 32 bits MSB first;
  * one bit per 40 MHz clock;
  * no strobe.

  A real HPTDC link needs this receiver adapted.
* The event words leave each board on a 26-bit valid/ready parallel
  interface. The charges are presented in parallel with a one-cycle valid
  strobe. The physical protocols of both links to SDR2 are not defined here.
* The FT-to-trigger delay is adjustable in 25 ns steps. Its default use is
  240 cycles.
* The HPTDC dead time, L1 depth, latency and match window are settings of the
  chip, not of this logic.

These parts are not implemented:

* Threshold DACs and their programming, and the clock to the shapers.
* Redundancy: duplicated FPGAs, thresholds and charge channels. How the
  copies would be selected is not defined.
* HPTDC status-register polling. Only the setup readback check is done.
* The SDR2 board and SPT2 trigger logic, which are other boards.

The channel-to-counter tables of the upper and lower crates are cabling only.
For example, SFET2a of the upper crate carries counters 201/203/205/207 on
channels 1–4 and leaves channel 5 unused. In the lower crate, channel 5 of
SFET2c/d carries counters 309/310, whose trigger outputs are T17/T18.

## Files

* `rtl/sfet2_pkg.sv`: shared widths, word types and packing functions.
* `rtl/tof_crate.sv`: the top, with five boards and five link packers.
  External parts are ports indexed by board (0–3 = SFET2a–d, 4 = SFEA2).
* `rtl/sfet2_board.sv`, `rtl/sfet2_fpga.sv` and the blocks named above.
  `edge_catcher` and `word_fifo` are helpers.
* `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/hptdc_model.sv`: a behavioural HPTDC. It timestamps edges at 4 counts
  per clock and answers a trigger with the hits of its match window over the
  serial link. It can inject error words.
* `tb/jtag_tap_model.sv` and `tb/serial_adc_model.sv`: models of the HPTDC
  TAP and of a serial ADC.

`tb_tof_crate` runs the whole crate at the default parameters, including the
full 10 ms PLL wait. It runs through these steps:

1. JTAG bring-up of all five HPTDCs.
2. HT/SHT pulses and their extension.
3. Sums on channels 6/7.
4. An FT with hits inside and outside the history window.
5. Charge readout on all boards.
6. DAQ back-pressure until the output buffer overflows.
7. An HPTDC error word.
8. An FT during a conversion.

It counts each of these mechanisms and checks every raw event word against
the expected stream.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sfet2_pkg.sv tb/tb_tof_crate.sv --top-module tb_tof_crate
./obj_dir/Vtb_tof_crate
```

Replace `tb_tof_crate` with any other testbench name to test a single block.
The block-level testbenches shorten the setup chain and the PLL wait, and
the JTAG and charge tests use their own register and ADC lengths. The
SFEA2 variant is tested through `tb_tdc_input_map`, `tb_sdr2_link_packer`
(link 5) and the crate test. The crate test changes no parameter of the
design.
