# Digital low-level RF controller board

This is the logic of a VME board that holds the RF field of a cavity steady. The
cavity's RF signals are mixed down to an 11.9 MHz intermediate frequency (IF) and
sampled at four times that rate. From the samples the board computes the in-phase (I)
and quadrature (Q) components of the field. A fixed-point PI controller in the FPGA then
sets the I and Q inputs of the vector modulator that drives the klystron. The hard
requirements are a short loop delay (under 1 µs from sample to DAC word) and flexibility:
operating modes, cavity coupling and loop compensation all change during operation.
That is why the loop is digital and programmable.

The board has two parts:

* **The fast loop and its instrumentation**, in the FPGA (a Virtex-II). This covers IQ
  detection, calibration, vector sum, filter, PI control and feed-forward. It also has
  deep sample buffers on every ADC and on the DAC stream, which can capture transients
  and can replay stored data.
* **The board infrastructure.** A 24-bit-address, 32-bit-data local bus joins a VME
  slave interface, the DSP (as master and as slave), a 4 MB static RAM, a 1.5 MB FLASH, a configuration
  controller, and a control/status register block. That block drives the stepper-motor
  tuner, the synthesizer's SPI port, the interlock input, the turnmarker input and the
  event triggers.

All RTL is SystemVerilog in `rtl/`, and each module has a self-checking testbench in `tb/`.
The top level is `rf_board_top`.

```
 VME ──► vme_slave ─┐                        ┌─► sram       (1M x 32)
 DSP port ──────────┼─► lbus_arbiter ─decode─┼─► flash_mem  (1.5M x 8)
 config_ctrl ───────┘      (fixed priority)  ├─► csr ─► spi_master, stepper_ctrl, resets, LEDs ...
       ▲ start/source/length from csr        ├─► DSP slave port
                                             └─► fpga_core
       └─► cfg byte stream (to FPGA / DSP)         ├─ adc_buffer x4 (1M x 16 each)
                                                   ├─ dac_buffer (1M x 16 DAC + 1M x 16 LUT)
 ADC0..3 (14 bit) ─────────────────────────────────┤
                                                   └─ fast_loop ─► shared DAC bus (I, then Q)
```

## The fast loop (`fast_loop`)

All FPGA logic runs on one clock: the ADC sample clock, 4 × 11.9 MHz = 47.6 MHz. One
sample comes in per cycle on each channel. Two channels, ADC 0 and ADC 1, carry the probe
signals of two cavities that share a klystron. ADC 2 and ADC 3 (forward power and drive)
are only recorded.

| stage | module | what it does | latency |
|---|---|---|---|
| IQ detection | `iq_demod` | Over one IF period the samples are I, Q, −I, −Q. The stage pairs each two samples into (I, Q) and undoes the sign of the second half. One pair comes out every 2 cycles (23.8 M pairs/s). | 1 |
| calibration | `iq_calib` | Complex multiply by (c_re + j c_im), 18-bit coefficients with 16 fraction bits (1.0 = 0x10000). This corrects each path's gain and phase. | 1 |
| vector sum | `vector_sum` | Sum of the two calibrated probe vectors. It can be switched to one probe. | 1 |
| filter | `iq_lowpass` | First-order low-pass y += (x − y) / 2^k, with k from 0 (off) to 15. | 1 |
| PI | `pi_ctrl` | u = Kp·e + Σ Ki·e with e = set point − field, for I and Q separately. | 1 |
| output | `dac_out` | Adds the open-loop drive and the feed-forward table entry, saturates, and writes I then Q on the shared 16-bit DAC bus. | 3 (+1 for Q) |

From the edge that samples a Q value to the I word on the DAC bus is **8 clock cycles
(168 ns)**. That is well inside the 1 µs budget, and the testbench measures it.

**Fixed point.** Every stage saturates instead of wrapping. Field words inside the
loop are 18 bits. Kp has 8 fraction bits. Ki has 16 fraction bits and is applied once per
IQ update, so a gain of g per µs is `round(g / 23.8 × 65536)`. The reset values,
Kp = 5.5 (`0x580`) and Ki = 0.1/µs (`275`), are the gains of the reference step-response
measurement. The integrator is clamped to the DAC range (anti-windup), and `sat_flag`
reports when the output or the integrator hits its limit.

**Loop on and off.** With the loop off, the PI output is 0 and its integrator is cleared.
The DAC then gets only the open-loop drive register plus the feed-forward. A zero drive
leaves the cavity driven by the beam alone (the "passive" mode). Switching the loop on
starts the integrator from zero.

**Feed-forward.** The LUT half of the DAC buffer holds pairs (I, Q) at word addresses
`{step, 0}` and `{step, 1}`. `step` advances once per IQ update and wraps after
`LUT_LEN` pairs (0 means the whole table). It restarts at an event trigger from the CSR or
at a software command, so a table can be synchronised to a machine cycle.

**DAC bus.** Both DACs share one bus. Each update is two words, I with `dac_sel = 0` and
then Q with `dac_sel = 1`, each qualified by `dac_wr`. The data are two's complement.

## Sample buffers (`adc_buffer`, `dac_buffer`)

Each ADC has a 1M × 16 buffer that runs alongside the loop. All four are armed and
triggered together. They have three capture modes:

* **START** (0): after `arm`, wait for a trigger, then store `length` samples from address 0.
* **STOP** (1): after `arm`, store continuously around the buffer and stop at the trigger.
  The sample taken at the trigger is at `trig_ptr`, and older ones precede it.
* **DELAY** (2): like STOP, but after the trigger store `length` more samples before
  stopping. This gives a window around the event.

The trigger is either the external input (taken on its rising edge) or a software
command. Programmed I/O reads and writes every buffer at any time without touching the
loop. The buffers can also **play back** stored words instead of the ADC data, looping
over `PB_LEN` words. This runs the controller on known, simulated input. When playback
starts, the IQ phase restarts so that stored word 0 is an I sample.

The DAC buffer records the stream of DAC words from the arm command until a freeze
command. It can also feed stored words to the DACs in place of the controller, to
exercise the downstream hardware. Its second half is the feed-forward LUT.

In hardware these are external SRAM chips. Here each is a memory array with separate
ports for capture/playback and for programmed I/O.

## Local bus and address map

The local bus carries 24-bit addresses of 32-bit words (`lbus_pkg`). A master raises
`cyc` with `we`, `addr` and `wdata` and holds them until the slave gives a one-cycle
`ack` (with `rdata` on reads). `lbus_arbiter` grants masters in fixed priority and keeps
the grant until the ack. The order is configuration controller, then VME, then DSP. An
unmapped address is acknowledged with 0.

| word address | slave |
|---|---|
| 0x000000–0x0FFFFF | static RAM |
| 0x200000–0x37FFFF | FLASH, one byte per word in bits 7:0. 0x200000: DSP code (first third). 0x280000: FPGA image (the rest). |
| 0x400000–0x40000F | control and status registers (`csr`) |
| 0x600000–0x6FFFFF | the DSP as a slave (its memory, answered by the processor through the `dsp_s_req`/`dsp_s_rsp` port) |
| 0x800000–0xBFFFFF | ADC buffer n at 0x800000 + n·0x100000 (16-bit words) |
| 0xC00000 / 0xD00000 | DAC buffer / feed-forward LUT |
| 0xF00000–0xF0003F | FPGA registers |

From VME (`vme_slave`, A32/D32, address modifiers 0x09 and 0x0D) the board is a 64 MB
window selected by `vme_base` = address bits 31:26. The VME byte address is 4 × the word
address.

**FPGA registers** (offset from 0xF00000):
0 `CTRL`: [0] loop on, [1] vector sum, [2] feed-forward, [3] DAC playback, [4] ADC
playback, [8:5] filter k, [9] DAC capture.
1–4: calibration re/im for probes A and B. 5/6: set point I/Q. 7/8: Kp/Ki.
9: open-loop drive {Q, I}. 10: LUT length in pairs.
11 `BUF_CTRL`: [1:0] capture mode, [2] trigger source (0 external input, 1 software command).
12: capture length. 13: ADC playback length. 14: DAC playback length.
15 `CMD` (write pulses): [0] arm, [1] software trigger, [2] stop, [3] freeze DAC buffer,
[4] restart LUT, [5] restart DAC playback, [6] restart IQ phase.
16 `STATUS`: [2:0] capture state (0 idle, 1 armed, 2 running, 3 after trigger, 4 done),
[3] DAC capturing, [4] saturation seen, [5] trigger seen.
17/18: write pointer and trigger pointer. 19/20: filtered field I/Q. 21: DAC capture
pointer.

**CSR registers** are listed at the top of `rtl/csr.sv`. They cover DSP and FPGA reset,
LEDs, dipswitch, DSP flag, interrupt and DMA request/grant lines, the event trigger,
the SPI transmit and receive registers and clock divider, stepper commands and position, the turnmarker
counter, the interlock status and trip latch, and the configuration source, length and
start.

## Configuration

`config_ctrl` is a bus master. It reads an image from FLASH (byte mode: one byte per
word) or from static RAM (word mode: four bytes per word, most significant first). It
streams the image as bytes (`cfg_data`, `cfg_wr`) to the FPGA or the DSP, chosen by
`cfg_target`, and raises `cfg_done` when finished. The FPGA's own configuration port is
vendor logic, so the stream leaves the top as ports. Configuring from static RAM lets
software try new firmware without reprogramming the FLASH.

## What is not in the RTL

These parts are outside the logic and appear only as ports of `rf_board_top`:

* The DSP (an ADSP-21160M), with its link ports. The DSP drives the `dsp_req`/`dsp_rsp`
  bus-master port and answers the `dsp_s_req`/`dsp_s_rsp` slave port. It receives the
  reset, flag, interrupt and DMA lines.
* The ADCs and DACs with their analog conditioning.
* The ×4 clock PLL. The board clock comes in as `clk`.
* The RF front end and the fast interlock card. The interlock status is the
  `interlock_ok` input.

## How far to trust it, and where it departs

The partition, the sizes (bus widths, memory organisations, converter widths, 18-bit
multiplier words), the sampling scheme, the chain of loop stages, the buffer trigger
modes and playback, and the default gains follow the published design. The following
are this implementation's own choices, because no specification was available for them:
the bus handshake, the arbitration policy, the address and register maps, the
fixed-point formats, the filter type (first-order), the calibration form (complex gain),
the LUT layout and restart, the SPI format (mode 0, 24 bits), the stepper timing, and the
VME window.

Known departures:

* The FPGA's role as a local-bus **master** is not built, because what it would transfer
  is unknown.
* The DACs and the LUT share one bus on the real board. Here the LUT has its own read
  port, and the DAC bus carries only DAC words.
* Everything runs on one clock. The real board can clock individual ADCs from other
  sources.
* FLASH erase and programming sequences are not modelled: a bus write stores the byte.
* The CESR clock input and the uncommitted CSR connections to the VME PLD and the FPGA
  are not implemented: no function is given for them.
* Every VME cycle is a single D32 transfer: no block transfers and no bus errors.

After generic synthesis with yosys, the top comes to about 1,650 flip-flops and 980
word-level cells, plus 140 Mbit of memory arrays for the buffers, static RAM and FLASH.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
Packages go first on the command line:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/lbus_pkg.sv rtl/llrf_pkg.sv tb/tb_rf_board_top.sv --top-module tb_rf_board_top
./obj_dir/Vtb_rf_board_top
```

Main testbenches:

* `tb_rf_board_top` runs the full-size board end to end. It has a VME master model, a
  DSP master model, a DSP slave model, and a cavity model (first-order response, gain 0.5, 20° phase shift,
  field split 60/40 between the probes).
  * It covers bus contention between VME and DSP, VME access to the DSP's memory through
    the slave port, the DSP's peripheral lines, and configuration from both FLASH and
    static RAM.
  * It exercises the SPI, the stepper, the turnmarker and the event trigger.
  * On the RF side it runs open-loop drive and then switches to closed loop, settling
    within 1 % of the set point. It then forces saturation, captures around an external
    trigger, captures the DAC stream, and runs feed-forward and playback.
  * Last, it holds the FPGA logic in reset.
  * It counts each of these mechanisms and fails if one never happened. It runs in a few
    seconds.
* `tb_fast_loop` measures the 8-cycle latency and settles the loop around the same
  cavity model.

The per-module testbenches (`tb_<module>`) compare against reference arithmetic in the
testbench. Most run smaller buffers through the `AW`/`DEPTH` parameters.

To change sizes, set `BUF_AW` in `llrf_pkg` (buffer depth), `AW` of `sram`, or `DEPTH` of
`flash_mem`. To change the loop word width, set `FW` in `llrf_pkg`.
