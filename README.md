# Linear-CCD spectrum acquisition front end (FPGA logic)

A fiber spectrometer images its spectrum onto a 2048-pixel linear CCD
(Sony ILX511). Reading a line means driving the sensor with two timing
signals and digitising one pixel per clock, and then getting the 2048
samples into a DSP for processing (here a TMS320VC5509A). Handling
one ADC result per microsecond in a DSP interrupt would keep the DSP's
interrupt latency and I/O busy all the time. So this design puts a FIFO
between the ADC and the DSP. The FPGA generates the sensor and ADC timing
and fills the FIFO at the pixel rate. After that it raises one interrupt
per line, and the DSP empties the FIFO in a single fast burst over its
external memory bus.

This RTL implements that FPGA logic in SystemVerilog:

```
 clk_20m ─► clk_div20 ─► clk_1m (1 MHz) ──────────────┬──────────┬─────────────┐
                                                       │          │             │
 mcbsp_* ─► mcbsp_rx ─► word_sync ─► period ─► clk_divide_rog ─► ccd_rog (active low)
                                                       │          │             │
                                                       │      NOT │             │
                                                       │          ▼             │
                                                       │    adc_start_ctr       │
                                                       │     │    │     │       │
                                     ccd_clk = clk_1m & ccd_rog   │     │       │
                                 adc_convst = clk_1m & adc_start ◄┘     │       │
                                                                w_req   r_req ─► DSP interrupt
 adc_busy (falling edge) ─► wrclk ┐                               │       │
 adc_in[15:0] ────────────► data  ├─ dcfifo 16 x 4096 ◄── wrreq ──┘       │
 r_clk (DSP read strobe) ─► rdclk ┘     │  ▲ rdreq ───────────────────────┘
                                        │  └─ aclr: ROG pulse retimed to clk_20m
                                        └─► adc_out[15:0] ─► DSP data bus
```

## One line, clock by clock

Everything on the sensor side runs from a 1 MHz clock. `clk_div20` makes it
from the 20 MHz PLL clock with 50% duty. A frame is one ROG pulse and then the
read-out of one line:

| CCD clocks after ROG | sensor output | FPGA activity |
|---|---|---|
| ROG, 8 clocks | charge transfer (ROG low) | CCD clock held low, FIFO cleared |
| 1 – 32 | dummy and optical-black outputs | nothing sampled |
| 33 – 2080 | effective pixels S1 – S2048 | one CONVST per clock, `w_req` high |
| 2081 | trailing dummies | `w_req` still high, so the last conversion gets written |
| 2082 | | `r_req` rises: the line is in the FIFO |
| up to period − 8 | trailing dummies, then idle (exposure continues) | DSP reads the FIFO |

The frame period is counted in CCD clocks by `clk_divide_rog`. It is 4182 by
default and can be changed by the DSP (see below). The sensor needs more than
2088 clocks between ROG pulses, so the period is never allowed below
8 + 2088 + 1 = 2097. A larger period gives a longer exposure.

### Why the timing logic uses the falling edge

The CCD clock and the ADC CONVST burst are the 1 MHz clock passed through two
AND gates. One gate is enabled by the ROG line and the other by `adc_start`.
In simulation and in silicon, an enable that changed on the same rising edge
as the clock would let a sliver of a pulse through. Both `clk_divide_rog` and
`adc_start_ctr` therefore change state on the **falling** edge of the 1 MHz
clock, half a period away from the edges the gates pass. The k-th CCD pulse
after ROG rises between falling edges k−1 and k, and `adc_start` is set at
falling edge 32, so CONVST pulse 1 coincides with CCD pulse 33 (pixel S1).

## The FIFO and the DSP read protocol

This part needs the most care when the design is reused.

`dcfifo` is a 16-bit × 4096-word asynchronous FIFO. Its read and write
pointers cross between the clock domains in Gray code through two-flop
synchronizers. Neither of its clocks runs freely:

* **Write clock**: the ADC's BUSY line, inverted. BUSY falls when a result is
  ready, and that edge writes the word while `w_req` is high. So exactly one
  word is written per conversion, timed by the ADC itself.
* **Read clock**: `r_clk`. On the board it is the DSP's external-memory read
  strobe (ARE) qualified by the chip select of the FIFO's address space. It is
  high when idle, and a read completes on its rising edge. `rdreq` is `r_req`.

With a read clock that only moves when the DSP reads, the read side learns
about the written words only from the read strobes themselves:

* Strobes 1 and 2 clock the write pointer through the synchronizer. The FIFO
  still looks empty and nothing is popped.
* Strobe 3 pops word 0 onto `q`.
* The DSP samples the data bus during a strobe, before the rising edge. So it
  sees word k−4 on strobe k.

**The DSP must therefore issue 2048 + 3 reads per line and discard the first
three.** The count of three holds only because the FIFO is empty and freshly
cleared at the start of every burst. To guarantee that, the FIFO is cleared
asynchronously during every ROG pulse. `fifo_aclr` is the ROG pulse retimed
to the 20 MHz clock, so every clear starts with a clean edge. A consequence:

* The DSP must finish its burst before the next ROG. Otherwise the rest of
  the line is lost.
* With the default period, `r_req` rises 2090 clocks into the 4182-clock frame.
  That leaves 2092 µs for the read. A 2051-word burst at 20 ns per read takes
  about 41 µs.
* At the shortest allowed frame (2097 clocks) only 7 µs remain. A DSP that
  needs the data must choose a longer period.
* If the DSP skips a line, the ROG clear discards it, and the next line
  arrives aligned again.

`r_req` is the interrupt. It rises once the line is complete and stays high
until the next ROG. `rdempty`, `rdusedw`, `wrusedw` and `wr_full` are brought
out as monitors. The 4096-word depth holds two lines. With the clear at every
ROG the FIFO never fills in normal operation.

## Setting the frame period from the DSP

`mcbsp_rx` receives 16-bit words from the DSP's serial port in this format:

1. a one-clock frame-sync pulse on `mcbsp_fsr`;
2. one bit clock of delay;
3. 16 data bits, MSB first, sampled on the rising edge of `mcbsp_clkr`.

A frame sync in the middle of a word restarts reception. Each complete word
flips a toggle. `word_sync` uses the toggle to copy the word safely into the
1 MHz domain. `clk_divide_rog` adopts the new period at the end of the frame
in progress, so no frame is ever cut short. The word is the frame period in
CCD clocks. The reset value is 4182.

## Where this RTL departs from the reference design or fills gaps

* **ROG pulse width and polarity.** The reference counter produces a short
  positive pulse. The accompanying description asks for an 8 µs pulse and a
  negative ROG, which is what the sensor needs. This RTL makes an 8-clock,
  active-low pulse. The inverter in front of `adc_start_ctr` then gives it an
  active-high `rog`.
* **CCD clock during ROG.** The CCD clock is the 1 MHz clock ANDed with the
  ROG line, so it is held low during ROG.
* **Position of the conversion window.** The window is placed on pixels S1 to
  S2048 from the sensor's line structure (32 leading outputs). A scaled
  reference simulation shows the burst right after ROG instead.
* **Leading invalid words.** The reference system's vendor FIFO needed six
  discarded words. This FIFO needs three.
* **FIFO clear at ROG, and the one-clock extension of `w_req`.** Both are
  choices of this design.
* **Clock gating.** The reference schematic gated the FIFO clocks with AND
  gates. Here the FIFO's request inputs do that job.
* **Gated outputs.** `ccd_clk` and `adc_convst` are still formed by AND gates
  on the clock, as in the reference. On an FPGA, route them straight to pins.
* **Outside this RTL.** The PLL, the sensor, the ADC, the analog stage
  between them, the DSP and its firmware, the USB link, the laser driver and
  the display are not part of it.

## Files

| file | contents |
|---|---|
| `rtl/ccd_acq_pkg.sv` | sizes: 2048 pixels, 32 leading outputs, 2088-clock minimum line, 8-clock ROG, 4182-clock frame, 20:1 divider, 16-bit data, 4096-word FIFO |
| `rtl/ccd_acq_top.sv` | top level: wiring, inverter and output AND gates, FIFO clear |
| `rtl/clk_div20.sv` | 20 MHz → 1 MHz, 50% duty |
| `rtl/clk_divide_rog.sv` | frame counter, ROG pulse, programmable and clamped period |
| `rtl/adc_start_ctr.sv` | conversion window, `w_req`, `r_req` |
| `rtl/dcfifo.sv` | dual-clock FIFO |
| `rtl/mcbsp_rx.sv` | serial command receiver |
| `rtl/word_sync.sv` | toggle-based word synchronizer (helper) |
| `tb/tb_*.sv` | one self-checking bench per module |
| `tb/ad7641_model.sv` | behavioural ADC model: samples on CONVST falling edge, BUSY pulse |
| `tb/ilx511_model.sv` | behavioural sensor model: numbered outputs per line |

## Simulating

Every bench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each has a watchdog. The benches count time in nanoseconds, so give
Verilator the time scale. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ccd_acq_pkg.sv tb/tb_ccd_acq_top.sv --top-module tb_ccd_acq_top
./obj_dir/Vtb_ccd_acq_top
```

Run the other benches the same way, replacing the bench name.

`tb_ccd_acq_top` runs the top at its default sizes, about 40 ms of simulated
time in a few seconds. A sensor model (`tb/ilx511_model.sv`) numbers every
output of a line by its clock position and frame. An ADC model samples that
number on each CONVST falling edge, which lies in the middle of the pixel
period. A DSP model answers each `r_req` after 2 µs with a 2051-read burst. It
checks that the 2048 words are exactly outputs 33–2080 of the current line,
that is pixels S1–S2048. The bench goes through:

* the reset period;
* a programmed 3000-clock period;
* a too-short request, which must be clamped to 2097 (the DSP skips those
  lines, and the FIFO clear must discard them);
* the default period again, with reading resumed.

Per frame it checks the ROG width, the period, the number of CCD clocks and
the CONVST count. It also requires each mechanism to have happened at least
once.

The unit benches cover these cases:

* `tb_dcfifo`: random streaming, filling to full, overflow drop, the
  three-strobe lead, clear, and one 2048-word line written at 10 ns per word
  and read back at 1 ns per word.
* `tb_adc_start_ctr`: window position and length, the request order, and a
  line aborted by ROG.
* `tb_clk_divide_rog`: width, default, programmed and clamped period.
* `tb_mcbsp_rx`: 200 random words and an aborted frame.
* `tb_clk_div20`: period and duty.

## Changing sizes

All sizes are parameters of `ccd_acq_top` with defaults from `ccd_acq_pkg`:

* `NPIX`, `DUMMY_LEAD` and `MIN_LINE` fit another line sensor.
* `ROG_WIDTH` and `ROG_PERIOD` set the ROG pulse width and the frame
  length.
* `SYS_DIV` sets a different CCD clock.
* `DATA_W` sets the ADC data width.
* `FIFO_AW` sets the FIFO depth.

The FIFO must hold at least `NPIX` words. The frame must leave the DSP
enough time after `r_req` for `NPIX` + 3 reads.
