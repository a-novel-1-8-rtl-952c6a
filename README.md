# DDR2 PHY with a register-controlled DLL and dynamic strobe masking

This is the digital part of a DDR2 SDRAM physical interface (PHY) for one
byte lane. It runs at up to 533 MHz (1066 Mbit/s per pin). On one side it has
a DFI-style memory-controller interface: single-rate data, two bits per DQ
per clock. On the other side it has the pad signals of the SSTL I/Os:
double-rate data, a bidirectional strobe and the command bus.

It has three ideas:

* **An all-digital clock generator (RCDLL).** It measures the controller
  clock period in units of a gate delay, the "tap". From that it makes an
  exact 90° clock. It also removes the clock-tree skew between the
  controller clock and the PHY's flops.
* **Dynamic strobe masking (DSMS).** A read strobe carries glitches while the
  line floats before and after a burst. The mask is sized from the DFI read
  enable and from the strobe itself, so no calibrated mask window is needed.
* **Training hooks.** An external data-capture training engine can do four
  things:
  * delay every DQ bit and the strobe individually;
  * drive its own write data;
  * drain the read FIFOs;
  * reset the read FIFOs.

The transistor-level parts are not in this RTL: the SSTL drivers with their
calibrated legs, the receivers, and the calibration comparators. Their
digital control and status signals are ports of the top level.

## Block map

```
 dfi_clk ──► rcdll ──► dfi_clk0, dfi_clk90 ──► all slices
              ▲  └──► deg90_taps, load_taps ──► dqs_bitslice SDLs
 dfi_clk0_buff (clock-tree leaf)

 DFI cmd  ──► addr_ctrl_regs ──────────────────► addr, ba, cke, ras_n, cas_n, we_n, odt
 DFI wr   ──► 8 x dq_bitslice (ddr_write_path) ─► dq_out[7:0]
 DFI mask ──► ddr_write_path (DM slice) ────────► dm_out
 wrdata_en ─► dqs_bitslice (write_dqs_gen) ─────► dqs_out, tx_en, rx_en
 dqs_in ──► dqs_bitslice: dsms ─► pdl ─► sdl ─► masked_dqs90 ─► sdl ─► inverter ─► masked_dqs90_d
 dq_in[i] ─► dq_bitslice: pdl ─► capture on both edges of masked_dqs90 ─► read_fifo ─► dfi_rddata
 zq comparators ──► impedance_calib ──► vol/voh codes (and >>2 for the 300 Ω legs)
```

| File | What it is |
|---|---|
| `ddr2_phy_top` | Top level: one byte lane, all blocks wired |
| `ddr2_phy_pkg` | Shared constants (tap delay, line lengths, widths) and FSM state types |
| `rcdll` | DLL: `tdc_256`, `tdc_encoder`, `bbpd`, `dll_shift_register`, `dll_ctrl_fsm`, `dtc` (192 taps), dummy `dtc` (64), `sdl` |
| `dq_bitslice` | `ddr_write_path` + `pdl` + two capture flops + `read_fifo` |
| `ddr_write_path` | Write serializer; also used on its own as the DM slice |
| `dqs_bitslice` | `dsms`, `pdl`, two `sdl`s, inverter, `write_dqs_gen` |
| `addr_ctrl_regs` | Command/address registers |
| `impedance_calib` | Clock-enable divider, two `zq_sar_fsm`s, output code registers |
| `tap_chain`, `tap_decoder` | Helpers: the delay chain timing model, and a 6-to-64 decoder |

## The tap and the delay lines

Every delay in the PHY is a multiple of one tap: two balanced NAND gates used
as inverters. The nominal tap is 47.3 ps (typical corner, 27 °C). It ranges
from 30.8 ps (fast, −40 °C) to 77.7 ps (slow, 120 °C). The parameter
`TAP_PS` sets it, default 47.3. The lines are:

| Line | Length | Select |
|---|---|---|
| TDC | 256 taps | sampled as a thermometer code |
| DTC_192 | 192 taps | one-hot, from the DLL shift register |
| SDL, PDL, dummy line | 64 taps | 6-bit count, decoded to one-hot |

The chains (`tap_chain`, and therefore `dtc`, `tdc_256`, `sdl`, `pdl`) are
**behavioural timing models**. Each tap is a continuous assignment with a
`#TAP_PS` delay. The chains need `verilator --timing` and are not meant for
synthesis; in a chip they are custom cells. Everything else is ordinary
synthesizable logic: the registers, decoders, multiplexers and FSMs around
them. All files use `timescale 1ps/1ps`.

## RCDLL: measuring the period and locking the clock tree

The clock path is:

```
dfi_clk ─► DTC_192 ─┬─► dummy 64-tap line at 0 taps ─► dfi_clk0
                    └─► SDL at deg90_taps ─────────► dfi_clk90
```

The dummy line has the same intrinsic delay as the SDL. So dfi_clk90 lags
dfi_clk0 by exactly `deg90_taps` taps.

Control runs on `dfi_clk` (`dll_ctrl_fsm`):

1. **Drain.** After reset, wait `SHIFT_WAIT` cycles so the TDC chain holds
   no stale edge.
2. **Measure.** `launch` starts a step into the TDC chain on one clock edge.
   The next edge samples the chain. The number of ones is the period in taps
   (`period_taps`, 9 bits). The encoder counts ones rather than searching for
   the edge, so a bubble costs at most one tap. `deg90_taps` is
   `period_taps/4`, rounded down and limited to 63.
3. **Load.** `load_taps` is pulsed. The slave delay lines in the DLL and in
   the DQS slice take `deg90_taps`.
4. **Acquire.** The chip returns dfi_clk0 from a leaf of its clock tree as
   `dfi_clk0_buff`. The phase detector (`bbpd`) samples `dfi_clk0_buff` twice:
   at the rising edge of dfi_clk and one tap later. That gives three answers:
   * high at the first sample: the leaf edge is **early**;
   * still low one tap later: it is **late**;
   * low then high: it is within one tap of dfi_clk.

   During acquisition, any answer other than "within one tap" adds one tap
   to DTC_192, starting from zero. After each shift the FSM waits
   `SHIFT_WAIT` cycles (default 16) for the change to reach the detector. The
   leaf edge therefore walks forward until it lines up with the next
   dfi_clk edge.
5. **Track.** When the answer is "within one tap", `done` rises. From then on
   the FSM adds a tap when early and removes one when late. Inside the
   one-tap window it does nothing, so a locked loop does not dither.

`measure_req` repeats steps 2 and 3 at any time. `done` drops meanwhile and
rises again once the loop is back in tracking. The delay setting is kept, so
the loop does not acquire again.

Timing at the defaults (533 MHz, 600 ps clock tree): the period reads as 39
taps and deg90 as 9 taps. Lock takes a few hundred dfi_clk cycles
(about 27 shifts of at least `SHIFT_WAIT` cycles each). The leaf
clock then sits within one tap of dfi_clk.

The one-tap dead zone (the second sampling flop) and the "only add delay
while acquiring" rule are this design's own ways to reach the specified
±1-tap alignment. So are the drain wait and `SHIFT_WAIT`.

## Read path: strobe masking, capture and the FIFO

**DSMS** (`dsms`) uses two counters, both Gray coded:

* `expected` counts dfi_clk0 cycles with `dfi_rddata_en` high. With a 1:1
  DFI, each such cycle is one strobe pulse.
* `received` counts falling edges of the received strobe that passed while
  the mask was open.

The mask is high while the two counts differ. It opens as soon as read data
is announced, and closes right after the falling edge of the last expected
pulse, for any burst length. `masked_dqs = read_dqs & mask`.

Gray coding means only one bit changes at a time, so the compare can safely
cross between the two clock domains. Glitches before `dfi_rddata_en` and
after the last pulse are removed.

Limitation: a glitch that comes after `dfi_rddata_en` has been asserted but
before the preamble is counted as a pulse. The controller must assert
`dfi_rddata_en` no earlier than the cycle in which the device drives the
preamble.

**Phase shifting** (`dqs_bitslice`). The clean strobe passes through the PDL
(training offset) and an SDL set to a quarter period. The result is
`masked_dqs90`, centred in the data eye. A second SDL and an inverter make
`masked_dqs90_d`. Its rising edges come a quarter period after each falling
edge of `masked_dqs90`. That is late enough that both beats of the pulse
have been captured, and it is the FIFO write clock.

Using an inverted 90° copy avoids a 270° delay line, which would be long at
low frequencies. When idle, `masked_dqs90_d` is high. Each strobe pulse gives
exactly one write edge.

**Capture** (`dq_bitslice`). Each DQ passes its own PDL. It is captured into
`q1` on the rising and `q2` on the falling edge of `masked_dqs90`.
`{q1, q2}` is then written into the `read_fifo`.

**FIFO** (`read_fifo`): 8 words of 2 bits. Pointers are Gray coded and pass
through two-flop synchronisers.

* It is read on dfi_clk0 whenever `rinc` is high and it is not empty. The
  word and `dfi_rddata_valid` are registered.
* A word becomes readable once its write pointer has passed the two-flop
  synchroniser: two to three dfi_clk0 edges after its write edge.
* `fifo_reset_n` or `rst_n` empties it.
* The top's `dfi_rddata_valid` is slice 0's flag. All slices see the same
  strobe, so an assertion checks that they agree.

**Bit order.** Within each DQ's pair of DFI bits, bit `2i+1` is the
**first** beat and bit `2i` the second, for both read and write data. For
example, the read sequence 1,0,0,1,0,0,1,0 on DQ0 gives `dfi_rddata[1:0]` =
10, 01, 00, 10. This is the reverse of the usual DFI convention. Swap the
pairs at the top if your controller expects the first beat in the lower bit.

## Write path

**Data** (`ddr_write_path`, for each DQ and for DM):

1. `sel_wd` chooses between controller data and training data.
2. Both bits are registered on the falling edge of dfi_clk0.
3. The first beat moves to `qp` on the next rising edge. The second moves to
   `qn` on the next falling edge.
4. The output multiplexer selects `qp` while dfi_clk90 is high and `qn`
   while it is low.

Each register is stable for the whole half-cycle in which it is selected.
Every beat lasts exactly one dfi_clk90 phase. The first beat of DFI cycle *k*
starts 1.25 cycles after that cycle's rising edge.

**Strobe** (`write_dqs_gen`). Two flops form the FSM:

* `burst_q` is `wrdata_en` registered on the rising edge.
* `post_q` is `burst_q` re-registered on the falling edge.

The outputs are:

* `write_dqs` is high in the low half of dfi_clk0 while `burst_q` is set. It
  therefore rises at the centre of the first beat and falls at the centre of
  the second.
* `tx_en = burst_q | post_q`. The pad drives the strobe low for half a cycle
  before the first rising edge and after the last falling edge. Both the
  write preamble and the write postamble are 0.5 tCK.
* `rx_en = !tx_en`.

## Command bus and impedance calibration

`addr_ctrl_regs` registers address (14 bits), bank (3), cke, ras_n, cas_n,
we_n and odt on dfi_clk0. On reset they hold a NOP with cke low.

`impedance_calib` runs two successive-approximation searches:

* first the 4-bit pull-down code `vol`, against a dummy n-leg;
* then the 5-bit pull-up code `voh`, against a dummy p-leg.

Each search goes IDLE → READY → trial with only the MSB set → one bit per
step → DONE. At each step the comparator is sampled: 1 means the leg is
still weaker than the 150 Ω reference, and the bit is kept. A larger code
switches on more parallel devices.

The FSMs step on a clock enable of dfi_clk0 divided by 2 (`zq_div4 = 0`,
200–400 MHz) or by 4 (`zq_div4 = 1`, 533 MHz). One calibration takes 13
divided ticks.

The final codes go to output registers. Those keep their old value during a
re-calibration. `vol300`/`voh300` are the codes shifted right by two, for the
extra 300 Ω legs. `sstl_calib_act` starts a calibration. `zq_pd_calib_done`
and `zq_calib_done` report progress.

## Where this RTL departs from, or adds to, the source design

* Analog parts (drivers, legs, receivers, comparators, slew-rate dividers,
  differential pads) are not modelled. Their digital signals are ports.
* The circuit of the strobe masking is not public. The counter scheme above
  is this design's own and gives the described behaviour.
* Dead-zone phase detector, acquisition rule, drain and settle waits: own
  choices (see RCDLL).
* `select_pd` is taken to be the per-slice load enable for the shared
  `pdl_taps` bus. The top has one bit per DQ slice and one for the DQS slice.
* These were not specified and are this design's choices:
  * FIFO depth (8) and its synchronisers;
  * `rx_en = !tx_en`;
  * address and bank widths;
  * reset values;
  * the comparator polarity.
* The "Delay" block in the clock path to the ck/ck# pads was not specified.
  `ck` is dfi_clk0.
* The calibration FSMs run on dfi_clk0 with a divide-by-2 or divide-by-4
  clock enable, not on a separately divided clock. The step rate is the
  same, and no second clock domain is added.
* The TDC has 256 taps. Below about 82 MHz at the nominal tap (256 × 47.3
  ps), the period measurement saturates.

## Simulating

Each `tb/tb_<module>.sv` is a self-checking testbench. Each one ends by
printing `TB_RESULT checks=N failures=M`. Example with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ddr2_phy_pkg.sv tb/tb_ddr2_phy_top.sv --top-module tb_ddr2_phy_top -o sim
./obj_dir/sim
```

`tb_ddr2_phy_top` runs the whole PHY at its default parameters, at 533 MHz
with a 600 ps clock tree. It has a small DDR2 device model and the
calibration-leg model `tb/zq_leg_model.sv`. It does the following, in order:

1. locks the DLL;
2. calibrates the impedance codes;
3. writes four BL8 bursts, one of them through the training inputs, and
   checks that every write DQS edge lies at least 350 ps from any DQ or DM
   transition (the ideal is a quarter period, 469 ps);
4. reads them back, with glitches injected around each read strobe,
   including the 1,0,0,1,0,0,1,0 pattern above;
5. sets the PDLs, resets a FIFO, and repeats the period measurement.

It counts each mechanism and fails if one never happened. It takes about 10
seconds.

The unit testbenches check the following:

* the exact delays of the delay lines;
* the TDC reading at 200–533 MHz;
* the lock skew of the DLL and the dfi_clk0/dfi_clk90 spacing;
* the same at 200 and 400 MHz, and at the slow (77.7 ps) and fast
  (30.8 ps) tap delays (`tb_rcdll_freq`);
* glitch removal for BL8 and BL4;
* the write preamble and postamble widths;
* the serializer beat order and latency;
* FIFO ordering, `rinc` and reset;
* all 16 search results of the SAR FSM;
* the /2 and /4 calibration timing.

Parameters worth changing: `TAP_PS` (process corner), `SHIFT_WAIT` (loop
settle time, which must exceed the DTC delay plus two detector cycles), and
`FIFO_DEPTH`.
