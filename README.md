# A 1024-cell digital SiPM: photon counting and first/last-photon timing

This is the SystemVerilog model of a digital silicon photomultiplier (dSiPM): a
32 x 32 array of single-photon avalanche diodes (SPADs) with the digital
electronics that turn a flash of light into numbers, built into the same chip.
A flash produces two results:

- **energy**: how many pixels fired. This is an 11-bit photon count, 0 to 1024.
- **time**: when the first photon and the last photon arrived. A single timing
  signal rises with the first detected photon and falls 400 ps after the last
  one. Two time-to-digital converters (TDCs) measure these two edges.

No analog summing and no ADC are involved. Each pixel that fires sets one bit.
The bits are counted by adder networks. The timing edges come from one big OR of
fixed-width pulses. A serial register carries everything off chip on one pin.

The RTL covers all of the chip's digital logic. The parts that are analog are
written as behavioural models with delays: the SPAD and its quenching circuit,
the 400 ps pixel monostable, and the delay elements of the time-over-threshold
filter. The TDCs themselves are not modelled in `rtl/`. The top level brings out
their start signals and takes their 12-bit results as inputs. A behavioural TDC
(`tb/tdc_model.sv`) stands in for them in the system testbench.

## Signal flow

```
            photon[1023:0]   (stimulus; pixel p = row*32 + col)
                 |
   +-------------v------------------------------------+   x16 double rows
   | 64 pixels: SPAD model -> front end -> monostable |   (rows 2d, 2d+1)
   |      hit bits |                 | 400 ps pulses  |
   |   parallel counter (64 -> 7b)   local tree (64)  |
   +---------------|-----------------|----------------+
          16 x 7b  |                 | 16 x local_n (active low)
              adder tree        peripheral tree (16) -----+
                   |                 | timing             | local_n
             energy (11b)            +--> event counter (10b, rising edges)
                   |                 +--> tdc_last_trig  (falling edge = last photon + 400 ps)
                   |                 +--> trigger_select --> tdc_first_trig
                   |                        (direct / time-over-threshold / coincidence)
                   v
   PISO: {energy 11, tdc_first 12, tdc_last 12, events 10} -> sdo, MSB first
```

Everything between a photon and the `energy` and `timing` outputs is
combinational or latch-based. There is no clock in the acquisition path. The
only clocks are `cfg_clk`, for the configuration registers, and `clk`, for the
serial readout. The event counter is clocked by the timing signal itself.

## The pixel

Each microcell (`spad_quench`, `pixel_frontend`, `monostable`) works like this:

- An avalanche raises the quench node (`node`). It stays high for the dead time:
  `DEAD_TIME_PS`, 8 ns by default. The real circuit can be tuned from about 4 ns
  to 16 ns.
- A three-input gate combines `node`, the pixel's enable bit and the global
  `gate` window. Its output is `det_n`, which is low while an enabled pixel fires
  inside the window.
- `det_n` sets an SR latch. The latch output `hit` feeds the double row's
  parallel counter. `rst_n` (RESET) clears the latch before each acquisition.
  RESET wins if both inputs are active.
- The falling edge of `det_n` also fires a 400 ps monostable. Its negative pulse
  feeds the timing tree.
- `test_n` low forces every enabled pixel's node high. This emulates a photon and
  lets the logic be tested without light.
- The enable bit sits in a one-bit in-pixel memory. The memory is written from
  the row and column shift registers (see Configuration).

A pixel fires at most once per dead time, so each enabled pixel adds at most 1
to the count in an acquisition.

## Counting: the parallel counter

Each double row turns 64 hit bits into a 7-bit count (`parallel_counter`). This
is the most intricate block. It is a chain of **binary compressors**
(`pc_compressor`), and each compressor is a stack of **compression levels** built
from full and half adders.

- **Compressor 1** takes all N input bits, all of weight 1. It adds them
  together, level by level, until a single bit is left. That bit is bit 0 of the
  count. Every carry produced along the way has weight 2. The carries are
  collected into a *carry vector*.
- **Compressor 2** reduces that carry vector the same way and gives bit 1 of the
  count. Its own carries (weight 4) go to compressor 3, and so on.
- The chain stops when a compressor's carry vector is a single bit. That bit is
  the MSB of the count.

Inside a compressor, each level takes its M bits in groups of three. Each group
goes into a full adder. If two bits are left over, they go into a half adder. A
single left-over bit passes straight to the next level. The sums go on to the
next level, and the carries join the carry vector. A compressor of M inputs
therefore needs ceil(log3 M) levels. The chain needs ceil(log2 N) compressors.

| N  | compressor inputs (carry-vector widths) | levels per compressor | count width |
|----|-----------------------------------------|-----------------------|-------------|
| 8  | 8 -> 4 -> 2 -> 1                        | 2, 2, 1               | 4           |
| 64 | 64 -> 32 -> 17 -> 9 -> 4 -> 2 -> 1      | 4, 4, 3, 2, 2, 1      | 7           |

All widths are worked out at elaboration time by constant functions in
`dsipm_pkg` (`lvl_out`, `lvl_carries`, `carry_offset`, `comp_carries`,
`pc_num_comp`). The generate loops in `pc_compressor` and `parallel_counter`
place one `full_adder` or `half_adder` instance per group. Changing `N` resizes
everything. The 8-input case gives exactly the three-compressor structure shown
for the design.

The sixteen 7-bit counts are then summed by `adder_tree`, a balanced tree of
4 levels of two-input adders, into the 11-bit `energy`. The original structure of
this tree is not known; a plain binary tree is used.

In silicon the result settles up to about 22 ns after the last photon. The RTL
has no gate delays, so `energy` is valid as soon as the last hit latch is set.

## Timing: one OR of 1024 pulses

The timing tree (`nand_nor_tree`) is built from two-input gates whose levels
alternate NAND and NOR:

- There are 6 levels inside each double row (64 inputs) and 4 levels in the
  periphery (16 inputs).
- The inputs are the active-low monostable pulses. A NAND of two active-low
  signals is an active-high OR. A NOR of two active-high signals is an active-low
  OR. So every level means "some pulse is present"; only its polarity
  alternates.
- After 6 levels the local output `local_n` is active low.
- After the 4 peripheral levels, one inverting output stage (`INVERT_OUT`) makes
  the global `timing` signal active high. The design's "1024-input NAND" is the
  same function.

So `timing` rises with the first detection and falls 400 ps after the last one.
The last-photon time is recovered as `T_last = T(falling edge) - 400 ps`, where
400 ps is the monostable width. If photons are sparse, `timing` can fall and
rise again several times. The last-photon TDC must then restart on every falling
edge, as the test model does.

The real tree is balanced in layout so that every pixel sees the same delay. The
model has zero delay everywhere. The system testbench still checks that every
one of the 1024 pixels, fired alone, produces a 400 ps `timing` pulse at exactly
the photon time.

## The first-photon trigger

`trigger_select` chooses what starts the first-photon TDC (`tdc_first_trig`).
The choice is set by the `mode` field of the control register:

| mode | name   | trigger |
|------|--------|---------|
| 0    | DIRECT | `timing` itself: the first photon |
| 1    | TOT    | `timing AND timing delayed by 600 ps + 100 ps * tot_code` (`tot_filter`) |
| 2    | COINC  | double rows i and i+1 (or i, i+1, i+2 if `coinc3`) active at the same time, ORed over i (`coincidence_detector`) |
| 3    | -      | same as DIRECT |

**Time-over-threshold (TOT).** A lone photon makes a 400 ps pulse. This is
shorter than the smallest threshold (600 ps), so a lone photon never triggers.
The trigger rises exactly one threshold after `timing` rises, provided the signal
is still high, and it falls with `timing`.

The filter compares the signal with a delayed copy of itself. This has a
consequence: two short pulses whose start times differ by about the threshold
overlap at the AND gate and do trigger. Only pulses spaced further apart are
rejected.

Eight settings of 100 ps starting at 600 ps end at 1.3 ns. The source design
quotes a range up to 1.4 ns, but the 100 ps step and the 600 ps start were kept.

**Coincidence (COINC).** The double-row activity signals are the inverted
`local_n` outputs. Each lasts 400 ps per photon, so a coincidence means that
photons hit neighbouring double rows less than 400 ps apart. Double row 15 and
double row 0 are not neighbours.

## Configuration

There are three shift registers, all clocked by `cfg_clk`. In each one, `sdi`
enters bit 0 and the first bit shifted in ends up in the MSB.

| register | width | content |
|----------|-------|---------|
| column (`col_sdi`) | 32 | enable value for each column |
| row (`row_sdi`)    | 32 | rows to write |
| control (`ctrl_sdi`) | 6 | `{mode[1:0], tot_code[2:0], coinc3}` (`dsipm_pkg::ctrl_t`) |

While `cfg_wr` is high, every pixel in a row whose row bit is 1 stores its
column's bit as its enable. Writing one row at a time reaches every pixel
individually. Writing several rows at once sets large areas in a single step.
The enable memory is undefined at power-up, so write it before use.

`cfg_wr` is this implementation's addition. Without it, the memories would follow
the registers while they shift.

## Readout

At the end of an acquisition:

1. Pulse `piso_load` for one rising edge of `clk`.
2. `sdo` then presents the 45-bit frame, MSB first, one bit per `clk` edge:
   `{energy[10:0], tdc_first[11:0], tdc_last[11:0], events[9:0]}`
   (`dsipm_pkg::frame_t`).
3. Reading a frame takes 45 clock cycles.

`events` counts rising edges of `timing` since `cnt_rst_n` was last pulsed low.
It is meant for measuring the dark count rate. The counter saturates at 1023.

## Using the top level

Ports of `dsipm_top` (parameters `T_MONO_PS` = 400, `DEAD_TIME_PS` = 8000):

- `photon[1023:0]`: rising edge = photon on pixel `row*32 + col`. This drives
  the SPAD models.
- `gate`, `test_n`, `rst_n`: acquisition window, test injection, pixel reset.
- `cfg_clk`, `col_sdi`, `row_sdi`, `ctrl_sdi`, `cfg_wr`: configuration.
- `tdc_first_trig` (rising edge) and `tdc_last_trig` (falling edge): TDC starts.
- `tdc_first_data[11:0]`, `tdc_last_data[11:0]`: TDC results, loaded into the
  frame. In the test model each result is the time from the start edge to an
  external STOP, in 100 ps units.
- `energy[10:0]`, `events[9:0]`: direct observation of the count and the event
  counter.
- `cnt_rst_n`, `clk`, `piso_load`, `sdo`: readout.

A typical acquisition runs in this order:

1. Configure the registers.
2. Pulse `rst_n` low, and `cnt_rst_n` if needed.
3. Raise `gate`.
4. Let the photons arrive.
5. Apply STOP to the TDCs.
6. Lower `gate`.
7. Load the frame and shift it out.

## What is modelled, and how far to trust it

- **Behavioural models.** `spad_quench`, `monostable` and `prog_delay_line` use
  `#` delays and are not synthesizable. Synthesis ignores their timing, so a
  synthesized top level sees constant pixel outputs. The rest of the logic is
  synthesizable.
- **Latches.** The hit latch and the enable memory in `pixel_frontend` are
  intentional level-sensitive latches.
- **Timing accuracy.** Delays are ideal. The counting latency, the timing-tree
  skew and the TDC resolution are physical properties that this model does not
  predict.
- **Choices made here.** The following were not specified by the design and were
  chosen for this implementation:
  - the register protocol and the `cfg_wr` strobe;
  - the control-word layout and the mode encoding;
  - the frame order and MSB-first shifting;
  - event-counter saturation;
  - RESET priority in the SR latch;
  - the adder-tree structure;
  - the order of bits in the carry vectors;
  - the pixel index order;
  - no wrap-around between the first and last double row;
  - the inverting output stage of the timing tree;
  - the 8 ns default dead time.

## Files

| file | block |
|------|-------|
| `rtl/dsipm_pkg.sv` | sizes, `ctrl_t`, `frame_t`, trigger modes, compressor geometry functions |
| `rtl/dsipm_top.sv` | whole chip |
| `rtl/double_row.sv` | 64 pixels + local tree + parallel counter |
| `rtl/spad_quench.sv`, `rtl/monostable.sv` | pixel analog parts (behavioural) |
| `rtl/pixel_frontend.sv` | pixel logic, hit latch, enable memory |
| `rtl/parallel_counter.sv`, `rtl/pc_compressor.sv`, `rtl/full_adder.sv`, `rtl/half_adder.sv` | counting |
| `rtl/adder_tree.sv` | sum of the 16 counts |
| `rtl/nand_nor_tree.sv` | timing tree (local and peripheral) |
| `rtl/trigger_select.sv`, `rtl/tot_filter.sv`, `rtl/prog_delay_line.sv`, `rtl/coincidence_detector.sv` | first-photon trigger |
| `rtl/event_counter.sv`, `rtl/shift_reg.sv`, `rtl/piso.sv` | event counter, configuration, readout |
| `tb/tb_<block>.sv` | self-checking testbench per block |
| `tb/tb_dsipm_top.sv`, `tb/tdc_model.sv` | full-size system test and the TDC stand-in |

## Simulating

Every file carries its own `timescale` (1 ps), so the files can be compiled in
any combination. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dsipm_pkg.sv tb/tb_dsipm_top.sv \
          --top-module tb_dsipm_top -Mdir obj_top
obj_top/Vtb_dsipm_top
```

Replace `tb_dsipm_top` with any `tb_<block>` to test a single block. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_dsipm_top` runs the full 1024-pixel array at its default parameters. It
takes about half a minute. It covers:

- bursts of 1, 10, 50, 100 and 1024 photons within 5 ns;
- disabled pixels, photons outside the gate, and a photon lost in dead time;
- TEST injection, and enabling whole columns by writing all rows at once;
- every ToT threshold, both rejecting and accepting;
- two- and three-row coincidence, both accepting and rejecting;
- event-counter saturation;
- serial readout of every frame;
- single-pixel stimulation of all 1024 pixels.

It prints how often each of these mechanisms occurred and fails if any never
occurred.
