# Ring-oscillator TDC readout for a silicon timing tracker

This is SystemVerilog for the timing readout of a silicon tracker front end. Each
front-end channel gives a discriminator pulse. The time of its rising edge
(time of arrival, TOA) and its width (time over threshold, TOT) are measured with
about 35 ps resolution. The results are packed into 48-bit hit words. Many chips'
serial links are merged into faster links.

The heart of the design is an **event-driven ring-oscillator TDC**. A 15-stage
NAND ring stays in a fixed rest state until a pulse arrives, then oscillates. The
ring state is frozen by SR latches at three moments:

- the pulse's falling edge gives TOT;
- the next usable reference-clock edge gives TOA;
- one clock period later gives CAL, a calibration point.

Each frozen state is a fine phase (1 of 30) plus a coarse count of ring periods.
Then the ring stops again. It runs only while a measurement is in progress, so
an idle channel burns almost no power.

The RTL has three parts, which stand side by side in the top level `otk_top`:

| part | top module | what it is |
|---|---|---|
| TDC test chip | `juloong_core` | one TDC channel with PLL, clock mux, a 40-bit encoded serial output and a 128-bit raw serial output |
| readout chip | `juloong_chip` | 128 TDC channels, each with an `event_builder` making 48-bit hit words (TOA/TOT/CAL + channel + bunch ID + chip ID), merged onto one 43.3 Mbit/s link |
| link aggregation | `taotie_tree` | 32 chip links of 43.3 Mbit/s into one 1.39 Gbit/s link (8:1, then 4:1) |

The three parts do not connect to each other. The test chip is a single
channel with raw outputs for characterising the TDC. The readout chip is the
production architecture. The aggregator belongs to separate concentrator chips;
its 32 inputs are ports, since a shared clock plan for chips and aggregator is
not part of this design.

## Clocks and rates

| clock | frequency | use |
|---|---|---|
| reference | 43.3 MHz (23.09 ns) | PLL input; the bunch clock of the event builder |
| fast clock | 1.732 GHz = 40 x 43.3 MHz | from the PLL, or from the `ext_fclk` input when `clk_sel` = 1 |
| TDC clock | fast clock / 40 | made by the high-speed serializer; one 40-bit word per period |
| ring oscillator | 1 / (30 x 35 ps) = 0.95 GHz | only while measuring |
| chip link | 43.3 Mbit/s | low-speed raw output; TaoTie inputs |
| aggregated link | 347 Mbit/s, then 1.39 Gbit/s | TaoTie levels 1 and 2 |

## The ring oscillator and its code

`ring_osc` is 15 NAND stages. Stage 0 is gated by `ro_key`; the other stages have
one input tied high. With `ro_key` low the stage outputs are `101010101010101`
(stage 0 leftmost). When `ro_key` rises, stage 0 flips first. After that, one
stage flips per stage delay:

```
101010101010101 -> 001010101010101 -> 011010101010101 -> ... -> 010101010101010
                -> 110101010101010 -> ... -> 101010101010101
```

So one ring period has 30 distinct states, each lasting one stage delay. Stage 0
also clocks `coarse_counter`, a 6-bit counter of ring periods that clears while
`ro_key` is low.

Each latch bank (`quant_latch`) holds, for every stage, a Q/Q-bar pair (30 fine
bits) plus the 6 coarse bits. The latch is transparent while its enable pulse is
high and holds when the pulse falls. The sample is therefore taken at the **end**
of a 300 ps latch pulse.

`tdc_encoder` turns a sample into a number:

1. Per stage, it takes the bit that differs from the rest state. This gives 15
   bits `s`.
2. It arranges them as a 30-bit thermometer code `{~s reversed, s}`. The rest
   state reads `1111111111111110000...0` (15 ones, then 15 zeros).
3. The ones slide to the right as the ring advances. The fine phase (0..29) is
   found from the count and position of the ones.
4. `code = coarse * 30 + fine`, an 11-bit number. 1920 codes x 35 ps = 67 ns of range.

A code counts stage delays from the pulse's rising edge to the moment the latch
closed. The fixed offsets are left in the codes:

- TOT closes 300 ps after the pulse falls.
- TOA and CAL close 300 ps after their clock edges.

CAL − TOA is one reference period in stage delays (about 660). This is how the
stage delay is calibrated off-chip.

## Measurement sequence (`tdc_ctrl`, `latch_pulse_gen`)

This is the part that needs the most care. Three latch enables are made from
delayed copies of the clock and the pulse. `latch_pulse_gen` is a behavioural
model, built from transport delays.

| enable | made from | bank written |
|---|---|---|
| CLK_latch1 | gated reference clock AND NOT (clock delayed 300 ps) | TOA/CAL bank: first TOA, then overwritten with CAL |
| CLK_latch2 | falling reference edge after the first valid CLK_latch1 | TOA copy bank: copies the TOA/CAL bank before CAL overwrites it |
| TOT_latch | pulse falling edge, 300 ps wide | TOT bank |

A latch pulse is **valid** if it is at least 280 ps wide. The controller checks
this by sampling a 280 ps delayed copy of the pulse at the pulse's falling edge.

Normal sequence:

1. Pulse rises: `ro_key` goes high, the ring starts, and the reference-clock gate
   opens. The gate enable takes 450 ps to take effect.
2. The pulse falls, giving TOT_latch and the TOT sample.
3. The first valid CLK_latch1 gives the TOA sample.
4. The next falling clock edge gives CLK_latch2, which copies TOA to its own bank.
5. The second valid CLK_latch1, one period later, gives the CAL sample. The gate
   closes.
6. With TOT and CAL both done, `ro_key` drops, the ring returns to rest and the
   counters clear. `done_tgl` toggles.

**TOA boundary cases.** The pulse may arrive less than 450 ps before a clock edge,
or on it. The gate is then not yet open, or opens part-way through the clock's
high phase. Either no CLK_latch1 occurs, or one narrower than 280 ps occurs, and
that one is ignored. TOA and CAL then move one period later. In this model the
change-over is at about 430 ps: the 450 ps gate setup, less the 20 ps between the
300 ps pulse and the 280 ps threshold.

**TOT boundary case.** A pulse narrower than 280 ps makes no valid TOT_latch. The
ring would then never stop. The controller counts raw reference rising edges
while `ro_key` is high and stops the ring at the 4th (`STOP_COUNT`). The result
then carries `tot_missing` = 1. `cal_missing` flags the unlikely case that CAL was
not reached.

A pulse must not start a new measurement before the previous one has ended. The
next rising edge of `pulse` after `ro_key` falls starts the next one.

## Test-chip readout (`tdc_readout`, serializers)

`done_tgl` crosses into the fast-clock domain through a two-flop synchronizer
and an edge-detect flop. The
latch banks hold their contents until the next pulse, so the codes and raw
samples are simply registered when the toggle arrives.

**High-speed output** (`hs_serializer`, 1.732 Gbit/s, MSB first) sends one 40-bit
word per TDC clock period. The same counter divides the fast clock by 40 to make
the TDC clock. The clock is high for counts 0..19, and a word is loaded at
count 39.

| bits | field |
|---|---|
| 39:34 | header: `101000` data, `010111` idle (an idle word's other bits are 0) |
| 33 | tot_missing |
| 32:22 | TOT code |
| 21:11 | TOA code |
| 10:0 | CAL code |

**Low-speed output** (`ls_serializer`, one bit per 40 fast cycles = 43.3 Mbit/s,
MSB first) sends a 128-bit raw frame for each measurement. `ls_frame` is high
during the first bit; the line is low when idle.

| bits | field |
|---|---|
| 127:116 | sync `0xB5A` |
| 115:109 | event number (counts results since reset) |
| 108 | tot_missing |
| 107:72 | TOT sample: 30 fine bits (bit 2i+1 = Q of stage i, bit 2i = Q-bar), then 6 coarse |
| 71:36 | TOA sample |
| 35:0 | CAL sample |

A raw frame takes 2.96 µs. A result that arrives while one is waiting replaces
it, and the sticky `overrun` output is set. The encoded word is never lost.

`pll_model` is behavioural: it measures the reference period and puts out 40
evenly spaced cycles per reference period, realigned at each reference edge.
`pll_lock` rises after 3 reference cycles. `clk_mux` selects the external clock
when `clk_sel` = 1; change it only in reset.

## Hit word (`event_builder`)

```
47:43 chip ID | 42:35 bunch ID | 34:28 channel | 27:18 TOA | 17:10 TOT | 9:0 CAL
```

- The bunch ID is an 8-bit count of 43.3 MHz cycles since reset.
- The 11-bit codes are narrowed:
  - TOA saturates at 1023.
  - TOT saturates at 255. 255 x 35 ps = 8.9 ns, so longer TOT values saturate.
  - CAL is sent as CAL − TOA (the period in stage delays), limited to 0..1023.
- `hit_valid` pulses one cycle after `result_valid`.

## The 128-channel readout chip (`juloong_chip`, `hit_merger`)

The reference feeds the PLL. The 1.732 GHz output, divided by 40 (`clk_div`),
gives the 43.3 MHz system clock. That clock is every TDC's reference and clocks
all the chip's digital logic. Per channel:

1. A `tdc_channel` measures the pulse.
2. Its done toggle passes a two-flop synchronizer; the change is a one-cycle
   `result_valid`.
3. The channel's `event_builder` packs the hit word and holds it.

`hit_merger` keeps a pending flag per channel. Each cycle a round-robin arbiter
takes one pending word into a 16-word FIFO, if there is room. The FIFO feeds the
link serializer (`ls_serializer` with WIDTH = 48, DIV = 1), one bit per system
clock: 48 cycles per hit, about 0.9 M hits/s. `link_frame` marks each word's
first bit.

While a channel's word is still pending, the channel is busy. A new result on a
busy channel is dropped and sets the sticky `hit_lost`. So in a burst each
channel can hold one word outside the FIFO: 128 + 16 words in all.

Two timing rules:

- A channel must see no new pulse for 4 system-clock cycles after its
  measurement ends. The event builder reads the codes after synchronization, and
  a new pulse would start overwriting the TOT latch bank.
- The pulse inputs are the discriminator outputs. The front end, the threshold
  DAC, the calibration injection and the I2C slow control are not modelled.

## Link aggregation (`taotie`, `taotie_tree`)

A `taotie` interleaves N_IN (8) serial inputs bit by bit into one output. A slot
counter steps on `ce`. In slot 0 it captures all inputs and sends lane 0. In slot
i it sends the captured bit of lane i. `slot0` marks lane 0 for the receiver.

`taotie_tree` wires four 8:1 units into one 4:1 unit on a single 1.39 GHz clock.
The first level is enabled one cycle in four, phased so the second level samples
settled data. `chip_slot` marks the cycle whose clock edge samples the 32 chip
inputs; these must change once per 32 cycles. Within one 32-bit frame the output
order is: chip bit j of group 0, 1, 2, 3, for j = 0..7. Chip link j of group g is
`chip_links[8g+j]`.

## What follows the description and what is this design's own

Taken from the design description:

- the 15-stage NAND ring and its rest state and flip sequence;
- 30 fine + 6 coarse bits per sample, and three latch banks (TOT, TOA/CAL, TOA copy);
- 300 ps latch pulses, with at least 300 ps counting as valid;
- the 450 ps boundary for the TOA cases;
- stopping after 4 reference edges when TOT is missing;
- CAL taken one period after TOA;
- 43.3 MHz / 1.732 GHz clocks, the PLL, the external-clock mux, and the TDC clock
  coming from the high-speed serializer;
- 40-bit encoded and 128-bit raw words;
- the field widths of the 48-bit hit word;
- 128 channels, each with a TDC and an event builder, and one PLL and one
  serializer per chip;
- TaoTie's 8 inputs and the link rates.

This design's own choices:

- The gate and pulse-generator structure, which reproduces the described
  boundary behaviour. The controller schematic was not available.
- The 280 ps validity threshold, so that a full 300 ps pulse is always valid.
- The handoff of results to the fast-clock domain.
- Word headers, field orders and the event number.
- The low-speed bit rate (43.3 Mbit/s) and the raw frame marker.
- The overrun rule.
- Hit-word saturation and sending CAL as a difference.
- The merging of the 128 channels' words onto the chip link.
- The TaoTie framing (`slot0`) and the common-clock tree.
- All resets: active-low `rst_n`, asynchronous.

Known differences from the described silicon:

- All ring stages have the same delay. The real first stage is about 5 ps faster
  when the ring starts.
- The described post-layout LSBs (29.4 ps to 42.0 ps over corners) can be set
  through `STAGE_DELAY_PS`, in whole picoseconds only.
- The real design's description says CLK_latch2 fires twice in one place and
  once in another. This design fires it once.
- A pulse between 280 and 400 ps wide gives a valid TOT here. The real circuit is
  described as unreliable below 400 ps.
- The analog front end (preamplifier, discriminator, threshold DAC) is not
  modelled: `pulse` is an input.
- How the per-channel event builders share the single serializer is not
  described. The merger, its FIFO and the drop rule are this design's own.
- Slow control, the ladder concentrator and the optical link are not modelled.

## Behavioural models and synthesis

These modules need real delays and are simulation models, not synthesizable
logic:

- `delay_cell`, `ring_osc` and `latch_pulse_gen` (delays);
- `pll_model` (measures time).

`tdc_ctrl` uses asynchronous set/clear flip-flops clocked by the pulse and the
latch pulses, which is intended. Everything in the readout, event builder and
aggregator is ordinary synchronous RTL.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/juloong_pkg.sv tb/tb_otk_top.sv --top-module tb_otk_top -Mdir obj
obj/Vtb_otk_top
```

Replace `tb_otk_top` with any testbench in `tb/` (`tb_<module>`). Files use
`timescale 1ps/1ps`.

**Start-up sequence.** In a two-state simulator an asynchronous clear acts only on
an edge. After power-up the ring and counters can sit in an arbitrary state, so
the testbenches do this:

1. Give one short `pulse` (on every channel of the readout chip) so that `ro_key`
   is set.
2. Then drive `rst_n` low, which stops the ring and clears everything.
3. Release `rst_n` after a few reference cycles.

Do the same in any new testbench.

| testbench | what it covers |
|---|---|
| `tb_otk_top` | all three parts at default size. Covers: PLL lock, normal and deferred TOA, the 4-edge stop, idle and data words, raw frames, overrun, the external clock, 128-channel chip words (two channels at once), 32-link aggregation. It counts each of these and fails if one never happens. |
| `tb_juloong_chip` | the 128-channel chip at full size. Covers single hits (normal and deferred), a 24-channel burst (round robin, FIFO full) and a second burst while words still wait (dropped results, `hit_lost`). Every word is checked against edge times. |
| `tb_juloong_core` | the test chip alone, same scenario |
| `tb_tdc_channel` | TOT/TOA/CAL against intervals from event times (±1 code), boundary cases, a 150 ps pulse, a 90 ns pulse |
| `tb_tdc_ctrl`, `tb_latch_pulse_gen`, `tb_ring_osc`, `tb_quant_latch`, `tb_coarse_counter`, `tb_tdc_encoder` | TDC pieces (the encoder: every ring state at every coarse count) |
| `tb_tdc_readout`, `tb_hs_serializer`, `tb_ls_serializer`, `tb_pll_model`, `tb_clk_mux` | readout and clocking |
| `tb_event_builder`, `tb_taotie`, `tb_taotie_tree` | packing and aggregation against reference models |

The 128-channel chip makes the full-size tests slow to build: verilator needs
about 4 to 6 minutes to compile `tb_juloong_chip` or `tb_otk_top`, and each then
runs for about 1 minute. The other testbenches build and run in seconds.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ring_osc`, `tdc_channel`, `juloong_core` | `STAGE_DELAY_PS` | 35 | stage delay = LSB |
| `tdc_ctrl`, `tdc_channel`, `juloong_core` | `STOP_COUNT` | 4 | reference edges before a forced stop |
| `latch_pulse_gen` | `PULSE_W_PS`, `GATE_PS`, `VALID_PS` | 300, 450, 280 | latch pulse width, gate setup, validity threshold |
| `ls_serializer`, `juloong_core` | `DIV` / `LS_DIV` | 40 | fast cycles per low-speed bit |
| `pll_model` | `MULT`, `LOCK_CYCLES` | 40, 3 | multiplication, lock delay |
| `juloong_chip` | `NCH`, `FIFO_DEPTH` | 128, 16 | channels, hit FIFO entries |
| `clk_div` | `DIV` | 40 | system clock divider |
| `taotie` | `N_IN` | 8 | inputs per aggregator |
| `taotie_tree` | `N1`, `N_GROUPS` | 8, 4 | first-level width, number of first-level units |

Widths shared by several modules (15 stages, 30 fine bits, 6 coarse bits, 11-bit
codes, word layouts) are in `juloong_pkg`.
