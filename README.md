# Readout logic of a monolithic CMOS LGAD time-of-flight ASIC

This is synthesizable SystemVerilog for the digital part of a time-of-flight
(ToF) sensor chip: a monolithic CMOS sensor with an internal gain layer (LGAD)
meant to time-stamp charged particles with a resolution of a few tens of
picoseconds. The pixel matrix has no clock at all. Each pixel's discriminator
feeds a small clock-less logic block shared by 64 pixels (a *string*). That block
turns the first hit into two timing edges: time of arrival (ToA) and the end of
the pulse, used for time over threshold (ToT). At the bottom of each column,
Wilkinson-type TDCs on a 160 MHz clock digitise the two edges with 10 ps bins.
The results become 64-bit event words, which move from column to column to a
framed 160 Mbit/s serial link.

The chip modelled here is 26 mm x 16 mm:

| quantity | value |
|---|---|
| columns (1 mm wide) | 16 |
| pixel strings per column | 6 |
| pixels per string (4 x 16, 250 µm pitch) | 64 |
| TDC channels per column | 4 (two ToA/ToT pairs) |
| system clock | 160 MHz (6.25 ns) |
| fine time | 10 bits, 10 ps per bin |
| coarse time | 15 bits (204.8 µs wrap) |
| links | 2, each serving 8 columns, 160 Mbit/s SDR |
| FIFO per link | 32 x 64 bit |

## Signal path

```
 pixel discriminators (64 per string, analog, outside)
        │ disc
 ┌──────▼─────────┐   toa, tot, addr[5:0], pileup      ┌─────────────── eoc_column ───────────────┐
 │ string_logic   │ ───────────────────────────────────▶ tdc_dispatch ─▶ tdc_ctrl x4 ─▶ event_buffer x2 │
 │ (no clock)     │ ◀─────────────────────────── ack ── │        framp/sramp ▲ discr (analog TAC)     │
 └────────────────┘                                     │                        eoc_chain_stage ◀── upstream column
 string_config (SPI) ─▶ thr_trim, pix_en                └───────────────────────────────┬───────────┘
                                                                                        ▼ (downstream column … column 0/8)
                                                           data_tx_block: sram_fifo ─▶ framer ─▶ serializer ─▶ tx_data
```

`tof_top` instantiates 16 x 6 `string_logic` and `string_config`, 16
`eoc_column` and 2 `data_tx_block`. It also holds the 15-bit timestamp counter
shared by every TDC.

## The pixel string (`string_logic`)

The enabled discriminator outputs are combined by a balanced OR tree
(`or_tree`, reduced pairwise level by level, so every pixel sees the same depth). Three
flip-flops do the work, and none of them uses the system clock:

* **ToA**: clocked by the rising edge of the OR. It sets `toa` and, on the
  same edge, stores the 6-bit address of the firing pixel from a combinational
  encoder. If several pixels fire together, the lowest index wins.
* **ToT**: clocked by the falling edge of the OR and enabled by `toa`. It
  sets `tot` when the pulse ends.
* **pile-up**: set if any pixel other than the stored one is active while
  `toa` is set.

All three are cleared asynchronously by `ack` from the End-of-Column. A pulse
that is still high when `ack` is released makes no new edge, so it is not seen.
The time information is carried only by the positions of the `toa` and `tot`
rising edges, which the TDCs measure.

## Measuring an edge (`tdc_ctrl`)

Each TDC channel is the digital half of a time-to-amplitude converter. The
analog half, outside this RTL, is a fast current source charging a capacitor
while `framp` is high, a slow one discharging it while `sramp` is high, and a
comparator (`discr`).

1. The trigger edge T0 asynchronously sets the `hit` latch, which raises
   `framp`, and samples the level of `clk` at that instant.
2. The ramp stops on a rising clock edge chosen by that level:
   * clock high: T0 came before the falling edge, so the ramp stops at the
     next rising edge;
   * clock low: T0 came after the falling edge, so the ramp stops at the second
     rising edge.

   The charged interval is therefore always between 0.5 and 1.5 clock periods
   (3.1 to 9.4 ns). The TAC is never used near zero length, where it is
   non-linear.
3. At the stop edge the timestamp counter is captured as `coarse`, `framp`
   drops and `sramp` rises. The controller counts clock cycles until `discr`
   goes high. The count is `fine`, in 10 ps bins. It saturates at 1023 if
   the comparator never trips.
4. `valid` stays high until `clr`, which re-arms the channel one cycle later.

To rebuild the edge time from a result, let `t(c)` be the time of the clock
edge on which the timestamp counter read `c`:

```
T0 = t(coarse) - fine * 10 ps
```

The same formula holds in both cases of step 2, because `coarse` is taken at
the stop edge. The channel is busy for about `fine + 4` clock cycles after the
stop edge. That is at most about 6.4 µs, and this dead time is what limits
the rate of a column.

## Sharing four TDCs among six strings (`tdc_dispatch`)

The four TDCs of a column form two ToA/ToT pairs. The lowest free pair is
*armed*. Its ToA trigger is the OR of the `toa` lines of all strings not
already being served. A string's edge therefore starts the TDC directly, with
no clock in the path. The same edge latches which string it was. The pair's
ToT trigger is then that string's `tot` line.

When the ToT channel has fired (seen on the clock), the dispatcher samples the
string's pixel address and pile-up flag. It then sends a one-cycle `ack`,
which clears the string so it can take the next hit while the pair converts.
The pair is free again once the event buffer has read both TDCs and they have
re-armed.

If a string fires while both pairs are busy, it is acknowledged at once. The
hit is dropped and counted. The next word of that column has its *lost* flag
set and carries the count.
Two strings that fire within the same clock cycle are not both timed exactly:
the second is taken by the next pair from the next clock edge, so its ToA is
late by up to 6.25 ns.

## Event word (`tof_pkg::event_word_t`)

| bits | field |
|---|---|
| 63..60 | header, `4'hF` for data |
| 59..54 | number of hits lost since the previous word of the column (saturates at 63) |
| 53..44 | ToA fine time |
| 43..34 | ToT fine time |
| 33..30 | column address |
| 29..27 | string address |
| 26..21 | pixel address |
| 20..6 | ToA coarse time (15 bits) |
| 5..2 | delta coarse: ToT coarse minus ToA coarse, mod 16 |
| 1 | lost event flag (lost count non-zero) |
| 0 | pile-up flag |

The ToT edge is at `T0 + (delta coarse) * 6.25 ns - (ToT fine - ToA fine) * 10 ps`
after the ToA edge, measured from the same reference. This is unambiguous for
pulses shorter than 16 clock periods (100 ns). An `event_buffer` per pair waits
until both TDCs of the pair are done, whichever finishes last. It then stores
the word, releases the TDCs, and holds the word until the column logic takes
it.

## From column to link

`eoc_chain_stage` is both the column arbitration and one link of a chain. Each
column takes words from its upstream neighbour and its two event buffers in
round-robin order, and passes them downstream through a one-word register, one
clock per column. Words flow towards the lowest column of each group of 8,
which feeds a `data_tx_block`. Only neighbouring blocks are ever connected.

`data_tx_block` buffers the words in a 32 x 64-bit FIFO (`sram_fifo`) and
sends them MSB first, one bit per clock. The line always carries whole 64-bit
words:

| word | value |
|---|---|
| comma (idle) | `64'hBCBC_BCBC_BCBC_BCBC` |
| open frame | `{16'hD584, 48-bit frame number}` |
| data | event word (`4'hF...`) |
| close frame | `{16'hC584, 48-bit number of data words in the frame}` |

A frame opens when data is waiting. It closes when the buffers are empty or
after `FRAME_MAX` (32) data words. Word boundaries are fixed from reset:
every 64 clocks.

**Link sharing** (`share_mode`): link 1 disables its driver (`tx_en` low) and
offers its FIFO head to link 0. Link 0 then alternates, word by word, between
its own FIFO and link 1's inside its frames. This halves the number of active
links when bandwidth allows.

## Slow control (`string_config`)

Each string has a receiver on the chip-wide SPI bus that holds the 6-bit
threshold trim and an enable bit of each of its 64 pixels. A disabled pixel is
removed before the OR tree. Packets are 32 bits, MSB first, sampled on rising
`sck` while `cs_n` is low. Packets may follow each other within one `cs_n`
frame, and a packet cut short by `cs_n` writes nothing.

| bits | field |
|---|---|
| 31..30 | 0 unicast, 1 all pixels of a string, 2 all pixels of a column, 3 broadcast |
| 29..26 | column |
| 25..23 | string |
| 22..17 | pixel |
| 7 | pixel enable |
| 5..0 | threshold trim |

Multicast and broadcast let the whole matrix be set in one packet.

## Rates

| case | load | capacity |
|---|---|---|
| 300 kHz/cm², one column (0.24 cm²) | 72 kHz | ~310 kHz (2 pairs, ≤ 6.4 µs dead time each) |
| 300 kHz/cm², one link (8 columns) | 576 kHz words | ≥ 2.35 Mword/s (2.5 Mword/s less framing) |
| 300 kHz/cm², shared link (16 columns) | 1.15 MHz words | ≥ 2.35 Mword/s |

A TDC pair stays busy until the slower of its two conversions ends. Each
conversion takes 312 to 937 counts of the 160 MHz clock, so the pair is held
for about 730 cycles (4.6 µs) on average. With two pairs and Poisson arrivals
at 72 kHz, about 4 % of the hits find both pairs busy. `tb_column_rate`
measures 95.2 % to 96.3 % of hits read out at 300 kHz/cm², depending on the
seed.

The string logic itself recovers within a few clock cycles of its ToT edge.
Hits beyond what the TDC pairs absorb are not queued: they are dropped and
counted by the lost flag and counter of the next word. With 5 MHz on one string,
`tb_column_rate` sees about 5 % of the hits arrive while the string still
holds an event; those merge into it as pile-up. More than 90 % of the latched
events are then dropped for lack of a free TDC pair.

## What is not RTL here, and choices made

Analog and process-specific parts sit outside `tof_top` and are reached
through its ports:

* the pixel front-end and discriminator (`disc` in, `thr_trim` out);
* the current-mode lines and TIA between strings and EoC, taken as wires;
* the TAC ramps and comparator of each TDC (`framp`, `sramp`, `discr`;
  index `2*p` is the ToA and `2*p+1` the ToT channel of pair `p`);
* the jitter-cleaning PLL and the TDC clock tree (`clk` in);
* the LVDS drivers (`tx_data`, `tx_en`);
* the power domains.

`tb/tac_model.sv` is a behavioural TAC used by the testbenches. It measures
the `framp` width in 10 ps bins and trips `discr` after that many clock
cycles of `sramp`.

The following are choices of this design, not fixed elsewhere:

* how strings are assigned to TDC pairs, and the drop policy;
* the one-word depth of the event buffers and chain stages, and the
  round-robin arbitration;
* the contents of the upper 30 bits of the word: the data header, a 6-bit
  lost-hit counter and the two fine times. That field is otherwise left open
  for a header and counters such as the lost counter;
* the 15-bit coarse field, taken from its bit positions 20..6;
* the low 48 bits of the open- and close-frame words, and `FRAME_MAX`;
* the SPI packet layout, the 6-bit trim width and the pixel-enable bit;
* the chain direction and the link pairs that share;
* valid/ready handshakes everywhere, and asynchronous active-low reset
  (`rst_n`) of all clocked logic. Reset also clears every string.

The event-driven flip-flops (string latches, TDC trigger latch, SPI bit
counter) have a single asynchronous clear that ORs reset with their own
clear: the string ack, the TDC re-arm strobe, or SPI chip select. In a
two-state simulator that starts from random values such a clear only acts on
a rising edge. Testbenches therefore pulse `rst_n` twice, with a clock edge in
between: the first pulse clears the clocked logic, and with it the ack and
re-arm strobes; the second gives every clear a rising edge. Keep SPI chip
select low until reset is over for the same reason.

The Wilkinson counter runs on the 160 MHz system clock. The ratio of the two
ramp currents, which sets the 10 ps bin, belongs to the analog design.

## Simulating

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/tof_pkg.sv tb/tb_tof_top.sv --top-module tb_tof_top -Mdir obj_top
./obj_top/Vtb_tof_top
```

Replace `tb_tof_top` by `tb_string_logic`, `tb_string_config`,
`tb_tdc_ctrl`, `tb_tdc_dispatch`, `tb_event_buffer`, `tb_eoc_chain_stage`,
`tb_eoc_column`, `tb_sram_fifo` or `tb_data_tx_block` for the unit tests.

`tb_tof_top` runs the full-size chip with default parameters: 6144 pixels and
64 TDC channels, each with a behavioural TAC. It does the following:

* configures the pixels over SPI;
* fires random pulses, including pile-ups and bursts that force drops;
* switches to shared-link mode;
* deserialises both links and checks every decoded ToA and ToT against the
  injected pulse to within 10 ps.

Building it takes about a minute and a half, and it runs in about a second.

`tb_column_rate` drives one column (six `string_logic` and one `eoc_column`)
with Poisson hits. The first phase runs at 300 kHz/cm² and the second at
5 MHz on a single string. It checks that every latched event leaves as a
word or a counted drop, and it prints the efficiency.

To change the size, set the `tof_top` parameters (`N_COLS`, `COLS_PER_LINK`,
`N_STRINGS`, `N_PIX`, `N_PAIRS`, `TRIM_W`). The word format fixes the column
address at 4 bits, the string at 3 and the pixel at 6. Those widths are in
`tof_pkg`, and larger arrays need wider fields there.
