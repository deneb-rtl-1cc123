# DENEB digital readout: event-driven time and charge digitisation for a 32 x 32 SiPM matrix

DENEB is a readout chip for a matrix of silicon photomultipliers (SiPMs) that
works from room temperature down to liquid argon (77 K). Each of its 1024
channels must time-stamp single photons to better than 100 ps and count up to
hundreds of photoelectrons, while only a few serial links leave the cryostat.
The chip therefore does not sample waveforms. Each pixel digitises an *event*:

- the time of the threshold crossings;
- how long the signal stayed above threshold;
- the charge collected during the event.

It then sends one or two 64-bit words. The words drain down each column into a
buffer at the bottom of the matrix. A time-division multiplexer then spreads
the 32 column buffers over 1 to 32 serial links.

This repository holds SystemVerilog for the chip's digital part. The analog
front end is not modelled at transistor level. Its outputs (two discriminator
signals and a current sample per pixel) are inputs of the top module. The
analog blocks inside the pixel that produce numbers, namely the four TDCs and
the charge-to-frequency converter, are behavioural models. Everything else is
synthesizable RTL.

All clock-cycle figures below assume a **320 MHz system clock** (Tclk =
3.125 ns). At that clock, one bit per clock gives the specified 320 Mbit/s
link rate.

## Data path at a glance

```
disc_lo/disc_hi ──► event_def ──► tac_trigger ──► 4 x tdc_tac_model (2 pairs)
   (async)             │               │                    │ stop edge, fine code
sipm_i ─► cfc_model ─► cfc_counter     └── per-pair records ─┘
                       tot_counter  ──────────► data_formatter ─► sync_fifo (4 x 64)
                                                                     │
        pixel 31 ─► chain_node ─► ... ─► pixel 0 chain_node ─► eoc_ctrl (SRAM ring, 2048 x 64)
                                                                     │
                             tdm_mux (columns → links) ─► link_serializer (66-bit frames, SDR/DDR)
```

| Module | Role |
|---|---|
| `deneb_pkg` | word layouts, configuration register layouts, widths |
| `deneb_top` | whole chip: 32 columns, 32 end-of-column controllers, multiplexer, 32 links, global configuration |
| `pixel_column` | 32 pixels chained for configuration and for data |
| `pixel` | `pixel_digital` plus the analog behavioural models |
| `pixel_digital` | all synthesizable pixel logic |
| `event_def` | veto, force, synchroniser, event window with extension and hold-off |
| `tac_trigger` | steers the discriminator edges to the TDC pairs; pair bookkeeping |
| `tdc_tac_model` | behavioural time-to-amplitude converter and ADC |
| `cfc_model` | behavioural current-to-frequency converter, one pulse per charge quantum |
| `cfc_counter`, `tot_counter`, `hs_counter` | charge pulses, time over threshold, coarse time |
| `data_formatter` | builds the timing and charge words |
| `sync_fifo`, `chain_node` | pixel output buffer; column daisy-chain arbitration |
| `pixel_addr_gen` | the pixel learns its row from its neighbour |
| `eoc_ctrl`, `eoc_sram` | end-of-column ring buffer, column configuration, back-pressure |
| `tdm_mux` | round-robin sharing of columns among active links |
| `link_serializer` | 66-bit framing, SDR or DDR output |
| `spi_rx`, `tmr_reg` | configuration shift registers; triple-redundant register |

## The pixel: from discriminator edges to words

### Event window (`event_def`)

The discriminator is first gated:

- The test strobe replaces it when the pixel's `force_en` bit is set.
- It is masked when the pixel is disabled.

A two-flop synchroniser feeds a small state machine with the states IDLE, OPEN,
TAIL and HOLD.

- An event **opens** on a rising edge. This needs the acquisition window
  (`acq_en`) to be high and no hold-off to be running.
- The event stays open while the discriminator is high. It then stays open for
  `ext` more cycles.
- A new edge during that tail extends the same event and sets the `merged`
  flag. This is how close photon packets are combined, so they use only one
  TDC pair.
- When the window closes, `ev_end` pulses and the window length is reported.
  Then `holdoff` cycles of veto follow. This is the per-pixel dark-count veto
  window.

`ev_start` comes three clock edges after the discriminator rises.

### Four TDCs as two derandomising pairs (`tac_trigger`, `tdc_tac_model`)

Each pixel has four time-to-amplitude converters, grouped as pairs {0,1} and
{2,3}. An event takes one pair:

- the low-threshold crossing starts the even TDC (time of arrival);
- the high-threshold crossing starts the odd TDC (which gives the slew rate).

While one pair converts, the other is armed, so a second event that follows
closely is still measured. A third event while both pairs are busy is
**lost**. It is counted on the pixel's `ev_lost` output.

This is the part that is hardest to follow, so here are its rules:

- **Arming.** `lo_arm[k]` is a register. It is high only for the free pair
  that the pointer `ptr` names, and only while the event logic may accept an
  event. The start of the even TDC is the asynchronous AND of `disc_lo` and
  `lo_arm`, so the TDC sees the true edge and not the synchronised one.
- **High threshold.** The odd TDC's start is `disc_hi & busy[even] & ~pending`.
  The high crossing therefore goes to the pair whose low TDC is running for
  the event that is still open.
- **Claiming.** At `ev_start` the event claims pair `ptr` if that pair's even
  TDC really started, and `ptr` toggles. Otherwise the event is lost.
  A TDC started by an edge that never became an event is released
  automatically.
- **Read-out order.** At `ev_end` the pair becomes pending. The pending pairs
  are read in order: the oldest is offered to the formatter once its
  conversions are done, and `res_ack` frees it.

**The TDC model.** A start opens the window. The stop is the first clock edge
at least 0.5 Tclk after the start, so the window runs from 0.5 to 1.5 Tclk.
The fine code is the interval in units of Tclk/128 (24.4 ps), so it lies
between 64 and 191. The `stop` pulse latches the coarse counter. `valid`
arrives 16 cycles later (the ADC conversion).

Time of arrival is `coarse(stop) * Tclk - fine * Tclk/128`.

### Charge, time over threshold and words (`cfc_*`, `tot_counter`, `data_formatter`)

**Charge.** The charge branch is modelled as a first-order sigma-delta
converter. The sampled current accumulates, and each time it reaches one
quantum (`QREF`) a pulse is emitted. There is at most one pulse per clock.
`cfc_counter` counts the pulses inside the event window and saturates.

**Time over threshold.** `tot_counter` counts the synchronised
low-threshold-high samples, the first one included.

**Words.** At the end of an event, the per-pair record holds the address,
coarse time, ToT, charge, window length and flags. When the pair's
conversions finish, `data_formatter` pushes two words into the 4-deep pixel
FIFO on consecutive cycles: the timing word, then the charge word. In
timing-only mode it pushes the timing word alone.

#### Word formats (64 bits, MSB first)

| Bits | Timing word (bit 63 = 0) | Charge word (bit 63 = 1) |
|---|---|---|
| 62:53 | pixel address {column, row} | pixel address |
| 52:37 | coarse time at the low-threshold TDC stop | same coarse time |
| 36:29 | fine code, low threshold | charge pulse count (36:21) |
| 28:21 | fine code, high threshold (0 if none) | |
| 20:13 | stop-edge difference high − low, in cycles (0xFF none, 0xFE saturated) | window length, cycles (20:8) |
| 12:0 | time over threshold, cycles (saturating) | 7: charge overflow, 6: ToT overflow, 5: merged, 4:0: zero |

## Column chain and end-of-column buffer

The 32 pixels of a column form a daisy chain. Pixel 0 sits next to the
column's end.

- Each `chain_node` has one registered 64-bit output stage.
- It takes a word from upstream when it can, and otherwise from its own FIFO.
  Upstream has priority, so words already in the chain keep moving.
- `ready` is registered, so each node passes at most one word every two
  cycles.
- The row address needs no configuration. `pixel_addr_gen` passes
  `row + 1` to the next pixel.

`eoc_ctrl` writes the words into a 2048 x 64 `eoc_sram` used as a ring
buffer:

- When the buffer is full, `col_ready` drops and the whole column chain
  stalls. No word is lost. The pixels' FIFOs fill, and then their TDC pairs
  stay occupied, so new events are counted as lost at the source.
- The read side prefetches one word into an output register for the link
  multiplexer.
- `eoc_ctrl` also holds the column's 32-bit configuration register. It
  provides `col_en`, which vetoes the column's acquisition (the clock-veto
  function), and the 8-bit trim for the column's skew-correction delay line.

## Links and time-division multiplexing

The global register field `link_sel` chooses n = 32 >> `link_sel` active links
(32, 16, 8, 4, 2 or 1). Link l serves the columns c with c mod n = l, taking
them in round robin. Whenever its serializer can take a word, it takes one
from the next column that has data.

`link_serializer` sends 66-bit frames, MSB first:

- a 2-bit header, `01` for data and `10` for an idle frame;
- then the 64-bit word.

In SDR mode it sends one bit per clock, on `link_data[l][1]`. In DDR mode it
sends two bits per clock, `[1]` then `[0]`, which are meant for the two edges
of the pad's transmit clock. With all 32 links in DDR mode, the raw rate is
32 x 640 Mbit/s = 20.48 Gbit/s, of which 64/66 is payload. Unused links are
disabled (`link_oe` low).

## Configuration

A single SPI-like chain (`spi_sclk`, `spi_mosi`, `spi_cs_n`, `spi_miso`)
configures the whole chip. It shifts MSB first. `sclk` is sampled by the
system clock, so it must be at most clk/4. Every register loads its shadow
copy when `cs_n` rises.

The chain order from `spi_mosi` is:

1. the global register (32 bits, triple-modular-redundant, continuously
   scrubbed);
2. column 0's periphery register;
3. column 0's pixels 0..31;
4. column 1's periphery register;
5. and so on.

That makes 32 + 32 x 33 x 32 = 33,824 bits. Send the last register's bits
first. The fields are listed in `deneb_pkg` (`glob_cfg_t`, `col_cfg_t`,
`pix_cfg_t`).

- **Global register:** run, timing-only, DDR, link_sel.
- **Column register:** column enable, delay-line trim.
- **Pixel register:**
  - enable, power gating, charge enable, force, cryogenic bias mode;
  - window extension and hold-off, 8 bits each;
  - 11 analog trim bits, brought out to top-level ports for the missing DACs.

`seu_inj` flips one copy of the global register for testing. `cfg_tmr_err`
shows that the copies disagreed before the scrub.

## What is this design's own, and what is missing

The chip description gives the organisation: the event definition by
threshold crossings, programmable window extension and veto, four TDCs per
pixel for derandomisation, the 1.5 Tclk interpolation window, the in-pixel
current-to-frequency charge counting, 64-bit words, per-column SRAM, the link
rates and TDM, TMR in the periphery, and the 32-bit SPI registers. Everything
below is a choice made here:

- **Clock.** 320 MHz.
- **Widths and fields.** All field widths and the word layouts. These include
  the 16-bit coarse counter (about 205 µs before wrap-around), which is reset
  by `sync_rst`.
- **Fine bin.** Tclk/128 (24.4 ps), inside the intended 20–50 ps range. The
  16-cycle conversion time is also a choice.
- **Veto.** Read as a hold-off after each event, plus the global acquisition
  window and column enable.
- **Pair allocation.** The alternating-pair scheme, and losing an event when
  no pair is free.
- **Periphery.** The chain protocol, the ring buffer and back-pressure, the
  link mapping, the frame format and the SPI protocol.
- **TMR scope.** TMR is applied to the global register only.

Not built: the analog front end (current conveyor, amplifier, discriminators),
the threshold and calibration DACs, bias generation, the skew-correction DLL
and the clock tree, the SLVS/LVDS drivers, and the package. Their digital
settings are outputs of `deneb_top`. Their signals (discriminators, current
samples) are inputs.

`deneb_top` contains behavioural models (real-valued delays for the TDCs), so
it is a simulation top. For synthesis, the TDC and charge-converter models in
`pixel` would be replaced by the real macros, which have the same ports.

## Simulating

Every block has a self-checking testbench `tb/<module>_tb.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/deneb_pkg.sv tb/deneb_top_tb.sv --top-module deneb_top_tb -o sim
obj_dir/sim +verilator+rand+reset+2
```

Replace `deneb_top_tb` with any other testbench name. `tb/pixel_checks.svh`
and `tb/top_checks.svh` hold stimulus and checking tasks that several
testbenches share.

`deneb_top_tb` runs the chip end to end, from the configuration chain to the
decoded link frames. Each delivered word is compared with the event that was
fired. The test also counts the following mechanisms, and any that never
occurs counts as a failure:

- timing+charge words on SDR links;
- a switch to timing-only DDR on a single link, which time-multiplexes 4
  columns;
- buffer-full stalls of the column chains;
- events lost because both TDC pairs were busy;
- merged photon packets;
- forced test events;
- vetoes by the acquisition window and by a disabled column;
- a voted-out single-event upset in the global register.

`pixel_rate_tb` runs one pixel at the specified event rates:

- 300 events at 3.8 MHz (one every 84 cycles);
- 100 pairs of events 100 ns apart;
- 100 pairs of events 62.5 ns apart.

No event is lost, and every timing word leaves the pixel at most 21 cycles
after its discriminator edge. A 100 ns gap is therefore handled with one TDC
pair. Only the 62.5 ns bursts need both pairs at once.

`eoc_capacity_tb` fills one end-of-column buffer at its default size. It
accepts 2049 words, which is more than 1024 two-word events: 2048 are held in
the SRAM and one in the output register. The column then stalls, and the
buffer drains in order.

**Largest size simulated:** `deneb_top_wide_tb` has all 32 columns, all 32
links and full 2048-word column buffers, but only 8 rows: 256 of the 1024
pixels. It checks the two extremes of the link mapping:

- 32 SDR links, one per column;
- a single DDR link that time-multiplexes all 32 columns.

Every delivered word is compared with the event that was fired. The test
builds in about 2 minutes and runs in about 15 s.

`deneb_top_tb` runs 4 x 4 pixels with 4 links and 8-word column buffers, so
that stalls are easy to provoke. `pixel_column_tb` runs a column of 4 pixels.
`pixel_tb`, `pixel_rate_tb`, `eoc_capacity_tb` and several lower-level
testbenches use the blocks' default parameters.

The full 32 x 32 chip compiles and passes lint. A simulation at full size
was not completed: it has 1024 pixels, each with four real-time TDC models,
and the C++ build of its Verilator model alone did not finish within 12 minutes.
