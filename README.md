# ATLASpix1_M2 digital periphery: triggered readout for an HVCMOS pixel sensor

ATLASpix1_M2 is a monolithic high-voltage CMOS pixel sensor. It was built as a
prototype for the outer barrel layer of the ATLAS inner tracker at the HL-LHC.
Each pixel holds only a charge amplifier and a discriminator. All the logic sits
in the periphery at the edge of the chip, and no clock runs into the pixel matrix.

This chip does not stream out every hit. It stores every hit next to the matrix
for a programmable time, the *on-chip latency*. It then sends only the hits
that the experiment's level-1 trigger asks for. This RTL covers the digital side
of that scheme:

- the transfer of hits from the pixels into per-super-pixel hit buffers;
- the time-stamp-addressed buffers that apply latency and trigger;
- the column readout;
- the readout control unit, with its clocks, time stamps, 8b/10b encoder and
  serializer tree.

The numbers below are for the default configuration: 56 columns × 320 rows =
17 920 pixels, with an 800 MHz input clock.

## Data path at a glance

```
pixels (16) ──sp_addr_encoder──► 8 lines ──► cab (4 hits, TS compare) ─┐
        × 20 super pixels per column                                   ├─► EoC buffer ─┐
                                                         hit_column ───┘                │ × 56
                                                                                        ▼
 rcu:  clk_gen ─► ts_gen ─► (ts, ts_del to all cabs)      readout_ctrl ◄── eoc_full / data
                                                              │ K28.1 + 4 bytes, K28.5 idle
                                                          enc8b10b ─► serializer (10→8→4→2)
                                                                            │
                                                                      cml_ser (DDR) ─► ser_out
```

## Super pixels and projection addressing

The matrix has 56 columns of 320 pixels. The pixels are 50 µm × 60 µm. Sixteen
vertically adjacent pixels form a *super pixel* of 800 µm × 60 µm, so a column
has 20 super pixels with group addresses 0–19.

Routing 16 hit lines per super pixel to the periphery would use too much space.
Instead the pixels drive 8 lines by *projection addressing* (`sp_addr_encoder`).
The 16 pixels form four groups of four, and pixel `k` pulls up two lines:
group line `k/4` and position line `k%4`. The output is
`addr = {group[3:0], position[3:0]}`. All 16 pixels share these lines as a
wired OR.

- **One hit raises exactly two lines.** The hit pixel is then known exactly.
- **Two hits can produce ghosts.** Suppose the hits fall in different groups and
  at different positions. The pattern then decodes to four pixels, two of them
  ghosts. For example, a two-pixel cluster across a group edge (pixels 3 and 4)
  gives lines G0, G1, P3, P0, which reads as pixels 0, 3, 4 and 7.
- **Ghosts are left to offline reconstruction.** At a hit rate of about
  108 MHz/cm², a super pixel sees a hit in only about 1.3·10⁻³ of bunch
  crossings.

The choice of group and position lines is this design's reading of the scheme.
It reproduces the ghost behaviour described above.

## Content addressable hit buffer (`cab`): latency and trigger

This is the central mechanism of the chip. Each super pixel has one buffer,
with four entries. An entry holds:

- the 8-bit line pattern;
- the 10-bit gray-coded time stamp (TS) of the hit;
- a state: free, waiting or marked.

**HitOR.** The OR of the 8 lines is the HitOR signal. On a rising HitOR edge the
pattern and the current TS are written into the lowest free entry. If all four
entries are in use, the hit is lost: `lost` pulses and the top's `lost_hits`
counter counts it. A line held high records only one hit.

**Latency by content addressing.** There are no per-entry timers. The RCU
distributes two time stamps, both gray coded:

- `ts`, the current bunch crossing (BC, 25 ns);
- `ts_del = gray(count − latency)`, the same sequence lagging by the on-chip
  latency.

At every BC each waiting entry compares its stored TS with `ts_del`. A match
means the hit is exactly `latency` BCs old. If the level-1 `trigger` is high at
that moment, the entry becomes *marked*. Otherwise it is freed, which deletes
the hit.

Because the TS wraps at 1024, the latency must be between 1 and 1023 BC. The
measurements used 43 BC with a 16-BC wide trigger. The wide trigger makes sure
that every hit of an injection falls inside it.

**Readout side.** A buffer with a marked entry raises `has_marked` and shows
that entry on `rd_*`, lowest entry index first. The column logic frees the entry
with `unload`. The group address comes from the parameter `GROUP_ADDR`, which
stands in for the super pixel's address ROM.

Timing:

- `tick` is high for one 800 MHz cycle when the new `ts`/`ts_del` appear.
- Marking and deletion happen at the clock edge at the end of that cycle.
- A hit recorded in BC *n* is marked or deleted at the tick that starts BC
  *n + latency*.

## Column and End of Column buffer (`hit_column`)

A column holds 20 encoders and 20 hit buffers, plus an End of Column (EoC)
buffer of one hit.

- **Load column (`ld_col`).** If the EoC buffer is empty, the lowest-numbered
  super pixel that has a marked hit moves that hit into the EoC buffer. The hit
  is freed in its buffer in the same cycle. All columns load in parallel.
- **Read column (`rd_col`).** The EoC buffer is emptied. A load in the same
  cycle refills it.

The EoC depth and the super-pixel priority are choices of this design.

## Readout Control Unit (`rcu`)

### Clocks (`clk_gen`)

The RCU derives three clocks from the 800 MHz input with Johnson counters:

- **400 MHz:** a toggle flop, used inverted.
- **200 MHz:** a two-stage Johnson counter.
- **160 MHz:** a three-stage Johnson counter shortened to five states
  (000 → 001 → 011 → 110 → 100). Its 2/5 duty cycle is stretched to 50 % by
  OR-ing it with a copy retimed on the falling edge.

All three rise together every 20 input cycles. One 160 MHz cycle in four marks a
bunch crossing: 25 ns at 800 MHz.

On the chip these are separate clock domains. In this RTL every register runs on
the 800 MHz clock. The one-cycle strobes `ce_400`, `ce_200` and `ce_160` serve
as clock enables, and each coincides with a rising edge of its divided clock.
The divided clocks are still generated and brought out at the top. This keeps
the design in one timing domain without changing when anything happens.

### Time stamps (`ts_gen`)

A binary counter advances once per BC. `ts` and `ts_del` are its gray code and
the gray code of (counter − `latency`). Both are registered and change together.

### Scheduling and framing (`readout_ctrl`)

The controller loops through three steps:

1. **Load column** for one cycle.
2. **Scan.** Take the lowest column whose EoC buffer is full, read it and keep
   its hit for transmission.
3. If no EoC buffer is full, go back to step 1. Otherwise wait until the hit can
   go out.

Each hit is sent as five 8b/10b characters, one per 160 MHz cycle:

| character | content |
|-----------|---------|
| 1 | K28.1 (frame start) |
| 2–5 | the 32-bit word `{3'b000, col[5:0], grp[4:0], ts[9:0], pat[7:0]}`, most significant byte first |

The time stamp is the stored gray code. When nothing is pending, the idle comma
K28.5 is sent. The next EoC buffer is read while a frame is still being sent, so
waiting hits go out back to back at 25 bits of line time each. This format is
this design's own; it is not taken from the chip.

### 8b/10b encoder (`enc8b10b`)

This is the standard Widmer–Franaszek code in two pipeline stages, one character
per 160 MHz cycle:

1. **Table look-up.** The 5b/6b and 3b/4b codes in their negative-disparity
   form, with flags: has a complement, unbalanced, forces the D.x.A7 code.
2. **Disparity.** Holds the running disparity and complements sub-blocks where
   it is positive.

K28.y characters are supported, and their positive-disparity form is the
complement of the negative one. A character taken on one strobe appears on
`sym` at the next strobe. Bit 9 (`a`) is sent first.

### Serializer tree (`serializer`) and output stage (`cml_ser`)

The serializer first registers each 10-bit word on the 160 MHz strobe (input
synchronisation). Three stages follow, each keeping the bit rate constant:

| stage | width | rate | how |
|-------|-------|------|-----|
| 1 | 10 → 8 | 200 MHz | gearbox: a bit queue that gives its eight oldest bits on each 200 MHz strobe |
| 2 | 8 → 4 | 400 MHz | 2:1 multiplexer over a held byte |
| 3 | 4 → 2 | 800 MHz | 2:1 multiplexer over a held nibble |

The gearbox needs the fixed phase between the 160 and 200 MHz strobes that
`clk_gen` provides. Its queue then stays between 0 and 16 bits.

The 2-bit output feeds the final 2:1 stage. On the chip that stage is a
full-custom current-mode-logic (CML) cell. `cml_ser` is a behavioural model of
it: it registers the pair and drives `d[1]` while the clock is high and `d[0]`
while it is low. The line rate is therefore twice the input clock:

| input clock | line rate |
|-------------|-----------|
| 800 MHz | 1.6 Gbit/s |
| 640 MHz | 1.28 Gbit/s (the rate shown in eye-diagram measurements of the chip) |
| 400 MHz | 800 Mbit/s (the rate used for the threshold scans) |

## Top level (`atlaspix_m2_top`)

| port | meaning |
|------|---------|
| `clk`, `rst_n` | 800 MHz clock, asynchronous active-low reset |
| `latency[9:0]` | on-chip latency in BC (1–1023) |
| `trigger` | level-1 trigger, synchronous to `clk` |
| `pix[col][sp][k]` | discriminator outputs; pixel `k` of super pixel `sp` is row `16·sp + k` |
| `ser_out` | serial line; `ser_d[1:0]` is the same data before the DDR stage |
| `lost_hits[15:0]` | saturating count of hits dropped by full buffers |
| `clk_400`, `clk_200`, `clk_160` | divided clocks |

Parameters: `NCOL` = 56, `NSP` = 20, `DEPTH` = 4. Every module carries these
defaults, so the top builds at full size as is. Shared constants and the
`hit_t` hit type are in `atlaspix_pkg`.

## What is not in the RTL

- **Pixel analog front end.** The charge amplifier and discriminator are analog.
  Their outputs enter as `pix`, assumed synchronous to the clock; on silicon they
  are asynchronous pulses.
- **Per-pixel threshold trim.** The 3-bit tune DAC is analog, and no write path
  for the trim memory is defined.
- **PLL.** The clock is a top-level input.
- **Bias block and the sensor itself.** Neither has a logic function.
- **Pixel-to-buffer line delays.** The hit lines are not equal in length, so
  their delays differ: in simulation, by up to about 36 ns between the top and
  bottom pixels of a column. This is a layout effect and is not modelled. In the
  RTL all lines arrive in the same clock cycle.
- **6-bit second time stamp (TS2).** The shared RCU design carries it, but this
  chip does not use it, so it is omitted.

## Departures and choices to be aware of

- **Single clock domain.** Clock enables are used instead of true divided clock
  domains; see "Clocks".
- **Trigger rule.** A hit is kept if the trigger is high at the bunch crossing
  where its latency expires.
- **Choices made here, not taken from the chip:**
  - the group/position assignment of the 8 address lines;
  - the one-hit EoC buffer and the fixed priorities (entry, super pixel,
    column);
  - the frame format and the K28.1/K28.5 characters;
  - the 10/8/4/2 stage widths of the serializer;
  - the derivation of the BC strobe from the 160 MHz clock;
  - the `lost_hits` counter.
- **Minimum latency.** A latency of 0 is not supported.

## Simulating

Each block has a self-checking testbench in `tb/`, named `tb_<module>`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog. Two
helpers are shared:

- `tb_8b10b_pkg` is a reference 8b/10b code with both disparity columns spelled
  out.
- `tb_link_rx` locks on the comma, decodes the serial stream, checks the running
  disparity and collects frames.

With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/atlaspix_pkg.sv tb/tb_8b10b_pkg.sv tb/tb_atlaspix_m2_top.sv \
    --top-module tb_atlaspix_m2_top
./obj_dir/Vtb_atlaspix_m2_top
```

Replace the testbench file and top name to run another test.
`tb_sp_addr_encoder`, `tb_clk_gen` and `tb_cml_ser` do not need the two package
files.

`tb_atlaspix_m2_top` runs the full-size design with its default parameters and a
latency of 43 BC. It covers three scenarios:

1. **Triggered hits.** Hits land in several columns, including both corners of
   the matrix, a cluster across a group edge, and two hits in one super pixel.
   All of them must be read out.
2. **Deleted hits.** Hits whose latency expires without a trigger must never
   appear.
3. **Overflow.** Six hits arrive in one super pixel within one BC. Four must be
   read out and two counted as lost.

The received hits are compared with the expected ones as a multiset. The test
also checks that each mechanism actually occurred. It takes a few seconds of
simulation after a build of about two minutes.

`tb_threshold_scan` reproduces the settings used for threshold scans: latency
43 BC and a 16-BC trigger at a fixed delay after each injection. It injects into
the whole matrix twice:

1. Every pixel fires, giving one 8-line hit per super pixel.
2. One pixel per super pixel fires.

All 2 240 hits must arrive exactly once, and none may be lost. A full-matrix
injection takes about 28 900 cycles, about 1 440 BC at 800 MHz, to leave the
chip. That is one hit per 25 cycles, the link's capacity. The test runs in about
half a minute, plus a two-minute build.

The block tests cover the following:

- the clock periods, duty cycle and strobe alignment;
- the time-stamp wrap;
- every 8b/10b data value, with disparity;
- word order through the serializer at fixed latency;
- frame order and the absence of idle gaps in the controller;
- the exact latency of marking in the hit buffer.
