# Readout for a 320x256 binary pixel matrix at 100 MHz/cm²

A pixel detector for a high-luminosity tracker sees about 100 MHz of hits per
cm². This chip has 80K pixels (320x256, 40 µm pitch, about 1.3 cm²), so it must
read about 130 million hits per second. It must also give each hit a time
stamp with a granularity of 0.25-2 µs, the BCO period. Scanning every pixel
every period is far too slow, and per-pixel time stamps cost too much area.

The architecture here uses neither. It works on groups of pixels:

- When a BCO period ends, every **macro pixel** (a 2x8 group) that has a hit
  is **frozen**.
- The set of frozen groups is stored as a **map** tagged with the period
  number.
- A sweeper then reads only the columns that hold frozen groups, and resets
  each group after the read.
- The hits become **zone words**: a column, one of 32 vertical 8-pixel
  zones, and an 8-bit pattern.
- The words pass through two levels of FIFOs (**barrels**) and merges. They
  reach the chip bus sorted by time, each period opened by one time-stamp
  word.

Four submatrices of 80x256 pixels do this in parallel. Together they examine
1024 pixels per clock.

Everything is synthesizable SystemVerilog. All digital logic runs on one
readout clock (60-100 MHz in the intended use). The default parameters build
the full-size chip.

## Hierarchy

```
superpix_top
├── submatrix_readout  x4   (one per 80x256 submatrix)
│   ├── pixel_submatrix     80x256 pixels as 40x32 macro_pixel instances
│   ├── time_counter        8-bit BCO period counter
│   ├── scan_buffer         FIFO of (time stamp, 1280-bit MP map), 4 deep
│   ├── sweeper             freeze, map push, column sweep, MP reset
│   ├── sparsifier     x4   64 pixels of the column -> zone words
│   ├── barrel         x4   level-2 barrels, 8 words
│   ├── concentrator        time-sorted 4:1 merge, adds L2 address
│   └── barrel              level-1 barrel, 32 words
├── output_stage            time-sorted 4:1 merge of the L1 barrels, adds L1 address, bus register
├── i2c_slave               slow-control port
├── register_file           control, flags, counters
└── mask_register           one mask bit per macro pixel
```

`superpix_pkg` holds the field widths, the zone-word struct and `ts_older`,
the modulo-256 time comparison.

## Macro pixels, freezing and the time stamp

Each pixel is a flag that a discriminator pulse sets. A 2x8 macro pixel (MP)
ORs its 16 flags into a fast-OR line.

At a BCO edge the sweeper samples all 1280 fast-OR lines of its submatrix.
Each MP that is set and not already waiting is:

- frozen, so its pixels take no new hits;
- marked in a 1280-bit map.

The map is pushed into the scan buffer with the number of the period that just
closed. An empty map is pushed too. Every period therefore produces a
time-stamp word in every stream, even a period with no hits. The merge stages
rely on this (see below).

A frozen MP stays frozen until the sweeper reads and resets it. Hits lost in
that time are the design's first loss mechanism, the *frozen MP* loss:

- a hit on a frozen MP;
- a second hit on a flag that is already set.

The BCO edge reaches the logic as `bco_tick`, a one-cycle strobe on the
readout clock. `ts` counts periods modulo 256.

## The sweep

The sweeper takes the oldest map from the scan buffer and handles it in
three steps:

1. It loads the map's time stamp into the four sparsifiers as a header.
2. It visits, in increasing order, only the MP columns in which the map has
   an MP. Empty columns cost nothing.
3. For each visited column it reads the two pixel columns one after the
   other. Only that map's MPs drive the 256-bit column bus. The MPs are reset
   on the second read.

```
cycle      0        1        2      3      4      5    ...   2k+1  2k+2
sweeper  pop map  header  c0/pix0 c0/pix1 c1/pix0 c1/pix1 ... c(k-1)/pix1  idle
                                   reset c0      reset c1       reset c(k-1)
```

A map with k columns takes 2k+3 cycles if the sparsifiers never stall.

With random hits at the target rate, a submatrix sees 33.8 MHz. A 0.5 µs
period then holds about 17 hits spread over about 14 of the 40 columns. That
is about 31 cycles: 0.31 µs at 100 MHz, 0.39 µs at 80 MHz.

Scan-buffer overflow is the second loss mechanism, and it works indirectly.
If the scan buffer is full at a BCO edge, no map is pushed and `sb_overflow`
pulses. The MPs that fired stay frozen and are not marked as queued. The next
edge that finds room puts them into its map, under that later time stamp.
They lose no stored hits, but they stay frozen longer, and more hits are lost
to freezing.

## Zone sparsification

The 256-pixel column is split into four quarters of 64 pixels. Each quarter
feeds its own sparsifier and level-2 barrel. Within a quarter there are 8
zones of 8 pixels.

A sparsifier takes one column (or one header) when it is `ready`. It then
writes one word per cycle, one for each non-empty zone in increasing zone
order. `ready` returns while it writes its last zone, so a column with z
non-empty zones keeps it busy for max(z,1) cycles. The sweeper waits until
all four are ready.

Words into a level-2 barrel (19 bits):

| bit 18 | bits 17:11 | bits 10:8 | bits 7:0                  |
|--------|------------|-----------|---------------------------|
| 0      | column x   | zone      | pattern (bit b = row 8·zone+b) |
| 1      | —          | —         | time stamp                |

A zone word that meets a full barrel is dropped, and `b2_overflow` pulses.
This is the third loss mechanism. A header is never dropped: the sparsifier
waits for room, so every period stays marked.

## Barrels and the time-sorted merge

This part is the least obvious.

A barrel is a FIFO with first-word fall-through. A write into a full barrel
is dropped and pulses `overflow`. The same module is the level-2 barrel
(depth 8) and the level-1 barrel (depth 32).

The **concentrator** merges N=4 barrel streams into one. Each input stream is
a run of headers, each followed by that period's hits. The output must keep
that form. Each cycle it does one of these:

- **Hits first.** If any input has a hit word at its head, it forwards one,
  round-robin among those inputs, with the input number added as a 2-bit
  address.
- **Header when all agree.** If every input shows a header, it writes one
  header holding the oldest of their time stamps. It pops every input whose
  header has that stamp. Inputs with a younger stamp keep theirs.
- **Wait.** If some input is empty and the others show headers, it waits.
  The empty input may still deliver hits of the current period.

Why this is correct: a stream's header for period t follows all of its hits
for earlier periods. So when all heads are headers, every hit of the periods
before the oldest header has gone out.

Ages are compared modulo 256 (`ts_older`). This is valid while the stamps in
flight span fewer than 128 periods. The scan buffer (4 maps) and the barrels
keep them within a few periods.

The same module is used twice:

- Inside a submatrix it merges the four level-2 barrels into the level-1
  barrel. It writes regardless of room, so a full level-1 barrel drops hits
  (`b1_overflow`, the fourth loss mechanism). Headers wait.
- In the output stage it merges the four level-1 barrels and never drops. It
  stops when the output register is not taken.

## The chip data bus

`bus_valid`/`bus_ready` is a plain valid/ready handshake on a registered
word. `bus_is_ts` marks time-stamp words.

Hit word (22 bits):

| 21:20 | 19:18 | 17:11  | 10:8 | 7:0     |
|-------|-------|--------|------|---------|
| L1 (submatrix) | L2 (quarter) | column in submatrix | zone | pattern |

For a time-stamp word (`bus_is_ts`=1), bits 7:0 hold the stamp and the rest
are 0. A time-stamp word comes once per period. It comes after all hits of
older periods and before all hits of its own period.

To decode the absolute pixel of pattern bit b:

```
column = 80*L1 + column field
row    = 64*L2 + 8*zone + b
```

## Slow control

An I2C-like slave sits on two open-drain lines, SCL and SDA, with pull-ups
off chip. The pad is outside: the slave sees the line levels `scl_i`/`sda_i`
and pulls SDA low with `sda_oe`.

- **Address.** The 7-bit device address is `{4'b0100, chip_addr}`. The three
  `chip_addr` pins are wired per chip, so up to 8 chips share a bus.
- **Sampling.** Both lines are oversampled on the readout clock. SCL must be
  several times slower than clk. There is no clock stretching and no
  general call.
- **Write.** START, device address + W, pointer high byte, pointer low byte,
  data bytes…, STOP. Each data byte is written at the pointer, which then
  increments.
- **Read.** Set the pointer as in a write, then repeated START, device
  address + R. The slave sends bytes from the pointer while the master ACKs,
  and stops at a NACK.

Register map (byte registers, multi-byte values little-endian):

| address      | name  | access | content |
|--------------|-------|--------|---------|
| 0x0000       | CTRL  | RW | bit 0 run (reset 1; 0 stops the time counters and freezing), bit 1 clear counters (self-clearing) |
| 0x0002       | FLAGS | RO | bits 3:0 scan buffer full per submatrix, bits 7:4 submatrix busy |
| 0x0004-0x07  | HITS  | RO | hit words delivered on the bus (32 bit) |
| 0x0008-0x0B  | TSW   | RO | time-stamp words delivered (32 bit) |
| 0x0010+s     | SBOVF | RO | scan-buffer overflows, submatrix s (8 bit, saturating) |
| 0x0014+s     | B2OVF | RO | level-2 barrel overflows, submatrix s |
| 0x0018+s     | B1OVF | RO | level-1 barrel overflows, submatrix s |
| 0x0100-0x037F| MASK  | RW | 5120 MP mask bits, 640 bytes |

Mask bit i, in byte i/8 at bit position i%8, belongs to:

- submatrix i/1280;
- MP column (i%1280)/32;
- MP row i%32.

A masked MP records no hits. All bits are clear at reset.

## How it holds up against the target conditions

The sweep cost of 2k+3 cycles per period can be set against the cycles
available in a period. Estimates for random hits at 33.8 MHz per submatrix:

| BCO     | columns/period | sweep cycles | available at 60 / 80 / 100 MHz |
|---------|----------------|--------------|-------------------------------|
| 0.25 µs | 7.7            | 18.4         | 15 / 20 / 25                  |
| 0.5 µs  | 13.9           | 30.8         | 30 / 40 / 50                  |
| 1 µs    | 23.0           | 49           | 60 / 80 / 100                 |
| 2 µs    | 32.8           | 69           | 120 / 160 / 200               |

Two operating points do not keep up on average: 60 MHz with BCO 0.25 µs, and
60 MHz with BCO 0.5 µs. There the scan buffer overflows and freezing gets
longer. Every other point in the 60-100 MHz, 0.25-2 µs range keeps up. So
does twice the hit rate at 80 MHz with BCO 1 µs (69 of 80 cycles).

`tb_efficiency_table` measures this on one full-size submatrix. It drives
random single hits at 33.8 MHz for 2 ms per operating point and empties the
level-1 barrel every cycle. The reference values come from the architecture's
own efficiency study, and the testbench checks against them.

| RDclk | BCO     | frozen-MP efficiency | reference | already-hit | reference | mean sweep | reference |
|-------|---------|---------------------:|----------:|------------:|----------:|-----------:|----------:|
| 100   | 0.25 µs | 99.70 % | 99.7  | 99.98 % | —     | 0.17 µs | —    |
| 100   | 0.5 µs  | 99.53 % | 99.53 | 99.95 % | 99.96 | 0.30 µs | 0.27 |
| 100   | 1 µs    | 99.34 % | 99.25 | 99.94 % | 99.91 | 0.48 µs | 0.45 |
| 100   | 2 µs    | 99.07 % | 99.04 | 99.81 % | 99.83 | 0.70 µs | 0.65 |
| 80    | 0.5 µs  | 99.41 % | 99.39 | 99.97 % | 99.95 | 0.37 µs | 0.34 |
| 80    | 2 µs    | 98.74 % | 98.81 | 99.84 % | 99.83 | 0.87 µs | 0.81 |
| 60    | 1 µs    | 98.84 % | 98.83 | 99.91 % | 99.91 | 0.80 µs | 0.75 |
| 60    | 2 µs    | 98.35 % | 98.42 | 99.83 % | 99.84 | 1.16 µs | 1.08 |
| 60    | 0.5 µs  | 96.22 % | 98.90 | 99.96 % | 99.96 | 0.48 µs | 0.45 |
| 60    | 0.25 µs | 94.81 % | 97.5  | 99.98 % | —     | 0.44 µs | —    |

The other points of the grid behave the same way. Where the sweep keeps up,
both efficiencies agree with the reference to within about 0.2 points. The
sweep takes about 3 cycles more per map than in the reference.

The two 60 MHz points with short periods fall short of the reference. In
both, the sweep needs more cycles than the period has. The scan buffer
overflows, MPs stay frozen across several periods, and 2.7 points more hits
are lost.

At BCO 2 µs a level-2 barrel overflows now and then: 2 to 5 times in 67000
hits. The sweep reads a long map back to back. The four sparsifiers then
write close to one word per cycle, which is exactly what the concentrator
drains.

At twice the rate (67.6 MHz, 80 MHz clock, BCO 1 µs), 97.5 % of the hits come
out; the reference gives 97.6 %.

The chip-level output is the weak point. The output stage puts one 22-bit
word per clock on the bus, which is 60-100 Mword/s or at most 2.2 Gbit/s.
Unclustered hits at the full rate need about 135 Mword/s plus headers, and
then the level-1 barrels overflow. Clustered tracks need less: 2x2 clusters
at 25 Mtrack/s/cm² give about 73 Mword/s. That fits at 100 MHz, and at
80 MHz with a small loss. A 3 Gbit/s link would need a wider or faster
output, which is not part of this RTL.

`tb_bus_bandwidth` measures this on the full chip. It runs 400 µs per point
with a 1 µs BCO period and the bus always ready:

| load                      | RDclk   | words per track | bus busy | words lost in level-1 barrels |
|---------------------------|---------|-----------------|----------|-------------------------------|
| 2x2 clusters, 32.5 M/s    | 100 MHz | 2.27            | 74 %     | 2 of 29770                    |
| 2x2 clusters, 32.5 M/s    | 80 MHz  | 2.26            | 93 %     | 66 (0.2 %)                    |
| 2x2 clusters, 32.5 M/s    | 60 MHz  | —               | 100 %    | 5335                          |
| single hits, 130 M/s      | 100 MHz | —               | 100 %    | 11407                         |

The 2.27 words per track match the estimate of 2.25. At 100 MHz the rare
losses come from bursts: four submatrices sometimes hold more words at once
than their 32-word level-1 barrels take while they wait for the shared bus.

## Departures and own choices

- **Clock.** One clock for everything. The BCO edge is a strobe, and the
  pixels are flip-flops on the readout clock. Synchronising a real BCO clock
  into the readout domain is left to the integrator.
- **Scan buffer.** 4 maps deep. The depth was not specified.
- **Empty periods.** A header for every period, even an empty one.
- **Overflow.** MPs refused by a full scan buffer join a later map under a
  later time stamp.
- **Column skipping.** The sweeper skips columns with no MP of the map. It
  reads each of the two pixel columns of an MP column in its own cycle.
- **Merge and word order.** The merge rule, and the L1-above-L2 bit order.
- **`bus_is_ts`.** A separate line marks time-stamp words. The 22-bit word
  has no type bit.
- **Slow control.** The protocol details, register map, mask bit order and
  reset values are own choices.
- **Analog parts.** The sensor, charge amplifier and discriminator are not
  modelled. `hit` inputs are the digital discriminator outputs. Pads,
  including the open-drain drivers, are outside the top.
- **Demonstrator.** A small 128x32 chip with two readouts is not a separate
  build. It is the same RTL with two submatrices used and most rows tied to
  0.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `NSUB`     | 4   | submatrices (top, output stage, register file, mask) |
| `COLS`     | 80  | pixel columns per submatrix |
| `ROWS`     | 256 | pixel rows; a multiple of 32, at most 256 (four sparsifiers of at most 8 zones) |
| `MP_W`, `MP_H` | 2, 8 | macro pixel size; `MP_H` is also the zone height |
| `SB_DEPTH` | 4   | scan-buffer maps |
| `B2_DEPTH` | 8   | level-2 barrel words |
| `B1_DEPTH` | 32  | level-1 barrel words |
| `TS_W`     | 8   | time-stamp bits (package) |

The word formats in `superpix_pkg` assume 80 columns or fewer (7-bit column
field) and 8 zones per quarter.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog. From the
repository root, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/superpix_pkg.sv tb/tb_superpix_top.sv --top-module tb_superpix_top
./obj_dir/Vtb_superpix_top
```

Substitute any other testbench name.

`tb_superpix_top` runs the full-size chip with default parameters, in five
phases:

1. Over I2C, it masks a few MPs and reads the mask back.
2. It injects 2x2 clusters at a nominal rate. Every injected pixel must come
   out exactly once, under the time stamp of its own period. Every period
   must get one header. Masked MPs must stay silent.
3. It overloads the chip: dense clusters, short periods and a mostly
   stalled bus. Losses are allowed, but every pixel that comes out must have
   been injected in its header's period or earlier.
4. It drains the chip and runs the nominal rate again, checked as in
   phase 2.
5. Over I2C, it reads the counters. The hit counter must match the bus.

The test counts how often each mechanism happened and fails if one never
did:

- masking;
- frozen-MP loss;
- sweep stall;
- multi-zone columns;
- scan-buffer, level-2 and level-1 overflow;
- bus back-pressure.

Building it takes about two minutes; it runs in about a second.
`tb_efficiency_table` builds in half a minute and runs in about 12 seconds.
`tb_bus_bandwidth` builds in under a minute and runs in about 3 seconds.
Both print one line per operating point with the measured figures. The other
testbenches run in well under a second. `tb_sweeper` uses a 4x4-MP array to
reach corner cases quickly. It checks the 2k+3-cycle sweep time exactly.
