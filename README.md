# MightyPix readout: column-drain readout of an HV-CMOS pixel sensor

MightyPix is a monolithic HV-CMOS pixel sensor for the silicon part of the
LHCb Mighty Tracker. Each pixel has its own charge amplifier and comparator.
When a particle crosses a pixel, its comparator output is high for a time over
threshold (ToT) of about 1.3 to 2 µs. This RTL is the digital path from those
comparator outputs to the chip's 1.28 Gbit/s serial link. Every hit leaves the
chip as a record of pixel address, bunch-crossing time stamp and ToT.

The readout is a *column drain*:

* every pixel stores its hit in its own **hit buffer**, and is dead until the
  buffer is emptied;
* each column has one **end-of-column (EoC) buffer**, and a **priority logic**
  that always moves the hit of the **lowest row** first;
* a **readout state machine** in the periphery repeatedly loads all EoC
  buffers at once and then sends out their hits one after the other.

The throughput limits of this scheme decide how many hits are lost at high
rates. Hits in high rows wait longest. A hit whose readout takes longer than
one LHC orbit (3564 bunch crossings, 89.1 µs) gets an ambiguous bunch-crossing
ID and counts as lost.

Two readout variants are built, selected by the top-level parameter `MP2`:

| | `MP2 = 0` (default): MightyPix1 | `MP2 = 1`: MightyPix2 |
|---|---|---|
| readout clock `clk` | 40 MHz | 160 MHz |
| FSM data path | 32 bit, one hit = 2 words = 2 cycles | 48 bit, one hit per cycle |
| buffering before the link | none: FSM output is the link word | 16-hit FIFO plus 48→32 gearbox |
| bits per hit on the link | 64 | 48 |
| hits per bunch crossing the link can carry | 1/2 | 2/3 |
| readout limit on 0.8422 cm² | 1.28 Gbit/s / 64 / 0.8422 cm² = 23.75 MHz/cm² | 1.28 Gbit/s / 48 / 0.8422 cm² = 31.66 MHz/cm² |

The default matrix is the MightyPix1 prototype: 320 rows × 29 columns of
165 µm × 55 µm pixels.

## The life of a hit

1. **Leading edge.** `comp[col][row]` rises. The pixel's hit buffer
   (`mpix_hit_buffer`) stores the current bunch-crossing ID as TS1. It also
   stores the current value of a free-running 8-bit bunch-crossing counter.
   The pixel is now busy: any further pulse is ignored until the buffer is
   freed. This dead time is the main source of loss at low rates.
2. **Trailing edge.** `comp` falls. The buffer stores the free-running counter
   again, and the hit becomes *ready*. A hit cannot be read before its ToT has
   passed.
3. **LOAD phase.** The FSM (`mpix_readout_fsm`) spends `LOAD_CYCLES` (2)
   cycles in LOAD and pulses `load` in the last one. In every column whose EoC
   buffer is empty, the priority encoder (`mpix_priority_enc`) picks the ready
   hit with the lowest row number. That hit is copied into the EoC buffer
   (`mpix_eoc_buffer`) as row, TS1 and ToT (the difference of the two counter
   values). Its hit buffer is freed on the same clock edge.
4. **READ phase.** The FSM goes over the full EoC buffers, lowest column
   first, and empties each one as it sends the hit out:
   * MightyPix1: word 0 in one cycle and word 1 in the next, so 2 cycles per
     hit.
   * MightyPix2: one 48-bit hit per cycle into the FIFO. The FSM waits
     (`fsm_stall`) while the FIFO is full.

   After the first READ cycle that finds no full EoC buffer, the FSM goes back
   to LOAD.
5. **Link.** One 32-bit word leaves per bunch crossing (25 ns). The serializer
   (`mpix_serializer`) shifts it out MSB first on the 1.28 GHz bit clock.

One LOAD/READ round takes 2 + 2·k + 1 cycles for MightyPix1 and 2 + k + 1
cycles for MightyPix2 (more if the FIFO stalls), where k is the number of
columns holding a hit. Each column gives **at most one hit per round**. If a
column has n ready hits, the last one (the highest row) waits n rounds. This is
why the readout time grows with the row number, and why a busy column, not the
link, sets the limit below the readout limit.

## Time stamps

`mpix_bxid_counter` produces three signals:

* `bxid` counts 0…3563 and wraps. It restarts on `bx_reset`, which comes from
  the LHCb Timing and Fast Control system and takes effect on the next
  bunch-crossing edge.
* `tsf` is a free-running 8-bit counter of bunch crossings. It is never reset,
  so a ToT that spans the orbit wrap or a `bx_reset` is still measured
  correctly. The range is 255 bunch crossings (6.4 µs).
* `bx_en` pulses once per bunch crossing: every cycle for MightyPix1, every
  fourth cycle for MightyPix2. It paces the counters and the link words.

## Link format

All words are 32 bit. `{...}` is concatenation, MSB first.

| word | content |
|---|---|
| MightyPix1 word 0 | `{4'h4, col[5:0], row[9:0], bxid[11:0]}` |
| MightyPix1 word 1 | `{4'h5, tot[7:0], 20'h0}` |
| MightyPix2 hit (48 bit) | `{4'h6, col[5:0], row[9:0], bxid[11:0], tot[7:0], 8'h0}` |
| idle | `32'hBCBC_BCBC` |

Both variants carry the same information (34 bits), so the 2×32-bit format has
spare bits. That is what allows the 48-bit MightyPix2 word without losing
anything.

**Gearbox (`mpix_gearbox`).** The gearbox packs 48-bit hits back to back into
32-bit words, so two hits fill three words. It keeps a bit buffer of 0, 16 or
32 bits between link words:

* If fewer than 32 bits are waiting, it appends the next hit from the FIFO.
* If the FIFO is empty, it completes a waiting half hit with `16'hBCBC`, or
  sends the idle word if nothing is waiting.

A receiver must follow the stream from reset in 16-bit steps. At each hit
boundary it sees either `16'hBCBC` (idle) or the first 16 bits of a hit. A hit
never starts with the nibble `B`. The testbenches contain such a decoder.

**Serializer.** The serializer takes the parallel word half a word period
after the word clock edge, where the word is stable. This relies on the
readout clock and bit clock being phase locked, as they are when both come
from the on-chip PLL. `ser_frame` marks the first bit of each word. This is a
convenience for simulation: there is no line code and no comma character.

## Files

Each file in `rtl/` holds one unit and begins with a description of it.

| file | role |
|---|---|
| `rtl/mpix_pkg.sv` | field widths, tags, idle patterns, `hit_t`, word-packing functions |
| `rtl/mpix_hit_buffer.sv` | one pixel's hit buffer |
| `rtl/mpix_priority_enc.sv` | lowest-index priority encoder (rows in a column; columns in the FSM) |
| `rtl/mpix_eoc_buffer.sv` | one-entry end-of-column buffer |
| `rtl/mpix_column.sv` | `ROWS` hit buffers + priority logic + EoC buffer |
| `rtl/mpix_bxid_counter.sv` | bunch-crossing ID, ToT time base, bunch-crossing strobe |
| `rtl/mpix_readout_fsm.sv` | LOAD/READ state machine and data formatting |
| `rtl/mpix_hit_fifo.sv` | 16 × 48-bit FIFO, valid/ready on both sides |
| `rtl/mpix_gearbox.sv` | FIFO + 48→32 packing (MightyPix2) |
| `rtl/mpix_serializer.sv` | 32:1 serializer |
| `rtl/mpix_top.sv` | the whole readout |

### Top-level parameters

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 320, 29 | matrix size |
| `TS_BITS` | 12 | bunch-crossing ID width |
| `TS2_BITS` | 8 | ToT time base width |
| `LOAD_CYCLES` | 2 | length of the LOAD phase |
| `FIFO_DEPTH` | 16 | gearbox FIFO depth (MightyPix2) |
| `MP2` | 0 | 0 = MightyPix1 readout, 1 = MightyPix2 readout |

### Top-level ports

Inputs:

* `clk`, `clk_ser`, `rst_n` (asynchronous, active low).
* `bx_reset`.
* `comp[COLS-1:0][ROWS-1:0]`, the comparator outputs.

Outputs:

* `bxid`.
* `link_word`, which is new when `link_strobe` is high.
* `ser_out` and `ser_frame`.
* Observation outputs: `pix_busy` per pixel, `fsm_stall`, `fsm_reading` and
  `fifo_level`.

## Simulating

Each testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mpix_top rtl/mpix_pkg.sv tb/tb_mpix_top.sv
./obj_dir/Vtb_mpix_top
```

| testbench | what it shows |
|---|---|
| `tb_mpix_hit_buffer`, `tb_mpix_priority_enc`, `tb_mpix_eoc_buffer`, `tb_mpix_column`, `tb_mpix_bxid_counter`, `tb_mpix_readout_fsm`, `tb_mpix_hit_fifo`, `tb_mpix_gearbox`, `tb_mpix_serializer` | each unit against a reference written in the testbench; cycle timing of the FSM; gearbox rate of exactly 2 hits per 3 link words; serializer at 32 bits per word clock |
| `tb_mpix_top` | both variants on a 40 × 8 matrix. A burst of simultaneous hits: each column must deliver lowest row first, over several rounds. A pulse on a waiting pixel must be lost. `bx_reset` and the orbit wrap are exercised. About 4000 bunch crossings of random hits, each of which must arrive once with the right address, time stamp and ToT. The serial stream must equal the parallel words. For MightyPix2, FIFO full, FSM stall and half-word padding must occur. |
| `tb_mpix_top_full` | the same sequence at the default parameters (320 × 29, MightyPix1), random hits at 17 MHz/cm² with ToT up to 2 µs |
| `tb_mpix_efficiency` | rate study on the full matrix, 2 µs ToT, Poisson hits per bunch crossing, 12 000 bunch crossings per point |

`tb_mpix_efficiency` takes a few minutes to compile, because it holds two
full-size matrices.

### Measured efficiency

Efficiency is the fraction of hits delivered with the right pixel and
bunch-crossing ID within one orbit. Results from `tb_mpix_efficiency` (seeded,
12 000 bunch crossings per point):

| rate (MHz/cm²) | MightyPix1 readout | MightyPix2 readout |
|---|---|---|
| 17 | 99.58 % | 99.70 % |
| 30 | 76.7 % | 99.52 % |
| 40 | 56.8 % | 81.0 % |

At 17 MHz/cm² the losses come almost entirely from pixels that are still busy
with an earlier hit. At 30 MHz/cm² the MightyPix1 readout is above its readout
limit of 23.75 MHz/cm². Its queues grow until readout times exceed one orbit.
MightyPix2 is still below its limit of 31.66 MHz/cm². These runs are much
shorter than a full study of 500 000 bunch crossings per point, so the values
near a limit depend on the run length.

## Design choices and limits

The column-drain structure, the lowest-row priority and one EoC buffer per
column follow the published description of the chip. So do the matrix size,
the 2×32-bit and 48-bit hit sizes, the 40/160 MHz FSM clocks, the 16-hit FIFO,
the 1.28 Gbit/s link and the 3564-value bunch-crossing ID. The following are
this design's own choices:

* **Hit buffer storage.** The chip keeps hits in DRAM cells, which hold them
  for about a second. Here they are flip-flops, with no decay or refresh.
* **Comparator sampling.** The comparator output is sampled on the readout
  clock. A hit therefore has bunch-crossing (MightyPix1) or 6.25 ns
  (MightyPix2) granularity, and a pulse shorter than one clock can be missed.
* **ToT measurement.** The ToT comes from two samples of a free-running 8-bit
  counter.
* **FSM timing.** The LOAD phase is 2 cycles, and hits move from hit buffer to
  EoC buffer in a single edge. The real chip's timing is not modelled, so
  absolute readout times and efficiencies near the limits differ from the
  silicon.
* **Column order.** The FSM reads the EoC buffers lowest column first.
* **Formats.** The field layout, tags, idle patterns and gearbox packing are
  this design's, as is the MSB-first serializer without a line code.
* **Clocking.** The whole readout uses one clock. The 40 MHz word rate of
  MightyPix2 is an enable every fourth 160 MHz cycle, and the bit clock is
  assumed phase locked.
* **MightyPix2 matrix.** The MightyPix2 variant uses the same matrix as
  MightyPix1, because no other size is defined for it.

Not part of this RTL:

* the sensor, charge amplifier and comparator of each pixel: their digital
  output is the `comp` input;
* the PLL: `clk` and `clk_ser` are inputs;
* the 10-bit bias DACs and the CML output driver;
* the configuration shift register and the I²C slow-control interface, whose
  register contents are not defined here;
* the Timing and Fast Control interface: only its bunch-crossing reset enters,
  as `bx_reset`.

Synthesis of the full top is large. Each pixel holds 31 bits of state, about
288 000 flip-flops for 9280 pixels, and each column has a 320-input priority
encoder and a 320:1 multiplexer.
