# Cluster Processor Module (CPM) for a Level-1 calorimeter trigger

A calorimeter trigger has to find, at every 25 ns bunch crossing, localised
energy deposits that look like electrons, photons or hadronically decaying tau
leptons, and count how many pass each of a set of programmable energy
thresholds. This RTL describes one Cluster Processor Module: a board that
covers a 16 (phi) x 4 (eta) patch of trigger towers, runs a sliding-window
cluster algorithm at each of those 64 positions on both the electromagnetic
(em) and hadronic (had) layers, and sends 3-bit hit counts for 16 threshold
sets to two merger modules. After a Level-1 Accept (L1A) it also reads out,
over two serial links, the tower data it used (DAQ read-out) and the
coordinates and threshold masks of the clusters it found (Region-of-Interest,
RoI, read-out).

The top module is `cpm_top`. All real-time logic runs on one 40 MHz clock.
From a tower word arriving on a link to hit counts at the output takes
6 clock ticks.

## Tower data on the links: BC-multiplexing

Each module receives 80 links, each carrying a 10-bit word per tick:
`{parity, flag, et[7:0]}`. Parity is odd over all ten bits. A link carries a
*pair* of towers, adjacent in phi, in two ticks. This works because a tower
with non-zero energy is always followed by an empty crossing:

* first tick of a sequence: the word holds the non-zero tower; `flag` says
  which tower of the pair it is (0 = A, 1 = B).
* second tick: the word holds the other tower; `flag` says whether it belongs
  to the same crossing as the first word (0) or to the following one (1).

`bcmux_decoder` rebuilds both towers for each crossing. It emits a pair one
tick after the link word. A parity error sets `par_err` and zeroes both towers
of the pair. The testbench model `tb/bcmux_encoder_model.sv` produces the
link stream from tower values.

## Serialisers and the 160 Mbit/s backplane streams

Twenty `serialiser` blocks (10 per layer) each take four links. They decode
them only for read-out and re-send the link words to the CP chips on
backplane streams. A Serialiser has two halves, X (links
0-1, eta columns 0 and 1) and Y (links 2-3, eta columns 2 and 3). Each half
drives a 5-line bus:

| line | nibble carried each tick |
|------|--------------------------|
| s0 | first link word: `et[3:0]` |
| s1 | first link word: `et[7:4]` |
| s2 | second link word: `et[3:0]` |
| s3 | second link word: `et[7:4]` |
| s4 | `{par1, flag1, par0, flag0}` |

Each line stands for a 160 Mbit/s stream: four bits per 25 ns tick, bit 0
first. The buses carry the still-multiplexed link words, so the CP chips
repeat the BC-mux decoding and the parity check themselves.

The board shares data with its neighbours in eta: the whole X bus is the
fan-out to the -eta neighbour, and lines 2..4 of the Y bus (one eta column)
are the fan-out to the +eta neighbour. A Serialiser also counts parity
errors per link (8-bit saturating counters), reports link loss, and keeps a
read-out pipeline of its decoded towers for DAQ read-out.

## CP chips: the cluster algorithm

Eight `cp_chip` blocks each cover 4 phi x 2 eta window positions, split into
two 2x2 halves. A chip needs a 6 x 7 tower region (phi x eta) around its
windows: eta column 0 comes from the -eta neighbour, columns 1-4 from this
board, columns 5-6 from the +eta neighbour; its phi rows come from three
Serialisers (its own and the two adjacent in phi).

`cluster_window` evaluates one window, a 4x4 tower block:

* The **RoI core** is the central 2x2 em+had sum. It must be a local maximum
  among the eight overlapping 2x2 cores. Ties are broken asymmetrically: the
  core must be strictly greater than the three neighbours at +phi and the one
  at +eta in its own row, and greater or equal to the other four. This guarantees exactly one
  window per cluster in a flat region.
* The **cluster** is the largest of the four 2-tower sums (horizontal or
  vertical em pair) inside the core; for a tau threshold set the had 2x2 core
  is added.
* **Isolation**: em ring (12 towers around the core), had ring, and, for
  electron/photon sets only, the had core, each compared with its own value.
* A threshold set passes if cluster > threshold and every isolation sum
  <= its limit.

Only one window per 2x2 half can report hits (the declustering above ensures
this; the chip ORs the four windows). A saturated tower (255) in the core
sets the `sat` bit of the RoI word. Each half gives a 16-bit hit mask to the hit counters and
an RoI word `{err, sat, loc[1:0], hits[15:0]}` to its read-out pipeline; `err`
flags a parity error in the tower data used.

## Hit counting

Two `hit_counter` blocks add the 16 half-chip masks per threshold set:
thresholds 0-7 and 8-15. Each count saturates at 7. Each output is 24 count
bits plus an odd parity bit.

## Read-out: pipelines, sequencers and the two ROCs

Every block with data to read out has a `readout_sequencer`: a
`readout_pipeline` (128-deep circular buffer, written every tick), a
`sync_fifo` (128 deep) and a shift register. The read pointer trails the
write pointer by a VME-programmable `offset`, which sets which crossing is
read. While `en_readout` is high, one slice per tick goes into the FIFO.
Each `load_shift` pulse loads the next FIFO slice into the shift register,
which then sends it LSB first, one bit per tick.

`roc_core` is the common read-out controller. On an L1A it raises
`en_readout` for `nslices` ticks (1 to 5 normally). It then frames each slice
on 20 parallel fields (one per Serialiser or one per CP-chip half): first the
external bits from the sequencers, then bits the ROC adds itself, then one
odd-parity bit per field. A DAV strobe marks each slice on the output link.
At least `MinDAV` (reset value 3) ticks separate successive slices. An L1A
that arrives while slices are still being requested is dropped and flagged.

| ROC | fields | bits per field | added bits |
|-----|--------|----------------|-----------|
| `daq_roc` | 20 (10 Serialisers x 2 layers) | 80 tower + 3 added + parity = 84 | 3-bit hit count of threshold f on fields 0..15, bunch-crossing number (BCN) on fields 16..19 |
| `roi_roc` | 16 CP-chip halves | 20 RoI + BCN bit + parity = 22 | BCN bit f on fields 0..11 |

The bunch-crossing number is reset by the BCntRes command; a FIFO of BCNs
for pending slices lives in the ROC. If a ROC's own FIFO is not empty when a
flush is requested, a sticky error (`ef_error`) is set instead.

`glink_retime_fifo` moves each ROC output from the 40.08 MHz machine clock to
the 40.00 MHz crystal clock of the serial link transmitter. It is a 16-deep
Gray-pointer asynchronous FIFO. Idle words are only written below half full,
so the small difference in frequency is absorbed by dropping idle words.

## VME access

`vme_controller` decodes a 512 KB slot window (base from the geographical
address). Registers live at offsets below 0x80 (module type 2418, revisions,
status, control, pulse register, link status per Serialiser, CP chip errors,
lock and sync status). Devices are mapped as:

| offset | target |
|--------|--------|
| 0x03000-0x037FF | DAQ ROC |
| 0x03800-0x03FFF | RoI ROC |
| 0x06800-0x06FFF | CP chip broadcast |
| 0x07000-0x0AFFF | CP chips, 2 KB each |
| 0x0B000-0x0BFFF | Serialiser broadcast |
| 0x0C000-0x1FFFF | Serialisers, 4 KB each |

Device accesses and control/pulse writes wait while a command from the
timing system (TTC) is being processed, so the two never clash. Pulse bits 2,
3, 5 and 6 reset the Serialisers, CP chips, RoI ROC and DAQ ROC for one tick.
`led_stretcher` holds front-panel indications for 0.2 s.

## Where this design departs from the original specification

* The Serialiser broadcast range is at 0x0B000. The original map places it at
  0x08000, inside the CP chip range.
* The 160 Mbit/s streams are modelled as nibbles on a 40 MHz clock; the line
  order within a bus is this design's choice.
* The tie-breaking direction of declustering and the `>` / `<=` sense of the
  threshold tests are this design's choice.
* Register addresses inside CP chips, Serialisers and ROCs, the pulse-register
  bit assignment and all reset values other than `MinDAV` = 3 are this
  design's choice.
* One 40 MHz clock for all real-time logic; the phase adjustment of the two
  deskewed timing clocks and of the 160 Mbit/s inputs is not modelled.
* Not built: Serialiser playback mode and input synchronisation logic, direct
  VME access to pipeline and FIFO contents, DAQ ROC playback, the FPGA
  configuration controller. Bought-in parts (LVDS receivers, G-link
  transmitters, TTC decoder, clock PLLs, CAN controller) are outside the RTL;
  their signals are ports of `cpm_top`.
* Sustained read-out of 5 slices per L1A cannot keep up with a 100 kHz L1A
  rate on the DAQ link (5 x 87 ticks against 400); 1 slice per L1A can.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Itb -Irtl \
  rtl/cpm_pkg.sv tb/cpm_ref_pkg.sv rtl/*.sv tb/tb_cp_chip.sv \
  --top-module tb_cp_chip -o sim
./obj_dir/sim
```

(`rtl/cpm_pkg.sv` must come first; replace `tb_cp_chip` with any testbench.)

| testbench | what it checks |
|-----------|----------------|
| `tb_bcmux_decoder` | tower recovery from encoded streams, parity errors |
| `tb_serialiser` | bus layout, fan-out, error counters, DAQ slices |
| `tb_cluster_window` | one window against the reference model in `cpm_ref_pkg` |
| `tb_cp_chip` | hits and RoI words of a chip over random tower grids |
| `tb_hit_counter` | sums, saturation, parity |
| `tb_readout_sequencer` | pipeline offset, FIFO and shift-out order |
| `tb_daq_roc`, `tb_roi_roc` | framing, parity, DAV spacing, dropped L1As, flush |
| `tb_glink_retime_fifo` | clock crossing with 40.08 / 40.00 MHz clocks |
| `tb_vme_controller` | address map, registers, TTC hold-off |
| `tb_led_stretcher` | stretch length |
| `tb_cpm_top` | the whole module at full size: 80 encoded links plus neighbour fan-in, CMM counts, fan-out, DAQ and RoI link contents, errors, VME |

`tb_cpm_top` takes about two minutes to compile (`--build-jobs` helps) and a
few seconds to run. `cpm_ref_pkg` holds the reference cluster algorithm that
the chip-level and module-level testbenches compare against.
