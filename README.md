# PHENIX Local Level-1 trigger boards (GenLL1) in SystemVerilog

At a collider, most beam crossings have nothing worth keeping. The first-level
trigger decides, for each crossing, whether the rest of the data acquisition
should keep it. It must do this every 104 ns, pipelined, and the whole answer has
to be ready within 40 beam clock ticks. In the PHENIX experiment this is split into two
parts. The Local Level-1 (LL1) boards each look at one detector's fast data and
reduce it to a few bits per crossing. The Global Level-1 (GL1) combines those
bits into trigger decisions.

This repository holds RTL for the LL1 systems added for the 2003 run. All of them
are built on one generic board, the GenLL1:
- up to 20 optical fibers, each giving 4 or 6 16-bit GLINK frames per beam crossing
- FPGA logic that rebuilds each crossing and runs a trigger algorithm
- common services on every board: test-pattern injection, per-bit input masks,
  monitor FIFOs, an accepted-event FIFO and a VME register interface

Two board programs are implemented:

- **MuID LL1**: looks for charged-particle tracks in the muon identifier. The
  muon identifier is five gaps of tube detectors between layers of steel. The
  board counts roads ("symsets") that have a deep or a shallow track candidate.
- **NTC/ZDC LL1**: computes a mean arrival time per side from TDC values for two
  counters, the NTC and the ZDC. The difference of the two side means measures
  the collision vertex. The result is checked against programmable bounds.

`phenix_ll1_top` puts together one NTC/ZDC board and four MuID boards (two muon
arms × two projections). They share a beam clock, the timing-system signals and a
VME bus.

## Data flow of one board

```
 fiber 0..N-1 ─► glink_demux ─┐
  (FRAMES x 16 bit per        ├─► test_pattern_inject ─► bit_mask ─► algorithm ─► gl1_prim
   crossing, fiber clock)     ┘        (VME / gtm_test)      (VME)         │
                                                                            ├─► accept_fifo (l1_accept)
                              monitor_fifo × stages (1024 crossings) ◄──────┘
                              vme_slave ─► local register bus ─► all of the above
```

Everything after `glink_demux` runs on the beam clock (BCLK). Each part takes one
crossing per tick.

## Rebuilding crossings from the fibers (`glink_demux`)

This is the subtle part of the board. A fiber brings FRAMES words per crossing on
the receiver's recovered clock: 6 frames at 6×BCLK for the MuID, 4 frames at
4×BCLK for the NTC/ZDC. Two things can go wrong:
- words of two adjacent crossings get glued together
- the recovered clock is treated as if it were the beam clock

How the demultiplexer handles this:

- **Framing.** The transmitter sets the GLINK flag bit on the first frame of each
  crossing. A flag inside a crossing, or a crossing that ends without the next
  frame being flagged, is a *phase error*. The partial crossing is thrown away
  and collection restarts at the next flag. A sticky `phase_err` bit records this
  until software clears it.
- **Clock crossing.** A finished crossing goes through an 8-entry dual-clock
  FIFO with Gray-coded pointers. After reset, the BCLK side waits until PRIME
  (2) crossings are stored, then pops one every tick. Both clocks come from the
  same beam clock, so the fill level stays near PRIME for good. An underflow or
  overflow sets the sticky `fifo_err`.
- **Error flags across clocks.** The flags are kept on the fiber side and
  synchronised into BCLK as levels. The clear command goes the other way as a
  toggle. Two errors close together can therefore never cancel each other.

From the last frame of a crossing to the crossing on `xing_data` takes 4 to 6 BCLK
ticks. The boards assume that all their fibers deliver frames in the same beam
clock phase. Each board's crossing is valid only when all of its fibers have one.

## Board services

**`test_pattern_inject`** holds up to 64 input patterns, written in 32-bit pieces
over VME. The `REG_CTRL[1:0]` mode selects what the board uses as input:
- `INJ_LIVE`: live fiber data
- `INJ_LOOP`: the pattern list, repeated
- `INJ_TIMED`: live data, except that each `gtm_test` strobe from the timing
  system plays the list once

**`bit_mask`** clears every input bit whose mask bit is 1. The mask reads back
over VME. After reset, all bits are enabled.

**`monitor_fifo`** records one stage of the algorithm on every tick in a
1024-crossing circular buffer. `REG_CTRL[2]` freezes all stages of a board
together. A frozen buffer is read by crossing index, where 0 is the oldest
crossing held, and by 32-bit piece. Data comes back one clock after the address.

**`accept_fifo`** delays every crossing's trigger data by `l1_delay` ticks
(default 32, at most 63) in a circular delay memory. When the timing system's
`l1_accept` comes, it pushes that delayed entry into a 16-deep show-ahead FIFO.
That FIFO is read out for the event record. Accepts that arrive while the FIFO is
full are counted in `dropped`.

**`vme_slave`** handles single A32/D32 cycles with address modifier 0x09 or 0x0D
when A[31:24] equals the board's base. The strobes are synchronised to BCLK. The
slave turns a cycle into one request on the board's local register bus
(`lbus_req_t`/`lbus_rsp_t`, word address A[23:2]). It then holds DTACK* low until
the master releases the data strobes. An assertion checks that DTACK* is never
driven outside a cycle.

### Register map (local word address, byte address = base<<24 | word<<2)

| word address | content |
|---|---|
| 0x000000 | CTRL: [1:0] inject mode, [2] monitor freeze, [3] clear demux errors (write 1) |
| 0x000001 | STATUS: phase-error flag per fiber (read only) |
| 0x000002 | number of pattern rows used |
| 0x000003 | l1_delay |
| 0x000004–0x00000F | algorithm registers (below) |
| 0x001000 + k | mask bits [32k+31:32k] |
| 0x010000 + row·64 + k | pattern row, bits [32k+31:32k] |
| 0x200000 + stage·65536 + index·64 + k | monitor stage, crossing `index`, bits [32k+31:32k] |

MuID algorithm registers:

| register | content |
|---|---|
| 4 | deep criterion |
| 5 | shallow criterion |
| 6 | FIFO errors |
| 7 | {accept FIFO full, dropped} |
| 8 | monitor stored count |
| 9 | cluster counts of the last crossing |

A criterion is `{skip_max, hits_min, depth_min}`, with 4 bits each.

NTC/ZDC algorithm registers:

| register | content |
|---|---|
| 4 | NTC TDC window, `{hi[27:16], lo[11:0]}` |
| 5 | NTC vertex window, `{hi[28:16], lo[12:0]}`, signed |
| 6 | ZDC TDC window, same format as 4 |
| 7 | ZDC vertex window, same format as 5 |
| 8 | FIFO errors |
| 9 | dropped |
| 10 | stored |

The default windows are TDC 1..4094 and vertex −200..+200 counts.

## MuID algorithm: logical tubes, symsets, primitive

A MuID board sees one projection of one arm. It has 20 fibers × 6 frames × 16 bits
= 1920 input bits per crossing. In this design those bits are taken as
5 gaps × 3 panels × 128 tubes, in that order.

1. **Logical tubes** (`muid_logical_tubes`). The physical tubes that lie on the
   same line in different panels of a gap are ORed into one logical tube. Tube t
   of gap g is the OR of input bits `g·384 + k·128 + t`, for k = 0..2. This gives
   5 × 128 logical tubes.
2. **Symsets** (`muid_symset`). A symset is a road through the five gaps. Symset
   i is named after tube i in gap 1, and in every gap its road is centred on tube
   i. The road widens with depth to allow for multiple scattering. Gap g counts
   as hit if any tube within ±HALFW[g] of i is hit, with HALFW = {0,1,1,2,2}.
   Each symset is tested against two criteria in parallel:
   - **depth_min**: the deepest hit gap must be at least this deep
   - **hits_min**: at least this many gaps must be hit
   - **skip_max**: at most this many gaps up to the deepest one may be empty

   The defaults are:

   | criterion | depth_min | hits_min | skip_max |
   |---|---|---|---|
   | deep | 4 | 3 | 1 |
   | shallow | 2 | 2 | 1 |

   The result is two 128-bit maps, `deep_hit` and `shallow_hit`.
3. **Primitive** (`muid_prim`). Neighbouring symsets share tubes, so one track
   lights a few adjacent symsets. The primitive therefore counts *clusters*
   (runs of adjacent hit symsets), not hit symsets. The 4-bit output to GL1 is
   `{deep clusters, shallow clusters}`, each saturated at 3. The unsaturated
   counts can be read in register 9.

Latency: the MuID board output follows the demultiplexed crossing by 5 ticks:
- inject: 1 tick
- mask: 1 tick
- logical tubes: 1 tick
- symsets: 1 tick
- primitive: 1 tick

Measured in simulation, the output comes 15 BCLK ticks after the first frame of
the crossing enters the fiber. The whole trigger budget is 40 ticks.

## NTC/ZDC algorithm: mean time and vertex

The board has 5 fibers at 4×BCLK. Each TDC value is bits [11:0] of a frame:

| fiber | frame 0 | frame 1 |
|---|---|---|
| 0 | NTC south quadrant 0 | NTC south quadrant 1 |
| 1 | NTC south quadrant 2 | NTC south quadrant 3 |
| 2 | NTC north quadrant 0 | NTC north quadrant 1 |
| 3 | NTC north quadrant 2 | NTC north quadrant 3 |
| 4 | ZDC south | ZDC north |

`mean_time_vertex` (4 channels per side for the NTC, 1 for the ZDC) works in three
register stages:
1. It keeps each TDC value that lies inside the TDC window. It then sums those
   values and counts them, per side.
2. It computes mean = ⌊sum / count⌋, by multiplying with a reciprocal computed
   in logic and correcting once.
3. It computes vertex = mean_south − mean_north and tests it against the signed
   vertex window.

The 4-bit primitive per detector is `{vertex ok, both sides hit, north hit, south
hit}`. The board sends `{ZDC prim, NTC prim}` to GL1. The accept FIFO keeps the
means and vertices as well. The vertex stays in TDC counts; converting it to a
distance would need the TDC's time per count.

## Top level (`phenix_ll1_top`)

The top contains:
- one `ntc_zdc_ll1_board` at VME base 0x20
- four `muid_ll1_board`s at bases 0x10–0x13

On the shared VME bus, the boards' read data are ORed when driven and DTACK* is a
wired AND. The fiber inputs, GL1 outputs and accept-FIFO readout ports of each
board are brought out. GL1, the timing system, the GLINK chips and the optical
transceivers are outside this RTL; their signals are the top's ports.

## Where this RTL departs from the original boards

- **One logical design per board.** The real MuID board spreads its 20
  demultiplexers and its algorithm over five FPGAs, up to twelve demultiplexers
  each. Here each board is one module. The partition across FPGAs is not modelled.
- **Algorithm details are reconstructions.** Only the outline of the MuID
  algorithm is published. The details here are this design's own choices:
  - the bit layout of the fibers
  - the regular tube map (the real one comes from a cable-mapping database)
  - the road half-widths
  - the form of the criteria
  - the primitive format

  The same holds for the NTC/ZDC fiber layout, the TDC width, the integer mean
  and the primitive.
- **Interfaces are this design's choice:** the VME mode, the register map, the
  pattern memory depth (64), the accept FIFO depth (16), the l1_delay default and
  the flag-based framing.
- **Clock.** The original text gives the beam clock as 9.4 MHz but
  implies 9.6 MHz elsewhere (38.4/4 and 57.6/6 MHz). The RTL depends only on the
  4× and 6× ratios, so the frequency does not enter it.
- **EMCal/RICH board.** The original also has an EMCal/RICH board (two boards,
  one FPGA and eight fibers each). Its algorithm is not published, so it is not
  included.

## Files

`rtl/ll1_pkg.sv` holds the sizes, the register map and the shared types. Each
other file in `rtl/` is one module, named after the file. In `tb/`:
- each block has `tb_<module>.sv`
- `ll1_ref_pkg.sv` holds the independent reference models: the MuID road
  evaluation and cluster count, and the mean-time/vertex arithmetic
- `fiber_src.sv` is a GLINK frame generator that can inject a misframed crossing
- `vme_bfm.sv` is a VME master
- `tb_muid_workload.sv` is the full-load MuID run described under Simulating

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ll1_pkg.sv tb/ll1_ref_pkg.sv tb/tb_phenix_ll1_top.sv --top-module tb_phenix_ll1_top
./obj_dir/Vtb_phenix_ll1_top
```

Replace the testbench name to run any other block. Every testbench:
- compares against the reference models
- counts its checks
- stops on a watchdog
- ends with a `TB_RESULT checks=N failures=M` line

`tb_phenix_ll1_top` runs all five boards at their full default sizes. Through the
VME bus it:
- loads masks, patterns and criteria
- drives random and constructed events on all fibers
- forces a misframed crossing
- loops a test pattern on one board
- checks the GL1 outputs of every crossing, the accept FIFOs and the frozen
  monitor contents

It counts each of these mechanisms and fails if one never happens. It compiles in
about 30 s and runs in under a second. `tb_muid_ll1_board` and
`tb_ntc_zdc_ll1_board` check one board in more depth. They also measure the latency
from the first fiber frame to the GL1 output against the 40-tick budget.
`tb_muid_workload` runs one MuID board at its full data load: 1200 consecutive
crossings of 1920 bits with no idle crossing, which is 18.4 Gbit/s at a 57.6 MHz
frame clock. It then freezes the monitor and checks that the monitor holds the
last 1024 crossings in order.
