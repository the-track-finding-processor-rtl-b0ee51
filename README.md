# CSC Track-Finder: Level-1 muon track finding for the CMS endcap

At every LHC bunch crossing (40 MHz), the cathode strip chambers of the CMS
endcap deliver short track segments. Each segment is a 3-D vector measured
in one of four muon stations. The Track-Finder links these segments into
muon tracks and removes tracks that are the same muon found twice. It then
measures the transverse momentum (Pt) from how much the track bends in phi
between stations, and passes the best muons to the Global Level-1 Trigger.
All of this is pipelined. A new crossing enters every clock, and nothing
ever stalls.

This repository is a synthesizable SystemVerilog model of that processor.
It follows the architecture of the single-FPGA ("pre-production") Sector
Processor. The stage structure, the segment and track counts, the per-stage
latencies and the station-pairing rules follow that architecture. Bit
layouts, the compatibility test, quality encodings, table formats and tie
rules were never specified there. They are this design's own choices, and
each is listed below.

## The system in one picture

```
 per 60-degree sector (x12)                                        crate
 ┌──────────────────────────────────────────────────────────────┐
 │ 15 CSC links ─► front_fpga ─► seg_lut (x15) ─┐                │
 │  8 barrel    ─► front_fpga ─► register ──────┤                │
 │                                              ▼                │
 │        sp_fpga: extrapolation ─► 9 track assemblers ─┬─► final selection (3 of 9)
 │                                                      └─► Pt precalculation (x9)
 │                                  ─► output multiplexer ─► Pt memories (x3) ─► 3 muons ─┼─► gtlp_link ─► muon_sorter ─► 4 muons
 └──────────────────────────────────────────────────────────────┘
```

| stage | module | clocks | what happens |
|---|---|---|---|
| alignment | `front_fpga` | 1 | each input is delayed 0..3 extra clocks (programmable), so all links show the same crossing |
| conversion | `seg_lut` | 1 | raw segment (strip, pattern, bend sign, quality, wire group) to phi (12 bit) and eta (6 bit) via loadable tables |
| extrapolation | `extrap_unit` x 87 | 1 | pairwise compatibility tests between stations |
| assembly | `track_assembler` x 9 | 1 | one best track around each key-station segment |
| selection + precalc | `final_selection`, `pt_precalc` x 9 | 1 | duplicates cancelled, 3 best chosen; Pt addresses for all 9 formed in parallel |
| output mux | `output_mux` | 1 | the 3 winners' Pt addresses, phi and eta routed to the memories |
| Pt assignment | `lut_sram` x 3 | 1 | Pt, charge sign and quality read from memory |
| backplane | `gtlp_link` x 12 | 1 | three muons sent in two 80 MHz frames, sort keys first |
| sorting | `muon_sorter` | 1 | best 4 of 36 across the 12 sectors |

A crossing entering `link_in` appears on `sp_out` exactly **7 clocks**
later, and on `gmt_out` 9 clocks later. The first seven clocks are the
latency budget of the reference architecture. Five of them cover the
Sector Processor logic plus the Pt memory. The backplane clock and the
sorter clock are this design's choices.

## Backplane link (GTLP, two frames per crossing)

Each board sends its three muons (63 bits) to the sorter over a
point-to-point bus. The bus runs at 80 MHz and is 32 bits wide, so a
crossing takes two frames. The fields the sorter ranks on come first: the
`{valid, quality, pt}` byte of each muon. Sign, phi and eta follow in the
rest of frame 0 and in frame 1. Frame 0 is therefore enough to start
sorting.

`gtlp_link` needs `clk80` with rising edges in phase with `clk`. It finds
which half of the crossing it is in by sampling, on `clk80`, a flip-flop
that toggles on every `clk` edge. The transmitter sends frame 0 in the
middle of the crossing and frame 1 at its end. The receiver rebuilds the
muons half a crossing later. The sorter samples them one `clk` later than
it would without the link.

## Key stations and the three track streams

This is the idea that makes the track finder small. Trying every
combination of four stations would need far too much logic. Instead, every
track must contain a segment in station 2 or station 3, the *key stations*.
The work then splits into two steps:

1. **Extrapolation** tests only the station pairs that touch a key station:
   1-2, 1-3, 2-3, 2-4 and 3-4. With 6 segments in station 1 and 3 in each
   of the others, that is 18 + 18 + 9 + 9 + 9 = **63** tests. Direct 1-4
   pairs are left out. A muon seen only in stations 1 and 4 is therefore
   not triggered on.
2. **Track assembly** builds one candidate around each key-station segment.
   There are three streams of three key segments each, so nine assemblers:

| stream | key | partner stations | track index |
|---|---|---|---|
| 0 | station 2 | 1, 3, 4 | 0-2 |
| 1 | station 3 | 1, 2, 4 | 3-5 |
| 2 (overlap) | station 2 | 1, barrel | 6-8 |

An assembler looks at the extrapolation results between its key segment
and every segment of each partner station. For each partner station it
keeps the matching segment with the highest segment quality; on equal
quality the lower index wins. The track carries a label per station
(`track_t.id`: 0 means none, otherwise index + 1). A track needs the key
plus at least one partner. Its quality word is `{number of stations (3
bits), station 1 present (1 bit)}`. Station 1 is rewarded because the
phi difference between stations 1 and 2 measures Pt best.

The overlap stream serves the region where the endcap and the barrel muon
system overlap. For it, the 8 barrel segments are tested against station 2
(24 more `extrap_unit`s, phi only, because barrel segments carry no eta
here). That pairing is this design's choice; the reference architecture
only says that station 2 is used a second time for the overlap region.

## Cancelling duplicates (final selection)

A muon crossing all four stations is assembled in stream 0 (around its
station-2 segment) and in stream 1 (around its station-3 segment). It may
also appear in stream 2. `final_selection` compares every pair of tracks
from *different* streams. It counts the stations in which both tracks use
the same segment. When that count **exceeds** `cfg.fs_thresh`, the tracks
are taken to be one muon, and the track with the lower quality word is
cancelled. On equal quality, the track of the later stream is cancelled.
Survivors are ranked by quality word, lower index first on ties. Each
survivor counts how many others beat it, and the ones beaten by 0, 1 and 2
become outputs 0, 1 and 2. All nine-by-nine comparisons are combinational
and finish in one clock.

With `fs_thresh = 1`, the setting used in the testbenches, two shared
segments make a duplicate. A four-station muon therefore leaves exactly one
track. One shared segment is allowed, so two real muons that happen to
share a single segment both survive.

Cancellation is one level deep. A track that is itself cancelled can
still cancel another track in the same clock. This keeps the unit to one
clock.

## Pt address (precalculation)

Pt is read from a memory. The address is built for all nine tracks while
the selection is still running. Only the multiplexer then separates the
winners from the memory. `pt_precalc` gathers the phi of the segment each
track uses in every station. It then forms one or two phi differences,
preferring three stations:

```
addr[15:0] = { mode[2:0], sign(dphiA), min(|dphiA|, 63)[5:0],
               min(|dphiB| >> 3, 7)[2:0], eta_key[5:3] }

mode 1  ME1-ME2-ME3     A = phi1-phi2, B = phi2-phi3
mode 7  barrel-ME2      A = phiMB-phi2, B = phi1-phi2 if ME1 present
mode 2  ME1-ME2         A = phi1-phi2, B = phi2-phi4 if ME4 present
mode 3  ME1-ME3         A = phi1-phi3, B = phi3-phi4 if ME4 present
mode 4  ME2-ME3         A = phi2-phi3, B = phi3-phi4 if ME4 present
mode 5  ME2-ME4         A = phi2-phi4
mode 6  ME3-ME4         A = phi3-phi4
```

The modes are tried in the order listed, and the first that applies is
used. The key segment is the station-2 segment if the track has one,
otherwise the station-3 segment. The reported phi is its upper 6 bits, and
the reported eta is its eta. The memory word is
`{pt[4:0], sign, quality[1:0]}`. The physics (the Pt curve) lives
entirely in the memory contents, which are loaded at run time.

## Data formats (`tf_pkg`)

| type | fields (MSB first) | bits |
|---|---|---|
| `seg_raw_t` | valid, quality 4, pattern 4, sign 1, strip 8, wire group 7 | 25 |
| `mb_raw_t` | valid, quality 4, phi 12 | 17 |
| `seg_ang_t` | valid, quality 4, phi 12, eta 6 | 23 |
| `track_t` | valid, rank 4, id[5] x 4 (ME1, ME2, ME3, ME4, barrel) | 25 |
| `muon_t` | valid, quality 2, pt 5, sign, phi 6, eta 6 | 21 |
| `gmt_cand_t` | muon_t, sector 4 | 25 |

Segment index layout inside a sector: station 1 segments 0-5, station 2
segments 6-8, station 3 segments 9-11, station 4 segments 12-14, barrel
segments 15-22.

`tf_cfg_t` holds the static settings: a phi window and an eta window per
pair type (`P12, P13, P23, P24, P34, PMB2`), the cancellation threshold,
and one 2-bit alignment delay per input (shared by all sectors).

## Lookup memories and the access port

There are four kinds of table, all instances of `lut_sram` (synchronous,
one clock):

* phi table per link: 8K x 12, address `{strip, pattern, sign}`;
* eta table per link: 2K x 6, address `{wire group, quality}`;
* Pt memory per output muon: 64K x 8.

Each behaves like a single-port SRAM. The pipeline normally owns the
address. A request on `lut_req` with `en=1` takes the port for that clock.
`we=1` writes. `we=0` reads, and the word appears on `lut_rdata` one clock
later. Target: `sector` (or `all_sect` for writes), `tgt`
(`T_PHI/T_ETA/T_PT`), and `unit` (link number or Pt-memory number, or
`all_unit` for writes). This port stands in for the crate's VME access.
Lookups that pass through a table while it is being accessed give
meaningless results, so load the tables before data taking. No contents
are built in.

## Ports of the top (`track_finder`)

| port | dir | type | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | | 40 MHz crossing clock, asynchronous active-low reset |
| `clk80` | in | | backplane clock, twice `clk`, rising edges in phase |
| `link_in` | in | `seg_raw_t [12][15]` | CSC segments per sector and link |
| `mb_in` | in | `mb_raw_t [12][8]` | barrel segments per sector |
| `cfg` | in | `tf_cfg_t` | windows, threshold, alignment delays |
| `lut_req` / `lut_rdata` | in / out | `lut_req_t` / 16 | table write and read-back |
| `sp_out` | out | `muon_t [12][3]` | three best muons per sector |
| `gmt_out` | out | `gmt_cand_t [4]` | best four muons with sector number |
| `ta_trk`, `fs_cancel`, `gtlp_bus` | out | | assembled tracks, cancellations and backplane frames, for monitoring |

## Where this model departs from the reference design

* **Compatibility test.** The reference extrapolation unit checks that two
  segments fit one track from the collision point, with the bending
  expected in that region. Here the test is two programmable windows,
  `|dphi|` and `|deta|`, one pair per station-pair type. The windows do not
  vary with eta or with position in the chamber.
* **Which tracks are compared for duplicates.** The reference compares the
  two endcap streams. Here every pair from different streams is compared,
  so the overlap stream also takes part. A cancelled track can still cancel
  another one in the same clock.
* **Barrel pairs.** Barrel segments are matched to station 2 only, and in
  phi only.
* **Muon word width.** Three muons take 63 bits here (21 each). The
  first-generation board sent 60 bits per sector. The field widths were
  never given, so the sorter and the link are sized to this design's words.
* **Latency beyond the board.** The 7 clocks from input to `sp_out` match
  the reference budget. The one clock of the backplane link and the one
  clock of the sorter are this design's choices.
* **Front end.** Only the bunch-crossing alignment is built (0 to 3 extra
  clocks per input). The clock-phase synchronisation of each optical link
  is not.

## What is not modelled

* Optical receivers and deserialisers. `link_in` is their parallel output,
  assumed already retimed to the common clock. Only the bunch-crossing
  alignment is built, so `front_fpga` is only part of the real front end.
* The bunch-crossing analyzer. It was not implemented in the reference
  design either and has zero latency there.
* The clock and control board, the VME controller, board configuration,
  and DAQ readout.

## Simulating

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module track_finder_tb \
          -y rtl rtl/tf_pkg.sv rtl/track_finder.sv tb/track_finder_tb.sv
./obj_dir/Vtrack_finder_tb
```

Replace `track_finder` with any module name to run that module's bench.
`track_finder_tb` runs the full 12-sector system at its default
parameters; it takes about 2 minutes to compile and a few seconds to run.
It loads all tables with formulas (phi = 16 x strip, eta = wire group / 2,
Pt word = address high byte XOR low byte), and gives every input a random
alignment delay. It then streams 300 crossings, each with up to four muons
per sector drawn from seven station patterns. The bench predicts every
sector output (7 clocks) and every sorter output (9 clocks) independently
of the RTL. It also
counts cancellations, overlap muons, three-station Pt addresses, sectors
with more than three muons, crossings with more than four, realigned
inputs and read-backs, and fails if any of them never happened.

The other benches drive single units with random stimulus and compare
against reference models. `sr_sp_tb` checks the 7-clock latency of one
board with a deliberately early link. `sp_fpga_tb` checks the 4-clock
latency of the Sector Processor logic and back-to-back crossings.

## Changing it

* Sizes and widths are in `tf_pkg`. Field widths can be changed there; the
  counts per station are tied to the index layout and the stream wiring in
  `sp_fpga`.
* The compatibility test is in `extrap_unit`. A bending-dependent window,
  for example one indexed by eta, would go there.
* The quality word is formed in `track_assembler`, and the duplicate rule
  in `final_selection`.
* Pt modes and the address layout are in `pt_precalc`. If the address
  width changes, change `PT_AW` as well.
