# MIOCT — octant logic of a muon-to-central-trigger interface

At every LHC bunch crossing (BC, 25 ns), each of the 13 muon trigger
sectors of one half-octant sends a 32-bit word. There are 4 barrel, 6
end-cap and 3 forward sectors. Each word can hold up to two muon
candidates. The octant logic has three jobs:

1. Count the candidates above each of six transverse-momentum (pT) thresholds and send six
   3-bit multiplicities to the backplane adder tree. The count must take only
   3 bunch crossings, and a muon seen by two overlapping sectors must count
   only once.
2. Keep every sector word for the Level-1 trigger latency. On a Level-1
   Accept (L1A), read out a window of up to ±2 crossings around the trigger,
   zero-suppressed and formatted, over a shared token-passing bus. A copy is
   kept for monitoring over VME.
3. Record everything into a large external snapshot memory, or replay test
   data from it, for timing-in and module tests.

The main idea is that the overlap policy is not fixed in logic. Every
decision about which candidates overlap, which one to drop and which
thresholds a pT code passes is a look-up table (LUT). All tables are loaded
through the local bus, so the policy can change without a new firmware
build.

## Clocking and trigger latency

Everything runs on one clock at four times the bunch clock (~160 MHz).
`bc_strobe` is high for one clock in four and marks the crossing boundary.
The timing inputs `l1a`, `bcr` and `ecr` are sampled together with
`bc_strobe`.

A sector word present during crossing *n* moves through the design as follows:

| stage | where | clocks |
|---|---|---|
| sampled at a programmable phase of the 4x clock, delayed by 0..16 BC, aligned at the end of crossing *n* | `sync_align` | — |
| overlap detection: zone tables, then pair tables | `ovl_detect` ×4 | 2 |
| suppress decision | `suppress_gen` | 1 |
| threshold masks and two half-sums, saturated at 7 | `mult_sum` | 2 |
| registered at the next crossing boundary | `mioct` | — |

The multiplicities are on `mult` during crossing *n*+3, which gives the
required trigger latency of 3 BC. The end-to-end testbench checks this
cycle count.

## Sector word and candidate format

The sector-logic word format is this design's own choice:

```
sector word [31:0] = { flags[4:0], bcid[2:0], cand1[11:0], cand0[11:0] }
candidate  [11:0] = { sign, pt[2:0], roi[7:0] }      pt = 0 : no candidate
```

Candidate *c* (0..25) is candidate `c%2` of sector `c/2`. The sectors are
numbered as follows: barrel 0–3, end-cap 4–9, forward 10–12. The 3-bit `bcid` is
compared with the local bunch counter minus a programmable offset. A
mismatch sets a sticky per-sector error bit, and the error is also marked in
the readout trailer.

## Overlap handling

There are four overlap regions, each with one detection unit. An adjacent
sector pair has 2×2 candidate pairs, so each sector pair gives 4 flags:

| region | sector pairs (A,B) | flags |
|---|---|---|
| barrel–barrel | (0,1) (2,3) | 8 |
| barrel–end-cap | (0,4) (0,5) (1,5) (1,6) (2,7) (2,8) (3,8) (3,9) | 32 |
| end-cap–end-cap | (4,5) (5,6) (6,7) (7,8) (8,9) | 20 |
| forward–forward | (10,11) (11,12) | 8 |

The flag counts match the block diagram of the original design. The exact
list of which sectors touch is this design's reading of the geometry. The
list is held in `mioct_pkg` (`PAIRS_*`, `pair_sector()`).

**Detection (`ovl_detect`)** decides in two ranks:

* A *zone table* per sector pair and side maps the 8-bit RoI to a 3-bit
  zone. Zone 0 means "not near this neighbour".
* A *pair table* per sector pair gives the flag. It is addressed by
  `{zone_A, zone_B}`. In the barrel–end-cap unit the address also holds
  `{pt_A, pt_B, sign_A, sign_B}`, 14 bits in all.
* A flag is raised only if both candidates exist.

**Suppression (`suppress_gen`)** uses a 64-entry table per region,
addressed by `{pt_A, pt_B}`. Each entry holds two bits that say whether to
drop A, B or both when the pair is flagged. A candidate is suppressed if
any of its flags asks for it.

**Counting (`mult_sum`)** uses an 8×6 table that maps each pT code to the
set of thresholds it passes. Suppressed candidates are skipped. Each count
saturates at 7.

### Table addresses

A table write is a local-bus write to `0x400000 | a`, where `a` is a
22-bit address and the data sit in bits [5:0]. `a[21:19]` selects the unit:

| unit | `a[18:0]` | data |
|---|---|---|
| 0–3 detection unit, zone table | `a[18]=0`, pair `a[12:9]`, side `a[8]`, RoI `a[7:0]` | zone [2:0] |
| 0–3 detection unit, pair table | `a[18]=1`, pair `a[17:14]`, index `a[13:0]` | flag [0] |
| 4 suppress tables | region `a[7:6]`, pt_A `a[5:3]`, pt_B `a[2:0]` | {drop A, drop B} |
| 5 threshold masks | pT code `a[2:0]` | mask [5:0] |

The tables are plain register arrays. They hold no useful contents after
reset, so load them before use.

## Readout path

`readout_pipeline` writes the aligned words of every crossing, with the
12-bit bunch counter and the alignment-error bits, into a circular L1
pipeline of 256 crossings. An L1A queues a request for the crossings from
`now − L1LAT − pre` to `now − L1LAT + post`, where `pre` and `post` are
0..2 each. The window is copied into the derandomizer as frames once its
last crossing is written. Each frame is one crossing tagged with
first/last, its position in the window and the 24-bit event number.

`zs_formatter` turns the frames into 36-bit words. It keeps only the
candidates with pT ≠ 0:

```
header    = { 3'b100, 1'b0, bcid[7:0] of the first crossing, l1id[23:0] }
candidate = { 3'b001, win[2:0], sector[3:0], cand_no, 5'b0, flags[4:0], bcid[2:0], candidate[11:0] }
trailer   = { 3'b111, 8'b0, bcid_err[12:0] (OR over the window), word_count[11:0] incl. header and trailer }
```

The words go to the 512-word readout FIFO. A whole event is also copied to
the 512-word monitoring FIFO if it fits at the moment its header is
written; otherwise that event is skipped for monitoring.

`readout_bus_if` drives the shared backplane bus. On a one-clock
`ro_token_in` it waits for a complete event in the FIFO and sends it one
word per clock with `ro_valid`/`ro_oe`. The outputs are registered. After
the trailer it passes the token on with a one-clock `ro_token_out`, so each
token carries one event. `busy` rises when the derandomizer or the readout
FIFO gets close to full.

## Snapshot and test memory

`snapshot_ctrl` talks to the user port of a memory-interface core for two
1M×36 QDR SRAMs. The port takes 144 bits per clock in each direction, with
a `rvalid` flag on reads. A crossing occupies four 144-bit words at address
`{bc[16:0], beat[1:0]}`, so the memory holds 128K crossings. Each record is
460 bits:

```
{ suppress[25:0], mult[5:0][2:0], sector[12:0][31:0] }
```

There are three operations:

* **Record (mode 1)** writes every crossing from start for `SNAPLEN`
  crossings, then stops and sets done. The results are written beside the
  sector words of the same crossing.
* **Replay (mode 2)** reads the sector words ahead and puts one crossing on
  the inputs at each crossing boundary, in place of `sl_data`. It can loop.
  With *drive* set, the same data also go out on `sl_drive_data`/`sl_drive_en`,
  so that the bidirectional sector links can test a second module.
* **Readback** reads one 144-bit word through five registers while no replay
  is running.

## Register map (local bus)

The local bus comes from the separate VME interface FPGA. It has a word
address, one-clock `lb_we`/`lb_re` strobes, and read data one clock later
with `lb_rack`.

| address | name | contents |
|---|---|---|
| 0x000 | CTRL | [0] BCID check on, [3:1] BCID offset, [5:4] crossings before, [7:6] after |
| 0x001 | L1LAT | [7:0] L1 latency in BC |
| 0x002 | STATUS (r) | [0] busy, [1] snapshot running, [2] snapshot done |
| 0x003 | BCIDERR | [12:0] sticky alignment errors, write 1 to clear |
| 0x004 | L1ID (r) | event number |
| 0x010+s | SECTOR s | [1:0] sampling phase, [12:8] delay in BC |
| 0x020 | SNAPCTRL | [1:0] mode, [2] start, [3] stop, [4] loop, [5] drive |
| 0x021 | SNAPLEN | crossings to record/replay |
| 0x022 | SNAPRBA | readback word address (write starts the read) |
| 0x023 | SNAPSTAT (r) | [0] running, [1] done, [2] readback ready, [24:8] crossing |
| 0x028–0x02C | SNAPRBD (r) | readback word, 32 bits each |
| 0x030 | MONHI (r) | [31] monitoring FIFO empty, [3:0] word bits 35:32 |
| 0x031 | MONLO (r) | word bits 31:0, the read pops the word |
| 0x400000+ | LUT (w) | table writes, see above |

## Files

`rtl/`: `mioct_pkg` holds the types, constants and the sector-pair lists.
It is followed by `sync_align`, `ovl_detect`, `suppress_gen`, `mult_sum`,
`overlap_handling`, `readout_pipeline`, `zs_formatter`, `sync_fifo`,
`readout_bus_if`, `snapshot_ctrl` and `reg_bank`. The top is `mioct`.

`tb/`:

* `mioct_ref_pkg` is a reference model of the overlap handling. It loops
  over all candidate pairs with its own copy of every table, its own pair
  list and random table generation.
* `qdr_sram_model` is a behavioural memory model.
* There is one self-checking testbench per block, `tb_<module>`. Each one
  compares the block with a model written independently of the RTL:
  * `tb_sync_align` checks sampling phases, delays and the BCID check.
  * `tb_ovl_detect`, `tb_suppress_gen`, `tb_mult_sum` and
    `tb_overlap_handling` use random tables and candidates against the
    reference model, including the latency.
  * `tb_readout_pipeline` checks windows and latencies, ecr, and that busy
    rises when nobody reads.
  * `tb_zs_formatter` checks the word format, readout-FIFO stalls, whole-event
    monitoring copies and the 26-clocks-per-crossing timing.
  * `tb_sync_fifo` checks random push and pop at full and empty.
  * `tb_readout_bus_if` checks one event per token, including tokens that
    arrive before an event is complete.
  * `tb_snapshot_ctrl` checks recording, readback, single and looped replay.
  * `tb_reg_bank` checks every register, table writes, the pulses and the
    FIFO pop.
* `tb_mioct` is the end-to-end test of the full-size top. It loads random
  tables over the local bus and checks the multiplicities crossing by
  crossing, including the 3 BC latency. It triggers events with windows of
  1, 3 and 5 crossings, collects them through the token bus and compares
  every word. It also reads an event back from the monitoring FIFO, records
  a snapshot and reads it back, replays 64 crossings and checks the trigger
  results of the replayed data, and injects an alignment error. It counts
  each of these mechanisms and fails if one never happens.

Every testbench ends with a `TB_RESULT checks=… failures=…` line. To run one
with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/mioct_pkg.sv tb/mioct_ref_pkg.sv tb/tb_mioct.sv --top-module tb_mioct -o sim
./obj_dir/sim
```

Replace `tb_mioct` by any other testbench name to run that one.

`tb_mioct` runs with all parameters at their defaults, in about a second.

## Where this design makes its own choices

The function of every block follows the original design. The following
details were not specified there and are this design's own:

* the sector word format and the 3-bit BCID check;
* the two-rank organisation of the overlap tables, and the exact list of
  adjacent sector pairs;
* the readout word format;
* the event-per-token bus handshake;
* all buffer depths: L1 pipeline 256 BC, derandomizer 32 crossings,
  FIFOs 512 words, alignment delay up to 16 BC;
* the local-bus register map.

The bunch counter wraps at 3564.

These parts are not included and are represented by ports:

* the VMEbus interface, which is a separate FPGA;
* the QDR memory-interface core and the SRAMs (a behavioural model is used
  in simulation);
* the LVDS and Bus-LVDS buffers;
* the backplane, central-trigger interface and readout-driver modules.
