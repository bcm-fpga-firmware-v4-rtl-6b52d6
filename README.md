# BCM readout, beam-abort and post-mortem logic

The ATLAS Beam Conditions Monitor (BCM) watches particle hits near the beam
pipe with diamond sensors. Each sensor channel reaches the FPGA as a 2.56 Gb/s
serial stream: for every LHC bunch crossing (BC, 25 ns, 40 MHz) the stream
carries 64 samples of 390 ps, a 64-bit picture of the analogue pulse above
threshold. From those pictures one FPGA, handling eight channels, has to:

* find the pulses in each BC (where each pulse starts and how wide it is);
* decide, every BC, whether the beam must be dumped (beam abort to the
  interlock system and the detector safety system);
* count collision and background events for luminosity and send trigger bits
  to the central trigger processor (CTP);
* send the pulse data of triggered BCs (L1A) to the data acquisition as ROD
  fragments over S-LINK;
* keep a long history of the raw data in DDR2 memory (the post-mortem
  buffer), so that the data before and after a beam abort can be read out
  afterwards.

This repository is synthesizable SystemVerilog for that logic. It follows the
structure of the BCM v4 FPGA firmware. The same logic serves both of the
system's readout drivers: one with the eight low-gain channels, which makes the
abort decisions, and one with the eight high-gain channels, which measures
luminosity. A mode input selects the role. The logic around it (the
multi-gigabit transceivers, the embedded PowerPC with its bus and software,
the DDR2 memory controller and the Ethernet MAC) is vendor IP. It is not
included here: its data paths are module ports and its configuration
registers are plain inputs.

## Data flow

```
               clk_bc (40 MHz)                                      clk_npi
 rx_data_i  ┌──────────┐ raw ┌────────────────┐ pulses ┌────────────┐
 8 x 64 bit─► mgt_ctrl ├──┬──► data_proc_ctrl ├───┬────► abort_ctrl ├─► abort_cibu_o / abort_dss_o
            │ fine dly │  │  │ 8 x pulse_reco │   │    └─────┬──────┘    post-mortem trigger
            │ test vec │  │  └──────┬─────────┘   │          ▼
            └──────────┘  │         │ 176-bit rec  ├──► lumi_ctrl ─► ctp_trig_o, counters
                          │         ▼             
                          │    ┌──────────┐  S-LINK
                          │    │ rod_ctrl ├──────► slink_data_o
                          │    └────▲─────┘
                          │         │ L1A, L1ID, BCID, trigger type
                          │    ┌────┴─────┐
 LTP (L1A, ECR, Orbit, TT)────►│ ltp_ctrl ├── post-mortem delay ─► freeze
                          │    └──────────┘
                          ▼
                   ┌───────────┐ 256 bit ┌────────────┐       ┌──────────┐
                   │ pm_reduce ├────────►│ async_fifo ├──────►│ npi_ctrl ├─► NPI port (DDR2)
                   └───────────┘  per BC └────────────┘       └──────────┘
 clk_320 ─► bc_clk_gen ─► clk_40_o, clk_80_o
```

Everything left of the FIFO runs on the BC clock. The memory-controller side
runs on `clk_npi`, and the BC clock regenerator on the 320 MHz reference.

## Pulse reconstruction (`pulse_reco`, `data_proc_ctrl`)

This is the core of the design. A sample `raw[63:0]` holds one BC of a
channel, bit 0 earliest. A pulse is a run of ones. The block reports at most
two pulses per BC, each as a 6-bit position (390 ps units) and a 5-bit width.

1. **Edges.** A rising edge (RE) is a bit that is 1 after a 0; a falling edge
   (FE) is a bit that is 0 after a 1. Edges are looked for inside the sample
   only, so bit 0 is never an edge. A run that touches bit 0 started in the
   previous BC and is not counted again. An all-ones sample therefore holds
   no pulse. A run still high at bit 63 gets a falling edge at position 64.
2. **Forward and reverse search.** A priority encoder from bit 0 upwards
   finds the first RE (`FWD_RE`). A second one, from bit 63 downwards, finds
   the last RE (`REV_RE`) and the last FE (`REV_FE`). `FWD_FE` is the first
   FE after `FWD_RE`.
3. **Pulses.** Pulse 1 is `pos = FWD_RE`, `width = FWD_FE - FWD_RE`. Pulse 2
   is `pos = REV_RE`, `width = REV_FE - REV_RE`. Widths saturate at 31.
   Pulse 2 is valid only when the sample has two or more rising edges, so a
   single pulse is not reported twice. With three or more pulses the middle
   ones are dropped, but `hits_o` still counts every rising edge.

Examples (these three are part of `tb_pulse_reco`):

| sample | pulse 1 | pulse 2 |
|---|---|---|
| `07fc00000001ff80` | pos 7, width 10 | pos 50, width 9 |
| `ffffffffffffffff` | none | none |
| `7ffffffffffffffe` | pos 1, width 31 (62, saturated) | none |

The outputs are registered, one BC after the sample. `data_proc_ctrl` runs one
`pulse_reco` per channel. It packs the 8 x 2 x (6+5) = 176-bit record with
channel 0 in the top bits: P1 position, P1 width, P2 position, P2 width. It
also sums the hits of the BC and keeps a 32-bit running total.

## Beam abort (`abort_ctrl`)

Three algorithms run every BC on the pulses of the eight channels:

* **Basic:** the number of channels with a pulse in this BC is at least
  `basic_thr_i`.
* **X-of-Y:** at least `xy_x_i` of the last `xy_y_i` basic results fired
  (Y up to 32, the current BC included).
* **Leaky bucket (forgetting factor):** every basic result adds `lb_inc_i`
  to a 16-bit bucket. Every `lb_period_i` BCs, `lb_leak_i` drains out again,
  never below zero. The algorithm fires while the bucket is at or above
  `lb_thr_i`. Old hits are thus forgotten gradually instead of falling out of
  a fixed window.

A threshold of zero disables an algorithm's flag. `alg_en_i` selects which
flags may abort. The first enabled flag that fires sets `abort_cibu_o` (beam
permit to the interlock) and `abort_dss_o`, which stay set until
`abort_clr_i`. It also gives a one-BC post-mortem trigger. The raw flags come
out on `abort_fire_o` one BC after the pulses, so algorithms can be watched
without enabling them.

## Luminosity and CTP triggers (`lumi_ctrl`)

Channels 0 to 3 are side A and channels 4 to 7 side C. The position of
pulse 1 of each channel is tested against two inclusive windows. The in-time
window is where collision products arrive. The early window is where
particles coming from outside the detector arrive on the upstream side. Per
BC:

| bit | event | condition |
|---|---|---|
| 0 | collision | in-time hit on A and in-time hit on C |
| 1 | background A | early hit on A and in-time hit on C |
| 2 | background C | early hit on C and in-time hit on A |

These bits drive `ctp_trig_o` in lumi mode (they are held at 0 in abort mode).
Each class, and "any pulse", has a 32-bit event counter.

## ROD fragments on S-LINK (`rod_ctrl`)

Every BC the BCID, the 176-bit record and a 4-bit error code enter a 256-deep
ring buffer. An L1A, which arrives `l1_latency_i` BCs after its bunch
crossing, reads that BC back into an 8-event FIFO. The sender then writes one
fragment, one 32-bit word per cycle while the link is not full
(`slink_ff_i`):

| word | content |
|---|---|
| control | `B0F00000` begin of fragment (`slink_ctrl_o` = 1) |
| header 1-9 | `EE1234EE`, header size 9, ROD version, source ID, `{0, run number[30:0]}`, `{ECR count[7:0], L1ID[23:0]}`, BCID, trigger type, detector event type |
| data 1-6 | 192 bits, MSB first: BCID[11:0], then for channels 0..7: P1x[5:0] P1w[4:0] P2x[5:0] P2w[4:0], then the error code[3:0] |
| trailer 1-5 | status word 1: the error code; status word 2: 1 if the error code is non-zero; then the number of status words (2), the number of data words (6), the status position (1 = after the data) |
| control | `E0F00000` end of fragment |

A fragment takes 22 cycles without back-pressure. An L1A that finds the event
FIFO full is dropped and counted in `rod_drop_cnt_o`. The error code is
`{post-mortem delay running, post-mortem frozen, FIFO underflow, FIFO overflow}`.

## Post-mortem recording (`pm_reduce`, `async_fifo`, `npi_ctrl`)

Raw data arrive at 8 channels x 8 bytes x 40 MHz = 2560 MB/s. One port of the
memory controller writes at most 1600 MB/s. `pm_reduce` therefore halves the
time resolution to 780 ps by ORing neighbouring bits, which gives one 256-bit
word per BC, or 1280 MB/s. The words cross to the memory clock in a 64-entry
gray-pointer FIFO. `npi_ctrl` writes them in bursts of 32 64-bit words:

* **PUSH:** push one word per cycle into the port's write FIFO while data are
  there, with `burst_cnt_o` counting 0 to 31. An empty FIFO stalls the push.
* **REQ:** hold `npi_addr_req_o` with the burst address until
  `npi_addr_ack_i`, then advance the address by 256 bytes.

The 256 MB of DDR2 are two 128 MB buffers used as one ring. The address wraps
after the second buffer, and leaving a buffer sets its bit in
`pm_irq_status_o`. With a 64-bit port at 200 MHz, one burst (8 BCs of data)
needs about 38 cycles, or 190 ns, against 200 ns of data. This clock is
required: at lower NPI clocks the FIFO overflows (`err_o[0]`).

A beam abort, or `pm_trig_i`, starts the post-mortem delay in `ltp_ctrl`.
After `pm_delay_i` BCs, `pm_frozen_o` rises. New data are then no longer
written into the FIFO, `npi_ctrl` finishes its current burst and starts no
new one, and the ring keeps the history around the event until
`pm_rearm_i`. `pm_last_addr_o` gives the last burst address written, which
software can read while the ring is frozen. `pm_fifo_max_o` is the highest
FIFO fill seen since the last re-arm. It shows how close the memory port
comes to falling behind. In simulation, with random acknowledge delays, it
stays at a few entries.

## LTP interface and bookkeeping (`ltp_ctrl`, `bc_clk_gen`)

The Local Trigger Processor signals L1A, ECR (event counter reset), Orbit
and the 8-bit trigger type are registered on entry. ECR and Orbit count on
their rising edge.

* **L1ID:** the extended L1ID is `{ECR count, 24-bit event number}`. An ECR
  sets the event number to all ones, so the next L1A is event 0, and
  increments the ECR count. Software can load the ECR count.
* **BCID:** 12 bits, wrapping after 3564 BCs. Orbit loads `bcid_offset_i`.
* **Timing:** the updated L1ID and the L1A reach the ROD two BCs after the
  L1A input.

`bc_clk_gen` divides the 320 MHz reference by 8 and by 4 into flip-flop
driven 40 and 80 MHz clocks. `bc_sync_i`, a one-BC pulse on the BC clock, re-phases them:
the 40 MHz rising edge follows five 320 MHz cycles after the command reaches that domain. They are outputs
only; the logic itself runs on the `clk_bc` input, which may be the on-board
40 MHz clock.

## Receive path (`mgt_ctrl`)

For each channel the 64-bit transceiver word can be delayed by 0 to 63 bits
(390 ps steps) across word boundaries: `out = ({word, previous word} >> (64 - delay))`.
This does what the transceiver's RX-slide feature is used for, aligning the
BC boundary in the serial stream. Test vectors, up to 256 words per channel,
can be written into block RAM and played back instead of the transceiver
data, on any set of channels. Playback loops over the first `tv_len_i` words
while `tv_run_i` is high.

## Clock-domain crossing library

`sync_2ff` (two-flop synchronizer), `edge_detect` (rising-edge pulse),
`pulse_sync_1way` (toggle-based pulse transfer without acknowledge),
`pulse_sync_2way` (four-phase request/acknowledge with a busy flag) and
`async_fifo`. In the top, the freeze and enable levels cross to `clk_npi`
through `sync_2ff`. The interrupt clear crosses through `pulse_sync_2way`. The BC re-phase
command crosses to the 320 MHz domain through `pulse_sync_1way`.
The status bits come back through `sync_2ff`.

## Departures and own choices

The block structure, the pulse reconstruction rule, the three abort
algorithms, the ROD word list and data packing, the 32-word NPI bursts, the
2 x 128 MB ring and the 390 to 780 ps reduction follow the BCM v4 firmware.
The following are choices of this implementation and may differ from it:

* The **basic abort criterion** (at least N channels with a pulse in the BC)
  is a plausible reading. Its exact definition in the original firmware is
  not reproduced here.
* **Time-window classification:** the side assignment of channels, the
  window pairing for background and the use of pulse 1 only.
* **ROD details:** the marker and S-LINK control word values, the version
  and source ID defaults, the contents of the two status words, one BC per
  event, the 256-deep latency buffer and the 8-event FIFO.
* **Sizes and widths:** the NPI width (64 bit), test-vector depth (256),
  bucket width (16 bit) and X-of-Y history (32).
* **Interface:** the register interface is replaced by ports. All resets are
  synchronous, one per clock domain.
* **Clock regeneration:** the 40/80 MHz regeneration is a counter; an FPGA
  build would use its clock managers.
* **Not built:** the Ethernet/TCP path, the processor and its software
  (calibration, BIST, configuration, telnet) are not part of the RTL.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches share reference models in
`tb/bcm_tb_pkg.sv`, written independently of the RTL (for example, a
bit-walking pulse finder). `tb/mpmc_npi_model.sv` is a behavioural model of
one memory-controller write port, with random acknowledge delays. Run a
testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb \
  rtl/bcm_pkg.sv tb/bcm_tb_pkg.sv tb/tb_bcm_top.sv --top-module tb_bcm_top
./obj_dir/Vtb_bcm_top
```

`tb_bcm_top` runs the complete design at its real sizes, for 5000 to 12000 BCs (the abort phases run until the abort fires).
It checks the following against a cycle-accurate model:

* every ROD fragment, under random link back-pressure, ECRs and orbits;
* the abort flags every BC and the latched outputs in separate basic, X-of-Y
  and leaky-bucket phases;
* the post-mortem delay and freeze, and that the DDR2 model holds an
  unbroken run of 780 ps words;
* the CTP bits in lumi mode, with the abort suppressed;
* the hit count of a test-vector playback;
* the period of the regenerated BC strobe, and its re-phasing by `bc_sync_i`;
* the running hit total against the per-BC hit counts, and the debug outputs
  (leaky-bucket level, FIFO high-water mark and its clear, burst counter).

It counts each of these mechanisms and fails if one never happened. One
thing it does not reach is the buffer-full interrupt of the 128 MB buffers:
that would take 4 million BCs. `tb_npi_ctrl` covers the interrupt with 1 KiB
buffers.

Unit testbenches that shrink a parameter: `tb_mgt_ctrl` (16 test vectors),
`tb_rod_ctrl` (64-deep latency buffer, 4 events), `tb_npi_ctrl` (1 KiB
buffers), `tb_ltp_ctrl` (100-BC orbit) and `tb_async_fifo` (8 entries).

## Files

| file | contents |
|---|---|
| `rtl/bcm_pkg.sv` | sizes, pulse struct, mode enum |
| `rtl/bcm_top.sv` | top level |
| `rtl/mgt_ctrl.sv`, `pulse_reco.sv`, `data_proc_ctrl.sv` | receive path and pulse reconstruction |
| `rtl/abort_ctrl.sv`, `lumi_ctrl.sv` | beam abort, luminosity / CTP |
| `rtl/rod_ctrl.sv`, `ltp_ctrl.sv`, `bc_clk_gen.sv` | readout, trigger bookkeeping, clocks |
| `rtl/pm_reduce.sv`, `async_fifo.sv`, `npi_ctrl.sv` | post-mortem path |
| `rtl/sync_2ff.sv`, `edge_detect.sv`, `pulse_sync_1way.sv`, `pulse_sync_2way.sv` | CDC library |
| `tb/tb_<module>.sv` | one testbench per module |
