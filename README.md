# Self-calibrating DDR2 PHY byte lane

A DDR2 read is source-synchronous: the SDRAM sends a strobe (DQS) with the data
(DQ), and the PHY must capture each DQ bit with a copy of that strobe. Three
things spoil this at 1066 MT/s:
- the DQ lines arrive with different skews;
- the strobe picks up glitches when the device drives it out of, and back
  into, high impedance;
- the I/O drivers' resistance drifts with process, voltage and temperature
  (PVT).

This RTL is one byte lane of a PHY that calibrates all three: at start-up, and
again during refresh intervals while the controller keeps running:

| Mechanism | Block | What it does |
|---|---|---|
| Strobe masking (DSMS) | `dsms` | Opens a mask in the read preamble and closes it after the last expected strobe pulse. Glitches outside the mask never reach the capture flops. |
| Per-bit deskew | `deskew_engine`, `cal_seq` | Trains nine 64-tap delay lines (8 DQ, 1 DQS) so that all DQ bits line up and the strobe sits in the middle of their common valid window. |
| Impedance calibration | `sstl_calib`, `sstl_dummy` | Searches the pull-up and pull-down leg codes of a replica driver against an external 150 Ω resistor. |
| Update handler | `update_handler` | Runs the start-up sequence. On every refresh it re-measures the clock period in delay taps. If the delay per tap has drifted, it asks the controller for a DFI PHY update and retrains. |

The lane has a DFI interface towards the controller and a DDR2 pin interface
towards the SDRAM. It runs at 533 MHz (tCK = 1876 ps), with burst length 8.

## Block hierarchy

```
ddr2_phy_top
├── rcdll            period measurement, 0°/90° clocks          (behavioural)
├── cfg_regs         configuration register file
├── update_handler   start-up / refresh-time recalibration FSM
├── sstl_calib       impedance search FSM
│   └── sstl_dummy   replica driver + comparators               (behavioural)
├── deskew_engine    per-bit deskew FSM
│   └── cal_seq      issues the calibration WRITE/READ bursts
├── addr_ctrl        command/address register, controller vs calibration mux
├── dqs_bitslice     strobe path
│   ├── dsms         strobe masking
│   ├── pdl          64-tap strobe delay line                   (behavioural)
│   ├── sdl ×2       90° delay lines (masked_dqs90, masked_dqs90_d) (behavioural)
│   └── write_dqs_gen write strobe, TX/RX enables
└── dq_bitslice ×8   data path
    ├── pdl          64-tap DQ delay line                       (behavioural)
    └── async_fifo   strobe-domain to dfi_clk read FIFO
```

`ddr_phy_pkg` holds the shared widths, the command encoding (`ddr_cmd_t`), the
command bundle (`ddr_ctrl_t`) and the configuration record (`phy_cfg_t`).
`transport_delay` is the helper that gives the delay-line models their
transport delay.

The delay lines, the DLL and the impedance replica are analog in silicon.
Here they are behavioural models with their real ports, driven by two test
inputs on the top:
- `tap_ps`: the delay of one tap;
- `pvt_pct`: the resistance scale, in percent.

Everything else is synthesizable.

## Clocks and data format

- `dfi_clk` is the controller clock. The DLL provides `dfi_clk0` (identical)
  and `dfi_clk90` (a quarter period later). It also gives the period as a tap
  count (`period_taps`) and the 90° setting (`period_taps / 4`) for the two
  slave delay lines.
- DFI data is 16 bits per cycle, two bits per DQ line.
  - Write: `dfi_wrdata[2i]` is the first bit on line *i* and `[2i+1]` the
    second.
  - Read: `dfi_rddata[2i+1]` is the bit captured on the strobe's rising edge
    and `[2i]` the one captured on its falling edge. The line sequence
    1,0,0,1,0,0,1,0 therefore reads as the words 10, 01, 00, 10.
- Write path:
  1. DFI data is taken on the falling edge of `dfi_clk0`.
  2. It is launched on both edges of `dfi_clk90`.
  3. The write strobe is generated from `dfi_clk0`, so it falls in the middle
     of each DQ bit.
- Write strobe: `write_dqs_gen` gives a half-clock preamble and postamble.
  `tx_en` covers the whole burst and drives the pad enables (`dq_oe`,
  `dqs_oe`). `rx_en` is its complement.
- Read path:
  1. Each DQ line passes its own delay line.
  2. It is captured on both edges of `masked_dqs90`, the masked strobe after
     the DQS delay line and a 90° delay.
  3. The two-bit word goes into an 8-entry Gray-pointer FIFO. The FIFO is
     written on the falling edge of `masked_dqs90_d`, a further 90° later.
  4. The word is read out in the `dfi_clk0` domain. `dfi_rddata_valid` is the
     AND of the eight FIFOs' valids.

## Strobe masking

The mask is built by two counters:
- The **expected** counter advances in every `dfi_clk` cycle in which the
  (delayed) `dfi_rddata_en` is high. That is one strobe pulse per cycle, so
  four for a BL8 read.
- The **received** counter advances on every falling edge of the *masked*
  strobe.

The mask is high while the two counts differ, and the read strobe is ANDed
with it:
- a glitch before the mask opens is blocked;
- the mask closes on the last expected falling edge, so a postamble glitch is
  blocked too;
- back-to-back reads keep the counts apart, so the mask stays open across
  them.

The counters are Gray-coded because they run in different clock domains.

`mask_dly` (0..15 cycles) delays the enable, so the mask can rise inside the
read preamble for a given CAS latency and board delay. The mask opens
`1 + mask_dly` cycles after `dfi_rddata_en`. With `rd_lat = 4`, CL = 5 and
about 0.7 tCK of flight time, `mask_dly = 1` puts the rising edge of the mask
0.7 tCK before the first strobe edge. That is the setting the system test
uses. The register resets to 0 and must be programmed for the board.

## Per-bit deskew

This is the part that needs the most care. The engine works on a 64-bit
pattern at column 0 of bank 0: beats alternate `pattern` and `~pattern`
(FFh/00h by default).

1. **Save** (recalibration only): read the 64 bits stored there.
2. **Write the pattern.** Set every DQ delay line to `init_dq_taps` (32) and
   the DQS line to `init_dqs_taps` (16).
3. **First edge.** Repeat a burst read. Every DQ line with a wrong bit in any
   of the eight beats moves one tap earlier. Stop when every line passes.
   Each line now sits at the late edge of its window, so all lines have the
   same total delay to within one tap.
4. **Second edge.** Move *all* DQ lines one tap earlier per read until any
   line fails. The setting one tap above the failing read is the other edge.
5. **Place.**
   - `window_taps` = first edge − second edge, measured on DQ0.
   - The DQS delay line is set to `init_dqs_taps + window/2`.
   - The DQ lines go back to their first-edge settings.
   The strobe is then in the centre of every line's window.
6. **Restore** (recalibration only): write the saved 64 bits back.

`locked` is set when this succeeds. `lock_fail` is set if a line would have to
go below tap 0. A read that does not return within `rd_timeout` cycles counts
as a failure on every line.

`cal_seq` issues each WRITE or READ with the configured `wr_lat`/`rd_lat`,
drives the calibration data and enables, and collects the four read words. It
returns `rd_ok` only when all four came back.

**Range.** The valid window must fit below the starting DQ setting and above
tap 0. With 45 ps taps, a 938 ps bit and about 640 ps of valid data:
- the late edge of an unskewed line falls near tap 19;
- its early edge falls near tap 5.

A line that arrives *s* ps later has both edges about *s*/45 taps lower. So
with these start values, skews up to about 250 ps can be corrected. Raising
`init_dqs_taps` moves the whole window up.

At start-up the complete sequence takes about 1.4 µs of 533 MHz clock:
- DLL lock;
- impedance search and write;
- SDRAM initialisation (handed out on `sdram_init` / `sdram_init_done`);
- about 30 calibration reads.

## Update handler

The state machine, in order:

| Phase | States | What happens |
|---|---|---|
| Start-up | `UPD_IDLE`, `SSTL_FSM_I`, `SSTL_UPD`, `PHY_INIT`, `CALIB_INIT` | Wait for the DLL, search and write the impedance codes, start SDRAM initialisation, run the deskew. |
| Ready | `PHY_READY` | `dfi_init_complete` is set. |
| Controller update | `GEN_DFI_ACK` | A `dfi_ctrlupd_req` is answered here. |
| Refresh | `SSTL_UPD_WT` | A REFRESH command on the DFI enters this state. It writes a pending impedance result, or starts a new search if `sstl_period` cycles have passed, or else goes to the period check. |
| Period check | `DLL_MES`, `CHK_RD_TR` | The DLL measures the period. If it differs from the reference by more than `delta_n` taps (default 4), continue to the PHY update. |
| PHY update | `GEN_DFI_UPD`, `CALIB_INIT2` | The handler raises `dfi_phyupd_req`. After `dfi_phyupd_ack` it retrains, with save and restore. |

Notes:
- The impedance search runs in one refresh interval and its result is written
  in the next, because one interval is too short for both.
- The new period becomes the reference after a PHY update.
- During calibration, `ctrl_sel` and `wr_sel` switch the command and write
  paths from the controller to the engine.
- `upd_busy` is low only while the controller owns the lane.

Where the state diagram leaves a choice open, the priority in `SSTL_UPD_WT`
(pending write, then new search, then period check) is this design's own.

## Impedance calibration

`sstl_calib` does a successive-approximation search over a 6-bit leg code:
1. It searches the pull-up code against the external 150 Ω resistor, using
   comparator `cmp_p`.
2. It searches the pull-down code against the chosen pull-up, using `cmp_n`.

Each trial waits `SETTLE` cycles. The result is held in `p_code_new` /
`n_code_new` until the update handler writes it to the driver codes
(`drv_p_code`, `drv_n_code`).

`sstl_dummy` models the replica as parallel legs of `R_UNIT * pvt_pct / 100`
ohms. At `pvt_pct = 100` the codes are 40 (pull-up) and 35 (pull-down).

## Configuration registers

Written through `cfg_we`/`cfg_addr`/`cfg_wdata`; read combinationally on
`cfg_rdata`.

| Addr | Field | Reset |
|---|---|---|
| 0 | `delta_n` (allowed period drift in taps) | 4 |
| 1 | `sstl_period` (cycles between impedance searches) | 4096 |
| 2 | `mask_dly` | 0 |
| 3 | `wr_lat` | 3 |
| 4 | `rd_lat` | 4 |
| 5 | `rd_timeout` | 32 |
| 6 | `pattern` | FFh |
| 7 | `init_dq_taps` | 32 |
| 8 | `init_dqs_taps` | 16 |

## Simulation

Every block has a self-checking testbench, `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The behavioural models
need `--timing`. For example:

```
verilator --binary --timing -Irtl -Itb rtl/ddr_phy_pkg.sv tb/tb_ddr2_phy_top.sv \
          --top-module tb_ddr2_phy_top -o sim && ./obj_dir/sim
```

`tb_ddr2_phy_top` runs the whole lane at its default parameters against
`tb/ddr2_sdram_model.sv`. The model is a behavioural x8 DDR2 device with
CL = 5, board delay, per-line skews up to 150 ps, 300 ps of data uncertainty
at the start of each bit, and a glitch before every preamble and after every
postamble. The test covers:
- start-up training;
- random controller writes and reads, including back-to-back reads;
- 32-word transfers: four BL8 writes and four BL8 reads, each issued BL/2
  cycles apart, so both strobes run continuously;
- the controller-update handshake;
- an impedance drift followed over two refresh intervals;
- a tap-delay drift from 45 to 52 ps. This must trigger the PHY-update
  handshake and a retraining that keeps the data at column 0.

Each mechanism is counted, and one that never occurs is a failure.

## Limits and departures

- **Not built:** impedance calibration at the VDDQ point (only VDDQ/2) and
  slew-rate control.
- **Outside the RTL:** the SSTL pads, the PLL and the controller. The top
  brings out separate output, enable and input signals, plus the driver
  codes, for the pads.
- **One byte lane.** A wider bus repeats the DQS/DQ slices and the deskew
  engine per group of eight lines.
- **Behavioural models:** the delay lines, DLL and replica are ideal. There
  is no jitter, metastability or tap mismatch. The DLL's lock and measurement
  latencies (8 and 4 cycles) are arbitrary.
- **Deskew window:** measured on DQ0 only. The DQS placement assumes all
  lines have windows of about the same width.
- **SDRAM model:** tracks columns only, not banks or rows. No timing checks
  other than CL.
