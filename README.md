# EDICAM camera logic in SystemVerilog

EDICAM is a fast camera system for plasma experiments. It does not stream whole frames. The
host asks for small **regions of interest (ROIs)**, each at a precise time on a shared clock.
The camera reads out only those pixels, and a processing unit looks at them with almost no
delay. When a pixel statistic crosses a threshold, it fires actions: it triggers further
readouts, starts exposures, toggles pins or interrupts the host.

The system has two FPGAs joined by a 10 Gbit/s optical link:

* the **Sensor Module (SM)** sits next to a 1280×1024, 12-bit CMOS sensor. It runs exposure
  sequences, turns readout requests into sensor ROI downloads and sample pulses, and packs
  the results into commands on the link.
* the **Image Processing and Control Unit (IPCU)** sits in the host PC. It unpacks those
  commands, computes minimum, maximum and sum over each ROI (optionally limited to a
  sub-ROI), and runs an event processor that reacts to the results.

Both sides keep the same system time, the **ETU** (64-bit count of 100 ns periods), so
requests and reports are stamped in a common time base.

This repository holds the user logic of both sides, a top level that places them side by
side, and a self-checking testbench for every block.

## Data flow

```
           SM (clk_sm, 100 MHz)                                   IPCU (clk_ipcu, 125 MHz)
 requests ─► readout_ctrl ─► syncmodul ─► SCFW (40 MHz)   link ─► link_rx ─► ipcu_cmd_decoder
 exposure ─► exposure_ctrl ─┘  params, sample, exposure, busy           │        │ mode, image QWs
              │ status, row descriptors                                  │        ▼
 SCFW image ─► smcg (command generator) ─► link_tx ─► link        host ◄─┘       rdp ─► event_processor ─► actions
 etu_timing ─┘                                                               etu_timing ─┘
```

`edicam_top` holds `etu_timing`, `exposure_ctrl`, `readout_ctrl`, `syncmodul`, `smcg` and
`link_tx` on the SM side. On the IPCU side it holds `link_rx`, `ipcu_cmd_decoder`, `rdp`,
`event_processor`, one `roip_gen` per ROIP and a second `etu_timing`. The two sides share no signal. The SM's `g10tx_*` ports and the IPCU's
`g10rx_*` ports stand for the two ends of the optical link.

Everything not built here appears as top-level ports:

* the sensor control firmware (SCFW), i.e. the ROI parameter FIFO and the
  sample/exposure/busy control, both on the SCFW's own 40 MHz clock `clk_scfw`, and the
  192-bit image FIFO, which runs on `clk_sm`;
* the link and PCIe cores and the PLLs;
* the SM command decoder and register table (exposure parameters, start/stop, readout
  requests, sample-hold time, acknowledge requests);
* the IPCU register table (sub-ROI and threshold tables, event processor configuration);
* the descriptor memory of the IPCU readout command generator. It holds each ROI's row
  descriptors and feeds the RDP X-parameter interface (`rdp_xp_*`);
* the command requesters that carry ROIP requests to the SM (`roip_req_*`).

Two event processor actions come out as ports: the readout trigger and the exposure trigger.
In a full system, IPCU-to-SM commands carry them to the SM.

## System time

`etu_timing` divides the ETU source clock (any multiple of 10 MHz; `ETU_DIV` = f/10 MHz, by
default 4 for 40 MHz) with a modulus counter. Once per ETU the counter makes an enable one
source period wide. `narrow_en_sync` moves that pulse into the system clock domain:

1. A flip-flop clocked by the pulse itself, with D tied high, catches the pulse, however
   short it is.
2. Three destination flip-flops follow it.
3. An edge detector makes a one-cycle `tick`.
4. The second stage clears the catching flop asynchronously.

The 64-bit counter counts ticks, and can be cleared or loaded. A clear or load also restarts
the modulus counter, so the next tick comes a full ETU later. A tick reaches the destination
2–3 destination cycles after the source pulse.

## Exposure sequences

`exposure_ctrl` has three states: IDLE, ARM and RUN.

* **Start.** A start moves it to ARM. RUN begins at once (immediate), on a trigger
  (triggered), or when the ETU time reaches `t0`.
* **Cycles.** In RUN, each cycle lasts `t_repetition` ETU. The exposure output is high for the
  first `t_exposure` ETU of each cycle.
* **End.** After `n_loop` cycles the controller returns to IDLE. `n_loop` = 0 repeats
  forever.
* **Stop.** A stop in ARM returns to IDLE at once. A stop in RUN lets the current cycle finish.
* **Output.** `exp_time_o` keeps the ETU time of the last exposure start. It goes into every
  readout report.

## Readout requests (`readout_ctrl`)

This is the part with the most rules. A request has two parts:

* **Row descriptors** `{width, x0}` on the Xi interface. A rectangular ROI has one descriptor.
  An arbitrary ROI has one descriptor per row. `xi_last` marks the request's last
  descriptor.
* **A mode word** on the mode interface: ROIP id, immediate, persistent, triggered, arbitrary,
  first row, row count, sampling time.

The descriptors go into two identical FIFOs:

* one feeds the SCFW ROI downloads;
* the other feeds the command generator, which sends the descriptors to the IPCU with the
  image.

`XI_DEPTH` = 2048 holds two requests of 1024 arbitrary rows. The mode FIFO holds two
requests. `req_count` counts requests written and not yet sent. The writer must wait while
`req_full_o` is high.

When a request reaches the head of the queue, the controller is ARMED. It then decides in
this order:

| condition | action |
|---|---|
| `clear_i` | drop, flagged *stopped* |
| immediate | take a new sample now |
| triggered | sample on `trigger_i`; without *persistent*, drop as *timeout* once ETU passes the sampling time |
| sampling time = time of the last sample, and that sample is still valid (younger than `sample_hold_i` ETU) | reuse it: no new sample |
| ETU = sampling time | sample now |
| ETU already past the sampling time | sample anyway if *persistent*, else drop as *timeout* |

* **Sample pulse.** In ARMED the pulse goes out in the same cycle that the decision is made,
  if the sensor is not busy. A timed sample therefore hits the requested ETU exactly; the
  end-to-end test checks this. If the sensor is busy, the controller waits for `busy_i` to
  fall.
* **SCFW rectangles.** A rectangular ROI becomes one rectangle (x, y0, width, nrows). An
  arbitrary ROI becomes one single-row rectangle per row, with first/last framing.
* **Segment count.** While writing, the controller adds up the number of 16-pixel segments,
  ceil(w/16) per row.
* **Completion.** The controller counts falling edges of `busy` until it has seen one per
  rectangle. It then pushes a status word: sample and exposure times, mode, segment count,
  stopped/timeout flags.
* **Dropped request.** Its descriptors are flushed from the SCFW-side FIFO, and a status word
  goes out just the same.

## Crossing into the SCFW clock (`syncmodul`)

The SCFW takes ROI parameters and control lines on a fixed 40 MHz clock. The SM logic runs
at 100 MHz. `syncmodul` sits between them and looks like the SCFW to the SM side, only
faster. The image port needs no crossing because the SCFW clocks it from `clk_sm`.

* **ROI parameters** pass through `async_fifo`, a dual-clock FIFO of 8 words. Its pointers
  cross in Gray code through two flip-flops. On the SCFW side a word is written into the
  SCFW port whenever the FIFO holds one and the port is not full. A word arrives 3 to 5
  SCFW cycles after it is written.
* **exposure** (to the SCFW) and **busy** (from the SCFW) are levels. Each passes through a
  two-flip-flop `base_sync`.
* **sample** is a one-cycle pulse at 100 MHz, shorter than a 40 MHz period. It is registered
  once, then carried by the same `narrow_en_sync` used for the time base. The SCFW sees one
  pulse of one cycle, 3 to 4 cycles later.
* **busy hold.** The readout controller counts busy's falling edges and samples only when
  busy is low. The synchronised busy comes late, so `busy_o` is held high from each accepted
  parameter word until the SCFW's busy has been seen. Without this hold, the controller
  could see an idle SCFW while a rectangle is still crossing.

## Commands on the link

Everything on the link is a packet of 64-bit words (QWs), marked with sop and eop:

* The first QW is a header: `{opcode[63:56], id[55:48], 24'b0, length[23:0]}`. `length`
  counts QWs including the header. The length field is 24 bits because a full frame is about
  246 k QWs.
* A CRC QW follows the command: CRC-32, polynomial 0x04C11DB7, register preset to all ones,
  MSB first, no final inversion, in the low 32 bits.

| command | opcode | contents after the header |
|---|---|---|
| ROI_DATA | 0x10 | mode word, sample time, exposure time, image (3 QWs per 192-bit segment, only if the request was not dropped), row descriptors, error word `{SCFW data error, timeout, stopped}` |
| STATUS | 0x02 | `{req_count, readout state, exposure state}`, exposure time |
| ACK | 0x01 | acknowledge word |

The mode word packs `{id, immediate, persistent, triggered, arbitrary, nrows[11:0], y0[10:0],
8'b0, n_seg[20:0]}`.

An ROI_DATA length is 5 + (number of descriptors) + 3·n_seg. The receiver uses this to tell
whether an image is present.

**`smcg`** (SM command generator) builds these commands. Its parts:

* The **image converter** splits each 192-bit segment into three QWs.
* The **error detector** records whether any segment of the image carried the SCFW's
  invalid-data bit.
* The **status converter** turns each status word into three parameter QWs in an *info FIFO*.
  Later it adds the error word, marked *last*. It also puts `{has_image, length}` into a
  *status FIFO*.
* The **core** sends a command as 1–3 header QWs followed by up to four source FIFOs, each
  read up to and including its *last* QW. An ROI_DATA with image reads info, image,
  descriptors and info again. One without image reads info, descriptors and info.
* When idle, the core takes an ACK first, then a STATUS when the exposure state, readout
  state or request count has changed, then an ROI_DATA.
* `data_sent_o` releases the request slot in the readout controller.

**`link_tx`** (link transmitter):

* It buffers QWs in a small FIFO and sends the packet once the requester's `size` is known.
* It appends the CRC QW with eop and acknowledges the requester.
* It stops writing when the link's fill level reaches `HIGH_TH` (240 of 256) and resumes
  below `LOW_TH` (192).

**`link_rx`** (link receiver):

* It takes the length from the first QW and recomputes the CRC.
* It holds the packet's last QW back until the CRC QW has arrived. As a result `cmd_end_o`
  and `crc_error_o` are valid in the same cycle as the read of the last QW.
* On a length error it pulses every error flag, drops what it holds, and discards the rest of
  an over-long packet.

## IPCU processing

**`ipcu_cmd_decoder`**:

* **ROI_DATA.** From the three parameter QWs it rebuilds the readout mode. If the command
  carries an image, it hands the mode to the RDP and then streams the image QWs into it,
  with back-pressure.
* **STATUS and ACK** update host-side outputs.
* **Every ROI** produces a report with its id, times and error bits.
* **Errors.** It counts CRC errors (the command is still decoded), length errors (the
  command is abandoned) and unknown opcodes.

**`rdp`** (ROI data processor) handles one ROI at a time:

1. `rdp_idc` rebuilds 192-bit segments from the QWs.
2. `rdp_sroi_select` picks the sub-ROI for the ROIP id. The lowest matching table entry wins.
   With no match the whole ROI counts.
3. `rdp_pixel_hit` walks the ROI row by row, using the row descriptors from the X-parameter
   interface. For each segment it makes a 16-bit mask of pixels that are inside both the row
   and the sub-ROI. Pixels beyond the row width are never counted.
4. `rdp_ch16_proc` keeps a minimum, maximum and sum in each of 16 channels.
5. The result unit reduces the 16 channels with trees and compares each result with the
   ROIP's thresholds (strictly greater). It then outputs `{id, min, max, sum, min_hit,
   max_hit, sum_hit}` for one cycle.

An ROI with no pixel in its sub-ROI reports min 4095, max 0 and sum 0.

**`event_processor`** is built in three stages:

* **Input stages.** Each of `N_EVENTS` events has `N_IN` input stages. Each stage chooses one
  of:
  * a host register bit;
  * one RDP threshold bit for a reference ROIP;
  * an external pin or another event's state, used as a level (control), set on a chosen
    edge, or toggled on it;
  * "ETU time has reached a reference".
* **Event stage.** The inputs are negated as chosen, ANDed, and the result is negated as
  chosen. The result becomes the event state only after it has been stable for `delay` ETU.
  The state is XORed with `N_ACT` invert bits to give the action bits.
* **Action stage.** Each action picks one event and one of its action bits, and has an enable.
  The actions are:

  | action | behaviour |
  |---|---|
  | ROIP activate / deactivate, set mode | once only, re-armed by `clr_i` |
  | ROIP activate / deactivate, control mode | one bit drives activate on its rising edge and deactivate on its falling edge |
  | readout trigger, exposure trigger, host interrupt | one-cycle pulses |
  | output pins | follow the bit (level) or toggle on its rising edge |

With delay 0, the latency to an action is 3 cycles from a host bit, 4 from an RDP result,
and 6 from an external pin (2 of which are the pin synchroniser).

## ROIP cores (`roip_gen`)

A Region Of Interest Process (ROIP) is the host's standing order for a series of readouts of
one ROI. The top holds one `roip_gen` per ROIP id. The event processor's ROIP actions or the
host activate and deactivate it. An active core turns the ROIP's timing description into
single readout requests:

* Readout k has sampling time `t_start + k·T_period`. There are `N_loop` readouts, or an
  endless series when `N_loop` is 0.
* **Normal ROIP.** Request k is launched `T_PRELOAD` ETU before its sampling time. The SM
  then waits for the sampling time.
* **Immediate ROIP.** The first request is launched at `t_start − T_PRELOAD`. The rest
  follow as fast as the receiver takes them, and the SM samples each at once.
* **Late requests.** A request is late once the ETU time has reached its sampling time.
  * A normal, non-persistent ROIP discards late requests and counts them. It launches the
    first one still in the future.
  * An immediate, non-persistent ROIP whose first request is late cancels the whole run.
  * A persistent ROIP launches every request.
* Each request carries the ROIP id, the sampling time and the immediate, persistent and
  triggered flags. It leaves through a valid/ready handshake. The ROI's shape is added
  downstream from the descriptor memory.

`T_PRELOAD` (default 1000 ETU = 100 µs) is a parameter of this design. A core ignores
activation until its `defined` bit is set.

## Throughput

* **SM link.** The SM data path moves one QW per 100 MHz cycle, i.e. 100 M QW/s. A full
  1280×1024 frame is 245,766 QWs, so 400 frames/s needs 98.3 M QW/s and fits. The sensor's
  own maximum of 450 frames/s does not: the link caps full frames at about 406 frames/s.
* **IPCU.** The IPCU side runs at 125 MHz. The RDP accepts a QW per cycle, and its pixel-hit
  stage handles a segment every second cycle. That is about 41.7 M segments/s against the
  32.8 M/s needed at 400 full frames/s.

## Where this design makes its own choices

* **Command formats.** The opcodes, the field positions, the 24-bit length, the CRC
  conventions and the STATUS/ACK contents are all this design's own.
* **End flag timing.** `cmd_end_o` of the link receiver is high *during* the read of the last
  QW, not one cycle after.
* **ETU source.** The time base divides a known source clock with a modulus counter. There is
  no run-time-programmable PLL.
* **Descriptor path to the RDP.** An ROI_DATA command carries its row descriptors after the
  image. The RDP needs them before the image, so it takes them from the IPCU's own
  descriptor memory through a port.
* **Immediate requests.** The SM always samples an immediate request. Cancelling the run
  of an immediate, non-persistent ROIP that starts late is done in `roip_gen`, before any
  request leaves.
* **ROIP timing.** `T_PRELOAD`, `N_loop = 0` meaning endless, and the handshake are this
  design's. The trigger mode is said to change the preload, but not how; here it does not
  change it.
* **Event processor.** Its sizes (8 events, 4 inputs, 4 actions, 8 external inputs, 16 ROIPs,
  4 pins) and pulse shapes are assumptions, as are the sub-ROI table size (8) and the
  threshold table size (16).
* **Not built.** The operational and service register commands of the command generator are
  not implemented.

## Simulating

Every block has a testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. Example with
Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb \
  rtl/edicam_pkg.sv rtl/*.sv tb/scfw_model.sv tb/tb_edicam_top.sv \
  --top-module tb_edicam_top -o vtb --Mdir obj && obj/vtb
```

(`rtl/edicam_pkg.sv` must come first; listing it twice is harmless.)

`tb_edicam_top` runs the whole design at its default parameters. Its models and stimulus:

* a behavioural SCFW (`scfw_model`, pixel value `(3·col + 5·row + 1) mod 4096`), with its
  control side on a 40 MHz clock and its image side on `clk_sm`;
* the link as a FIFO, which can be held to build back-pressure, and which corrupts one STATUS
  packet;
* the readout trigger action looped back to the SM.

It checks every RDP result against values it computes itself. It requires each of these to
happen at least once: an exposure sequence, STATUS mirroring, immediate, triggered, timed,
arbitrary and timed-out readouts, a full request queue, a link stall, a detected CRC error,
an acknowledge, event actions, timed ROIP requests (each checked to leave 1000 ETU before
its sampling time) and a cancelled late ROIP run. It runs in about a second.

The unit testbenches add the following:

* `tb_readout_ctrl`: the decision table.
* `tb_exposure_ctrl`: a two-exposure scenario with times scaled down by 10⁵.
* `tb_etu_timing`: one tick per 100 ns from a 40 MHz source into 100 MHz.
* `tb_narrow_en_sync`: pulse width and latency.
* `tb_roip_gen`: the launch time of each request, discarding, cancelling, persistence,
  back-pressure, endless runs and deactivation.
* `tb_syncmodul`: ordering under SCFW back-pressure, FIFO full, and the latencies of
  parameters, sample, exposure and busy between 100 MHz and 40 MHz.
* `tb_link_tx` / `tb_link_rx`: CRC against an independent bit-serial model, hysteresis and
  length errors.
* `tb_rdp`: sub-ROI masking and no image stalls.
* `tb_event_processor`: every channel and action, with their cycle latencies.
* `tb_ipcu_cmd_decoder`: all command kinds and error paths.

## Known limits

* The IPCU-to-SM command path is not built. Requests, exposure parameters and triggers enter
  the SM as ports.
* After a length error in the middle of an ROI_DATA, the RDP would wait for image data that
  never comes. No recovery path is built.
* The two `etu_timing` copies are independent. Their alignment (a common clear or load) is
  left to the system.
