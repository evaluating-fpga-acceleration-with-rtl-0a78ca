# VeLo mask-clustering accelerator

This is synthesizable SystemVerilog for a pixel-clustering engine for the LHCb
Vertex Locator (VeLo). It clusters pre-selected candidate pixels in VeLo raw data
and writes each cluster's size and mean position back to host memory. The
structure is a chain of small kernels joined by FIFO pipes. A loader streams
events from host memory. Two distributors spread the raw banks over N parallel
clustering workers. A collector merges the workers' results. A writer returns
them to the host. A central barrier keeps all kernels on the same event. The
architecture follows the multi-kernel FPGA design described in *Evaluating FPGA
Acceleration with Intel oneAPI Toolkit for High-Speed Data Processing* (Perro,
Durante, Pisani, Xochelli). That work was written in SYCL for an Agilex 7 card.
This code is an independent RTL rendering of its block diagram and algorithm.
Every data format, width, handshake and timing detail below is this design's
own choice unless stated otherwise.

## The detector data

- A VeLo sensor is three 256 x 256 pixel chips side by side, so
  768 pixel columns by 256 pixel rows. An event has 208 sensors. Each sensor
  sends one *raw bank*.
- Pixels are read out in **SuperPixels (SPs)** of 8 pixels: 2 columns by
  4 rows. Only SPs with at least one hit are sent. A sensor therefore has
  384 x 64 SP positions.
- An **SP word** (32 bits, `velo_pkg::sp_word_t`) holds the SP column in
  [22:14], the SP row in [13:8] and the 8-bit hitmap in [7:0]. Hitmap bit
  `k` is pixel column `2*sp_col + k/4` and pixel row `4*sp_row + k%4`.
  Bit 31 (no-neighbour flag) is carried but not used. This layout is the
  LHCb VeLo raw format.
- A **candidate** (`cand_word_t`) is one active pixel, given as a pixel
  column [17:8] and a pixel row [7:0]. A preprocessing step outside this
  design picks it as a likely cluster seed.

### Host memory layout (input)

Events lie back to back from `src_base`, in 32-bit words:

```
event header      : N = number of words in the event body
per raw bank      : SP header (bank_hdr_t: bank_id[31:24], count[15:0] = n_sp)
                    n_sp SP words
                    candidate header (same format, count = n_cand)
                    n_cand candidate words
```

Empty banks (`n_sp = 0`) and banks without candidates (`n_cand = 0`) are
allowed. The whole region is read strictly in order by one reader. On an FPGA
that keeps host access to a single sequential stream.

### Host memory layout (output)

Starting at `dst_base`, in 64-bit words, each event writes:

- one `cluster_t` record per candidate. Bit 63 = 0, then `bank_id`,
  `size` (pixels), `col_fx` (mean pixel column, 10.4 fixed point) and
  `row_fx` (mean pixel row, 8.4 fixed point).
- one `trailer_t` word. Bit 63 = 1, then the event index and the number of
  records that came before it.

Within an event, records from different workers are interleaved in no fixed
order. A record never crosses its event's trailer.

## Mask clustering (inside `mask_cluster_worker`)

This is the core of the design and the part most worth reading closely.

**SP memory.** Each worker owns a 24,576-byte memory, one byte per SP position
of a sensor, addressed by `{sp_col, sp_row}`. While a raw bank arrives, each SP
word writes its hitmap into this memory. The address also goes into a clear
list of `MAX_SP_PER_BANK` entries. When all of the bank's candidates are done,
only the listed addresses are written back to zero. This costs one cycle per
SP, not 24,576. If a bank has more SPs than the list holds, the worker sets an
overflow flag and sweeps the whole memory instead. After reset the memory is
also swept once (24,576 cycles). Input that arrives meanwhile waits in the
pipes.

**The map.** For a candidate in SP `(c, r)`, the worker reads the 3 x 4 SPs
at SP columns `c-1..c+1` and SP rows `r-1..r+2`. The candidate SP sits at
position (1, 1) of that grid. The result is a 96-bit map of 6 pixel columns by
16 pixel rows. Bit index = `pixel_col*16 + pixel_row`, both inside the map.
One SP is read per cycle. SPs outside the sensor read as empty.

**Growing the cluster.** The cluster starts as the candidate pixel alone. Each
cycle the worker builds a mask: the cluster ORed with its eight one-pixel
shifts.

```
up = cluster & ~row15      dn = cluster & ~row0
mask = cluster | up<<1 | dn>>1 | cluster<<16 | cluster>>16
             | up<<17 | dn<<15 | up>>15 | dn>>17
cluster' = mask & (map | seed)
```

The row masks keep a shift from wrapping from the top of one column into the
next. Shifts by 16 move whole columns and drop out at the map's ends. The
result is 8-connected growth. The worker stops when `cluster' == cluster`. That
takes `g + 1` cycles, where `g` is the number of steps that added pixels (at
most about 15 within 6 x 16). Growth never leaves the 96-pixel map, so a
cluster larger than the map is cut at its edge.

**Size and position.** An adder tree counts the cluster's pixels (`size`, at
most 96) and sums their in-map columns and rows. A restoring divider divides
both sums, shifted left by 4, by `size`. It makes one quotient bit per cycle,
15 cycles in all. The map origin is then added to give sensor coordinates. The
quotient is truncated, not rounded.

**Timing.** A candidate's record is ready `30 + g` cycles after the worker
takes the candidate: 12 SP reads, 1 cycle to place the last SP, `g + 1` mask
steps, 15 divide steps, then the handshake. The next candidate is taken one
cycle after the record leaves. Each bank also costs one cycle per SP word to
load and one per SP to clear.

**Duplicates.** Each candidate yields one record. If two candidates of the
same cluster are supplied, the cluster is reported twice. Avoiding that is up
to the candidate selection.

## The kernel pipeline (`velo_cluster_accel`)

```
            +--> bank pipe --> banks_distributor ------+--> bank pipe[w] --+
loader -----+                                          |                   +--> worker[w] --> result pipe[w] --+
            +--> cand pipe --> candidates_distributor -+--> cand pipe[w] --+                                   |
                                                                                                               v
 host write port <-- result_writer <-- pipe <-- clusters_collector <-- result pipes of all workers <-----------+
 sync_arbiter: done from loader, every worker, writer  -->  rel (release) to all of them
```

- **`banks_candidates_loader`** (producer). It issues sequential reads and keeps
  at most `RD_DEPTH` reads in flight or buffered. Its response FIFO can
  therefore never overflow, and the read port never has to refuse data. It
  parses the stream: SP headers and SP words go to the bank pipe, candidate
  headers and candidate words go to the candidate pipe. After the event body
  it sends an end-of-event item on both pipes and reports completion.
- **`banks_distributor`**. Bank `k` of an event goes to worker
  `k mod N_WORKERS`. A header selects the worker, and the words that follow
  go to the same worker. The end-of-event item is broadcast to every worker,
  one worker per cycle. The round-robin restarts at worker 0 for each event.
- **`candidates_distributor`** counts banks the same way. Each bank's
  candidates therefore reach the worker that holds its SPs. The two
  distributors share no signal: they agree because both count headers and
  both restart at each event. The end-of-event item stops here.
- **`clusters_collector`** serves the workers in round-robin order, one record
  per cycle. When a worker sends its end-of-event record, the collector stops
  serving it. Once every worker has sent one, the collector emits a single
  end-of-event record.
- **`result_writer`** (consumer) writes the records and the event trailer.
  In discard mode it takes the same records, one per cycle, counts them and
  takes part in the barrier, but never writes. This is meant for measuring
  the pipeline without the cost of host writes.
- **`pipe_fifo`** is every arrow above. It is a blocking FIFO with valid/ready
  on both sides and a type parameter for the payload. Its depth is set per
  pipe.

## Event synchronization (`sync_arbiter`)

The arbiter is a central barrier with one pending flag per participant. The
participants are the loader, each worker and the writer. A participant finishes
its share of an event, pulses `done` and then waits:

- the loader waits once the event is read;
- a worker waits once the end-of-event item arrives after its last bank;
- the writer waits once the trailer is written.

When all `N_WORKERS + 2` flags are set, the arbiter pulses `rel` for one cycle
and clears the flags. Every waiting kernel then moves on to the next event. An
assertion flags any participant that reports twice for one event. Because of
the barrier, the next event's data cannot enter the workers before the current
event's results are written. This costs the pipeline drain time at every event
boundary. In return, event boundaries are trivially correct.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `N_WORKERS` | 16 | top, distributors, collector, arbiter | clustering workers (16 is the fastest configuration reported for the original design; 4 and 8 were also measured) |
| `MAX_SP_PER_BANK` | 1024 | top, worker | clear-list length; larger banks fall back to a full sweep |
| `RD_DEPTH` | 16 | top, loader | reads in flight / response FIFO depth |
| `SRC_PIPE_DEPTH` | 16 | top | loader to distributor pipes |
| `BANK_PIPE_DEPTH`, `CAND_PIPE_DEPTH` | 64, 32 | top | per-worker input pipes |
| `RES_PIPE_DEPTH`, `OUT_PIPE_DEPTH` | 16, 16 | top | per-worker result pipes, collector to writer |
| `FRAC_BITS` | 4 | `velo_pkg` | fraction bits of the mean positions |

At the defaults, memory is 16 x 24,576 bytes of SP memory plus 16 clear lists
of 1,024 x 15 bits. That is about 3.4 Mbit.

## Interface and operation

Hold `rst_n` low, then release it. Pulse `start` for one cycle with
`src_base`, `dst_base`, `n_events` and `discard_results` valid. `busy` stays high until the last
event has been released. `events_done` counts released events.

- **Read port.** `rd_req_valid`/`rd_req_ready`/`rd_addr` issue a request.
  Data returns on `rd_resp_valid`/`rd_resp_data` in order, with any latency.
- **Write port.** `wr_valid`/`wr_ready`/`wr_addr`/`wr_data` is a plain
  valid/ready write of one 64-bit word.

- **`discard_results`.** When this is high, results are counted and events
  are completed, but nothing is written. Change it only between batches.

All resets are asynchronous and active low.

## Departures and limits

- **Read bandwidth.** The read port moves one 32-bit word per cycle. The
  original design was measured at up to about 45 Gbit/s of input. Matching
  that would take a wider port and a loader that unpacks several words per
  cycle, which is not done here. The scaling test below shows the limit.
  Going from 8 to 16 workers gains only 1.2x here, because 16 workers already
  empty the input faster than one word per cycle arrives.
- **Comparing event rates.** The event rates reported for the original
  (37.5 / 71.4 / 107.9 kHz for 4 / 8 / 16 workers) depend on a clock frequency
  and hit occupancy that are not known. This RTL's rate cannot be compared
  with them directly. What can be compared is the scaling. The original gains
  1.90x from 4 to 8 workers and 2.88x from 4 to 16. This design gains 1.96x
  and 2.35x on the workload of `tb_worker_scaling`.
- **Choices made here.** The host interfaces and the memory layout are this
  design's. So are the per-sensor SP memory and clear list, the fixed-point
  averages, the end-of-event items, and the pulse-and-flag barrier (the
  original uses pipes to the arbiter).
- **Not built.**
  - Host memory and the PCIe DMA engine, which sit behind the two ports.
  - The candidate preselection. The candidates must already be in host
    memory, next to their banks.

## Files

- `rtl/velo_pkg.sv` – geometry constants and the word formats.
- `rtl/pipe_fifo.sv`, `rtl/banks_candidates_loader.sv`,
  `rtl/banks_distributor.sv`, `rtl/candidates_distributor.sv`,
  `rtl/mask_cluster_worker.sv`, `rtl/clusters_collector.sv`,
  `rtl/result_writer.sv`, `rtl/sync_arbiter.sv` – the kernels.
- `rtl/velo_cluster_accel.sv` – the top level.
- `tb/velo_ref_pkg.sv` – the reference model. It finds clusters by plain flood
  fill over the same 6 x 16 window and computes averages directly from sensor
  coordinates. It shares only the data formats with the RTL.
- `tb/host_mem_model.sv` – host memory with fixed read latency and random
  stalls on both ports.
- `tb/tb_<module>.sv` – a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_velo_cluster_accel` runs the top at its default parameters. It runs three
events of 208 random banks and checks every record and trailer. It also counts
how often each mechanism occurred and fails if one never did:

- round-robin wrap;
- pipe back-pressure;
- read and write stalls;
- the barrier holding the loader;
- clear-list overflow;
- fetches outside the sensor;
- collector contention;
- empty banks and banks without candidates;
- discard mode: event 0 is run again with results dropped. The test checks
  that nothing is written and that the event still completes.

`tb_worker_scaling` runs three copies of the top side by side, with 4, 8 and
16 workers (`tb/scaling_lane.sv` wraps one copy with its own host memory). Each
copy processes the same 100 generated events. Every event has 208 banks with
15 clusters each, which is about 12,600 input words per event. The test checks
every record and reports the cycles per event:

| workers | cycles per event | speed-up over 4 workers |
|---|---|---|
| 4  | 30,794 | 1.00 |
| 8  | 15,673 | 1.96 |
| 16 | 13,115 | 2.35 |

With 16 workers the rate is close to the one-word-per-cycle read port. The
test then runs the same batch again in discard mode. It checks that nothing
is written and that every event is still released. It also checks that the
cycle count stays within 2% of the writing run. With a write port that never
stalls, the two counts are identical. The whole test builds and runs in
under two minutes.

`tb_mask_cluster_worker` also checks the 30-cycle latency of a one-pixel
cluster.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/velo_pkg.sv tb/velo_ref_pkg.sv tb/tb_velo_cluster_accel.sv \
  --top-module tb_velo_cluster_accel
./obj_dir/Vtb_velo_cluster_accel +verilator+rand+reset+2
```

The other testbenches work the same way. Replace the testbench file and top
name, and add `tb/velo_ref_pkg.sv` or `tb/host_mem_model.sv` where the
testbench uses them. The full test builds in about 15 s and runs in under 1 s.
