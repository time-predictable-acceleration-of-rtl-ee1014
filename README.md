# Predictable DNN inference on an FPGA SoC: instruction relocation and bus profiling around a closed DPU

A DNN accelerator such as the Xilinx DPU on a Zynq UltraScale+ is a closed
block. It has a 32-bit instruction-fetch port (M_INS), a 128-bit data port
(M_DATA), a configuration port (S) and an interrupt. Both manager ports reach
the same DRAM controller through the processing system (PS). Inside one
inference job, instruction fetches and data reads therefore delay each other
at the DRAM. That interference is what makes a worst-case bound on inference
time loose.

This RTL is the programmable-logic glue that addresses the problem without
touching the accelerator. It has two parts.

* **DICTAT** (DPU Instruction Dump - Address Translator) sits in the M_INS
  path. It can record the instruction stream of one job. It can then
  redirect every later instruction fetch to a copy of that stream in the
  256 KB on-chip memory (OCM). Instruction reads then use the OCM and data
  reads use the DRAM, so the two no longer share a memory.
* **The bus profiler** watches all of the accelerator's ports, clock by
  clock, without driving any of them. It reports:
  * what one job did on the bus;
  * how long each phase lasted;
  * how far the phases overlapped.

  These are the numbers a response-time model of the accelerator is built
  from, and against which it is checked.

`dpu_pl_top` wires both parts around the accelerator's ports:

```
 DPU M_INS  ──► DICTAT ─────────────► FPGA→PS port   (ps_ins_*)   ─► DRAM or OCM
 DPU M_DATA ────────────────────────► FPGA→PS port   (ps_dat_*)   ─► DRAM
 PS→FPGA    ────────────────────────► DPU S          (dpu_s_*)
 DPU irq    ────────────────────────► PS             (irq_to_ps)
 hw_profiler observes M_INS, M_DATA, the PS side of S, and the interrupt
```

Everything else is outside this RTL, and the top brings its signals out as
ports:

* the accelerator itself;
* the PS interconnect, DRAM controller and OCM;
* the ARM cores that run the driver;
* the vendor logic analyser used during bring-up.

## How the instruction relocation works

Software chooses a mode with DICTAT's CTRL register. Writing CTRL also
restarts both engines.

| mode | CTRL[1:0] | what happens on M_INS |
|---|---|---|
| BYPASS | 0 (also 3) | Everything passes through untouched. |
| DUMP | 1 | Reads pass through. Each instruction word returned to the DPU is also copied, in fetch order, to a contiguous DRAM buffer at `DUMP_HI:DUMP_LO`. |
| XLATE | 2 | Each read address is replaced by `OCM_base + offset`. `offset` is the number of bytes this job has fetched so far. |

Use it in three steps.

1. **Dump once per network.**
   * The driver scatters the instructions over several small DRAM buffers,
     so they cannot simply be copied from memory.
   * Run one job in DUMP mode instead. DICTAT records exactly what the DPU
     fetches, in the order it fetches it. The dump engine (`dictat_dumper`)
     puts the words through a FIFO and writes them as 16-beat AXI bursts on
     the write channels of the same FPGA→PS port. The last burst may be
     shorter.
   * The DPU interrupt ends the dump. STATUS[0] reads 1 once the last write
     response has arrived.
2. **Copy the buffer into the OCM.** This is software, and it can overlap
   with configuring the DPU for the next job.
3. **Run in XLATE mode.**
   * The instruction stream of a network is the same for every input image.
   * The n-th byte fetched in a job is therefore the n-th byte of the OCM
     copy.
   * The offset returns to 0 on each interrupt rising edge, so every job
     starts at the beginning of the copy.

Timing and transparency:

* The AR and R channels go through as wires. The only logic on the AR path
  is the adder that forms the translated address, so no fetch gets a cycle
  of extra latency.
* DICTAT holds the R channel in one case only: DUMP mode, when its FIFO is
  full because DRAM writes are slow. The copy then stays complete, at the
  cost of a slower dump job. Dumping is a one-time setup step.
* Bursts of any AXI length and size are supported. The offset advances by
  `(ARLEN+1) << ARSIZE` per accepted request.
* A request that would run past `OCM_BYTES` sets the sticky
  `STATUS[1]` overflow flag. The address is still issued.

Of the six networks below, Lane Detect's stream (275 KB) does not fit the
256 KB OCM. The other five do.

DICTAT registers. Word index × 4 gives the byte offset on `dictat_cfg_*`.

| idx | name | meaning |
|---|---|---|
| 0 | CTRL | [1:0] mode; any write restarts the dump and the translation |
| 1, 2 | DUMP_LO/HI | DRAM address of the dump buffer |
| 3, 4 | OCM_LO/HI | address of the OCM copy |
| 5 | STATUS | [0] dump done, [1] OCM overflow, [2] dump busy |
| 6 | DUMP_WORDS | instruction words sniffed |
| 7 | WR_WORDS | instruction words written to DRAM |
| 8 | XLATE_CNT | read requests redirected |

## What the profiler measures

Each manager port has one `axi_port_monitor`. It counts the following from
the handshakes alone:

* address handshakes (transactions) and data beats (words);
* the number of transactions in flight, and its maximum;
* the shortest and longest burst;
* the longest read latency and the longest write latency (see below).

A read is in flight from its AR handshake to its RLAST beat. A write is in
flight from its AW handshake to its B response.

The monitor also defines when a phase is active:

* **read phase** of a port: a read request is pending or a read is in flight;
* **write phase**: AW or W is valid, or a write is in flight.

On top of the two monitors, `hw_profiler` runs a small per-job state machine:

```
IDLE --arm--> ARMED --first AR/AW on M_INS or M_DATA--> RUNNING --irq rising edge--> DONE
```

While RUNNING it counts:

* `TOTAL`: cycles from the first request of the job to the interrupt. This
  is the inference time.
* `ELAB`: cycles in which no phase is active. The DPU is computing on data
  it already holds.
* Three overlap counters, one for each pair of phases that the DPU runs in
  parallel:
  * instruction read with data read;
  * data write with data read;
  * instruction read with data write.
* `S_TRANS`: handshakes on the configuration port during the job. This
  shows whether the software talks to the DPU mid-job. It should not.

Each port's transactions, words, active cycles, maximum outstanding counts,
burst range and latencies are also readable.

**Job history.** The inference time of a network varies a little from image
to image. To see that spread over a long run without reading every job,
the profiler keeps a history. At each job end, five per-job times update a
running minimum, maximum and 64-bit sum:

* the instruction-read phase;
* the data-read phase;
* the data-write phase;
* elaboration;
* the total.

`JOBS` counts the jobs in the history, so the average is sum / JOBS.
Arming leaves the history alone. CTRL[2] clears it.

**Latency measurement.** A response-time bound needs the worst service time
of the memory behind each port. The monitor measures two latencies:

* **read:** from a read's address handshake to the first cycle its first
  data beat is presented;
* **write:** from the handshake of the beat carrying WLAST to the first
  cycle the write response is presented.

The latency is the number of clock edges between the two events. A response
driven from a register one cycle after it becomes due therefore counts that
cycle.

How the matching works:

* Request times go into a 16-entry timestamp FIFO per direction. They are
  paired with responses in request order, which is how the DPU's memory
  path serves them.
* A beat or response held by a low READY is timed once, at its first
  cycle.
* If more requests are in flight than the FIFO holds, timing of that
  direction pauses. It resumes once the port has drained, so a pairing
  error is never possible.

The numbers include queueing behind earlier bursts of the same port. Under
the DPU's long data bursts the data-port read maximum is therefore much
larger than the memory's own latency.

Arming clears the counters. The interrupt freezes them, so software reads a
consistent snapshot after each job. `prof_done` is high in DONE.

Profiler registers. Word index × 4 gives the byte offset on `prof_cfg_*`.

| idx | name | idx | name |
|---|---|---|---|
| 0 | CTRL (W: [0] arm, [1] disarm, [2] clear history; R: state) | 11 | INS_OUTS ([15:8] max wr, [7:0] max rd) |
| 1 | JOBS (jobs in the history) | 12 | INS_RD_BLEN ([24:16] max, [8:0] min) |
| 2 | TOTAL | 13 | DAT_RD_TRANS |
| 3 | ELAB | 14 | DAT_RD_WORDS |
| 4 | OVL_INS_RD | 15 | DAT_RD_ACTIVE |
| 5 | OVL_WR_RD | 16 | DAT_WR_TRANS |
| 6 | OVL_INS_WR | 17 | DAT_WR_WORDS |
| 7 | S_TRANS | 18 | DAT_WR_ACTIVE |
| 8 | INS_RD_TRANS | 19 | DAT_OUTS |
| 9 | INS_RD_WORDS | 20 | DAT_RD_BLEN |
| 10 | INS_RD_ACTIVE | 21 | DAT_WR_BLEN |
| 22 | INS_LAT ([31:16] max write, [15:0] max read latency) | 23 | DAT_LAT (same layout) |

History registers, for k = 0 to 4:

* **Index `24 + 4k`:** minimum.
* **Index `24 + 4k + 1`:** maximum.
* **Index `24 + 4k + 2`:** sum, low word.
* **Index `24 + 4k + 3`:** sum, high word.

k selects the time: 0 instruction read, 1 data read, 2 data write,
3 elaboration, 4 total.

Counters are 32 bits. At 330 MHz they last 13 s, far longer than any job
here, which takes under 10 ms. Outstanding counts are 8 bits. Burst
lengths are 9 bits, enough for 1..256. Latencies are 16 bits.

## The accelerator's behaviour that the design and its tests assume

The testbenches drive the ports with a behavioural DPU (`tb/dpu_traffic_model.sv`).
It reproduces the structure measured on the real accelerator:

* **Port behaviour:**
  * M_INS fetches 4-beat, 32-bit bursts, with up to 2 outstanding.
  * M_DATA reads and writes 128-bit bursts of 1 to 256 beats, with up to
    14 reads and 7 writes outstanding.
* **Phase structure:** the data-read phase runs in parallel with the
  instruction-read phase. The data-write phase follows the instruction-read
  phase. An elaboration phase follows, then a short interrupt pulse.
* **Instruction buffers:** the instructions sit in 4 separate DRAM buffers,
  which is the case DICTAT's dump exists for.

Per-job traffic used in the tests:

| network | instr. reads | instr. words | data reads | data words | data writes | data words written |
|---|---|---|---|---|---|---|
| Lane Detect (VpgNet) | 17186 | 68744 | 91939 | 1179184 | 48314 | 424350 |
| Plate Detect | 2347 | 9388 | 7607 | 83027 | 246 | 16960 |
| Plate Num | 9872 | 39488 | 53327 | 579962 | 6075 | 48908 |
| Object Detect (Yolov3) | 16060 | 64240 | 84410 | 1011665 | 25457 | 540416 |
| Object Detect (SSD) | 9920 | 39680 | 68943 | 725208 | 4705 | 554510 |
| Pedestrian Detect (SSD) | 11655 | 46620 | 56597 | 639932 | 5505 | 506096 |

The memory models have these latencies:

* 40 cycles for a read;
* 30 cycles from the last write beat to the write response.

These are the worst cases observed on the platform's DRAM controller and
OCM. The models register their responses, so a response becomes visible one
edge after it is due. The profiler therefore reads a write latency of 31.

## Where this RTL departs from the original system, and what is its own choice

* **Register maps, counter widths and the profiler's start condition** are
  this design's own. So is the exact definition of "active". The original
  hardware's registers are not published.
* **The dump engine:**
  * The FIFO depth is 32 and the burst length is 16.
  * The "hold R when the FIFO is full" policy is this design's choice. It
    trades dump-job speed for a complete copy.
* **The overflow flag** is an addition. The original only requires the
  stream to fit.
* **Translation is sequential.** It assumes each job fetches the same
  instruction stream in the same order. That was observed on the real
  accelerator, but nothing in hardware checks it. A job whose fetch order
  differed from the dump would read wrong instructions.
* **The data port is modelled as one AXI port.** The accelerator's data
  side is one logical port. Where it is built from more than one physical
  AXI port, instantiate one more monitor per extra port.
* **Port widths:**
  * Address is 40 bits and ID is 6 bits.
  * Instruction and data words are 32 and 128 bits. These follow from the
    measured traffic: 68744 instruction words are 275 KB, and 1179184 data
    words are 18 MB.

## Files

Every file starts with a comment on its function, interface and timing.

**rtl/**

| file | contents |
|---|---|
| `dpu_pl_pkg.sv` | shared types: mode and state enums, register indices, per-port statistics struct |
| `dpu_pl_top.sv` | top level |
| `dictat.sv` | DICTAT: mode register, R-channel hold, interrupt edge |
| `dictat_addr_xlate.sv` | combinational address translation, offset and overflow |
| `dictat_dumper.sv` | FIFO and AXI write engine of the dump |
| `hw_profiler.sv` | job state machine, phase, overlap and S-port counters, job history |
| `axi_port_monitor.sv` | statistics and latency timing of one AXI manager port |
| `axil_regfile.sv` | AXI4-Lite register front end shared by both |
| `sync_fifo.sv` | fall-through FIFO |

**tb/**

| file | contents |
|---|---|
| `tb_<block>.sv` | one self-checking testbench per block |
| `tb_dpu_pl_top.sv` | end to end at default parameters: Plate Detect traffic through stock, dump, OCM-copy and OCM jobs, plus a Lane Detect-sized job that overflows; stalls the dump on purpose, checks every profiler register, every fetched instruction word and the dump buffer, and counts each mechanism |
| `tb_workloads.sv` | all six networks at full size (described below) |
| `dpu_traffic_model.sv`, `axi_mem_model.sv`, `axil_driver.sv`, `tb_pkg.sv` | behavioural DPU, AXI memory, register driver, memory contents |

`tb_workloads.sv` checks, for each network:

* the profiler's counts against the table, and its latencies against the
  memory models;
* the measured inference time against an analytical upper bound. The bound
  is built from per-transaction costs:
  * 1 cycle per address phase;
  * the memory latency;
  * 1 cycle per read beat, 2 per write beat;
  * 1 cycle per write response;
  * a DRAM interference term between instruction and data reads.

  The OCM version of the bound drops the interference term and must come
  out smaller.
* For the five networks that fit: the dump, the OCM copy and the relocated
  job.
* For Lane Detect: the overflow.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. Each has a
cycle watchdog.

## Simulating

The package must come first on the command line. Example for the full
system:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dpu_pl_pkg.sv tb/tb_pkg.sv \
  rtl/sync_fifo.sv rtl/axil_regfile.sv rtl/axi_port_monitor.sv \
  rtl/dictat_addr_xlate.sv rtl/dictat_dumper.sv rtl/dictat.sv \
  rtl/hw_profiler.sv rtl/dpu_pl_top.sv \
  tb/axi_mem_model.sv tb/axil_driver.sv tb/dpu_traffic_model.sv \
  tb/tb_dpu_pl_top.sv --top-module tb_dpu_pl_top -Mdir obj -o sim
./obj/sim
```

Run times on these testbenches:

* `tb_dpu_pl_top`: about 1 s.
* `tb_workloads` (same file list, different top): about 20 s. It simulates
  about 10 million cycles.
* Block testbenches: well under a second each. They need only their block's
  files and the package.

Some testbenches set block parameters, for example a small OCM or a short
dump burst. This keeps corner cases such as overflow and the tail burst
short. The top-level and workload tests use the defaults throughout.

## Changing it

* **OCM size:** `OCM_BYTES` on the top (default 262144).
* **Dump burst and FIFO:** `DUMP_BURST` and `FIFO_DEPTH`.
  * `FIFO_DEPTH` must be at least `DUMP_BURST`.
  * A deeper FIFO reduces how often the DPU is held during a dump.
* **Port widths:** `INS_DW`, `DAT_DW`, `ADDR_W`, `ID_W`.
* **Latency FIFO depth:** `LAT_DEPTH` in `dpu_pl_pkg`. It must exceed the
  largest number of transactions a port keeps in flight, or timing pauses
  often.
* **New profiler register:** add its index to `dpu_pl_pkg` and raise
  `PROF_NREGS`. The register front end sizes itself from that.
