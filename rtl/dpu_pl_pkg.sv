// Shared types and constants of the DPU-side programmable-logic helpers:
// the DICTAT instruction dump / address translator and the bus profiler.
//
// The profiler statistics of one AXI manager port travel as one packed
// struct; the register maps of both blocks are listed here as word indices
// (byte offset = index * 4 on their AXI4-Lite configuration ports).
// Word sizes follow from the per-job traffic figures of the target DPU:
// instruction words are 32-bit and data words 128-bit. Register layouts,
// counter widths and mode encodings are this design's own choices.
package dpu_pl_pkg;

  // Width of every event and cycle counter.
  localparam int unsigned CNT_W  = 32;
  // Width of an outstanding-transaction counter (AXI allows up to 2^ID_W
  // per ID; 8 bits covers the 14 reads / 7 writes seen on the DPU).
  localparam int unsigned OUTS_W = 8;
  // Burst length in beats, 1..256.
  localparam int unsigned BLEN_W = 9;
  // Width of a measured memory latency (cycles) and of the timestamps the
  // monitors keep for it; latencies of tens of cycles are expected.
  localparam int unsigned LAT_W  = 16;
  // Requests whose latency can be timed at once per port and direction
  // (the DPU keeps at most 14 reads or 7 writes in flight).
  localparam int unsigned LAT_DEPTH = 16;

  // DICTAT operating mode (CTRL register, bits [1:0]).
  typedef enum logic [1:0] {
    MODE_BYPASS = 2'd0,  // M_INS forwarded untouched
    MODE_DUMP   = 2'd1,  // forward and copy every instruction word to DRAM
    MODE_XLATE  = 2'd2   // redirect instruction reads to the OCM copy
  } dictat_mode_e;

  // DICTAT register word indices.
  localparam int unsigned DICTAT_CTRL        = 0;  // [1:0] mode; write restarts
  localparam int unsigned DICTAT_DUMP_LO     = 1;  // dump buffer address [31:0]
  localparam int unsigned DICTAT_DUMP_HI     = 2;  // dump buffer address [63:32]
  localparam int unsigned DICTAT_OCM_LO      = 3;  // OCM copy address [31:0]
  localparam int unsigned DICTAT_OCM_HI      = 4;  // OCM copy address [63:32]
  localparam int unsigned DICTAT_STATUS      = 5;  // [0] dump done [1] OCM overflow [2] dump busy
  localparam int unsigned DICTAT_DUMP_WORDS  = 6;  // instruction words sniffed
  localparam int unsigned DICTAT_WR_WORDS    = 7;  // instruction words written to DRAM
  localparam int unsigned DICTAT_XLATE_CNT   = 8;  // read requests redirected
  localparam int unsigned DICTAT_NREGS       = 9;

  // Profiler state (CTRL register read value).
  typedef enum logic [1:0] {
    PROF_IDLE    = 2'd0,  // not armed, counters hold their values
    PROF_ARMED   = 2'd1,  // waiting for the first DPU bus request
    PROF_RUNNING = 2'd2,  // job in progress, counting
    PROF_DONE    = 2'd3   // DPU interrupt seen, counters frozen
  } prof_state_e;

  // Profiler register word indices.
  localparam int unsigned PROF_CTRL          = 0;   // W: [0] arm [1] disarm [2] clear history; R: state
  localparam int unsigned PROF_JOBS          = 1;   // jobs in the history
  localparam int unsigned PROF_TOTAL         = 2;   // inference time, cycles
  localparam int unsigned PROF_ELAB          = 3;   // cycles with no bus activity
  localparam int unsigned PROF_OVL_INS_RD    = 4;   // instr read active while data read active
  localparam int unsigned PROF_OVL_WR_RD     = 5;   // data write active while data read active
  localparam int unsigned PROF_OVL_INS_WR    = 6;   // instr read active while data write active
  localparam int unsigned PROF_S_TRANS       = 7;   // S-port transactions during the job
  localparam int unsigned PROF_INS_RD_TRANS  = 8;
  localparam int unsigned PROF_INS_RD_WORDS  = 9;
  localparam int unsigned PROF_INS_RD_ACTIVE = 10;
  localparam int unsigned PROF_INS_OUTS      = 11;  // [15:8] max write, [7:0] max read outstanding
  localparam int unsigned PROF_INS_RD_BLEN   = 12;  // [24:16] max, [8:0] min burst length
  localparam int unsigned PROF_DAT_RD_TRANS  = 13;
  localparam int unsigned PROF_DAT_RD_WORDS  = 14;
  localparam int unsigned PROF_DAT_RD_ACTIVE = 15;
  localparam int unsigned PROF_DAT_WR_TRANS  = 16;
  localparam int unsigned PROF_DAT_WR_WORDS  = 17;
  localparam int unsigned PROF_DAT_WR_ACTIVE = 18;
  localparam int unsigned PROF_DAT_OUTS      = 19;
  localparam int unsigned PROF_DAT_RD_BLEN   = 20;
  localparam int unsigned PROF_DAT_WR_BLEN   = 21;
  localparam int unsigned PROF_INS_LAT       = 22;  // [31:16] max write, [15:0] max read latency
  localparam int unsigned PROF_DAT_LAT       = 23;
  // Job history: for each of the PROF_HIST_N per-job times below, the
  // smallest and largest value over the jobs profiled since reset or the
  // last CTRL[2] write, and their 64-bit sum (average = sum / JOBS). Four
  // words per time: PROF_HIST_BASE + 4*k + {0 min, 1 max, 2 sum lo, 3 sum hi}.
  localparam int unsigned PROF_HIST_BASE     = 24;
  localparam int unsigned PROF_HIST_N        = 5;
  localparam int unsigned HIST_INS_RD        = 0;   // instruction read phase
  localparam int unsigned HIST_DAT_RD        = 1;   // data read phase
  localparam int unsigned HIST_DAT_WR        = 2;   // data write phase
  localparam int unsigned HIST_ELAB          = 3;   // elaboration
  localparam int unsigned HIST_TOTAL         = 4;   // inference time
  localparam int unsigned PROF_NREGS         = PROF_HIST_BASE + 4 * PROF_HIST_N;

  // Per-port statistics gathered by one profiler channel.
  typedef struct packed {
    logic [CNT_W-1:0]  rd_trans;    // read address handshakes
    logic [CNT_W-1:0]  rd_words;    // read data beats
    logic [CNT_W-1:0]  rd_active;   // cycles with a read request pending
    logic [CNT_W-1:0]  wr_trans;    // write address handshakes
    logic [CNT_W-1:0]  wr_words;    // write data beats
    logic [CNT_W-1:0]  wr_active;   // cycles with a write pending
    logic [OUTS_W-1:0] max_rd_outs; // largest number of reads in flight
    logic [OUTS_W-1:0] max_wr_outs; // largest number of writes in flight
    logic [BLEN_W-1:0] rd_blen_min; // shortest read burst (beats)
    logic [BLEN_W-1:0] rd_blen_max; // longest read burst (beats)
    logic [BLEN_W-1:0] wr_blen_min;
    logic [BLEN_W-1:0] wr_blen_max;
    logic [LAT_W-1:0]  rd_lat_max;  // longest read address -> first data
    logic [LAT_W-1:0]  wr_lat_max;  // longest last write data -> response
  } port_stats_t;

endpackage
