// Multi-channel bus profiler for the DPU: measures, clock by clock, what the
// accelerator does on its memory ports during one inference job.
//
// It is connected in parallel with the DPU's ports and only samples them:
// the instruction port M_INS (read only), the data port M_DATA (read and
// write), the AXI4-Lite configuration port S and the DPU interrupt. One
// axi_port_monitor per manager port counts transactions, data words,
// outstanding-transaction parallelism, burst lengths and the cycles each
// phase is active (read-instruction, read-data, write-data phase). On top of
// that the profiler counts, per job:
//   * total inference cycles, from the first DPU bus request after arming
//     to the rising edge of the interrupt;
//   * elaboration cycles: job running, no port active;
//   * overlap cycles: instruction read with data read, data write with data
//     read, instruction read with data write;
//   * transactions on S while the job runs (software interaction);
//   * the longest memory latency seen on each port: read address to first
//     data, and last write data to write response (the read and write
//     service times a response-time analysis needs).
// Software arms it by writing CTRL[0]=1 (counters clear, state ARMED); the
// first read or write request on M_INS or M_DATA starts the count
// (RUNNING); the interrupt's rising edge freezes everything (DONE), and the
// values are read as memory-mapped registers (map in dpu_pl_pkg). CTRL[1]
// disarms. The request cycle that starts the job is counted; the interrupt
// cycle is not.
//
// Across jobs the profiler keeps a history, so the spread of the inference
// time over many runs is seen without reading every job: at each job end
// the per-job instruction-read, data-read and data-write phase times, the
// elaboration time and the total update a running minimum, maximum and
// 64-bit sum. JOBS counts the jobs in the history (each interrupt that ends
// a RUNNING job); arming leaves both alone, CTRL[2] clears them.
// What is measured follows the profiler's published capabilities; the
// start condition, register map and widths are this design's choices.
module hw_profiler
  import dpu_pl_pkg::*;
#(
  parameter int unsigned CFG_AW = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dpu_irq,
  // M_INS probe
  input  logic              ins_arvalid,
  input  logic              ins_arready,
  input  logic [7:0]        ins_arlen,
  input  logic              ins_rvalid,
  input  logic              ins_rready,
  input  logic              ins_rlast,
  // M_DATA probe
  input  logic              dat_arvalid,
  input  logic              dat_arready,
  input  logic [7:0]        dat_arlen,
  input  logic              dat_rvalid,
  input  logic              dat_rready,
  input  logic              dat_rlast,
  input  logic              dat_awvalid,
  input  logic              dat_awready,
  input  logic [7:0]        dat_awlen,
  input  logic              dat_wvalid,
  input  logic              dat_wready,
  input  logic              dat_wlast,
  input  logic              dat_bvalid,
  input  logic              dat_bready,
  // S probe (AXI4-Lite address handshakes)
  input  logic              s_awvalid,
  input  logic              s_awready,
  input  logic              s_arvalid,
  input  logic              s_arready,
  // AXI4-Lite register port
  input  logic [CFG_AW-1:0] cfg_awaddr,
  input  logic              cfg_awvalid,
  output logic              cfg_awready,
  input  logic [31:0]       cfg_wdata,
  input  logic [3:0]        cfg_wstrb,
  input  logic              cfg_wvalid,
  output logic              cfg_wready,
  output logic [1:0]        cfg_bresp,
  output logic              cfg_bvalid,
  input  logic              cfg_bready,
  input  logic [CFG_AW-1:0] cfg_araddr,
  input  logic              cfg_arvalid,
  output logic              cfg_arready,
  output logic [31:0]       cfg_rdata,
  output logic [1:0]        cfg_rresp,
  output logic              cfg_rvalid,
  input  logic              cfg_rready,
  // profile complete (state DONE)
  output logic              prof_done
);
  prof_state_e state;
  logic        wr_en;
  logic [CFG_AW-3:0] wr_idx;
  logic [31:0] wr_data;
  logic [PROF_NREGS-1:0][31:0] rd_regs;
  logic        arm, disarm, clear, irq_q, irq_rise, start, en;
  port_stats_t ins_st, dat_st;
  logic        ins_rd_act, ins_wr_act, dat_rd_act, dat_wr_act;
  logic [CNT_W-1:0] jobs, total, elab, ovl_ins_rd, ovl_wr_rd, ovl_ins_wr, s_trans;
  logic        hist_clear, job_end;
  logic [PROF_HIST_N-1:0][CNT_W-1:0] job_t, h_min, h_max;
  logic [PROF_HIST_N-1:0][63:0]      h_sum;

  axil_regfile #(.NREGS(PROF_NREGS), .ADDR_W(CFG_AW)) u_regs (
    .clk, .rst_n,
    .awaddr(cfg_awaddr), .awvalid(cfg_awvalid), .awready(cfg_awready),
    .wdata(cfg_wdata), .wstrb(cfg_wstrb), .wvalid(cfg_wvalid), .wready(cfg_wready),
    .bresp(cfg_bresp), .bvalid(cfg_bvalid), .bready(cfg_bready),
    .araddr(cfg_araddr), .arvalid(cfg_arvalid), .arready(cfg_arready),
    .rdata(cfg_rdata), .rresp(cfg_rresp), .rvalid(cfg_rvalid), .rready(cfg_rready),
    .wr_en, .wr_idx, .wr_data, .rd_regs
  );

  assign arm      = wr_en && (32'(wr_idx) == PROF_CTRL) && wr_data[0];
  assign disarm   = wr_en && (32'(wr_idx) == PROF_CTRL) && wr_data[1] && !wr_data[0];
  assign clear    = arm;
  assign hist_clear = wr_en && (32'(wr_idx) == PROF_CTRL) && wr_data[2];
  assign irq_rise = dpu_irq && !irq_q;
  assign start    = (state == PROF_ARMED) && (ins_arvalid || dat_arvalid || dat_awvalid);
  assign en       = start || ((state == PROF_RUNNING) && !irq_rise);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= PROF_IDLE;
      irq_q <= 1'b0;
      jobs  <= '0;
    end else begin
      irq_q <= dpu_irq;
      if (hist_clear)   jobs <= '0;
      else if (job_end) jobs <= jobs + 1'b1;
      if (arm)         state <= PROF_ARMED;
      else if (disarm) state <= PROF_IDLE;
      else if (start && !irq_rise)                      state <= PROF_RUNNING;
      else if ((state == PROF_RUNNING) && irq_rise)     state <= PROF_DONE;
    end
  end

  axi_port_monitor u_ins (
    .clk, .rst_n, .clear, .en,
    .arvalid(ins_arvalid), .arready(ins_arready), .arlen(ins_arlen),
    .rvalid(ins_rvalid), .rready(ins_rready), .rlast(ins_rlast),
    .awvalid(1'b0), .awready(1'b0), .awlen(8'd0),
    .wvalid(1'b0), .wready(1'b0), .wlast(1'b0), .bvalid(1'b0), .bready(1'b0),
    .stats(ins_st), .rd_active(ins_rd_act), .wr_active(ins_wr_act)
  );

  axi_port_monitor u_dat (
    .clk, .rst_n, .clear, .en,
    .arvalid(dat_arvalid), .arready(dat_arready), .arlen(dat_arlen),
    .rvalid(dat_rvalid), .rready(dat_rready), .rlast(dat_rlast),
    .awvalid(dat_awvalid), .awready(dat_awready), .awlen(dat_awlen),
    .wvalid(dat_wvalid), .wready(dat_wready), .wlast(dat_wlast),
    .bvalid(dat_bvalid), .bready(dat_bready),
    .stats(dat_st), .rd_active(dat_rd_act), .wr_active(dat_wr_act)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      total      <= '0;
      elab       <= '0;
      ovl_ins_rd <= '0;
      ovl_wr_rd  <= '0;
      ovl_ins_wr <= '0;
      s_trans    <= '0;
    end else if (en) begin
      total      <= total + 1'b1;
      elab       <= elab + CNT_W'(!ins_rd_act && !dat_rd_act && !dat_wr_act);
      ovl_ins_rd <= ovl_ins_rd + CNT_W'(ins_rd_act && dat_rd_act);
      ovl_wr_rd  <= ovl_wr_rd  + CNT_W'(dat_wr_act && dat_rd_act);
      ovl_ins_wr <= ovl_ins_wr + CNT_W'(ins_rd_act && dat_wr_act);
      s_trans    <= s_trans + CNT_W'(s_awvalid && s_awready)
                            + CNT_W'(s_arvalid && s_arready);
    end
  end

  assign prof_done = (state == PROF_DONE);

  // Job history. The counters stop in the interrupt cycle, so at job_end
  // they already hold the finished job's values.
  assign job_end = irq_rise && (state == PROF_RUNNING);
  always_comb begin
    job_t[HIST_INS_RD] = ins_st.rd_active;
    job_t[HIST_DAT_RD] = dat_st.rd_active;
    job_t[HIST_DAT_WR] = dat_st.wr_active;
    job_t[HIST_ELAB]   = elab;
    job_t[HIST_TOTAL]  = total;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || hist_clear) begin
      h_min <= '1;
      h_max <= '0;
      h_sum <= '0;
    end else if (job_end) begin
      for (int k = 0; k < PROF_HIST_N; k++) begin
        if (job_t[k] < h_min[k]) h_min[k] <= job_t[k];
        if (job_t[k] > h_max[k]) h_max[k] <= job_t[k];
        h_sum[k] <= h_sum[k] + 64'(job_t[k]);
      end
    end
  end

  always_comb begin
    rd_regs                     = '0;
    rd_regs[PROF_CTRL]          = 32'(state);
    rd_regs[PROF_JOBS]          = jobs;
    rd_regs[PROF_TOTAL]         = total;
    rd_regs[PROF_ELAB]          = elab;
    rd_regs[PROF_OVL_INS_RD]    = ovl_ins_rd;
    rd_regs[PROF_OVL_WR_RD]     = ovl_wr_rd;
    rd_regs[PROF_OVL_INS_WR]    = ovl_ins_wr;
    rd_regs[PROF_S_TRANS]       = s_trans;
    rd_regs[PROF_INS_RD_TRANS]  = ins_st.rd_trans;
    rd_regs[PROF_INS_RD_WORDS]  = ins_st.rd_words;
    rd_regs[PROF_INS_RD_ACTIVE] = ins_st.rd_active;
    rd_regs[PROF_INS_OUTS]      = {16'd0, ins_st.max_wr_outs, ins_st.max_rd_outs};
    rd_regs[PROF_INS_RD_BLEN]   = {7'd0, ins_st.rd_blen_max, 7'd0, ins_st.rd_blen_min};
    rd_regs[PROF_DAT_RD_TRANS]  = dat_st.rd_trans;
    rd_regs[PROF_DAT_RD_WORDS]  = dat_st.rd_words;
    rd_regs[PROF_DAT_RD_ACTIVE] = dat_st.rd_active;
    rd_regs[PROF_DAT_WR_TRANS]  = dat_st.wr_trans;
    rd_regs[PROF_DAT_WR_WORDS]  = dat_st.wr_words;
    rd_regs[PROF_DAT_WR_ACTIVE] = dat_st.wr_active;
    rd_regs[PROF_DAT_OUTS]      = {16'd0, dat_st.max_wr_outs, dat_st.max_rd_outs};
    rd_regs[PROF_DAT_RD_BLEN]   = {7'd0, dat_st.rd_blen_max, 7'd0, dat_st.rd_blen_min};
    rd_regs[PROF_DAT_WR_BLEN]   = {7'd0, dat_st.wr_blen_max, 7'd0, dat_st.wr_blen_min};
    rd_regs[PROF_INS_LAT]       = {ins_st.wr_lat_max, ins_st.rd_lat_max};
    rd_regs[PROF_DAT_LAT]       = {dat_st.wr_lat_max, dat_st.rd_lat_max};
    for (int k = 0; k < PROF_HIST_N; k++) begin
      rd_regs[PROF_HIST_BASE + 4 * k]     = h_min[k];
      rd_regs[PROF_HIST_BASE + 4 * k + 1] = h_max[k];
      rd_regs[PROF_HIST_BASE + 4 * k + 2] = h_sum[k][31:0];
      rd_regs[PROF_HIST_BASE + 4 * k + 3] = h_sum[k][63:32];
    end
  end

  // The instruction port never writes; its write-side statistics stay unused.
  logic unused_ins;
  assign unused_ins = ^{ins_wr_act, ins_st.wr_trans, ins_st.wr_words, ins_st.wr_active,
                        ins_st.wr_blen_min, ins_st.wr_blen_max};

endmodule
