// Workload test of dpu_pl_top at its default parameters: the six ADAS
// networks, each run as one DPU job with its measured per-job traffic
// (instruction reads of 4 words, data reads and data writes, in
// transactions and words). For each network:
//   * a stock job (instructions from DRAM) is profiled and every counter is
//     compared with the traffic figures;
//   * the measured inference time is compared with the analytical bound
//     T = max(D_R_data, D_R_ins + D_W_data) + elaboration, built from
//     D_R(N, W) = N*(d_addr + d_read) + W*d_word (plus the read interference
//     term min(N_ins*14, N_data)*d_read, and the symmetric one, when both
//     ports share the DRAM) and D_W = N*(d_addr + d_write + d_bresp) +
//     W*2, with d_addr = d_bresp = 1, d_read = 40, d_write = 30;
//   * if the instruction stream fits the 256 KB OCM, it is dumped, copied to
//     the OCM and a second job runs from the OCM copy, profiled and checked
//     against the OCM bound; if it does not fit, DICTAT must flag overflow.
module tb_workloads;
  import dpu_pl_pkg::*;
  localparam int unsigned ADDR_W = 40, ID_W = 6, CFG_AW = 12;
  localparam longint DUMP_BASE = 64'h00_7000_0000;
  localparam longint OCM_BASE  = 64'hFF_FFFC_0000;

  logic clk = 0, rst_n = 0;
  logic dpu_irq, irq_to_ps, prof_done;
  // DPU M_INS
  logic [ID_W-1:0] dpu_ins_arid, dpu_ins_rid; logic [ADDR_W-1:0] dpu_ins_araddr;
  logic [7:0] dpu_ins_arlen; logic [2:0] dpu_ins_arsize; logic [1:0] dpu_ins_arburst, dpu_ins_rresp;
  logic dpu_ins_arvalid, dpu_ins_arready, dpu_ins_rlast, dpu_ins_rvalid, dpu_ins_rready;
  logic [31:0] dpu_ins_rdata;
  // PS instruction port
  logic [ID_W-1:0] ps_ins_arid, ps_ins_rid, ps_ins_awid, ps_ins_bid;
  logic [ADDR_W-1:0] ps_ins_araddr, ps_ins_awaddr; logic [7:0] ps_ins_arlen, ps_ins_awlen;
  logic [2:0] ps_ins_arsize, ps_ins_awsize; logic [1:0] ps_ins_arburst, ps_ins_rresp, ps_ins_awburst, ps_ins_bresp;
  logic ps_ins_arvalid, ps_ins_arready, ps_ins_rlast, ps_ins_rvalid, ps_ins_rready;
  logic ps_ins_awvalid, ps_ins_awready, ps_ins_wlast, ps_ins_wvalid, ps_ins_wready, ps_ins_bvalid, ps_ins_bready;
  logic [31:0] ps_ins_rdata, ps_ins_wdata; logic [3:0] ps_ins_wstrb;
  // DPU M_DATA
  logic [ID_W-1:0] dpu_dat_arid, dpu_dat_rid, dpu_dat_awid, dpu_dat_bid;
  logic [ADDR_W-1:0] dpu_dat_araddr, dpu_dat_awaddr; logic [7:0] dpu_dat_arlen, dpu_dat_awlen;
  logic [2:0] dpu_dat_arsize, dpu_dat_awsize; logic [1:0] dpu_dat_arburst, dpu_dat_rresp, dpu_dat_awburst, dpu_dat_bresp;
  logic dpu_dat_arvalid, dpu_dat_arready, dpu_dat_rlast, dpu_dat_rvalid, dpu_dat_rready;
  logic dpu_dat_awvalid, dpu_dat_awready, dpu_dat_wlast, dpu_dat_wvalid, dpu_dat_wready, dpu_dat_bvalid, dpu_dat_bready;
  logic [127:0] dpu_dat_rdata, dpu_dat_wdata; logic [15:0] dpu_dat_wstrb;
  // PS data port
  logic [ID_W-1:0] ps_dat_arid, ps_dat_rid, ps_dat_awid, ps_dat_bid;
  logic [ADDR_W-1:0] ps_dat_araddr, ps_dat_awaddr; logic [7:0] ps_dat_arlen, ps_dat_awlen;
  logic [2:0] ps_dat_arsize, ps_dat_awsize; logic [1:0] ps_dat_arburst, ps_dat_rresp, ps_dat_awburst, ps_dat_bresp;
  logic ps_dat_arvalid, ps_dat_arready, ps_dat_rlast, ps_dat_rvalid, ps_dat_rready;
  logic ps_dat_awvalid, ps_dat_awready, ps_dat_wlast, ps_dat_wvalid, ps_dat_wready, ps_dat_bvalid, ps_dat_bready;
  logic [127:0] ps_dat_rdata, ps_dat_wdata; logic [15:0] ps_dat_wstrb;
  // AXI4-Lite ports: PS->S, S->DPU, DICTAT and profiler configuration
  logic [CFG_AW-1:0] ps_s_awaddr, ps_s_araddr, dpu_s_awaddr, dpu_s_araddr;
  logic [CFG_AW-1:0] dictat_cfg_awaddr, dictat_cfg_araddr, prof_cfg_awaddr, prof_cfg_araddr;
  logic [31:0] ps_s_wdata, ps_s_rdata, dpu_s_wdata, dpu_s_rdata;
  logic [31:0] dictat_cfg_wdata, dictat_cfg_rdata, prof_cfg_wdata, prof_cfg_rdata;
  logic [3:0] ps_s_wstrb, dpu_s_wstrb, dictat_cfg_wstrb, prof_cfg_wstrb;
  logic [1:0] ps_s_bresp, ps_s_rresp, dpu_s_bresp, dpu_s_rresp;
  logic [1:0] dictat_cfg_bresp, dictat_cfg_rresp, prof_cfg_bresp, prof_cfg_rresp;
  logic ps_s_awvalid, ps_s_awready, ps_s_wvalid, ps_s_wready, ps_s_bvalid, ps_s_bready;
  logic ps_s_arvalid, ps_s_arready, ps_s_rvalid, ps_s_rready;
  logic dpu_s_awvalid, dpu_s_awready, dpu_s_wvalid, dpu_s_wready, dpu_s_bvalid, dpu_s_bready;
  logic dpu_s_arvalid, dpu_s_arready, dpu_s_rvalid, dpu_s_rready;
  logic dictat_cfg_awvalid, dictat_cfg_awready, dictat_cfg_wvalid, dictat_cfg_wready;
  logic dictat_cfg_bvalid, dictat_cfg_bready, dictat_cfg_arvalid, dictat_cfg_arready;
  logic dictat_cfg_rvalid, dictat_cfg_rready;
  logic prof_cfg_awvalid, prof_cfg_awready, prof_cfg_wvalid, prof_cfg_wready;
  logic prof_cfg_bvalid, prof_cfg_bready, prof_cfg_arvalid, prof_cfg_arready;
  logic prof_cfg_rvalid, prof_cfg_rready;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dpu_pl_top dut (.*);

  // ---------------------------------------------------------------- DPU
  logic start, busy;
  int unsigned ins_trans, rd_trans, rd_words, wr_trans, wr_words, elab;
  int unsigned ins_errors, ins_words_seen;
  dpu_traffic_model #(.ADDR_W(ADDR_W), .ID_W(ID_W)) dpu (
    .clk, .rst_n, .start, .ins_trans, .rd_trans, .rd_words, .wr_trans, .wr_words, .elab,
    .ins_arid(dpu_ins_arid), .ins_araddr(dpu_ins_araddr), .ins_arlen(dpu_ins_arlen),
    .ins_arsize(dpu_ins_arsize), .ins_arburst(dpu_ins_arburst), .ins_arvalid(dpu_ins_arvalid),
    .ins_arready(dpu_ins_arready), .ins_rdata(dpu_ins_rdata), .ins_rlast(dpu_ins_rlast),
    .ins_rvalid(dpu_ins_rvalid), .ins_rready(dpu_ins_rready),
    .dat_arid(dpu_dat_arid), .dat_araddr(dpu_dat_araddr), .dat_arlen(dpu_dat_arlen),
    .dat_arsize(dpu_dat_arsize), .dat_arburst(dpu_dat_arburst), .dat_arvalid(dpu_dat_arvalid),
    .dat_arready(dpu_dat_arready), .dat_rlast(dpu_dat_rlast), .dat_rvalid(dpu_dat_rvalid),
    .dat_rready(dpu_dat_rready), .dat_awid(dpu_dat_awid), .dat_awaddr(dpu_dat_awaddr),
    .dat_awlen(dpu_dat_awlen), .dat_awsize(dpu_dat_awsize), .dat_awburst(dpu_dat_awburst),
    .dat_awvalid(dpu_dat_awvalid), .dat_awready(dpu_dat_awready), .dat_wdata(dpu_dat_wdata),
    .dat_wstrb(dpu_dat_wstrb), .dat_wlast(dpu_dat_wlast), .dat_wvalid(dpu_dat_wvalid),
    .dat_wready(dpu_dat_wready), .dat_bvalid(dpu_dat_bvalid), .dat_bready(dpu_dat_bready),
    .irq(dpu_irq), .busy, .ins_errors, .ins_words_seen
  );

  // DPU S port: accepts configuration; a write of 1 to offset 0 starts a job.
  logic s_start;
  assign dpu_s_awready = dpu_s_awvalid && dpu_s_wvalid && !dpu_s_bvalid;
  assign dpu_s_wready  = dpu_s_awready;
  assign dpu_s_bresp   = 2'b00;
  assign dpu_s_arready = !dpu_s_rvalid;
  assign dpu_s_rresp   = 2'b00;
  assign dpu_s_rdata   = {31'd0, busy};
  always @(posedge clk) begin
    if (!rst_n) begin
      dpu_s_bvalid <= 0; dpu_s_rvalid <= 0; s_start <= 0;
    end else begin
      s_start <= dpu_s_awready && dpu_s_awaddr == 0 && dpu_s_wdata == 1;
      if (dpu_s_awready) dpu_s_bvalid <= 1; else if (dpu_s_bready) dpu_s_bvalid <= 0;
      if (dpu_s_arvalid && dpu_s_arready) dpu_s_rvalid <= 1; else if (dpu_s_rready) dpu_s_rvalid <= 0;
    end
  end
  assign start = s_start;

  // ------------------------------------------------------------ memories
  axi_mem_model #(.DW(32), .ADDR_W(ADDR_W), .ID_W(ID_W), .RD_LAT(40), .WR_LAT(30)) ins_mem (
    .clk, .rst_n, .arid(ps_ins_arid), .araddr(ps_ins_araddr), .arlen(ps_ins_arlen),
    .arsize(ps_ins_arsize), .arburst(ps_ins_arburst), .arvalid(ps_ins_arvalid),
    .arready(ps_ins_arready), .rid(ps_ins_rid), .rdata(ps_ins_rdata), .rresp(ps_ins_rresp),
    .rlast(ps_ins_rlast), .rvalid(ps_ins_rvalid), .rready(ps_ins_rready),
    .awid(ps_ins_awid), .awaddr(ps_ins_awaddr), .awlen(ps_ins_awlen), .awsize(ps_ins_awsize),
    .awburst(ps_ins_awburst), .awvalid(ps_ins_awvalid), .awready(ps_ins_awready),
    .wdata(ps_ins_wdata), .wstrb(ps_ins_wstrb), .wlast(ps_ins_wlast), .wvalid(ps_ins_wvalid),
    .wready(ps_ins_wready), .bid(ps_ins_bid), .bresp(ps_ins_bresp), .bvalid(ps_ins_bvalid),
    .bready(ps_ins_bready)
  );
  axi_mem_model #(.DW(128), .ADDR_W(ADDR_W), .ID_W(ID_W), .RD_LAT(40), .WR_LAT(30)) dat_mem (
    .clk, .rst_n, .arid(ps_dat_arid), .araddr(ps_dat_araddr), .arlen(ps_dat_arlen),
    .arsize(ps_dat_arsize), .arburst(ps_dat_arburst), .arvalid(ps_dat_arvalid),
    .arready(ps_dat_arready), .rid(ps_dat_rid), .rdata(ps_dat_rdata), .rresp(ps_dat_rresp),
    .rlast(ps_dat_rlast), .rvalid(ps_dat_rvalid), .rready(ps_dat_rready),
    .awid(ps_dat_awid), .awaddr(ps_dat_awaddr), .awlen(ps_dat_awlen), .awsize(ps_dat_awsize),
    .awburst(ps_dat_awburst), .awvalid(ps_dat_awvalid), .awready(ps_dat_awready),
    .wdata(ps_dat_wdata), .wstrb(ps_dat_wstrb), .wlast(ps_dat_wlast), .wvalid(ps_dat_wvalid),
    .wready(ps_dat_wready), .bid(ps_dat_bid), .bresp(ps_dat_bresp), .bvalid(ps_dat_bvalid),
    .bready(ps_dat_bready)
  );

  // ------------------------------------------------------ software masters
  axil_driver #(.AW(CFG_AW)) sw_s (
    .clk, .awaddr(ps_s_awaddr), .awvalid(ps_s_awvalid), .awready(ps_s_awready),
    .wdata(ps_s_wdata), .wstrb(ps_s_wstrb), .wvalid(ps_s_wvalid), .wready(ps_s_wready),
    .bresp(ps_s_bresp), .bvalid(ps_s_bvalid), .bready(ps_s_bready),
    .araddr(ps_s_araddr), .arvalid(ps_s_arvalid), .arready(ps_s_arready),
    .rdata(ps_s_rdata), .rresp(ps_s_rresp), .rvalid(ps_s_rvalid), .rready(ps_s_rready)
  );
  axil_driver #(.AW(CFG_AW)) sw_dictat (
    .clk, .awaddr(dictat_cfg_awaddr), .awvalid(dictat_cfg_awvalid), .awready(dictat_cfg_awready),
    .wdata(dictat_cfg_wdata), .wstrb(dictat_cfg_wstrb), .wvalid(dictat_cfg_wvalid),
    .wready(dictat_cfg_wready), .bresp(dictat_cfg_bresp), .bvalid(dictat_cfg_bvalid),
    .bready(dictat_cfg_bready), .araddr(dictat_cfg_araddr), .arvalid(dictat_cfg_arvalid),
    .arready(dictat_cfg_arready), .rdata(dictat_cfg_rdata), .rresp(dictat_cfg_rresp),
    .rvalid(dictat_cfg_rvalid), .rready(dictat_cfg_rready)
  );
  axil_driver #(.AW(CFG_AW)) sw_prof (
    .clk, .awaddr(prof_cfg_awaddr), .awvalid(prof_cfg_awvalid), .awready(prof_cfg_awready),
    .wdata(prof_cfg_wdata), .wstrb(prof_cfg_wstrb), .wvalid(prof_cfg_wvalid),
    .wready(prof_cfg_wready), .bresp(prof_cfg_bresp), .bvalid(prof_cfg_bvalid),
    .bready(prof_cfg_bready), .araddr(prof_cfg_araddr), .arvalid(prof_cfg_arvalid),
    .arready(prof_cfg_arready), .rdata(prof_cfg_rdata), .rresp(prof_cfg_rresp),
    .rvalid(prof_cfg_rvalid), .rready(prof_cfg_rready)
  );

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_bypass_jobs, n_dump_jobs, n_xlate_jobs, n_dump_stall, n_restart, n_overflow;
  int n_prof_jobs, n_elab, n_ovl, n_s_during_job, n_ocm_reads, n_dram_ins_reads;
  logic irq_q;
  always @(posedge clk) begin
    irq_q <= dpu_irq;
    if (dpu_irq && !irq_q) begin
      case (dut.u_dictat.mode)
        MODE_BYPASS: n_bypass_jobs++;
        MODE_DUMP:   n_dump_jobs++;
        MODE_XLATE:  begin n_xlate_jobs++; n_restart++; end
        default: ;
      endcase
    end
    if (dut.u_dictat.dump_en && ps_ins_rvalid && !dpu_ins_rvalid) n_dump_stall++;
    if (ps_ins_arvalid && ps_ins_arready) begin
      if (64'(ps_ins_araddr) >= OCM_BASE) n_ocm_reads++; else n_dram_ins_reads++;
    end
  end
  // Rerouted reads stay inside the 256 KB OCM unless the copy overflowed.
  always @(posedge clk) if (ps_ins_arvalid && ps_ins_arready && dut.u_dictat.xlate_en
                            && !dut.u_dictat.overflow && !dut.u_dictat.u_xlate.next_offset[39:18]) begin
    checks++;
    if (64'(ps_ins_araddr) < OCM_BASE || 64'(ps_ins_araddr) >= OCM_BASE + 262144) begin
      failures++; $display("FAIL rerouted read outside OCM");
    end
  end

  // ------------------------------------------------------------ job steps
  task automatic run_job(input bit poll_during);
    logic [31:0] v;
    // configuration over S, then start
    for (int r = 1; r < 5; r++) sw_s.write(r, 32'h1000 * r);
    sw_s.write(0, 1);
    if (poll_during) begin
      repeat (200) @(negedge clk);
      sw_s.read(1, v);
    end
    wait (dpu_irq);
    wait (!busy);
    repeat (10) @(negedge clk);
  endtask

  task automatic check_profile(input string tag, input int s_expected);
    logic [31:0] v;
    int lat_ins;
    sw_prof.read(PROF_CTRL, v);         check({tag, " profiler done"}, v, PROF_DONE);
    n_prof_jobs += (v == PROF_DONE);
    sw_prof.read(PROF_INS_RD_TRANS, v); check({tag, " ins trans"}, v, ins_trans);
    sw_prof.read(PROF_INS_RD_WORDS, v); check({tag, " ins words"}, v, 4 * ins_trans);
    sw_prof.read(PROF_DAT_RD_TRANS, v); check({tag, " rd trans"}, v, rd_trans);
    sw_prof.read(PROF_DAT_RD_WORDS, v); check({tag, " rd words"}, v, rd_words);
    sw_prof.read(PROF_DAT_WR_TRANS, v); check({tag, " wr trans"}, v, wr_trans);
    sw_prof.read(PROF_DAT_WR_WORDS, v); check({tag, " wr words"}, v, wr_words);
    sw_prof.read(PROF_INS_OUTS, v);     check({tag, " ins outstanding"}, v[7:0], 2);
    sw_prof.read(PROF_DAT_OUTS, v);     check({tag, " data rd outstanding <= 14"}, v[7:0] <= 14, 1);
                                        check({tag, " data wr outstanding <= 7"}, v[15:8] <= 7, 1);
    sw_prof.read(PROF_INS_RD_BLEN, v);  check({tag, " ins burst 4"}, v, {16'd4, 16'd4});
    sw_prof.read(PROF_DAT_RD_BLEN, v);  check({tag, " rd burst 1..256"}, v, {16'd256, 16'd1});
    sw_prof.read(PROF_S_TRANS, v);      check({tag, " S accesses in job"}, v, s_expected);
    n_s_during_job += (v != 0);
    sw_prof.read(PROF_ELAB, v);         check({tag, " elaboration"}, v, elab);
    n_elab += (v != 0);
    sw_prof.read(PROF_OVL_INS_RD, v);   n_ovl += (v != 0);
    // memory latencies seen by the profiler: reads no faster than the
    // memories' 40-cycle read latency, at most that plus the queue of
    // earlier bursts ahead of it. Write responses: the model marks a
    // response due 30 cycles after the last beat and drives it on the
    // following edge, so the profiler sees 31 cycles between the handshakes.
    sw_prof.read(PROF_INS_LAT, v);
    lat_ins = v[15:0];
    check({tag, " ins read latency >= 40"}, v[15:0] >= 40, 1);
    check({tag, " ins read latency <= 40 + 2 bursts"}, v[15:0] <= 40 + 8, 1);
    sw_prof.read(PROF_DAT_LAT, v);
    check({tag, " data read latency >= 40"}, v[15:0] >= 40, 1);
    check({tag, " data read latency <= 40 + 14 bursts"}, v[15:0] <= 40 + 14 * 256, 1);
    check({tag, " data write latency"}, v[31:16], 31);
    $display("%s: read latency ins %0d data %0d, write latency %0d", tag, lat_ins, v[15:0], v[31:16]);
    begin
      logic [31:0] tot, act;
      sw_prof.read(PROF_TOTAL, tot);
      sw_prof.read(PROF_DAT_RD_ACTIVE, act);
      check({tag, " read phase inside job"}, act <= tot, 1);
      $display("%s: total %0d cycles, data-read phase %0d", tag, tot, act);
    end
  endtask

  // Per-job traffic of the six networks
  typedef struct { string name; int unsigned it, rt, rw, wt, ww; } wl_t;
  wl_t wls[6];
  logic [31:0] v;

  function automatic longint d_rd(input longint n, input longint w);
    return n * (1 + 40) + w;
  endfunction
  function automatic longint d_wr(input longint n, input longint w);
    return n * (1 + 30 + 1) + w * 2;
  endfunction

  initial begin
    wls[0] = '{"Lane Detect",    17186, 91939, 1179184, 48314, 424350};
    wls[1] = '{"Plate Detect",    2347,  7607,   83027,   246,  16960};
    wls[2] = '{"Plate Num",       9872, 53327,  579962,  6075,  48908};
    wls[3] = '{"Yolov3",         16060, 84410, 1011665, 25457, 540416};
    wls[4] = '{"SSD",             9920, 68943,  725208,  4705, 554510};
    wls[5] = '{"Pedestrian SSD", 11655, 56597,  639932,  5505, 506096};
    n_bypass_jobs = 0; n_dump_jobs = 0; n_xlate_jobs = 0; n_dump_stall = 0; n_restart = 0;
    n_overflow = 0; n_prof_jobs = 0; n_elab = 0; n_ovl = 0; n_s_during_job = 0;
    n_ocm_reads = 0; n_dram_ins_reads = 0;
    elab = 200;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      logic [31:0] tot;
      longint b_dram, b_ocm, d_ins, d_dat, d_w;
      bit fits;
      int unsigned e0;
      ins_trans = wls[w].it; rd_trans = wls[w].rt; rd_words = wls[w].rw;
      wr_trans = wls[w].wt; wr_words = wls[w].ww;
      fits = (4 * 4 * ins_trans <= 262144);
      // bounds, eq. 7 (shared DRAM) and eq. 9 (instructions in OCM)
      d_w   = d_wr(wr_trans, wr_words);
      d_ins = d_rd(ins_trans, 4 * ins_trans);
      d_dat = d_rd(rd_trans, rd_words);
      b_dram = ((d_dat + ((ins_trans < rd_trans * 2) ? ins_trans : rd_trans * 2) * 40) >
                (d_ins + ((rd_trans < ins_trans * 14) ? rd_trans : ins_trans * 14) * 40 + d_w))
               ? d_dat + ((ins_trans < rd_trans * 2) ? ins_trans : rd_trans * 2) * 40
               : d_ins + ((rd_trans < ins_trans * 14) ? rd_trans : ins_trans * 14) * 40 + d_w;
      b_dram += elab;
      b_ocm = ((d_dat > d_ins + d_w) ? d_dat : d_ins + d_w) + elab;
      // stock job
      e0 = ins_errors;
      sw_dictat.write(DICTAT_CTRL, 32'(MODE_BYPASS));
      sw_prof.write(PROF_CTRL, 1);
      run_job(0);
      check_profile({wls[w].name, " stock"}, 0);
      sw_prof.read(PROF_TOTAL, tot);
      check({wls[w].name, " stock within DRAM bound"}, tot <= b_dram, 1);
      check({wls[w].name, " OCM bound tighter"}, b_ocm <= b_dram, 1);
      check({wls[w].name, " stock instructions correct"}, ins_errors - e0, 0);
      $display("%s: measured %0d cycles, DRAM bound %0d, OCM bound %0d", wls[w].name, tot, b_dram, b_ocm);
      if (fits) begin
        // dump, copy, run from the OCM
        sw_dictat.write(DICTAT_DUMP_LO, 32'(DUMP_BASE));
        sw_dictat.write(DICTAT_DUMP_HI, 32'(DUMP_BASE >> 32));
        sw_dictat.write(DICTAT_CTRL, 32'(MODE_DUMP));
        run_job(0);
        for (int p = 0; p < 100; p++) begin
          sw_dictat.read(DICTAT_STATUS, v);
          if (v[0]) break;
          repeat (20) @(negedge clk);
        end
        check({wls[w].name, " dump done"}, v[0], 1);
        for (int k = 0; k < 4 * int'(ins_trans); k++)
          ins_mem.poke(OCM_BASE + 4 * k, ins_mem.peek(DUMP_BASE + 4 * k));
        sw_dictat.write(DICTAT_OCM_LO, 32'(OCM_BASE));
        sw_dictat.write(DICTAT_OCM_HI, 32'(OCM_BASE >> 32));
        sw_dictat.write(DICTAT_CTRL, 32'(MODE_XLATE));
        n_dram_ins_reads = 0;
        sw_prof.write(PROF_CTRL, 1);
        run_job(0);
        check_profile({wls[w].name, " ocm"}, 0);
        sw_prof.read(PROF_TOTAL, tot);
        check({wls[w].name, " ocm within OCM bound"}, tot <= b_ocm, 1);
        check({wls[w].name, " ocm: no instruction read to DRAM"}, n_dram_ins_reads, 0);
        sw_dictat.read(DICTAT_STATUS, v);
        check({wls[w].name, " no overflow"}, v[1], 0);
        check({wls[w].name, " ocm instructions correct"}, ins_errors - e0, 0);
      end else begin
        sw_dictat.write(DICTAT_OCM_LO, 32'(OCM_BASE));
        sw_dictat.write(DICTAT_OCM_HI, 32'(OCM_BASE >> 32));
        sw_dictat.write(DICTAT_CTRL, 32'(MODE_XLATE));
        run_job(0);
        sw_dictat.read(DICTAT_STATUS, v);
        check({wls[w].name, " does not fit the OCM"}, v[1], 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
