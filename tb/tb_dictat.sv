// Self-checking test of DICTAT between a behavioural DPU instruction port
// and a behavioural memory holding both the DRAM and the OCM:
// bypass job, dump job (dump buffer must equal the fetched instruction
// stream), then two jobs with instructions rerouted to the OCM copy. The
// DPU model checks every instruction word it receives.
module tb_dictat;
  import dpu_pl_pkg::*;
  localparam int unsigned ADDR_W = 40, ID_W = 6, DW = 32;
  localparam longint DUMP_BASE = 64'h00_7000_0000;
  localparam longint OCM_BASE  = 64'hFF_FFFC_0000;
  localparam int unsigned NTRANS = 60;       // 4-beat instruction reads per job

  logic clk = 0, rst_n = 0;
  logic start = 0;
  int unsigned ins_trans = NTRANS, rd_trans = 6, rd_words = 300, wr_trans = 3, wr_words = 40, elab = 20;
  int checks = 0, failures = 0;

  // DPU side
  logic [ID_W-1:0] s_arid, s_rid; logic [ADDR_W-1:0] s_araddr; logic [7:0] s_arlen;
  logic [2:0] s_arsize; logic [1:0] s_arburst, s_rresp; logic s_arvalid, s_arready;
  logic [DW-1:0] s_rdata; logic s_rlast, s_rvalid, s_rready;
  // memory side
  logic [ID_W-1:0] m_arid, m_rid, m_awid, m_bid; logic [ADDR_W-1:0] m_araddr, m_awaddr;
  logic [7:0] m_arlen, m_awlen; logic [2:0] m_arsize, m_awsize; logic [1:0] m_arburst, m_rresp, m_awburst, m_bresp;
  logic m_arvalid, m_arready, m_rlast, m_rvalid, m_rready, m_awvalid, m_awready;
  logic [DW-1:0] m_rdata, m_wdata; logic [3:0] m_wstrb; logic m_wlast, m_wvalid, m_wready, m_bvalid, m_bready;
  // config
  logic [11:0] cfg_awaddr, cfg_araddr; logic cfg_awvalid, cfg_awready, cfg_wvalid, cfg_wready;
  logic [31:0] cfg_wdata, cfg_rdata; logic [3:0] cfg_wstrb; logic [1:0] cfg_bresp, cfg_rresp;
  logic cfg_bvalid, cfg_bready, cfg_arvalid, cfg_arready, cfg_rvalid, cfg_rready;
  // data port of the DPU model (only needs to complete)
  logic [ID_W-1:0] d_arid, d_awid, d_rid_u, d_bid_u; logic [ADDR_W-1:0] d_araddr, d_awaddr;
  logic [7:0] d_arlen, d_awlen; logic [2:0] d_arsize, d_awsize; logic [1:0] d_arburst, d_awburst, d_rresp_u, d_bresp_u;
  logic d_arvalid, d_arready, d_rlast, d_rvalid, d_rready, d_awvalid, d_awready;
  logic [127:0] d_wdata, d_rdata_u; logic [15:0] d_wstrb; logic d_wlast, d_wvalid, d_wready, d_bvalid, d_bready;
  logic dpu_irq, busy;
  int unsigned ins_errors, ins_words_seen;

  always #5 clk = ~clk;

  dpu_traffic_model #(.ADDR_W(ADDR_W), .ID_W(ID_W)) dpu (
    .clk, .rst_n, .start, .ins_trans, .rd_trans, .rd_words, .wr_trans, .wr_words, .elab,
    .ins_arid(s_arid), .ins_araddr(s_araddr), .ins_arlen(s_arlen), .ins_arsize(s_arsize),
    .ins_arburst(s_arburst), .ins_arvalid(s_arvalid), .ins_arready(s_arready),
    .ins_rdata(s_rdata), .ins_rlast(s_rlast), .ins_rvalid(s_rvalid), .ins_rready(s_rready),
    .dat_arid(d_arid), .dat_araddr(d_araddr), .dat_arlen(d_arlen), .dat_arsize(d_arsize),
    .dat_arburst(d_arburst), .dat_arvalid(d_arvalid), .dat_arready(d_arready),
    .dat_rlast(d_rlast), .dat_rvalid(d_rvalid), .dat_rready(d_rready),
    .dat_awid(d_awid), .dat_awaddr(d_awaddr), .dat_awlen(d_awlen), .dat_awsize(d_awsize),
    .dat_awburst(d_awburst), .dat_awvalid(d_awvalid), .dat_awready(d_awready),
    .dat_wdata(d_wdata), .dat_wstrb(d_wstrb), .dat_wlast(d_wlast), .dat_wvalid(d_wvalid),
    .dat_wready(d_wready), .dat_bvalid(d_bvalid), .dat_bready(d_bready),
    .irq(dpu_irq), .busy, .ins_errors, .ins_words_seen
  );

  dictat #(.ADDR_W(ADDR_W), .DW(DW), .ID_W(ID_W)) dut (
    .clk, .rst_n, .dpu_irq, .s_arid, .s_araddr, .s_arlen, .s_arsize, .s_arburst, .s_arvalid,
    .s_arready, .s_rid, .s_rdata, .s_rresp, .s_rlast, .s_rvalid, .s_rready,
    .m_arid, .m_araddr, .m_arlen, .m_arsize, .m_arburst, .m_arvalid, .m_arready,
    .m_rid, .m_rdata, .m_rresp, .m_rlast, .m_rvalid, .m_rready,
    .m_awid, .m_awaddr, .m_awlen, .m_awsize, .m_awburst, .m_awvalid, .m_awready,
    .m_wdata, .m_wstrb, .m_wlast, .m_wvalid, .m_wready, .m_bid, .m_bresp, .m_bvalid, .m_bready,
    .cfg_awaddr, .cfg_awvalid, .cfg_awready, .cfg_wdata, .cfg_wstrb, .cfg_wvalid, .cfg_wready,
    .cfg_bresp, .cfg_bvalid, .cfg_bready, .cfg_araddr, .cfg_arvalid, .cfg_arready,
    .cfg_rdata, .cfg_rresp, .cfg_rvalid, .cfg_rready
  );

  axi_mem_model #(.DW(DW), .ADDR_W(ADDR_W), .ID_W(ID_W), .RD_LAT(40), .WR_LAT(30), .GAPS(1)) mem (
    .clk, .rst_n, .arid(m_arid), .araddr(m_araddr), .arlen(m_arlen), .arsize(m_arsize),
    .arburst(m_arburst), .arvalid(m_arvalid), .arready(m_arready), .rid(m_rid), .rdata(m_rdata),
    .rresp(m_rresp), .rlast(m_rlast), .rvalid(m_rvalid), .rready(m_rready),
    .awid(m_awid), .awaddr(m_awaddr), .awlen(m_awlen), .awsize(m_awsize), .awburst(m_awburst),
    .awvalid(m_awvalid), .awready(m_awready), .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast),
    .wvalid(m_wvalid), .wready(m_wready), .bid(m_bid), .bresp(m_bresp), .bvalid(m_bvalid),
    .bready(m_bready)
  );

  axi_mem_model #(.DW(128), .ADDR_W(ADDR_W), .ID_W(ID_W), .RD_LAT(40), .WR_LAT(30)) dmem (
    .clk, .rst_n, .arid(d_arid), .araddr(d_araddr), .arlen(d_arlen), .arsize(d_arsize),
    .arburst(d_arburst), .arvalid(d_arvalid), .arready(d_arready), .rid(d_rid_u),
    .rdata(d_rdata_u), .rresp(d_rresp_u), .rlast(d_rlast), .rvalid(d_rvalid), .rready(d_rready),
    .awid(d_awid), .awaddr(d_awaddr), .awlen(d_awlen), .awsize(d_awsize), .awburst(d_awburst),
    .awvalid(d_awvalid), .awready(d_awready), .wdata(d_wdata), .wstrb(d_wstrb), .wlast(d_wlast),
    .wvalid(d_wvalid), .wready(d_wready), .bid(d_bid_u), .bresp(d_bresp_u), .bvalid(d_bvalid),
    .bready(d_bready)
  );

  axil_driver #(.AW(12)) cfg (
    .clk, .awaddr(cfg_awaddr), .awvalid(cfg_awvalid), .awready(cfg_awready),
    .wdata(cfg_wdata), .wstrb(cfg_wstrb), .wvalid(cfg_wvalid), .wready(cfg_wready),
    .bresp(cfg_bresp), .bvalid(cfg_bvalid), .bready(cfg_bready),
    .araddr(cfg_araddr), .arvalid(cfg_arvalid), .arready(cfg_arready),
    .rdata(cfg_rdata), .rresp(cfg_rresp), .rvalid(cfg_rvalid), .rready(cfg_rready)
  );

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // Observation of the memory side: where instruction reads went.
  int unsigned ocm_reads, dram_reads, first_ok, first_checks;
  logic job_first;
  always @(posedge clk) begin
    if (m_arvalid && m_arready) begin
      if (64'(m_araddr) >= OCM_BASE && 64'(m_araddr) < OCM_BASE + NTRANS * 16) ocm_reads++;
      else dram_reads++;
      if (job_first && dut.mode == MODE_XLATE) begin
        first_checks++;
        if (64'(m_araddr) == OCM_BASE) first_ok++;
      end
      job_first <= 1'b0;
    end
    if (start) job_first <= 1'b1;
  end
  // No added latency: request and response handshakes pass in the same cycle.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (m_arvalid !== s_arvalid || s_arready !== m_arready || m_arlen !== s_arlen) begin
      failures++; $display("FAIL read address channel not a wire");
    end
  end

  task automatic run_job();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (dpu_irq);
    wait (!busy);
    repeat (5) @(negedge clk);
  endtask

  logic [31:0] v;
  int unsigned e0;
  initial begin
    ocm_reads = 0; dram_reads = 0; first_ok = 0; first_checks = 0; job_first = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // --- bypass
    run_job();
    check("bypass: instructions correct", ins_errors, 0);
    check("bypass: words", ins_words_seen, NTRANS * 4);
    check("bypass: all reads to DRAM", dram_reads, NTRANS);
    cfg.read(DICTAT_XLATE_CNT, v); check("bypass: nothing translated", v, 0);
    // --- dump
    cfg.write(DICTAT_DUMP_LO, 32'(DUMP_BASE)); cfg.write(DICTAT_DUMP_HI, 32'(DUMP_BASE >> 32));
    cfg.write(DICTAT_CTRL, 32'(MODE_DUMP));
    run_job();
    cfg.read(DICTAT_STATUS, v); check("dump done", v[0], 1);
    cfg.read(DICTAT_DUMP_WORDS, v); check("dump sniffed", v, NTRANS * 4);
    cfg.read(DICTAT_WR_WORDS, v); check("dump written", v, NTRANS * 4);
    check("dump: instructions still correct", ins_errors, 0);
    for (int t = 0; t < NTRANS; t++)
      for (int b = 0; b < 4; b++) begin
        longint a;
        a = 64'(dpu.ins_addr(t)) + 4 * b;
        check("dump content", mem.peek(DUMP_BASE + (t * 4 + b) * 4), tb_pkg::mem_word(a / 4)[31:0]);
      end
    // --- software copies the dump into the OCM once
    for (int k = 0; k < NTRANS * 4; k++) mem.poke(OCM_BASE + 4 * k, mem.peek(DUMP_BASE + 4 * k));
    // --- translate, two jobs
    cfg.write(DICTAT_OCM_LO, 32'(OCM_BASE)); cfg.write(DICTAT_OCM_HI, 32'(OCM_BASE >> 32));
    cfg.write(DICTAT_CTRL, 32'(MODE_XLATE));
    dram_reads = 0; ocm_reads = 0; e0 = ins_errors;
    run_job();
    run_job();
    check("xlate: instructions correct", ins_errors, e0);
    check("xlate: all reads to OCM", ocm_reads, 2 * NTRANS);
    check("xlate: none to DRAM", dram_reads, 0);
    check("xlate: each job restarts at OCM base", first_ok, 2);
    check("xlate: job starts seen", first_checks, 2);
    cfg.read(DICTAT_XLATE_CNT, v); check("xlate count", v, 2 * NTRANS);
    cfg.read(DICTAT_STATUS, v); check("no overflow", v[1], 0);
    cfg.read(DICTAT_CTRL, v); check("mode reads back", v, MODE_XLATE);
    cfg.read(DICTAT_OCM_HI, v); check("OCM base reads back", v, 32'(OCM_BASE >> 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
