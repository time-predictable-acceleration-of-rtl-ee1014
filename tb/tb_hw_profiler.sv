// Self-checking test of hw_profiler with scripted DPU port activity whose
// per-job figures are known in advance: transactions, words, phase times,
// overlaps, elaboration time, outstanding parallelism, burst lengths,
// S-port accesses, memory latencies, start on the first request and stop
// at the interrupt. Three jobs of different shapes (a full one, one cut
// short by the interrupt, a write-only one) also exercise the job history
// (min, max and sum per phase), which is compared with a reference built
// from the per-job registers, and its clearing.
module tb_hw_profiler;
  import dpu_pl_pkg::*;

  logic clk = 0, rst_n = 0, dpu_irq = 0;
  logic ins_arvalid = 0, ins_arready = 1, ins_rvalid = 0, ins_rready = 1, ins_rlast = 0;
  logic [7:0] ins_arlen = 0, dat_arlen = 0, dat_awlen = 0;
  logic dat_arvalid = 0, dat_arready = 1, dat_rvalid = 0, dat_rready = 1, dat_rlast = 0;
  logic dat_awvalid = 0, dat_awready = 1, dat_wvalid = 0, dat_wready = 1, dat_wlast = 0, dat_bvalid = 0, dat_bready = 1;
  logic s_awvalid = 0, s_awready = 1, s_arvalid = 0, s_arready = 1;
  logic [11:0] cfg_awaddr, cfg_araddr; logic cfg_awvalid, cfg_awready, cfg_wvalid, cfg_wready;
  logic [31:0] cfg_wdata, cfg_rdata; logic [3:0] cfg_wstrb; logic [1:0] cfg_bresp, cfg_rresp;
  logic cfg_bvalid, cfg_bready, cfg_arvalid, cfg_arready, cfg_rvalid, cfg_rready;
  logic prof_done;
  int checks = 0, failures = 0;

  hw_profiler dut (.*);
  axil_driver #(.AW(12)) cfg (
    .clk, .awaddr(cfg_awaddr), .awvalid(cfg_awvalid), .awready(cfg_awready),
    .wdata(cfg_wdata), .wstrb(cfg_wstrb), .wvalid(cfg_wvalid), .wready(cfg_wready),
    .bresp(cfg_bresp), .bvalid(cfg_bvalid), .bready(cfg_bready),
    .araddr(cfg_araddr), .arvalid(cfg_arvalid), .arready(cfg_arready),
    .rdata(cfg_rdata), .rresp(cfg_rresp), .rvalid(cfg_rvalid), .rready(cfg_rready)
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic expect_reg(input int idx, input longint exp, input string what);
    logic [31:0] v;
    cfg.read(idx, v);
    check(what, v, exp);
  endtask

  // One scripted job, cycle by cycle (cycle 0 = first request):
  //  cycles 0..1   : data reads A (len 8) and B (len 256) issued
  //  cycles 0..3   : instruction reads: 2 x 4-beat issued at cycles 0,1
  //  cycle 10..13  : instruction beats of read 1; 14..17 of read 2
  //  cycle 20      : data beats: 8 (A) then 256 (B) -> cycles 20..283
  //  cycle 30      : write issued, len 16 -> 16 beats 46..61, B at 77
  //  cycles 284..383 idle (elaboration), interrupt at 384
  // An S-port write at cycle 100.
  task automatic job();
    int c;
    c = 0;
    fork
      begin  // instruction port
        @(negedge clk); ins_arvalid = 1; ins_arlen = 3;
        @(negedge clk); @(negedge clk); ins_arvalid = 0;
        repeat (8) @(negedge clk);                       // now cycle 10
        for (int i = 0; i < 8; i++) begin
          ins_rvalid = 1; ins_rlast = (i % 4 == 3);
          @(negedge clk);
        end
        ins_rvalid = 0; ins_rlast = 0;
      end
      begin  // data reads
        @(negedge clk); dat_arvalid = 1; dat_arlen = 7;
        @(negedge clk); dat_arlen = 255;
        @(negedge clk); dat_arvalid = 0;
        repeat (18) @(negedge clk);                      // now cycle 20
        for (int i = 0; i < 264; i++) begin
          dat_rvalid = 1; dat_rlast = (i == 7 || i == 263);
          @(negedge clk);
        end
        dat_rvalid = 0; dat_rlast = 0;
      end
      begin  // data writes
        repeat (31) @(negedge clk);                      // cycle 30
        dat_awvalid = 1; dat_awlen = 15;
        @(negedge clk); dat_awvalid = 0;
        repeat (15) @(negedge clk);
        for (int i = 0; i < 16; i++) begin dat_wvalid = 1; dat_wlast = (i == 15); @(negedge clk); end
        dat_wvalid = 0; dat_wlast = 0;
        repeat (15) @(negedge clk);
        dat_bvalid = 1; @(negedge clk); dat_bvalid = 0;
      end
      begin  // software access on S during the job
        repeat (101) @(negedge clk);
        s_awvalid = 1; @(negedge clk); s_awvalid = 0;
      end
    join
  endtask

  // Reference job history, built from the per-job registers read after
  // each job.
  longint h_min[5], h_max[5], h_sum[5];
  int h_jobs;
  task automatic hist_reset();
    for (int k = 0; k < 5; k++) begin h_min[k] = 32'hFFFF_FFFF; h_max[k] = 0; h_sum[k] = 0; end
    h_jobs = 0;
  endtask
  task automatic hist_add();
    logic [31:0] t[5];
    cfg.read(PROF_INS_RD_ACTIVE, t[HIST_INS_RD]);
    cfg.read(PROF_DAT_RD_ACTIVE, t[HIST_DAT_RD]);
    cfg.read(PROF_DAT_WR_ACTIVE, t[HIST_DAT_WR]);
    cfg.read(PROF_ELAB, t[HIST_ELAB]);
    cfg.read(PROF_TOTAL, t[HIST_TOTAL]);
    for (int k = 0; k < 5; k++) begin
      if (t[k] < h_min[k]) h_min[k] = t[k];
      if (t[k] > h_max[k]) h_max[k] = t[k];
      h_sum[k] += t[k];
    end
    h_jobs++;
  endtask
  task automatic hist_check(input string tag);
    logic [31:0] lo, hi;
    expect_reg(PROF_JOBS, h_jobs, {tag, " history jobs"});
    for (int k = 0; k < 5; k++) begin
      cfg.read(PROF_HIST_BASE + 4 * k, lo);
      check($sformatf("%s history %0d min", tag, k), lo, h_min[k]);
      cfg.read(PROF_HIST_BASE + 4 * k + 1, lo);
      check($sformatf("%s history %0d max", tag, k), lo, h_max[k]);
      cfg.read(PROF_HIST_BASE + 4 * k + 2, lo);
      cfg.read(PROF_HIST_BASE + 4 * k + 3, hi);
      check($sformatf("%s history %0d sum", tag, k), {hi, lo}, h_sum[k]);
    end
  endtask

  int t0;
  initial begin
    hist_reset();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // traffic before arming is ignored
    @(negedge clk); dat_arvalid = 1; dat_arlen = 0; @(negedge clk); dat_arvalid = 0;
    dat_rvalid = 1; dat_rlast = 1; @(negedge clk); dat_rvalid = 0; dat_rlast = 0;
    cfg.write(PROF_CTRL, 32'h1);
    expect_reg(PROF_CTRL, PROF_ARMED, "armed");
    repeat (20) @(negedge clk);                 // idle while armed: not counted
    job();
    // job() returns at cycle 284; interrupt at cycle 384
    repeat (100) @(negedge clk);
    dpu_irq = 1; repeat (4) @(negedge clk); dpu_irq = 0;
    check("done flag", prof_done, 1);
    // traffic after the interrupt is not counted
    dat_arvalid = 1; repeat (3) @(negedge clk); dat_arvalid = 0;
    expect_reg(PROF_CTRL, PROF_DONE, "state done");
    expect_reg(PROF_JOBS, 1, "jobs");
    expect_reg(PROF_TOTAL, 384, "total cycles");
    expect_reg(PROF_INS_RD_TRANS, 2, "ins trans");
    expect_reg(PROF_INS_RD_WORDS, 8, "ins words");
    // instruction read active: cycles 0..17 (first request to last beat)
    expect_reg(PROF_INS_RD_ACTIVE, 18, "ins active");
    expect_reg(PROF_INS_OUTS, 2, "ins outstanding");
    expect_reg(PROF_INS_RD_BLEN, {16'd4, 16'd4}, "ins burst");
    expect_reg(PROF_DAT_RD_TRANS, 2, "data rd trans");
    expect_reg(PROF_DAT_RD_WORDS, 264, "data rd words");
    expect_reg(PROF_DAT_RD_ACTIVE, 284, "data rd active");   // cycles 0..283
    expect_reg(PROF_DAT_WR_TRANS, 1, "data wr trans");
    expect_reg(PROF_DAT_WR_WORDS, 16, "data wr words");
    expect_reg(PROF_DAT_WR_ACTIVE, 48, "data wr active");   // cycles 30..77
    expect_reg(PROF_DAT_OUTS, {8'd1, 8'd2}, "data outstanding");
    expect_reg(PROF_DAT_RD_BLEN, {16'd256, 16'd8}, "data rd burst");
    expect_reg(PROF_DAT_WR_BLEN, {16'd16, 16'd16}, "data wr burst");
    expect_reg(PROF_ELAB, 384 - 284, "elaboration cycles");
    expect_reg(PROF_OVL_INS_RD, 18, "ins/read overlap");
    expect_reg(PROF_OVL_WR_RD, 48, "write/read overlap");
    expect_reg(PROF_OVL_INS_WR, 0, "ins/write overlap");
    expect_reg(PROF_S_TRANS, 1, "S transactions");
    // latencies: instruction reads issued at 0 and 1, first data at 10 and
    // 14; data reads issued at 0 and 1, first data at 20 and 28; last write
    // beat at 61, response at 77
    expect_reg(PROF_INS_LAT, {16'd0, 16'd13}, "ins read latency");
    expect_reg(PROF_DAT_LAT, {16'd16, 16'd27}, "data read/write latency");
    hist_add();
    // re-arm clears; a job that is interrupted right away
    cfg.write(PROF_CTRL, 32'h1);
    expect_reg(PROF_TOTAL, 0, "cleared total");
    expect_reg(PROF_DAT_RD_BLEN, {16'd0, 16'd511}, "cleared burst stats");
    @(negedge clk); ins_arvalid = 1; @(negedge clk); ins_arvalid = 0;
    repeat (9) @(negedge clk);
    dpu_irq = 1; @(negedge clk); dpu_irq = 0;
    expect_reg(PROF_TOTAL, 10, "short job total");
    expect_reg(PROF_JOBS, 2, "jobs 2");
    hist_add();
    // a write-only job: cycles with only the data write port busy are not
    // elaboration. First complete the reads still outstanding from the
    // earlier steps (3 data reads, 1 instruction read).
    for (int i = 0; i < 3; i++) begin dat_rvalid = 1; dat_rlast = 1; @(negedge clk); end
    dat_rvalid = 0; dat_rlast = 0;
    ins_rvalid = 1; ins_rlast = 1; @(negedge clk); ins_rvalid = 0; ins_rlast = 0;
    cfg.write(PROF_CTRL, 32'h1);
    @(negedge clk); dat_awvalid = 1; dat_awlen = 3;
    @(negedge clk); dat_awvalid = 0;
    for (int i = 0; i < 4; i++) begin dat_wvalid = 1; dat_wlast = (i == 3); @(negedge clk); end
    dat_wvalid = 0; dat_wlast = 0;
    repeat (14) @(negedge clk);
    dat_bvalid = 1; @(negedge clk); dat_bvalid = 0;
    repeat (9) @(negedge clk);
    dpu_irq = 1; @(negedge clk); dpu_irq = 0;
    expect_reg(PROF_TOTAL, 29, "write-only job total");
    expect_reg(PROF_DAT_WR_ACTIVE, 20, "write-only job write active");
    expect_reg(PROF_ELAB, 9, "write-only job elaboration");
    expect_reg(PROF_OVL_WR_RD, 0, "write-only job overlap");
    expect_reg(PROF_DAT_LAT, {16'd15, 16'd0}, "write-only job latency");
    hist_add();
    hist_check("3 jobs");
    check("history spans different jobs", h_min[HIST_TOTAL] < h_max[HIST_TOTAL], 1);
    // clearing the history; the last job's registers stay readable
    cfg.write(PROF_CTRL, 32'h4);
    hist_reset();
    hist_check("cleared");
    expect_reg(PROF_TOTAL, 29, "job registers kept");
    // disarm
    cfg.write(PROF_CTRL, 32'h2);
    expect_reg(PROF_CTRL, PROF_IDLE, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
