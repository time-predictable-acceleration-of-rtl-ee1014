// Self-checking test of axi_port_monitor: random AXI handshake traffic,
// with a reference model kept by the testbench, over two counting windows
// separated by a paused stretch and a clear. A final directed window checks
// the latency measurement: groups of in-order reads and writes with known
// response delays (some with the ready held low), a burst of more reads
// than the timestamp FIFO holds (timing must pause, not mis-pair), and reads
// after the port has drained (timing must resume).
module tb_axi_port_monitor;
  import dpu_pl_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic arvalid = 0, arready = 0, rvalid = 0, rready = 0, rlast = 0;
  logic awvalid = 0, awready = 0, wvalid = 0, wready = 0, wlast = 0, bvalid = 0, bready = 0;
  logic [7:0] arlen = 0, awlen = 0;
  port_stats_t stats;
  logic rd_active, wr_active;
  int checks = 0, failures = 0;

  axi_port_monitor dut (.*);

  always #5 clk = ~clk;

  // reference
  longint r_rd_trans, r_rd_words, r_rd_act, r_wr_trans, r_wr_words, r_wr_act;
  int r_rd_outs, r_wr_outs, r_max_rd, r_max_wr, r_rmin, r_rmax, r_wmin, r_wmax;

  task automatic ref_clear();
    r_rd_trans = 0; r_rd_words = 0; r_rd_act = 0; r_wr_trans = 0; r_wr_words = 0;
    r_wr_act = 0; r_max_rd = 0; r_max_wr = 0; r_rmin = 511; r_rmax = 0;
    r_wmin = 511; r_wmax = 0;
  endtask

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_all(input string tag);
    check({tag, " rd_trans"},  stats.rd_trans,  r_rd_trans);
    check({tag, " rd_words"},  stats.rd_words,  r_rd_words);
    check({tag, " rd_active"}, stats.rd_active, r_rd_act);
    check({tag, " wr_trans"},  stats.wr_trans,  r_wr_trans);
    check({tag, " wr_words"},  stats.wr_words,  r_wr_words);
    check({tag, " wr_active"}, stats.wr_active, r_wr_act);
    check({tag, " max_rd"},    stats.max_rd_outs, r_max_rd);
    check({tag, " max_wr"},    stats.max_wr_outs, r_max_wr);
    check({tag, " rd_min"},    stats.rd_blen_min, r_rmin);
    check({tag, " rd_max"},    stats.rd_blen_max, r_rmax);
    check({tag, " wr_min"},    stats.wr_blen_min, r_wmin);
    check({tag, " wr_max"},    stats.wr_blen_max, r_wmax);
  endtask

  // one cycle of random traffic; the reference is updated at the same edge
  task automatic cycle(input bit count);
    @(negedge clk);
    arvalid = ($urandom % 3 == 0); arready = ($urandom % 2 == 0);
    arlen   = ($urandom % 8 == 0) ? 8'd255 : 8'($urandom % 16);
    rvalid  = (r_rd_outs > 0) && ($urandom % 2 == 0); rready = ($urandom % 4 != 0);
    rlast   = ($urandom % 3 == 0);
    awvalid = ($urandom % 4 == 0); awready = ($urandom % 2 == 0);
    awlen   = 8'($urandom % 64);
    wvalid  = ($urandom % 3 == 0); wready = ($urandom % 2 == 0);
    bvalid  = (r_wr_outs > 0) && ($urandom % 3 == 0); bready = ($urandom % 2 == 0);
    en      = count;
    // expected active flags, compared with the combinational outputs
    checks++;
    #1;
    if (rd_active !== (arvalid || r_rd_outs > 0) || wr_active !== (awvalid || wvalid || r_wr_outs > 0)) begin
      failures++; $display("FAIL active flags");
    end
    @(posedge clk);
    if (arvalid && arready) r_rd_outs++;
    if (rvalid && rready && rlast) r_rd_outs--;
    if (awvalid && awready) r_wr_outs++;
    if (bvalid && bready) r_wr_outs--;
    if (count) begin
      if (arvalid && arready) begin
        r_rd_trans++;
        if (arlen + 1 < r_rmin) r_rmin = arlen + 1;
        if (arlen + 1 > r_rmax) r_rmax = arlen + 1;
      end
      if (rvalid && rready) r_rd_words++;
      if (awvalid && awready) begin
        r_wr_trans++;
        if (awlen + 1 < r_wmin) r_wmin = awlen + 1;
        if (awlen + 1 > r_wmax) r_wmax = awlen + 1;
      end
      if (wvalid && wready) r_wr_words++;
      if (arvalid || (r_rd_outs + ((rvalid && rready && rlast) ? 1 : 0) - ((arvalid && arready) ? 1 : 0)) > 0) r_rd_act++;
      if (awvalid || wvalid || (r_wr_outs + ((bvalid && bready) ? 1 : 0) - ((awvalid && awready) ? 1 : 0)) > 0) r_wr_act++;
      if (r_rd_outs > r_max_rd) r_max_rd = r_rd_outs;
      if (r_wr_outs > r_max_wr) r_max_wr = r_wr_outs;
    end
  endtask

  // cycle count, advanced at each rising edge (stable when stimulus changes)
  int cyc = 0;
  always @(posedge clk) cyc++;

  // Directed reads: n addresses back to back, then the data of each read
  // first presented lat[j] cycles after its address (or later, after the
  // previous burst); read 1 of a group waits 3 cycles for RREADY.
  int exp_rd_lat, exp_wr_lat;
  task automatic rd_group(input int n, input int lat, input bit timed);
    int t[$];
    for (int j = 0; j < n; j++) begin
      @(negedge clk); arvalid = 1; arready = 1; arlen = 8'(j % 3); t.push_back(cyc);
    end
    @(negedge clk); arvalid = 0; arready = 0;
    for (int j = 0; j < n; j++) begin
      while (cyc < t[j] + lat + 2 * j) @(negedge clk);
      rvalid = 1; rlast = (j % 3 == 0); rready = (j != 1);
      if (timed && cyc - t[j] > exp_rd_lat) exp_rd_lat = cyc - t[j];
      if (j == 1) begin repeat (3) @(negedge clk); rready = 1; end
      for (int b = 0; b <= j % 3; b++) begin
        if (b > 0) @(negedge clk);
        rlast = (b == j % 3);
      end
      @(negedge clk); rvalid = 0; rlast = 0; rready = 0;
      r_rd_outs--;
    end
  endtask

  // Directed write: address, 2 data beats, response lat cycles after WLAST
  // (BREADY low for 2 cycles when hold is set).
  task automatic wr_one(input int lat, input bit hold);
    int t;
    @(negedge clk); awvalid = 1; awready = 1; awlen = 1;
    @(negedge clk); awvalid = 0; awready = 0; wvalid = 1; wready = 1; wlast = 0;
    @(negedge clk); wlast = 1; t = cyc;
    @(negedge clk); wvalid = 0; wready = 0; wlast = 0;
    while (cyc < t + lat) @(negedge clk);
    bvalid = 1; bready = !hold;
    if (cyc - t > exp_wr_lat) exp_wr_lat = cyc - t;
    if (hold) begin repeat (2) @(negedge clk); bready = 1; end
    @(negedge clk); bvalid = 0; bready = 0;
  endtask

  initial begin
    r_rd_outs = 0; r_wr_outs = 0;
    ref_clear();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // idle statistics after reset: minima at their start value
    @(negedge clk);
    check("reset rd_min", stats.rd_blen_min, 511);
    check("reset trans", stats.rd_trans, 0);
    // window 1
    repeat (2000) cycle(1);
    @(negedge clk); en = 0; arvalid = 0; awvalid = 0; wvalid = 0; rvalid = 0; bvalid = 0;
    @(negedge clk);
    check_all("w1");
    // paused: traffic but no counting
    repeat (300) cycle(0);
    @(negedge clk); en = 0; arvalid = 0; awvalid = 0; wvalid = 0; rvalid = 0; bvalid = 0;
    @(negedge clk);
    check_all("paused");
    // clear, then window 2 starting with traffic in flight
    clear = 1; @(negedge clk); clear = 0;
    ref_clear();
    repeat (1500) cycle(1);
    @(negedge clk); en = 0; arvalid = 0; awvalid = 0; wvalid = 0; rvalid = 0; bvalid = 0;
    @(negedge clk);
    check_all("w2");
    check("saw 256-beat burst", r_rmax, 256);
    // drain what the random traffic left in flight
    while (r_rd_outs > 0 || r_wr_outs > 0) begin
      @(negedge clk);
      rvalid = (r_rd_outs > 0); rready = 1; rlast = 1;
      bvalid = (r_wr_outs > 0); bready = 1;
      @(posedge clk);
      if (rvalid) r_rd_outs--;
      if (bvalid) r_wr_outs--;
    end
    @(negedge clk); rvalid = 0; bvalid = 0; rlast = 0;
    // latency window
    clear = 1; @(negedge clk); clear = 0; en = 1;
    exp_rd_lat = 0; exp_wr_lat = 0;
    check("cleared rd latency", stats.rd_lat_max, 0);
    r_rd_outs = 3; rd_group(3, 12, 1);
    r_rd_outs = 3; rd_group(3, 41, 1);
    r_rd_outs = 2; rd_group(2, 7, 1);
    @(negedge clk);
    check("read latency", stats.rd_lat_max, exp_rd_lat);
    check("read latency is the 41-cycle group", exp_rd_lat >= 41 && exp_rd_lat <= 50, 1);
    // 20 reads in flight: more than the timestamp FIFO, so not timed
    r_rd_outs = 20; rd_group(20, 100, 0);
    @(negedge clk);
    check("over-full FIFO not timed", stats.rd_lat_max, exp_rd_lat);
    // drained: timing resumes
    r_rd_outs = 2; rd_group(2, 60, 1);
    @(negedge clk);
    check("timing resumes", stats.rd_lat_max, exp_rd_lat);
    check("resumed latency is the 60-cycle group", exp_rd_lat >= 60, 1);
    wr_one(10, 0);
    wr_one(30, 1);
    wr_one(5, 1);
    @(negedge clk);
    check("write latency", stats.wr_lat_max, exp_wr_lat);
    check("write latency value", exp_wr_lat, 30);
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
