// Self-checking test of dictat_dumper against a behavioural DRAM: sniffed
// words must land contiguously and in order at the dump address, in full
// bursts plus one shorter tail burst after the interrupt, with no word
// lost while the FIFO pushes back.
module tb_dictat_dumper;
  localparam int unsigned ADDR_W = 40, DW = 32, ID_W = 6, BURST = 16, DEPTH = 32;

  logic clk = 0, rst_n = 0, enable = 0, restart = 0, flush = 0;
  logic [ADDR_W-1:0] dump_base = 0;
  logic beat_valid, want = 0;
  logic [DW-1:0] beat_data = 0;
  logic can_accept;
  logic [ID_W-1:0] awid, bid;
  logic [ADDR_W-1:0] awaddr;
  logic [7:0] awlen;
  logic [2:0] awsize;
  logic [1:0] awburst, bresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready, busy, done;
  logic [DW-1:0] wdata;
  logic [DW/8-1:0] wstrb;
  logic [31:0] sniffed_words, written_words;
  int checks = 0, failures = 0, stall_cycles = 0, bursts = 0, short_bursts = 0;

  assign beat_valid = want && can_accept;

  dictat_dumper #(.ADDR_W(ADDR_W), .DW(DW), .ID_W(ID_W), .BURST(BURST), .DEPTH(DEPTH)) dut (.*);

  logic [ID_W-1:0] rid_u; logic [DW-1:0] rdata_u; logic [1:0] rresp_u;
  logic rlast_u, rvalid_u, arready_u;
  axi_mem_model #(.DW(DW), .ADDR_W(ADDR_W), .ID_W(ID_W), .WR_LAT(30), .GAPS(1)) mem (
    .clk, .rst_n, .arid('0), .araddr('0), .arlen('0), .arsize('0), .arburst('0),
    .arvalid(1'b0), .arready(arready_u), .rid(rid_u), .rdata(rdata_u), .rresp(rresp_u),
    .rlast(rlast_u), .rvalid(rvalid_u), .rready(1'b1),
    .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready
  );

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // every write burst: INCR, word size, full length except a final tail
  always @(posedge clk) if (awvalid && awready) begin
    bursts++;
    checks++;
    if (awburst != 2'b01 || awsize != 3'd2 || awlen > 8'(BURST - 1)) begin
      failures++; $display("FAIL burst shape len=%0d", awlen);
    end
    if (awlen != 8'(BURST - 1)) short_bursts++;
  end
  always @(posedge clk) if (enable && want && !can_accept) stall_cycles++;

  // dump n words; data of word k is seed+k*7
  task automatic dump(input longint base, input int n, input int density, input logic [31:0] seed);
    int sent;
    @(negedge clk); dump_base = ADDR_W'(base); restart = 1; enable = 1;
    @(negedge clk); restart = 0;
    sent = 0;
    while (sent < n) begin
      want = ($urandom % 100) < density;
      beat_data = seed + 32'(sent) * 7;
      @(posedge clk);
      if (beat_valid) sent++;
      @(negedge clk);
    end
    want = 0;
    repeat (5) @(negedge clk);
    check("not done before interrupt", done, 0);
    flush = 1; @(negedge clk); flush = 0;
    // words presented after the interrupt are ignored
    want = 1; beat_data = 32'hDEAD_BEEF; @(negedge clk); want = 0;
    wait (done);
    @(negedge clk);
    check("sniffed", sniffed_words, n);
    check("written", written_words, n);
    for (int k = 0; k < n; k++)
      check($sformatf("word %0d", k), mem.peek(64'(base) + 4 * k), seed + 32'(k) * 7);
    check("word after dump untouched", mem.peek(64'(base) + 4 * n),
          tb_pkg::mem_word((64'(base) + 4 * n) / 4)[31:0]);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // dense traffic: the FIFO fills while write responses are awaited
    dump(40'h00_8000_0000, 200, 100, 32'h1000);
    check("back-pressure happened", stall_cycles > 0, 1);
    check("one tail burst", short_bursts, 1);
    check("burst count", bursts, (200 + BURST - 1) / BURST);
    // sparse traffic, second dump at a new address, exact multiple of BURST
    bursts = 0; short_bursts = 0;
    dump(40'h00_9000_0400, 64, 30, 32'hABC0_0000);
    check("no tail burst", short_bursts, 0);
    check("burst count 2", bursts, 4);
    // disabled: nothing is sniffed
    @(negedge clk); enable = 0; restart = 1; @(negedge clk); restart = 0;
    want = 1; repeat (10) @(negedge clk); want = 0;
    check("disabled sniffs nothing", sniffed_words, 0);
    check("disabled never busy", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
