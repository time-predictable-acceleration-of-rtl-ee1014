// Self-checking test of dictat_addr_xlate: pass-through when disabled,
// contiguous re-addressing of bursts of any length and size, restart at
// the start of the copy, zero added latency, and the OCM overflow flag.
module tb_dictat_addr_xlate;
  localparam int unsigned ADDR_W = 40;
  localparam int unsigned OCM_BYTES = 4096;   // small copy so overflow is reachable

  logic clk = 0, rst_n = 0, enable = 0, restart = 0, ar_hs = 0;
  logic [ADDR_W-1:0] ocm_base = 40'hFF_FFFC_0000, s_araddr = 0, m_araddr;
  logic [7:0] s_arlen = 0;
  logic [2:0] s_arsize = 0;
  logic overflow;
  logic [31:0] xlate_count;
  int checks = 0, failures = 0;
  longint exp_off;

  dictat_addr_xlate #(.ADDR_W(ADDR_W), .OCM_BYTES(OCM_BYTES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // present one request; the translated address must be there in the same
  // cycle (combinational path, no added latency)
  task automatic req(input longint addr, input int len, input int size, input bit hs);
    @(negedge clk);
    s_araddr = ADDR_W'(addr); s_arlen = 8'(len); s_arsize = 3'(size); ar_hs = hs;
    #1;
    check("same-cycle address", m_araddr,
          enable ? ADDR_W'(ocm_base + exp_off) : ADDR_W'(addr));
    @(posedge clk);
    if (enable && hs) exp_off += (len + 1) << size;
    #1 ar_hs = 0;
  endtask

  initial begin
    exp_off = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // disabled: addresses pass through
    for (int i = 0; i < 20; i++) req(40'h12_3456_7000 + i * 64, $urandom % 16, 2, 1);
    check("no translation counted", xlate_count, 0);
    // enabled: instruction-style 4-beat bursts of 4 bytes from scattered buffers
    @(negedge clk); enable = 1;
    for (int i = 0; i < 40; i++) req(40'h10_0000_0000 + (i / 10) * 40'h10_0000 + (i % 10) * 16, 3, 2, 1);
    check("offset after 40 bursts", exp_off, 640);
    // a request held without handshake does not advance
    req(40'h1_0000, 3, 2, 0);
    req(40'h1_0000, 3, 2, 0);
    // other burst lengths and sizes
    req(40'h2_0000, 0, 2, 1);
    req(40'h2_0100, 255, 2, 1);
    req(40'h2_0500, 7, 3, 1);
    check("translated count", xlate_count, 43);
    check("no overflow yet", overflow, 0);
    // restart (job boundary) returns to the start of the copy
    @(negedge clk); restart = 1; @(negedge clk); restart = 0; exp_off = 0;
    for (int i = 0; i < 5; i++) req(40'h10_0000_0000 + i * 16, 3, 2, 1);
    check("after restart", exp_off, 80);
    // run past the end of the copy: overflow is flagged and sticky
    for (int i = 0; i < 16; i++) req(40'h3_0000 + i * 1024, 255, 2, 1);
    check("overflow flagged", overflow, 1);
    @(negedge clk); restart = 1; @(negedge clk); restart = 0; exp_off = 0;
    check("overflow sticky over restart", overflow, 1);
    // disabling clears the session status
    @(negedge clk); enable = 0; @(negedge clk);
    check("overflow cleared", overflow, 0);
    check("count cleared", xlate_count, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
