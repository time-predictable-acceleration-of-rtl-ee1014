// AXI4-Lite manager for testbenches: write() and read() tasks, one
// transaction at a time, word registers addressed by index (byte = 4*idx).
module axil_driver #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  output logic [AW-1:0] awaddr,
  output logic          awvalid,
  input  logic          awready,
  output logic [31:0]   wdata,
  output logic [3:0]    wstrb,
  output logic          wvalid,
  input  logic          wready,
  input  logic [1:0]    bresp,
  input  logic          bvalid,
  output logic          bready,
  output logic [AW-1:0] araddr,
  output logic          arvalid,
  input  logic          arready,
  input  logic [31:0]   rdata,
  input  logic [1:0]    rresp,
  input  logic          rvalid,
  output logic          rready
);
  initial begin
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '1; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
  end

  task automatic write(input int idx, input logic [31:0] v);
    @(negedge clk);
    awaddr = AW'(idx * 4); awvalid = 1; wdata = v; wvalid = 1; bready = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    @(posedge clk); @(negedge clk); bready = 0;
  endtask

  task automatic read(input int idx, output logic [31:0] v);
    @(negedge clk);
    araddr = AW'(idx * 4); arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    v = rdata;
    @(posedge clk); @(negedge clk); rready = 0;
  endtask

  logic unused;
  assign unused = ^{bresp, rresp};
endmodule
