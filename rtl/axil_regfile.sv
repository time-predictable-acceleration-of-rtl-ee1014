// AXI4-Lite subordinate front end for a bank of 32-bit registers.
//
// A write is accepted when its address and data are both valid; AWREADY and
// WREADY rise together for one cycle and a write response follows in the
// next cycle. The accepted write is handed to the owner as a one-cycle
// wr_en pulse with the register index (byte address / 4) and the data; the
// owner decides what each register does. A read is accepted when no read
// response is pending; the value of rd_regs[index] is registered and
// returned one cycle later. Indices beyond NREGS read as zero. Byte strobes
// are ignored: registers are written as whole words. Responses are always
// OKAY. One transaction of each kind is in flight at a time.
module axil_regfile #(
  parameter int unsigned NREGS  = 8,
  parameter int unsigned ADDR_W = 12
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // AXI4-Lite subordinate
  input  logic [ADDR_W-1:0]         awaddr,
  input  logic                      awvalid,
  output logic                      awready,
  input  logic [31:0]               wdata,
  input  logic [3:0]                wstrb,
  input  logic                      wvalid,
  output logic                      wready,
  output logic [1:0]                bresp,
  output logic                      bvalid,
  input  logic                      bready,
  input  logic [ADDR_W-1:0]         araddr,
  input  logic                      arvalid,
  output logic                      arready,
  output logic [31:0]               rdata,
  output logic [1:0]                rresp,
  output logic                      rvalid,
  input  logic                      rready,
  // register bank side
  output logic                      wr_en,
  output logic [ADDR_W-3:0]         wr_idx,
  output logic [31:0]               wr_data,
  input  logic [NREGS-1:0][31:0]    rd_regs
);
  logic          wr_accept;
  logic [ADDR_W-3:0] ridx;

  assign wr_accept = awvalid && wvalid && !bvalid;
  assign awready   = wr_accept;
  assign wready    = wr_accept;
  assign bresp     = 2'b00;
  assign rresp     = 2'b00;
  assign arready   = !rvalid;
  assign ridx      = araddr[ADDR_W-1:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bvalid  <= 1'b0;
      rvalid  <= 1'b0;
      rdata   <= '0;
      wr_en   <= 1'b0;
      wr_idx  <= '0;
      wr_data <= '0;
    end else begin
      wr_en <= wr_accept;
      if (wr_accept) begin
        wr_idx  <= awaddr[ADDR_W-1:2];
        wr_data <= wdata;
        bvalid  <= 1'b1;
      end else if (bready) begin
        bvalid <= 1'b0;
      end
      if (arvalid && arready) begin
        rvalid <= 1'b1;
        rdata  <= (32'(ridx) < NREGS) ? rd_regs[ridx] : 32'h0;
      end else if (rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  // wstrb is accepted but not used: whole-word writes only.
  logic unused_strb;
  assign unused_strb = ^wstrb;

endmodule
