// Behavioural AXI4 memory subordinate (DRAM or OCM stand-in), testbench only.
//
// Sparse memory of DW-bit words; a word never written reads as
// tb_pkg::mem_word(address / (DW/8)). Reads are served strictly in request
// order: the first beat of a request is returned no earlier than RD_LAT
// cycles after its address handshake, then one beat per cycle (with random
// one-cycle gaps when GAPS=1). Writes: data beats are stored as they arrive
// (INCR addressing), and the response is given WR_LAT cycles after the last
// beat. Up to MAX_OUTS reads and MAX_OUTS writes are accepted at once.
// ARREADY/AWREADY/WREADY drop at random when GAPS=1.
module axi_mem_model #(
  parameter int unsigned DW       = 32,
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned ID_W     = 6,
  parameter int unsigned RD_LAT   = 40,
  parameter int unsigned WR_LAT   = 30,
  parameter int unsigned MAX_OUTS = 16,
  parameter bit          GAPS     = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   arid,
  input  logic [ADDR_W-1:0] araddr,
  input  logic [7:0]        arlen,
  input  logic [2:0]        arsize,
  input  logic [1:0]        arburst,
  input  logic              arvalid,
  output logic              arready,
  output logic [ID_W-1:0]   rid,
  output logic [DW-1:0]     rdata,
  output logic [1:0]        rresp,
  output logic              rlast,
  output logic              rvalid,
  input  logic              rready,
  input  logic [ID_W-1:0]   awid,
  input  logic [ADDR_W-1:0] awaddr,
  input  logic [7:0]        awlen,
  input  logic [2:0]        awsize,
  input  logic [1:0]        awburst,
  input  logic              awvalid,
  output logic              awready,
  input  logic [DW-1:0]     wdata,
  input  logic [DW/8-1:0]   wstrb,
  input  logic              wlast,
  input  logic              wvalid,
  output logic              wready,
  output logic [ID_W-1:0]   bid,
  output logic [1:0]        bresp,
  output logic              bvalid,
  input  logic              bready
);
  localparam int unsigned BYTES = DW / 8;

  typedef struct {
    logic [ADDR_W-1:0] addr;
    int unsigned       beats;
    logic [ID_W-1:0]   id;
    longint unsigned   due;
  } req_t;

  logic [DW-1:0] mem [longint unsigned];
  req_t rq[$], wq[$], bq[$];
  longint unsigned now;
  int unsigned rbeat, wbeat;
  int unsigned writes_done;

  function automatic logic [DW-1:0] read_word(input longint unsigned waddr);
    if (mem.exists(waddr)) return mem[waddr];
    return DW'(tb_pkg::mem_word(64'(waddr)));
  endfunction

  // Word access for the testbench (word address = byte address / BYTES).
  function automatic logic [DW-1:0] peek(input longint unsigned byte_addr);
    return read_word(byte_addr / BYTES);
  endfunction
  task automatic poke(input longint unsigned byte_addr, input logic [DW-1:0] v);
    mem[byte_addr / BYTES] = v;
  endtask

  logic stall;   // random back-pressure on the request channels
  always_comb begin
    arready = rst_n && !stall && (rq.size() < MAX_OUTS);
    awready = rst_n && !stall && (wq.size() < MAX_OUTS);
    wready  = rst_n && !stall && (wq.size() > 0);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      rvalid <= 1'b0; rlast <= 1'b0; rdata <= '0; rid <= '0; rresp <= 2'b00;
      bvalid <= 1'b0; bid <= '0; bresp <= 2'b00;
      rq.delete(); wq.delete(); bq.delete();
      now = 0; rbeat = 0; wbeat = 0; writes_done = 0;
      stall <= 1'b0;
    end else begin
      now++;
      stall <= GAPS && ($urandom % 5 == 0);
      // ---------------- read side
      if (rvalid && rready) begin
        rbeat++;
        if (rlast) begin
          void'(rq.pop_front());
          rbeat = 0;
        end
      end
      if (arvalid && arready) begin
        req_t r;
        r.addr = araddr; r.beats = int'(arlen) + 1; r.id = arid; r.due = now + RD_LAT;
        rq.push_back(r);
      end
      if ((!rvalid || rready)) begin
        if (rq.size() > 0 && rq[0].due <= now && !(GAPS && ($urandom % 4 == 0))) begin
          rvalid <= 1'b1;
          rid    <= rq[0].id;
          rdata  <= read_word(64'(rq[0].addr) / BYTES + rbeat);
          rlast  <= (rbeat + 1 == rq[0].beats);
          rresp  <= 2'b00;
        end else begin
          rvalid <= 1'b0;
          rlast  <= 1'b0;
        end
      end
      // ---------------- write side
      if (bvalid && bready) begin
        bvalid <= 1'b0;
        writes_done++;
      end
      if (wvalid && wready) begin
        mem[64'(wq[0].addr) / BYTES + wbeat] = wdata;
        wbeat++;
        if (wlast) begin
          req_t b;
          b = wq.pop_front();
          b.due = now + WR_LAT;
          bq.push_back(b);
          wbeat = 0;
        end
      end
      if (awvalid && awready) begin
        req_t w;
        w.addr = awaddr; w.beats = int'(awlen) + 1; w.id = awid; w.due = 0;
        wq.push_back(w);
      end
      if ((!bvalid || bready) && bq.size() > 0 && bq[0].due <= now) begin
        req_t b;
        b = bq.pop_front();
        bvalid <= 1'b1;
        bid    <= b.id;
      end
    end
  end

  logic unused;
  assign unused = ^{arsize, arburst, awsize, awburst, wstrb};

endmodule
