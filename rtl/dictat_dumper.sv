// DICTAT instruction dumper: records the instruction words the DPU fetches
// and writes them, in fetch order and back to back, into a DRAM buffer.
//
// While `enable` is high every read data beat accepted by the DPU on its
// instruction port (`beat_valid`, i.e. RVALID && RREADY) is pushed into a
// FIFO. A small write engine empties the FIFO with AXI4 INCR write bursts
// of BURST beats to dump_base, dump_base + BURST*DW/8, ... The DPU
// interrupt (`flush`) marks the end of the job: no further beats are taken,
// the remaining words go out in one shorter burst, and `done` rises once
// the last write response has arrived. Writing CTRL again (`restart`)
// empties the FIFO and starts a new dump at dump_base.
//
// `can_accept` is low while the FIFO is full; the enclosing block uses it
// to hold the instruction read data channel, so no word is ever lost. This
// stall can only occur during the one-off dump job. Engine sequence per
// burst: address phase (AWVALID until AWREADY), then BURST data beats, then
// the write response; one burst in flight at a time. dump_base is assumed
// aligned to BURST*DW/8 bytes so no burst crosses a 4 KB boundary.
// The sniff-and-write-contiguously function is from the DICTAT description;
// the FIFO, burst size and engine sequencing are this design's choices.
module dictat_dumper #(
  parameter int unsigned ADDR_W = 40,
  parameter int unsigned DW     = 32,
  parameter int unsigned ID_W   = 6,
  parameter int unsigned BURST  = 16,   // beats per dump write burst
  parameter int unsigned DEPTH  = 32    // FIFO words, >= BURST
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                enable,     // dump mode
  input  logic                restart,    // start a new dump
  input  logic                flush,      // DPU interrupt: job finished
  input  logic [ADDR_W-1:0]   dump_base,
  // sniffed instruction beats
  input  logic                beat_valid,
  input  logic [DW-1:0]       beat_data,
  output logic                can_accept,
  // AXI4 write manager towards DRAM
  output logic [ID_W-1:0]     awid,
  output logic [ADDR_W-1:0]   awaddr,
  output logic [7:0]          awlen,
  output logic [2:0]          awsize,
  output logic [1:0]          awburst,
  output logic                awvalid,
  input  logic                awready,
  output logic [DW-1:0]       wdata,
  output logic [DW/8-1:0]     wstrb,
  output logic                wlast,
  output logic                wvalid,
  input  logic                wready,
  input  logic [ID_W-1:0]     bid,
  input  logic [1:0]          bresp,
  input  logic                bvalid,
  output logic                bready,
  // status
  output logic                busy,
  output logic                done,
  output logic [31:0]         sniffed_words,
  output logic [31:0]         written_words
);
  localparam int unsigned BYTES = DW / 8;
  localparam int unsigned CW    = $clog2(DEPTH) + 1;

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_DATA, S_RESP} state_e;
  state_e state;

  logic          fifo_full, fifo_empty, push, pop;
  logic [CW-1:0] fifo_count;
  logic [DW-1:0] fifo_head;
  logic          ended;       // interrupt seen: stop sniffing, drain
  logic [8:0]    beats;       // beats of the current burst
  logic [8:0]    sent;        // beats already sent in the current burst
  logic [ADDR_W-1:0] wr_addr;
  logic          start_full, start_tail;

  assign push       = enable && !ended && beat_valid && !fifo_full;
  assign pop        = (state == S_DATA) && wready;
  assign can_accept = !(enable && !ended && fifo_full);

  sync_fifo #(.W(DW), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(restart),
    .push, .wr_data(beat_data), .pop,
    .rd_data(fifo_head), .full(fifo_full), .empty(fifo_empty),
    .count(fifo_count)
  );

  assign start_full = (fifo_count >= CW'(BURST));
  assign start_tail = ended && !fifo_empty;

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      state         <= S_IDLE;
      ended         <= 1'b0;
      beats         <= '0;
      sent          <= '0;
      wr_addr       <= dump_base;
      sniffed_words <= '0;
      written_words <= '0;
    end else begin
      if (enable && flush) ended <= 1'b1;
      if (push) sniffed_words <= sniffed_words + 1'b1;
      case (state)
        S_IDLE: begin
          if (enable && (start_full || start_tail)) begin
            beats <= start_full ? 9'(BURST) : 9'(fifo_count);
            sent  <= '0;
            state <= S_ADDR;
          end
        end
        S_ADDR: if (awready) state <= S_DATA;
        S_DATA: begin
          if (wready) begin
            sent          <= sent + 1'b1;
            written_words <= written_words + 1'b1;
            if (sent + 1'b1 == beats) state <= S_RESP;
          end
        end
        S_RESP: begin
          if (bvalid) begin
            wr_addr <= wr_addr + ADDR_W'(beats) * ADDR_W'(BYTES);
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign awid    = '0;
  assign awaddr  = wr_addr;
  assign awlen   = 8'(beats - 1'b1);
  assign awsize  = 3'($clog2(BYTES));
  assign awburst = 2'b01;   // INCR
  assign awvalid = (state == S_ADDR);
  assign wdata   = fifo_head;
  assign wstrb   = '1;
  assign wvalid  = (state == S_DATA);
  assign wlast   = (state == S_DATA) && (sent + 1'b1 == beats);
  assign bready  = (state == S_RESP);

  assign busy = (state != S_IDLE) || !fifo_empty;
  assign done = enable && ended && !busy;

  // The response ID and code are not checked: the dump buffer is plain DRAM.
  logic unused_b;
  assign unused_b = ^{bid, bresp};

  // A write burst only starts with as many words as it will send.
  a_data_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 wvalid |-> !fifo_empty);

endmodule
