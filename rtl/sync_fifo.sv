// Single-clock first-in first-out buffer.
//
// DEPTH entries of W bits held in a register array addressed by read and
// write pointers one bit wider than the index, so full and empty are told
// apart by the extra bit. Push and pop may happen in the same cycle; a push
// when full or a pop when empty is ignored. The head entry is visible on
// rd_data while !empty (first-word fall-through). Synchronous active-low
// reset empties the buffer; the storage itself is not cleared.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 32   // power of two
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,   // empty the buffer
  input  logic                       push,
  input  logic [W-1:0]               wr_data,
  input  logic                       pop,
  output logic [W-1:0]               rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH):0]     count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_push, do_pop;

  assign count   = wptr - rptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (wptr == rptr);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wr_data;
  end

endmodule
