// DICTAT address translator: redirects the DPU's instruction reads to a
// contiguous copy of the instruction stream held in on-chip memory (OCM).
//
// The DPU fetches its instructions from several small DRAM buffers, always
// in the same order for a given network. Once that stream has been dumped
// contiguously and copied to the OCM, the k-th byte the DPU asks for is the
// k-th byte of the copy. The translator therefore keeps a running byte
// offset: each accepted read request is sent to ocm_base + offset instead of
// its own address, and the offset then advances by the request's size,
// (ARLEN+1) << ARSIZE bytes, so any burst length is supported. `restart`
// (the DPU interrupt that ends a job, or a new configuration) returns the
// offset to the start of the copy for the next job. With `enable` low the
// request address passes through unchanged.
//
// Timing: the address path is combinational (request in, request out in the
// same cycle), so no latency is added on the read address channel; only the
// offset is a register. A request that would read past OCM_BYTES sets the
// sticky `overflow` flag (the copy did not fit) and is still issued.
// Assumes INCR bursts whose size is a multiple of the offset alignment,
// as instruction fetches are.
module dictat_addr_xlate #(
  parameter int unsigned ADDR_W    = 40,
  parameter int unsigned OCM_BYTES = 262144   // 256 KB OCM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,     // translate mode
  input  logic              restart,    // back to the start of the copy
  input  logic [ADDR_W-1:0] ocm_base,
  // read address request from the DPU, and its handshake
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic [7:0]        s_arlen,
  input  logic [2:0]        s_arsize,
  input  logic              ar_hs,
  // translated address towards memory
  output logic [ADDR_W-1:0] m_araddr,
  output logic              overflow,
  output logic [31:0]       xlate_count
);
  logic [ADDR_W-1:0] offset;
  logic [ADDR_W-1:0] req_bytes;
  logic [ADDR_W-1:0] next_offset;

  assign req_bytes   = ADDR_W'(9'(s_arlen) + 9'd1) << s_arsize;
  assign next_offset = offset + req_bytes;
  assign m_araddr    = enable ? (ocm_base + offset) : s_araddr;

  always_ff @(posedge clk) begin
    if (!rst_n || restart) begin
      offset <= '0;
    end else if (enable && ar_hs) begin
      offset <= next_offset;
    end
  end

  // Overflow and the request counter describe a whole dump/translate
  // session, so they clear on reset or when translation is switched off.
  always_ff @(posedge clk) begin
    if (!rst_n || !enable) begin
      overflow    <= 1'b0;
      xlate_count <= '0;
    end else if (ar_hs) begin
      xlate_count <= xlate_count + 1'b1;
      if (next_offset > ADDR_W'(OCM_BYTES)) overflow <= 1'b1;
    end
  end

endmodule
