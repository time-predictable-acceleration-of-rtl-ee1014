// DICTAT (DPU Instruction Dump - Address Translator): a bump in the wire
// between the DPU's instruction-fetch AXI port (M_INS) and the FPGA-to-PS
// memory interface, which lets the DPU fetch its instructions from on-chip
// memory (OCM) instead of the shared DRAM without the DPU or its driver
// knowing.
//
// Three modes, chosen in CTRL[1:0] over an AXI4-Lite register port:
//  * BYPASS - M_INS passes through unchanged.
//  * DUMP   - M_INS passes through; every instruction word returned to the
//             DPU is also copied, in fetch order, into a contiguous DRAM
//             buffer at DUMP_HI:DUMP_LO (dictat_dumper). The dump covers one
//             job and ends at the DPU interrupt; STATUS[0] then reads 1.
//             Software copies the buffer to the OCM once.
//  * XLATE  - every instruction read is re-addressed into the OCM copy at
//             OCM_HI:OCM_LO (dictat_addr_xlate); the DPU interrupt restarts
//             the translation at the start of the copy for the next job.
// Writing CTRL restarts both engines. Registers (word index, byte offset =
// 4*index): 0 CTRL, 1/2 dump base lo/hi, 3/4 OCM base lo/hi, 5 STATUS
// ([0] dump done, [1] OCM overflow, [2] dump busy), 6 words sniffed,
// 7 words written to DRAM, 8 read requests translated.
//
// Timing: the read address and read data channels go through as wires (the
// address through one adder), so DICTAT adds no cycle of latency to the
// instruction fetches. Only in DUMP mode can it hold the read data channel,
// when its dump FIFO is full. The instruction port only reads, so the
// manager side's write channels belong to the dumper alone.
// `dpu_irq` is the DPU's level interrupt; its rising edge marks the end of
// a job. Mode set, sniffing and rerouting follow the published description
// of DICTAT; register map, FIFO and stall policy are this design's choices.
module dictat
  import dpu_pl_pkg::*;
#(
  parameter int unsigned ADDR_W     = 40,
  parameter int unsigned DW         = 32,       // M_INS data width
  parameter int unsigned ID_W       = 6,
  parameter int unsigned OCM_BYTES  = 262144,   // 256 KB
  parameter int unsigned DUMP_BURST = 16,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned CFG_AW     = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                dpu_irq,
  // subordinate side: DPU M_INS read channels
  input  logic [ID_W-1:0]     s_arid,
  input  logic [ADDR_W-1:0]   s_araddr,
  input  logic [7:0]          s_arlen,
  input  logic [2:0]          s_arsize,
  input  logic [1:0]          s_arburst,
  input  logic                s_arvalid,
  output logic                s_arready,
  output logic [ID_W-1:0]     s_rid,
  output logic [DW-1:0]       s_rdata,
  output logic [1:0]          s_rresp,
  output logic                s_rlast,
  output logic                s_rvalid,
  input  logic                s_rready,
  // manager side: towards the FPGA-PS interface
  output logic [ID_W-1:0]     m_arid,
  output logic [ADDR_W-1:0]   m_araddr,
  output logic [7:0]          m_arlen,
  output logic [2:0]          m_arsize,
  output logic [1:0]          m_arburst,
  output logic                m_arvalid,
  input  logic                m_arready,
  input  logic [ID_W-1:0]     m_rid,
  input  logic [DW-1:0]       m_rdata,
  input  logic [1:0]          m_rresp,
  input  logic                m_rlast,
  input  logic                m_rvalid,
  output logic                m_rready,
  output logic [ID_W-1:0]     m_awid,
  output logic [ADDR_W-1:0]   m_awaddr,
  output logic [7:0]          m_awlen,
  output logic [2:0]          m_awsize,
  output logic [1:0]          m_awburst,
  output logic                m_awvalid,
  input  logic                m_awready,
  output logic [DW-1:0]       m_wdata,
  output logic [DW/8-1:0]     m_wstrb,
  output logic                m_wlast,
  output logic                m_wvalid,
  input  logic                m_wready,
  input  logic [ID_W-1:0]     m_bid,
  input  logic [1:0]          m_bresp,
  input  logic                m_bvalid,
  output logic                m_bready,
  // AXI4-Lite configuration port
  input  logic [CFG_AW-1:0]   cfg_awaddr,
  input  logic                cfg_awvalid,
  output logic                cfg_awready,
  input  logic [31:0]         cfg_wdata,
  input  logic [3:0]          cfg_wstrb,
  input  logic                cfg_wvalid,
  output logic                cfg_wready,
  output logic [1:0]          cfg_bresp,
  output logic                cfg_bvalid,
  input  logic                cfg_bready,
  input  logic [CFG_AW-1:0]   cfg_araddr,
  input  logic                cfg_arvalid,
  output logic                cfg_arready,
  output logic [31:0]         cfg_rdata,
  output logic [1:0]          cfg_rresp,
  output logic                cfg_rvalid,
  input  logic                cfg_rready
);
  // ---------------------------------------------------------------- config
  dictat_mode_e      mode;
  logic [63:0]       dump_base, ocm_base;
  logic              wr_en;
  logic [CFG_AW-3:0] wr_idx;
  logic [31:0]       wr_data;
  logic [DICTAT_NREGS-1:0][31:0] rd_regs;
  logic              ctrl_write;

  axil_regfile #(.NREGS(DICTAT_NREGS), .ADDR_W(CFG_AW)) u_regs (
    .clk, .rst_n,
    .awaddr(cfg_awaddr), .awvalid(cfg_awvalid), .awready(cfg_awready),
    .wdata(cfg_wdata), .wstrb(cfg_wstrb), .wvalid(cfg_wvalid), .wready(cfg_wready),
    .bresp(cfg_bresp), .bvalid(cfg_bvalid), .bready(cfg_bready),
    .araddr(cfg_araddr), .arvalid(cfg_arvalid), .arready(cfg_arready),
    .rdata(cfg_rdata), .rresp(cfg_rresp), .rvalid(cfg_rvalid), .rready(cfg_rready),
    .wr_en, .wr_idx, .wr_data, .rd_regs
  );

  assign ctrl_write = wr_en && (32'(wr_idx) == DICTAT_CTRL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode      <= MODE_BYPASS;
      dump_base <= '0;
      ocm_base  <= '0;
    end else if (wr_en) begin
      case (32'(wr_idx))
        DICTAT_CTRL:    mode <= (wr_data[1:0] == 2'd3) ? MODE_BYPASS
                                                       : dictat_mode_e'(wr_data[1:0]);
        DICTAT_DUMP_LO: dump_base[31:0]  <= wr_data;
        DICTAT_DUMP_HI: dump_base[63:32] <= wr_data;
        DICTAT_OCM_LO:  ocm_base[31:0]   <= wr_data;
        DICTAT_OCM_HI:  ocm_base[63:32]  <= wr_data;
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------- job boundary (IRQ)
  logic irq_q, irq_rise;
  always_ff @(posedge clk) begin
    if (!rst_n) irq_q <= 1'b0;
    else        irq_q <= dpu_irq;
  end
  assign irq_rise = dpu_irq && !irq_q;

  // ------------------------------------------------------ read path + xlate
  logic xlate_en, dump_en, can_accept, ar_hs;
  logic overflow, dump_busy, dump_done;
  logic [31:0] xlate_count, sniffed, written;

  assign xlate_en = (mode == MODE_XLATE);
  assign dump_en  = (mode == MODE_DUMP);
  assign ar_hs    = s_arvalid && m_arready;

  dictat_addr_xlate #(.ADDR_W(ADDR_W), .OCM_BYTES(OCM_BYTES)) u_xlate (
    .clk, .rst_n,
    .enable(xlate_en), .restart(irq_rise || ctrl_write),
    .ocm_base(ocm_base[ADDR_W-1:0]),
    .s_araddr, .s_arlen, .s_arsize, .ar_hs,
    .m_araddr, .overflow, .xlate_count
  );

  assign m_arid    = s_arid;
  assign m_arlen   = s_arlen;
  assign m_arsize  = s_arsize;
  assign m_arburst = s_arburst;
  assign m_arvalid = s_arvalid;
  assign s_arready = m_arready;

  assign s_rid     = m_rid;
  assign s_rdata   = m_rdata;
  assign s_rresp   = m_rresp;
  assign s_rlast   = m_rlast;
  assign s_rvalid  = m_rvalid && can_accept;
  assign m_rready  = s_rready && can_accept;

  // -------------------------------------------------------------- dumper
  dictat_dumper #(
    .ADDR_W(ADDR_W), .DW(DW), .ID_W(ID_W), .BURST(DUMP_BURST), .DEPTH(FIFO_DEPTH)
  ) u_dump (
    .clk, .rst_n,
    .enable(dump_en), .restart(ctrl_write), .flush(irq_rise),
    .dump_base(dump_base[ADDR_W-1:0]),
    .beat_valid(m_rvalid && m_rready), .beat_data(m_rdata), .can_accept,
    .awid(m_awid), .awaddr(m_awaddr), .awlen(m_awlen), .awsize(m_awsize),
    .awburst(m_awburst), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wlast(m_wlast), .wvalid(m_wvalid),
    .wready(m_wready), .bid(m_bid), .bresp(m_bresp), .bvalid(m_bvalid),
    .bready(m_bready),
    .busy(dump_busy), .done(dump_done),
    .sniffed_words(sniffed), .written_words(written)
  );

  // ------------------------------------------------------------ read back
  always_comb begin
    rd_regs                    = '0;
    rd_regs[DICTAT_CTRL]       = 32'(mode);
    rd_regs[DICTAT_DUMP_LO]    = dump_base[31:0];
    rd_regs[DICTAT_DUMP_HI]    = dump_base[63:32];
    rd_regs[DICTAT_OCM_LO]     = ocm_base[31:0];
    rd_regs[DICTAT_OCM_HI]     = ocm_base[63:32];
    rd_regs[DICTAT_STATUS]     = {29'd0, dump_busy, overflow, dump_done};
    rd_regs[DICTAT_DUMP_WORDS] = sniffed;
    rd_regs[DICTAT_WR_WORDS]   = written;
    rd_regs[DICTAT_XLATE_CNT]  = xlate_count;
  end

  // An accepted read request must keep its fields stable until accepted.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                s_arvalid && !s_arready |=> s_arvalid && $stable(s_araddr));

endmodule
