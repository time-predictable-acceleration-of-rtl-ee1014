// Programmable-logic side of a time-predictable DPU platform: everything
// placed around a closed DNN accelerator (the DPU) so that its inference
// time can be measured and bounded.
//
//   DPU M_INS  --> DICTAT ------------------> FPGA-PS port (ps_ins_*)
//   DPU M_DATA -----------------------------> FPGA-PS port (ps_dat_*)
//   PS-FPGA port (ps_s_*) ------------------> DPU S        (dpu_s_*)
//   DPU interrupt --------------------------> PS           (irq_to_ps)
//   hw_profiler probes the DPU side of M_INS, M_DATA, S and the interrupt.
//
// DICTAT lets the DPU fetch instructions from on-chip memory (OCM) through
// the instruction port's own path while data keeps using DRAM, which removes
// the mutual interference of instruction and data reads at the DRAM
// controller. The profiler records per-job traffic and phase timing. Both
// are configured over their own AXI4-Lite ports (dictat_cfg_*, prof_cfg_*).
// The data port, S port and interrupt go through as wires: the profiler
// only observes them, so the DPU's timing is untouched. The DPU itself, the
// PS interconnect, DRAM controller and OCM are outside this module.
// Widths: instruction words 32 bits and data words 128 bits, as implied by
// the measured per-job traffic of the DPU; address 40 bits, ID 6 bits and
// the 12-bit register spaces are this design's choices.
module dpu_pl_top #(
  parameter int unsigned ADDR_W     = 40,
  parameter int unsigned ID_W       = 6,
  parameter int unsigned INS_DW     = 32,
  parameter int unsigned DAT_DW     = 128,
  parameter int unsigned OCM_BYTES  = 262144,
  parameter int unsigned DUMP_BURST = 16,
  parameter int unsigned FIFO_DEPTH = 32,
  parameter int unsigned CFG_AW     = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // DPU interrupt, forwarded to the PS
  input  logic                  dpu_irq,
  output logic                  irq_to_ps,
  output logic                  prof_done,
  // ---- DPU M_INS (read only) ----
  input  logic [ID_W-1:0]       dpu_ins_arid,
  input  logic [ADDR_W-1:0]     dpu_ins_araddr,
  input  logic [7:0]            dpu_ins_arlen,
  input  logic [2:0]            dpu_ins_arsize,
  input  logic [1:0]            dpu_ins_arburst,
  input  logic                  dpu_ins_arvalid,
  output logic                  dpu_ins_arready,
  output logic [ID_W-1:0]       dpu_ins_rid,
  output logic [INS_DW-1:0]     dpu_ins_rdata,
  output logic [1:0]            dpu_ins_rresp,
  output logic                  dpu_ins_rlast,
  output logic                  dpu_ins_rvalid,
  input  logic                  dpu_ins_rready,
  // ---- FPGA-PS port used by the instruction path ----
  output logic [ID_W-1:0]       ps_ins_arid,
  output logic [ADDR_W-1:0]     ps_ins_araddr,
  output logic [7:0]            ps_ins_arlen,
  output logic [2:0]            ps_ins_arsize,
  output logic [1:0]            ps_ins_arburst,
  output logic                  ps_ins_arvalid,
  input  logic                  ps_ins_arready,
  input  logic [ID_W-1:0]       ps_ins_rid,
  input  logic [INS_DW-1:0]     ps_ins_rdata,
  input  logic [1:0]            ps_ins_rresp,
  input  logic                  ps_ins_rlast,
  input  logic                  ps_ins_rvalid,
  output logic                  ps_ins_rready,
  output logic [ID_W-1:0]       ps_ins_awid,
  output logic [ADDR_W-1:0]     ps_ins_awaddr,
  output logic [7:0]            ps_ins_awlen,
  output logic [2:0]            ps_ins_awsize,
  output logic [1:0]            ps_ins_awburst,
  output logic                  ps_ins_awvalid,
  input  logic                  ps_ins_awready,
  output logic [INS_DW-1:0]     ps_ins_wdata,
  output logic [INS_DW/8-1:0]   ps_ins_wstrb,
  output logic                  ps_ins_wlast,
  output logic                  ps_ins_wvalid,
  input  logic                  ps_ins_wready,
  input  logic [ID_W-1:0]       ps_ins_bid,
  input  logic [1:0]            ps_ins_bresp,
  input  logic                  ps_ins_bvalid,
  output logic                  ps_ins_bready,
  // ---- DPU M_DATA ----
  input  logic [ID_W-1:0]       dpu_dat_arid,
  input  logic [ADDR_W-1:0]     dpu_dat_araddr,
  input  logic [7:0]            dpu_dat_arlen,
  input  logic [2:0]            dpu_dat_arsize,
  input  logic [1:0]            dpu_dat_arburst,
  input  logic                  dpu_dat_arvalid,
  output logic                  dpu_dat_arready,
  output logic [ID_W-1:0]       dpu_dat_rid,
  output logic [DAT_DW-1:0]     dpu_dat_rdata,
  output logic [1:0]            dpu_dat_rresp,
  output logic                  dpu_dat_rlast,
  output logic                  dpu_dat_rvalid,
  input  logic                  dpu_dat_rready,
  input  logic [ID_W-1:0]       dpu_dat_awid,
  input  logic [ADDR_W-1:0]     dpu_dat_awaddr,
  input  logic [7:0]            dpu_dat_awlen,
  input  logic [2:0]            dpu_dat_awsize,
  input  logic [1:0]            dpu_dat_awburst,
  input  logic                  dpu_dat_awvalid,
  output logic                  dpu_dat_awready,
  input  logic [DAT_DW-1:0]     dpu_dat_wdata,
  input  logic [DAT_DW/8-1:0]   dpu_dat_wstrb,
  input  logic                  dpu_dat_wlast,
  input  logic                  dpu_dat_wvalid,
  output logic                  dpu_dat_wready,
  output logic [ID_W-1:0]       dpu_dat_bid,
  output logic [1:0]            dpu_dat_bresp,
  output logic                  dpu_dat_bvalid,
  input  logic                  dpu_dat_bready,
  // ---- FPGA-PS port used by the data path ----
  output logic [ID_W-1:0]       ps_dat_arid,
  output logic [ADDR_W-1:0]     ps_dat_araddr,
  output logic [7:0]            ps_dat_arlen,
  output logic [2:0]            ps_dat_arsize,
  output logic [1:0]            ps_dat_arburst,
  output logic                  ps_dat_arvalid,
  input  logic                  ps_dat_arready,
  input  logic [ID_W-1:0]       ps_dat_rid,
  input  logic [DAT_DW-1:0]     ps_dat_rdata,
  input  logic [1:0]            ps_dat_rresp,
  input  logic                  ps_dat_rlast,
  input  logic                  ps_dat_rvalid,
  output logic                  ps_dat_rready,
  output logic [ID_W-1:0]       ps_dat_awid,
  output logic [ADDR_W-1:0]     ps_dat_awaddr,
  output logic [7:0]            ps_dat_awlen,
  output logic [2:0]            ps_dat_awsize,
  output logic [1:0]            ps_dat_awburst,
  output logic                  ps_dat_awvalid,
  input  logic                  ps_dat_awready,
  output logic [DAT_DW-1:0]     ps_dat_wdata,
  output logic [DAT_DW/8-1:0]   ps_dat_wstrb,
  output logic                  ps_dat_wlast,
  output logic                  ps_dat_wvalid,
  input  logic                  ps_dat_wready,
  input  logic [ID_W-1:0]       ps_dat_bid,
  input  logic [1:0]            ps_dat_bresp,
  input  logic                  ps_dat_bvalid,
  output logic                  ps_dat_bready,
  // ---- PS-FPGA AXI4-Lite port to the DPU's S port ----
  input  logic [CFG_AW-1:0]     ps_s_awaddr,
  input  logic                  ps_s_awvalid,
  output logic                  ps_s_awready,
  input  logic [31:0]           ps_s_wdata,
  input  logic [3:0]            ps_s_wstrb,
  input  logic                  ps_s_wvalid,
  output logic                  ps_s_wready,
  output logic [1:0]            ps_s_bresp,
  output logic                  ps_s_bvalid,
  input  logic                  ps_s_bready,
  input  logic [CFG_AW-1:0]     ps_s_araddr,
  input  logic                  ps_s_arvalid,
  output logic                  ps_s_arready,
  output logic [31:0]           ps_s_rdata,
  output logic [1:0]            ps_s_rresp,
  output logic                  ps_s_rvalid,
  input  logic                  ps_s_rready,
  output logic [CFG_AW-1:0]     dpu_s_awaddr,
  output logic                  dpu_s_awvalid,
  input  logic                  dpu_s_awready,
  output logic [31:0]           dpu_s_wdata,
  output logic [3:0]            dpu_s_wstrb,
  output logic                  dpu_s_wvalid,
  input  logic                  dpu_s_wready,
  input  logic [1:0]            dpu_s_bresp,
  input  logic                  dpu_s_bvalid,
  output logic                  dpu_s_bready,
  output logic [CFG_AW-1:0]     dpu_s_araddr,
  output logic                  dpu_s_arvalid,
  input  logic                  dpu_s_arready,
  input  logic [31:0]           dpu_s_rdata,
  input  logic [1:0]            dpu_s_rresp,
  input  logic                  dpu_s_rvalid,
  output logic                  dpu_s_rready,
  // ---- DICTAT configuration (AXI4-Lite) ----
  input  logic [CFG_AW-1:0]     dictat_cfg_awaddr,
  input  logic                  dictat_cfg_awvalid,
  output logic                  dictat_cfg_awready,
  input  logic [31:0]           dictat_cfg_wdata,
  input  logic [3:0]            dictat_cfg_wstrb,
  input  logic                  dictat_cfg_wvalid,
  output logic                  dictat_cfg_wready,
  output logic [1:0]            dictat_cfg_bresp,
  output logic                  dictat_cfg_bvalid,
  input  logic                  dictat_cfg_bready,
  input  logic [CFG_AW-1:0]     dictat_cfg_araddr,
  input  logic                  dictat_cfg_arvalid,
  output logic                  dictat_cfg_arready,
  output logic [31:0]           dictat_cfg_rdata,
  output logic [1:0]            dictat_cfg_rresp,
  output logic                  dictat_cfg_rvalid,
  input  logic                  dictat_cfg_rready,
  // ---- profiler registers (AXI4-Lite) ----
  input  logic [CFG_AW-1:0]     prof_cfg_awaddr,
  input  logic                  prof_cfg_awvalid,
  output logic                  prof_cfg_awready,
  input  logic [31:0]           prof_cfg_wdata,
  input  logic [3:0]            prof_cfg_wstrb,
  input  logic                  prof_cfg_wvalid,
  output logic                  prof_cfg_wready,
  output logic [1:0]            prof_cfg_bresp,
  output logic                  prof_cfg_bvalid,
  input  logic                  prof_cfg_bready,
  input  logic [CFG_AW-1:0]     prof_cfg_araddr,
  input  logic                  prof_cfg_arvalid,
  output logic                  prof_cfg_arready,
  output logic [31:0]           prof_cfg_rdata,
  output logic [1:0]            prof_cfg_rresp,
  output logic                  prof_cfg_rvalid,
  input  logic                  prof_cfg_rready
);

  // ------------------------------------------------ instruction path: DICTAT
  dictat #(
    .ADDR_W(ADDR_W), .DW(INS_DW), .ID_W(ID_W), .OCM_BYTES(OCM_BYTES),
    .DUMP_BURST(DUMP_BURST), .FIFO_DEPTH(FIFO_DEPTH), .CFG_AW(CFG_AW)
  ) u_dictat (
    .clk, .rst_n, .dpu_irq,
    .s_arid(dpu_ins_arid), .s_araddr(dpu_ins_araddr), .s_arlen(dpu_ins_arlen),
    .s_arsize(dpu_ins_arsize), .s_arburst(dpu_ins_arburst),
    .s_arvalid(dpu_ins_arvalid), .s_arready(dpu_ins_arready),
    .s_rid(dpu_ins_rid), .s_rdata(dpu_ins_rdata), .s_rresp(dpu_ins_rresp),
    .s_rlast(dpu_ins_rlast), .s_rvalid(dpu_ins_rvalid), .s_rready(dpu_ins_rready),
    .m_arid(ps_ins_arid), .m_araddr(ps_ins_araddr), .m_arlen(ps_ins_arlen),
    .m_arsize(ps_ins_arsize), .m_arburst(ps_ins_arburst),
    .m_arvalid(ps_ins_arvalid), .m_arready(ps_ins_arready),
    .m_rid(ps_ins_rid), .m_rdata(ps_ins_rdata), .m_rresp(ps_ins_rresp),
    .m_rlast(ps_ins_rlast), .m_rvalid(ps_ins_rvalid), .m_rready(ps_ins_rready),
    .m_awid(ps_ins_awid), .m_awaddr(ps_ins_awaddr), .m_awlen(ps_ins_awlen),
    .m_awsize(ps_ins_awsize), .m_awburst(ps_ins_awburst),
    .m_awvalid(ps_ins_awvalid), .m_awready(ps_ins_awready),
    .m_wdata(ps_ins_wdata), .m_wstrb(ps_ins_wstrb), .m_wlast(ps_ins_wlast),
    .m_wvalid(ps_ins_wvalid), .m_wready(ps_ins_wready),
    .m_bid(ps_ins_bid), .m_bresp(ps_ins_bresp), .m_bvalid(ps_ins_bvalid),
    .m_bready(ps_ins_bready),
    .cfg_awaddr(dictat_cfg_awaddr), .cfg_awvalid(dictat_cfg_awvalid),
    .cfg_awready(dictat_cfg_awready), .cfg_wdata(dictat_cfg_wdata),
    .cfg_wstrb(dictat_cfg_wstrb), .cfg_wvalid(dictat_cfg_wvalid),
    .cfg_wready(dictat_cfg_wready), .cfg_bresp(dictat_cfg_bresp),
    .cfg_bvalid(dictat_cfg_bvalid), .cfg_bready(dictat_cfg_bready),
    .cfg_araddr(dictat_cfg_araddr), .cfg_arvalid(dictat_cfg_arvalid),
    .cfg_arready(dictat_cfg_arready), .cfg_rdata(dictat_cfg_rdata),
    .cfg_rresp(dictat_cfg_rresp), .cfg_rvalid(dictat_cfg_rvalid),
    .cfg_rready(dictat_cfg_rready)
  );

  // ----------------------------------------------- data path: straight wires
  assign ps_dat_arid     = dpu_dat_arid;
  assign ps_dat_araddr   = dpu_dat_araddr;
  assign ps_dat_arlen    = dpu_dat_arlen;
  assign ps_dat_arsize   = dpu_dat_arsize;
  assign ps_dat_arburst  = dpu_dat_arburst;
  assign ps_dat_arvalid  = dpu_dat_arvalid;
  assign dpu_dat_arready = ps_dat_arready;
  assign dpu_dat_rid     = ps_dat_rid;
  assign dpu_dat_rdata   = ps_dat_rdata;
  assign dpu_dat_rresp   = ps_dat_rresp;
  assign dpu_dat_rlast   = ps_dat_rlast;
  assign dpu_dat_rvalid  = ps_dat_rvalid;
  assign ps_dat_rready   = dpu_dat_rready;
  assign ps_dat_awid     = dpu_dat_awid;
  assign ps_dat_awaddr   = dpu_dat_awaddr;
  assign ps_dat_awlen    = dpu_dat_awlen;
  assign ps_dat_awsize   = dpu_dat_awsize;
  assign ps_dat_awburst  = dpu_dat_awburst;
  assign ps_dat_awvalid  = dpu_dat_awvalid;
  assign dpu_dat_awready = ps_dat_awready;
  assign ps_dat_wdata    = dpu_dat_wdata;
  assign ps_dat_wstrb    = dpu_dat_wstrb;
  assign ps_dat_wlast    = dpu_dat_wlast;
  assign ps_dat_wvalid   = dpu_dat_wvalid;
  assign dpu_dat_wready  = ps_dat_wready;
  assign dpu_dat_bid     = ps_dat_bid;
  assign dpu_dat_bresp   = ps_dat_bresp;
  assign dpu_dat_bvalid  = ps_dat_bvalid;
  assign ps_dat_bready   = dpu_dat_bready;

  // ------------------------------------------------ control port: wires
  assign dpu_s_awaddr  = ps_s_awaddr;
  assign dpu_s_awvalid = ps_s_awvalid;
  assign ps_s_awready  = dpu_s_awready;
  assign dpu_s_wdata   = ps_s_wdata;
  assign dpu_s_wstrb   = ps_s_wstrb;
  assign dpu_s_wvalid  = ps_s_wvalid;
  assign ps_s_wready   = dpu_s_wready;
  assign ps_s_bresp    = dpu_s_bresp;
  assign ps_s_bvalid   = dpu_s_bvalid;
  assign dpu_s_bready  = ps_s_bready;
  assign dpu_s_araddr  = ps_s_araddr;
  assign dpu_s_arvalid = ps_s_arvalid;
  assign ps_s_arready  = dpu_s_arready;
  assign ps_s_rdata    = dpu_s_rdata;
  assign ps_s_rresp    = dpu_s_rresp;
  assign ps_s_rvalid   = dpu_s_rvalid;
  assign dpu_s_rready  = ps_s_rready;
  assign irq_to_ps     = dpu_irq;

  // ------------------------------------------------------------- profiler
  // Probes the DPU side of M_INS, so it sees the DPU's own requests
  // whether DICTAT redirects them or not.
  hw_profiler #(.CFG_AW(CFG_AW)) u_prof (
    .clk, .rst_n, .dpu_irq,
    .ins_arvalid(dpu_ins_arvalid), .ins_arready(dpu_ins_arready),
    .ins_arlen(dpu_ins_arlen),
    .ins_rvalid(dpu_ins_rvalid), .ins_rready(dpu_ins_rready),
    .ins_rlast(dpu_ins_rlast),
    .dat_arvalid(dpu_dat_arvalid), .dat_arready(dpu_dat_arready),
    .dat_arlen(dpu_dat_arlen),
    .dat_rvalid(dpu_dat_rvalid), .dat_rready(dpu_dat_rready),
    .dat_rlast(dpu_dat_rlast),
    .dat_awvalid(dpu_dat_awvalid), .dat_awready(dpu_dat_awready),
    .dat_awlen(dpu_dat_awlen),
    .dat_wvalid(dpu_dat_wvalid), .dat_wready(dpu_dat_wready), .dat_wlast(dpu_dat_wlast),
    .dat_bvalid(dpu_dat_bvalid), .dat_bready(dpu_dat_bready),
    .s_awvalid(ps_s_awvalid), .s_awready(ps_s_awready),
    .s_arvalid(ps_s_arvalid), .s_arready(ps_s_arready),
    .cfg_awaddr(prof_cfg_awaddr), .cfg_awvalid(prof_cfg_awvalid),
    .cfg_awready(prof_cfg_awready), .cfg_wdata(prof_cfg_wdata),
    .cfg_wstrb(prof_cfg_wstrb), .cfg_wvalid(prof_cfg_wvalid),
    .cfg_wready(prof_cfg_wready), .cfg_bresp(prof_cfg_bresp),
    .cfg_bvalid(prof_cfg_bvalid), .cfg_bready(prof_cfg_bready),
    .cfg_araddr(prof_cfg_araddr), .cfg_arvalid(prof_cfg_arvalid),
    .cfg_arready(prof_cfg_arready), .cfg_rdata(prof_cfg_rdata),
    .cfg_rresp(prof_cfg_rresp), .cfg_rvalid(prof_cfg_rvalid),
    .cfg_rready(prof_cfg_rready),
    .prof_done
  );

endmodule
