// Behavioural stand-in for the closed DPU accelerator, testbench only.
//
// Reproduces the DPU's bus behaviour for one inference job as a
// parallel-series model: the data-read phase runs from the start of the job
// in parallel with the instruction-read phase followed by the data-write
// phase; when all three are complete the model computes for `elab` cycles
// with no bus activity and then raises its interrupt for IRQ_CYC cycles.
// Instruction reads are 4-beat bursts of 32-bit words, at most INS_OUTS in
// flight, taken from NBUF separate buffers of the instruction image, in a
// fixed order. Data reads (up to RD_OUTS in flight) and writes (up to
// WR_OUTS) use bursts of 1..256 beats of 128-bit words whose lengths add up
// to the requested word totals. Every instruction word received is compared
// with tb_pkg::mem_word() of the address the DPU asked for; mismatches are
// counted in ins_errors.
module dpu_traffic_model #(
  parameter int unsigned ADDR_W   = 40,
  parameter int unsigned ID_W     = 6,
  parameter int unsigned INS_OUTS = 2,
  parameter int unsigned RD_OUTS  = 14,
  parameter int unsigned WR_OUTS  = 7,
  parameter int unsigned NBUF     = 4,
  parameter int unsigned IRQ_CYC  = 4,
  parameter longint unsigned INS_BASE   = 64'h1000_0000,
  parameter longint unsigned BUF_STRIDE = 64'h0010_0000,
  parameter longint unsigned RD_BASE    = 64'h2000_0000,
  parameter longint unsigned WR_BASE    = 64'h3000_0000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  int unsigned       ins_trans,   // 4-beat instruction reads
  input  int unsigned       rd_trans,
  input  int unsigned       rd_words,
  input  int unsigned       wr_trans,
  input  int unsigned       wr_words,
  input  int unsigned       elab,
  // M_INS
  output logic [ID_W-1:0]   ins_arid,
  output logic [ADDR_W-1:0] ins_araddr,
  output logic [7:0]        ins_arlen,
  output logic [2:0]        ins_arsize,
  output logic [1:0]        ins_arburst,
  output logic              ins_arvalid,
  input  logic              ins_arready,
  input  logic [31:0]       ins_rdata,
  input  logic              ins_rlast,
  input  logic              ins_rvalid,
  output logic              ins_rready,
  // M_DATA
  output logic [ID_W-1:0]   dat_arid,
  output logic [ADDR_W-1:0] dat_araddr,
  output logic [7:0]        dat_arlen,
  output logic [2:0]        dat_arsize,
  output logic [1:0]        dat_arburst,
  output logic              dat_arvalid,
  input  logic              dat_arready,
  input  logic              dat_rlast,
  input  logic              dat_rvalid,
  output logic              dat_rready,
  output logic [ID_W-1:0]   dat_awid,
  output logic [ADDR_W-1:0] dat_awaddr,
  output logic [7:0]        dat_awlen,
  output logic [2:0]        dat_awsize,
  output logic [1:0]        dat_awburst,
  output logic              dat_awvalid,
  input  logic              dat_awready,
  output logic [127:0]      dat_wdata,
  output logic [15:0]       dat_wstrb,
  output logic              dat_wlast,
  output logic              dat_wvalid,
  input  logic              dat_wready,
  input  logic              dat_bvalid,
  output logic              dat_bready,
  output logic              irq,
  output logic              busy,
  output int unsigned       ins_errors,
  output int unsigned       ins_words_seen
);
  // Burst length (beats) of transaction i out of n carrying w words: the
  // first is a single beat, the second as long as the words allow (max
  // 256), the rest share the remainder evenly.
  function automatic int unsigned blen(input int unsigned i, input int unsigned n,
                                       input int unsigned w);
    int unsigned big, rest;
    if (n == 1) return w;
    big = (w - n + 1 > 256) ? 256 : w - n + 1;
    if (i == 0) return 1;
    if (i == 1) return big;
    rest = w - 1 - big;
    return rest / (n - 2) + ((i - 2) < rest % (n - 2) ? 1 : 0);
  endfunction

  typedef enum logic [2:0] {J_IDLE, J_RUN, J_ELAB, J_IRQ} jstate_e;
  jstate_e js;

  int unsigned ins_issued, ins_done, ins_outs, ins_beat;
  int unsigned rd_issued, rd_done, rd_outs;
  int unsigned wr_issued, wr_done, wr_outs, w_beats_left, w_sent;
  int unsigned cnt;
  longint unsigned rd_addr, wr_addr;
  longint unsigned ins_q[$];      // word address of each expected beat
  int unsigned     w_q[$];        // beats of each accepted write address
  logic ins_phase_done;

  function automatic longint unsigned ins_addr(input int unsigned t);
    int unsigned per;
    per = (ins_trans + NBUF - 1) / NBUF;
    return INS_BASE + longint'(t / per) * BUF_STRIDE + longint'(t % per) * 16;
  endfunction

  assign ins_phase_done = (ins_done == ins_trans);
  assign busy = (js != J_IDLE);

  always_comb begin
    ins_arid    = '0;
    ins_araddr  = ADDR_W'(ins_addr(ins_issued));
    ins_arlen   = 8'd3;
    ins_arsize  = 3'd2;
    ins_arburst = 2'b01;
    ins_arvalid = (js == J_RUN) && (ins_issued < ins_trans) && (ins_outs < INS_OUTS);
    ins_rready  = 1'b1;
    dat_arid    = 6'(1);
    dat_araddr  = ADDR_W'(rd_addr);
    dat_arlen   = 8'(blen(rd_issued, rd_trans, rd_words) - 1);
    dat_arsize  = 3'd4;
    dat_arburst = 2'b01;
    dat_arvalid = (js == J_RUN) && (rd_issued < rd_trans) && (rd_outs < RD_OUTS);
    dat_rready  = 1'b1;
    dat_awid    = 6'(2);
    dat_awaddr  = ADDR_W'(wr_addr);
    dat_awlen   = 8'(blen(wr_issued, wr_trans, wr_words) - 1);
    dat_awsize  = 3'd4;
    dat_awburst = 2'b01;
    // the write phase follows the instruction phase
    dat_awvalid = (js == J_RUN) && ins_phase_done && (wr_issued < wr_trans)
                  && (wr_outs < WR_OUTS);
    dat_wdata   = {4{32'(w_sent)}};
    dat_wstrb   = '1;
    dat_wvalid  = (w_q.size() > 0);
    dat_wlast   = (w_q.size() > 0) && (w_beats_left == 1);
    dat_bready  = 1'b1;
    irq         = (js == J_IRQ);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      js <= J_IDLE;
      ins_errors = 0; ins_words_seen = 0;
      ins_issued = 0; ins_done = 0; ins_outs = 0; ins_beat = 0;
      rd_issued = 0; rd_done = 0; rd_outs = 0;
      wr_issued = 0; wr_done = 0; wr_outs = 0; w_beats_left = 0; w_sent = 0;
      rd_addr = RD_BASE; wr_addr = WR_BASE; cnt = 0;
      ins_q.delete(); w_q.delete();
    end else begin
      case (js)
        J_IDLE: if (start) begin
          js <= J_RUN;
          ins_issued = 0; ins_done = 0; ins_outs = 0;
          rd_issued = 0; rd_done = 0; rd_outs = 0;
          wr_issued = 0; wr_done = 0; wr_outs = 0;
          rd_addr = RD_BASE; wr_addr = WR_BASE;
        end
        J_RUN: begin
          // instruction reads
          if (ins_rvalid && ins_rready) begin
            logic [31:0] exp;
            exp = tb_pkg::mem_word(ins_q.pop_front() / 4)[31:0];
            ins_words_seen++;
            if (ins_rdata !== exp) ins_errors++;
            if (ins_rlast) begin ins_outs--; ins_done++; end
          end
          if (ins_arvalid && ins_arready) begin
            for (int b = 0; b < 4; b++) ins_q.push_back(ins_addr(ins_issued) + 4 * b);
            ins_issued++; ins_outs++;
          end
          // data reads
          if (dat_rvalid && dat_rready && dat_rlast) begin rd_outs--; rd_done++; end
          if (dat_arvalid && dat_arready) begin
            rd_addr += 16 * blen(rd_issued, rd_trans, rd_words);
            rd_addr = (rd_addr + 4095) & ~longint'(4095);  // keep bursts in a 4 KB page
            rd_issued++; rd_outs++;
          end
          // data writes
          if (dat_wvalid && dat_wready) begin
            w_sent++;
            w_beats_left--;
            if (w_beats_left == 0) void'(w_q.pop_front());
            if (w_beats_left == 0 && w_q.size() > 0) w_beats_left = w_q[0];
          end
          if (dat_awvalid && dat_awready) begin
            int unsigned nb;
            nb = blen(wr_issued, wr_trans, wr_words);
            if (w_q.size() == 0) w_beats_left = nb;
            w_q.push_back(nb);
            wr_addr += 16 * nb;
            wr_addr = (wr_addr + 4095) & ~longint'(4095);
            wr_issued++; wr_outs++;
          end
          if (dat_bvalid && dat_bready) begin wr_outs--; wr_done++; end
          if (ins_done == ins_trans && rd_done == rd_trans && wr_done == wr_trans
              && w_q.size() == 0) begin
            js  <= (elab == 0) ? J_IRQ : J_ELAB;
            cnt = 0;
          end
        end
        J_ELAB: begin
          cnt++;
          if (cnt == elab) begin js <= J_IRQ; cnt = 0; end
        end
        J_IRQ: begin
          cnt++;
          if (cnt == IRQ_CYC) js <= J_IDLE;
        end
        default: js <= J_IDLE;
      endcase
    end
  end

endmodule
