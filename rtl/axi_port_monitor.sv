// One channel of the bus profiler: passive statistics of one AXI4 manager
// port, sampled only from the handshake signals.
//
// Every handshake is counted while `en` is high: read and write address
// handshakes (transactions), read and write data beats (words). Reads in
// flight are tracked from the read address handshake to the read data beat
// that carries RLAST; writes from the write address handshake to the write
// response handshake. The largest in-flight counts give the port's
// outstanding-transaction parallelism, and ARLEN/AWLEN give the shortest and
// longest bursts. A port is "read active" in a cycle when a read request is
// presented or a read is in flight (served or pending), and "write active"
// when a write address or data beat is presented or a write is in flight;
// the number of active cycles is the duration of that port's phase.
//
// The monitor also times the memory behind the port. Read latency is
// counted from the read address handshake to the first cycle the first data
// beat of that read is presented; write latency from the handshake of the
// beat carrying WLAST to the first cycle the write response is presented.
// Handshake times are kept in two small timestamp FIFOs (LAT_DEPTH deep,
// LAT_W-bit free-running cycle count) and matched in order: reads and write
// responses are assumed to come back in request order, which holds for the
// DPU's traffic. If a request arrives while its FIFO is full, timing of
// that direction pauses until no request of it is in flight (the FIFO is
// then emptied and back in step). The longest latency of each direction is
// kept. A rising edge of the first
// beat is timed once even when the manager holds RREADY/BREADY low.
// rd_active/wr_active are also exported combinationally so the enclosing
// profiler can measure overlap between ports.
//
// The monitor drives nothing on the bus, so the observed port is never
// disturbed. `clear` (synchronous) zeroes the statistics and sets the burst
// minima to 256+1 so the first burst replaces them. In-flight tracking runs
// regardless of `en`, so a window may open in the middle of traffic.
// What is measured follows the profiler description; counter widths, the
// exact definition of "active" and the clear behaviour are this design's.
module axi_port_monitor
  import dpu_pl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  // read address / data channel handshakes
  input  logic        arvalid,
  input  logic        arready,
  input  logic [7:0]  arlen,
  input  logic        rvalid,
  input  logic        rready,
  input  logic        rlast,
  // write address / data / response channel handshakes
  input  logic        awvalid,
  input  logic        awready,
  input  logic [7:0]  awlen,
  input  logic        wvalid,
  input  logic        wready,
  input  logic        wlast,
  input  logic        bvalid,
  input  logic        bready,
  // results
  output port_stats_t stats,
  output logic        rd_active,
  output logic        wr_active
);
  logic ar_hs, r_hs, r_end, aw_hs, w_hs, b_hs;
  logic [OUTS_W-1:0] rd_outs, wr_outs, rd_outs_nx, wr_outs_nx;
  logic [BLEN_W-1:0] ar_blen, aw_blen;
  logic [LAT_W-1:0]  now, rd_ts, wr_ts, rd_lat, wr_lat;
  logic              rd_ts_empty, wr_ts_empty, rd_ts_full, wr_ts_full;
  logic              r_first, r_seen, b_seen, rd_meas, wr_meas;
  logic              rd_lost, wr_lost, rd_resync, wr_resync;

  assign ar_hs   = arvalid && arready;
  assign r_hs    = rvalid && rready;
  assign r_end   = r_hs && rlast;
  assign aw_hs   = awvalid && awready;
  assign w_hs    = wvalid && wready;
  assign b_hs    = bvalid && bready;
  assign ar_blen = BLEN_W'(arlen) + 1'b1;
  assign aw_blen = BLEN_W'(awlen) + 1'b1;

  assign rd_outs_nx = rd_outs + OUTS_W'(ar_hs) - OUTS_W'(r_end);
  assign wr_outs_nx = wr_outs + OUTS_W'(aw_hs) - OUTS_W'(b_hs);

  assign rd_active = arvalid || (rd_outs != '0);
  assign wr_active = awvalid || wvalid || (wr_outs != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_outs <= '0;
      wr_outs <= '0;
    end else begin
      rd_outs <= rd_outs_nx;
      wr_outs <= wr_outs_nx;
    end
  end

  // Latency timing. r_first: the next R beat starts a burst. r_seen/b_seen:
  // the head beat/response has already been timed while waiting for ready.
  sync_fifo #(.W(LAT_W), .DEPTH(LAT_DEPTH)) u_rd_ts (
    .clk, .rst_n, .clear(rd_resync),
    .push(ar_hs && !rd_ts_full), .wr_data(now),
    .pop(r_hs && r_first), .rd_data(rd_ts),
    .full(rd_ts_full), .empty(rd_ts_empty), .count()
  );
  sync_fifo #(.W(LAT_W), .DEPTH(LAT_DEPTH)) u_wr_ts (
    .clk, .rst_n, .clear(wr_resync),
    .push(w_hs && wlast && !wr_ts_full), .wr_data(now),
    .pop(b_hs), .rd_data(wr_ts),
    .full(wr_ts_full), .empty(wr_ts_empty), .count()
  );

  assign rd_resync = rd_lost && (rd_outs_nx == '0);
  assign wr_resync = wr_lost && (wr_outs_nx == '0);
  assign rd_meas   = rvalid && r_first && !r_seen && !rd_ts_empty && !rd_lost;
  assign wr_meas   = bvalid && !b_seen && !wr_ts_empty && !wr_lost;
  assign rd_lat  = now - rd_ts;
  assign wr_lat  = now - wr_ts;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      now     <= '0;
      r_first <= 1'b1;
      r_seen  <= 1'b0;
      b_seen  <= 1'b0;
      rd_lost <= 1'b0;
      wr_lost <= 1'b0;
    end else begin
      now <= now + 1'b1;
      if (rd_resync)                rd_lost <= 1'b0;
      else if (ar_hs && rd_ts_full) rd_lost <= 1'b1;
      if (wr_resync)                         wr_lost <= 1'b0;
      else if (w_hs && wlast && wr_ts_full)  wr_lost <= 1'b1;
      if (r_hs) r_first <= rlast;
      if (r_hs)        r_seen <= 1'b0;
      else if (rvalid) r_seen <= r_first;
      if (b_hs)        b_seen <= 1'b0;
      else if (bvalid) b_seen <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      stats             <= '0;
      stats.rd_blen_min <= '1;
      stats.wr_blen_min <= '1;
    end else if (en) begin
      stats.rd_trans  <= stats.rd_trans  + CNT_W'(ar_hs);
      stats.rd_words  <= stats.rd_words  + CNT_W'(r_hs);
      stats.rd_active <= stats.rd_active + CNT_W'(rd_active);
      stats.wr_trans  <= stats.wr_trans  + CNT_W'(aw_hs);
      stats.wr_words  <= stats.wr_words  + CNT_W'(w_hs);
      stats.wr_active <= stats.wr_active + CNT_W'(wr_active);
      if (rd_outs_nx > stats.max_rd_outs) stats.max_rd_outs <= rd_outs_nx;
      if (wr_outs_nx > stats.max_wr_outs) stats.max_wr_outs <= wr_outs_nx;
      if (ar_hs && ar_blen < stats.rd_blen_min) stats.rd_blen_min <= ar_blen;
      if (ar_hs && ar_blen > stats.rd_blen_max) stats.rd_blen_max <= ar_blen;
      if (aw_hs && aw_blen < stats.wr_blen_min) stats.wr_blen_min <= aw_blen;
      if (aw_hs && aw_blen > stats.wr_blen_max) stats.wr_blen_max <= aw_blen;
      if (rd_meas && rd_lat > stats.rd_lat_max) stats.rd_lat_max <= rd_lat;
      if (wr_meas && wr_lat > stats.wr_lat_max) stats.wr_lat_max <= wr_lat;
    end
  end

endmodule
