// N-to-1 AXI4 memory interconnect (the memory-side "AXI_mem_intercon").
//
// Joins NM accelerator m_axi ports to the single high-performance DDR port
// of the processing system.  Read and write addresses are each granted
// round-robin among the requesting ports.  Because the DDR port answers in
// order, the interconnect needs no IDs: it remembers, in small FIFOs, which
// port each granted burst came from, returns R beats to the port at the
// head of the read FIFO (popped on RLAST), takes W beats from the port at
// the head of the write FIFO (popped on WLAST) and returns B responses in
// the same order.  Up to DEPTH bursts may be outstanding on each side.
// Address, data and handshakes pass combinationally (no added latency); a
// request the DDR port has not yet taken keeps its grant, so AR and AW stay
// stable while valid.  Assertions check that rule and the response routing.
// The function follows the system block diagram; the in-order,
// FIFO-based scheme is this design's choice.
module axi_mem_intercon
  import dehaze_pkg::*;
#(
  parameter int unsigned NM    = 14,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned IW   = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t s_req [NM],
  output axi_rsp_t s_rsp [NM],
  output axi_req_t m_req,
  input  axi_rsp_t m_rsp
);

  // --------------------------------------------------------------- arbiters
  logic [IW-1:0] ar_last, aw_last, ar_sel, aw_sel;
  logic          ar_any, aw_any;
  // a request shown to the DDR port and not yet taken keeps its grant, so
  // AR/AW address and length stay stable while valid (AXI rule)
  logic          ar_hold, aw_hold;
  logic [IW-1:0] ar_hsel, aw_hsel;

  always_comb begin
    ar_any = 1'b0; ar_sel = '0;
    aw_any = 1'b0; aw_sel = '0;
    // round-robin: first requester after the last grant
    for (int unsigned k = 1; k <= NM; k++) begin
      int unsigned ia, iw;
      ia = (int'(ar_last) + k) % NM;
      iw = (int'(aw_last) + k) % NM;
      if (!ar_any && s_req[ia].ar_valid) begin ar_any = 1'b1; ar_sel = IW'(ia); end
      if (!aw_any && s_req[iw].aw_valid) begin aw_any = 1'b1; aw_sel = IW'(iw); end
    end
    if (ar_hold) begin ar_any = 1'b1; ar_sel = ar_hsel; end
    if (aw_hold) begin aw_any = 1'b1; aw_sel = aw_hsel; end
  end

  // ------------------------------------------------------------ order FIFOs
  logic          rq_in_ready, rq_valid, wq_in_ready, wq_valid, bq_in_ready, bq_valid;
  logic [IW-1:0] rq_head, wq_head, bq_head;

  wire ar_fire = ar_any && rq_in_ready && m_rsp.ar_ready;
  wire aw_fire = aw_any && wq_in_ready && bq_in_ready && m_rsp.aw_ready;
  wire r_fire  = rq_valid && m_rsp.r_valid && s_req[rq_head].r_ready;
  wire w_fire  = wq_valid && s_req[wq_head].w_valid && m_rsp.w_ready;
  wire b_fire  = bq_valid && m_rsp.b_valid && s_req[bq_head].b_ready;

  stream_fifo #(.W(IW), .DEPTH(DEPTH)) u_rq (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(ar_fire), .in_ready(rq_in_ready), .in_data(ar_sel),
    .out_valid(rq_valid), .out_ready(r_fire && m_rsp.r_last), .out_data(rq_head), .count()
  );
  stream_fifo #(.W(IW), .DEPTH(DEPTH)) u_wq (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(aw_fire), .in_ready(wq_in_ready), .in_data(aw_sel),
    .out_valid(wq_valid), .out_ready(w_fire && s_req[wq_head].w_last), .out_data(wq_head), .count()
  );
  stream_fifo #(.W(IW), .DEPTH(DEPTH)) u_bq (
    .clk, .rst_n, .clear(1'b0),
    .in_valid(aw_fire), .in_ready(bq_in_ready), .in_data(aw_sel),
    .out_valid(bq_valid), .out_ready(b_fire), .out_data(bq_head), .count()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ar_last <= IW'(NM - 1);
      aw_last <= IW'(NM - 1);
      ar_hold <= 1'b0;
      aw_hold <= 1'b0;
      ar_hsel <= '0;
      aw_hsel <= '0;
    end else begin
      if (ar_fire) ar_last <= ar_sel;
      if (aw_fire) aw_last <= aw_sel;
      ar_hold <= m_req.ar_valid && !m_rsp.ar_ready;
      aw_hold <= m_req.aw_valid && !m_rsp.aw_ready;
      ar_hsel <= ar_sel;
      aw_hsel <= aw_sel;
    end
  end

  // AXI: once valid, an address stays valid and unchanged until taken
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.ar_valid && !m_rsp.ar_ready |=> m_req.ar_valid && $stable(m_req.ar_addr) && $stable(m_req.ar_len));
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_req.aw_valid && !m_rsp.aw_ready |=> m_req.aw_valid && $stable(m_req.aw_addr) && $stable(m_req.aw_len));
  // a response only ever goes to a port with a burst outstanding
  a_r_owned: assert property (@(posedge clk) disable iff (!rst_n) m_rsp.r_valid |-> rq_valid);
  a_b_owned: assert property (@(posedge clk) disable iff (!rst_n) m_rsp.b_valid |-> bq_valid);

  // ----------------------------------------------------------------- muxes
  always_comb begin
    m_req          = '0;
    m_req.ar_valid = ar_any && rq_in_ready;
    m_req.ar_addr  = s_req[ar_sel].ar_addr;
    m_req.ar_len   = s_req[ar_sel].ar_len;
    m_req.r_ready  = rq_valid && s_req[rq_head].r_ready;
    m_req.aw_valid = aw_any && wq_in_ready && bq_in_ready;
    m_req.aw_addr  = s_req[aw_sel].aw_addr;
    m_req.aw_len   = s_req[aw_sel].aw_len;
    m_req.w_valid  = wq_valid && s_req[wq_head].w_valid;
    m_req.w_data   = s_req[wq_head].w_data;
    m_req.w_strb   = s_req[wq_head].w_strb;
    m_req.w_last   = s_req[wq_head].w_last;
    m_req.b_ready  = bq_valid && s_req[bq_head].b_ready;

    for (int unsigned k = 0; k < NM; k++) begin
      s_rsp[k]          = '0;
      s_rsp[k].ar_ready = ar_fire && (ar_sel == IW'(k));
      s_rsp[k].aw_ready = aw_fire && (aw_sel == IW'(k));
      s_rsp[k].r_data   = m_rsp.r_data;
      s_rsp[k].r_resp   = m_rsp.r_resp;
      s_rsp[k].r_last   = m_rsp.r_last;
      s_rsp[k].r_valid  = rq_valid && m_rsp.r_valid && (rq_head == IW'(k));
      s_rsp[k].w_ready  = wq_valid && m_rsp.w_ready && (wq_head == IW'(k));
      s_rsp[k].b_valid  = bq_valid && m_rsp.b_valid && (bq_head == IW'(k));
      s_rsp[k].b_resp   = m_rsp.b_resp;
    end
  end

endmodule
