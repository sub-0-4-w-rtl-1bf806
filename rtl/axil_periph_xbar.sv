// 1-to-N AXI4-Lite control crossbar (the peripheral-side "axi_periph").
//
// Routes the processing system's general-purpose AXI4-Lite master to NS
// control slaves.  Slave k owns the 64 KB window BASE + k * 64 KB, decoded
// from address bits [19:16]; the low 16 bits are passed on.  One write and
// one read may be in flight at a time: AW/W go combinationally to the decoded
// slave, the crossbar then locks onto that slave until its B (or R) response
// has been taken.  An address outside every window is answered by the
// crossbar itself with DECERR (and 32'hDEADC0DE read data).  The window size
// is the usual default of the vendor tools, taken here as an assumption.
module axil_periph_xbar
  import dehaze_pkg::*;
#(
  parameter int unsigned NS   = 10,
  parameter logic [31:0] BASE = 32'h43C0_0000,
  localparam int unsigned IW  = (NS > 1) ? $clog2(NS) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [NS],
  input  axil_rsp_t m_rsp [NS]
);

  function automatic logic [4:0] decode(input addr_t a);
    logic [31:0] off;
    off = a - BASE;
    if (a < BASE || off[31:20] != '0 || off[19:16] >= 4'(NS)) return 5'h10;  // miss
    return {1'b0, off[19:16]};
  endfunction

  logic       w_busy, r_busy, w_err, r_err;
  logic [4:0] w_idx, r_idx;
  wire  [4:0] w_dec = decode(s_req.aw_addr);
  wire  [4:0] r_dec = decode(s_req.ar_addr);
  wire  [4:0] w_cur = w_busy ? w_idx : w_dec;
  wire  [4:0] r_cur = r_busy ? r_idx : r_dec;

  logic aw_hs, ar_hs;

  always_comb begin
    s_rsp = '0;
    aw_hs = 1'b0;
    ar_hs = 1'b0;
    for (int unsigned k = 0; k < NS; k++) begin
      m_req[k]         = '0;
      m_req[k].aw_addr = {16'd0, s_req.aw_addr[15:0]};
      m_req[k].ar_addr = {16'd0, s_req.ar_addr[15:0]};
      m_req[k].w_data  = s_req.w_data;
      m_req[k].w_strb  = s_req.w_strb;
      if (w_cur == 5'(k)) begin
        m_req[k].aw_valid = !w_busy && s_req.aw_valid;
        m_req[k].w_valid  = !w_busy && s_req.w_valid;
        m_req[k].b_ready  = w_busy && s_req.b_ready;
        if (!w_busy) begin
          s_rsp.aw_ready = m_rsp[k].aw_ready;
          s_rsp.w_ready  = m_rsp[k].w_ready;
          aw_hs          = m_rsp[k].aw_ready && s_req.aw_valid;
        end else begin
          s_rsp.b_valid  = m_rsp[k].b_valid;
          s_rsp.b_resp   = m_rsp[k].b_resp;
        end
      end
      if (r_cur == 5'(k)) begin
        m_req[k].ar_valid = !r_busy && s_req.ar_valid;
        m_req[k].r_ready  = r_busy && s_req.r_ready;
        if (!r_busy) begin
          s_rsp.ar_ready = m_rsp[k].ar_ready;
          ar_hs          = m_rsp[k].ar_ready && s_req.ar_valid;
        end else begin
          s_rsp.r_valid  = m_rsp[k].r_valid;
          s_rsp.r_data   = m_rsp[k].r_data;
          s_rsp.r_resp   = m_rsp[k].r_resp;
        end
      end
    end
    // decode miss: answered here
    if (w_cur[4]) begin
      if (!w_busy) begin
        s_rsp.aw_ready = s_req.aw_valid && s_req.w_valid;
        s_rsp.w_ready  = s_req.aw_valid && s_req.w_valid;
        aw_hs          = s_req.aw_valid && s_req.w_valid;
      end else begin
        s_rsp.b_valid  = 1'b1;
        s_rsp.b_resp   = RESP_DECERR;
      end
    end
    if (r_cur[4]) begin
      if (!r_busy) begin
        s_rsp.ar_ready = s_req.ar_valid;
        ar_hs          = s_req.ar_valid;
      end else begin
        s_rsp.r_valid  = 1'b1;
        s_rsp.r_data   = 32'hDEAD_C0DE;
        s_rsp.r_resp   = RESP_DECERR;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      w_busy <= 1'b0;
      r_busy <= 1'b0;
      w_idx  <= '0;
      r_idx  <= '0;
    end else begin
      if (!w_busy && aw_hs) begin
        w_busy <= 1'b1;
        w_idx  <= w_dec;
      end else if (w_busy && s_rsp.b_valid && s_req.b_ready) begin
        w_busy <= 1'b0;
      end
      if (!r_busy && ar_hs) begin
        r_busy <= 1'b1;
        r_idx  <= r_dec;
      end else if (r_busy && s_rsp.r_valid && s_req.r_ready) begin
        r_busy <= 1'b0;
      end
    end
  end

endmodule
