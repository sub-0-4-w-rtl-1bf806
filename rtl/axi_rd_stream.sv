// AXI4 read engine of one m_axi port: turns a (base address, word count)
// request into a stream of 32-bit words.
//
// On `start` it reads `nwords` consecutive words from `base` in INCR bursts
// of up to BURST beats and delivers them, in order, on the out_* stream.
// Bursts are issued ahead as long as the on-chip FIFO (2*BURST words) can
// take every beat already requested, so R is always accepted and the port can
// sustain one word per clock.  `busy` stays high until the last word has left
// the FIFO.  `base` must be aligned to BURST*4 bytes so no burst crosses a
// 4 KB boundary.  The burst length is this design's choice (the usual
// default of HLS m_axi ports).
// Assertions check that AR stays stable until taken, that no R beat ever
// finds the FIFO full, and that the output word is held until taken.
module axi_rd_stream
  import dehaze_pkg::*;
#(
  parameter int unsigned BURST = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  addr_t       base,
  input  logic [31:0] nwords,
  output logic        busy,
  output axi_req_t    m_req,
  input  axi_rsp_t    m_rsp,
  output logic        out_valid,
  input  logic        out_ready,
  output data_t       out_data
);

  localparam int unsigned FD = 2 * BURST;
  localparam int unsigned CW = $clog2(FD) + 2;

  addr_t        ar_addr;
  logic [31:0]  ar_rem;      // words not yet requested
  logic [31:0]  out_rem;     // words not yet delivered
  logic [CW-1:0] reserved;   // words requested and not yet delivered
  logic          ar_pend;
  logic [8:0]    ar_beats;

  wire [8:0] next_len = (ar_rem >= 32'(BURST)) ? 9'(BURST) : ar_rem[8:0];
  wire       out_fire = out_valid && out_ready;
  logic [$clog2(FD):0] fifo_count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ar_addr  <= '0;
      ar_rem   <= '0;
      out_rem  <= '0;
      reserved <= '0;
      ar_pend  <= 1'b0;
      ar_beats <= '0;
    end else if (start) begin
      ar_addr  <= base;
      ar_rem   <= nwords;
      out_rem  <= nwords;
      reserved <= '0;
      ar_pend  <= 1'b0;
    end else begin
      if (!ar_pend && ar_rem != 0 &&
          (32'(reserved) + 32'(next_len) <= 32'(FD))) begin
        ar_pend  <= 1'b1;
        ar_beats <= next_len;
      end else if (ar_pend && m_rsp.ar_ready) begin
        ar_pend <= 1'b0;
        ar_addr <= ar_addr + addr_t'({ar_beats, 2'b00});
        ar_rem  <= ar_rem - 32'(ar_beats);
      end
      reserved <= reserved + ((ar_pend && m_rsp.ar_ready) ? CW'(ar_beats) : '0)
                           - CW'(out_fire);
      if (out_fire) out_rem <= out_rem - 1;
    end
  end

  assign busy = (out_rem != 0);

  always_comb begin
    m_req          = '0;
    m_req.ar_valid = ar_pend;
    m_req.ar_addr  = ar_addr;
    m_req.ar_len   = 8'(ar_beats - 9'd1);
    m_req.r_ready  = 1'b1;
    m_req.b_ready  = 1'b1;
    m_req.w_strb   = 4'hF;
  end

  logic f_in_ready;

  stream_fifo #(.W(AXI_DW), .DEPTH(FD)) u_fifo (
    .clk, .rst_n, .clear(start),
    .in_valid(m_rsp.r_valid), .in_ready(f_in_ready), .in_data(m_rsp.r_data),
    .out_valid, .out_ready, .out_data,
    .count(fifo_count)
  );

  // bus and stream rules: AR held stable until taken, no R beat ever
  // refused (the credit count guarantees room), output held until taken
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
    m_req.ar_valid && !m_rsp.ar_ready |=> m_req.ar_valid && $stable(m_req.ar_addr) && $stable(m_req.ar_len));
  a_r_room: assert property (@(posedge clk) disable iff (!rst_n || start)
    m_rsp.r_valid |-> f_in_ready);
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
