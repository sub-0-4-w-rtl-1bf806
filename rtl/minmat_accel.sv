// IP_minMat: per-pixel minimum of the three colour channels.
//
// Software writes the image size to the control slave and two DDR pointers
// to the pointer slave (0: RGB input image, 1: single-channel output image),
// then sets ap_start.  The kernel streams the RGB frame in through m_axi port
// 0, splits each pixel into R, G and B, keeps the smallest, and streams the
// result out through m_axi port 1, one pixel per clock once the bursts flow.
// ap_done (and the interrupt, when enabled) follows the last write response.
// The arithmetic is the document's; the bus protocol details, pixel packing
// ({8'h0,B,G,R} in, value in bits [7:0] out) and register offsets are this
// design's choice.
module minmat_accel
  import dehaze_pkg::*;
#(
  parameter int unsigned BURST = 16
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_ctrl_req,
  output axil_rsp_t s_ctrl_rsp,
  input  axil_req_t s_ptr_req,
  output axil_rsp_t s_ptr_rsp,
  output axi_req_t  m_req [2],
  input  axi_rsp_t  m_rsp [2],
  output logic      interrupt
);

  logic              ap_start, ap_done, running;
  logic [DIM_W-1:0]  rows, cols;
  addr_t             ptr [2];
  logic [31:0]       npix;
  logic              rd_busy, wr_busy, wr_done;

  logic  s_valid, s_ready, o_valid, o_ready;
  data_t s_data, o_data;

  hls_ctrl_regs u_ctrl (
    .clk, .rst_n, .s_req(s_ctrl_req), .s_rsp(s_ctrl_rsp),
    .ap_start, .ap_done, .ap_idle(!running),
    .rows, .cols, .param0(), .param1(), .result(32'd0), .interrupt
  );

  hls_ptr_regs #(.NPTR(2)) u_ptr (
    .clk, .rst_n, .s_req(s_ptr_req), .s_rsp(s_ptr_rsp), .ptr
  );

  assign npix = 32'(rows) * 32'(cols);

  always_ff @(posedge clk) begin
    if (!rst_n)        running <= 1'b0;
    else if (ap_start) running <= 1'b1;
    else if (wr_done)  running <= 1'b0;
  end
  assign ap_done = wr_done;

  axi_rd_stream #(.BURST(BURST)) u_rd (
    .clk, .rst_n, .start(ap_start), .base(ptr[0]), .nwords(npix), .busy(rd_busy),
    .m_req(m_req[0]), .m_rsp(m_rsp[0]),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

  // colour extraction and minimum: combinational, one pixel per beat
  assign o_valid = s_valid;
  assign s_ready = o_ready;
  assign o_data  = {24'd0, min3(s_data[7:0], s_data[15:8], s_data[23:16])};

  axi_wr_stream #(.BURST(BURST)) u_wr (
    .clk, .rst_n, .start(ap_start), .base(ptr[1]), .nwords(npix),
    .busy(wr_busy), .done(wr_done),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .in_valid(o_valid), .in_ready(o_ready), .in_data(o_data)
  );

endmodule
