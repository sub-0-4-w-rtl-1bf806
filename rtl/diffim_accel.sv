// IP_diffM: diffusion (spatially varying airlight) map.
//
// Reads the min image (pointer 0) and the dark channel (pointer 1) side by
// side, keeps the darker of the two pixels, multiplies it by 0.6 (PARAM0, a
// Q0.8 factor, default 154/256) and writes the map img_diff_im to pointer 2.
// The map acts as the per-pixel atmospheric veil used by the restoration
// kernel.  One pixel per clock: a pixel moves when both input streams hold a
// word and the write engine can take one.  The operations are the document's;
// the fixed-point factor is this design's rounding of 0.6.
module diffim_accel
  import dehaze_pkg::*;
#(
  parameter int unsigned BURST    = 16,
  parameter logic [31:0] SCALE_Q8 = 32'd154     // 0.6 * 256
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_ctrl_req,
  output axil_rsp_t s_ctrl_rsp,
  input  axil_req_t s_ptr_req,
  output axil_rsp_t s_ptr_rsp,
  output axi_req_t  m_req [3],
  input  axi_rsp_t  m_rsp [3],
  output logic      interrupt
);

  logic              ap_start, ap_done, running;
  logic [DIM_W-1:0]  rows, cols;
  logic [31:0]       scale;
  addr_t             ptr [3];
  logic [31:0]       npix;
  logic              wr_done;

  logic  a_valid, b_valid, o_ready;
  data_t a_data, b_data;
  logic [7:0] m;

  hls_ctrl_regs #(.PARAM0_RST(SCALE_Q8)) u_ctrl (
    .clk, .rst_n, .s_req(s_ctrl_req), .s_rsp(s_ctrl_rsp),
    .ap_start, .ap_done, .ap_idle(!running),
    .rows, .cols, .param0(scale), .param1(), .result(32'd0), .interrupt
  );

  hls_ptr_regs #(.NPTR(3)) u_ptr (
    .clk, .rst_n, .s_req(s_ptr_req), .s_rsp(s_ptr_rsp), .ptr
  );

  assign npix = 32'(rows) * 32'(cols);

  always_ff @(posedge clk) begin
    if (!rst_n)        running <= 1'b0;
    else if (ap_start) running <= 1'b1;
    else if (wr_done)  running <= 1'b0;
  end
  assign ap_done = wr_done;

  wire both  = a_valid && b_valid;
  wire taken = both && o_ready;

  axi_rd_stream #(.BURST(BURST)) u_rd_min (
    .clk, .rst_n, .start(ap_start), .base(ptr[0]), .nwords(npix), .busy(),
    .m_req(m_req[0]), .m_rsp(m_rsp[0]),
    .out_valid(a_valid), .out_ready(taken), .out_data(a_data)
  );

  axi_rd_stream #(.BURST(BURST)) u_rd_dark (
    .clk, .rst_n, .start(ap_start), .base(ptr[1]), .nwords(npix), .busy(),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .out_valid(b_valid), .out_ready(taken), .out_data(b_data)
  );

  assign m = (a_data[7:0] < b_data[7:0]) ? a_data[7:0] : b_data[7:0];

  axi_wr_stream #(.BURST(BURST)) u_wr (
    .clk, .rst_n, .start(ap_start), .base(ptr[2]), .nwords(npix),
    .busy(), .done(wr_done),
    .m_req(m_req[2]), .m_rsp(m_rsp[2]),
    .in_valid(both), .in_ready(o_ready), .in_data({24'd0, scale_q8(m, scale[8:0])})
  );

endmodule
