// IP_darkChannel: dark channel of the min-channel image.
//
// Reads the single-channel min image (pointer 0) from DDR, multiplies each
// pixel by 0.9 (PARAM0 register, a Q0.8 factor, default 230/256), passes the
// stream through NPASS = 3 cascaded 3x3 minimum filters and writes the
// result, the dark channel, to pointer 1.  Three 3x3 passes give the minimum
// over a 7x7 patch using only six line buffers, and the whole chain keeps one
// pixel per clock; the output of a pass lags its input by one line and one
// pixel, so a frame takes about (rows+3)*(cols+3) clocks.  The single 0.9
// scaling before the filter loop and the three passes follow the flow chart
// of the dark-channel algorithm; using a true minimum (rather than an all-ones
// convolution) follows the dark-channel definition.
// While the frame streams out the kernel also keeps the brightest dark-channel
// value, the usual atmospheric-light estimate of the Dark Channel Prior, and
// reports it in the RESULT register (0x30) once the kernel is done; software
// may pass it to the restoration kernel as its airlight A.
module darkchannel_accel
  import dehaze_pkg::*;
#(
  parameter int unsigned BURST     = 16,
  parameter int unsigned NPASS     = 3,
  parameter logic [31:0] SCALE_Q8  = 32'd230,   // 0.9 * 256
  parameter int unsigned MAX_W     = MAX_COLS
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
  logic [31:0]       scale;
  addr_t             ptr [2];
  logic [31:0]       npix;
  logic              wr_done;

  logic  s_valid, s_ready, o_ready;
  logic [7:0] a_est;                    // brightest dark-channel value so far
  data_t s_data;

  hls_ctrl_regs #(.PARAM0_RST(SCALE_Q8)) u_ctrl (
    .clk, .rst_n, .s_req(s_ctrl_req), .s_rsp(s_ctrl_rsp),
    .ap_start, .ap_done, .ap_idle(!running),
    .rows, .cols, .param0(scale), .param1(), .result({24'd0, a_est}), .interrupt
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
    .clk, .rst_n, .start(ap_start), .base(ptr[0]), .nwords(npix), .busy(),
    .m_req(m_req[0]), .m_rsp(m_rsp[0]),
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data)
  );

  // temp = 0.9 * img_minmat, then NPASS times temp = min3x3(temp)
  logic       p_valid [NPASS+1];
  logic       p_ready [NPASS+1];
  logic [7:0] p_data  [NPASS+1];

  assign p_valid[0] = s_valid;
  assign s_ready    = p_ready[0];
  assign p_data[0]  = scale_q8(s_data[7:0], scale[8:0]);

  for (genvar k = 0; k < NPASS; k++) begin : g_pass
    min_filter3x3 #(.MAX_W(MAX_W)) u_min (
      .clk, .rst_n, .start(ap_start), .rows, .cols,
      .in_valid(p_valid[k]), .in_ready(p_ready[k]), .in_data(p_data[k]),
      .out_valid(p_valid[k+1]), .out_ready(p_ready[k+1]), .out_data(p_data[k+1])
    );
  end

  assign p_ready[NPASS] = o_ready;

  always_ff @(posedge clk) begin
    if (!rst_n || ap_start) a_est <= '0;
    else if (p_valid[NPASS] && o_ready && p_data[NPASS] > a_est) a_est <= p_data[NPASS];
  end

  axi_wr_stream #(.BURST(BURST)) u_wr (
    .clk, .rst_n, .start(ap_start), .base(ptr[1]), .nwords(npix),
    .busy(), .done(wr_done),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .in_valid(p_valid[NPASS]), .in_ready(o_ready), .in_data({24'd0, p_data[NPASS]})
  );

endmodule
