// IP_LUT: tone mapping through a 256-entry look-up table.
//
// First reads the 256-word table (pointer 0, value in bits [7:0]) into an
// on-chip array, then streams the restored RGB image (pointer 1) through it,
// replacing each of R, G and B by LUT[value], and writes the result, the
// display-ready frame, to pointer 2.  The image read starts together with the
// table read, so its first bursts are already buffered when mapping begins;
// after the 256 table words the kernel maps one pixel per clock.  The same
// table is applied to the three channels.  The table format and the
// two-phase schedule are this design's choices.
module lut_accel
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
  output axi_req_t  m_req [3],
  input  axi_rsp_t  m_rsp [3],
  output logic      interrupt
);

  logic              ap_start, ap_done, running;
  logic [DIM_W-1:0]  rows, cols;
  addr_t             ptr [3];
  logic [31:0]       npix;
  logic              wr_done;

  logic [7:0]  lut [256];
  logic [8:0]  nload;               // table entries loaded
  wire         loaded = nload[8];

  logic  t_valid, p_valid, o_ready;
  data_t t_data, p_data;

  hls_ctrl_regs u_ctrl (
    .clk, .rst_n, .s_req(s_ctrl_req), .s_rsp(s_ctrl_rsp),
    .ap_start, .ap_done, .ap_idle(!running),
    .rows, .cols, .param0(), .param1(), .result(32'd0), .interrupt
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

  axi_rd_stream #(.BURST(BURST)) u_rd_lut (
    .clk, .rst_n, .start(ap_start), .base(ptr[0]), .nwords(32'd256), .busy(),
    .m_req(m_req[0]), .m_rsp(m_rsp[0]),
    .out_valid(t_valid), .out_ready(1'b1), .out_data(t_data)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || ap_start) nload <= '0;
    else if (t_valid && !loaded) nload <= nload + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (t_valid && !loaded) lut[nload[7:0]] <= t_data[7:0];
  end

  wire map_valid = p_valid && loaded;

  axi_rd_stream #(.BURST(BURST)) u_rd_img (
    .clk, .rst_n, .start(ap_start), .base(ptr[1]), .nwords(npix), .busy(),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .out_valid(p_valid), .out_ready(map_valid && o_ready), .out_data(p_data)
  );

  axi_wr_stream #(.BURST(BURST)) u_wr (
    .clk, .rst_n, .start(ap_start), .base(ptr[2]), .nwords(npix),
    .busy(), .done(wr_done),
    .m_req(m_req[2]), .m_rsp(m_rsp[2]),
    .in_valid(map_valid), .in_ready(o_ready),
    .in_data({8'd0, lut[p_data[23:16]], lut[p_data[15:8]], lut[p_data[7:0]]})
  );

endmodule
