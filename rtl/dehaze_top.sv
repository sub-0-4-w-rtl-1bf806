// Programmable-logic part of the Dark Channel Prior dehazing system.
//
// Five accelerators run the dehazing flow one after another, each reading
// its input frames from DDR and writing its result frame back:
//   minmat_accel      min(R,G,B) per pixel            -> img_minmat
//   darkchannel_accel 0.9 scale, three 3x3 minima     -> img_darkChannel
//   diffim_accel      0.6 * min(minmat, dark)         -> img_diff_im (airlight map)
//   restoreout_accel  radiance recovery, histogram    -> img_restoreOut, LUT_array
//   lut_accel         tone mapping through LUT_array  -> img_output
// All 14 m_axi ports meet in axi_mem_intercon, whose single master port is
// m_axi (to the processing system's high-performance DDR port).  The ten
// AXI4-Lite control slaves (a control and a pointer slave per accelerator)
// hang off axil_periph_xbar, whose slave port s_axil comes from the
// processing system's general-purpose master port.  Software allocates the
// DDR buffers, writes sizes and pointers, starts each kernel and waits for
// its done flag or interrupt before starting the next.
// Control address map (64 KB windows from 0x43C0_0000):
//   window 2k = control slave of kernel k, window 2k+1 = its pointer slave,
//   k = 0 minmat, 1 darkchannel, 2 diffim, 3 restoreout, 4 lut.
// Memory port order on the interconnect: 0-1 minmat, 2-3 darkchannel,
// 4-6 diffim, 7-10 restoreout, 11-13 lut.
// The kernels, their order and the two interconnects follow the document's
// system block diagram; the address map and port order are this design's.
module dehaze_top
  import dehaze_pkg::*;
#(
  parameter int unsigned BURST = 16,
  parameter int unsigned MAX_W = MAX_COLS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_axil_req,
  output axil_rsp_t s_axil_rsp,
  output axi_req_t  m_axi_req,
  input  axi_rsp_t  m_axi_rsp,
  output logic [4:0] irq
);

  localparam int unsigned NS = 10;
  localparam int unsigned NM = 14;

  axil_req_t lreq [NS];
  axil_rsp_t lrsp [NS];
  axi_req_t  mreq [NM];
  axi_rsp_t  mrsp [NM];

  axil_periph_xbar #(.NS(NS)) u_periph (
    .clk, .rst_n, .s_req(s_axil_req), .s_rsp(s_axil_rsp), .m_req(lreq), .m_rsp(lrsp)
  );

  axi_mem_intercon #(.NM(NM)) u_mem (
    .clk, .rst_n, .s_req(mreq), .s_rsp(mrsp), .m_req(m_axi_req), .m_rsp(m_axi_rsp)
  );

  minmat_accel #(.BURST(BURST)) u_minmat (
    .clk, .rst_n,
    .s_ctrl_req(lreq[0]), .s_ctrl_rsp(lrsp[0]), .s_ptr_req(lreq[1]), .s_ptr_rsp(lrsp[1]),
    .m_req(mreq[0:1]), .m_rsp(mrsp[0:1]), .interrupt(irq[0])
  );

  darkchannel_accel #(.BURST(BURST), .MAX_W(MAX_W)) u_dark (
    .clk, .rst_n,
    .s_ctrl_req(lreq[2]), .s_ctrl_rsp(lrsp[2]), .s_ptr_req(lreq[3]), .s_ptr_rsp(lrsp[3]),
    .m_req(mreq[2:3]), .m_rsp(mrsp[2:3]), .interrupt(irq[1])
  );

  diffim_accel #(.BURST(BURST)) u_diff (
    .clk, .rst_n,
    .s_ctrl_req(lreq[4]), .s_ctrl_rsp(lrsp[4]), .s_ptr_req(lreq[5]), .s_ptr_rsp(lrsp[5]),
    .m_req(mreq[4:6]), .m_rsp(mrsp[4:6]), .interrupt(irq[2])
  );

  restoreout_accel #(.BURST(BURST)) u_restore (
    .clk, .rst_n,
    .s_ctrl_req(lreq[6]), .s_ctrl_rsp(lrsp[6]), .s_ptr_req(lreq[7]), .s_ptr_rsp(lrsp[7]),
    .m_req(mreq[7:10]), .m_rsp(mrsp[7:10]), .interrupt(irq[3])
  );

  lut_accel #(.BURST(BURST)) u_lut (
    .clk, .rst_n,
    .s_ctrl_req(lreq[8]), .s_ctrl_rsp(lrsp[8]), .s_ptr_req(lreq[9]), .s_ptr_rsp(lrsp[9]),
    .m_req(mreq[11:13]), .m_rsp(mrsp[11:13]), .interrupt(irq[4])
  );

endmodule
