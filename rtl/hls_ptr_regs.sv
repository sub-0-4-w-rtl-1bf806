// Pointer slave (s_axi_control_r) of one accelerator.
//
// An AXI4-Lite slave holding NPTR 32-bit DDR base addresses, one per image
// the kernel reads or writes; pointer k sits at byte offset 0x10 + 8*k.
// Software (the ARM processing system) writes them before starting the
// kernel.  Splitting pointers from the control registers mirrors the two
// control slaves each accelerator has in the system block diagram; the
// offsets are this design's choice.  Timing as in hls_ctrl_regs.
module hls_ptr_regs
  import dehaze_pkg::*;
#(
  parameter int unsigned NPTR = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output addr_t     ptr [NPTR]
);

  logic  b_pend, r_pend;
  data_t r_data_q;

  wire wr_fire = s_req.aw_valid && s_req.w_valid && !b_pend;
  wire rd_fire = s_req.ar_valid && !r_pend;

  // index of the pointer a byte offset selects, NPTR if none
  function automatic int unsigned ptr_index(input logic [7:0] off);
    int unsigned idx;
    idx = NPTR;
    for (int unsigned k = 0; k < NPTR; k++)
      if (off == 8'(PTR_BASE + 8*k)) idx = k;
    return idx;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < NPTR; k++) ptr[k] <= '0;
      b_pend   <= 1'b0;
      r_pend   <= 1'b0;
      r_data_q <= '0;
    end else begin
      if (wr_fire) begin
        b_pend <= 1'b1;
        for (int unsigned k = 0; k < NPTR; k++)
          if (ptr_index(s_req.aw_addr[7:0]) == k) ptr[k] <= s_req.w_data;
      end else if (b_pend && s_req.b_ready) begin
        b_pend <= 1'b0;
      end
      if (rd_fire) begin
        r_pend   <= 1'b1;
        r_data_q <= '0;
        for (int unsigned k = 0; k < NPTR; k++)
          if (ptr_index(s_req.ar_addr[7:0]) == k) r_data_q <= ptr[k];
      end else if (r_pend && s_req.r_ready) begin
        r_pend <= 1'b0;
      end
    end
  end

  always_comb begin
    s_rsp          = '0;
    s_rsp.aw_ready = wr_fire;
    s_rsp.w_ready  = wr_fire;
    s_rsp.b_valid  = b_pend;
    s_rsp.b_resp   = RESP_OKAY;
    s_rsp.ar_ready = rd_fire;
    s_rsp.r_valid  = r_pend;
    s_rsp.r_data   = r_data_q;
    s_rsp.r_resp   = RESP_OKAY;
  end

endmodule
