// Block-level control slave (s_axi_control) of one accelerator.
//
// An AXI4-Lite slave holding the start/done/idle handshake, the interrupt
// enables and the scalar arguments (image size and two kernel parameters).
// Writing 1 to CTRL[0] raises ap_start for one cycle when the kernel is idle.
// When the kernel reports done, CTRL[1] is set until the next read of CTRL,
// and ISR[0] is set until software writes 1 to it; `interrupt` is
// GIE & IER & ISR.  RESULT (0x30) reads back a value the kernel reports.  The register map follows the usual layout of HLS control
// slaves (see dehaze_pkg); the exact offsets are this design's choice.
// Timing: a write is taken when AW and W are both valid and answered with
// B one cycle later; a read answers with R one cycle after AR.
module hls_ctrl_regs
  import dehaze_pkg::*;
#(
  parameter logic [31:0] PARAM0_RST = 32'd0,
  parameter logic [31:0] PARAM1_RST = 32'd0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  axil_req_t         s_req,
  output axil_rsp_t         s_rsp,
  output logic              ap_start,     // one-cycle start pulse
  input  logic              ap_done,      // one-cycle done pulse from the kernel
  input  logic              ap_idle,
  output logic [DIM_W-1:0]  rows,
  output logic [DIM_W-1:0]  cols,
  output logic [31:0]       param0,
  output logic [31:0]       param1,
  input  logic [31:0]       result,
  output logic              interrupt
);

  logic        done_sticky, gie, ier, isr;
  logic [31:0] rows_q, cols_q;
  logic        b_pend, r_pend;
  data_t       r_data_q;

  wire wr_fire = s_req.aw_valid && s_req.w_valid && !b_pend;
  wire rd_fire = s_req.ar_valid && !r_pend;
  wire [7:0] waddr = s_req.aw_addr[7:0];
  wire [7:0] raddr = s_req.ar_addr[7:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ap_start    <= 1'b0;
      done_sticky <= 1'b0;
      gie         <= 1'b0;
      ier         <= 1'b0;
      isr         <= 1'b0;
      rows_q      <= 32'(MAX_ROWS);
      cols_q      <= 32'(MAX_COLS);
      param0      <= PARAM0_RST;
      param1      <= PARAM1_RST;
      b_pend      <= 1'b0;
      r_pend      <= 1'b0;
      r_data_q    <= '0;
    end else begin
      ap_start <= 1'b0;
      if (ap_done) begin
        done_sticky <= 1'b1;
        isr         <= 1'b1;
      end
      if (wr_fire) begin
        b_pend <= 1'b1;
        unique case (waddr)
          REG_CTRL:   if (s_req.w_data[0] && ap_idle) ap_start <= 1'b1;
          REG_GIE:    gie <= s_req.w_data[0];
          REG_IER:    ier <= s_req.w_data[0];
          REG_ISR:    if (s_req.w_data[0] && !ap_done) isr <= 1'b0;
          REG_ROWS:   rows_q <= s_req.w_data;
          REG_COLS:   cols_q <= s_req.w_data;
          REG_PARAM0: param0 <= s_req.w_data;
          REG_PARAM1: param1 <= s_req.w_data;
          default: ;
        endcase
      end else if (b_pend && s_req.b_ready) begin
        b_pend <= 1'b0;
      end
      if (rd_fire) begin
        r_pend <= 1'b1;
        unique case (raddr)
          REG_CTRL: begin
            r_data_q <= {29'd0, ap_idle, done_sticky, 1'b0};
            if (!ap_done) done_sticky <= 1'b0;
          end
          REG_GIE:    r_data_q <= {31'd0, gie};
          REG_IER:    r_data_q <= {31'd0, ier};
          REG_ISR:    r_data_q <= {31'd0, isr};
          REG_ROWS:   r_data_q <= rows_q;
          REG_COLS:   r_data_q <= cols_q;
          REG_PARAM0: r_data_q <= param0;
          REG_PARAM1: r_data_q <= param1;
          REG_RESULT: r_data_q <= result;
          default:    r_data_q <= '0;
        endcase
      end else if (r_pend && s_req.r_ready) begin
        r_pend <= 1'b0;
      end
    end
  end

  assign rows      = rows_q[DIM_W-1:0];
  assign cols      = cols_q[DIM_W-1:0];
  assign interrupt = gie && ier && isr;

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
