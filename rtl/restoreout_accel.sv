// IP_restoreOut: radiance recovery, grey-level histogram and LUT generation.
//
// Reads the hazy RGB image (pointer 0) and the diffusion map V (pointer 1)
// side by side.  V is the per-pixel atmospheric veil A*(1-t), so with the
// haze model I = J*t + A*(1-t) each channel is restored as
//     J = A * (I - V) / max(A - V, DEN_MIN)
// in fixed point: a pipelined divider forms R = round(A * 2^16 / den) once per
// pixel (the denominator is shared by the three channels), then each channel
// is J = sat8(((I - V)+ * R + 2^15) >> 16).  DEN_MIN keeps the denominator
// away from zero in dense haze and the result saturates to 8 bits.  The
// restored pixel is written to pointer 2, and its grey level
// (77 R + 150 G + 29 B + 128) >> 8 is counted in a 256-bin histogram.  After
// the last pixel the histogram is turned into its cumulative distribution
// and into a 256-entry tone-mapping table
//     LUT[i] = round(255 * cdf(i) / N),   N = rows * cols,
// written to pointer 3 for the LUT kernel.
// Registers: PARAM0 = airlight A (default 255), PARAM1 = DEN_MIN (default 26,
// i.e. a transmission floor of about 0.1).
// Timing: 256 clocks to clear the histogram, then one pixel per clock with a
// 24-clock divider latency, then about 34 clocks per table entry.
// The document gives the stages (restoration formula with a clamped
// denominator and saturation, greyscale, histogram, recomputed histogram as
// LUT); the exact fixed-point formats, A, DEN_MIN, the grey weights and the
// equalisation formula for the table are this design's choices.
module restoreout_accel
  import dehaze_pkg::*;
#(
  parameter int unsigned BURST   = 16,
  parameter logic [31:0] A_RST   = 32'd255,
  parameter logic [31:0] DMIN_RST = 32'd26
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_ctrl_req,
  output axil_rsp_t s_ctrl_rsp,
  input  axil_req_t s_ptr_req,
  output axil_rsp_t s_ptr_rsp,
  output axi_req_t  m_req [4],
  input  axi_rsp_t  m_rsp [4],
  output logic      interrupt
);

  localparam int unsigned QW = 24;        // divider numerator / quotient bits
  localparam int unsigned HW = 22;        // histogram bin width (2^22 > 1920*1080)

  typedef enum logic [2:0] {S_IDLE, S_CLR, S_PIX, S_CDF, S_DIV, S_PUSH, S_WAIT} state_t;
  state_t state;

  logic              ap_start, ap_done;
  logic [DIM_W-1:0]  rows, cols;
  logic [31:0]       p_air, p_dmin;
  addr_t             ptr [4];
  logic [31:0]       npix, pix_cnt;
  logic              img_done, lut_done, img_fin, lut_fin;

  hls_ctrl_regs #(.PARAM0_RST(A_RST), .PARAM1_RST(DMIN_RST)) u_ctrl (
    .clk, .rst_n, .s_req(s_ctrl_req), .s_rsp(s_ctrl_rsp),
    .ap_start, .ap_done, .ap_idle(state == S_IDLE),
    .rows, .cols, .param0(p_air), .param1(p_dmin), .result(32'd0), .interrupt
  );

  hls_ptr_regs #(.NPTR(4)) u_ptr (
    .clk, .rst_n, .s_req(s_ptr_req), .s_rsp(s_ptr_rsp), .ptr
  );

  assign npix = 32'(rows) * 32'(cols);

  // ---------------------------------------------------------------- inputs
  logic  a_valid, b_valid, d_in_ready;
  data_t a_data, b_data;
  wire   join_valid = a_valid && b_valid && (state == S_PIX);
  wire   join_fire  = join_valid && d_in_ready;

  axi_rd_stream #(.BURST(BURST)) u_rd_img (
    .clk, .rst_n, .start(ap_start), .base(ptr[0]), .nwords(npix), .busy(),
    .m_req(m_req[0]), .m_rsp(m_rsp[0]),
    .out_valid(a_valid), .out_ready(join_fire), .out_data(a_data)
  );

  axi_rd_stream #(.BURST(BURST)) u_rd_diff (
    .clk, .rst_n, .start(ap_start), .base(ptr[1]), .nwords(npix), .busy(),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .out_valid(b_valid), .out_ready(join_fire), .out_data(b_data)
  );

  // ------------------------------------------------- numerator, denominator
  logic [7:0]    air, dmin, veil, den;
  logic [7:0]    n_c [3];
  logic [QW-1:0] div_num;

  assign air  = p_air[7:0];
  assign dmin = p_dmin[7:0];
  assign veil = b_data[7:0];

  always_comb begin
    den = (veil < air && (air - veil) > dmin) ? (air - veil) : dmin;
    for (int c = 0; c < 3; c++) begin
      logic [7:0] i_c;
      i_c    = a_data[8*c +: 8];
      n_c[c] = (i_c > veil) ? (i_c - veil) : 8'd0;
    end
    div_num = {air, 16'd0} + QW'(den >> 1);
  end

  logic          d_out_valid, d_out_ready;
  logic [QW-1:0] recip;
  logic [23:0]   d_side;

  pipe_div #(.NW(QW), .DW(8), .SW(24)) u_div (
    .clk, .rst_n,
    .in_valid(join_valid), .in_ready(d_in_ready),
    .in_num(div_num), .in_den(den), .in_side({n_c[2], n_c[1], n_c[0]}),
    .out_valid(d_out_valid), .out_ready(d_out_ready),
    .out_quot(recip), .out_side(d_side)
  );

  // ------------------------------------------------ radiance, grey, output
  logic [7:0]  j_c [3];
  logic [7:0]  grey;
  logic        o_ready;

  always_comb begin
    logic [QW+8:0] prod;
    logic [17:0]   g;
    for (int c = 0; c < 3; c++) begin
      prod   = (QW+9)'(d_side[8*c +: 8]) * (QW+9)'(recip) + (QW+9)'(32768);
      j_c[c] = (prod[QW+8:24] != '0) ? 8'hFF : prod[23:16];
    end
    g    = 18'd77 * 18'(j_c[0]) + 18'd150 * 18'(j_c[1]) + 18'd29 * 18'(j_c[2]) + 18'd128;
    grey = g[15:8];
  end

  wire pix_fire = d_out_valid && o_ready;
  assign d_out_ready = o_ready;

  axi_wr_stream #(.BURST(BURST)) u_wr_img (
    .clk, .rst_n, .start(ap_start), .base(ptr[2]), .nwords(npix),
    .busy(), .done(img_done),
    .m_req(m_req[2]), .m_rsp(m_rsp[2]),
    .in_valid(d_out_valid), .in_ready(o_ready), .in_data({8'd0, j_c[2], j_c[1], j_c[0]})
  );

  // ---------------------------------------------- histogram and LUT build
  logic [HW-1:0] hist [256];
  logic [8:0]    bin;
  logic [31:0]   cdf;
  logic          div_start, div_done;
  logic [31:0]   div_q;
  logic          lut_valid, lut_ready;
  logic [7:0]    lut_val;

  seq_div #(.W(32)) u_lutdiv (
    .clk, .rst_n, .start(div_start),
    .num(32'd255 * cdf + (npix >> 1)), .den(npix),
    .busy(), .done(div_done), .quot(div_q)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bin       <= '0;
      cdf       <= '0;
      pix_cnt   <= '0;
      div_start <= 1'b0;
      lut_valid <= 1'b0;
      lut_val   <= '0;
      img_fin   <= 1'b0;
      lut_fin   <= 1'b0;
    end else begin
      div_start <= 1'b0;
      if (img_done) img_fin <= 1'b1;
      if (lut_done) lut_fin <= 1'b1;
      unique case (state)
        S_IDLE:
          if (ap_start) begin
            state   <= S_CLR;
            bin     <= '0;
            pix_cnt <= '0;
            img_fin <= 1'b0;
            lut_fin <= 1'b0;
          end
        S_CLR: begin
          bin <= bin + 1'b1;
          if (bin == 9'd255) begin
            state <= (npix == 0) ? S_CDF : S_PIX;
            bin   <= '0;
            cdf   <= '0;
          end
        end
        S_PIX: begin
          if (pix_fire) pix_cnt <= pix_cnt + 1;
          if (pix_fire && pix_cnt + 1 == npix) state <= S_CDF;
        end
        S_CDF: begin
          cdf       <= cdf + 32'(hist[bin[7:0]]);
          div_start <= 1'b1;
          state     <= S_DIV;
        end
        S_DIV:
          if (div_done) begin
            lut_val   <= (div_q > 32'd255) ? 8'hFF : div_q[7:0];
            lut_valid <= 1'b1;
            state     <= S_PUSH;
          end
        S_PUSH:
          if (lut_ready) begin
            lut_valid <= 1'b0;
            bin       <= bin + 1'b1;
            state     <= (bin == 9'd255) ? S_WAIT : S_CDF;
          end
        S_WAIT:
          if ((img_fin || img_done || npix == 0) && (lut_fin || lut_done)) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ap_done = (state == S_WAIT) && (img_fin || img_done || npix == 0) && (lut_fin || lut_done);

  always_ff @(posedge clk) begin
    if (state == S_CLR)
      hist[bin[7:0]] <= '0;
    else if (state == S_PIX && pix_fire)
      hist[grey] <= hist[grey] + 1'b1;
  end

  axi_wr_stream #(.BURST(BURST)) u_wr_lut (
    .clk, .rst_n, .start(ap_start), .base(ptr[3]), .nwords(32'd256),
    .busy(), .done(lut_done),
    .m_req(m_req[3]), .m_rsp(m_rsp[3]),
    .in_valid(lut_valid), .in_ready(lut_ready), .in_data({24'd0, lut_val})
  );

endmodule
