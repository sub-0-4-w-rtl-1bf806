// Behavioural model of the PS DDR memory as seen through AXI4 slave ports
// (not synthesizable logic, testbench use only).
//
// NPORTS independent AXI4 slave ports share one word-addressed memory of
// MEM_WORDS 32-bit words.  Each port serves one read burst and one write burst
// at a time, in order: a read returns its first beat LAT cycles after AR, a
// write answers B once its last W beat is taken.  With STALL_PCT > 0 the R
// and W channels drop ready/valid at random to exercise back-pressure.  The
// testbench reads and writes `mem` directly to load images and check results.
module axi_ddr_model
  import dehaze_pkg::*;
#(
  parameter int unsigned NPORTS    = 1,
  parameter int unsigned MEM_WORDS = 1 << 16,
  parameter int unsigned LAT       = 8,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  axi_req_t s_req [NPORTS],
  output axi_rsp_t s_rsp [NPORTS]
);

  data_t mem [MEM_WORDS];

  initial begin
    foreach (mem[i]) mem[i] = '0;
  end

  function automatic bit stall();
    return (STALL_PCT != 0) && (($urandom % 100) < STALL_PCT);
  endfunction

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    // read side
    logic        r_act;
    int unsigned r_wait, r_left;
    addr_t       r_addr;
    // write side
    logic        w_act, b_pend;
    addr_t       w_addr;
    logic        r_stall, w_stall;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        r_act   <= 1'b0;
        w_act   <= 1'b0;
        b_pend  <= 1'b0;
        r_stall <= 1'b0;
        w_stall <= 1'b0;
        r_wait  <= 0;
        r_left  <= 0;
        r_addr  <= '0;
        w_addr  <= '0;
      end else begin
        r_stall <= stall();
        w_stall <= stall();
        // AR
        if (!r_act && s_req[p].ar_valid) begin
          r_act  <= 1'b1;
          r_wait <= LAT;
          r_left <= int'(s_req[p].ar_len) + 1;
          r_addr <= s_req[p].ar_addr;
        end else if (r_act) begin
          if (r_wait != 0) r_wait <= r_wait - 1;
          else if (s_rsp[p].r_valid && s_req[p].r_ready) begin
            r_addr   <= r_addr + 4;
            r_left   <= r_left - 1;
            if (r_left == 1) r_act <= 1'b0;
          end
        end
        // AW / W / B
        if (!w_act && !b_pend && s_req[p].aw_valid) begin
          w_act  <= 1'b1;
          w_addr <= s_req[p].aw_addr;
        end else if (w_act && s_req[p].w_valid && s_rsp[p].w_ready) begin
          if ((w_addr >> 2) < MEM_WORDS) mem[w_addr >> 2] <= s_req[p].w_data;
          w_addr   <= w_addr + 4;
          if (s_req[p].w_last) begin
            w_act  <= 1'b0;
            b_pend <= 1'b1;
          end
        end else if (b_pend && s_req[p].b_ready) begin
          b_pend <= 1'b0;
        end
      end
    end

    always_comb begin
      s_rsp[p]          = '0;
      s_rsp[p].ar_ready = !r_act;
      s_rsp[p].r_valid  = r_act && (r_wait == 0) && !r_stall;
      s_rsp[p].r_data   = ((r_addr >> 2) < MEM_WORDS) ? mem[r_addr >> 2] : '0;
      s_rsp[p].r_last   = (r_left == 1);
      s_rsp[p].aw_ready = !w_act && !b_pend;
      s_rsp[p].w_ready  = w_act && !w_stall;
      s_rsp[p].b_valid  = b_pend;
    end
  end

endmodule
