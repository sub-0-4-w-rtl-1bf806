// AXI4 write engine of one m_axi port: writes a stream of 32-bit words to
// `nwords` consecutive words from `base`.
//
// Incoming words are collected in a FIFO of 2*BURST words.  When a whole
// burst (BURST words, or what is left) is buffered the engine issues AW and
// then the W beats back to back, so the interconnect is never held by a
// half-filled burst.  `busy` stays high from `start` until every B response
// of the frame has come back; `done` pulses once then.  `base` must be
// aligned to BURST*4 bytes.  Assertions check that AW and W stay stable
// while valid and not yet taken.
module axi_wr_stream
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
  output logic        done,
  output axi_req_t    m_req,
  input  axi_rsp_t    m_rsp,
  input  logic        in_valid,
  output logic        in_ready,
  input  data_t       in_data
);

  localparam int unsigned FD = 2 * BURST;

  typedef enum logic [1:0] {S_IDLE, S_AW, S_W} state_t;
  state_t state;

  addr_t        aw_addr;
  logic [31:0]  aw_rem;      // words not yet covered by an AW
  logic [31:0]  b_rem;       // bursts whose B has not come back
  logic [8:0]   beats;       // length of the current burst
  logic [8:0]   wcnt;        // W beats sent in the current burst
  logic         active;

  logic                 f_valid, f_ready;
  data_t                f_data;
  logic [$clog2(FD):0]  f_count;

  wire [8:0] next_len = (aw_rem >= 32'(BURST)) ? 9'(BURST) : aw_rem[8:0];
  wire       w_fire   = (state == S_W) && f_valid && m_rsp.w_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      aw_addr <= '0;
      aw_rem  <= '0;
      b_rem   <= '0;
      beats   <= '0;
      wcnt    <= '0;
      active  <= 1'b0;
      done    <= 1'b0;
    end else if (start) begin
      state   <= S_IDLE;
      aw_addr <= base;
      aw_rem  <= nwords;
      b_rem   <= (nwords + 32'(BURST - 1)) / 32'(BURST);
      active  <= (nwords != 0);
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (aw_rem != 0 && 32'(f_count) >= 32'(next_len)) begin
            state <= S_AW;
            beats <= next_len;
          end
        S_AW:
          if (m_rsp.aw_ready) begin
            state   <= S_W;
            wcnt    <= '0;
            aw_rem  <= aw_rem - 32'(beats);
          end
        S_W:
          if (w_fire) begin
            wcnt <= wcnt + 1'b1;
            if (wcnt + 9'd1 == beats) begin
              state   <= S_IDLE;
              aw_addr <= aw_addr + addr_t'({beats, 2'b00});
            end
          end
        default: state <= S_IDLE;
      endcase
      if (m_rsp.b_valid && b_rem != 0) begin
        b_rem <= b_rem - 1;
        if (b_rem == 1) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  assign busy    = active;
  assign f_ready = w_fire;

  always_comb begin
    m_req          = '0;
    m_req.aw_valid = (state == S_AW);
    m_req.aw_addr  = aw_addr;
    m_req.aw_len   = 8'(beats - 9'd1);
    m_req.w_valid  = (state == S_W) && f_valid;
    m_req.w_data   = f_data;
    m_req.w_strb   = 4'hF;
    m_req.w_last   = (wcnt + 9'd1 == beats);
    m_req.b_ready  = 1'b1;
    m_req.r_ready  = 1'b1;
  end

  stream_fifo #(.W(AXI_DW), .DEPTH(FD)) u_fifo (
    .clk, .rst_n, .clear(start),
    .in_valid, .in_ready, .in_data,
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data),
    .count(f_count)
  );

  // bus rules: AW and W held stable until taken
  a_aw_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
    m_req.aw_valid && !m_rsp.aw_ready |=> m_req.aw_valid && $stable(m_req.aw_addr) && $stable(m_req.aw_len));
  a_w_stable: assert property (@(posedge clk) disable iff (!rst_n || start)
    m_req.w_valid && !m_rsp.w_ready |=> m_req.w_valid && $stable(m_req.w_data) && $stable(m_req.w_last));

endmodule
