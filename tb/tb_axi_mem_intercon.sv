// Self-checking testbench of axi_mem_intercon with its default 14 ports.
// Three of the ports (0, 5 and 13) each carry a read engine and a write
// engine that copy a block of DDR to another place, flipping bits on the
// way; all three run at once through one DDR model with random stalls, so
// reads and writes of different ports compete for the single port.  Every
// copied word is checked, a word past each block must be untouched, and the
// run must have seen cycles with several competing requests.
module tb_axi_mem_intercon;
  import dehaze_pkg::*;

  localparam int NM = 14, NA = 3;
  localparam int WORDS [NA] = '{301, 517, 160};
  localparam int PORT  [NA] = '{0, 5, 13};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axi_req_t s_req [NM];
  axi_rsp_t s_rsp [NM];
  axi_req_t m_req [1];
  axi_rsp_t m_rsp [1];
  int checks = 0, failures = 0, ar_conflicts = 0, aw_conflicts = 0;

  axi_mem_intercon dut (.clk, .rst_n, .s_req, .s_rsp, .m_req(m_req[0]), .m_rsp(m_rsp[0]));
  axi_ddr_model #(.NPORTS(1), .MEM_WORDS(8192), .STALL_PCT(25)) u_ddr (
    .clk, .rst_n, .s_req(m_req), .s_rsp(m_rsp)
  );

  logic     start;
  axi_req_t rq [NA], wq [NA];
  logic     busy [NA];

  for (genvar a = 0; a < NA; a++) begin : g_agent
    logic  v, r;
    data_t d;
    axi_rd_stream u_rd (
      .clk, .rst_n, .start, .base(addr_t'(a * 8192)), .nwords(32'(WORDS[a])), .busy(),
      .m_req(rq[a]), .m_rsp(s_rsp[PORT[a]]), .out_valid(v), .out_ready(r), .out_data(d)
    );
    axi_wr_stream u_wr (
      .clk, .rst_n, .start, .base(addr_t'(a * 8192 + 4096)), .nwords(32'(WORDS[a])),
      .busy(busy[a]), .done(),
      .m_req(wq[a]), .m_rsp(s_rsp[PORT[a]]), .in_valid(v), .in_ready(r),
      .in_data(d ^ 32'(32'h5A5A_0000 + a))
    );
  end

  always_comb begin
    for (int k = 0; k < NM; k++) s_req[k] = '0;
    for (int a = 0; a < NA; a++) begin
      s_req[PORT[a]]          = rq[a];
      s_req[PORT[a]].aw_valid = wq[a].aw_valid;
      s_req[PORT[a]].aw_addr  = wq[a].aw_addr;
      s_req[PORT[a]].aw_len   = wq[a].aw_len;
      s_req[PORT[a]].w_valid  = wq[a].w_valid;
      s_req[PORT[a]].w_data   = wq[a].w_data;
      s_req[PORT[a]].w_strb   = wq[a].w_strb;
      s_req[PORT[a]].w_last   = wq[a].w_last;
      s_req[PORT[a]].b_ready  = 1'b1;
    end
  end

  always @(posedge clk) begin
    int nar, naw;
    nar = 0; naw = 0;
    for (int k = 0; k < NM; k++) begin
      nar += int'(s_req[k].ar_valid);
      naw += int'(s_req[k].aw_valid);
    end
    if (nar > 1) ar_conflicts++;
    if (naw > 1) aw_conflicts++;
  end

  // AXI rule: a port never sees R, W-ready or B unless it has a burst granted
  always @(posedge clk) begin
    for (int k = 0; k < NM; k++) begin
      bit used = 0;
      for (int a = 0; a < NA; a++) if (PORT[a] == k) used = 1;
      if (!used && rst_n && (s_rsp[k].r_valid || s_rsp[k].b_valid || s_rsp[k].w_ready)) begin
        failures++;
        $display("FAIL: idle port %0d got a response", k);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < NA; a++)
      for (int i = 0; i < WORDS[a] + 1; i++) begin
        u_ddr.mem[a * 2048 + i] = $urandom;
        u_ddr.mem[a * 2048 + 1024 + i] = 32'hDEAD_BEEF;
      end
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);
    while (busy[0] || busy[1] || busy[2]) @(posedge clk);
    for (int a = 0; a < NA; a++) begin
      for (int i = 0; i < WORDS[a]; i++) begin
        checks++;
        if (u_ddr.mem[a * 2048 + 1024 + i] !== (u_ddr.mem[a * 2048 + i] ^ 32'(32'h5A5A_0000 + a))) begin
          failures++;
          if (failures < 10) $display("FAIL: agent %0d word %0d", a, i);
        end
      end
      checks++;
      if (u_ddr.mem[a * 2048 + 1024 + WORDS[a]] !== 32'hDEAD_BEEF) begin
        failures++;
        $display("FAIL: agent %0d wrote past its block", a);
      end
    end
    $display("competing read requests in %0d cycles, write requests in %0d", ar_conflicts, aw_conflicts);
    checks++;
    if (ar_conflicts == 0) begin
      failures++;
      $display("FAIL: the ports never competed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
