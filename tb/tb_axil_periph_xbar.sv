// Self-checking testbench of axil_periph_xbar with its default ten slaves.
// Each slave is a pointer register block.  The test writes a distinct value
// to both registers of every slave through the crossbar, checks inside each
// slave that the write landed there and nowhere else, reads every value back
// through the crossbar, and checks that addresses outside the ten windows
// are answered with DECERR without touching any slave.
module tb_axil_periph_xbar;
  import dehaze_pkg::*;

  localparam int NS = 10;
  localparam logic [31:0] BASE = 32'h43C0_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_req_t req;
  axil_rsp_t rsp;
  axil_req_t m_req [NS];
  axil_rsp_t m_rsp [NS];
  addr_t     regs  [NS][2];
  int checks = 0, failures = 0;

  axil_periph_xbar dut (.clk, .rst_n, .s_req(req), .s_rsp(rsp), .m_req, .m_rsp);

  for (genvar k = 0; k < NS; k++) begin : g_s
    addr_t p [2];
    hls_ptr_regs #(.NPTR(2)) u_s (.clk, .rst_n, .s_req(m_req[k]), .s_rsp(m_rsp[k]), .ptr(p));
    assign regs[k][0] = p[0];
    assign regs[k][1] = p[1];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic lite_write(input logic [31:0] a, input logic [31:0] d, output logic [1:0] resp);
    axil_req_t r;
    r = '0; r.aw_valid = 1; r.aw_addr = a; r.w_valid = 1; r.w_data = d; r.w_strb = 4'hF; r.b_ready = 1;
    @(negedge clk) req = r;
    #1;
    while (!rsp.aw_ready) begin @(negedge clk); #1; end
    r.aw_valid = 0; r.w_valid = 0;
    @(negedge clk) req = r;
    #1;
    while (!rsp.b_valid) begin @(negedge clk); #1; end
    resp = rsp.b_resp;
    @(negedge clk) req = '0;
  endtask

  task automatic lite_read(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
    axil_req_t r;
    r = '0; r.ar_valid = 1; r.ar_addr = a; r.r_ready = 1;
    @(negedge clk) req = r;
    #1;
    while (!rsp.ar_ready) begin @(negedge clk); #1; end
    r.ar_valid = 0;
    @(negedge clk) req = r;
    #1;
    while (!rsp.r_valid) begin @(negedge clk); #1; end
    d = rsp.r_data;
    resp = rsp.r_resp;
    @(negedge clk) req = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] val(int k, int j);
    return 32'h1000_0000 * (j + 1) + 32'(k * 64);
  endfunction

  initial begin
    logic [31:0] d;
    logic [1:0]  resp;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NS; k++)
      for (int j = 0; j < 2; j++) begin
        lite_write(BASE + 32'(k) * 32'h1_0000 + 32'h10 + 32'(8 * j), val(k, j), resp);
        check(resp == RESP_OKAY, "write OKAY");
      end
    for (int k = 0; k < NS; k++)
      for (int j = 0; j < 2; j++) check(regs[k][j] == val(k, j), $sformatf("slave %0d reg %0d holds its value", k, j));
    for (int k = NS - 1; k >= 0; k--)
      for (int j = 0; j < 2; j++) begin
        lite_read(BASE + 32'(k) * 32'h1_0000 + 32'h10 + 32'(8 * j), d, resp);
        check(d == val(k, j) && resp == RESP_OKAY, $sformatf("read back slave %0d reg %0d", k, j));
      end
    // outside the windows
    lite_write(BASE + 32'(NS) * 32'h1_0000 + 32'h10, 32'h1234_5678, resp);
    check(resp == RESP_DECERR, "write past the last window is DECERR");
    lite_write(BASE - 32'h1_0000 + 32'h10, 32'h1234_5678, resp);
    check(resp == RESP_DECERR, "write below the base is DECERR");
    lite_read(32'h0000_0010, d, resp);
    check(resp == RESP_DECERR && d == 32'hDEAD_C0DE, "read outside is DECERR");
    for (int k = 0; k < NS; k++)
      for (int j = 0; j < 2; j++) check(regs[k][j] == val(k, j), "a missed access changes no slave");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
