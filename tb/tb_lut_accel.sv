// Self-checking testbench of lut_accel.  A random 256-entry table and a
// random RGB image are placed in DDR; every output channel must equal the
// table entry of the input channel.  A second run with an inverting table
// checks that the table is reloaded for each frame.
module tb_lut_accel;
  import dehaze_pkg::*;

  localparam int ROWS = 10, COLS = 33, N = ROWS * COLS;
  localparam int LUT_W = 0, IN_W = 1024, OUT_W = 2048;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  axil_req_t ctrl_req, ptr_req;
  axil_rsp_t ctrl_rsp, ptr_rsp;
  axi_req_t  m_req [3];
  axi_rsp_t  m_rsp [3];
  logic      irq;
  int        checks = 0, failures = 0;

  lut_accel dut (
    .clk, .rst_n, .s_ctrl_req(ctrl_req), .s_ctrl_rsp(ctrl_rsp),
    .s_ptr_req(ptr_req), .s_ptr_rsp(ptr_rsp), .m_req, .m_rsp, .interrupt(irq)
  );

  axi_ddr_model #(.NPORTS(3), .MEM_WORDS(4096), .STALL_PCT(20)) u_ddr (
    .clk, .rst_n, .s_req(m_req), .s_rsp(m_rsp)
  );

  // AXI4-Lite master: sel 0 = control slave, 1 = pointer slave.  Signals
  // change on the falling edge and are sampled by the slave on the rising one;
  // a ready or valid is looked at just after the falling edge.
  task automatic lite_set(input bit sel, input axil_req_t r);
    if (sel) ptr_req = r; else ctrl_req = r;
  endtask

  task automatic lite_write(input bit sel, input logic [7:0] a, input logic [31:0] d);
    axil_req_t r;
    r = '0; r.aw_valid = 1; r.aw_addr = 32'(a); r.w_valid = 1; r.w_data = d;
    r.w_strb = 4'hF; r.b_ready = 1;
    @(negedge clk) lite_set(sel, r);
    #1;
    while (!(sel ? ptr_rsp.aw_ready : ctrl_rsp.aw_ready)) begin @(negedge clk); #1; end
    r.aw_valid = 0; r.w_valid = 0;
    @(negedge clk) lite_set(sel, r);
    #1;
    while (!(sel ? ptr_rsp.b_valid : ctrl_rsp.b_valid)) begin @(negedge clk); #1; end
    @(negedge clk) lite_set(sel, '0);
  endtask

  task automatic lite_read(input bit sel, input logic [7:0] a, output logic [31:0] d);
    axil_req_t r;
    r = '0; r.ar_valid = 1; r.ar_addr = 32'(a); r.r_ready = 1;
    @(negedge clk) lite_set(sel, r);
    #1;
    while (!(sel ? ptr_rsp.ar_ready : ctrl_rsp.ar_ready)) begin @(negedge clk); #1; end
    r.ar_valid = 0;
    @(negedge clk) lite_set(sel, r);
    #1;
    while (!(sel ? ptr_rsp.r_valid : ctrl_rsp.r_valid)) begin @(negedge clk); #1; end
    d = sel ? ptr_rsp.r_data : ctrl_rsp.r_data;
    @(negedge clk) lite_set(sel, '0);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0]  e [3];
    int          t0, cyc;
    ctrl_req = '0; ptr_req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) u_ddr.mem[IN_W + i] = {8'h00, 24'($urandom)};
    for (int i = 0; i < 16; i++) u_ddr.mem[OUT_W + N + i] = 32'hDEAD_BEEF;
    lite_write(0, REG_ROWS, ROWS);
    lite_write(0, REG_COLS, COLS);
    lite_write(0, REG_GIE, 1);
    lite_write(0, REG_IER, 1);
    lite_write(1, 8'h10, LUT_W * 4);
    lite_write(1, 8'h18, IN_W * 4);
    lite_write(1, 8'h20, OUT_W * 4);
    for (int run = 0; run < 2; run++) begin
      for (int k = 0; k < 256; k++)
        u_ddr.mem[LUT_W + k] = (run == 0) ? 32'($urandom % 256) : 32'(255 - k);
    t0 = cycle;
    lite_write(0, REG_CTRL, 1);
    while (!irq) @(posedge clk);
    cyc = cycle - t0;
    lite_read(0, REG_CTRL, d);
    check(d[1] == 1'b1, "ap_done set");
    lite_write(0, REG_ISR, 1);
      for (int i = 0; i < N; i++) begin
        d = u_ddr.mem[IN_W + i];
        for (int c = 0; c < 3; c++) e[c] = u_ddr.mem[LUT_W + int'(d[8*c +: 8])][7:0];
        check(u_ddr.mem[OUT_W + i] == {8'h00, e[2], e[1], e[0]}, $sformatf("run %0d pixel %0d", run, i));
      end
      for (int i = 0; i < 16; i++)
        check(u_ddr.mem[OUT_W + N + i] == 32'hDEAD_BEEF, "no write past the image");
      $display("lut run %0d: %0d pixels in %0d cycles", run, N, cyc);
      check(cyc >= N + 256 && cyc < 2 * (N + 256) + 200, "cycle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
