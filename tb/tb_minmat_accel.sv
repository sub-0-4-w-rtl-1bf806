// Self-checking testbench of minmat_accel.  A random RGB image is placed in
// the DDR model, the kernel is programmed and started through its two
// AXI4-Lite slaves, and every output pixel is compared with min(R,G,B)
// computed here.  Checks the done flag, the interrupt, that the words past
// the image are untouched, and that the run takes about one clock per pixel.
module tb_minmat_accel;
  import dehaze_pkg::*;

  localparam int ROWS = 13, COLS = 37, N = ROWS * COLS;
  localparam int IN_W = 0, OUT_W = 4096;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  axil_req_t ctrl_req, ptr_req;
  axil_rsp_t ctrl_rsp, ptr_rsp;
  axi_req_t  m_req [2];
  axi_rsp_t  m_rsp [2];
  logic      irq;
  int        checks = 0, failures = 0;

  minmat_accel dut (
    .clk, .rst_n, .s_ctrl_req(ctrl_req), .s_ctrl_rsp(ctrl_rsp),
    .s_ptr_req(ptr_req), .s_ptr_rsp(ptr_rsp), .m_req, .m_rsp, .interrupt(irq)
  );

  axi_ddr_model #(.NPORTS(2), .MEM_WORDS(8192), .STALL_PCT(20)) u_ddr (
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
    logic [7:0]  r, g, b, e;
    int          t0, cyc;
    ctrl_req = '0; ptr_req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) u_ddr.mem[IN_W + i] = {8'h00, 24'($urandom)};
    for (int i = 0; i < 64; i++) u_ddr.mem[OUT_W + N + i] = 32'hDEAD_BEEF;
    // a few chosen pixels where each channel in turn is the minimum
    u_ddr.mem[IN_W + 0] = 32'h00_FF_FF_00;
    u_ddr.mem[IN_W + 1] = 32'h00_FF_00_FF;
    u_ddr.mem[IN_W + 2] = 32'h00_00_FF_FF;
    u_ddr.mem[IN_W + 3] = 32'h00_80_80_80;

    lite_write(0, REG_ROWS, ROWS);
    lite_write(0, REG_COLS, COLS);
    lite_write(0, REG_GIE, 1);
    lite_write(0, REG_IER, 1);
    lite_write(1, 8'h10, IN_W * 4);
    lite_write(1, 8'h18, OUT_W * 4);
    lite_read(1, 8'h18, d);
    check(d == OUT_W * 4, "pointer read-back");
    lite_read(0, REG_CTRL, d);
    check(d[2] == 1'b1, "idle before start");
    t0 = cycle;
    lite_write(0, REG_CTRL, 1);
    while (!irq) @(posedge clk);
    cyc = cycle - t0;
    lite_read(0, REG_CTRL, d);
    check(d[1] == 1'b1, "ap_done set");
    check(d[2] == 1'b1, "idle after done");
    lite_read(0, REG_CTRL, d);
    check(d[1] == 1'b0, "ap_done cleared on read");
    lite_write(0, REG_ISR, 1);
    @(posedge clk);
    check(!irq, "interrupt cleared");

    for (int i = 0; i < N; i++) begin
      d = u_ddr.mem[IN_W + i];
      r = d[7:0]; g = d[15:8]; b = d[23:16];
      e = r; if (g < e) e = g; if (b < e) e = b;
      check(u_ddr.mem[OUT_W + i] == {24'd0, e}, $sformatf("pixel %0d", i));
    end
    check(u_ddr.mem[OUT_W + 3] == 32'h80, "grey pixel");
    for (int i = 0; i < 64; i++)
      check(u_ddr.mem[OUT_W + N + i] == 32'hDEAD_BEEF, "no write past the image");
    // one pixel per clock plus bus latency, with 20% random stalls
    $display("minmat: %0d pixels in %0d cycles", N, cyc);
    check(cyc >= N && cyc < 2 * N + 200, "cycle count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
