// Self-checking testbench of diffim_accel.  Random min and dark-channel
// images are placed in DDR and the kernel is run; every output pixel must be
// round(0.6 * min(a, b)) in Q0.8 (factor 154/256), computed here.  A second
// run with the factor register at 1.0 checks that the register is used.
module tb_diffim_accel;
  import dehaze_pkg::*;

  localparam int ROWS = 9, COLS = 41, N = ROWS * COLS;
  localparam int A_W = 0, B_W = 1024, OUT_W = 2048;

  function automatic logic [7:0] sc(logic [7:0] x, int q);
    int p = int'(x) * q + 128;
    return (p >= 65536) ? 8'hFF : 8'(p >> 8);
  endfunction

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

  diffim_accel dut (
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
    logic [7:0]  a, b;
    int          t0, cyc, q;
    ctrl_req = '0; ptr_req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) begin
      u_ddr.mem[A_W + i] = 32'($urandom % 256);
      u_ddr.mem[B_W + i] = 32'($urandom % 256);
    end
    u_ddr.mem[A_W] = 255; u_ddr.mem[B_W] = 255;   // full scale
    for (int i = 0; i < 64; i++) u_ddr.mem[OUT_W + N + i] = 32'hDEAD_BEEF;
    lite_write(0, REG_ROWS, ROWS);
    lite_write(0, REG_COLS, COLS);
    lite_write(0, REG_GIE, 1);
    lite_write(0, REG_IER, 1);
    lite_write(1, 8'h10, A_W * 4);
    lite_write(1, 8'h18, B_W * 4);
    lite_write(1, 8'h20, OUT_W * 4);
    for (int run = 0; run < 2; run++) begin
      q = (run == 0) ? 154 : 256;
      if (run == 1) lite_write(0, REG_PARAM0, 256);
      t0 = cycle;
    lite_write(0, REG_CTRL, 1);
    while (!irq) @(posedge clk);
    cyc = cycle - t0;
    lite_read(0, REG_CTRL, d);
    check(d[1] == 1'b1, "ap_done set");
    lite_write(0, REG_ISR, 1);
      for (int i = 0; i < N; i++) begin
        a = u_ddr.mem[A_W + i][7:0];
        b = u_ddr.mem[B_W + i][7:0];
        check(u_ddr.mem[OUT_W + i] == {24'd0, sc(a < b ? a : b, q)}, $sformatf("run %0d pixel %0d", run, i));
      end
      if (run == 0) check(u_ddr.mem[OUT_W] == 32'd153, "0.6 * 255 = 153");
      for (int i = 0; i < 64; i++)
        check(u_ddr.mem[OUT_W + N + i] == 32'hDEAD_BEEF, "no write past the image");
      $display("diffim run %0d: %0d pixels in %0d cycles", run, N, cyc);
      check(cyc >= N && cyc < 2 * N + 200, "cycle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
