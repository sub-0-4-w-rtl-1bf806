// Self-checking testbench of darkchannel_accel.  A random min image with a
// few dark spots is placed in DDR; the kernel is run twice, first with the
// default 0.9 factor and then with the factor register set to 1.0.  Each
// output pixel is compared with a reference computed here the plain way:
// scale every pixel, then take three successive 3x3 minima with the border
// limited to the image.  The RESULT register must hold the brightest
// dark-channel value.  The run time must be about one clock per pixel.
module tb_darkchannel_accel;
  import dehaze_pkg::*;

  localparam int ROWS = 11, COLS = 29, N = ROWS * COLS;
  localparam int IN_W = 0, OUT_W = 4096;
  logic [7:0] t [3][N];

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
  axi_req_t  m_req [2];
  axi_rsp_t  m_rsp [2];
  logic      irq;
  int        checks = 0, failures = 0;

  darkchannel_accel dut (
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
    logic [7:0]  m;
    int          t0, cyc, q;
    ctrl_req = '0; ptr_req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < N; i++) u_ddr.mem[IN_W + i] = 32'(100 + $urandom % 156);
    u_ddr.mem[IN_W + 0] = 3;                 // corner
    u_ddr.mem[IN_W + 5 * COLS + 14] = 7;     // middle
    u_ddr.mem[IN_W + N - 1] = 1;             // last pixel
    for (int i = 0; i < 64; i++) u_ddr.mem[OUT_W + N + i] = 32'hDEAD_BEEF;
    lite_write(0, REG_ROWS, ROWS);
    lite_write(0, REG_COLS, COLS);
    lite_write(0, REG_GIE, 1);
    lite_write(0, REG_IER, 1);
    lite_write(1, 8'h10, IN_W * 4);
    lite_write(1, 8'h18, OUT_W * 4);
    for (int run = 0; run < 2; run++) begin
      q = (run == 0) ? 230 : 256;
      if (run == 1) lite_write(0, REG_PARAM0, 256);
    t0 = cycle;
    lite_write(0, REG_CTRL, 1);
    while (!irq) @(posedge clk);
    cyc = cycle - t0;
    lite_read(0, REG_CTRL, d);
    check(d[1] == 1'b1, "ap_done set");
    lite_write(0, REG_ISR, 1);
      // reference: scale, then three 3x3 minimum passes
      for (int i = 0; i < N; i++) t[0][i] = sc(u_ddr.mem[IN_W + i][7:0], q);
      for (int p = 0; p < 3; p++)
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            m = 8'hFF;
            for (int dr = -1; dr <= 1; dr++)
              for (int dc = -1; dc <= 1; dc++)
                if (r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < COLS)
                  if (t[p % 2 == 0 ? 0 : 1][(r + dr) * COLS + c + dc] < m)
                    m = t[p % 2 == 0 ? 0 : 1][(r + dr) * COLS + c + dc];
            t[p % 2 == 0 ? 1 : 2][r * COLS + c] = m;
          end
      // pass 3 read t[0]? no: passes go t0->t1, t1->t2, t2->t1
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          m = 8'hFF;
          for (int dr = -1; dr <= 1; dr++)
            for (int dc = -1; dc <= 1; dc++)
              if (r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < COLS)
                if (t[2][(r + dr) * COLS + c + dc] < m) m = t[2][(r + dr) * COLS + c + dc];
          t[1][r * COLS + c] = m;
        end
      for (int i = 0; i < N; i++)
        check(u_ddr.mem[OUT_W + i] == {24'd0, t[1][i]}, $sformatf("run %0d pixel %0d", run, i));
      m = 0;
      for (int i = 0; i < N; i++) if (t[1][i] > m) m = t[1][i];
      lite_read(0, REG_RESULT, d);
      check(d == {24'd0, m}, "atmospheric-light estimate is the brightest dark-channel value");
      check(u_ddr.mem[OUT_W + 0] == {24'd0, sc(3, q)}, "dark corner spreads");
      check(u_ddr.mem[OUT_W + 3 * COLS + 17] == {24'd0, sc(7, q)}, "dark spot reaches 3 pixels away");
      for (int i = 0; i < 64; i++)
        check(u_ddr.mem[OUT_W + N + i] == 32'hDEAD_BEEF, "no write past the image");
      $display("darkchannel run %0d: %0d pixels in %0d cycles", run, N, cyc);
      check(cyc >= N && cyc < 2 * (ROWS + 3) * (COLS + 3) + 200, "cycle count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
