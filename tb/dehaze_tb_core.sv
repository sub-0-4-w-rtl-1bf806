// End-to-end test bench body for dehaze_top, shared by the small and the
// full-size testbenches (ROWS x COLS image, DDR model with STALL_PCT random
// stalls).  It plays the role of the ARM software: it places a synthetic
// hazy image in DDR (a scene of random texture behind haze that thickens
// towards the top, with a bright sky band and a few saturated pixels),
// programs and starts the five kernels one after another through the
// AXI4-Lite port, and waits for each interrupt.  A reference model written
// here computes every intermediate image and the final output; all seven DDR
// buffers are compared word by word.  It also counts how often each
// mechanism occurred: competing requests on the memory interconnect, DDR
// back-pressure, the denominator floor, output saturation, and the five
// interrupts; one that never occurred counts as a failure.  The airlight
// estimate the dark-channel kernel reports is checked too.  The total cycle
// count is compared with the 0.27 s at 100 MHz reported for a full-HD frame.
module dehaze_tb_core
  import dehaze_pkg::*;
#(
  parameter int ROWS      = 24,
  parameter int COLS      = 40,
  parameter int STALL_PCT = 10,
  parameter int BUFW      = 4096,          // words between DDR buffers
  parameter int WATCHDOG  = 2000000
) ();

  localparam int N  = ROWS * COLS;
  localparam logic [31:0] LBASE = 32'h43C0_0000;
  localparam int AIR = 240, DMIN = 150;    // programmed airlight and floor (raised so the sky reaches it)
  // DDR buffers (word index): input, minmat, dark, diff, restore, lut, output
  localparam int B_IN = 0, B_MIN = 1, B_DARK = 2, B_DIFF = 3, B_REST = 4, B_LUT = 5, B_OUT = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  axil_req_t req;
  axil_rsp_t rsp;
  axi_req_t  m_req [1];
  axi_rsp_t  m_rsp [1];
  logic [4:0] irq;
  int checks = 0, failures = 0;

  dehaze_top dut (
    .clk, .rst_n, .s_axil_req(req), .s_axil_rsp(rsp),
    .m_axi_req(m_req[0]), .m_axi_rsp(m_rsp[0]), .irq
  );

  axi_ddr_model #(.NPORTS(1), .MEM_WORDS(7 * BUFW), .STALL_PCT(STALL_PCT)) u_ddr (
    .clk, .rst_n, .s_req(m_req), .s_rsp(m_rsp)
  );

  // ------------------------------------------------------------ counters
  int n_compete = 0, n_rstall = 0, n_wstall = 0, n_clamp = 0, n_sat = 0, n_irq = 0;
  always @(posedge clk) begin
    int nar;
    nar = 0;
    for (int k = 0; k < 14; k++) nar += int'(dut.mreq[k].ar_valid);
    if (nar > 1) n_compete++;
    if (m_req[0].w_valid && !m_rsp[0].w_ready) n_wstall++;
    if (u_ddr.g_port[0].r_act && u_ddr.g_port[0].r_wait == 0 && !m_rsp[0].r_valid) n_rstall++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic lite_write(input logic [31:0] a, input logic [31:0] d);
    axil_req_t r;
    r = '0; r.aw_valid = 1; r.aw_addr = a; r.w_valid = 1; r.w_data = d; r.w_strb = 4'hF; r.b_ready = 1;
    @(negedge clk) req = r;
    #1;
    while (!rsp.aw_ready) begin @(negedge clk); #1; end
    r.aw_valid = 0; r.w_valid = 0;
    @(negedge clk) req = r;
    #1;
    while (!rsp.b_valid) begin @(negedge clk); #1; end
    @(negedge clk) req = '0;
  endtask

  task automatic lite_read(input logic [31:0] a, output logic [31:0] d);
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
    @(negedge clk) req = '0;
  endtask

  function automatic logic [31:0] baddr(int b);
    return 32'(b * BUFW * 4);
  endfunction

  // run kernel k with the given buffers; returns its cycle count
  task automatic run_kernel(input int k, input int bufs [], input int p0, input int p1, output int cyc);
    logic [31:0] c, p, d;
    int t0;
    c = LBASE + 32'(2 * k) * 32'h1_0000;
    p = c + 32'h1_0000;
    lite_write(c + 32'(REG_ROWS), ROWS);
    lite_write(c + 32'(REG_COLS), COLS);
    lite_write(c + 32'(REG_GIE), 1);
    lite_write(c + 32'(REG_IER), 1);
    if (p0 >= 0) lite_write(c + 32'(REG_PARAM0), p0);
    if (p1 >= 0) lite_write(c + 32'(REG_PARAM1), p1);
    foreach (bufs[i]) lite_write(p + 32'h10 + 32'(8 * i), baddr(bufs[i]));
    lite_read(c + 32'(REG_CTRL), d);
    check(d[2], $sformatf("kernel %0d idle before start", k));
    t0 = cycle;
    lite_write(c + 32'(REG_CTRL), 1);
    while (!irq[k]) @(posedge clk);
    cyc = cycle - t0;
    n_irq++;
    lite_read(c + 32'(REG_CTRL), d);
    check(d[1] && d[2], $sformatf("kernel %0d done and idle", k));
    lite_write(c + 32'(REG_ISR), 1);
    @(posedge clk);
    check(!irq[k], $sformatf("kernel %0d interrupt cleared", k));
  endtask

  // --------------------------------------------------------- reference
  logic [7:0] img [3][N];
  logic [7:0] rmin [N], t0 [N], t1 [N], rdark [N], rdiff [N];
  logic [7:0] rj [3][N];
  logic [7:0] rlut [256];
  int hist [256];

  function automatic logic [7:0] sc(logic [7:0] x, int q);
    int p = int'(x) * q + 128;
    return (p >= 65536) ? 8'hFF : 8'(p >> 8);
  endfunction

  task automatic min3x3(ref logic [7:0] src [N], ref logic [7:0] dst [N]);
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        logic [7:0] m = 8'hFF;
        for (int dr = -1; dr <= 1; dr++)
          for (int dc = -1; dc <= 1; dc++)
            if (r + dr >= 0 && r + dr < ROWS && c + dc >= 0 && c + dc < COLS)
              if (src[(r + dr) * COLS + c + dc] < m) m = src[(r + dr) * COLS + c + dc];
        dst[r * COLS + c] = m;
      end
  endtask

  task automatic reference();
    int cdf;
    for (int i = 0; i < N; i++) begin
      rmin[i] = img[0][i];
      if (img[1][i] < rmin[i]) rmin[i] = img[1][i];
      if (img[2][i] < rmin[i]) rmin[i] = img[2][i];
      t0[i] = sc(rmin[i], 230);
    end
    min3x3(t0, t1);
    min3x3(t1, t0);
    min3x3(t0, rdark);
    foreach (hist[k]) hist[k] = 0;
    for (int i = 0; i < N; i++) begin
      longint den, rcp, pr;
      int g;
      rdiff[i] = sc((rmin[i] < rdark[i]) ? rmin[i] : rdark[i], 154);
      den = AIR - int'(rdiff[i]);
      if (den <= DMIN) begin den = DMIN; n_clamp++; end
      rcp = (longint'(AIR) * 65536 + den / 2) / den;
      for (int c = 0; c < 3; c++) begin
        longint num;
        num = (img[c][i] > rdiff[i]) ? int'(img[c][i]) - int'(rdiff[i]) : 0;
        pr  = (num * rcp + 32768) / 65536;
        if (pr > 255) n_sat++;
        rj[c][i] = (pr > 255) ? 8'hFF : 8'(pr);
      end
      g = (77 * rj[0][i] + 150 * rj[1][i] + 29 * rj[2][i] + 128) >> 8;
      hist[g]++;
    end
    cdf = 0;
    for (int k = 0; k < 256; k++) begin
      cdf += hist[k];
      rlut[k] = 8'((255 * longint'(cdf) + N / 2) / N);
    end
  endtask

  // --------------------------------------------------------- stimulus
  task automatic make_image();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int tq, j, v;
        tq = 40 + (200 * r) / ROWS;                  // transmission * 256, thicker haze at the top
        for (int ch = 0; ch < 3; ch++) begin
          j = int'($urandom % 200) + 10 * ch;        // scene radiance
          v = (j * tq + 255 * (256 - tq)) / 256;       // I = J t + A (1 - t), A = 255
          if (r < ROWS / 8) v = 235 + int'($urandom % 21); // bright sky band
          img[ch][r * COLS + c] = 8'(v > 255 ? 255 : v);
        end
      end
    for (int i = 0; i < N; i += 97) begin img[0][i] = 255; img[1][i] = 250; img[2][i] = 245; end
    for (int i = 0; i < N; i++)
      u_ddr.mem[B_IN * BUFW + i] = {8'h00, img[2][i], img[1][i], img[0][i]};
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_min, c_dark, c_diff, c_rest, c_lut, total, bad;
    req = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    make_image();
    reference();
    run_kernel(0, '{B_IN, B_MIN}, -1, -1, c_min);
    run_kernel(1, '{B_MIN, B_DARK}, -1, -1, c_dark);
    begin
      logic [31:0] d;
      logic [7:0]  amax;
      amax = 0;
      for (int i = 0; i < N; i++) if (rdark[i] > amax) amax = rdark[i];
      lite_read(LBASE + 32'h1_0000 * 2 + 32'(REG_RESULT), d);
      $display("atmospheric-light estimate from the dark channel: %0d", d);
      check(d == {24'd0, amax}, "atmospheric-light estimate");
    end
    run_kernel(2, '{B_MIN, B_DARK, B_DIFF}, -1, -1, c_diff);
    run_kernel(3, '{B_IN, B_DIFF, B_REST, B_LUT}, AIR, DMIN, c_rest);
    run_kernel(4, '{B_LUT, B_REST, B_OUT}, -1, -1, c_lut);
    total = c_min + c_dark + c_diff + c_rest + c_lut;

    bad = 0;
    for (int i = 0; i < N; i++) begin
      if (u_ddr.mem[B_MIN  * BUFW + i] != {24'd0, rmin[i]})  bad++;
      if (u_ddr.mem[B_DARK * BUFW + i] != {24'd0, rdark[i]}) bad++;
      if (u_ddr.mem[B_DIFF * BUFW + i] != {24'd0, rdiff[i]}) bad++;
      if (u_ddr.mem[B_REST * BUFW + i] != {8'd0, rj[2][i], rj[1][i], rj[0][i]}) bad++;
      if (u_ddr.mem[B_OUT  * BUFW + i] != {8'd0, rlut[rj[2][i]], rlut[rj[1][i]], rlut[rj[0][i]]}) bad++;
      if (bad != 0 && bad < 5) $display("first mismatch at pixel %0d", i);
      checks += 5;
    end
    failures += bad;
    for (int k = 0; k < 256; k++) check(u_ddr.mem[B_LUT * BUFW + k] == {24'd0, rlut[k]}, "LUT_array entry");

    $display("%0dx%0d frame: minmat %0d, darkchannel %0d, diffim %0d, restoreout %0d, lut %0d cycles; total %0d",
             ROWS, COLS, c_min, c_dark, c_diff, c_rest, c_lut, total);
    $display("total at 100 MHz: %0d us (%0d pixels)", total / 100, N);
    $display("mechanisms: competing requests %0d, read stalls %0d, write stalls %0d, denominator floor %0d, saturation %0d, interrupts %0d",
             n_compete, n_rstall, n_wstall, n_clamp, n_sat, n_irq);
    check(n_compete > 0, "memory ports competed on the interconnect");
    check(STALL_PCT == 0 || (n_rstall > 0 && n_wstall > 0), "DDR back-pressure happened");
    check(n_clamp > 0, "denominator floor was used");
    check(n_sat > 0, "output saturation happened");
    check(n_irq == 5, "all five interrupts");
    // each kernel streams one pixel per clock, far inside the reported 0.27 s frame time
    check(total >= 5 * N, "total cycles at least one per pixel per kernel");
    check(real'(total) <= 27.0e6 * real'(N) / (1920.0 * 1080.0) + 20000.0, "within the reported frame time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
