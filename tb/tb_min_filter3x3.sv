// Self-checking testbench of min_filter3x3.  Several frames of random
// pixels (sizes from 1x1 to 9x23, and one with a 1920-pixel line) are
// streamed through with random gaps on the input and random back-pressure on
// the output; each output is compared with the 3x3 minimum computed here over
// the neighbours inside the image.  Without back-pressure a frame must take
// (rows+1)*(cols+1) clocks.
module tb_min_filter3x3;
  import dehaze_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic             start, in_valid, in_ready, out_valid, out_ready;
  logic [7:0]       in_data, out_data;
  logic [DIM_W-1:0] rows, cols;
  int               checks = 0, failures = 0;
  bit               gaps;

  min_filter3x3 dut (.*);

  logic [7:0] img [];
  int R, C, n_in, n_out;

  function automatic logic [7:0] ref_min(int r, int c);
    logic [7:0] m = 8'hFF;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        if (r + dr >= 0 && r + dr < R && c + dc >= 0 && c + dc < C)
          if (img[(r + dr) * C + c + dc] < m) m = img[(r + dr) * C + c + dc];
    return m;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output side: random ready, compare every pixel
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_data !== ref_min(n_out / C, n_out % C)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %0dx%0d pixel %0d: got %0d want %0d", R, C, n_out,
                   out_data, ref_min(n_out / C, n_out % C));
      end
      n_out++;
    end
    out_ready <= gaps ? ($urandom % 4 != 0) : 1'b1;
  end

  task automatic run_frame(input int r, input int c, input bit g);
    int t0;
    R = r; C = c; gaps = g;
    img = new[r * c];
    foreach (img[i]) img[i] = 8'($urandom);
    n_in = 0; n_out = 0;
    rows <= DIM_W'(r); cols <= DIM_W'(c);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = cycle;
    while (n_out < r * c) begin
      in_valid <= (n_in < r * c) && (!g || ($urandom % 3 != 0));
      in_data  <= (n_in < r * c) ? img[n_in] : 8'h00;
      @(posedge clk);
      if (in_valid && in_ready) n_in++;
      if (cycle - t0 > 20 * (r + 2) * (c + 2) + 100) break;
    end
    in_valid <= 0;
    checks++;
    if (n_out != r * c) begin
      failures++;
      $display("FAIL frame %0dx%0d: %0d outputs", r, c, n_out);
    end
    if (!g) begin
      checks++;
      // the last output leaves in the (rows+1)*(cols+1)-th position
      if (cycle - t0 > (r + 1) * (c + 1) + 2) begin
        failures++;
        $display("FAIL frame %0dx%0d took %0d clocks", r, c, cycle - t0);
      end
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    start = 0; in_valid = 0; in_data = 0; rows = 0; cols = 0; gaps = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(5, 7, 0);
    run_frame(1, 1, 1);
    run_frame(1, 9, 1);
    run_frame(8, 1, 1);
    run_frame(2, 2, 0);
    run_frame(9, 23, 1);
    run_frame(6, 11, 0);
    run_frame(4, 1920, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
