// Streaming 3x3 minimum filter (one pass of the dark-channel filter).
//
// Pixels arrive in raster order, one per handshake, and leave in raster
// order: output (r,c) is the minimum of the input pixels (r-1..r+1,
// c-1..c+1) that lie inside the image, so the border uses only the
// neighbours that exist (the same as replicating the edge).  Two line
// buffers of MAX_COLS pixels hold the previous two rows.  The filter walks
// an extended grid of (rows+1) x (cols+1) positions: at position (pr,pc) it
// takes input pixel (pr,pc) if that exists and emits output (pr-1,pc-1) if
// that exists, so each frame takes (rows+1)*(cols+1) clocks and the output
// lags the input by one line and one pixel.  A position advances only when
// its input is valid and its output accepted (valid/ready on both sides,
// combinational from input to output).  `start` clears the position before
// a frame.  The minimum operator follows the dark-channel definition; the
// border rule and handshake are this design's choice.
module min_filter3x3
  import dehaze_pkg::*;
#(
  parameter int unsigned MAX_W = MAX_COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DIM_W-1:0]  rows,
  input  logic [DIM_W-1:0]  cols,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [7:0]        in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [7:0]        out_data
);

  localparam int unsigned CW = $clog2(MAX_W + 1);

  logic [7:0]       lb0 [MAX_W];   // row pr-2
  logic [7:0]       lb1 [MAX_W];   // row pr-1
  logic [DIM_W-1:0] pr, pc;
  logic             active;
  logic [7:0]       v1, v2;        // column minima of columns pc-1 and pc-2

  wire need_in  = active && (pr < rows) && (pc < cols);
  wire give_out = active && (pr != 0) && (pc != 0);
  wire fire     = active && (!need_in || in_valid) && (!give_out || out_ready);

  assign in_ready  = need_in && (!give_out || out_ready);
  assign out_valid = give_out && (!need_in || in_valid);

  // vertical minimum of column pc over rows pr-2..pr that exist
  logic [7:0] vcur;
  wire [CW-1:0] col = CW'(pc);
  always_comb begin
    vcur = 8'hFF;
    if (pc < cols) begin
      if (pr >= 2)   vcur = lb0[col];
      if (pr >= 1 && lb1[col] < vcur) vcur = lb1[col];
      if (pr < rows && in_data < vcur) vcur = in_data;
    end
  end

  // horizontal minimum over columns pc-2..pc that exist
  always_comb begin
    out_data = v1;
    if (pc >= 2 && v2 < out_data) out_data = v2;
    if (pc < cols && vcur < out_data) out_data = vcur;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      pr     <= '0;
      pc     <= '0;
      v1     <= 8'hFF;
      v2     <= 8'hFF;
    end else if (start) begin
      active <= (rows != 0) && (cols != 0);
      pr     <= '0;
      pc     <= '0;
      v1     <= 8'hFF;
      v2     <= 8'hFF;
    end else if (fire) begin
      v1 <= vcur;
      v2 <= v1;
      if (pc == cols) begin
        pc <= '0;
        if (pr == rows) active <= 1'b0;
        else            pr <= pr + 1'b1;
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fire && pc < cols) begin
      lb0[col] <= lb1[col];
      lb1[col] <= in_data;
    end
  end

endmodule
