// Synchronous first-word-fall-through FIFO with valid/ready on both sides.
// DEPTH entries of W bits; `count` gives the occupancy.  A push and a pop in
// the same cycle are both taken when the FIFO is full (the pop frees the
// slot).  Used by the AXI4 burst engines to decouple bus beats from pixels.
module stream_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,      // synchronous flush
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [W-1:0]  out_data,
  output logic [AW:0]   count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign out_valid = (count != '0);
  assign in_ready  = (count != (AW+1)'(DEPTH)) || out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

endmodule
