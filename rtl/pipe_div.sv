// Fully pipelined unsigned divider, one quotient per clock.
//
// Restoring division, one quotient bit per stage: NW stages, so a result
// leaves NW clocks after its operands enter.  A sideband word (SW bits)
// travels with each operation so the caller can carry the pixel being
// processed.  The whole pipeline advances when its last stage is empty or
// its result is taken (valid/ready, a global stall), so the divider sustains
// one operation per clock.  Dividing by zero gives an all-ones quotient.
module pipe_div #(
  parameter int unsigned NW = 24,   // numerator and quotient width
  parameter int unsigned DW = 8,    // denominator width
  parameter int unsigned SW = 24    // sideband width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [NW-1:0] in_num,
  input  logic [DW-1:0] in_den,
  input  logic [SW-1:0] in_side,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [NW-1:0] out_quot,
  output logic [SW-1:0] out_side
);

  // stage k holds the state after k quotient bits
  logic          v    [NW+1];
  logic [DW:0]   rem  [NW+1];
  logic [NW-1:0] nq   [NW+1];   // numerator bits still to use, quotient bits shifted in
  logic [DW-1:0] den  [NW+1];
  logic [SW-1:0] side [NW+1];

  wire adv = !v[NW] || out_ready;
  assign in_ready = adv;

  assign v[0]    = in_valid;
  assign rem[0]  = '0;
  assign nq[0]   = in_num;
  assign den[0]  = in_den;
  assign side[0] = in_side;

  for (genvar k = 0; k < NW; k++) begin : g_stage
    logic [DW+1:0] trial;
    logic          ge;
    assign trial = {rem[k], nq[k][NW-1]};          // shift in the next numerator bit
    assign ge    = (trial >= {1'b0, 1'b0, den[k]});
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        v[k+1] <= 1'b0;
      end else if (adv) begin
        v[k+1] <= v[k];
      end
    end
    always_ff @(posedge clk) begin
      if (adv) begin
        rem[k+1]  <= ge ? (DW+1)'(trial - {2'b00, den[k]}) : trial[DW:0];
        nq[k+1]   <= {nq[k][NW-2:0], ge};
        den[k+1]  <= den[k];
        side[k+1] <= side[k];
      end
    end
  end

  assign out_valid = v[NW];
  assign out_quot  = nq[NW];
  assign out_side  = side[NW];

endmodule
