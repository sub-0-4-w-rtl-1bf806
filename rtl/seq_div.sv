// Sequential unsigned divider: W clocks per quotient, one bit per clock.
// Pulse `start` with the operands; `done` pulses when `quot` is valid and it
// stays valid until the next start.  Used once per histogram bin when the
// tone-mapping table is built, where speed does not matter.
module seq_div #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot
);

  logic [W-1:0]         rem, d;
  logic [$clog2(W):0]   n;
  logic [W:0]           trial;

  assign trial = {rem, quot[W-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rem  <= '0;
      d    <= '0;
      n    <= '0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        rem  <= '0;
        d    <= den;
        quot <= num;           // numerator shifts out as the quotient shifts in
        n    <= '0;
      end else if (busy) begin
        if (trial >= {1'b0, d}) begin
          rem  <= W'(trial - {1'b0, d});
          quot <= {quot[W-2:0], 1'b1};
        end else begin
          rem  <= trial[W-1:0];
          quot <= {quot[W-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (n == ($clog2(W)+1)'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
