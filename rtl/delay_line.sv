// Fixed delay of DEPTH clock cycles for a W-bit word, used to skew the
// vector inputs into systolic order and to line the elements of v up
// again at the output. DEPTH = 0 is a plain wire (clock and reset then go
// unused). The registers are reset to zero so that nothing unknown ever
// enters the array. Output q follows input d after DEPTH rising edges.
// The skew itself is what a systolic array needs; doing it inside the
// array with these delay lines, rather than in the host, is this design's
// choice.
module delay_line #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int unsigned k = 0; k < DEPTH; k++) stage[k] <= '0;
      end else begin
        stage[0] <= d;
        for (int unsigned k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
      end
    end
    assign q = stage[DEPTH-1];
  end

endmodule
