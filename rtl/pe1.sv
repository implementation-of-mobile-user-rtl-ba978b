// PE1: cell of the M x M grid that forms v = R p.
//
// Each cell holds one element r of the correlation matrix. During the
// preload phase (load = 1) the element shifts in from the cell above and
// on to the cell below, so M load steps fill a whole column. Once loaded,
// r stays fixed while any number of search directions pass through, which
// is how the same R(n) serves the N sources.
//
// In compute mode an element of p arrives from the left, is multiplied by
// r with the strength-reduced complex multiplier (p * r, three real
// multiplications) and the product, scaled back to 12 fraction bits, is
// added to the partial sum of v arriving from above. Every output is
// registered: p and its valid flag move one cell right per step, the
// partial sum one cell down per step, so each cell costs one time step.
//
// The loading by column shift, the valid flag and the scaling by plain
// arithmetic shift (truncation) are this design's choices.
module pe1
  import mts_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // preload path (top to bottom)
  input  logic   load,
  input  cdata_t r_in,
  output cdata_t r_out,
  // search direction (left to right)
  input  logic   p_valid_in,
  input  cdata_t p_in,
  output logic   p_valid_out,
  output cdata_t p_out,
  // partial sum of v (top to bottom)
  input  cacc_t  v_in,
  output cacc_t  v_out
);

  cdata_t r_q;
  logic signed [2*DW+3:0] prod_re, prod_im;

  cmul_sr #(.WA(DW), .WB(DW), .CONJ_A(1'b0)) u_mul (
    .a_re(p_in.re), .a_im(p_in.im),
    .b_re(r_q.re),  .b_im(r_q.im),
    .y_re(prod_re), .y_im(prod_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_q         <= '0;
      p_out       <= '0;
      p_valid_out <= 1'b0;
      v_out       <= '0;
    end else begin
      if (load) r_q <= r_in;
      p_out       <= p_in;
      p_valid_out <= p_valid_in;
      v_out.re    <= v_in.re + AW'(prod_re >>> FRAC);
      v_out.im    <= v_in.im + AW'(prod_im >>> FRAC);
    end
  end

  assign r_out = r_q;

endmodule
