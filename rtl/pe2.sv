// PE2 (modified form): cell of the linear array below the PE1 grid.
//
// Cell j receives v_j, the finished element of v = R p, from the bottom of
// grid column j, the element p_j that has just left grid row j, and g_j.
// It adds its share of three inner products to the running sums arriving
// from the cell on its left and passes them right:
//   pg += conj(p_j) * g_j      (p^H g, numerator of the step size alpha)
//   pv += conj(p_j) * v_j      (p^H R p, denominator of alpha)
//   gg += |g_j|^2              (g^H g, used for beta)
// Each product comes from a strength-reduced complex multiplier and is
// scaled back to 12 fraction bits; gg keeps only the real part, whose
// imaginary part is exactly zero. The last cell of the array delivers the
// three sums to the host.
//
// The modification is an extra output port that hands v_j to the host in
// the step after the cell has used it, so the host gets the whole vector
// v for the residual update without a local memory in each cell.
// All outputs are registered (one time step per cell). The valid flag, the
// routing of p from the grid row ends and truncating scaling are this
// design's choices.
module pe2
  import mts_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // from grid column j (above)
  input  logic   v_valid_in,
  input  cacc_t  v_in,
  // p_j and g_j, aligned with v_j
  input  cdata_t p_in,
  input  cdata_t g_in,
  // running inner products (left to right)
  input  cacc_t  pg_in,
  input  cacc_t  pv_in,
  input  aword_t gg_in,
  output cacc_t  pg_out,
  output cacc_t  pv_out,
  output aword_t gg_out,
  output logic   valid_out,
  // extra output port of the modified PE2
  output cacc_t  v_out
);

  logic signed [2*DW+3:0]  pg_re, pg_im, gg_re, gg_im;
  logic signed [DW+AW+3:0] pv_re, pv_im;

  cmul_sr #(.WA(DW), .WB(DW), .CONJ_A(1'b1)) u_pg (
    .a_re(p_in.re), .a_im(p_in.im), .b_re(g_in.re), .b_im(g_in.im),
    .y_re(pg_re), .y_im(pg_im)
  );

  cmul_sr #(.WA(DW), .WB(AW), .CONJ_A(1'b1)) u_pv (
    .a_re(p_in.re), .a_im(p_in.im), .b_re(v_in.re), .b_im(v_in.im),
    .y_re(pv_re), .y_im(pv_im)
  );

  cmul_sr #(.WA(DW), .WB(DW), .CONJ_A(1'b1)) u_gg (
    .a_re(g_in.re), .a_im(g_in.im), .b_re(g_in.re), .b_im(g_in.im),
    .y_re(gg_re), .y_im(gg_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pg_out    <= '0;
      pv_out    <= '0;
      gg_out    <= '0;
      valid_out <= 1'b0;
      v_out     <= '0;
    end else begin
      pg_out.re <= pg_in.re + AW'(pg_re >>> FRAC);
      pg_out.im <= pg_in.im + AW'(pg_im >>> FRAC);
      pv_out.re <= pv_in.re + AW'(pv_re >>> FRAC);
      pv_out.im <= pv_in.im + AW'(pv_im >>> FRAC);
      gg_out    <= gg_in    + AW'(gg_re >>> FRAC);
      valid_out <= v_valid_in;
      v_out     <= v_in;
    end
  end

endmodule
