// Complex multiplier built with the strength-reduction (SR) transform.
//
// A plain complex product needs four real multiplications. Rearranging it
// so that one product is shared between the real and the imaginary part
// leaves three multiplications and three extra additions:
//   y_re = (a_re - a_im) * b_im + a_re * (b_re - b_im)
//   y_im = (a_re - a_im) * b_im + a_im * (b_re + b_im)
// With CONJ_A set the multiplier forms conj(a) * b instead (a_im is
// negated first), which is what the inner products p^H g, p^H v and g^H g
// need; the SR arrangement is the same.
//
// The unit is purely combinational and keeps the full product width
// (AW_A + AW_B + 4 bits per part), so it is exact: rounding is left to the
// cell that uses it. The SR equations are the architecture's; the CONJ_A
// option and the exact output width are this design's.
module cmul_sr #(
  parameter int unsigned WA     = 16,  // width of each part of a
  parameter int unsigned WB     = 16,  // width of each part of b
  parameter bit          CONJ_A = 1'b0 // 1: multiply conj(a) by b
) (
  input  logic signed [WA-1:0]       a_re,
  input  logic signed [WA-1:0]       a_im,
  input  logic signed [WB-1:0]       b_re,
  input  logic signed [WB-1:0]       b_im,
  output logic signed [WA+WB+3:0]    y_re,
  output logic signed [WA+WB+3:0]    y_im
);

  localparam int unsigned PW = WA + WB + 4;

  logic signed [WA+1:0] ar, ai;      // a after optional conjugation
  logic signed [WA+1:0] a_diff;      // a_re - a_im
  logic signed [WB:0]   b_diff;      // b_re - b_im
  logic signed [WB:0]   b_sum;       // b_re + b_im
  logic signed [PW-1:0] m_shared;    // (a_re - a_im) * b_im
  logic signed [PW-1:0] m_re;        // a_re * (b_re - b_im)
  logic signed [PW-1:0] m_im;        // a_im * (b_re + b_im)

  always_comb begin
    ar     = (WA+2)'(a_re);
    ai     = CONJ_A ? -(WA+2)'(a_im) : (WA+2)'(a_im);
    a_diff = ar - ai;
    b_diff = (WB+1)'(b_re) - (WB+1)'(b_im);
    b_sum  = (WB+1)'(b_re) + (WB+1)'(b_im);
    m_shared = PW'(a_diff) * PW'(b_im);
    m_re     = PW'(ar)     * PW'(b_diff);
    m_im     = PW'(ai)     * PW'(b_sum);
    y_re   = m_shared + m_re;
    y_im   = m_shared + m_im;
  end

endmodule
