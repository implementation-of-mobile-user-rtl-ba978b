// Shared number formats of the MCG tracking-unit systolic array.
//
// Every value entering the array (elements of R, p and g) is a complex
// number whose real and imaginary parts are 16-bit two's complement words
// with 12 fraction bits (Q3.12). Partial sums, v = R p and the inner
// products leaving the array are complex numbers with 32-bit parts and the
// same 12 fraction bits, so a sum of M products needs no saturation for
// any practical number of antennas. These widths are this design's choice;
// the architecture itself does not fix a word length.
package mts_pkg;

  localparam int unsigned DW   = 16;  // width of an input word (re or im)
  localparam int unsigned FRAC = 12;  // fraction bits of every word
  localparam int unsigned AW   = 32;  // width of an accumulator word

  typedef logic signed [DW-1:0] dword_t;
  typedef logic signed [AW-1:0] aword_t;

  // complex input word: R elements, p and g
  typedef struct packed {
    dword_t re;
    dword_t im;
  } cdata_t;

  // complex accumulator word: partial sums of v, pg, pv
  typedef struct packed {
    aword_t re;
    aword_t im;
  } cacc_t;

endpackage
