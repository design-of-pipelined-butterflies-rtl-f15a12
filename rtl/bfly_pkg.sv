// Types shared by the butterfly structures and the top level: the operand
// bundle of one radix-2 DIT butterfly (A, B and twiddle W, 16-bit signed
// each, W with 14 fraction bits) and its result bundle (C = A + W*B and
// D = A - W*B, 18-bit signed each).
// The 16-bit operand width is the design's; the fraction and output widths
// are this implementation's choice.
package bfly_pkg;
  localparam int unsigned BF_DW = 16;
  localparam int unsigned BF_OW = BF_DW + 2;

  typedef struct packed {
    logic signed [BF_DW-1:0] a_re, a_im, b_re, b_im, w_re, w_im;
  } bfly_in_t;

  typedef struct packed {
    logic signed [BF_OW-1:0] c_re, c_im, d_re, d_im;
  } bfly_out_t;
endpackage
