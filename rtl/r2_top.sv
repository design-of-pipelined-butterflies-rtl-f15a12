// Top level: the 16-point SDF-SDC pipelined FFT built on modified carry
// select adders, and, beside it, the four pipelined radix-2 DIT butterfly
// structures A-D built on adder compressors. The two parts share only clock
// and reset; each has its own ports.
//   FFT: fft_in_valid / fft_in_re / fft_in_im in, natural order, 16-sample
//     frames; fft_out_valid / fft_out_re / fft_out_im / fft_out_bin out, in
//     bit-reversed order (see fft16 for timing).
//   Butterflies: bf_in[i] / bf_in_valid[i] feed structure i (0 = A, 1 = B,
//     2 = C, 3 = D); bf_out[i] / bf_out_valid[i] return C = A + W*B and
//     D = A - W*B. Each runs at its default pipeline depth: A with one
//     pipeline level, B, C and D with two (latency 2, 3, 3, 3 clocks).
// Both parts and the four structures come from the design; placing them side
// by side without a shared datapath reflects that the design connects them
// nowhere, and the port bundling is this implementation's own.
module r2_top
  import bfly_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // 16-point FFT
  input  logic              fft_in_valid,
  input  logic signed [15:0] fft_in_re,
  input  logic signed [15:0] fft_in_im,
  output logic              fft_out_valid,
  output logic signed [23:0] fft_out_re,
  output logic signed [23:0] fft_out_im,
  output logic [3:0]        fft_out_bin,
  // butterflies A..D
  input  logic [3:0]        bf_in_valid,
  input  bfly_in_t          bf_in  [4],
  output logic [3:0]        bf_out_valid,
  output bfly_out_t         bf_out [4]
);
  fft16 #(.DW(16), .W(24)) u_fft (
    .clk(clk), .rst_n(rst_n),
    .in_valid(fft_in_valid), .in_re(fft_in_re), .in_im(fft_in_im),
    .out_valid(fft_out_valid), .out_re(fft_out_re), .out_im(fft_out_im),
    .out_bin(fft_out_bin));

  bfly_a u_bfa (
    .clk(clk), .rst_n(rst_n), .in_valid(bf_in_valid[0]),
    .a_re(bf_in[0].a_re), .a_im(bf_in[0].a_im), .b_re(bf_in[0].b_re),
    .b_im(bf_in[0].b_im), .w_re(bf_in[0].w_re), .w_im(bf_in[0].w_im),
    .out_valid(bf_out_valid[0]),
    .c_re(bf_out[0].c_re), .c_im(bf_out[0].c_im),
    .d_re(bf_out[0].d_re), .d_im(bf_out[0].d_im));

  bfly_b u_bfb (
    .clk(clk), .rst_n(rst_n), .in_valid(bf_in_valid[1]),
    .a_re(bf_in[1].a_re), .a_im(bf_in[1].a_im), .b_re(bf_in[1].b_re),
    .b_im(bf_in[1].b_im), .w_re(bf_in[1].w_re), .w_im(bf_in[1].w_im),
    .out_valid(bf_out_valid[1]),
    .c_re(bf_out[1].c_re), .c_im(bf_out[1].c_im),
    .d_re(bf_out[1].d_re), .d_im(bf_out[1].d_im));

  bfly_c u_bfc (
    .clk(clk), .rst_n(rst_n), .in_valid(bf_in_valid[2]),
    .a_re(bf_in[2].a_re), .a_im(bf_in[2].a_im), .b_re(bf_in[2].b_re),
    .b_im(bf_in[2].b_im), .w_re(bf_in[2].w_re), .w_im(bf_in[2].w_im),
    .out_valid(bf_out_valid[2]),
    .c_re(bf_out[2].c_re), .c_im(bf_out[2].c_im),
    .d_re(bf_out[2].d_re), .d_im(bf_out[2].d_im));

  bfly_d u_bfd (
    .clk(clk), .rst_n(rst_n), .in_valid(bf_in_valid[3]),
    .a_re(bf_in[3].a_re), .a_im(bf_in[3].a_im), .b_re(bf_in[3].b_re),
    .b_im(bf_in[3].b_im), .w_re(bf_in[3].w_re), .w_im(bf_in[3].w_im),
    .out_valid(bf_out_valid[3]),
    .c_re(bf_out[3].c_re), .c_im(bf_out[3].c_im),
    .d_re(bf_out[3].d_re), .d_im(bf_out[3].d_im));
endmodule
