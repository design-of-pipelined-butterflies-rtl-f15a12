// Radix-2 single-path delay feedback (SDF) butterfly stage with delay D.
// One complex sample enters per enabled clock. A D-word feedback delay line
// is shared by the two halves of every 2D-sample block:
//   sel = 0 (first half): the input is written into the delay line and the
//     stage outputs what leaves the line, the differences of the previous
//     block;
//   sel = 1 (second half): the word leaving the line, x[j], and the input,
//     x[j+D], meet in the butterfly; the sum x[j]+x[j+D] goes out and the
//     difference x[j]-x[j+D] goes back into the line.
// The output stream is thus, per block, D sums then D differences, D enabled
// clocks after the inputs; a register on the output adds one more. Both
// butterfly adders are modified carry select adders (the difference as
// a + ~b + 1). sel is bit log2(D) of the sample index, supplied by the
// controller. Words are W-bit signed; the caller leaves enough headroom.
// The feedback-delay organisation and the 8-word first stage follow the
// design; the output register and word width are this implementation's.
module sdf_stage #(
  parameter int unsigned W = 24,
  parameter int unsigned D = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                sel,
  input  logic signed [W-1:0] x_re, x_im,
  output logic signed [W-1:0] y_re, y_im
);
  logic [2*W-1:0] fb_in, fb_out;
  logic [W-1:0]   a_re, a_im, s_re, s_im, d_re, d_im;
  logic [3:0]     unused_c;

  delay_line #(.WIDTH(2*W), .DEPTH(D)) u_fb (.clk(clk), .en(en), .d(fb_in), .q(fb_out));
  assign {a_re, a_im} = fb_out;

  mcsla #(.WIDTH(W)) u_sre (.a(a_re), .b(x_re),  .cin(1'b0), .s(s_re), .cout(unused_c[0]));
  mcsla #(.WIDTH(W)) u_sim (.a(a_im), .b(x_im),  .cin(1'b0), .s(s_im), .cout(unused_c[1]));
  mcsla #(.WIDTH(W)) u_dre (.a(a_re), .b(~x_re), .cin(1'b1), .s(d_re), .cout(unused_c[2]));
  mcsla #(.WIDTH(W)) u_dim (.a(a_im), .b(~x_im), .cin(1'b1), .s(d_im), .cout(unused_c[3]));

  assign fb_in = sel ? {d_re, d_im} : {x_re, x_im};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else if (en) begin
      y_re <= sel ? s_re : a_re;
      y_im <= sel ? s_im : a_im;
    end
  end
endmodule
