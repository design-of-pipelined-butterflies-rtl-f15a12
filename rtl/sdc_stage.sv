// Radix-2 single-path delay commutator (SDC) butterfly stage with delay D.
// Unlike the SDF stage, the stage has two D-word delay lines, one in front of
// the butterfly and one behind it, with multiplexers (the commutators)
// around them. Both lines shift on every enabled clock.
//   Input side: the input line always takes the input, so during the second
//     half of a 2D-sample block (sel = 1) its output x[j] lines up with the
//     current input x[j+D] at the butterfly.
//   Output side: during sel = 1 the sum x[j]+x[j+D] goes straight out and the
//     difference enters the output line; during sel = 0 the output commutator
//     passes the differences of the previous block as they leave that line.
// Output order and timing equal those of the SDF stage: per block D sums then
// D differences, D enabled clocks after the inputs plus one output register.
// Adders are modified carry select adders. Words are W-bit signed.
// The design draws each commutator stage with input and output switches and
// four delay boxes; this implementation keeps the same function and order
// with one D-word line on each side of the butterfly, which is its own
// simplification, as is the output register.
module sdc_stage #(
  parameter int unsigned W = 24,
  parameter int unsigned D = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                sel,
  input  logic signed [W-1:0] x_re, x_im,
  output logic signed [W-1:0] y_re, y_im
);
  logic [2*W-1:0] din_out, dout_out;
  logic [W-1:0]   a_re, a_im, s_re, s_im, d_re, d_im, r_re, r_im;
  logic [3:0]     unused_c;

  delay_line #(.WIDTH(2*W), .DEPTH(D)) u_din  (.clk(clk), .en(en), .d({x_re, x_im}), .q(din_out));
  assign {a_re, a_im} = din_out;

  mcsla #(.WIDTH(W)) u_sre (.a(a_re), .b(x_re),  .cin(1'b0), .s(s_re), .cout(unused_c[0]));
  mcsla #(.WIDTH(W)) u_sim (.a(a_im), .b(x_im),  .cin(1'b0), .s(s_im), .cout(unused_c[1]));
  mcsla #(.WIDTH(W)) u_dre (.a(a_re), .b(~x_re), .cin(1'b1), .s(d_re), .cout(unused_c[2]));
  mcsla #(.WIDTH(W)) u_dim (.a(a_im), .b(~x_im), .cin(1'b1), .s(d_im), .cout(unused_c[3]));

  delay_line #(.WIDTH(2*W), .DEPTH(D)) u_dout (.clk(clk), .en(en), .d({d_re, d_im}), .q(dout_out));
  assign {r_re, r_im} = dout_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else if (en) begin
      y_re <= sel ? s_re : r_re;
      y_im <= sel ? s_im : r_im;
    end
  end
endmodule
