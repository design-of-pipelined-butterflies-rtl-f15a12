// 16-point radix-2 pipelined FFT: one single-path delay feedback stage
// followed by three single-path delay commutator stages.
// Stream interface: one complex sample per clock with in_valid high, frames of
// 16 back to back in natural order. Every register of the pipeline moves only
// on a clock with in_valid high, so gaps in the input simply pause it.
// Pipeline (decimation in frequency ordering, delays 8, 4, 2, 1):
//   SDF stage (D=8) -> x W16^k -> SDC stage (D=4) -> x W16^2k ->
//   SDC stage (D=2) -> x W16^4k -> SDC stage (D=1) -> out
// A stage with delay D emits, per block of 2D samples, D sums and then D
// differences; the differences (position j) are rotated by W_(2D)^j by the
// twiddle multiplier that follows. Output samples therefore come out in
// bit-reversed order; out_bin gives the frequency index of each.
// A 4-bit sample counter is the controller: each stage's commutator select
// and each multiplier's twiddle index are fixed offsets of it.
// Timing: the first output of a frame is loaded by the 22nd enabled clock
// counted from its first sample (latency 21 samples); the pipeline is flushed by the samples of the next
// frame (or any filler). X[k] = sum x[n] W16^(nk), unscaled; W-bit internal
// words (default 24) leave room for the 4 bits of growth and rounding.
// Stage types, delays and multiplier placement follow the design; the
// controller, enable-based flow control, bit-reversed output with out_bin and
// the number format are this implementation's choices.
module fft16 #(
  parameter int unsigned DW = 16,
  parameter int unsigned W  = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re, in_im,
  output logic                 out_valid,
  output logic signed [W-1:0]  out_re, out_im,
  output logic [3:0]           out_bin
);
  import fft_pkg::*;

  // pipeline offsets of each stage input, in enabled clocks (see header)
  localparam int unsigned OFS2 = 10;   // stage 2 input
  localparam int unsigned OFS3 = 16;   // stage 3 input
  localparam int unsigned OFS4 = 20;   // stage 4 input
  localparam int unsigned LAT  = 21;   // word loaded into the output register

  logic       en;
  logic [3:0] cnt;        // index of the sample now at the input
  logic [4:0] fill;       // saturating count of accepted samples
  assign en = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      fill <= '0;
    end else if (en) begin
      cnt <= cnt + 4'd1;
      if (fill != 5'(LAT)) fill <= fill + 5'd1;
    end
  end

  // ---- controller: commutator selects and twiddle indices ----
  logic [3:0] p2, p3, p4, q1, q2, q3;
  logic       sel1, sel2, sel3, sel4;
  logic [2:0] k1, k2, k3;
  always_comb begin
    p2 = cnt - 4'(OFS2);
    p3 = cnt - 4'(OFS3);
    p4 = cnt - 4'(OFS4);
    q1 = cnt - 4'(OFS2 - 1);  // stage 1 output position (of 16)
    q2 = cnt - 4'(OFS3 - 1);  // stage 2 output position (low 3 bits)
    q3 = cnt - 4'(OFS4 - 1);  // stage 3 output position (low 2 bits)
    sel1 = cnt[3];
    sel2 = p2[2];
    sel3 = p3[1];
    sel4 = p4[0];
    k1 = q1[3] ? q1[2:0] : 3'd0;                     // W16^j,  j = 0..7
    k2 = q2[2] ? {q2[1:0], 1'b0} : 3'd0;             // W8^j  = W16^(2j)
    k3 = q3[1] ? {q3[0], 2'b00} : 3'd0;              // W4^j  = W16^(4j)
  end

  logic signed [W-1:0] s1_re, s1_im, m1_re, m1_im;
  logic signed [W-1:0] s2_re, s2_im, m2_re, m2_im;
  logic signed [W-1:0] s3_re, s3_im, m3_re, m3_im;
  logic signed [W-1:0] s4_re, s4_im;

  sdf_stage #(.W(W), .D(8)) u_st1 (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(sel1),
    .x_re(W'(in_re)), .x_im(W'(in_im)), .y_re(s1_re), .y_im(s1_im));
  twiddle_mult #(.W(W)) u_tw1 (
    .clk(clk), .rst_n(rst_n), .en(en), .k(k1),
    .x_re(s1_re), .x_im(s1_im), .y_re(m1_re), .y_im(m1_im));

  sdc_stage #(.W(W), .D(4)) u_st2 (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(sel2),
    .x_re(m1_re), .x_im(m1_im), .y_re(s2_re), .y_im(s2_im));
  twiddle_mult #(.W(W)) u_tw2 (
    .clk(clk), .rst_n(rst_n), .en(en), .k(k2),
    .x_re(s2_re), .x_im(s2_im), .y_re(m2_re), .y_im(m2_im));

  sdc_stage #(.W(W), .D(2)) u_st3 (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(sel3),
    .x_re(m2_re), .x_im(m2_im), .y_re(s3_re), .y_im(s3_im));
  twiddle_mult #(.W(W)) u_tw3 (
    .clk(clk), .rst_n(rst_n), .en(en), .k(k3),
    .x_re(s3_re), .x_im(s3_im), .y_re(m3_re), .y_im(m3_im));

  sdc_stage #(.W(W), .D(1)) u_st4 (
    .clk(clk), .rst_n(rst_n), .en(en), .sel(sel4),
    .x_re(m3_re), .x_im(m3_im), .y_re(s4_re), .y_im(s4_im));

  assign out_re = s4_re;
  assign out_im = s4_im;

  // out_valid / out_bin describe the word the stage-4 output register loads
  // on this enabled clock: stream position cnt - LAT
  logic [3:0] qo;
  assign qo = cnt - 4'(LAT);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bin   <= '0;
    end else begin
      out_valid <= en && (fill == 5'(LAT));
      if (en) out_bin <= bitrev4(qo);
    end
  end
endmodule
