// Radix-2 decimation-in-time butterfly, structure D (three real multipliers
// with /2 and x2 scaling), with 4:2 and 3:2 adder compressors.
// Computes C = A + W*B and D = A - W*B. Four pre-adders form Wr-Wi, Br+Bi,
// Bi-Br and Wr+Wi; three multipliers form
//   P1 = (Wr-Wi)*(Br+Bi),  M = Br*Wi,  P3 = (Bi-Br)*(Wr+Wi),
// and then Re(W*B) = P1/2 - P3/2 and Im(W*B) = P1/2 + P3/2 + 2*M.
// The halving is done without losing a bit: the whole sum is formed one
// binary place higher (A shifted by FRAC+1, P1 and P3 taken as they are,
// 2*M as M shifted by 2) and that extra place is dropped at the output, where
// the result is known to be even. Imaginary outputs are four-operand sums
// (madd4), real outputs three-operand sums (madd3).
// Number format, rounding and pipeline as in bfly_a: outputs
// floor((A*2^FRAC + W*B)/2^FRAC) in DW+2 bits; PIPES = 2 registers the
// pre-adder results; latency PIPES + 1 cycles. Structure and compressor
// choice follow the design; the exact handling of /2, number format and
// register placement are this implementation's own.
module bfly_d #(
  parameter int unsigned DW    = 16,
  parameter int unsigned FRAC  = 14,
  parameter int unsigned PIPES = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] a_re, a_im, b_re, b_im, w_re, w_im,
  output logic                 out_valid,
  output logic signed [DW+1:0] c_re, c_im, d_re, d_im
);
  localparam int unsigned IW = 40;
  localparam int unsigned OW = DW + 2;

  // ---- pre-adders ----
  logic signed [DW:0] s1, s2, s3, s4;
  assign s1 = (DW+1)'(w_re) - (DW+1)'(w_im);
  assign s2 = (DW+1)'(b_re) + (DW+1)'(b_im);
  assign s3 = (DW+1)'(b_im) - (DW+1)'(b_re);
  assign s4 = (DW+1)'(w_re) + (DW+1)'(w_im);

  // ---- level 1 (optional) ----
  logic signed [DW:0]   p_s1, p_s2, p_s3, p_s4;
  logic signed [DW-1:0] p_ar, p_ai, p_br, p_wi;
  logic                 p_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_s1, p_s2, p_s3, p_s4, p_ar, p_ai, p_br, p_wi} <= '0;
      p_v <= 1'b0;
    end else begin
      {p_s1, p_s2, p_s3, p_s4} <= {s1, s2, s3, s4};
      {p_ar, p_ai, p_br, p_wi} <= {a_re, a_im, b_re, w_im};
      p_v <= in_valid;
    end
  end

  logic signed [DW:0]   q1, q2, q3, q4;
  logic signed [DW-1:0] ar, ai, br, wi;
  logic                 v1;
  assign {q1, q2, q3, q4} = (PIPES >= 2) ? {p_s1, p_s2, p_s3, p_s4} : {s1, s2, s3, s4};
  assign {ar, ai, br, wi} = (PIPES >= 2) ? {p_ar, p_ai, p_br, p_wi}
                                         : {a_re, a_im, b_re, w_im};
  assign v1 = (PIPES >= 2) ? p_v : in_valid;

  // ---- multipliers and scaling, level 2 ----
  // Values below are at twice the final scale: P1 stands for 2*(P1/2), etc.
  logic signed [IW-1:0] h1, h3, m2x, a_r, a_i;
  logic                 v2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {h1, h3, m2x, a_r, a_i} <= '0;
      v2 <= 1'b0;
    end else begin
      h1  <= IW'(q1 * q2);                 // 2 * (P1/2)
      h3  <= IW'(q3 * q4);                 // 2 * (P3/2)
      m2x <= IW'(br * wi) <<< 2;           // 2 * (2*M)
      a_r <= IW'(ar) <<< (FRAC + 1);
      a_i <= IW'(ai) <<< (FRAC + 1);
      v2  <= v1;
    end
  end

  // ---- compressor stage ----
  logic [IW-1:0] y_cr, y_dr, y_ci, y_di;
  madd4 #(.WIDTH(IW), .NEG(4'b0000)) u_ci (.x0(a_i), .x1(h1), .x2(h3), .x3(m2x), .y(y_ci));
  madd4 #(.WIDTH(IW), .NEG(4'b1110)) u_di (.x0(a_i), .x1(h1), .x2(h3), .x3(m2x), .y(y_di));
  madd3 #(.WIDTH(IW), .NEG(3'b100))  u_cr (.x0(a_r), .x1(h1), .x2(h3), .y(y_cr));
  madd3 #(.WIDTH(IW), .NEG(3'b010))  u_dr (.x0(a_r), .x1(h1), .x2(h3), .y(y_dr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c_re, c_im, d_re, d_im} <= '0;
      out_valid <= 1'b0;
    end else begin
      c_re <= y_cr[FRAC+1 +: OW];
      c_im <= y_ci[FRAC+1 +: OW];
      d_re <= y_dr[FRAC+1 +: OW];
      d_im <= y_di[FRAC+1 +: OW];
      out_valid <= v2;
    end
  end

  if (PIPES < 1 || PIPES > 2) begin : g_bad_pipes
    $error("bfly_d: PIPES must be 1 or 2");
  end
endmodule
