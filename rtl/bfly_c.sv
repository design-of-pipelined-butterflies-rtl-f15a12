// Radix-2 decimation-in-time butterfly, structure C (three real multipliers),
// with 4:2 and 3:2 adder compressors.
// Computes C = A + W*B and D = A - W*B. Two pre-adders form Wr+Wi and Br+Bi;
// three multipliers form
//   p = (Wr+Wi)*(Br+Bi),  k1 = Br*Wr,  k2 = Bi*Wi,
// so that Re(W*B) = k1 - k2 and Im(W*B) = p - k1 - k2. The imaginary outputs
// are four-operand sums (4:2 compressors, madd4), the real outputs
// three-operand sums (3:2 compressors, madd3):
//   Ci = Ai + p - k1 - k2, Di = Ai - p + k1 + k2,
//   Cr = Ar + k1 - k2,     Dr = Ar - k1 + k2.
// Number format, rounding and pipeline as in bfly_a/bfly_b: DW-bit signed
// integer A and B, W with FRAC fraction bits, outputs
// floor((A*2^FRAC + W*B)/2^FRAC) in DW+2 bits; PIPES = 2 registers the
// pre-adder results, products and outputs are always registered; latency
// PIPES + 1 cycles. Structure and compressor choice follow the design; number
// format and register placement are this implementation's own.
module bfly_c #(
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
  logic signed [DW:0] s1, s2;
  assign s1 = (DW+1)'(w_re) + (DW+1)'(w_im);
  assign s2 = (DW+1)'(b_re) + (DW+1)'(b_im);

  // ---- level 1 (optional) ----
  logic signed [DW:0]   p_s1, p_s2;
  logic signed [DW-1:0] p_ar, p_ai, p_br, p_bi, p_wr, p_wi;
  logic                 p_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_s1, p_s2, p_ar, p_ai, p_br, p_bi, p_wr, p_wi} <= '0;
      p_v <= 1'b0;
    end else begin
      {p_s1, p_s2} <= {s1, s2};
      {p_ar, p_ai, p_br, p_bi, p_wr, p_wi} <= {a_re, a_im, b_re, b_im, w_re, w_im};
      p_v <= in_valid;
    end
  end

  logic signed [DW:0]   q1, q2;
  logic signed [DW-1:0] ar, ai, br, bi, wr, wi;
  logic                 v1;
  assign {q1, q2} = (PIPES >= 2) ? {p_s1, p_s2} : {s1, s2};
  assign {ar, ai, br, bi, wr, wi} = (PIPES >= 2) ? {p_ar, p_ai, p_br, p_bi, p_wr, p_wi}
                                                : {a_re, a_im, b_re, b_im, w_re, w_im};
  assign v1 = (PIPES >= 2) ? p_v : in_valid;

  // ---- multipliers, level 2 ----
  logic signed [IW-1:0] p, k1, k2, a_r, a_i;
  logic                 v2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p, k1, k2, a_r, a_i} <= '0;
      v2 <= 1'b0;
    end else begin
      p   <= IW'(q1 * q2);
      k1  <= IW'(br * wr);
      k2  <= IW'(bi * wi);
      a_r <= IW'(ar) <<< FRAC;
      a_i <= IW'(ai) <<< FRAC;
      v2  <= v1;
    end
  end

  // ---- compressor stage ----
  logic [IW-1:0] y_cr, y_dr, y_ci, y_di;
  madd4 #(.WIDTH(IW), .NEG(4'b1100)) u_ci (.x0(a_i), .x1(p), .x2(k1), .x3(k2), .y(y_ci));
  madd4 #(.WIDTH(IW), .NEG(4'b0010)) u_di (.x0(a_i), .x1(p), .x2(k1), .x3(k2), .y(y_di));
  madd3 #(.WIDTH(IW), .NEG(3'b100))  u_cr (.x0(a_r), .x1(k1), .x2(k2), .y(y_cr));
  madd3 #(.WIDTH(IW), .NEG(3'b010))  u_dr (.x0(a_r), .x1(k1), .x2(k2), .y(y_dr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c_re, c_im, d_re, d_im} <= '0;
      out_valid <= 1'b0;
    end else begin
      c_re <= y_cr[FRAC +: OW];
      c_im <= y_ci[FRAC +: OW];
      d_re <= y_dr[FRAC +: OW];
      d_im <= y_di[FRAC +: OW];
      out_valid <= v2;
    end
  end

  if (PIPES < 1 || PIPES > 2) begin : g_bad_pipes
    $error("bfly_c: PIPES must be 1 or 2");
  end
endmodule
