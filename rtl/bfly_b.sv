// Radix-2 decimation-in-time butterfly, structure B (three real multipliers),
// with adder compressors.
// Computes C = A + W*B and D = A - W*B. Three pre-adders form Br+Bi, Wr+Wi
// and Br-Bi; three multipliers form
//   m1 = (Br+Bi)*Wr,  m2 = (Wr+Wi)*Bi,  m3 = (Br-Bi)*Wi,
// so that Re(W*B) = m1 - m2 and Im(W*B) = m2 + m3. Each output is one
// three-operand sum done by 3:2 compressors and a final adder (madd3):
//   Cr = Ar + m1 - m2, Dr = Ar - m1 + m2, Ci = Ai + m2 + m3, Di = Ai - m2 - m3.
// Number format, output rounding and pipeline are those of bfly_a: A, B are
// DW-bit signed integers, W has FRAC fraction bits, outputs are
// floor((A*2^FRAC + W*B)/2^FRAC) in DW+2 bits. With PIPES = 2 the pre-adder
// results are registered before the multipliers; products and outputs are
// always registered. Latency PIPES + 1 cycles, throughput one per cycle.
// The multiplier arrangement and the compressors follow the design; number
// format and register placement are this implementation's own.
module bfly_b #(
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
  logic signed [DW:0] s1, s2, s3;
  assign s1 = (DW+1)'(b_re) + (DW+1)'(b_im);
  assign s2 = (DW+1)'(w_re) + (DW+1)'(w_im);
  assign s3 = (DW+1)'(b_re) - (DW+1)'(b_im);

  // ---- level 1 (optional) ----
  logic signed [DW:0]   p_s1, p_s2, p_s3;
  logic signed [DW-1:0] p_ar, p_ai, p_bi, p_wr, p_wi;
  logic                 p_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_s1, p_s2, p_s3, p_ar, p_ai, p_bi, p_wr, p_wi} <= '0;
      p_v <= 1'b0;
    end else begin
      {p_s1, p_s2, p_s3} <= {s1, s2, s3};
      {p_ar, p_ai, p_bi, p_wr, p_wi} <= {a_re, a_im, b_im, w_re, w_im};
      p_v <= in_valid;
    end
  end

  logic signed [DW:0]   q1, q2, q3;
  logic signed [DW-1:0] ar, ai, bi, wr, wi;
  logic                 v1;
  assign {q1, q2, q3}         = (PIPES >= 2) ? {p_s1, p_s2, p_s3} : {s1, s2, s3};
  assign {ar, ai, bi, wr, wi} = (PIPES >= 2) ? {p_ar, p_ai, p_bi, p_wr, p_wi}
                                             : {a_re, a_im, b_im, w_re, w_im};
  assign v1 = (PIPES >= 2) ? p_v : in_valid;

  // ---- multipliers, level 2 ----
  logic signed [IW-1:0] m1, m2, m3, a_r, a_i;
  logic                 v2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {m1, m2, m3, a_r, a_i} <= '0;
      v2 <= 1'b0;
    end else begin
      m1  <= IW'(q1 * (DW+1)'(wr));
      m2  <= IW'(q2 * (DW+1)'(bi));
      m3  <= IW'(q3 * (DW+1)'(wi));
      a_r <= IW'(ar) <<< FRAC;
      a_i <= IW'(ai) <<< FRAC;
      v2  <= v1;
    end
  end

  // ---- compressor stage ----
  logic [IW-1:0] y_cr, y_dr, y_ci, y_di;
  madd3 #(.WIDTH(IW), .NEG(3'b100)) u_cr (.x0(a_r), .x1(m1), .x2(m2), .y(y_cr));
  madd3 #(.WIDTH(IW), .NEG(3'b010)) u_dr (.x0(a_r), .x1(m1), .x2(m2), .y(y_dr));
  madd3 #(.WIDTH(IW), .NEG(3'b000)) u_ci (.x0(a_i), .x1(m2), .x2(m3), .y(y_ci));
  madd3 #(.WIDTH(IW), .NEG(3'b110)) u_di (.x0(a_i), .x1(m2), .x2(m3), .y(y_di));

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
    $error("bfly_b: PIPES must be 1 or 2");
  end
endmodule
