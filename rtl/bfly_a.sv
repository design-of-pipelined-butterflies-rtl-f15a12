// Radix-2 decimation-in-time butterfly, structure A (four real multipliers),
// with adder compressors.
// Computes C = A + W*B and D = A - W*B for complex A, B and twiddle W.
// The complex product uses the textbook form: four real products Br*Wr,
// Bi*Wi, Br*Wi, Bi*Wr. Instead of forming W*B first and then adding it to
// A, each output is one three-operand sum (Ar + BrWr - BiWi, and so on)
// done by a row of 3:2 compressors and one carry-propagate adder (madd3).
// Number format: A, B are DW-bit signed integers, W is DW-bit signed with FRAC
// fraction bits (Q2.14 by default, so W = 1 is exactly representable). The
// sums are exact; each output is floor((A*2^FRAC + W*B) / 2^FRAC) in DW+2 bits.
// Pipeline: with PIPES = 2 the multiplier operands are registered; the
// products are always registered; the outputs are registered. Latency is
// PIPES + 1 cycles, one new butterfly per cycle; out_valid follows in_valid.
// The choice of structure, of compressors and of one or two pipeline levels
// follows the design; the number format and register placement are this
// implementation's own.
module bfly_a #(
  parameter int unsigned DW    = 16,
  parameter int unsigned FRAC  = 14,
  parameter int unsigned PIPES = 1
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

  // ---- level 1 (optional): multiplier operands ----
  logic signed [DW-1:0] p_ar, p_ai, p_br, p_bi, p_wr, p_wi;
  logic                 p_v;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_ar, p_ai, p_br, p_bi, p_wr, p_wi} <= '0;
      p_v <= 1'b0;
    end else begin
      {p_ar, p_ai, p_br, p_bi, p_wr, p_wi} <= {a_re, a_im, b_re, b_im, w_re, w_im};
      p_v <= in_valid;
    end
  end

  logic signed [DW-1:0] ar, ai, br, bi, wr, wi;
  logic                 v1;
  assign {ar, ai, br, bi, wr, wi} = (PIPES >= 2) ? {p_ar, p_ai, p_br, p_bi, p_wr, p_wi}
                                                : {a_re, a_im, b_re, b_im, w_re, w_im};
  assign v1 = (PIPES >= 2) ? p_v : in_valid;

  // ---- multipliers, level 2: products ----
  logic signed [IW-1:0] m_rr, m_ii, m_ri, m_ir, a_r, a_i;
  logic                 v2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {m_rr, m_ii, m_ri, m_ir, a_r, a_i} <= '0;
      v2 <= 1'b0;
    end else begin
      m_rr <= IW'(br * wr);
      m_ii <= IW'(bi * wi);
      m_ri <= IW'(br * wi);
      m_ir <= IW'(bi * wr);
      a_r  <= IW'(ar) <<< FRAC;
      a_i  <= IW'(ai) <<< FRAC;
      v2   <= v1;
    end
  end

  // ---- compressor stage ----
  logic [IW-1:0] y_cr, y_dr, y_ci, y_di;
  madd3 #(.WIDTH(IW), .NEG(3'b100)) u_cr (.x0(a_r), .x1(m_rr), .x2(m_ii), .y(y_cr));
  madd3 #(.WIDTH(IW), .NEG(3'b010)) u_dr (.x0(a_r), .x1(m_rr), .x2(m_ii), .y(y_dr));
  madd3 #(.WIDTH(IW), .NEG(3'b000)) u_ci (.x0(a_i), .x1(m_ri), .x2(m_ir), .y(y_ci));
  madd3 #(.WIDTH(IW), .NEG(3'b110)) u_di (.x0(a_i), .x1(m_ri), .x2(m_ir), .y(y_di));

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
    $error("bfly_a: PIPES must be 1 or 2");
  end
endmodule
