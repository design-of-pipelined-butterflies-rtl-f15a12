// Four-operand adder/subtractor built on 4:2 adder compressors.
// Computes y = (+/-)x0 (+/-)x1 (+/-)x2 (+/-)x3 modulo 2^WIDTH, the signs fixed
// by NEG (bit i set: operand i is subtracted). Subtracted operands enter
// inverted; their "+1" corrections go, in this order, into the cin of the
// lowest 4:2 cell, bit 0 of the shifted carry vector and the carry-in of the
// final adder, so up to three operands may be negative.
// A row of WIDTH comp42 cells (cout of each cell feeding cin of the next)
// yields a sum and a carry vector; a modified carry select adder (mcsla) adds
// them. The cout of the top cell falls outside the WIDTH-bit result and is
// dropped. Operands must be sign-extended to WIDTH bits. Combinational.
// The 4:2 compressor reduction follows the design; the sign handling and the
// final adder are this implementation's own.
module madd4 #(
  parameter int unsigned WIDTH = 36,
  parameter bit [3:0]    NEG   = 4'b0000
) (
  input  logic [WIDTH-1:0] x0,
  input  logic [WIDTH-1:0] x1,
  input  logic [WIDTH-1:0] x2,
  input  logic [WIDTH-1:0] x3,
  output logic [WIDTH-1:0] y
);
  localparam int unsigned NCORR = 32'(NEG[0]) + 32'(NEG[1]) + 32'(NEG[2]) + 32'(NEG[3]);

  logic [WIDTH-1:0] o0, o1, o2, o3, s, c, cv;
  logic [WIDTH:0]   ch;   // horizontal cout -> cin chain
  logic             unused_cout;

  assign o0 = NEG[0] ? ~x0 : x0;
  assign o1 = NEG[1] ? ~x1 : x1;
  assign o2 = NEG[2] ? ~x2 : x2;
  assign o3 = NEG[3] ? ~x3 : x3;

  assign ch[0] = 1'(NCORR >= 1);

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    comp42 u_c (
      .alpha(o0[i]), .beta(o1[i]), .gamma(o2[i]), .delta(o3[i]), .cin(ch[i]),
      .sum(s[i]), .carry(c[i]), .cout(ch[i+1])
    );
  end

  assign cv = {c[WIDTH-2:0], 1'(NCORR >= 2)};

  mcsla #(.WIDTH(WIDTH)) u_cpa (
    .a(s), .b(cv), .cin(1'(NCORR >= 3)), .s(y), .cout(unused_cout)
  );

  if (NCORR > 3) begin : g_bad_neg
    $error("madd4: at most three operands may be subtracted");
  end
endmodule
