// Three-operand adder/subtractor built on 3:2 adder compressors.
// Computes y = (+/-)x0 (+/-)x1 (+/-)x2 modulo 2^WIDTH, the sign of each operand
// fixed by the NEG parameter (bit i set: operand i is subtracted). A
// subtracted operand enters the compressor row inverted (~x), and the "+1" of
// its two's complement is injected for free: the first into the empty bit 0 of
// the shifted carry vector, the second into the carry-in of the final adder,
// so at most two operands may be negative.
// One row of WIDTH comp32 cells turns the three operands into a sum vector
// and a carry vector; a modified carry select adder (mcsla) adds the two.
// Operands must already be sign-extended to WIDTH bits. Combinational.
// The 3:2 compressor reduction follows the design; the way subtraction is
// folded into the row and the choice of final adder are this
// implementation's own.
module madd3 #(
  parameter int unsigned WIDTH = 36,
  parameter bit [2:0]    NEG   = 3'b000
) (
  input  logic [WIDTH-1:0] x0,
  input  logic [WIDTH-1:0] x1,
  input  logic [WIDTH-1:0] x2,
  output logic [WIDTH-1:0] y
);
  localparam int unsigned NCORR = 32'(NEG[0]) + 32'(NEG[1]) + 32'(NEG[2]);

  logic [WIDTH-1:0] o0, o1, o2, s, c, cv;
  logic             unused_cout;

  assign o0 = NEG[0] ? ~x0 : x0;
  assign o1 = NEG[1] ? ~x1 : x1;
  assign o2 = NEG[2] ? ~x2 : x2;

  for (genvar i = 0; i < WIDTH; i++) begin : g_col
    comp32 u_c (.alpha(o0[i]), .beta(o1[i]), .gamma(o2[i]), .sum(s[i]), .carry(c[i]));
  end

  // carry vector one place up; its free bit 0 takes the first correction
  assign cv = {c[WIDTH-2:0], 1'(NCORR >= 1)};

  mcsla #(.WIDTH(WIDTH)) u_cpa (
    .a(s), .b(cv), .cin(1'(NCORR >= 2)), .s(y), .cout(unused_cout)
  );

  if (NCORR > 2) begin : g_bad_neg
    $error("madd3: at most two operands may be subtracted");
  end
endmodule
