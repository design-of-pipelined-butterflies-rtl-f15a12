// 4:2 adder compressor cell (one bit column).
// Reduces four bits of equal weight (alpha, beta, gamma, delta) plus a carry
// cin from the column below to a sum bit, a carry bit of twice the weight, and
// cout (also of twice the weight) that goes to the cin of the next column:
// alpha+beta+gamma+delta+cin = sum + 2*(carry + cout).
// Four XORs and two multiplexers: x1 = alpha^beta, x2 = gamma^delta,
// x3 = x1^x2, sum = x3^cin; cout = x1 ? gamma : alpha; carry = x3 ? cin : delta.
// cout does not depend on cin, so a row of cells has no rippling carry.
// Combinational. The arrangement follows the design's 4:2 compressor; the
// 0-input of the carry multiplexer is delta, the input that makes the count
// correct (alpha there would give carry 0 for alpha=beta=0, gamma=delta=1).
module comp42 (
  input  logic alpha,
  input  logic beta,
  input  logic gamma,
  input  logic delta,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x1, x2, x3;
  assign x1    = alpha ^ beta;
  assign x2    = gamma ^ delta;
  assign x3    = x1 ^ x2;
  assign sum   = x3 ^ cin;
  assign cout  = x1 ? gamma : alpha;
  assign carry = x3 ? cin : delta;
endmodule
