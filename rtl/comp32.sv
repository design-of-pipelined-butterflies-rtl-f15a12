// 3:2 adder compressor cell (one bit column).
// Reduces three bits of equal weight (alpha, beta, gamma) to a sum bit of the
// same weight and a carry bit of twice the weight: alpha+beta+gamma =
// sum + 2*carry. Built from two XOR gates and a multiplexer: x = alpha^beta,
// sum = x ^ gamma, and the mux passes alpha when x = 0 (alpha = beta, so the
// carry is their common value) and gamma when x = 1. Combinational.
// The gate arrangement follows the design; the XORs are plain logic XORs
// (the low-power XOR circuit of the original is a transistor-level cell).
module comp32 (
  input  logic alpha,
  input  logic beta,
  input  logic gamma,
  output logic sum,
  output logic carry
);
  logic x;
  assign x     = alpha ^ beta;
  assign sum   = x ^ gamma;
  assign carry = x ? gamma : alpha;
endmodule
