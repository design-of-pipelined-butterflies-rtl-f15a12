// Reduced full adder.
// Adds three bits (a, b, cin) and returns sum and carry. Instead of the usual
// two-XOR / two-AND / one-OR full adder, it forms four candidate values from b
// and cin only and lets the third input, a, pick between them through a
// two-output 2:1 multiplexer:
//   a = 0 : sum = b ^ cin,   carry = b & cin
//   a = 1 : sum = ~(b ^ cin), carry = b | cin
// b ^ cin is built as (b | cin) & ~(b & cin), and its complement with one more
// inverter, so the cell uses two AND, one OR, two NOT and one mux, as in the
// reduced full adder this design is built on. Purely combinational.
module rfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);
  logic g_or, g_and, n_and, x_bc, xn_bc;

  always_comb begin
    g_or  = b | cin;
    g_and = b & cin;
    n_and = ~g_and;
    x_bc  = g_or & n_and;   // b xor cin
    xn_bc = ~x_bc;          // b xnor cin
    // dual 2:1 mux selected by a
    sum   = a ? xn_bc : x_bc;
    carry = a ? g_or  : g_and;
  end
endmodule
