// Four-bit ripple-carry adder built from four reduced full adders (rfa).
// This is the 4-bit adder group of the modified carry select adder: the carry
// ripples from bit 0 to bit 3. Interface: a, b (4 bits), cin; s (4 bits),
// cout. Purely combinational. The 4-bit group of full adders follows the
// carry select adder of the design; rippling the carry inside the group is
// this implementation's choice.
module rca4_rfa (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [4:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    rfa u_rfa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(s[i]), .carry(c[i+1]));
  end

  assign cout = c[4];
endmodule
