// Modified carry select adder (CSLA) of WIDTH bits, WIDTH a multiple of 4.
// The operands are cut into 4-bit groups. The lowest group is a plain 4-bit
// ripple adder fed by cin. Every higher group holds two 4-bit ripple adders,
// one computing with a carry-in of 0 and one with 1, both working at once;
// the carry out of the group below then selects the right sum and carry
// through a multiplexer. The 4-bit adders are made of reduced full adders
// (rfa), which is what makes this the "modified" CSLA.
// Interface: a, b, cin -> s = a + b + cin (WIDTH bits), cout.
// Combinational. Subtraction is done by the user as a + ~b with cin = 1.
// The group structure and the reduced full adders follow the design, which
// draws an 8-bit example; extending it to WIDTH/4 groups with a chain of
// select multiplexers is this implementation's choice.
module mcsla #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NG = WIDTH / 4;

  logic [NG:0] gc;   // carry into each group
  assign gc[0] = cin;

  // first group: carry comes straight from cin
  rca4_rfa u_g0 (.a(a[3:0]), .b(b[3:0]), .cin(gc[0]), .s(s[3:0]), .cout(gc[1]));

  for (genvar g = 1; g < NG; g++) begin : g_sel
    logic [3:0] s0, s1;
    logic       c0, c1;
    rca4_rfa u_c0 (.a(a[4*g +: 4]), .b(b[4*g +: 4]), .cin(1'b0), .s(s0), .cout(c0));
    rca4_rfa u_c1 (.a(a[4*g +: 4]), .b(b[4*g +: 4]), .cin(1'b1), .s(s1), .cout(c1));
    // carry-select multiplexer
    assign s[4*g +: 4] = gc[g] ? s1 : s0;
    assign gc[g+1]     = gc[g] ? c1 : c0;
  end

  assign cout = gc[NG];

  if (WIDTH % 4 != 0 || WIDTH < 4) begin : g_bad_width
    $error("mcsla: WIDTH must be a positive multiple of 4");
  end
endmodule
