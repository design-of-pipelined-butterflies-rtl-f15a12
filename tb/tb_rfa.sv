// Exhaustive test of the reduced full adder: all eight input combinations,
// sum and carry compared with the arithmetic sum a + b + cin.
module tb_rfa;
  logic a, b, cin, sum, carry;
  int checks = 0, failures = 0;

  rfa dut (.a(a), .b(b), .cin(cin), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0d -> carry=%0d sum=%0d", a, b, cin, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
