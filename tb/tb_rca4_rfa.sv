// Exhaustive test of the 4-bit reduced-full-adder ripple adder: all 512
// combinations of a, b and cin against a + b + cin.
module tb_rca4_rfa;
  logic [3:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  rca4_rfa dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int v = 0; v < 512; v++) begin
      {a, b, cin} = 9'(v);
      #1;
      checks++;
      if ({cout, s} != 5'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL %0d + %0d + %0d -> %0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
