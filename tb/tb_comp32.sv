// Exhaustive test of the 3:2 compressor cell: alpha + beta + gamma must equal
// sum + 2*carry for all eight inputs.
module tb_comp32;
  logic al, be, ga, sum, carry;
  int checks = 0, failures = 0;

  comp32 dut (.alpha(al), .beta(be), .gamma(ga), .sum(sum), .carry(carry));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {al, be, ga} = 3'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(al) + int'(be) + int'(ga)) begin
        failures++;
        $display("FAIL %b%b%b -> carry=%0d sum=%0d", al, be, ga, carry, sum);
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
