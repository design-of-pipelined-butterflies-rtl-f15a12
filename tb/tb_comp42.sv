// Exhaustive test of the 4:2 compressor cell: for all 32 inputs,
// alpha+beta+gamma+delta+cin must equal sum + 2*(carry + cout), and cout
// must not depend on cin (so a row of cells has no rippling carry).
module tb_comp42;
  logic al, be, ga, de, ci, sum, carry, cout, cout_other;
  int checks = 0, failures = 0;

  comp42 dut (.alpha(al), .beta(be), .gamma(ga), .delta(de), .cin(ci),
              .sum(sum), .carry(carry), .cout(cout));

  initial begin
    for (int v = 0; v < 32; v++) begin
      {al, be, ga, de, ci} = 5'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) !=
          int'(al) + int'(be) + int'(ga) + int'(de) + int'(ci)) begin
        failures++;
        $display("FAIL %b%b%b%b cin=%b -> sum=%0d carry=%0d cout=%0d",
                 al, be, ga, de, ci, sum, carry, cout);
      end
      cout_other = cout;
      ci = ~ci;
      #1;
      checks++;
      if (cout != cout_other) begin
        failures++;
        $display("FAIL cout depends on cin for %b%b%b%b", al, be, ga, de);
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
