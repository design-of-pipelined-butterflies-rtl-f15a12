// Test of the three-operand compressor adder at its default width (36 bits)
// with four sign patterns (+++, ++-, +--, -+-), on random and extreme
// operands, against signed 64-bit arithmetic taken modulo 2^36.
module tb_madd3;
  localparam int W = 36;
  logic [W-1:0] x0, x1, x2, y0, y1, y2, y3;
  int checks = 0, failures = 0;

  madd3                      d0 (.x0(x0), .x1(x1), .x2(x2), .y(y0));
  madd3 #(.NEG(3'b100))      d1 (.x0(x0), .x1(x1), .x2(x2), .y(y1));
  madd3 #(.NEG(3'b110))      d2 (.x0(x0), .x1(x1), .x2(x2), .y(y2));
  madd3 #(.WIDTH(W), .NEG(3'b101)) d3 (.x0(x0), .x1(x1), .x2(x2), .y(y3));

  function automatic longint sx(logic [W-1:0] v);
    return longint'(signed'({{(64-W){v[W-1]}}, v}));
  endfunction

  task automatic cmp(string tag, logic [W-1:0] got, longint exp);
    checks++;
    if (got != W'(exp)) begin
      failures++;
      $display("FAIL %s x=%h %h %h got %h exp %h", tag, x0, x1, x2, got, W'(exp));
    end
  endtask

  task automatic run();
    #1;
    cmp("+++", y0,  sx(x0) + sx(x1) + sx(x2));
    cmp("++-", y1,  sx(x0) + sx(x1) - sx(x2));
    cmp("+--", y2,  sx(x0) - sx(x1) - sx(x2));
    cmp("-+-", y3, -sx(x0) + sx(x1) - sx(x2));
  endtask

  initial begin
    x0 = '1; x1 = '1; x2 = '1; run();
    x0 = '0; x1 = '0; x2 = '0; run();
    x0 = {1'b1, {(W-1){1'b0}}}; x1 = x0; x2 = '1; run();
    for (int i = 0; i < 3000; i++) begin
      x0 = W'({$urandom, $urandom});
      x1 = W'({$urandom, $urandom});
      x2 = W'({$urandom, $urandom});
      run();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
