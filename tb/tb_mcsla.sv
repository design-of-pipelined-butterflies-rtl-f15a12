// Test of the modified carry select adder at its default width (16 bits) and
// at 24 bits: corner cases that exercise every group's carry select (all
// ones plus one, alternating patterns) and random operands, against the
// arithmetic sum a + b + cin including the carry out.
module tb_mcsla;
  logic [15:0] a16, b16, s16;
  logic [23:0] a24, b24, s24;
  logic        cin, c16, c24;
  int checks = 0, failures = 0;

  mcsla           dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(c16));
  mcsla #(.WIDTH(24)) dut24 (.a(a24), .b(b24), .cin(cin), .s(s24), .cout(c24));

  task automatic check();
    logic [16:0] e16;
    logic [24:0] e24;
    #1;
    e16 = 17'(a16) + 17'(b16) + 17'(cin);
    e24 = 25'(a24) + 25'(b24) + 25'(cin);
    checks += 2;
    if ({c16, s16} != e16) begin
      failures++;
      $display("FAIL16 %h + %h + %0d -> %h (exp %h)", a16, b16, cin, {c16, s16}, e16);
    end
    if ({c24, s24} != e24) begin
      failures++;
      $display("FAIL24 %h + %h + %0d -> %h (exp %h)", a24, b24, cin, {c24, s24}, e24);
    end
  endtask

  initial begin
    // carry chains through every group
    a16 = 16'hFFFF; b16 = 16'h0000; a24 = 24'hFFFFFF; b24 = 24'h0; cin = 1'b1; check();
    a16 = 16'hFFFF; b16 = 16'h0001; a24 = 24'hFFFFFF; b24 = 24'h1; cin = 1'b0; check();
    a16 = 16'h0FFF; b16 = 16'h0001; a24 = 24'h0FFFFF; b24 = 24'h1; cin = 1'b0; check();
    a16 = 16'h00F0; b16 = 16'h0010; a24 = 24'h0F0F0F; b24 = 24'h010101; cin = 1'b1; check();
    a16 = 16'hAAAA; b16 = 16'h5555; a24 = 24'hAAAAAA; b24 = 24'h555555; cin = 1'b1; check();
    for (int i = 0; i < 4000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a24 = 24'($urandom); b24 = 24'($urandom);
      cin = 1'($urandom);
      check();
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
