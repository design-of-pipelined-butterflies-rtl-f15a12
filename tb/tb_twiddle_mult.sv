// Test of the twiddle multiplier: random 21-bit complex samples times W16^k
// for random k = 0..7. The reference twiddles are recomputed here as
// round(2^14 * cos(2*pi*k/16)) and round(-2^14 * sin(2*pi*k/16)), and the
// product rounded as round-half-up of x*W / 2^14. k = 0 must return x
// exactly. The result must appear one enabled clock later.
module tb_twiddle_mult;
  localparam int W = 24;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [2:0] k;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  twiddle_mult dut (.clk(clk), .rst_n(rst_n), .en(en), .k(k),
                    .x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im));

  function automatic longint rnd(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  initial begin
    longint cr, ci, er, ei, xr, xi;
    k = '0; x_re = '0; x_im = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1'b1;
      k = 3'($urandom);
      xr = longint'($urandom_range(0, 2 ** 21 - 1)) - longint'(2 ** 20);
      xi = longint'($urandom_range(0, 2 ** 21 - 1)) - longint'(2 ** 20);
      x_re = W'(xr); x_im = W'(xi);
      cr = rnd(16384.0 * $cos(2.0 * PI * real'(k) / 16.0));
      ci = rnd(-16384.0 * $sin(2.0 * PI * real'(k) / 16.0));
      er = (xr * cr - xi * ci + 8192) >>> 14;
      ei = (xr * ci + xi * cr + 8192) >>> 14;
      @(posedge clk);
      #1;
      checks++;
      if (y_re != W'(er) || y_im != W'(ei)) begin
        failures++;
        $display("FAIL k=%0d x=(%0d,%0d): got (%0d,%0d) exp (%0d,%0d)", k, xr, xi, y_re, y_im, er, ei);
      end
      if (k == 3'd0) begin
        checks++;
        if (y_re != x_re || y_im != x_im) begin
          failures++;
          $display("FAIL k=0 does not pass the sample through");
        end
      end
      // a disabled clock must hold the result
      @(negedge clk);
      en = 1'b0;
      x_re = ~x_re;
      @(posedge clk);
      #1;
      checks++;
      if (y_re != W'(er) || y_im != W'(ei)) begin
        failures++;
        $display("FAIL result changed while en was low");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
