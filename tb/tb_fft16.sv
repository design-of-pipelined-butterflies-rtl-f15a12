// End-to-end test of the 16-point SDF-SDC FFT.
// Frames: an impulse, a DC frame at full scale, a full-scale complex tone at
// bin 3, then random 16-bit frames; they are streamed back to back, with
// in_valid dropped at random (about one clock in six) to pause the pipeline,
// and followed by two frames of zeros to flush the last one (latency is
// 21 samples).
// Each output word (out_valid) must match, bit for bit, an integer model of
// the same algorithm for the bin named by out_bin, and lie within 8 LSB of
// the floating-point DFT. The bins of a frame must arrive in bit-reversed
// order, and the first output must be loaded by the 22nd enabled clock.
module tb_fft16;
  import fft_ref_pkg::*;

  localparam int NF = 40;   // frames checked
  localparam int W  = 24;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] in_re, in_im;
  logic               out_valid;
  logic signed [W-1:0] out_re, out_im;
  logic [3:0]         out_bin;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fft16 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
             .out_valid(out_valid), .out_re(out_re), .out_im(out_im), .out_bin(out_bin));

  frame_t  xr [NF + 2], xi [NF + 2];
  frame_t  er [NF], ei [NF];
  rframe_t fr [NF], fi [NF];
  int      accepted = 0, outs = 0, first_out_at = -1, pauses = 0;

  // output checker
  always @(posedge clk) begin
    #1;
    if (out_valid && outs < NF * 16) begin
      automatic int f = outs / 16, q = outs % 16;
      automatic real dr, di;
      if (first_out_at < 0) first_out_at = accepted;
      checks++;
      if (int'(out_bin) != bitrev4(q)) begin
        failures++;
        $display("FAIL frame %0d pos %0d: bin %0d, expected %0d", f, q, out_bin, bitrev4(q));
      end
      checks++;
      if (out_re != W'(er[f][out_bin]) || out_im != W'(ei[f][out_bin])) begin
        failures++;
        $display("FAIL frame %0d bin %0d: got (%0d,%0d) exp (%0d,%0d)", f, out_bin,
                 out_re, out_im, er[f][out_bin], ei[f][out_bin]);
      end
      dr = real'(out_re) - fr[f][out_bin];
      di = real'(out_im) - fi[f][out_bin];
      checks++;
      if (dr > 8.0 || dr < -8.0 || di > 8.0 || di < -8.0) begin
        failures++;
        $display("FAIL frame %0d bin %0d: off the DFT by (%f,%f)", f, out_bin, dr, di);
      end
      outs++;
    end
  end

  initial begin
    for (int f = 0; f <= NF + 1; f++) begin
      for (int n = 0; n < 16; n++) begin
        case (f)
          0: begin xr[f][n] = (n == 0) ? 1000 : 0; xi[f][n] = 0; end
          1: begin xr[f][n] = 32767; xi[f][n] = -32768; end
          2: begin
            xr[f][n] = rnd(32767.0 * $cos(2.0 * PI * 3.0 * real'(n) / 16.0));
            xi[f][n] = rnd(32767.0 * $sin(2.0 * PI * 3.0 * real'(n) / 16.0));
          end
          NF, NF + 1: begin xr[f][n] = 0; xi[f][n] = 0; end
          default: begin
            xr[f][n] = longint'($urandom_range(0, 65535)) - longint'(32768);
            xi[f][n] = longint'($urandom_range(0, 65535)) - longint'(32768);
          end
        endcase
      end
      if (f < NF) begin
        fft16_exact(xr[f], xi[f], er[f], ei[f]);
        dft16(xr[f], xi[f], fr[f], fi[f]);
      end
    end
    in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    for (int f = 0; f <= NF + 1; f++) begin
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          in_valid = 1'b0;
          pauses++;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_re = 16'(xr[f][n]);
        in_im = 16'(xi[f][n]);
        @(posedge clk);
        accepted++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (outs != NF * 16) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", outs, NF * 16);
    end
    checks++;
    if (first_out_at != 22) begin
      failures++;
      $display("FAIL first output after %0d samples, expected 22", first_out_at);
    end
    checks++;
    if (pauses == 0) begin
      failures++;
      $display("FAIL the input never paused");
    end
    $display("frames=%0d outputs=%0d pauses=%0d", NF, outs, pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
