// End-to-end test of the top level at its default parameters.
// FFT side: 24 frames (impulse, full-scale DC, then random) streamed with
// random pauses in in_valid, flushed with zeros; every output is checked bit
// for bit against an integer model of the algorithm and within 8 LSB of the
// floating-point DFT, with bins in bit-reversed order.
// Butterfly side, at the same time: each of the four structures gets random
// operands with random gaps in its in_valid and a twiddle of magnitude <= 1;
// results are checked against floor((A*2^14 + W*B)/2^14) and against the
// latency of that structure (2 clocks for A, 3 for B, C, D). All four see the
// same operands, so their results are also compared with each other.
// Mechanisms counted, each must occur: FFT input pause, full FFT frame,
// commutator/feedback half switch, butterfly input gap, and results from
// each of the four butterfly structures.
module tb_r2_top;
  import bfly_pkg::*;
  import fft_ref_pkg::*;

  localparam int NF = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic              fft_in_valid = 1'b0;
  logic signed [15:0] fft_in_re, fft_in_im;
  logic              fft_out_valid;
  logic signed [23:0] fft_out_re, fft_out_im;
  logic [3:0]        fft_out_bin;
  logic [3:0]        bf_in_valid = '0, bf_out_valid;
  bfly_in_t          bf_in  [4];
  bfly_out_t         bf_out [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  r2_top dut (.*);

  // ---------------- FFT ----------------
  frame_t  xr [NF + 2], xi [NF + 2];
  frame_t  er [NF], ei [NF];
  rframe_t fr [NF], fi [NF];
  int outs = 0, fft_pauses = 0, half_switches = 0;
  logic prev_sel = 1'b0;

  always @(posedge clk) begin
    #1;
    if (fft_out_valid && outs < NF * 16) begin
      automatic int f = outs / 16, q = outs % 16;
      automatic real dr, di;
      checks++;
      if (int'(fft_out_bin) != bitrev4(q) || fft_out_re != 24'(er[f][fft_out_bin]) ||
          fft_out_im != 24'(ei[f][fft_out_bin])) begin
        failures++;
        $display("FAIL fft frame %0d pos %0d bin %0d: got (%0d,%0d) exp (%0d,%0d)", f, q,
                 fft_out_bin, fft_out_re, fft_out_im, er[f][bitrev4(q)], ei[f][bitrev4(q)]);
      end
      dr = real'(fft_out_re) - fr[f][fft_out_bin];
      di = real'(fft_out_im) - fi[f][fft_out_bin];
      checks++;
      if (dr > 8.0 || dr < -8.0 || di > 8.0 || di < -8.0) begin
        failures++;
        $display("FAIL fft frame %0d bin %0d off the DFT by (%f,%f)", f, fft_out_bin, dr, di);
      end
      outs++;
    end
  end

  // SDF stage switching between filling and butterfly halves
  always @(posedge clk) begin
    if (dut.u_fft.sel1 != prev_sel) half_switches++;
    prev_sel <= dut.u_fft.sel1;
  end

  initial begin : fft_driver
    for (int f = 0; f < NF + 2; f++) begin
      for (int n = 0; n < 16; n++) begin
        if (f == 0) begin xr[f][n] = (n == 0) ? 2000 : 0; xi[f][n] = 0; end
        else if (f == 1) begin xr[f][n] = -32768; xi[f][n] = 32767; end
        else if (f >= NF) begin xr[f][n] = 0; xi[f][n] = 0; end
        else begin
          xr[f][n] = longint'($urandom_range(0, 65535)) - longint'(32768);
          xi[f][n] = longint'($urandom_range(0, 65535)) - longint'(32768);
        end
      end
      if (f < NF) begin
        fft16_exact(xr[f], xi[f], er[f], ei[f]);
        dft16(xr[f], xi[f], fr[f], fi[f]);
      end
    end
    fft_in_re = '0; fft_in_im = '0;
    wait (rst_n);
    for (int f = 0; f < NF + 2; f++) begin
      for (int n = 0; n < 16; n++) begin
        @(negedge clk);
        while ($urandom_range(0, 6) == 0) begin
          fft_in_valid = 1'b0;
          fft_pauses++;
          @(negedge clk);
        end
        fft_in_valid = 1'b1;
        fft_in_re = 16'(xr[f][n]);
        fft_in_im = 16'(xi[f][n]);
      end
    end
    @(negedge clk);
    fft_in_valid = 1'b0;
  end

  // ---------------- butterflies ----------------
  typedef struct {
    longint cr, ci, dr, di;
    int     t;
  } bexp_t;

  bexp_t bq [4][$];
  int    bf_done [4] = '{0, 0, 0, 0};
  int    bf_gaps = 0, cycle = 0, agree = 0;
  bit    bf_sent = 1'b0;
  int    lat [4] = '{2, 3, 3, 3};

  function automatic bexp_t bmodel(bfly_in_t o, int t);
    bexp_t e;
    longint xr_, xi_;
    xr_ = longint'(o.b_re) * o.w_re - longint'(o.b_im) * o.w_im;
    xi_ = longint'(o.b_re) * o.w_im + longint'(o.b_im) * o.w_re;
    e.cr = ((longint'(o.a_re) <<< 14) + xr_) >>> 14;
    e.dr = ((longint'(o.a_re) <<< 14) - xr_) >>> 14;
    e.ci = ((longint'(o.a_im) <<< 14) + xi_) >>> 14;
    e.di = ((longint'(o.a_im) <<< 14) - xi_) >>> 14;
    e.t  = t;
    return e;
  endfunction

  always @(posedge clk) begin
    #1;
    cycle++;
    for (int s = 0; s < 4; s++) begin
      if (bf_out_valid[s]) begin
        bexp_t e;
        if (bq[s].size() == 0) begin
          failures++;
          $display("FAIL butterfly %0d: unexpected output", s);
        end else begin
          e = bq[s].pop_front();
          checks++;
          if (bf_out[s].c_re != 18'(e.cr) || bf_out[s].c_im != 18'(e.ci) ||
              bf_out[s].d_re != 18'(e.dr) || bf_out[s].d_im != 18'(e.di) ||
              cycle - e.t != lat[s]) begin
            failures++;
            $display("FAIL butterfly %0d: got C=(%0d,%0d) D=(%0d,%0d) after %0d, exp C=(%0d,%0d) D=(%0d,%0d) after %0d",
                     s, bf_out[s].c_re, bf_out[s].c_im, bf_out[s].d_re, bf_out[s].d_im,
                     cycle - e.t, e.cr, e.ci, e.dr, e.di, lat[s]);
          end
          bf_done[s]++;
        end
      end
    end
    // B, C and D have equal latency and see the same operands
    if (bf_out_valid[1] && bf_out_valid[2] && bf_out_valid[3]) begin
      checks++;
      agree++;
      if (bf_out[1] != bf_out[2] || bf_out[1] != bf_out[3]) begin
        failures++;
        $display("FAIL structures B, C, D disagree");
      end
    end
  end

  initial begin : bfly_driver
    bfly_in_t o;
    logic v;
    for (int s = 0; s < 4; s++) bf_in[s] = '0;
    wait (rst_n);
    for (int n = 0; n < 1000; n++) begin
      @(posedge clk);
      #2;
      v = ($urandom_range(0, 4) != 0);
      if (!v) bf_gaps++;
      o.a_re = 16'($urandom); o.a_im = 16'($urandom);
      o.b_re = 16'($urandom); o.b_im = 16'($urandom);
      o.w_re = 16'(int'($urandom_range(0, 23170)) - 11585);
      o.w_im = 16'(int'($urandom_range(0, 23170)) - 11585);
      for (int s = 0; s < 4; s++) begin
        bf_in[s] = o;
        bf_in_valid[s] = v;
        if (v) bq[s].push_back(bmodel(o, cycle));
      end
    end
    @(posedge clk);
    #2 bf_in_valid = '0;
    bf_sent = 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    wait (outs == NF * 16 && bf_sent);
    repeat (10) @(posedge clk);
    #2;
    checks++;
    if (fft_pauses == 0) begin failures++; $display("FAIL no FFT input pause"); end
    checks++;
    if (half_switches == 0) begin failures++; $display("FAIL SDF stage never switched"); end
    checks++;
    if (bf_gaps == 0) begin failures++; $display("FAIL no butterfly input gap"); end
    checks++;
    if (agree == 0) begin failures++; $display("FAIL B/C/D never compared"); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (bf_done[s] == 0 || bq[s].size() != 0) begin
        failures++;
        $display("FAIL butterfly %0d: %0d results, %0d pending", s, bf_done[s], bq[s].size());
      end
    end
    $display("fft frames=%0d outputs=%0d pauses=%0d half-switches=%0d", NF, outs, fft_pauses, half_switches);
    $display("butterfly results A=%0d B=%0d C=%0d D=%0d gaps=%0d agree=%0d",
             bf_done[0], bf_done[1], bf_done[2], bf_done[3], bf_gaps, agree);
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
