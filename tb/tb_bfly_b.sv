// Test of the radix-2 DIT butterfly, structure B, at both pipeline depths
// (the default, PIPES = 2, and PIPES = 1). Operands are random 16-bit A and
// B and a twiddle W of magnitude at most 1 (random within the unit square
// |Wr|,|Wi| <= 11585, plus the exact factors 1, -1, j, -j), with in_valid
// toggled at random. The reference is floor((A*2^14 + W*B) / 2^14) computed
// in 64-bit integers when the operands enter; each result must leave exactly
// PIPES + 1 clocks later with out_valid.
module tb_bfly_b;
  localparam int DW = 16, OW = 18, FRAC = 14;
  localparam int P0 = 2, P1 = 1;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [DW-1:0] a_re, a_im, b_re, b_im, w_re, w_im;
  logic                 v0, v1;
  logic signed [OW-1:0] c_re0, c_im0, d_re0, d_im0, c_re1, c_im1, d_re1, d_im1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bfly_b dut0 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
    .out_valid(v0), .c_re(c_re0), .c_im(c_im0), .d_re(d_re0), .d_im(d_im0));

  bfly_b #(.PIPES(P1)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
    .out_valid(v1), .c_re(c_re1), .c_im(c_im1), .d_re(d_re1), .d_im(d_im1));

  typedef struct {
    longint cr, ci, dr, di;
    int     t;     // cycle the operands entered
  } exp_t;

  exp_t q0[$], q1[$];
  int   cycle = 0;

  function automatic exp_t model(longint ar, longint ai, longint br, longint bi,
                                 longint wr, longint wi, int t);
    exp_t e;
    longint xr, xi;
    xr = br * wr - bi * wi;
    xi = br * wi + bi * wr;
    e.cr = ((ar <<< FRAC) + xr) >>> FRAC;
    e.dr = ((ar <<< FRAC) - xr) >>> FRAC;
    e.ci = ((ai <<< FRAC) + xi) >>> FRAC;
    e.di = ((ai <<< FRAC) - xi) >>> FRAC;
    e.t  = t;
    return e;
  endfunction

  task automatic compare(string tag, int lat, exp_t e, logic signed [OW-1:0] cr,
                         logic signed [OW-1:0] ci, logic signed [OW-1:0] dr,
                         logic signed [OW-1:0] di);
    checks++;
    if (cr != OW'(e.cr) || ci != OW'(e.ci) || dr != OW'(e.dr) || di != OW'(e.di)) begin
      failures++;
      $display("FAIL %s: got C=(%0d,%0d) D=(%0d,%0d) exp C=(%0d,%0d) D=(%0d,%0d)",
               tag, cr, ci, dr, di, e.cr, e.ci, e.dr, e.di);
    end
    checks++;
    if (cycle - e.t != lat) begin
      failures++;
      $display("FAIL %s: latency %0d, expected %0d", tag, cycle - e.t, lat);
    end
  endtask

  // outputs are sampled, and new operands applied, just after each rising edge
  always @(posedge clk) begin
    #1;
    cycle++;
    if (v0) begin
      if (q0.size() == 0) begin failures++; $display("FAIL dut0: unexpected output"); end
      else compare("P0", P0 + 1, q0.pop_front(), c_re0, c_im0, d_re0, d_im0);
    end
    if (v1) begin
      if (q1.size() == 0) begin failures++; $display("FAIL dut1: unexpected output"); end
      else compare("P1", P1 + 1, q1.pop_front(), c_re1, c_im1, d_re1, d_im1);
    end
  end

  initial begin
    int n;
    {a_re, a_im, b_re, b_im, w_re, w_im} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (n = 0; n < 3000; n++) begin
      @(posedge clk);
      #2;
      in_valid = ($urandom_range(0, 3) != 0);
      a_re = DW'($urandom); a_im = DW'($urandom);
      b_re = DW'($urandom); b_im = DW'($urandom);
      case ($urandom_range(0, 7))
        0: begin w_re = 16'sd16384;  w_im = 16'sd0;      end
        1: begin w_re = -16'sd16384; w_im = 16'sd0;      end
        2: begin w_re = 16'sd0;      w_im = 16'sd16384;  end
        3: begin w_re = 16'sd0;      w_im = -16'sd16384; end
        default: begin
          w_re = DW'(int'($urandom_range(0, 23170)) - 11585);
          w_im = DW'(int'($urandom_range(0, 23170)) - 11585);
        end
      endcase
      if (n < 4) begin   // extreme operands
        a_re = -16'sd32768; a_im = 16'sd32767; b_re = -16'sd32768; b_im = -16'sd32768;
      end
      if (in_valid) begin
        q0.push_back(model(longint'(a_re), longint'(a_im), longint'(b_re), longint'(b_im),
                             longint'(w_re), longint'(w_im), cycle));
        q1.push_back(model(longint'(a_re), longint'(a_im), longint'(b_re), longint'(b_im),
                             longint'(w_re), longint'(w_im), cycle));
      end
    end
    @(posedge clk);
    #2 in_valid = 1'b0;
    repeat (6) @(posedge clk);
    #2;
    if (q0.size() != 0 || q1.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d / %0d", q0.size(), q1.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
