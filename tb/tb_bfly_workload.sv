// Workload test: 10,000 random operand vectors streamed, one per clock,
// through all eight butterfly configurations (structures A, B, C and D, each
// with one and with two pipeline levels), the vector count used for the
// switching-activity figures of this design. Every result is checked against
// floor((A*2^14 + W*B)/2^14) and against the configuration's latency
// (PIPES + 1 clocks). W is random with |Wr|, |Wi| <= 11585, so |W| <= 1.
module tb_bfly_workload;
  localparam int NV = 10000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] a_re, a_im, b_re, b_im, w_re, w_im;
  logic        [7:0]  ov;
  logic signed [17:0] cr [8], ci [8], dr [8], di [8];
  int checks = 0, failures = 0, cycle = 0, done [8];

  always #5 clk = ~clk;

  for (genvar p = 1; p <= 2; p++) begin : g_pipes
    bfly_a #(.PIPES(p)) ua (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
      .out_valid(ov[4*(p-1)+0]), .c_re(cr[4*(p-1)+0]), .c_im(ci[4*(p-1)+0]),
      .d_re(dr[4*(p-1)+0]), .d_im(di[4*(p-1)+0]));
    bfly_b #(.PIPES(p)) ub (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
      .out_valid(ov[4*(p-1)+1]), .c_re(cr[4*(p-1)+1]), .c_im(ci[4*(p-1)+1]),
      .d_re(dr[4*(p-1)+1]), .d_im(di[4*(p-1)+1]));
    bfly_c #(.PIPES(p)) uc (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
      .out_valid(ov[4*(p-1)+2]), .c_re(cr[4*(p-1)+2]), .c_im(ci[4*(p-1)+2]),
      .d_re(dr[4*(p-1)+2]), .d_im(di[4*(p-1)+2]));
    bfly_d #(.PIPES(p)) ud (.clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im), .w_re(w_re), .w_im(w_im),
      .out_valid(ov[4*(p-1)+3]), .c_re(cr[4*(p-1)+3]), .c_im(ci[4*(p-1)+3]),
      .d_re(dr[4*(p-1)+3]), .d_im(di[4*(p-1)+3]));
  end

  typedef struct { longint cr, ci, dr, di; int t; } e_t;
  e_t q [8][$];

  always @(posedge clk) begin
    #1;
    cycle++;
    for (int u = 0; u < 8; u++) begin
      if (ov[u]) begin
        e_t e;
        if (q[u].size() == 0) begin
          failures++;
          $display("FAIL config %0d: unexpected output", u);
        end else begin
          e = q[u].pop_front();
          checks++;
          done[u]++;
          if (cr[u] != 18'(e.cr) || ci[u] != 18'(e.ci) || dr[u] != 18'(e.dr) ||
              di[u] != 18'(e.di) || cycle - e.t != u / 4 + 2) begin
            failures++;
            $display("FAIL config %0d (structure %c, PIPES %0d)", u, 8'("A") + 8'(u % 4), u / 4 + 1);
          end
        end
      end
    end
  end

  initial begin
    longint xr, xi;
    e_t e;
    for (int u = 0; u < 8; u++) done[u] = 0;
    {a_re, a_im, b_re, b_im, w_re, w_im} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NV; n++) begin
      @(posedge clk);
      #2;
      in_valid = 1'b1;
      a_re = 16'($urandom); a_im = 16'($urandom);
      b_re = 16'($urandom); b_im = 16'($urandom);
      w_re = 16'(int'($urandom_range(0, 23170)) - 11585);
      w_im = 16'(int'($urandom_range(0, 23170)) - 11585);
      xr = longint'(b_re) * w_re - longint'(b_im) * w_im;
      xi = longint'(b_re) * w_im + longint'(b_im) * w_re;
      e.cr = ((longint'(a_re) <<< 14) + xr) >>> 14;
      e.dr = ((longint'(a_re) <<< 14) - xr) >>> 14;
      e.ci = ((longint'(a_im) <<< 14) + xi) >>> 14;
      e.di = ((longint'(a_im) <<< 14) - xi) >>> 14;
      e.t  = cycle;
      for (int u = 0; u < 8; u++) q[u].push_back(e);
    end
    @(posedge clk);
    #2 in_valid = 1'b0;
    repeat (6) @(posedge clk);
    #2;
    for (int u = 0; u < 8; u++) begin
      checks++;
      if (done[u] != NV) begin
        failures++;
        $display("FAIL config %0d: %0d results of %0d", u, done[u], NV);
      end
    end
    $display("vectors=%0d per configuration", NV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NV + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
