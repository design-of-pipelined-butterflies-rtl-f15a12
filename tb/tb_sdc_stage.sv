// Test of the single-path delay commutator (SDC) butterfly stage with delays D = 4 (default) and
// D = 1. A random complex stream (20-bit values in 24-bit words) enters
// with in_valid (the stage enable) held low about one clock in five; sel is
// bit log2(D) of the count of accepted samples. After the enabled clock that
// takes sample n, the output register must hold element n - D of the
// expected stream, which per block of 2D inputs is D sums x[j] + x[j+D]
// followed by D differences x[j] - x[j+D].
module tb_sdc_stage;
  localparam int W = 24;
  localparam int NS = 2000;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [W-1:0] x_re, x_im, y0_re, y0_im, y1_re, y1_im;
  logic [15:0] n_acc = '0;     // samples accepted so far
  logic sel0, sel1;
  int checks = 0, failures = 0;
  longint xr [NS], xi [NS];

  always #5 clk = ~clk;

  assign sel0 = n_acc[$clog2(4)];
  assign sel1 = n_acc[$clog2(1)];

  sdc_stage dut0 (.clk(clk), .rst_n(rst_n), .en(en), .sel(sel0),
            .x_re(x_re), .x_im(x_im), .y_re(y0_re), .y_im(y0_im));
  sdc_stage #(.W(W), .D(1)) dut1 (.clk(clk), .rst_n(rst_n), .en(en), .sel(sel1),
            .x_re(x_re), .x_im(x_im), .y_re(y1_re), .y_im(y1_im));

  function automatic void expect_at(int e, int d, output longint er, output longint ei);
    int b, q;
    b = (e / (2 * d)) * 2 * d;
    q = e % (2 * d);
    if (q < d) begin
      er = xr[b + q] + xr[b + q + d];
      ei = xi[b + q] + xi[b + q + d];
    end else begin
      er = xr[b + q - d] - xr[b + q];
      ei = xi[b + q - d] - xi[b + q];
    end
  endfunction

  task automatic check(string tag, int d, int n, logic signed [W-1:0] gr,
                       logic signed [W-1:0] gi);
    longint er, ei;
    if (n - d < 0) return;
    expect_at(n - d, d, er, ei);
    checks++;
    if (gr != W'(er) || gi != W'(ei)) begin
      failures++;
      $display("FAIL %s sample %0d: got (%0d,%0d) exp (%0d,%0d)", tag, n - d, gr, gi, er, ei);
    end
  endtask

  initial begin
    for (int i = 0; i < NS; i++) begin
      xr[i] = longint'($urandom_range(0, 2 ** 20 - 1)) - longint'(2 ** 19);
      xi[i] = longint'($urandom_range(0, 2 ** 20 - 1)) - longint'(2 ** 19);
    end
    x_re = '0; x_im = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (int'(n_acc) < NS - 1) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      x_re = W'(xr[int'(n_acc)]);
      x_im = W'(xi[int'(n_acc)]);
      @(posedge clk);
      #1;
      if (en) begin
        check("D0", 4, int'(n_acc), y0_re, y0_im);
        check("D1", 1, int'(n_acc), y1_re, y1_im);
        n_acc = n_acc + 16'd1;
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
