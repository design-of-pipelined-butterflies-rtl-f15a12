// Shift-register delay line of DEPTH words of WIDTH bits (the "nD" boxes of
// the FFT pipeline). On every clock with en high the word at d enters and
// every stored word moves one place on; q is the word that entered DEPTH
// enabled clocks earlier. The storage is not reset: the FFT stages only use
// what has been written. A register chain, as the design's delay boxes; the
// enable is this implementation's addition for pausing the pipeline.
module delay_line #(
  parameter int unsigned WIDTH = 48,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      mem[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) mem[i] <= mem[i-1];
    end
  end

  assign q = mem[DEPTH-1];
endmodule
