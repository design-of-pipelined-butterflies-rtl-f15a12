// Twiddle-factor multiplier placed between two FFT stages.
// Multiplies the complex W-bit sample x by W16^k, read from the twiddle table
// of fft_pkg (16-bit words, 14 fraction bits), with a bit-parallel complex
// multiplier of four real products:
//   y_re = round((x_re*c_re - x_im*c_im) / 2^14)
//   y_im = round((x_re*c_im + x_im*c_re) / 2^14)
// rounding half up (add 2^13, shift right arithmetically). With k = 0 the
// factor is exactly 1 and y = x, so samples that need no rotation simply
// pass with k = 0. The result is registered on en: latency one enabled clock.
// A parallel multiplier between stages follows the design; twiddle word
// length, rounding and the register are this implementation's choices.
module twiddle_mult #(
  parameter int unsigned W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [2:0]          k,
  input  logic signed [W-1:0] x_re, x_im,
  output logic signed [W-1:0] y_re, y_im
);
  import fft_pkg::*;

  localparam int unsigned PW = W + TW_W + 1;

  tw_t                  c_re, c_im;
  logic signed [PW-1:0] p_re, p_im;

  always_comb begin
    c_re = tw_re(k);
    c_im = tw_im(k);
    p_re = PW'(x_re * c_re) - PW'(x_im * c_im) + PW'(1 <<< (TW_FRAC - 1));
    p_im = PW'(x_re * c_im) + PW'(x_im * c_re) + PW'(1 <<< (TW_FRAC - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_re <= '0;
      y_im <= '0;
    end else if (en) begin
      y_re <= W'(p_re >>> TW_FRAC);
      y_im <= W'(p_im >>> TW_FRAC);
    end
  end
endmodule
