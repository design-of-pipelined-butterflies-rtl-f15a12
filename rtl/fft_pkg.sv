// Constants and helper functions shared by the 16-point pipelined FFT.
// The twiddle factors are W16^k = exp(-j*2*pi*k/16) = cos(2*pi*k/16) -
// j*sin(2*pi*k/16) for k = 0..7, stored as 16-bit signed numbers with
// TW_FRAC = 14 fraction bits (value = round(2^14 * cos) and
// round(-2^14 * sin)); 1.0 is 16384 and is exact.
// The word length and fraction bits are this implementation's choice.
package fft_pkg;
  localparam int unsigned N       = 16;   // transform length
  localparam int unsigned LOGN    = 4;
  localparam int unsigned TW_W    = 16;   // twiddle word width
  localparam int unsigned TW_FRAC = 14;   // twiddle fraction bits

  typedef logic signed [TW_W-1:0] tw_t;

  // real part of W16^k, k = 0..7
  function automatic tw_t tw_re(input logic [2:0] k);
    case (k)
      3'd0: tw_re = 16'sd16384;
      3'd1: tw_re = 16'sd15137;
      3'd2: tw_re = 16'sd11585;
      3'd3: tw_re = 16'sd6270;
      3'd4: tw_re = 16'sd0;
      3'd5: tw_re = -16'sd6270;
      3'd6: tw_re = -16'sd11585;
      default: tw_re = -16'sd15137;
    endcase
  endfunction

  // imaginary part of W16^k, k = 0..7 (= -sin)
  function automatic tw_t tw_im(input logic [2:0] k);
    case (k)
      3'd0: tw_im = 16'sd0;
      3'd1: tw_im = -16'sd6270;
      3'd2: tw_im = -16'sd11585;
      3'd3: tw_im = -16'sd15137;
      3'd4: tw_im = -16'sd16384;
      3'd5: tw_im = -16'sd15137;
      3'd6: tw_im = -16'sd11585;
      default: tw_im = -16'sd6270;
    endcase
  endfunction

  // 4-bit bit reversal: output position -> frequency bin
  function automatic logic [LOGN-1:0] bitrev4(input logic [LOGN-1:0] v);
    for (int i = 0; i < int'(LOGN); i++) bitrev4[i] = v[LOGN-1-i];
  endfunction
endpackage
