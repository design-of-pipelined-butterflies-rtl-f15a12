// Reference models for the 16-point FFT testbenches.
//  fft16_exact: the same radix-2 decimation-in-frequency algorithm as the
//    hardware, in 64-bit integers: stage delays 8, 4, 2, 1, differences
//    rotated by W16^(j*8/D) with twiddles round(2^14*cos), round(-2^14*sin)
//    recomputed here, products rounded half up after a 14-bit shift. It
//    returns the result indexed by frequency bin.
//  dft16: the textbook DFT in floating point, to bound the fixed-point error.
package fft_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  typedef longint frame_t [16];
  typedef real    rframe_t [16];

  function automatic longint rnd(real v);
    return (v >= 0.0) ? longint'($floor(v + 0.5)) : -longint'($floor(-v + 0.5));
  endfunction

  function automatic int bitrev4(int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  function automatic void fft16_exact(input frame_t xr, input frame_t xi,
                                      output frame_t yr, output frame_t yi);
    longint vr [16], vi [16];
    longint ar, ai, br, bi, dr, di, cr, ci;
    int d, k;
    for (int n = 0; n < 16; n++) begin vr[n] = xr[n]; vi[n] = xi[n]; end
    d = 8;
    while (d >= 1) begin
      for (int b = 0; b < 16; b += 2 * d) begin
        for (int j = 0; j < d; j++) begin
          ar = vr[b + j];     ai = vi[b + j];
          br = vr[b + j + d]; bi = vi[b + j + d];
          vr[b + j] = ar + br;
          vi[b + j] = ai + bi;
          dr = ar - br;
          di = ai - bi;
          if (d > 1) begin
            k  = j * (8 / d);
            cr = rnd(16384.0 * $cos(2.0 * PI * real'(k) / 16.0));
            ci = rnd(-16384.0 * $sin(2.0 * PI * real'(k) / 16.0));
            vr[b + j + d] = (dr * cr - di * ci + 8192) >>> 14;
            vi[b + j + d] = (dr * ci + di * cr + 8192) >>> 14;
          end else begin
            vr[b + j + d] = dr;
            vi[b + j + d] = di;
          end
        end
      end
      d = d / 2;
    end
    // position q holds bin bitrev(q)
    for (int q = 0; q < 16; q++) begin
      yr[bitrev4(q)] = vr[q];
      yi[bitrev4(q)] = vi[q];
    end
  endfunction

  function automatic void dft16(input frame_t xr, input frame_t xi,
                                output rframe_t yr, output rframe_t yi);
    real ang;
    for (int kk = 0; kk < 16; kk++) begin
      yr[kk] = 0.0;
      yi[kk] = 0.0;
      for (int n = 0; n < 16; n++) begin
        ang = -2.0 * PI * real'(n * kk) / 16.0;
        yr[kk] += real'(xr[n]) * $cos(ang) - real'(xi[n]) * $sin(ang);
        yi[kk] += real'(xr[n]) * $sin(ang) + real'(xi[n]) * $cos(ang);
      end
    end
  endfunction
endpackage
