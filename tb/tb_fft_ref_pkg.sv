// tb_fft_ref_pkg: reference models for the FFT testbenches.
//
// Two independent references are provided. fft_ref_* re-computes the
// circuit's arithmetic on plain integers: 16-bit wrap of every sum, products
// with the 10-bit constant 362 (0.7071 with 9 fraction bits) and a floor
// division by 512 of each product, wrapped to 16 bits. dft_real computes the
// textbook DFT in floating point, to check that the circuit is an FFT at all
// and to bound its rounding error. All values are integer codes of the
// 16-bit, 9-fraction-bit format (code / 512 is the number).
package tb_fft_ref_pkg;

  typedef longint arr8_t [8];

  localparam longint C707 = 362;

  function automatic longint wrap16(longint v);
    longint r;
    r = v & 64'hFFFF;
    if (r >= 32768) r -= 65536;
    return r;
  endfunction

  // floor(p / 512), then wrapped to 16 bits.
  function automatic longint trunc9(longint p);
    longint q;
    q = p / 512;
    if ((p % 512) != 0 && p < 0) q -= 1;
    return wrap16(q);
  endfunction

  // Set when any reference sum or product slice left the 16-bit range, or a
  // truncation dropped non-zero bits; cleared by the caller.
  bit wrapped;
  bit truncated;

  function automatic longint w(longint v);
    if (v > 32767 || v < -32768) wrapped = 1;
    return wrap16(v);
  endfunction

  function automatic longint tr(longint p);
    if ((p % 512) != 0) truncated = 1;
    if ((p / 512) > 32767 || (p / 512) < -32768) wrapped = 1;
    return trunc9(p);
  endfunction

  // Stage 1: pairs (k, k+4), differences times W8^k.
  function automatic void ref_stage1(input arr8_t xr, input arr8_t xi,
                                     output arr8_t yr, output arr8_t yi);
    longint tr_, ti_, dr, di;
    for (int k = 0; k < 4; k++) begin
      yr[k] = w(xr[k] + xr[k+4]);
      yi[k] = w(xi[k] + xi[k+4]);
    end
    yr[4] = w(xr[0] - xr[4]);
    yi[4] = w(xi[0] - xi[4]);
    // W8^1 = c - jc
    tr_ = w(xr[1] - xr[5]);
    ti_ = w(xi[1] - xi[5]);
    yr[5] = tr(C707 * tr_ + C707 * ti_);
    yi[5] = tr(-C707 * tr_ + C707 * ti_);
    // W8^2 = -j
    yr[6] = w(xi[2] - xi[6]);
    yi[6] = w(xr[6] - xr[2]);
    // W8^3 = -c - jc, inner sums in 16 bits
    dr = w(w(w(xr[3] - xr[7]) - xi[3]) + xi[7]);
    di = w(w(w(xr[3] - xr[7]) + xi[3]) - xi[7]);
    yr[7] = tr(-C707 * dr);
    yi[7] = tr(-C707 * di);
  endfunction

  // Stage 2: two groups of four, odd differences times -j.
  function automatic void ref_stage2(input arr8_t xr, input arr8_t xi,
                                     output arr8_t yr, output arr8_t yi);
    for (int g = 0; g < 8; g += 4) begin
      yr[g]   = w(xr[g] + xr[g+2]);    yi[g]   = w(xi[g] + xi[g+2]);
      yr[g+1] = w(xr[g+1] + xr[g+3]);  yi[g+1] = w(xi[g+1] + xi[g+3]);
      yr[g+2] = w(xr[g] - xr[g+2]);    yi[g+2] = w(xi[g] - xi[g+2]);
      yr[g+3] = w(xi[g+1] - xi[g+3]);  yi[g+3] = w(xr[g+3] - xr[g+1]);
    end
  endfunction

  // Stage 3: neighbouring pairs.
  function automatic void ref_stage3(input arr8_t xr, input arr8_t xi,
                                     output arr8_t yr, output arr8_t yi);
    for (int m = 0; m < 4; m++) begin
      yr[2*m]   = w(xr[2*m] + xr[2*m+1]);  yi[2*m]   = w(xi[2*m] + xi[2*m+1]);
      yr[2*m+1] = w(xr[2*m] - xr[2*m+1]);  yi[2*m+1] = w(xi[2*m] - xi[2*m+1]);
    end
  endfunction

  // Whole circuit, outputs in natural bin order.
  function automatic void ref_fft(input arr8_t xr, input arr8_t xi,
                                  output arr8_t gr, output arr8_t gi);
    arr8_t ar, ai, br, bi, cr, ci;
    int rev [8] = '{0, 4, 2, 6, 1, 5, 3, 7};
    ref_stage1(xr, xi, ar, ai);
    ref_stage2(ar, ai, br, bi);
    ref_stage3(br, bi, cr, ci);
    for (int k = 0; k < 8; k++) begin
      gr[k] = cr[rev[k]];
      gi[k] = ci[rev[k]];
    end
  endfunction

  // Floating-point DFT of the codes, result in codes.
  function automatic void dft_real(input arr8_t xr, input arr8_t xi,
                                   output real gr [8], output real gi [8]);
    real pi, a;
    pi = 3.14159265358979323846;
    for (int k = 0; k < 8; k++) begin
      gr[k] = 0.0;
      gi[k] = 0.0;
      for (int n = 0; n < 8; n++) begin
        a = -2.0 * pi * real'(n * k) / 8.0;
        gr[k] += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        gi[k] += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
    end
  endfunction

endpackage
