// fft_pkg: number format and shared types of the 8-point FFT.
//
// Every sample is a complex number whose real and imaginary parts are 16-bit
// two's-complement fixed-point values with 9 fraction bits, so an integer
// code c stands for c / 512 (1.0 is 16'h0200). All additions and
// subtractions keep 16 bits and wrap on overflow; there is no saturation
// and no scaling between stages. The twiddle factor 0.7071 is held as a
// 10-bit signed constant with 9 fraction bits (362 / 512).
//
// The 16-bit width, the 9 fraction bits and the 10-bit twiddle with the
// value 362 are those of the original design; the struct and the helper
// functions are this implementation's own packaging.
package fft_pkg;

  parameter int N      = 8;   // transform length
  parameter int DATA_W = 16;  // width of each real / imaginary part
  parameter int FRAC_W = 9;   // fraction bits of the data words
  parameter int TW_W   = 10;  // width of the twiddle constant
  parameter int TW_FRAC = 9;  // fraction bits of the twiddle constant

  // 0.7071 (= cos(pi/4)) in TW_W-bit signed with TW_FRAC fraction bits: 362.
  parameter int TW_C707 = int'(0.7071067811865476 * real'(1 << TW_FRAC));

  typedef logic signed [DATA_W-1:0] sample_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Wrapping complex sum and difference of a radix-2 butterfly.
  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // (a - b) * (-j): real part a.im - b.im, imaginary part b.re - a.re.
  // Multiplying by W8^2 = W4^1 = -j needs no multiplier.
  function automatic cplx_t csub_mj(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.im - b.im;
    r.im = b.re - a.re;
    return r;
  endfunction

endpackage
