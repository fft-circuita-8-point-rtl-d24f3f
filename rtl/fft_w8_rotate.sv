// fft_w8_rotate: multiply the difference of two complex samples by the
// constant twiddle W8^K, K = 1 or 3, in fixed point.
//
// The block computes y = (a - b) * W8^K, where W8 = exp(-j*2*pi/8). The
// differences t = a - b are formed first in 16 bits (wrapping). The twiddle
// parts are +/-0.7071, held as the 10-bit constant +/-362 (9 fraction bits),
// so each product is 26 bits wide with 18 fraction bits. The result keeps
// product bits [24:9]: the 9 extra fraction bits are truncated (rounding
// toward minus infinity) and the top bit is dropped, so the 16-bit result
// wraps like every other sum in the design.
//
//   K = 1 (W8^1 = c - jc, c = 0.7071): four multipliers,
//         re = c*t_re - (-c)*t_im,  im = (-c)*t_re + c*t_im.
//   K = 3 (W8^3 = -c - jc): the two terms share a factor, so two
//         multipliers suffice, re = -c*(t_re - t_im), im = -c*(t_re + t_im),
//         with the inner sum formed in 16 bits.
//
// Both forms, the constant, the product width and the bit slice follow the
// original design; a parameter selecting between them is this
// implementation's packaging. Purely combinational: no clock, no latency.
module fft_w8_rotate
  import fft_pkg::*;
#(
  parameter int K = 1   // twiddle exponent, 1 or 3
) (
  input  cplx_t a,   // minuend
  input  cplx_t b,   // subtrahend
  output cplx_t y    // (a - b) * W8^K
);

  localparam int PROD_W = DATA_W + TW_W;   // 26-bit products

  localparam logic signed [TW_W-1:0] W_POS = TW_W'(TW_C707);   // +0.7071
  localparam logic signed [TW_W-1:0] W_NEG = TW_W'(-TW_C707);  // -0.7071

  initial begin
    assert (K == 1 || K == 3)
      else $error("fft_w8_rotate: K must be 1 or 3, got %0d", K);
  end

  logic signed [PROD_W-1:0] p_re, p_im;

  if (K == 1) begin : g_w1
    sample_t t_re, t_im;
    always_comb begin
      t_re = a.re - b.re;
      t_im = a.im - b.im;
      p_re = (PROD_W'(W_POS) * PROD_W'(t_re)) - (PROD_W'(W_NEG) * PROD_W'(t_im));
      p_im = (PROD_W'(W_NEG) * PROD_W'(t_re)) + (PROD_W'(W_POS) * PROD_W'(t_im));
    end
  end else begin : g_w3
    sample_t d_re, d_im;
    always_comb begin
      d_re = a.re - b.re - a.im + b.im;   // t_re - t_im
      d_im = a.re - b.re + a.im - b.im;   // t_re + t_im
      p_re = PROD_W'(W_NEG) * PROD_W'(d_re);
      p_im = PROD_W'(W_NEG) * PROD_W'(d_im);
    end
  end

  assign y.re = p_re[DATA_W+TW_FRAC-1:TW_FRAC];
  assign y.im = p_im[DATA_W+TW_FRAC-1:TW_FRAC];

endmodule
