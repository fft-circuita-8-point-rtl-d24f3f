// fft_stage1: first decimation-in-frequency stage of the 8-point FFT.
//
// For k = 0..3 it forms the butterfly pair
//   s1[k]   = s[k] + s[k+4]
//   s1[k+4] = (s[k] - s[k+4]) * W8^k,   W8 = exp(-j*2*pi/8).
// W8^0 = 1 needs nothing, W8^2 = -j is a swap of real and imaginary parts
// with one negation, and W8^1, W8^3 go through the fixed-point constant
// multiplier fft_w8_rotate (six real multipliers in all). Sums and
// differences are 16 bits and wrap on overflow.
//
// Interface: x[0..7] in natural order in, y[0..7] out, indices as above.
// Purely combinational, as in the original design; the grouping into a
// module of its own follows the design's STAGE1 section.
module fft_stage1
  import fft_pkg::*;
(
  input  cplx_t x [N],
  output cplx_t y [N]
);

  // Sums of the four butterflies.
  for (genvar k = 0; k < 4; k++) begin : g_sum
    assign y[k] = cadd(x[k], x[k+4]);
  end

  // Rotated differences.
  assign y[4] = csub(x[0], x[4]);                         // * W8^0
  fft_w8_rotate #(.K(1)) u_w1 (.a(x[1]), .b(x[5]), .y(y[5]));  // * W8^1
  assign y[6] = csub_mj(x[2], x[6]);                      // * W8^2 = -j
  fft_w8_rotate #(.K(3)) u_w3 (.a(x[3]), .b(x[7]), .y(y[7]));  // * W8^3

endmodule
