// fft_stage3: last decimation-in-frequency stage of the 8-point FFT.
//
// Four 2-point butterflies on neighbouring pairs, with no twiddle factor:
//   y[2m]   = x[2m] + x[2m+1]
//   y[2m+1] = x[2m] - x[2m+1],   m = 0..3.
// The outputs are the FFT bins in bit-reversed order; the top level
// restores natural order. All sums are 16 bits and wrap.
//
// Interface: x[0..7] from stage 2, y[0..7] in bit-reversed bin order.
// Purely combinational, following the design's STAGE3 section.
module fft_stage3
  import fft_pkg::*;
(
  input  cplx_t x [N],
  output cplx_t y [N]
);

  for (genvar m = 0; m < N/2; m++) begin : g_bfly
    assign y[2*m]   = cadd(x[2*m], x[2*m+1]);
    assign y[2*m+1] = csub(x[2*m], x[2*m+1]);
  end

endmodule
