// fft_stage2: second decimation-in-frequency stage of the 8-point FFT.
//
// The eight outputs of stage 1 form two independent 4-point groups,
// indices 0..3 and 4..7. In each group with base g (0 or 4):
//   y[g+0] = x[g+0] + x[g+2]
//   y[g+1] = x[g+1] + x[g+3]
//   y[g+2] =  x[g+0] - x[g+2]           (* W4^0 = 1)
//   y[g+3] = (x[g+1] - x[g+3]) * (-j)   (* W4^1 = W8^2 = -j)
// The -j rotation is a swap of real and imaginary parts with one negation,
// so this stage has adders only. All sums are 16 bits and wrap.
//
// Interface: x[0..7] from stage 1, y[0..7] to stage 3. Purely
// combinational, following the design's STAGE2 section.
module fft_stage2
  import fft_pkg::*;
(
  input  cplx_t x [N],
  output cplx_t y [N]
);

  for (genvar g = 0; g < N; g += 4) begin : g_grp
    assign y[g+0] = cadd(x[g+0], x[g+2]);
    assign y[g+1] = cadd(x[g+1], x[g+3]);
    assign y[g+2] = csub(x[g+0], x[g+2]);
    assign y[g+3] = csub_mj(x[g+1], x[g+3]);
  end

endmodule
