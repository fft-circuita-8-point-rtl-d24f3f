// fft_circuitA: 8-point complex FFT as one combinational circuit.
//
// Eight complex samples s[0..7] enter in parallel and the eight DFT bins
//   G[k] = sum_n s[n] * exp(-j*2*pi*n*k/8)
// leave in parallel, with no clock and no register: the outputs settle a
// propagation delay after the inputs change. The transform is the radix-2
// decimation-in-frequency flow graph with three stages (fft_stage1..3); the
// last stage delivers the bins in bit-reversed order and the output wiring
// here puts them back in natural order (G[1] = s3[4], G[3] = s3[6], ...).
//
// Number format: each real and imaginary part is 16-bit two's complement
// with 9 fraction bits (value = code / 512). The transform is unscaled, so
// G[0] is the plain sum of the inputs and every output can grow by up to 8x
// in magnitude; sums wrap in 16 bits and the +/-0.7071 twiddle products are
// truncated. Keep |re| + |im| of the inputs below about 8 so that no
// intermediate wraps (the range of the 16-bit word is -64 .. +64).
//
// The flow graph, the formats, the twiddle constant and the output order are
// those of the original design. Its ports were 32 separate 16-bit vectors
// s_re0..s_im7 and G_re0..G_im7; here they are grouped into arrays with the
// same names and index meaning.
module fft_circuitA
  import fft_pkg::*;
(
  input  logic signed [DATA_W-1:0] s_re [N],  // input samples, real parts
  input  logic signed [DATA_W-1:0] s_im [N],  // input samples, imaginary parts
  output logic signed [DATA_W-1:0] G_re [N],  // DFT bins, real parts
  output logic signed [DATA_W-1:0] G_im [N]   // DFT bins, imaginary parts
);

  cplx_t s [N];
  cplx_t s1 [N];
  cplx_t s2 [N];
  cplx_t s3 [N];

  for (genvar n = 0; n < N; n++) begin : g_in
    assign s[n].re = s_re[n];
    assign s[n].im = s_im[n];
  end

  fft_stage1 u_stage1 (.x(s),  .y(s1));
  fft_stage2 u_stage2 (.x(s1), .y(s2));
  fft_stage3 u_stage3 (.x(s2), .y(s3));

  // Reorder: bin k comes from stage-3 position bitrev3(k).
  function automatic int bitrev3(int k);
    return ((k & 1) << 2) | (k & 2) | ((k >> 2) & 1);
  endfunction

  for (genvar k = 0; k < N; k++) begin : g_out
    assign G_re[k] = s3[bitrev3(k)].re;
    assign G_im[k] = s3[bitrev3(k)].im;
  end

endmodule
