// tb_fft_circuitA: end-to-end test of the combinational 8-point FFT.
//
// The circuit is used at its default sizes. Test sequence:
//   1. The ramp 1, 2, ..., 8 (codes 512 .. 4096, imaginary parts zero).
//      The outputs must equal the known result of that transform in this
//      number format: G0 = 36, G4 = -4, G2/G6 = -4 +/- 4j,
//      G1/G7 = -4 +/- 9.65625j, G3/G5 = -4 +/- 1.65625j.
//   2. Unit impulses at each input and single complex tones exp(j*2*pi*k*n/8)
//      for each k: a tone must land in bin k alone, which checks the
//      bit-reversed-to-natural output order.
//   3. Random vectors, small ones (no wrap possible) and full-range ones.
// Every output is compared bit for bit with an integer model of the
// arithmetic, and for in-range inputs also with a floating-point DFT within
// a tolerance for the truncated twiddle products. The testbench counts how
// often each mechanism of the circuit was exercised: a twiddle product that
// dropped non-zero fraction bits, a sum that wrapped around in 16 bits, and
// a tone whose bin was identified through the output reorder; a mechanism
// never exercised counts as a failure. Outputs are sampled one clock
// period (10 ns) after the inputs change.
module tb_fft_circuitA;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [DATA_W-1:0] s_re [N];
  logic signed [DATA_W-1:0] s_im [N];
  logic signed [DATA_W-1:0] G_re [N];
  logic signed [DATA_W-1:0] G_im [N];

  int checks = 0, failures = 0;

  // Expected codes for the ramp 1..8: 36, -4 + 9.65625j, -4 + 4j,
  // -4 + 1.65625j, -4, and the conjugates (value * 512).
  localparam longint FIG_RE [8] = '{18432, -2048, -2048, -2048, -2048, -2048, -2048, -2048};
  localparam longint FIG_IM [8] = '{0, 4944, 2048, 848, 0, -848, -2048, -4944};
  int n_trunc = 0, n_wrap = 0, n_tone = 0, n_vectors = 0;

  fft_circuitA dut (.s_re(s_re), .s_im(s_im), .G_re(G_re), .G_im(G_im));

  function automatic real rabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic fail_if(bit bad, string msg);
    checks++;
    if (bad) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // Apply one vector and compare with the integer model; with dft set, also
  // with the floating-point DFT.
  task automatic apply(arr8_t xr, arr8_t xi, bit dft);
    arr8_t er, ei;
    real fr [8], fi [8];
    real tol, dre, dim;
    for (int n = 0; n < 8; n++) begin
      s_re[n] = sample_t'(xr[n]);
      s_im[n] = sample_t'(xi[n]);
    end
    @(posedge clk);
    n_vectors++;
    tb_fft_ref_pkg::wrapped = 0;
    tb_fft_ref_pkg::truncated = 0;
    ref_fft(xr, xi, er, ei);
    if (tb_fft_ref_pkg::wrapped) n_wrap++;
    if (tb_fft_ref_pkg::truncated) n_trunc++;
    for (int k = 0; k < 8; k++)
      fail_if(longint'(G_re[k]) != er[k] || longint'(G_im[k]) != ei[k],
              $sformatf("G[%0d]: got (%0d,%0d) model (%0d,%0d)",
                        k, int'(G_re[k]), int'(G_im[k]), er[k], ei[k]));
    if (dft) begin
      dft_real(xr, xi, fr, fi);
      for (int k = 0; k < 8; k++) begin
        // Up to 1 code of truncation per twiddle product reaching a bin,
        // times 4 for the later stages, plus the 362/512 quantisation.
        tol = 6.0 + 2.0e-4 * (rabs(fr[k]) + rabs(fi[k]));
        dre = real'(G_re[k]) - fr[k];
        dim = real'(G_im[k]) - fi[k];
        fail_if(rabs(dre) > tol || rabs(dim) > tol,
                $sformatf("G[%0d] against DFT: got (%0d,%0d) exact (%f,%f)",
                          k, int'(G_re[k]), int'(G_im[k]), fr[k], fi[k]));
      end
    end
  endtask

  initial begin
    arr8_t xr, xi;
    real pi;
    pi = 3.14159265358979323846;

    // 1. Ramp 1..8.
    for (int n = 0; n < 8; n++) begin
      xr[n] = 512 * (longint'(n) + 64'sd1);
      xi[n] = 0;
    end
    apply(xr, xi, 1'b1);
    for (int k = 0; k < 8; k++)
      fail_if(longint'(G_re[k]) != FIG_RE[k] || longint'(G_im[k]) != FIG_IM[k],
              $sformatf("ramp G[%0d] = (%f,%f), expected (%f,%f)", k,
                        real'(G_re[k]) / 512.0, real'(G_im[k]) / 512.0,
                        real'(FIG_RE[k]) / 512.0, real'(FIG_IM[k]) / 512.0));

    // 2. Impulses and tones.
    for (int n = 0; n < 8; n++) begin
      xr = '{default: 0};
      xi = '{default: 0};
      xr[n] = 512;
      apply(xr, xi, 1'b1);
    end
    for (int k0 = 0; k0 < 8; k0++) begin
      int peak;
      longint best;
      for (int n = 0; n < 8; n++) begin
        xr[n] = longint'($rtoi($floor(512.0 * $cos(2.0 * pi * k0 * n / 8.0) + 0.5)));
        xi[n] = longint'($rtoi($floor(512.0 * $sin(2.0 * pi * k0 * n / 8.0) + 0.5)));
      end
      apply(xr, xi, 1'b1);
      peak = 0;
      best = -1;
      for (int k = 0; k < 8; k++)
        if (longint'(G_re[k]) * G_re[k] + longint'(G_im[k]) * G_im[k] > best) begin
          best = longint'(G_re[k]) * G_re[k] + longint'(G_im[k]) * G_im[k];
          peak = k;
        end
      fail_if(peak != k0, $sformatf("tone %0d found in bin %0d", k0, peak));
      if (peak == k0) n_tone++;
    end

    // 3. Random vectors: small (|value| < 4, no wrap) and full range.
    for (int i = 0; i < 4000; i++) begin
      for (int n = 0; n < 8; n++) begin
        if (i % 2 == 0) begin
          xr[n] = longint'($signed(12'($urandom)));
          xi[n] = longint'($signed(12'($urandom)));
        end else begin
          xr[n] = longint'($signed(16'($urandom)));
          xi[n] = longint'($signed(16'($urandom)));
        end
      end
      apply(xr, xi, i % 2 == 0);
    end

    $display("vectors=%0d truncating_twiddle_products=%0d wrapped=%0d tones_in_right_bin=%0d",
             n_vectors, n_trunc, n_wrap, n_tone);
    fail_if(n_trunc == 0, "twiddle truncation never exercised");
    fail_if(n_wrap == 0, "16-bit wrap-around never exercised");
    fail_if(n_tone == 0, "output reorder never exercised by a tone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
