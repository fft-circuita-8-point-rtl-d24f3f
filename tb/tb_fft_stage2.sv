// tb_fft_stage2: self-checking test of FFT stage 2 (two groups of four with the -j rotation of the odd differences).
//
// The stage is driven with directed vectors (all zero, a single impulse at
// each input, the ramp 1..8) and then with random vectors, half over the
// full 16-bit range (so that wrapping sums occur) and half small. Every
// output is compared bit for bit with an integer model of the stage written
// independently in tb_fft_ref_pkg. The stage is combinational; outputs are
// sampled one clock after each input change.
module tb_fft_stage2;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t x [N];
  cplx_t y [N];
  int checks = 0, failures = 0;

  fft_stage2 dut (.x(x), .y(y));

  task automatic apply(arr8_t xr, arr8_t xi);
    arr8_t er, ei;
    for (int n = 0; n < 8; n++) begin
      x[n].re = sample_t'(xr[n]);
      x[n].im = sample_t'(xi[n]);
    end
    @(posedge clk);
    ref_stage2(xr, xi, er, ei);
    for (int n = 0; n < 8; n++) begin
      checks += 2;
      if (longint'(y[n].re) != er[n] || longint'(y[n].im) != ei[n]) begin
        failures++;
        $display("FAIL y[%0d]: got (%0d,%0d) expected (%0d,%0d)",
                 n, int'(y[n].re), int'(y[n].im), er[n], ei[n]);
      end
    end
  endtask

  initial begin
    arr8_t xr, xi;
    xr = '{default: 0};
    xi = '{default: 0};
    apply(xr, xi);
    for (int n = 0; n < 8; n++) begin
      xr = '{default: 0};
      xi = '{default: 0};
      xr[n] = 512;
      apply(xr, xi);
      xr[n] = 0;
      xi[n] = 512;
      apply(xr, xi);
    end
    for (int n = 0; n < 8; n++) begin
      xr[n] = 512 * (longint'(n) + 64'sd1);
      xi[n] = 0;
    end
    apply(xr, xi);
    for (int i = 0; i < 3000; i++) begin
      for (int n = 0; n < 8; n++) begin
        if (i % 2 == 0) begin
          xr[n] = longint'($signed(16'($urandom)));
          xi[n] = longint'($signed(16'($urandom)));
        end else begin
          xr[n] = longint'($signed(12'($urandom)));
          xi[n] = longint'($signed(12'($urandom)));
        end
      end
      apply(xr, xi);
    end
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
