// tb_fft_w8_rotate: self-checking test of the W8^1 / W8^3 constant rotator.
//
// Both variants (K = 1 and K = 3) are driven with the same operands: a few
// directed cases (a unit difference, where the result must be the twiddle
// code 362 itself), then random operands over the full 16-bit range. Each
// result is compared bit for bit with an integer model of the arithmetic
// (16-bit wrapped difference, product with +/-362, floor division by 512),
// and, for operands small enough not to wrap, with the exact complex
// product to within the truncation and twiddle-quantisation error. The
// block is combinational, so each result is sampled one clock after the
// operands are applied.
module tb_fft_w8_rotate;
  import fft_pkg::*;
  import tb_fft_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  cplx_t a, b, y1, y3;
  int checks = 0, failures = 0;

  fft_w8_rotate #(.K(1)) dut1 (.a(a), .b(b), .y(y1));
  fft_w8_rotate #(.K(3)) dut3 (.a(a), .b(b), .y(y3));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (a=(%0d,%0d) b=(%0d,%0d))",
               what, got, exp, int'(a.re), int'(a.im), int'(b.re), int'(b.im));
    end
  endtask

  task automatic apply(longint ar, longint ai, longint br, longint bi);
    longint tre, tim, dr, di;
    real c, er, ei, tol;
    a.re = sample_t'(ar); a.im = sample_t'(ai);
    b.re = sample_t'(br); b.im = sample_t'(bi);
    @(posedge clk);
    tre = wrap16(ar - br);
    tim = wrap16(ai - bi);
    check("W1 re", longint'(y1.re), trunc9(362 * tre + 362 * tim));
    check("W1 im", longint'(y1.im), trunc9(-362 * tre + 362 * tim));
    dr = wrap16(tre - tim);
    di = wrap16(tre + tim);
    check("W3 re", longint'(y3.re), trunc9(-362 * dr));
    check("W3 im", longint'(y3.im), trunc9(-362 * di));
    // Against the exact rotation when nothing can wrap.
    if (ar - br < 16384 && ar - br > -16384 && ai - bi < 16384 && ai - bi > -16384) begin
      c = 0.70710678118654752;
      // 1 code of truncation plus the error of 362/512 against 0.70710678.
      tol = 1.5 + 1.2e-4 * (real'(tre < 0 ? -tre : tre) + real'(tim < 0 ? -tim : tim));
      er = c * real'(tre) + c * real'(tim);
      ei = -c * real'(tre) + c * real'(tim);
      checks++;
      if ((real'(y1.re) - er) > tol || (er - real'(y1.re)) > tol ||
          (real'(y1.im) - ei) > tol || (ei - real'(y1.im)) > tol) begin
        failures++;
        $display("FAIL W1 accuracy: got (%0d,%0d) exact (%f,%f)", int'(y1.re), int'(y1.im), er, ei);
      end
      er = -c * real'(tre) + c * real'(tim);
      ei = -c * real'(tre) - c * real'(tim);
      checks++;
      if ((real'(y3.re) - er) > tol || (er - real'(y3.re)) > tol ||
          (real'(y3.im) - ei) > tol || (ei - real'(y3.im)) > tol) begin
        failures++;
        $display("FAIL W3 accuracy: got (%0d,%0d) exact (%f,%f)", int'(y3.re), int'(y3.im), er, ei);
      end
    end
  endtask

  initial begin
    // Unit difference: 1.0 * W8^1 = 0.7071 - 0.7071j, 1.0 * W8^3 = -0.7071 - 0.7071j.
    apply(512, 0, 0, 0);
    check("unit W1 re", longint'(y1.re), 362);
    check("unit W1 im", longint'(y1.im), -362);
    check("unit W3 re", longint'(y3.re), -362);
    check("unit W3 im", longint'(y3.im), -362);
    // Pure imaginary unit: j * W8^1 = 0.7071 + 0.7071j.
    apply(0, 512, 0, 0);
    check("j W1 re", longint'(y1.re), 362);
    check("j W1 im", longint'(y1.im), 362);
    // Negative operand exercises the floor in the truncation: -1 code.
    apply(0, 0, 1, 0);
    check("floor W1 re", longint'(y1.re), -1);
    check("floor W1 im", longint'(y1.im), 0);
    apply(2, 1, 6, 3);
    apply(-32768, -32768, 32767, 32767);   // wrapping difference
    for (int i = 0; i < 2000; i++) begin
      if (i % 2 == 0)
        apply(longint'($signed(16'($urandom))), longint'($signed(16'($urandom))),
              longint'($signed(16'($urandom))), longint'($signed(16'($urandom))));
      else
        apply(longint'($signed(12'($urandom))), longint'($signed(12'($urandom))),
              longint'($signed(12'($urandom))), longint'($signed(12'($urandom))));
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
