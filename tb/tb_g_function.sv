// Sweeps the argument of g over [0, 300] and beyond. For each X it computes
// here ln I0(X) (by numerical integration of I0(x) = (1/pi) * integral of
// exp(x cos t) over [0, pi], scaled by exp(-x)), the chord through the two
// breakpoints around X, and the expected interval index; g must match the
// chord within 0.01, the index exactly, and over [0, 256] the mean square
// error against ln I0 must be below 1e-3.
module tb_g_function;
  logic [31:0] x;
  logic signed [47:0] g;
  logic [2:0] seg;
  int checks = 0, failures = 0;

  g_function dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // ln I0 by the trapezoidal rule (very accurate for periodic integrands)
  function automatic real ln_i0_int(real xv);
    real s = 0.0;
    int n = 400;
    for (int i = 0; i <= n; i++) begin
      real t, w;
      t = 3.14159265358979 * real'(i) / real'(n);
      w = (i == 0 || i == n) ? 0.5 : 1.0;
      s += w * $exp(xv * ($cos(t) - 1.0));
    end
    return xv + $ln(s / real'(n));
  endfunction

  function automatic real bp(int j);
    return (j == 0) ? 0.0 : real'(1 << j);
  endfunction

  initial begin
    real se = 0.0;
    int  ns = 0;
    for (int n = 0; n < 1400; n++) begin
      real xv, gr, chord, lo, hi;
      int  j;
      if (n < 1200) xv = real'(n) * 0.25;             // 0 .. 300 in steps of 1/4
      else          xv = real'($urandom_range(300, 20000)) + real'($urandom_range(0, 255)) / 256.0;
      x = 32'($rtoi(xv * 256.0));
      xv = real'(x) / 256.0;
      #1;
      j = 0;
      for (int k = 1; k < 8; k++) if (xv >= bp(k)) j = k;
      lo = ln_i0_int(bp(j));
      hi = ln_i0_int(bp(j + 1));
      chord = lo + (hi - lo) * (xv - bp(j)) / (bp(j + 1) - bp(j));
      gr = real'(g) / 65536.0;
      checks += 2;
      if (int'(seg) != j) begin failures++; $display("FAIL: X=%f interval %0d expected %0d", xv, seg, j); end
      if (rabs(gr - chord) > 0.01 + 1.0e-5 * xv) begin failures++; $display("FAIL: X=%f g=%f expected %f", xv, gr, chord); end
      if (xv <= 256.0) begin
        real d;
        d = gr - ln_i0_int(xv);
        se += d * d;
        ns++;
      end
    end
    checks++;
    $display("mean square error over [0,256]: %g", se / real'(ns));
    if (se / real'(ns) >= 1.0e-3) begin failures++; $display("FAIL: mean square error %g", se / real'(ns)); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
