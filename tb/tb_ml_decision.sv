// Random channel states and envelopes. For each case the log-likelihood
// metrics m_i = g(X_i) - mu_i^2/sigma_i^2 with X_i = 2 r_i mu_i / sigma_i^2
// are computed here in floating point, g being the chord of ln I0 between
// the breakpoints 0, 2, 4, ..., 256 (ln I0 by numerical integration). The
// metrics must agree within the fixed-point resolution and the bit must be
// the one of the larger metric wherever the two differ clearly. Includes
// saturated arguments, equal channels and 20 dB unbalanced channels, and
// checks the decision latency.
module tb_ml_decision;
  logic clk = 0, rst_n = 0, start = 0;
  logic [25:0] r0, r1, mu_0, mu_1;
  logic [51:0] sigma2_0, sigma2_1;
  logic [47:0] c_0, c_1;
  logic busy, done, bit_o;
  logic signed [47:0] metric0, metric1;
  logic [2:0] seg0, seg1;
  int checks = 0, failures = 0;

  ml_decision dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

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

  real lni0 [9];
  function automatic real bp(int j);
    return (j == 0) ? 0.0 : real'(1 << j);
  endfunction
  function automatic real g_ref(real xv);
    int j = 0;
    for (int k = 1; k < 8; k++) if (xv >= bp(k)) j = k;
    return lni0[j] + (lni0[j + 1] - lni0[j]) * (xv - bp(j)) / (bp(j + 1) - bp(j));
  endfunction

  int n_dec0 = 0, n_dec1 = 0, n_sat = 0;

  task automatic one_case(longint unsigned m0, longint unsigned m1, longint unsigned s0, longint unsigned s1,
                          longint unsigned rr0, longint unsigned rr1);
    real x0, x1, e0, e1, xmax, tol0, tol1;
    int lat;
    logic [127:0] cq0, cq1;
    cq0 = ((128'(m0) * 128'(m0)) << 16) / 128'(s0);
    cq1 = ((128'(m1) * 128'(m1)) << 16) / 128'(s1);
    if (cq0 > 128'h7fff_ffff_ffff) cq0 = 128'h7fff_ffff_ffff;
    if (cq1 > 128'h7fff_ffff_ffff) cq1 = 128'h7fff_ffff_ffff;
    @(posedge clk);
    mu_0 <= 26'(m0); mu_1 <= 26'(m1); sigma2_0 <= 52'(s0); sigma2_1 <= 52'(s1);
    r0 <= 26'(rr0); r1 <= 26'(rr1); c_0 <= 48'(cq0); c_1 <= 48'(cq1);
    start <= 1;
    @(posedge clk);
    start <= 0;
    // inputs may change while the unit works
    mu_0 <= '0; r1 <= '1; c_0 <= '0;
    lat = 0;
    while (!done) begin @(posedge clk); lat++; end
    xmax = real'(32'hffff_ffff) / 256.0;
    x0 = 2.0 * real'(rr0) * real'(m0) / real'(s0);
    x1 = 2.0 * real'(rr1) * real'(m1) / real'(s1);
    if (x0 > xmax) begin x0 = xmax; n_sat++; end
    if (x1 > xmax) begin x1 = xmax; n_sat++; end
    e0 = g_ref(x0) - real'(cq0) / 65536.0;
    e1 = g_ref(x1) - real'(cq1) / 65536.0;
    tol0 = 0.02 + 1.0e-5 * rabs(e0);
    tol1 = 0.02 + 1.0e-5 * rabs(e1);
    checks += 3;
    if (lat != 63) begin failures++; $display("FAIL: latency %0d", lat); end
    if (rabs(real'(metric0) / 65536.0 - e0) > tol0) begin failures++; $display("FAIL: metric0 %f expected %f", real'(metric0) / 65536.0, e0); end
    if (rabs(real'(metric1) / 65536.0 - e1) > tol1) begin failures++; $display("FAIL: metric1 %f expected %f", real'(metric1) / 65536.0, e1); end
    if (rabs(e1 - e0) > tol0 + tol1) begin
      checks++;
      if (bit_o != (e1 > e0)) begin failures++; $display("FAIL: bit %0d metrics %f %f", bit_o, e0, e1); end
    end
    if (bit_o) n_dec1++; else n_dec0++;
  endtask

  initial begin
    for (int j = 0; j < 9; j++) lni0[j] = ln_i0_int(bp(j));
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      longint unsigned m0, m1, s0, s1, rr0, rr1;
      logic b;
      b  = 1'($urandom_range(0, 1));
      m0 = 64'($urandom_range(1000, 4000000));
      m1 = (t % 3 == 0) ? m0 / 10 : 64'($urandom_range(1000, 4000000));   // every third: 20 dB unbalance
      s0 = (m0 * m0) / 64'($urandom_range(1, 400)) + 1;
      s1 = (m1 * m1) / 64'($urandom_range(1, 400)) + 1;
      // envelope: signal plus some noise on the carrying channel, noise on the other
      rr0 = b ? 64'($urandom_range(0, 2)) * (m0 / 10) : m0 + 64'($urandom_range(0, 32'(m0 / 5)));
      rr1 = b ? m1 + 64'($urandom_range(0, 32'(m1 / 5))) : 64'($urandom_range(0, 2)) * (m1 / 10);
      one_case(m0, m1, s0, s1, rr0, rr1);
    end
    // saturation: a burst far above the signal estimate (SNR capped at 2^20)
    one_case(64'd3000000, 64'd3000000, 64'd8583, 64'd8583, 64'd30000000, 64'd100);
    one_case(64'd3000000, 64'd3000000, 64'd8583, 64'd8583, 64'd3000, 64'd30000000);
    one_case(64'd1, 64'd1, 64'd0 + 1, 64'd1, 64'd0, 64'd0);
    checks++;
    if (n_dec0 == 0 || n_dec1 == 0 || n_sat == 0) begin failures++; $display("FAIL: coverage %0d %0d %0d", n_dec0, n_dec1, n_sat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
