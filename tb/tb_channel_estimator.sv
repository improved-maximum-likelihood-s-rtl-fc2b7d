// Feeds three preambles of 32 symbol energies (random, with the signal
// channel of each symbol stronger, as on a line) and compares sigma_i^2,
// mu_i^2, mu_i and c_i with values computed here in 128-bit arithmetic from
// the estimator equations. Checks that extra symbols after the preamble are
// ignored, that `collecting` drops after exactly 32 symbols, that a zero
// noise sum is floored (SNR cap of 2^20), and that the estimates are ready within 80 cycles.
module tb_channel_estimator;
  logic clk = 0, rst_n = 0, clear = 0, sym_valid = 0;
  logic [51:0] r0sq = '0, r1sq = '0;
  logic collecting, est_valid;
  logic [51:0] sigma2_0, sigma2_1, mu2_0, mu2_1;
  logic [25:0] mu_0, mu_1;
  logic [47:0] c_0, c_1;
  int checks = 0, failures = 0;

  channel_estimator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [127:0] isqrt128(logic [127:0] v);
    logic [127:0] r = 0;
    for (int b = 63; b >= 0; b--) begin
      logic [127:0] t;
      t = r | (128'd1 << b);
      if (t * t <= v) r = t;
    end
    return r;
  endfunction

  task automatic packet(int mode);
    logic [127:0] s01 = 0, s10 = 0, s00 = 0, s11 = 0;  // s<channel><symbol>
    logic [127:0] e_s0, e_s1, e_m0, e_m1, e_c0, e_c1, a, b;
    int wait_cycles;
    clear <= 1; @(posedge clk); clear <= 0;
    for (int i = 0; i < 36; i++) begin
      logic bitv;
      logic [51:0] sig, noi;
      bitv = (i % 2 == 0);          // preamble starts with 1
      sig = 52'({$urandom, $urandom}) >> (8 + $urandom_range(0, 4));
      noi = (mode == 1) ? 52'd0 : 52'({$urandom, $urandom}) >> (20 + $urandom_range(0, 4));
      if (bitv) begin r1sq <= sig; r0sq <= noi; end
      else      begin r0sq <= sig; r1sq <= noi; end
      if (i < 32) begin
        if (bitv) begin s01 += noi; s11 += sig; end
        else      begin s00 += sig; s10 += noi; end
      end
      sym_valid <= 1;
      @(posedge clk);
      sym_valid <= 0;
      #1 chk(collecting == (i < 31), $sformatf("collecting after symbol %0d", i));
      repeat ((i == 31) ? 0 : 3) @(posedge clk);
      if (i == 31) begin
        wait_cycles = 0;
        while (!est_valid && wait_cycles < 200) begin @(posedge clk); wait_cycles++; end
        chk(wait_cycles <= 80, $sformatf("estimates after %0d cycles", wait_cycles));
      end
    end
    e_s0 = s01 >> 4;  e_s1 = s10 >> 4;
    a = s00 >> 4; b = s11 >> 4;
    e_m0 = (a >= e_s0) ? a - e_s0 : e_s0 - a;
    e_m1 = (b >= e_s1) ? b - e_s1 : e_s1 - b;
    // SNR cap of 2^20 and a floor of one on the noise estimate
    if (e_s0 < (e_m0 >> 20)) e_s0 = e_m0 >> 20;
    if (e_s1 < (e_m1 >> 20)) e_s1 = e_m1 >> 20;
    if (e_s0 == 0) e_s0 = 1;
    if (e_s1 == 0) e_s1 = 1;
    e_c0 = (e_m0 << 16) / e_s0;
    e_c1 = (e_m1 << 16) / e_s1;
    if (e_c0 > 128'h7fff_ffff_ffff) e_c0 = 128'h7fff_ffff_ffff;
    if (e_c1 > 128'h7fff_ffff_ffff) e_c1 = 128'h7fff_ffff_ffff;
    chk(est_valid, "est_valid");
    chk(128'(sigma2_0) == e_s0, $sformatf("sigma2_0 %0d expected %0d", sigma2_0, e_s0));
    chk(128'(sigma2_1) == e_s1, $sformatf("sigma2_1 %0d expected %0d", sigma2_1, e_s1));
    chk(128'(mu2_0) == e_m0, $sformatf("mu2_0 %0d expected %0d", mu2_0, e_m0));
    chk(128'(mu2_1) == e_m1, $sformatf("mu2_1 %0d expected %0d", mu2_1, e_m1));
    chk(128'(mu_0) == isqrt128(e_m0), $sformatf("mu_0 %0d", mu_0));
    chk(128'(mu_1) == isqrt128(e_m1), $sformatf("mu_1 %0d", mu_1));
    chk(128'(c_0) == e_c0, $sformatf("c_0 %0d expected %0d", c_0, e_c0));
    chk(128'(c_1) == e_c1, $sformatf("c_1 %0d expected %0d", c_1, e_c1));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    packet(0);
    packet(0);
    packet(1);   // noise-free channel: sigma^2 = 0
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    chk(!est_valid && collecting, "clear restarts estimation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
