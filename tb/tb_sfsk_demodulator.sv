// Receiver test with signals made here: each bit is 160 ADC samples of
// A_i * sin(2*pi*2*k_i*n/656 + theta_i) plus noise, the tone of the bit,
// with a random carrier phase theta_i per packet and tone (the receiver must
// not depend on it). Packets: 32-symbol preamble then random payload. Checks
// every payload bit, the estimates against the amplitudes sent, the phase
// sequence idle -> preamble -> data -> idle, a restart in the middle of a
// packet, and, on a second receiver with 40-sample bits, that the overrun
// flag reports per-bit work that cannot keep up.
module tb_sfsk_demodulator;
  logic clk = 0, rst_n = 0;
  logic [9:0] k0 = 10'd19, k1 = 10'd15;
  logic adc_en = 0;
  logic signed [15:0] adc_sample = '0;
  logic rx_start = 0, rx_stop = 0;
  sfsk_pkg::rx_phase_e phase, phase_b;
  logic est_valid, bit_valid, bit_data, overrun, overrun_b;
  logic [51:0] sigma2_0, sigma2_1, mu2_0, mu2_1;
  logic signed [47:0] metric0, metric1;
  logic [2:0] seg0, seg1;
  int checks = 0, failures = 0;

  sfsk_demodulator dut (.clk, .rst_n, .k0, .k1, .adc_en, .adc_sample, .rx_start, .rx_stop, .phase, .est_valid,
    .sigma2_0, .sigma2_1, .mu2_0, .mu2_1, .bit_valid, .bit_data, .metric0, .metric1, .seg0, .seg1, .overrun);

  // too short bits for the per-bit processing time
  sfsk_demodulator #(.SPB(40), .P(4)) dut_fast (.clk, .rst_n, .k0, .k1, .adc_en, .adc_sample, .rx_start, .rx_stop,
    .phase(phase_b), .est_valid(), .sigma2_0(), .sigma2_1(), .mu2_0(), .mu2_1(), .bit_valid(), .bit_data(),
    .metric0(), .metric1(), .seg0(), .seg1(), .overrun(overrun_b));

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom_range(0, 65535)) / 65535.0 - 0.5;
    return s * 1.7320508;
  endfunction

  logic sent [$];
  int errors, got;
  always @(posedge clk) if (bit_valid) begin
    logic e;
    e = sent.pop_front();
    if (e != bit_data) errors++;
    got++;
  end

  // one bit of samples, one ADC sample every other clock
  real th0, th1;
  int  n_abs;
  task automatic send_bit(logic b, real a0, real a1, real noise);
    for (int n = 0; n < 160; n++) begin
      real v, ang;
      ang = 2.0 * 3.14159265358979 * 2.0 * real'(b ? k1 : k0) * real'(n_abs) / 656.0 + (b ? th1 : th0);
      v = (b ? a1 : a0) * $sin(ang) + noise * gauss();
      adc_sample <= 16'($rtoi(v));
      adc_en <= 1;
      @(posedge clk);
      adc_en <= 0;
      @(posedge clk);
      n_abs++;
    end
  endtask

  task automatic packet(int npay, real a0, real a1, real noise, int stop_after);
    th0 = 6.283185 * real'($urandom_range(0, 999)) / 1000.0;
    th1 = 6.283185 * real'($urandom_range(0, 999)) / 1000.0;
    n_abs = 0; errors = 0; got = 0;
    sent.delete();
    rx_start <= 1; @(posedge clk); rx_start <= 0;
    #1 chk(phase == sfsk_pkg::RX_PREAMBLE, "preamble phase after start");
    for (int i = 0; i < 32; i++) send_bit(i % 2 == 0, a0, a1, noise);
    for (int i = 0; i < npay && i < stop_after; i++) begin
      logic b;
      b = 1'($urandom_range(0, 1));
      sent.push_back(b);
      if (i == 1) chk(phase == sfsk_pkg::RX_DATA, "data phase once the preamble is processed");
      send_bit(b, a0, a1, noise);
    end
    repeat (200) @(posedge clk);
  endtask

  initial begin
    real amp;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // balanced
    packet(100, 12000.0, 12000.0, 1500.0, 1000);
    chk(errors == 0 && got == 100, $sformatf("balanced: %0d errors, %0d bits", errors, got));
    amp = $sqrt(real'(mu2_0)) / 80.0;
    chk(amp > 11000.0 && amp < 13000.0, $sformatf("channel 0 amplitude estimate %f", amp));
    amp = $sqrt(real'(mu2_1)) / 80.0;
    chk(amp > 11000.0 && amp < 13000.0, $sformatf("channel 1 amplitude estimate %f", amp));
    chk(est_valid && !overrun, "estimates and no overrun");
    // restart in the middle of a packet
    packet(100, 12000.0, 1200.0, 800.0, 40);
    chk(errors == 0 && got == 40, $sformatf("cut packet: %0d errors, %0d bits", errors, got));
    packet(100, 1200.0, 12000.0, 800.0, 1000);
    chk(errors == 0 && got == 100, $sformatf("restarted, unbalanced: %0d errors, %0d bits", errors, got));
    chk(sigma2_0 > 0 && sigma2_1 > 0, "noise estimates");
    rx_stop <= 1; @(posedge clk); rx_stop <= 0;
    #1 chk(phase == sfsk_pkg::RX_IDLE, "idle after stop");
    // a bit cannot be shorter than the per-bit processing
    chk(!overrun && overrun_b, $sformatf("overrun flags %0d %0d", overrun, overrun_b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
