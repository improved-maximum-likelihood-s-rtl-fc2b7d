// End-to-end test of the S-FSK modem at its default parameters.
//
// The DAC output is looped back to the ADC through a channel model that
// applies a separate gain to each tone (a frequency-selective line: since a
// bit is one tone, the gain follows the bit being sent) and adds noise, a sum
// of uniform variables that approximates a Gaussian. Each packet is a 32-bit
// alternating preamble (1 first) followed by 304 payload bits, the packet
// format used to evaluate the receiver. Scenarios: the five tone pairs for
// 9.6 kbit/s, a balanced and two unbalanced channels (10 dB and 20 dB
// between the tones), a channel whose strong tone is buried in noise, and
// back-to-back packets. Checked: every payload bit, the bit period on both
// sides (320 clocks), the decision latency, the signal estimates against the
// gains applied, and that each mechanism (preamble estimation, switch to
// data, both decisions, several g intervals, transmit back-to-back and idle,
// rx_stop) happened.
module tb_sfsk_modem;

  localparam int unsigned AW    = $clog2(sfsk_pkg::LUT_LEN);
  localparam int unsigned RSQ_W = 2 * sfsk_pkg::ACC_W;
  localparam int unsigned NPRE  = 32;
  localparam int unsigned NPAY  = 304;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [AW-1:0] k0, k1;
  logic tx_bit_valid = 1'b0, tx_bit_ready, tx_bit_data = 1'b0, tx_busy;
  logic signed [15:0] dac_sample, adc_sample;
  logic dac_valid, adc_strobe;
  logic rx_start = 1'b0, rx_stop = 1'b0;
  sfsk_pkg::rx_phase_e rx_phase;
  logic rx_est_valid, rx_bit_valid, rx_bit_data, rx_overrun;
  logic [RSQ_W-1:0] rx_sigma2_0, rx_sigma2_1, rx_mu2_0, rx_mu2_1;
  logic [2:0] rx_seg0, rx_seg1;

  sfsk_modem dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- channel
  real gain0 = 1.0, gain1 = 1.0, noise_amp = 0.0;
  logic cur_tx_bit = 1'b0;
  logic signed [15:0] line = '0;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom_range(0, 65535)) / 65535.0 - 0.5;
    return s * 1.7320508;   // unit variance
  endfunction

  always @(posedge clk) begin
    if (dac_valid) begin
      real v;
      v = real'(dac_sample) * (cur_tx_bit ? gain1 : gain0) + noise_amp * gauss();
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      line <= 16'($rtoi(v));
    end
  end
  assign adc_sample = line;

  // ---------------------------------------------------------------- packets
  logic pkt [NPRE + NPAY];
  int   sent_idx, rcvd_idx;
  longint unsigned last_accept, last_rx_bit, last_sym_end;
  int   tx_period_bad, rx_period_bad;
  int   bit_errors, fsk_errors;

  // mechanism counters
  int n_est = 0, n_data_switch = 0, n_dec0 = 0, n_dec1 = 0, n_b2b = 0, n_txidle = 0, n_stop = 0;
  int seg_hits [8];
  initial foreach (seg_hits[i]) seg_hits[i] = 0;

  sfsk_pkg::rx_phase_e prev_phase = sfsk_pkg::RX_IDLE;
  logic prev_est = 1'b0, prev_busy = 1'b0;
  always @(posedge clk) begin
    prev_phase <= rx_phase;
    prev_est   <= rst_n && rx_est_valid;
    prev_busy  <= rst_n && tx_busy;
    if (rst_n && rx_est_valid && !prev_est) n_est++;
    if (prev_phase == sfsk_pkg::RX_PREAMBLE && rx_phase == sfsk_pkg::RX_DATA) n_data_switch++;
    if (rst_n && prev_busy && !tx_busy) n_txidle++;
    if (tx_busy && tx_bit_valid && tx_bit_ready) n_b2b++;
    if (rx_bit_valid) begin
      if (rx_bit_data) n_dec1++; else n_dec0++;
      seg_hits[rx_seg0]++;
      seg_hits[rx_seg1]++;
    end
  end

  // Transmit side: offers the packet bits back to back.
  task automatic send_packet();
    sent_idx = 0;
    tx_period_bad = 0;
    while (sent_idx < NPRE + NPAY) begin
      tx_bit_valid <= 1'b1;
      tx_bit_data  <= pkt[sent_idx];
      @(posedge clk);
      if (tx_bit_ready) begin
        if (sent_idx > 0 && (cycle - last_accept) != 320) tx_period_bad++;
        last_accept = cycle;
        cur_tx_bit  <= pkt[sent_idx];
        sent_idx++;
      end
    end
    tx_bit_valid <= 1'b0;
    wait (!tx_busy);
  endtask

  // Receive side: collects decoded payload bits.
  task automatic receive_packet();
    rcvd_idx = 0;
    bit_errors = 0;
    fsk_errors = 0;
    rx_period_bad = 0;
    while (rcvd_idx < NPAY) begin
      @(posedge clk);
      if (rx_bit_valid) begin
        if (rcvd_idx > 0 && (cycle - last_rx_bit) != 320) rx_period_bad++;
        last_rx_bit = cycle;
        if (rx_bit_data != pkt[NPRE + rcvd_idx]) bit_errors++;
        // plain FSK rule on the same envelopes: the larger energy wins
        if ((dut.u_demod.rsq1 > dut.u_demod.rsq0) != pkt[NPRE + rcvd_idx]) fsk_errors++;
        rcvd_idx++;
      end
    end
  endtask

  // Starts the receiver when the first sample reaches the line.
  task automatic run_packet(string name, int max_errors, real exp_amp0, real exp_amp1);
    for (int i = 0; i < NPRE; i++) pkt[i] = (i % 2 == 0);
    for (int i = 0; i < NPAY; i++) pkt[NPRE + i] = 1'($urandom_range(0, 1));
    fork
      send_packet();
      begin
        @(posedge clk iff dac_valid);
        rx_start <= 1'b1;
        @(posedge clk);
        rx_start <= 1'b0;
        receive_packet();
      end
    join
    check(bit_errors <= max_errors, $sformatf("%s: %0d payload bit errors (allowed %0d)", name, bit_errors, max_errors));
    check(tx_period_bad == 0, $sformatf("%s: transmit bit period not 320 clocks (%0d)", name, tx_period_bad));
    check(rx_period_bad == 0, $sformatf("%s: receive bit period not 320 clocks (%0d)", name, rx_period_bad));
    check(!rx_overrun, $sformatf("%s: receiver overrun", name));
    check(rx_est_valid, $sformatf("%s: no estimates", name));
    // Signal amplitude of a tone after correlation: gain * 32767 * SPB_RX / 2
    if (exp_amp0 > 0.0) begin
      real a0, a1;
      a0 = $sqrt(real'(rx_mu2_0));
      a1 = $sqrt(real'(rx_mu2_1));
      check(a0 > 0.9 * exp_amp0 && a0 < 1.1 * exp_amp0, $sformatf("%s: mu0 %f expected %f", name, a0, exp_amp0));
      check(a1 > 0.9 * exp_amp1 && a1 < 1.1 * exp_amp1, $sformatf("%s: mu1 %f expected %f", name, a1, exp_amp1));
    end
    $display("%s: k0=%0d k1=%0d errors=%0d fsk_errors=%0d sigma2=(%0d,%0d) mu2=(%0d,%0d)", name, k0, k1, bit_errors, fsk_errors,
             rx_sigma2_0, rx_sigma2_1, rx_mu2_0, rx_mu2_1);
    rx_stop <= 1'b1;
    @(posedge clk);
    rx_stop <= 1'b0;
    n_stop++;
    @(posedge clk);
    check(rx_phase == sfsk_pkg::RX_IDLE, $sformatf("%s: receiver not idle after stop", name));
    repeat (50) @(posedge clk);
  endtask

  // Decision latency: the last sample of a data bit to its decision
  logic prev_pending = 1'b0;
  longint unsigned corr_end;
  int lat_bad = 0, lat_seen = 0;
  always @(posedge clk) begin
    if (dut.u_demod.cv_s0 && rx_phase == sfsk_pkg::RX_DATA && rx_est_valid) corr_end = cycle;
    if (rx_bit_valid && rx_phase == sfsk_pkg::RX_DATA && corr_end != 0) begin
      lat_seen++;
      if (cycle - corr_end > 100) lat_bad++;
    end
  end

  localparam real AMP = 32767.0 * 80.0;

  int pair_k0 [5] = '{19, 18, 17, 16, 15};
  int pair_k1 [5] = '{15, 14, 13, 12, 11};

  initial begin
    corr_end = 0;
    k0 = 19; k1 = 15;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // Tone pairs of the 9.6 kbit/s plan, balanced, moderate noise
    noise_amp = 2000.0; gain0 = 0.5; gain1 = 0.5;
    for (int p = 0; p < 5; p++) begin
      k0 = AW'(pair_k0[p]); k1 = AW'(pair_k1[p]);
      run_packet($sformatf("pair%0d", p), 0, 0.5 * AMP, 0.5 * AMP);
    end

    k0 = 19; k1 = 15;
    // Unbalanced by 10 dB and by 20 dB (power ratio)
    gain0 = 0.5; gain1 = 0.5 / $sqrt(10.0);
    run_packet("x=10dB", 0, 0.5 * AMP, 0.5 / $sqrt(10.0) * AMP);
    gain0 = 0.5; gain1 = 0.05;
    run_packet("x=20dB", 0, 0.5 * AMP, 0.05 * AMP);

    // Heavy noise: a few errors are allowed
    gain0 = 0.1; gain1 = 0.1; noise_amp = 3000.0;
    run_packet("noisy", 12, 0.0, 0.0);

    // Unbalanced by 20 dB with the weak tone near the noise: the plain FSK
    // rule fails often, the ML rule leans on the strong channel
    gain0 = 0.1; gain1 = 0.01; noise_amp = 3000.0;
    run_packet("x=20dB noisy", NPAY, 0.0, 0.0);
    check(bit_errors < fsk_errors, $sformatf("ML errors %0d not below FSK errors %0d", bit_errors, fsk_errors));
    check(bit_errors <= 5, $sformatf("ML errors %0d on the unbalanced channel", bit_errors));

    check(lat_seen > 0 && lat_bad == 0, $sformatf("decision latency over 100 clocks %0d of %0d", lat_bad, lat_seen));

    // Mechanisms
    check(n_est == 9, $sformatf("preamble estimations %0d", n_est));
    check(n_data_switch == 9, $sformatf("preamble-to-data switches %0d", n_data_switch));
    check(n_dec0 > 0 && n_dec1 > 0, $sformatf("decisions 0:%0d 1:%0d", n_dec0, n_dec1));
    begin
      int used = 0;
      foreach (seg_hits[i]) if (seg_hits[i] > 0) used++;
      check(used >= 4, $sformatf("g intervals used %0d", used));
      $display("g interval hits: %p", seg_hits);
    end
    check(n_b2b >= 9 * (NPRE + NPAY - 1), $sformatf("back-to-back bit loads %0d", n_b2b));
    check(n_txidle == 9, $sformatf("transmitter idle returns %0d", n_txidle));
    check(n_stop == 9, $sformatf("receiver stops %0d", n_stop));
    $display("mechanisms: est=%0d switch=%0d dec0=%0d dec1=%0d b2b=%0d txidle=%0d stop=%0d",
             n_est, n_data_switch, n_dec0, n_dec1, n_b2b, n_txidle, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
