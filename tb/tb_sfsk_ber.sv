// Bit error rate of the modem against the average SNR for three channel
// unbalances, x = SNR1/SNR0 = 5, 10 and 20 dB, at default parameters.
//
// The DAC output is looped back to the ADC: each tone gets its own gain G_i
// (the bit selects the tone, so the gain follows the bit) and white noise of
// standard deviation SIGMA is added per sample. The per-bit SNR of channel i
// is taken as SNR_i = 160 * (32767 G_i)^2 / (2 SIGMA^2) (160 ADC samples per
// bit), and for a target average SNR_av = 2 SNR0 SNR1 / (SNR0 + SNR1) and
// unbalance x the gains follow from SNR0 = SNR_av (1 + x) / (2x),
// SNR1 = x SNR0. Each point runs packets of a 32-symbol preamble and 304
// random payload bits. Errors of the ML decision are counted, and so are the
// errors the plain FSK rule (larger envelope wins) makes on the same
// envelopes; the ML receiver must make fewer errors in total for each x.
module tb_sfsk_ber;

  localparam int unsigned AW    = $clog2(sfsk_pkg::LUT_LEN);
  localparam int unsigned RSQ_W = 2 * sfsk_pkg::ACC_W;
  localparam int unsigned NPRE  = 32;
  localparam int unsigned NPAY  = 304;
  localparam int unsigned PACKETS = 2;
  localparam real SIGMA = 3000.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [AW-1:0] k0 = AW'(19), k1 = AW'(15);
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

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real gain0 = 0.0, gain1 = 0.0;
  logic cur_tx_bit = 1'b0;
  logic signed [15:0] line = '0;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65535.0;
    return s - 6.0;   // unit variance
  endfunction

  always @(posedge clk) if (dac_valid) begin
    real v;
    v = real'(dac_sample) * (cur_tx_bit ? gain1 : gain0) + SIGMA * gauss();
    if (v > 32767.0) v = 32767.0;
    if (v < -32768.0) v = -32768.0;
    line <= 16'($rtoi(v));
  end
  assign adc_sample = line;

  logic pkt [NPRE + NPAY];
  int ml_err, fsk_err;

  task automatic send_packet();
    int idx = 0;
    while (idx < NPRE + NPAY) begin
      tx_bit_valid <= 1'b1;
      tx_bit_data  <= pkt[idx];
      @(posedge clk);
      if (tx_bit_ready) begin
        cur_tx_bit <= pkt[idx];
        idx++;
      end
    end
    tx_bit_valid <= 1'b0;
    wait (!tx_busy);
  endtask

  task automatic receive_packet();
    int idx = 0;
    while (idx < NPAY) begin
      @(posedge clk);
      if (rx_bit_valid) begin
        if (rx_bit_data != pkt[NPRE + idx]) ml_err++;
        if ((dut.u_demod.rsq1 > dut.u_demod.rsq0) != pkt[NPRE + idx]) fsk_err++;
        idx++;
      end
    end
  endtask

  task automatic run_packet();
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
    check(rx_est_valid && !rx_overrun, "estimates present, no overrun");
    rx_stop <= 1'b1;
    @(posedge clk);
    rx_stop <= 1'b0;
    repeat (20) @(posedge clk);
  endtask

  real x_db [3] = '{5.0, 10.0, 20.0};
  real snr_db [3] = '{4.0, 8.0, 12.0};

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    $display("   x dB  SNR_av dB   ML errors   FSK errors   (of %0d bits)", PACKETS * NPAY);
    foreach (x_db[xi]) begin
      int ml_tot = 0, fsk_tot = 0;
      foreach (snr_db[si]) begin
        real x, s, s0, s1;
        x  = 10.0 ** (x_db[xi] / 10.0);
        s  = 10.0 ** (snr_db[si] / 10.0);
        s0 = s * (1.0 + x) / (2.0 * x);
        s1 = x * s0;
        gain0 = $sqrt(s0 * 2.0 * SIGMA * SIGMA / 160.0) / 32767.0;
        gain1 = $sqrt(s1 * 2.0 * SIGMA * SIGMA / 160.0) / 32767.0;
        ml_err = 0; fsk_err = 0;
        repeat (PACKETS) run_packet();
        $display("  %5.1f    %5.1f     %6d       %6d", x_db[xi], snr_db[si], ml_err, fsk_err);
        ml_tot += ml_err; fsk_tot += fsk_err;
      end
      check(ml_tot < fsk_tot || (ml_tot == 0 && fsk_tot == 0),
            $sformatf("x=%0.0f dB: ML errors %0d not below FSK errors %0d", x_db[xi], ml_tot, fsk_tot));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
