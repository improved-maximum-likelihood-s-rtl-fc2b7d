// Sends random bits, back to back and with idle gaps, once with a sample
// strobe every clock and once every third clock. A model kept here advances
// a phase index by k0 or k1 per sample (cleared when a transmission starts
// from idle) and predicts each DAC sample as 32767*sin(2*pi*index/656)
// within one LSB. Checks that every bit lasts exactly 320 samples and that
// back-to-back bits leave no gap.
module tb_sfsk_modulator;
  logic clk = 0, rst_n = 0, sample_en = 0;
  logic [9:0] k0 = 10'd19, k1 = 10'd15;
  logic bit_valid = 0, bit_ready, bit_data = 0;
  logic signed [15:0] dac_sample;
  logic dac_valid, busy;
  int checks = 0, failures = 0;
  int strobe_div = 1;

  sfsk_modulator dut (.*);
  always #5 clk = ~clk;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // strobe generator
  int sc = 0;
  always @(posedge clk) begin
    sc <= (sc + 1 >= strobe_div) ? 0 : sc + 1;
    sample_en <= (sc + 1 >= strobe_div);
  end

  // reference model: the bits in flight and a phase index
  logic bitq [$];
  int   model_phase = 0, samples_in_bit = 0;
  logic cur;
  logic have_cur = 0;
  int   bits_done = 0;
  always @(posedge clk) if (rst_n && dac_valid) begin
    real e;
    if (!have_cur) begin
      cur = bitq.pop_front(); have_cur = 1; samples_in_bit = 0;
    end
    e = 32767.0 * $sin(2.0 * 3.14159265358979 * real'(model_phase) / 656.0);
    checks++;
    if (rabs(real'(dac_sample) - e) > 1.0) begin
      failures++; $display("FAIL: sample %0d of bit %0d: %0d expected %f", samples_in_bit, bits_done, dac_sample, e);
    end
    model_phase = (model_phase + (cur ? 15 : 19)) % 656;
    samples_in_bit++;
    if (samples_in_bit == 320) begin have_cur = 0; bits_done++; end
  end

  // idle detection resets the model phase; busy must drop exactly at bit ends
  // dac_valid lags busy by one cycle
  logic busy_q = 0;
  always @(posedge clk) busy_q <= busy;
  always @(posedge clk) if (rst_n && !busy_q && !dac_valid) begin
    if (have_cur) begin failures++; $display("FAIL: idle in the middle of a bit"); have_cur = 0; end
    model_phase = 0;
  end

  task automatic send(int n);
    for (int i = 0; i < n; i++) begin
      logic b;
      b = 1'($urandom_range(0, 1));
      bit_valid <= 1; bit_data <= b;
      @(posedge clk);
      while (!bit_ready) @(posedge clk);
      bitq.push_back(b);
    end
    bit_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    send(12);
    wait (!busy);
    repeat (7) @(posedge clk);
    send(5);
    wait (!busy);
    repeat (4) @(posedge clk);
    strobe_div = 3;
    repeat (4) @(posedge clk);
    send(6);
    wait (!busy);
    repeat (5) @(posedge clk);
    checks += 2;
    if (bits_done != 23) begin failures++; $display("FAIL: %0d bits sent", bits_done); end
    if (bitq.size() != 0) begin failures++; $display("FAIL: bits left"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // spacing of samples inside a transmission equals the strobe spacing
  int last_valid = -1, cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dac_valid) begin
      if (last_valid >= 0 && cyc - last_valid != strobe_div) begin
        failures++; $display("FAIL: gap of %0d cycles between samples at bit %0d sample %0d div %0d", cyc - last_valid, bits_done, samples_in_bit, strobe_div);
      end
      last_valid = cyc;
    end else if (!busy_q) begin
      last_valid = -1;
    end
  end
endmodule
