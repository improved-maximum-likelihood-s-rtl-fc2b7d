// Checks the strobe spacing of the sample timer at its default (every clock,
// ADC every 2nd) and at 3 clocks per sample with ADC_DIV 4.
module tb_sample_timer;
  logic clk = 0, rst_n = 0;
  logic tx_a, rx_a, tx_b, rx_b;
  int checks = 0, failures = 0;

  sample_timer dut_a (.clk, .rst_n, .tx_en(tx_a), .rx_en(rx_a));
  sample_timer #(.CLKS_PER_SAMPLE(3), .ADC_DIV(4)) dut_b (.clk, .rst_n, .tx_en(tx_b), .rx_en(rx_b));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n = 0, last_ta = -1, last_ra = -1, last_tb = -1, last_rb = -1;
    int cnt_ta = 0, cnt_ra = 0, cnt_tb = 0, cnt_rb = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (n = 0; n < 240; n++) begin
      @(negedge clk);
      if (tx_a) begin if (last_ta >= 0) chk(n - last_ta == 1, "tx_a spacing"); last_ta = n; cnt_ta++; end
      if (rx_a) begin if (last_ra >= 0) chk(n - last_ra == 2, "rx_a spacing"); chk(tx_a, "rx_a without tx_a"); last_ra = n; cnt_ra++; end
      if (tx_b) begin if (last_tb >= 0) chk(n - last_tb == 3, "tx_b spacing"); last_tb = n; cnt_tb++; end
      if (rx_b) begin if (last_rb >= 0) chk(n - last_rb == 12, "rx_b spacing"); chk(tx_b, "rx_b without tx_b"); last_rb = n; cnt_rb++; end
    end
    chk(cnt_ta == 240 && cnt_ra == 120, $sformatf("default strobe counts %0d %0d", cnt_ta, cnt_ra));
    chk(cnt_tb == 80 && cnt_rb == 20, $sformatf("slow strobe counts %0d %0d", cnt_tb, cnt_rb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
