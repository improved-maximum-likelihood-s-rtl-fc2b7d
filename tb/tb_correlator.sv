// Feeds bits of 160 random samples and references, with random idle cycles
// between samples, and compares each correlation with a sum computed here.
// Also checks full-scale inputs do not overflow the accumulator.
module tb_correlator;
  logic clk = 0, rst_n = 0, en = 0, first = 0, last = 0;
  logic signed [15:0] x, ref_s;
  logic signed [25:0] result;
  logic result_valid;
  int checks = 0, failures = 0;
  longint expected_q [$];

  correlator dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (result_valid) begin
    longint e;
    e = expected_q.pop_front();
    checks++;
    if (longint'(result) != e) begin failures++; $display("FAIL: result %0d expected %0d", result, e); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 40; b++) begin
      longint sum;
      sum = 0;
      for (int n = 0; n < 160; n++) begin
        logic signed [15:0] xv, rv;
        if (b == 0)      begin xv = 16'sh7fff;  rv = 16'sh7fff; end
        else if (b == 1) begin xv = -16'sh8000; rv = 16'sh7fff; end
        else begin xv = 16'($urandom); rv = 16'($urandom); end
        while ($urandom_range(0, 2) == 0) begin
          en <= 0; @(posedge clk);
        end
        en <= 1; first <= (n == 0); last <= (n == 159); x <= xv; ref_s <= rv;
        // floor((x*ref) / 2^15)
        sum += (longint'(xv) * longint'(rv)) >>> 15;
        if (n == 159) expected_q.push_back(sum);
        @(posedge clk);
      end
    end
    en <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (expected_q.size() != 0) begin failures++; $display("FAIL: %0d results missing", expected_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
