// Checks every entry of the sine table on both read ports against
// 32767 * sin(2*pi*i/656), computed here, within one LSB.
module tb_sine_lut;
  localparam int unsigned LEN = 656;
  logic [9:0] addr_a, addr_b;
  logic signed [15:0] data_a, data_b;
  int checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  sine_lut dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expect_at(int i);
    return 32767.0 * $sin(2.0 * 3.14159265358979 * real'(i) / real'(LEN));
  endfunction

  initial begin
    for (int i = 0; i < LEN; i++) begin
      addr_a = 10'(i);
      addr_b = 10'((i * 7 + 3) % LEN);
      #1;
      checks += 2;
      if (rabs(real'(data_a) - expect_at(i)) > 1.0) begin
        failures++; $display("FAIL: port a entry %0d = %0d", i, data_a);
      end
      if (rabs(real'(data_b) - expect_at((i * 7 + 3) % LEN)) > 1.0) begin
        failures++; $display("FAIL: port b entry %0d = %0d", (i * 7 + 3) % LEN, data_b);
      end
    end
    // the quarter points are exact
    addr_a = 10'd164; addr_b = 10'd492; #1;
    checks++;
    if (data_a != 16'sd32767 || data_b != -16'sd32767) begin
      failures++; $display("FAIL: quarter points %0d %0d", data_a, data_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
