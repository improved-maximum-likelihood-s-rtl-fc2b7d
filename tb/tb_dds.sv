// Drives the synthesizer with several step indices, random gaps between
// advances and a clear in the middle. A phase model kept here predicts the
// index; the sine and cosine outputs are compared with sin/cos of that index
// computed here (within one LSB).
module tb_dds;
  localparam int unsigned LEN = 656;
  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [9:0] step, phase;
  logic signed [15:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction
  int model_phase;

  dds dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    real ang;
    ang = 2.0 * 3.14159265358979 * real'(model_phase) / real'(LEN);
    checks += 3;
    if (int'(phase) != model_phase) begin failures++; $display("FAIL: phase %0d expected %0d", phase, model_phase); end
    if (rabs(real'(sin_o) - 32767.0 * $sin(ang)) > 1.0) begin failures++; $display("FAIL: sin at %0d = %0d", model_phase, sin_o); end
    if (rabs(real'(cos_o) - 32767.0 * $cos(ang)) > 1.0) begin failures++; $display("FAIL: cos at %0d = %0d", model_phase, cos_o); end
  endtask

  int steps [6] = '{19, 15, 38, 30, 1, 655};
  initial begin
    step = 10'd19;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    model_phase = 0;
    foreach (steps[s]) begin
      step <= 10'(steps[s]);
      for (int n = 0; n < 700; n++) begin
        advance <= ($urandom_range(0, 3) != 0);
        clear   <= (s == 3 && n == 100);
        #1;
        @(negedge clk);
        compare();
        @(posedge clk);
        #1;
        if (clear) model_phase = 0;
        else if (advance) model_phase = (model_phase + steps[s]) % LEN;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
