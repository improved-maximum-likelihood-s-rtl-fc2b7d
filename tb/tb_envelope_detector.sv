// Random and extreme in-phase/quadrature pairs; checks r^2 = I^2 + Q^2
// exactly, that r is the integer square root (r^2 <= r^2_in < (r+1)^2) and
// that `done` is high ACC_W + 1 cycles after the cycle in which start is high.
module tb_envelope_detector;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [25:0] i_val, q_val;
  logic [51:0] rsq;
  logic [25:0] r;
  logic busy, done;
  int checks = 0, failures = 0;

  envelope_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      longint signed iv, qv;
      longint unsigned e, rr;
      int lat;
      case (t)
        0: begin iv = 0; qv = 0; end
        1: begin iv = -(1 << 25); qv = -(1 << 25); end
        2: begin iv = (1 << 25) - 1; qv = 0; end
        3: begin iv = 3; qv = 4; end
        default: begin
          iv = longint'($signed(26'($urandom))) >>> $urandom_range(0, 20);
          qv = longint'($signed(26'($urandom))) >>> $urandom_range(0, 20);
        end
      endcase
      @(posedge clk);
      i_val <= 26'(iv); q_val <= 26'(qv); start <= 1;
      @(posedge clk);
      start <= 0;
      lat = 0;
      while (!done) begin @(posedge clk); lat++; end
      e  = longint'(iv * iv) + longint'(qv * qv);
      rr = longint'(r);
      checks += 3;
      if (rsq != 52'(e)) begin failures++; $display("FAIL: rsq %0d expected %0d", rsq, e); end
      if (!(rr * rr <= e && (rr + 1) * (rr + 1) > e)) begin failures++; $display("FAIL: r %0d for %0d", r, e); end
      if (lat != 27) begin failures++; $display("FAIL: latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
