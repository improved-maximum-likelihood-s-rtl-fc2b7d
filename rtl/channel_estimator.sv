// Channel and noise estimation over the known preamble.
//
// The preamble is P symbols alternating between 1 and 0, the first one being
// FIRST_BIT. For each preamble symbol the estimator takes the energies
// r0^2 and r1^2 of the two channels and adds them to one of four sums,
// chosen by the symbol the preamble carries there:
//   sigma0^2 = (2/P) * sum of r0^2 over the 1-symbols  (channel 0 holds noise only)
//   sigma1^2 = (2/P) * sum of r1^2 over the 0-symbols
//   mu0^2    = | (2/P) * sum of r0^2 over the 0-symbols - sigma0^2 |
//   mu1^2    = | (2/P) * sum of r1^2 over the 1-symbols - sigma1^2 |
// After the P-th symbol it derives the quantities the decision needs once
// per packet: the amplitudes mu_i = floor(sqrt(mu_i^2)) and the constant
// terms c_i = mu_i^2 / sigma_i^2 of the log-likelihood, as Q.16 values
// saturated to METRIC_W-1 bits. Before that the noise estimate is floored
// at mu_i^2 / 2^SNR_CAP_LOG2 (and at 1), which caps the estimated SNR at
// 2^20 (60 dB) by default: beyond it the decision gains nothing, and the cap
// keeps c_i well inside the range of the decision's g(X) argument. The
// floored value is the sigma_i^2 output. All four run in parallel (two square roots,
// two dividers); `est_valid` rises about RSQ_W+16 cycles after the last
// preamble symbol and stays high until `clear`. `collecting` is high while
// preamble symbols are still expected.
// The estimator equations are the design's; P must be a power of two so
// that 2/P is a shift, and the fixed-point formats are this design's choice.
module channel_estimator #(
  parameter int unsigned P         = sfsk_pkg::PREAMBLE_LEN,
  parameter bit          FIRST_BIT = 1'b1,
  parameter int unsigned ACC_W     = sfsk_pkg::ACC_W,
  parameter int unsigned METRIC_W  = sfsk_pkg::METRIC_W,
  parameter int unsigned SNR_CAP_LOG2 = 20,
  localparam int unsigned RSQ_W    = 2 * ACC_W,
  localparam int unsigned SUM_W    = RSQ_W + $clog2(P),
  localparam int unsigned PW       = $clog2(P + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 sym_valid,
  input  logic [RSQ_W-1:0]     r0sq,
  input  logic [RSQ_W-1:0]     r1sq,
  output logic                 collecting,
  output logic                 est_valid,
  output logic [RSQ_W-1:0]     sigma2_0,
  output logic [RSQ_W-1:0]     sigma2_1,
  output logic [RSQ_W-1:0]     mu2_0,
  output logic [RSQ_W-1:0]     mu2_1,
  output logic [ACC_W-1:0]     mu_0,
  output logic [ACC_W-1:0]     mu_1,
  output logic [METRIC_W-1:0]  c_0,
  output logic [METRIC_W-1:0]  c_1
);

  localparam int unsigned SHIFT = $clog2(P) - 1;      // 2/P as a right shift
  localparam int unsigned NUM_W = RSQ_W + 16;          // mu^2 in Q.16
  localparam logic [NUM_W-1:0] C_MAX = {{(NUM_W - METRIC_W + 1){1'b0}}, {(METRIC_W - 1){1'b1}}};

  logic [SUM_W-1:0] s_r0_h1, s_r1_h0, s_r0_h0, s_r1_h1;
  logic [PW-1:0]    count;
  logic             sym_bit;
  logic             compute;
  logic [RSQ_W-1:0] sig1_0, sig1_1;   // noise estimates from the sums
  logic [RSQ_W-1:0] sig_0, sig_1;     // after the SNR cap
  logic [RSQ_W-1:0] m2_0, m2_1;
  logic [NUM_W-1:0] q0, q1;
  logic             sq0_busy, sq1_busy, dv0_busy, dv1_busy;
  logic             running;

  assign collecting = (count < PW'(P));
  assign sym_bit    = count[0] ? !FIRST_BIT : FIRST_BIT;
  assign compute    = sym_valid && collecting && (count == PW'(P - 1));

  // Estimates from the sums; the last symbol is folded in combinationally so
  // the square roots and divisions can start in the same cycle.
  always_comb begin
    logic [SUM_W-1:0] a, b, c, d;
    a = s_r0_h1; b = s_r1_h0; c = s_r0_h0; d = s_r1_h1;
    if (compute) begin
      if (sym_bit) begin a = a + SUM_W'(r0sq); d = d + SUM_W'(r1sq); end
      else         begin c = c + SUM_W'(r0sq); b = b + SUM_W'(r1sq); end
    end
    sig1_0 = RSQ_W'(a >> SHIFT);
    sig1_1 = RSQ_W'(b >> SHIFT);
    m2_0   = (RSQ_W'(c >> SHIFT) >= sig1_0) ? RSQ_W'(c >> SHIFT) - sig1_0 : sig1_0 - RSQ_W'(c >> SHIFT);
    m2_1   = (RSQ_W'(d >> SHIFT) >= sig1_1) ? RSQ_W'(d >> SHIFT) - sig1_1 : sig1_1 - RSQ_W'(d >> SHIFT);
    sig_0  = sig1_0;
    sig_1  = sig1_1;
    if (sig_0 < (m2_0 >> SNR_CAP_LOG2)) sig_0 = m2_0 >> SNR_CAP_LOG2;
    if (sig_1 < (m2_1 >> SNR_CAP_LOG2)) sig_1 = m2_1 >> SNR_CAP_LOG2;
    if (sig_0 == '0) sig_0 = RSQ_W'(1);
    if (sig_1 == '0) sig_1 = RSQ_W'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      s_r0_h1  <= '0;
      s_r1_h0  <= '0;
      s_r0_h0  <= '0;
      s_r1_h1  <= '0;
      count    <= '0;
      sigma2_0 <= '0;
      sigma2_1 <= '0;
      mu2_0    <= '0;
      mu2_1    <= '0;
      running  <= 1'b0;
    end else if (sym_valid && collecting) begin
      count <= count + 1'b1;
      if (sym_bit) begin
        s_r0_h1 <= s_r0_h1 + SUM_W'(r0sq);
        s_r1_h1 <= s_r1_h1 + SUM_W'(r1sq);
      end else begin
        s_r0_h0 <= s_r0_h0 + SUM_W'(r0sq);
        s_r1_h0 <= s_r1_h0 + SUM_W'(r1sq);
      end
      if (compute) begin
        sigma2_0 <= sig_0;
        sigma2_1 <= sig_1;
        mu2_0    <= m2_0;
        mu2_1    <= m2_1;
        running  <= 1'b1;
      end
    end
  end

  isqrt #(.W(RSQ_W)) u_sqrt0 (.clk, .rst_n, .start(compute), .radicand(m2_0), .root(mu_0), .busy(sq0_busy), .done());
  isqrt #(.W(RSQ_W)) u_sqrt1 (.clk, .rst_n, .start(compute), .radicand(m2_1), .root(mu_1), .busy(sq1_busy), .done());
  divider #(.NW(NUM_W), .DW(RSQ_W)) u_div0 (.clk, .rst_n, .start(compute), .num({m2_0, 16'd0}), .den(sig_0), .quotient(q0), .busy(dv0_busy), .done());
  divider #(.NW(NUM_W), .DW(RSQ_W)) u_div1 (.clk, .rst_n, .start(compute), .num({m2_1, 16'd0}), .den(sig_1), .quotient(q1), .busy(dv1_busy), .done());

  assign c_0 = METRIC_W'((q0 > C_MAX) ? C_MAX : q0);
  assign c_1 = METRIC_W'((q1 > C_MAX) ? C_MAX : q1);

  // The units start in the cycle `running` is set and are busy from the next
  // one, so the estimates are valid once none of them is busy any more.
  always_ff @(posedge clk) begin
    if (!rst_n || clear)                    est_valid <= 1'b0;
    else if (running && !dv0_busy && !dv1_busy && !sq0_busy && !sq1_busy)
                                            est_valid <= 1'b1;
  end

  p_is_power_of_two: assert property (@(posedge clk) (P & (P - 1)) == 0);

endmodule
