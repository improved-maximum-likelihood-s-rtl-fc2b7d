// Improved maximum-likelihood bit decision for one S-FSK symbol.
//
// With the envelopes r0, r1 of the two channels and the per-packet estimates
// (mu_i, sigma_i^2 and c_i = mu_i^2 / sigma_i^2), the log-likelihood ratio of
// channel i is approximated as
//   l'_i = (2i - 1) * ( g(X_i) - c_i ),   X_i = 2 r_i mu_i / sigma_i^2,
// with g the piecewise linear ln I0. The likelihood of a 1 grows with l'_1
// and the likelihood of a 0 with -l'_0, so the unit computes the channel
// metrics m_i = g(X_i) - c_i and decides 1 when m1 > m0 (l'_0 + l'_1 > 0) and
// 0 otherwise (ties go to 0). A channel with a weak or noisy estimate gets a
// small X_i and so little weight, which is what lets the receiver rely on the
// better channel when the two are unbalanced.
//
// Timing: `start` latches the inputs and starts two dividers (one per channel)
// for X_i in Q.8, saturated to X_W bits; `done` pulses with `bit_o`, the
// metrics and the g-interval of each channel 2*ACC_W + 11 cycles after the
// start cycle, and
// they hold until the next start. The equations are the design's; the
// comparison form, the fixed-point formats and the saturation are this
// design's choices.
module ml_decision #(
  parameter int unsigned ACC_W    = sfsk_pkg::ACC_W,
  parameter int unsigned X_W      = sfsk_pkg::X_W,
  parameter int unsigned X_FRAC   = sfsk_pkg::X_FRAC,
  parameter int unsigned METRIC_W = sfsk_pkg::METRIC_W,
  parameter int unsigned SEGMENTS = sfsk_pkg::G_SEGMENTS,
  localparam int unsigned RSQ_W   = 2 * ACC_W,
  localparam int unsigned SEG_W   = $clog2(SEGMENTS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [ACC_W-1:0]            r0,
  input  logic [ACC_W-1:0]            r1,
  input  logic [ACC_W-1:0]            mu_0,
  input  logic [ACC_W-1:0]            mu_1,
  input  logic [RSQ_W-1:0]            sigma2_0,
  input  logic [RSQ_W-1:0]            sigma2_1,
  input  logic [METRIC_W-1:0]         c_0,
  input  logic [METRIC_W-1:0]         c_1,
  output logic                        busy,
  output logic                        done,
  output logic                        bit_o,
  output logic signed [METRIC_W-1:0]  metric0,
  output logic signed [METRIC_W-1:0]  metric1,
  output logic [SEG_W-1:0]            seg0,
  output logic [SEG_W-1:0]            seg1
);

  localparam int unsigned NUM_W = RSQ_W + 1 + X_FRAC;   // 2 r mu in Q.X_FRAC
  localparam logic [NUM_W-1:0] X_MAX = NUM_W'({X_W{1'b1}});

  logic [NUM_W-1:0] num0, num1, q0, q1;
  logic             d0_done, d1_done, d0_busy, d1_busy;
  logic             got0, got1;
  logic [X_W-1:0]   x0, x1;
  logic signed [METRIC_W-1:0] g0, g1, m0, m1;
  logic [SEG_W-1:0] s0, s1;
  logic [METRIC_W-1:0] c0_q, c1_q;

  assign num0 = NUM_W'({RSQ_W'(r0) * RSQ_W'(mu_0), 1'b0, X_FRAC'(0)});
  assign num1 = NUM_W'({RSQ_W'(r1) * RSQ_W'(mu_1), 1'b0, X_FRAC'(0)});

  divider #(.NW(NUM_W), .DW(RSQ_W)) u_div0 (.clk, .rst_n, .start, .num(num0), .den(sigma2_0), .quotient(q0), .busy(d0_busy), .done(d0_done));
  divider #(.NW(NUM_W), .DW(RSQ_W)) u_div1 (.clk, .rst_n, .start, .num(num1), .den(sigma2_1), .quotient(q1), .busy(d1_busy), .done(d1_done));

  assign x0 = X_W'((q0 > X_MAX) ? X_MAX : q0);
  assign x1 = X_W'((q1 > X_MAX) ? X_MAX : q1);

  g_function #(.SEGMENTS(SEGMENTS), .X_W(X_W), .X_FRAC(X_FRAC), .METRIC_W(METRIC_W)) u_g0 (.x(x0), .g(g0), .seg(s0));
  g_function #(.SEGMENTS(SEGMENTS), .X_W(X_W), .X_FRAC(X_FRAC), .METRIC_W(METRIC_W)) u_g1 (.x(x1), .g(g1), .seg(s1));

  assign m0 = g0 - signed'(c0_q);
  assign m1 = g1 - signed'(c1_q);

  // Both dividers have the same length, so they finish together; `got`
  // flags keep the unit correct should that ever change.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      got0    <= 1'b0;
      got1    <= 1'b0;
      bit_o   <= 1'b0;
      metric0 <= '0;
      metric1 <= '0;
      seg0    <= '0;
      seg1    <= '0;
      c0_q    <= '0;
      c1_q    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        got0 <= 1'b0;
        got1 <= 1'b0;
        c0_q <= c_0;
        c1_q <= c_1;
      end else if (busy) begin
        if (d0_done) got0 <= 1'b1;
        if (d1_done) got1 <= 1'b1;
        if ((got0 || d0_done) && (got1 || d1_done) && !d0_busy && !d1_busy) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          bit_o   <= (m1 > m0);
          metric0 <= m0;
          metric1 <= m1;
          seg0    <= s0;
          seg1    <= s1;
        end
      end
    end
  end

endmodule
