// Improved maximum-likelihood S-FSK receiver.
//
// The received signal is correlated, bit by bit, with four references:
// sin and cos of f0 and sin and cos of f1, each produced by a synthesizer
// reading the same sine table as the transmitter. Since the receiver samples
// at fs / ADC_DIV, its step index is ADC_DIV * k_i (mod LEN), which gives the
// same tone frequency. At the end of a bit the two correlations of each tone
// are combined into the envelope r_i and energy r_i^2 of that channel; the
// phase of the received carrier is not needed (noncoherent detection).
//
// A packet starts with a `rx_start` pulse, which marks the bit border: the
// next `adc_en` sample is the first sample of the first preamble symbol. The
// first P symbols are the known alternating preamble and go to the channel
// estimator, which derives noise power sigma_i^2 and signal amplitude mu_i
// for each channel. Every later symbol goes to the ML decision, and its bit
// appears on `bit_data` with a one-cycle `bit_valid`. `rx_stop` ends the
// packet. Finding the bit border (mains zero crossing and the correlation
// based bit-border adjustment) is outside this block.
//
// Timing: a bit is SPB ADC samples long. Its decision is ready
// ACC_W + 2*ACC_W + 12 cycles (about 92 at the defaults) after its last
// sample, or later for the first data bit if the estimates are still being
// computed. The per-bit work must finish before the next bit's correlations
// end, i.e. a bit must last more than about 100 clock cycles; the default
// clocking gives 320. `overrun` is set (sticky until `rx_start`) if it does
// not. The four correlators, the envelope, the estimation over P symbols and
// the g-based decision follow the design; the control and the rx_start /
// rx_stop interface are this design's choices.
module sfsk_demodulator #(
  parameter int unsigned LEN       = sfsk_pkg::LUT_LEN,
  parameter int unsigned WIDTH     = sfsk_pkg::SAMPLE_W,
  parameter int unsigned SPB       = sfsk_pkg::SPB_RX,
  parameter int unsigned ADC_DIV   = sfsk_pkg::ADC_DIV,
  parameter int unsigned P         = sfsk_pkg::PREAMBLE_LEN,
  parameter bit          FIRST_BIT = 1'b1,
  parameter int unsigned ACC_W     = sfsk_pkg::ACC_W,
  parameter int unsigned METRIC_W  = sfsk_pkg::METRIC_W,
  parameter int unsigned SEGMENTS  = sfsk_pkg::G_SEGMENTS,
  localparam int unsigned AW       = $clog2(LEN),
  localparam int unsigned RSQ_W    = 2 * ACC_W,
  localparam int unsigned SEG_W    = $clog2(SEGMENTS)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [AW-1:0]               k0,
  input  logic [AW-1:0]               k1,
  input  logic                        adc_en,
  input  logic signed [WIDTH-1:0]     adc_sample,
  input  logic                        rx_start,
  input  logic                        rx_stop,
  output sfsk_pkg::rx_phase_e         phase,
  output logic                        est_valid,
  output logic [RSQ_W-1:0]            sigma2_0,
  output logic [RSQ_W-1:0]            sigma2_1,
  output logic [RSQ_W-1:0]            mu2_0,
  output logic [RSQ_W-1:0]            mu2_1,
  output logic                        bit_valid,
  output logic                        bit_data,
  output logic signed [METRIC_W-1:0]  metric0,
  output logic signed [METRIC_W-1:0]  metric1,
  output logic [SEG_W-1:0]            seg0,
  output logic [SEG_W-1:0]            seg1,
  output logic                        overrun
);

  localparam int unsigned CW = $clog2(SPB);

  // Receiver step index: ADC_DIV * k mod LEN
  function automatic logic [AW-1:0] rx_step(logic [AW-1:0] k);
    logic [AW+7:0] s;
    s = (AW + 8)'(k) * (AW + 8)'(ADC_DIV);
    return AW'(s % (AW + 8)'(LEN));
  endfunction

  logic [CW-1:0] cnt;
  logic          active;
  logic          corr_en, corr_first, corr_last;
  logic signed [WIDTH-1:0] sin0, cos0, sin1, cos1;
  logic signed [ACC_W-1:0] c_s0, c_c0, c_s1, c_c1;
  logic          cv_s0, cv_c0, cv_s1, cv_c1;
  logic [RSQ_W-1:0] rsq0, rsq1;
  logic [ACC_W-1:0] r0, r1;
  logic          env0_done, env1_done, env0_busy, env1_busy;
  logic          collecting;
  logic [ACC_W-1:0]    mu_0, mu_1;
  logic [METRIC_W-1:0] c_0, c_1;
  logic          pending;      // a data symbol waits for the decision
  logic          dec_start, dec_busy, dec_done;

  assign active     = (phase != sfsk_pkg::RX_IDLE);
  assign corr_en    = active && adc_en;
  assign corr_first = (cnt == '0);
  assign corr_last  = (cnt == CW'(SPB - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= sfsk_pkg::RX_IDLE;
      cnt   <= '0;
    end else if (rx_start) begin
      phase <= sfsk_pkg::RX_PREAMBLE;
      cnt   <= '0;
    end else if (rx_stop) begin
      phase <= sfsk_pkg::RX_IDLE;
    end else begin
      if (corr_en)
        cnt <= corr_last ? '0 : cnt + 1'b1;
      if (phase == sfsk_pkg::RX_PREAMBLE && !collecting)
        phase <= sfsk_pkg::RX_DATA;
    end
  end

  // Reference synthesizers
  dds #(.LEN(LEN), .WIDTH(WIDTH)) u_dds0 (
    .clk, .rst_n, .clear(rx_start), .advance(corr_en), .step(rx_step(k0)),
    .phase(), .sin_o(sin0), .cos_o(cos0));
  dds #(.LEN(LEN), .WIDTH(WIDTH)) u_dds1 (
    .clk, .rst_n, .clear(rx_start), .advance(corr_en), .step(rx_step(k1)),
    .phase(), .sin_o(sin1), .cos_o(cos1));

  // Four correlators
  correlator #(.X_W(WIDTH), .REF_W(WIDTH), .ACC_W(ACC_W)) u_corr_s0 (
    .clk, .rst_n, .en(corr_en), .first(corr_first), .last(corr_last), .x(adc_sample), .ref_s(sin0), .result(c_s0), .result_valid(cv_s0));
  correlator #(.X_W(WIDTH), .REF_W(WIDTH), .ACC_W(ACC_W)) u_corr_c0 (
    .clk, .rst_n, .en(corr_en), .first(corr_first), .last(corr_last), .x(adc_sample), .ref_s(cos0), .result(c_c0), .result_valid(cv_c0));
  correlator #(.X_W(WIDTH), .REF_W(WIDTH), .ACC_W(ACC_W)) u_corr_s1 (
    .clk, .rst_n, .en(corr_en), .first(corr_first), .last(corr_last), .x(adc_sample), .ref_s(sin1), .result(c_s1), .result_valid(cv_s1));
  correlator #(.X_W(WIDTH), .REF_W(WIDTH), .ACC_W(ACC_W)) u_corr_c1 (
    .clk, .rst_n, .en(corr_en), .first(corr_first), .last(corr_last), .x(adc_sample), .ref_s(cos1), .result(c_c1), .result_valid(cv_c1));

  // Envelopes
  envelope_detector #(.ACC_W(ACC_W)) u_env0 (
    .clk, .rst_n, .start(cv_s0 && active), .i_val(c_s0), .q_val(c_c0), .rsq(rsq0), .r(r0), .busy(env0_busy), .done(env0_done));
  envelope_detector #(.ACC_W(ACC_W)) u_env1 (
    .clk, .rst_n, .start(cv_s1 && active), .i_val(c_s1), .q_val(c_c1), .rsq(rsq1), .r(r1), .busy(env1_busy), .done(env1_done));

  // Preamble estimation
  channel_estimator #(.P(P), .FIRST_BIT(FIRST_BIT), .ACC_W(ACC_W), .METRIC_W(METRIC_W)) u_est (
    .clk, .rst_n, .clear(rx_start),
    .sym_valid(env0_done && phase == sfsk_pkg::RX_PREAMBLE),
    .r0sq(rsq0), .r1sq(rsq1),
    .collecting, .est_valid,
    .sigma2_0, .sigma2_1, .mu2_0, .mu2_1, .mu_0, .mu_1, .c_0, .c_1);

  // Decision
  assign dec_start = pending && est_valid && !dec_busy;

  ml_decision #(.ACC_W(ACC_W), .METRIC_W(METRIC_W), .SEGMENTS(SEGMENTS)) u_dec (
    .clk, .rst_n, .start(dec_start),
    .r0, .r1, .mu_0, .mu_1, .sigma2_0, .sigma2_1, .c_0, .c_1,
    .busy(dec_busy), .done(dec_done), .bit_o(bit_data),
    .metric0, .metric1, .seg0, .seg1);

  always_ff @(posedge clk) begin
    if (!rst_n || rx_start) begin
      pending   <= 1'b0;
      bit_valid <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      bit_valid <= dec_done && active;
      if (env0_done && phase == sfsk_pkg::RX_DATA)
        pending <= 1'b1;
      else if (dec_start)
        pending <= 1'b0;
      // A new symbol ended while the previous one is still in the envelope
      // or decision stage
      if (cv_s0 && active && (env0_busy || env1_busy || pending || dec_busy))
        overrun <= 1'b1;
    end
  end

  envelopes_in_step: assert property (@(posedge clk) disable iff (!rst_n) env0_done == env1_done);
  correlators_in_step: assert property (@(posedge clk) disable iff (!rst_n) (cv_s0 == cv_c0) && (cv_s0 == cv_s1) && (cv_s0 == cv_c1));

endmodule
