// S-FSK power-line modem, digital part: transmitter and improved ML receiver.
//
// Spread frequency shift keying sends each bit as one of two tones placed far
// apart in the CENELEC-A band (f0 for 0, f1 for 1), so that each tone sees its
// own channel gain and noise. The receiver estimates both channels from a
// known preamble and weights each by its quality when deciding, which keeps
// the error rate low when one tone is attenuated or jammed.
//
// Blocks: `sample_timer` makes the DAC strobe (fs) and the ADC strobe
// (fs / ADC_DIV); `sfsk_modulator` turns bits into DAC samples from a sine
// table; `sfsk_demodulator` turns ADC samples back into bits. The step
// indices k0, k1 set the tones, f_i = k_i * fs / LUT_LEN, for both directions.
// With the default clock of one cycle per DAC sample, a clock of 3.072 MHz
// gives 320 samples per bit, i.e. 9.6 kbit/s.
//
// Ports outside the digital part: `dac_sample` / `dac_valid` go to the DAC and
// line driver; the ADC is read on `adc_sample`, sampled at each `adc_strobe`
// (the value must be present in that cycle). `rx_start` marks a bit border
// at the beginning of a received packet, as found by the mains zero-crossing
// synchronisation, and `rx_stop` ends reception. The analog front end, the
// mains coupling, the host link and the physical-layer frame handling sit
// outside this module. Both directions may run at once, which a test can use
// to loop the DAC back to the ADC; the half-duplex line discipline is left to
// the controller that drives these ports.
module sfsk_modem #(
  parameter int unsigned LEN             = sfsk_pkg::LUT_LEN,
  parameter int unsigned WIDTH           = sfsk_pkg::SAMPLE_W,
  parameter int unsigned SPB_TX          = sfsk_pkg::SPB_TX,
  parameter int unsigned ADC_DIV         = sfsk_pkg::ADC_DIV,
  parameter int unsigned P               = sfsk_pkg::PREAMBLE_LEN,
  parameter int unsigned CLKS_PER_SAMPLE = 1,
  localparam int unsigned AW             = $clog2(LEN),
  localparam int unsigned RSQ_W          = 2 * sfsk_pkg::ACC_W,
  localparam int unsigned SEG_W          = $clog2(sfsk_pkg::G_SEGMENTS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // tone configuration
  input  logic [AW-1:0]            k0,
  input  logic [AW-1:0]            k1,
  // transmit bits
  input  logic                     tx_bit_valid,
  output logic                     tx_bit_ready,
  input  logic                     tx_bit_data,
  output logic                     tx_busy,
  // DAC
  output logic signed [WIDTH-1:0]  dac_sample,
  output logic                     dac_valid,
  // ADC
  output logic                     adc_strobe,
  input  logic signed [WIDTH-1:0]  adc_sample,
  // receive control and bits
  input  logic                     rx_start,
  input  logic                     rx_stop,
  output sfsk_pkg::rx_phase_e      rx_phase,
  output logic                     rx_est_valid,
  output logic [RSQ_W-1:0]         rx_sigma2_0,
  output logic [RSQ_W-1:0]         rx_sigma2_1,
  output logic [RSQ_W-1:0]         rx_mu2_0,
  output logic [RSQ_W-1:0]         rx_mu2_1,
  output logic                     rx_bit_valid,
  output logic                     rx_bit_data,
  output logic [SEG_W-1:0]         rx_seg0,
  output logic [SEG_W-1:0]         rx_seg1,
  output logic                     rx_overrun
);

  logic tx_en, rx_en;

  sample_timer #(.CLKS_PER_SAMPLE(CLKS_PER_SAMPLE), .ADC_DIV(ADC_DIV)) u_timer (
    .clk, .rst_n, .tx_en, .rx_en);

  assign adc_strobe = rx_en;

  sfsk_modulator #(.LEN(LEN), .WIDTH(WIDTH), .SPB(SPB_TX)) u_mod (
    .clk, .rst_n, .sample_en(tx_en), .k0, .k1,
    .bit_valid(tx_bit_valid), .bit_ready(tx_bit_ready), .bit_data(tx_bit_data),
    .dac_sample, .dac_valid, .busy(tx_busy));

  sfsk_demodulator #(.LEN(LEN), .WIDTH(WIDTH), .SPB(SPB_TX / ADC_DIV), .ADC_DIV(ADC_DIV), .P(P)) u_demod (
    .clk, .rst_n, .k0, .k1, .adc_en(rx_en), .adc_sample, .rx_start, .rx_stop,
    .phase(rx_phase), .est_valid(rx_est_valid),
    .sigma2_0(rx_sigma2_0), .sigma2_1(rx_sigma2_1), .mu2_0(rx_mu2_0), .mu2_1(rx_mu2_1),
    .bit_valid(rx_bit_valid), .bit_data(rx_bit_data),
    .metric0(), .metric1(), .seg0(rx_seg0), .seg1(rx_seg1), .overrun(rx_overrun));

endmodule
