// Shared constants and types of the S-FSK modem.
//
// The modem transmits one bit per symbol period T as one of two tones f0
// (bit 0) and f1 (bit 1). Tones are produced by a direct digital synthesizer
// that reads a one-period sine table of LUT_LEN entries with an integer step
// k, so f = k * fs / LUT_LEN. The transmitter runs at fs with SPB_TX samples
// per bit; the receiver samples at fs / ADC_DIV with SPB_RX samples per bit.
// The numbers below are the design's defaults: 656 table entries of 16 bits,
// 320 transmit samples per bit, ADC at half the DAC rate (160 samples per
// bit), a 32-symbol preamble and a log-Bessel approximation over 8 intervals.
// Widths of the receiver arithmetic are this design's own choice.
package sfsk_pkg;

  // Synthesizer
  localparam int unsigned LUT_LEN   = 656;  // sine table length N
  localparam int unsigned SAMPLE_W  = 16;   // table, DAC and ADC sample width
  localparam int unsigned SPB_TX    = 320;  // DAC samples per bit
  localparam int unsigned ADC_DIV   = 2;    // M = fs / f_ADC
  localparam int unsigned SPB_RX    = SPB_TX / ADC_DIV; // ADC samples per bit

  // Receiver
  localparam int unsigned PREAMBLE_LEN = 32;   // P
  localparam int unsigned ACC_W        = 26;   // correlator accumulator width
  localparam int unsigned G_SEGMENTS   = 8;    // intervals of g()
  localparam int unsigned X_W          = 32;   // g() argument, unsigned Q24.8
  localparam int unsigned X_FRAC       = 8;
  localparam int unsigned METRIC_W     = 48;   // log-likelihood values, signed Q.16
  localparam int unsigned METRIC_FRAC  = 16;

  // Table 1: step indices for 9.6 kbit/s, f = k * 4.8 kHz
  localparam int unsigned K0_DEFAULT = 19;  // f0 = 91.2 kHz
  localparam int unsigned K1_DEFAULT = 15;  // f1 = 72.0 kHz

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Phase of the receiver's symbol processing
  typedef enum logic [1:0] {
    RX_IDLE     = 2'd0,  // not receiving
    RX_PREAMBLE = 2'd1,  // collecting the P preamble symbols
    RX_DATA     = 2'd2   // deciding payload bits
  } rx_phase_e;

endpackage
