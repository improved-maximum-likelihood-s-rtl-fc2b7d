// S-FSK modulator: turns a bit stream into DAC samples of two tones.
//
// Each accepted bit occupies exactly SPB sample periods (one symbol period T).
// During a 0 the synthesizer steps by k0, during a 1 by k1, so the tone is
// f_i = k_i * fs / LEN with fs the rate of `sample_en`. The synthesizer phase
// is cleared when a transmission starts from idle and then runs on across bit
// boundaries, so the waveform has no phase jump when the bit changes.
//
// Interface: bits arrive on a valid/ready handshake. When idle, a bit is taken
// in any cycle; while transmitting, the next bit is taken in the cycle of the
// last sample of the current bit (ready is high only then), which keeps bits
// back to back. If no bit is offered then, the modulator returns to idle.
// Every `sample_en` while busy produces one registered sample on `dac_sample`
// with a one-cycle `dac_valid` in the following cycle.
// The table-based synthesis, the 320 samples per bit and the programmable
// step indices follow the design; the handshake is this design's choice.
module sfsk_modulator #(
  parameter int unsigned LEN   = sfsk_pkg::LUT_LEN,
  parameter int unsigned WIDTH = sfsk_pkg::SAMPLE_W,
  parameter int unsigned SPB   = sfsk_pkg::SPB_TX,
  localparam int unsigned AW   = $clog2(LEN),
  localparam int unsigned CW   = $clog2(SPB)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sample_en,
  input  logic [AW-1:0]            k0,
  input  logic [AW-1:0]            k1,
  input  logic                     bit_valid,
  output logic                     bit_ready,
  input  logic                     bit_data,
  output logic signed [WIDTH-1:0]  dac_sample,
  output logic                     dac_valid,
  output logic                     busy
);

  logic          cur_bit;
  logic [CW-1:0] cnt;
  logic          last;
  logic          load;
  logic          dds_clear;
  logic signed [WIDTH-1:0] sin_s, cos_s;

  assign last      = busy && sample_en && (cnt == CW'(SPB - 1));
  assign bit_ready = !busy || last;
  assign load      = bit_valid && bit_ready;
  assign dds_clear = !busy && bit_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cur_bit <= 1'b0;
      cnt     <= '0;
    end else begin
      if (busy && sample_en)
        cnt <= last ? '0 : cnt + 1'b1;
      if (load) begin
        busy    <= 1'b1;
        cur_bit <= bit_data;
      end else if (last) begin
        busy    <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dac_sample <= '0;
      dac_valid  <= 1'b0;
    end else begin
      dac_valid <= busy && sample_en;
      if (busy && sample_en)
        dac_sample <= sin_s;
    end
  end

  dds #(.LEN(LEN), .WIDTH(WIDTH)) u_dds (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (dds_clear),
    .advance (busy && sample_en),
    .step    (cur_bit ? k1 : k0),
    .phase   (),
    .sin_o   (sin_s),
    .cos_o   (cos_s)
  );

  no_accept_without_valid: assert property (@(posedge clk) disable iff (!rst_n) load |-> bit_valid);

endmodule
