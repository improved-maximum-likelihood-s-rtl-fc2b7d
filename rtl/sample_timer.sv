// Sample strobes of the modem.
//
// `tx_en` is high for one cycle every CLKS_PER_SAMPLE clock cycles: it is the
// DAC sample rate fs. `rx_en` is high together with every ADC_DIV-th `tx_en`:
// it is the ADC sample rate f_ADC = fs / ADC_DIV. With the default of one
// clock per sample the modem clock is fs itself. The ratio ADC_DIV = 2
// between the two rates follows the design; deriving both from one counter
// chain, and the clock-to-sample ratio, are this design's choices.
module sample_timer #(
  parameter int unsigned CLKS_PER_SAMPLE = 1,
  parameter int unsigned ADC_DIV         = sfsk_pkg::ADC_DIV,
  localparam int unsigned CW = (CLKS_PER_SAMPLE > 1) ? $clog2(CLKS_PER_SAMPLE) : 1,
  localparam int unsigned DW = (ADC_DIV > 1) ? $clog2(ADC_DIV) : 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic tx_en,
  output logic rx_en
);

  logic [CW-1:0] clk_cnt;
  logic [DW-1:0] div_cnt;

  assign tx_en = (clk_cnt == CW'(CLKS_PER_SAMPLE - 1));
  assign rx_en = tx_en && (div_cnt == DW'(ADC_DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clk_cnt <= '0;
      div_cnt <= '0;
    end else begin
      clk_cnt <= tx_en ? '0 : clk_cnt + 1'b1;
      if (tx_en)
        div_cnt <= rx_en ? '0 : div_cnt + 1'b1;
    end
  end

endmodule
