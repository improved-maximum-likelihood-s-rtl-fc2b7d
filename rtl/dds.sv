// Direct digital synthesizer reading a one-period sine table.
//
// A phase index runs modulo LEN and advances by the step index `step` on every
// cycle where `advance` is high, so the output tone is f = step * f_sample / LEN
// for a sample rate f_sample equal to the rate of `advance`. `sin_o` is the
// table entry at the current index and `cos_o` the entry a quarter table
// (LEN/4) ahead; both are combinational from the index register, so the value
// seen in the cycle of an `advance` is the sample for that instant and the
// index moves after it. `clear` sets the index to zero (it wins over
// `advance`). `step` must be below LEN. The table lookup with an integer step
// follows the design; the quarter-period cosine read is this design's own way
// of producing the quadrature references. Reset is synchronous, active low.
module dds #(
  parameter int unsigned LEN   = 656,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(LEN)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     advance,
  input  logic [AW-1:0]            step,
  output logic [AW-1:0]            phase,
  output logic signed [WIDTH-1:0]  sin_o,
  output logic signed [WIDTH-1:0]  cos_o
);

  localparam int unsigned QUARTER = LEN / 4;

  logic [AW:0]   sum;
  logic [AW-1:0] next_phase;
  logic [AW:0]   cos_sum;
  logic [AW-1:0] cos_addr;

  always_comb begin
    sum        = {1'b0, phase} + {1'b0, step};
    next_phase = (sum >= (AW+1)'(LEN)) ? AW'(sum - (AW+1)'(LEN)) : sum[AW-1:0];
    cos_sum    = {1'b0, phase} + (AW+1)'(QUARTER);
    cos_addr   = (cos_sum >= (AW+1)'(LEN)) ? AW'(cos_sum - (AW+1)'(LEN)) : cos_sum[AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)        phase <= '0;
    else if (clear)    phase <= '0;
    else if (advance)  phase <= next_phase;
  end

  sine_lut #(.LEN(LEN), .WIDTH(WIDTH)) u_lut (
    .addr_a (phase),
    .addr_b (cos_addr),
    .data_a (sin_o),
    .data_b (cos_o)
  );

  step_below_len: assert property (@(posedge clk) disable iff (!rst_n) advance |-> int'(step) < LEN);

endmodule
