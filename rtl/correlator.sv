// Correlator of the received signal with one reference tone over one bit.
//
// On every `en` the product of the received sample `x` and the reference
// sample `ref_s` is scaled back by REF_W-1 bits (the reference is a Q1.(REF_W-1)
// table value) and accumulated. `first` marks the first sample of a bit: it
// starts a new sum instead of adding. `last` marks the final sample: the
// completed sum is copied to `result` and `result_valid` is high for one
// cycle in the following cycle. One multiply and one add per sample, as in a
// read-multiply-accumulate loop; the scaling and ACC_W are this design's
// choice (ACC_W must hold SPB * 2^(X_W-1) without overflow).
module correlator #(
  parameter int unsigned X_W   = sfsk_pkg::SAMPLE_W,
  parameter int unsigned REF_W = sfsk_pkg::SAMPLE_W,
  parameter int unsigned ACC_W = sfsk_pkg::ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [X_W-1:0]    x,
  input  logic signed [REF_W-1:0]  ref_s,
  output logic signed [ACC_W-1:0]  result,
  output logic                     result_valid
);

  logic signed [X_W+REF_W-1:0] prod;
  logic signed [ACC_W-1:0]     term;
  logic signed [ACC_W-1:0]     acc;
  logic signed [ACC_W-1:0]     acc_next;

  always_comb begin
    prod     = x * ref_s;
    term     = ACC_W'(prod >>> (REF_W - 1));
    acc_next = (first ? '0 : acc) + term;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc          <= '0;
      result       <= '0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= en && last;
      if (en) begin
        acc <= acc_next;
        if (last)
          result <= acc_next;
      end
    end
  end

endmodule
