// Envelope of one S-FSK channel from its in-phase and quadrature correlations.
//
// A `start` pulse takes the sine-correlation `i_val` and cosine-correlation
// `q_val` of one bit, forms the energy rsq = i^2 + q^2 (registered in the
// same cycle) and starts a sequential square root for the envelope
// r = floor(sqrt(rsq)). `done` pulses when `r` is ready,
// ACC_W + 1 cycles after the cycle in which `start` is high; `rsq` and `r` hold until the next start. The
// quadrature sum follows the noncoherent receiver structure; computing the
// modulus with an exact integer square root is this design's choice.
module envelope_detector #(
  parameter int unsigned ACC_W = sfsk_pkg::ACC_W,
  localparam int unsigned RSQ_W = 2 * ACC_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [ACC_W-1:0]  i_val,
  input  logic signed [ACC_W-1:0]  q_val,
  output logic [RSQ_W-1:0]         rsq,
  output logic [ACC_W-1:0]         r,
  output logic                     busy,
  output logic                     done
);

  logic signed [RSQ_W-1:0] i_sq, q_sq;
  logic [RSQ_W-1:0]        energy;

  always_comb begin
    i_sq   = RSQ_W'(i_val) * RSQ_W'(i_val);
    q_sq   = RSQ_W'(q_val) * RSQ_W'(q_val);
    energy = RSQ_W'(i_sq) + RSQ_W'(q_sq);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     rsq <= '0;
    else if (start) rsq <= energy;
  end

  isqrt #(.W(RSQ_W)) u_sqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .radicand (energy),
    .root     (r),
    .busy     (busy),
    .done     (done)
  );

endmodule
