// Sequential unsigned divider: quotient = floor(num / den).
//
// Restoring long division, one quotient bit per cycle. A `start` pulse loads
// the operands; `done` is high for one cycle, NW + 1 cycles after the start
// cycle, with
// `quotient` valid and held until the next start. A zero divisor is treated
// as one, so the quotient is then the numerator.
module divider #(
  parameter int unsigned NW = 64,
  parameter int unsigned DW = 52
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NW-1:0]  num,
  input  logic [DW-1:0]  den,
  output logic [NW-1:0]  quotient,
  output logic           busy,
  output logic           done
);

  localparam int unsigned SW = $clog2(NW + 1);

  logic [DW-1:0] d;
  logic [DW:0]   rem;
  logic [DW:0]   shifted;
  logic [SW-1:0] steps;

  assign shifted = {rem[DW-1:0], quotient[NW-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d        <= '0;
      rem      <= '0;
      quotient <= '0;
      steps    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        d        <= (den == '0) ? DW'(1) : den;
        rem      <= '0;
        quotient <= num;       // numerator bits shift out as quotient bits shift in
        steps    <= SW'(NW);
        busy     <= 1'b1;
      end else if (busy) begin
        if (shifted >= {1'b0, d}) begin
          rem      <= shifted - {1'b0, d};
          quotient <= {quotient[NW-2:0], 1'b1};
        end else begin
          rem      <= shifted;
          quotient <= {quotient[NW-2:0], 1'b0};
        end
        steps <= steps - 1'b1;
        if (steps == SW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
