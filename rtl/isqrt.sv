// Sequential integer square root: root = floor(sqrt(radicand)).
//
// Digit-by-digit (restoring) method, one result bit per cycle, most
// significant first. A `start` pulse loads the radicand; `done` is high for
// one cycle, HW + 1 cycles after the start cycle (HW = W/2 rounded up), with `root` valid and held
// until the next start. `busy` is high in between. A start while busy
// restarts the computation.
module isqrt #(
  parameter int unsigned W  = 52,
  localparam int unsigned HW = (W + 1) / 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   radicand,
  output logic [HW-1:0]  root,
  output logic           busy,
  output logic           done
);

  localparam int unsigned EW = 2 * HW;
  localparam int unsigned SW = $clog2(HW + 1);

  logic [EW-1:0] rem_bits;   // radicand bits not yet consumed
  logic [HW+1:0] rem;        // partial remainder
  logic [SW-1:0] steps;
  logic [HW+1:0] trial;
  logic [HW+1:0] shifted;

  always_comb begin
    shifted = {rem[HW-1:0], rem_bits[EW-1 -: 2]};
    trial   = {root, 2'b01};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rem_bits <= '0;
      rem      <= '0;
      root     <= '0;
      steps    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        rem_bits <= EW'(radicand);
        rem      <= '0;
        root     <= '0;
        steps    <= SW'(HW);
        busy     <= 1'b1;
      end else if (busy) begin
        rem_bits <= rem_bits << 2;
        if (shifted >= trial) begin
          rem  <= shifted - trial;
          root <= {root[HW-2:0], 1'b1};
        end else begin
          rem  <= shifted;
          root <= {root[HW-2:0], 1'b0};
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
