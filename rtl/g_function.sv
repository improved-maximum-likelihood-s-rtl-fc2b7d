// Piecewise linear approximation g(X) of ln(I0(X)).
//
// I0 is the modified Bessel function of the first kind, order zero; ln I0
// is the nonlinear part of the log-likelihood of a Rician envelope. The
// argument range is split at X = 0, 2, 4, 8, ..., 2^SEGMENTS into SEGMENTS
// intervals; on interval j, g(X) = A_j * X + B_j, with A_j and B_j chosen so
// that g equals ln I0 at both ends of the interval. Above 2^SEGMENTS the last
// segment is extended (ln I0 is close to linear there).
//
// Number formats: X is unsigned with X_FRAC fraction bits; A_j is unsigned
// Q1.15 (16 bits) and B_j signed Q16.16 (32 bits); g is signed with
// METRIC_FRAC = 16 fraction bits. The coefficients are computed at
// elaboration: ln I0(x) from its power series sum_k ((x/2)^k / k!)^2, then
//   A_j = (ln I0(x_{j+1}) - ln I0(x_j)) / (x_{j+1} - x_j),  B_j = ln I0(x_j) - A_j x_j,
// both rounded to their formats. The result is combinational. The breakpoints,
// the 8 intervals and the 16/32-bit coefficients follow the design; the
// extension above the last breakpoint and the rounding are this design's.
module g_function #(
  parameter int unsigned SEGMENTS    = sfsk_pkg::G_SEGMENTS,
  parameter int unsigned X_W         = sfsk_pkg::X_W,
  parameter int unsigned X_FRAC      = sfsk_pkg::X_FRAC,
  parameter int unsigned METRIC_W    = sfsk_pkg::METRIC_W,
  localparam int unsigned SEG_W      = $clog2(SEGMENTS)
) (
  input  logic [X_W-1:0]              x,
  output logic signed [METRIC_W-1:0]  g,
  output logic [SEG_W-1:0]            seg
);

  localparam int unsigned A_FRAC = 15;
  localparam int unsigned B_FRAC = 16;   // equals the metric's fraction bits

  typedef logic [15:0]        a_table_t [SEGMENTS];
  typedef logic signed [31:0] b_table_t [SEGMENTS];

  function automatic real ln_i0(real xv);
    real term, sum;
    term = 1.0;
    sum  = 1.0;
    for (int k = 1; k < 2000; k++) begin
      term = term * (xv / 2.0) * (xv / 2.0) / (real'(k) * real'(k));
      sum  = sum + term;
      if (term < sum * 1.0e-18) break;
    end
    return $ln(sum);
  endfunction

  function automatic real breakpoint(int j);
    return (j == 0) ? 0.0 : real'(longint'(1) << j);
  endfunction

  function automatic real slope(int j);
    return (ln_i0(breakpoint(j + 1)) - ln_i0(breakpoint(j))) / (breakpoint(j + 1) - breakpoint(j));
  endfunction

  function automatic a_table_t make_a();
    a_table_t t;
    for (int j = 0; j < SEGMENTS; j++)
      t[j] = 16'($rtoi($floor(slope(j) * real'(1 << A_FRAC) + 0.5)));
    return t;
  endfunction

  function automatic b_table_t make_b();
    b_table_t t;
    real b;
    for (int j = 0; j < SEGMENTS; j++) begin
      b    = ln_i0(breakpoint(j)) - slope(j) * breakpoint(j);
      t[j] = 32'($rtoi($floor(b * real'(1 << B_FRAC) + 0.5)));
    end
    return t;
  endfunction

  localparam a_table_t A = make_a();
  localparam b_table_t B = make_b();

  localparam int unsigned SHIFT = A_FRAC + X_FRAC - B_FRAC;

  logic [X_W-X_FRAC-1:0]   xi;
  logic [X_W+15:0]         prod;

  // Interval index: 0 below 2, else floor(log2(integer part)), capped at
  // the last interval.
  always_comb begin
    xi  = x[X_W-1:X_FRAC];
    seg = '0;
    for (int j = 1; j < SEGMENTS; j++)
      if (xi >= (X_W - X_FRAC)'(longint'(1) << j))
        seg = SEG_W'(j);
  end

  always_comb begin
    prod = (X_W + 16)'(x) * (X_W + 16)'(A[seg]);
    g    = METRIC_W'(signed'({1'b0, prod >> SHIFT})) + METRIC_W'(B[seg]);
  end

endmodule
