// One period of a sine wave stored as a read-only table of LEN samples.
//
// Entry i holds round(AMP * sin(2*pi*i/LEN)), signed, WIDTH bits, with
// AMP = 2^(WIDTH-1) - 1. The table is computed at elaboration, so a change of
// LEN or WIDTH regenerates it. Two independent asynchronous read ports serve
// the sine and cosine outputs of a synthesizer (the cosine reads the same
// table a quarter period ahead). The 656 x 16-bit size is the design's
// default table; the two-port arrangement is this design's choice.
module sine_lut #(
  parameter int unsigned LEN   = 656,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = $clog2(LEN)
) (
  input  logic [AW-1:0]            addr_a,
  input  logic [AW-1:0]            addr_b,
  output logic signed [WIDTH-1:0]  data_a,
  output logic signed [WIDTH-1:0]  data_b
);

  typedef logic signed [WIDTH-1:0] table_t [LEN];

  function automatic table_t make_table();
    table_t t;
    real amp;
    amp = real'((1 << (WIDTH - 1)) - 1);
    for (int i = 0; i < LEN; i++)
      t[i] = WIDTH'($rtoi($floor(amp * $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(LEN)) + 0.5)));
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  assign data_a = (int'(addr_a) < LEN) ? TABLE[addr_a] : '0;
  assign data_b = (int'(addr_b) < LEN) ? TABLE[addr_b] : '0;

endmodule
