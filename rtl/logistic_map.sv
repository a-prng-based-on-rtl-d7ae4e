// logistic_map: one iteration of the digitised logistic map
//     x_next = r * y * (1 - y)
// computed in a single combinational step with two multipliers.
//
// y and x_next are unsigned fixed point with 1 integer bit and M-1 fraction
// bits. r has R_INT_BITS integer bits and M-R_INT_BITS fraction bits. The
// subtraction 1 - y and both products wrap modulo 2 (the integer bit is kept,
// higher bits are dropped) and the products are truncated, not rounded.
// Formats, wrap and truncation are this design's choices; the equation and
// the use of two multipliers follow the published circuit.
//
// Interface: y, r in; x_next out. Purely combinational, no latency.
module logistic_map #(
  parameter int unsigned M          = prng_pkg::M_DEFAULT,
  parameter int unsigned R_INT_BITS = prng_pkg::R_INT_BITS
) (
  input  logic [M-1:0] y,       // map input, U(1).(M-1)
  input  logic [M-1:0] r,       // control parameter, U(R_INT_BITS).(M-R_INT_BITS)
  output logic [M-1:0] x_next   // map output, U(1).(M-1)
);
  localparam int unsigned FRAC   = M - 1;
  localparam int unsigned R_FRAC = M - R_INT_BITS;

  localparam logic [M-1:0] ONE = M'(1) << FRAC;

  logic [M-1:0]   one_minus_y;
  logic [2*M-1:0] prod1;   // y * (1-y), 2*FRAC fraction bits
  logic [M-1:0]   t;       // y * (1-y) back in U(1).(M-1)
  logic [2*M-1:0] prod2;   // r * t, R_FRAC + FRAC fraction bits

  always_comb begin
    one_minus_y = ONE - y;
    prod1       = (2*M)'(y) * (2*M)'(one_minus_y);
    t           = prod1[FRAC +: M];
    prod2       = (2*M)'(r) * (2*M)'(t);
    x_next      = prod2[R_FRAC +: M];
  end
endmodule
