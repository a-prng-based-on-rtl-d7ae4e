// perturb_controller: decides the perturbation moments.
//
// A slice takes every second bit of the chaotic word x_n (the even positions
// 0,2,4,... by default, or the odd ones) and an AND gate combines them: the
// output C is 1 only when all sliced bits are 1. Because x_n is chaotic, these
// moments come at irregular, data-dependent intervals, with no outside source.
// The published circuit allows either odd or even positions. Even is the
// default here because with 1 integer bit the MSB of x_n is set only when
// r*y*(1-y) >= 1, which for r < 4 does not happen without wrap-around; an odd
// slice would include it and almost never fire.
//
// Interface: combinational, x_in (M bits) in, perturb (C) out.
module perturb_controller #(
  parameter int unsigned         M     = prng_pkg::M_DEFAULT,
  parameter prng_pkg::slice_sel_e SLICE = prng_pkg::SLICE_EVEN
) (
  input  logic [M-1:0] x_in,
  output logic         perturb
);
  localparam int unsigned FIRST = (SLICE == prng_pkg::SLICE_ODD) ? 1 : 0;
  localparam int unsigned NSEL  = (M - FIRST + 1) / 2;

  logic [NSEL-1:0] sliced;

  always_comb begin
    for (int i = 0; i < NSEL; i++) sliced[i] = x_in[FIRST + 2*i];
    perturb = &sliced;
  end
endmodule
