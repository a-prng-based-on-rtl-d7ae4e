// prng_pkg: constants shared by the self-perturbed logistic-map PRNG.
//
// The word width M = 24 is the precision the design is evaluated and
// synthesised at. All words (state x_n, modified output x'_n, perturbation
// word P_n) are unsigned fixed point with 1 integer bit and M-1 fraction bits
// (range [0,2)). The control parameter r uses 3 integer bits so that r = 4.0
// is representable; that split is this design's choice.
package prng_pkg;
  localparam int unsigned M_DEFAULT      = 24;  // word width (precision) in bits
  localparam int unsigned R_INT_BITS     = 3;   // integer bits of the control parameter r

  // Which bit positions of x_n the perturbation period controller ANDs.
  typedef enum logic {
    SLICE_EVEN = 1'b0,  // bits 0,2,4,...
    SLICE_ODD  = 1'b1   // bits 1,3,5,...
  } slice_sel_e;
endpackage
