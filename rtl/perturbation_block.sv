// perturbation_block: the cycle-length-extending half of the circuit.
//
// It holds the M-bit perturbation shift register and the perturbation period
// controller, and owns the multiplexer in front of the map: when the
// controller's output C is 0 the map is fed the word from the processing
// block (x'_n); when C is 1 it is fed the perturbation word P_n instead. The
// multiplexer output goes to the map reinterpreted as an unsigned number
// with 1 integer and M-1 fraction bits; in RTL that reinterpretation is only
// a change of meaning, not of bits. Structure and selection rule follow the
// published circuit.
//
// Interface: x_in is the current chaotic word x_n, x_mod the processed word
// x'_n. map_in and perturb are combinational; the shift register advances on
// `advance`, after the current P_n has been used.
module perturbation_block #(
  parameter int unsigned          M     = prng_pkg::M_DEFAULT,
  parameter prng_pkg::slice_sel_e SLICE = prng_pkg::SLICE_EVEN
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         advance,
  input  logic [M-1:0] x_in,     // x_n
  input  logic [M-1:0] x_mod,    // x'_n from the processing block
  output logic [M-1:0] map_in,   // word fed to the logistic map
  output logic [M-1:0] p_word,   // P_n
  output logic         perturb   // C
);
  perturb_shift_reg #(.M(M)) u_sreg (
    .clk      (clk),
    .rst      (rst),
    .clear    (clear),
    .shift_en (advance),
    .lsb_in   (x_in[0]),
    .p_out    (p_word)
  );

  perturb_controller #(.M(M), .SLICE(SLICE)) u_ctrl (
    .x_in    (x_in),
    .perturb (perturb)
  );

  assign map_in = perturb ? p_word : x_mod;
endmodule
