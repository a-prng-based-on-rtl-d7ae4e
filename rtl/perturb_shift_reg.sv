// perturb_shift_reg: M-bit shift register that builds the perturbation word.
//
// On every enabled rising edge it shifts right by one and loads the least
// significant bit of the chaotic word x_n into the most significant cell.
// The concatenated cells form P_n, so P_n holds the LSBs of the last M words
// (newest in the MSB). This follows the published circuit; the clear input and
// the reset value 0 are this design's choices.
//
// Interface: lsb_in is sampled when shift_en is 1; p_out is the register
// contents (P_n), valid the cycle after the shift.
module perturb_shift_reg #(
  parameter int unsigned M = prng_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,       // synchronous, active high
  input  logic         clear,     // synchronous clear
  input  logic         shift_en,
  input  logic         lsb_in,    // LSB of x_n
  output logic [M-1:0] p_out      // P_n
);
  always_ff @(posedge clk) begin
    if (rst || clear)   p_out <= '0;
    else if (shift_en)  p_out <= {lsb_in, p_out[M-1:1]};
  end
endmodule
