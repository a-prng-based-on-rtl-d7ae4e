// processing_block: the randomness-improving half of the circuit.
//
// Function: the word x_n is sent out bit-serially (parallel-to-serial, most
// significant bit first); each bit S drives both J and K of a J-K flip-flop,
// so the flip-flop toggles on every 1 bit and holds on every 0 bit. The
// flip-flop's output is XORed with the least significant bit of x_n and the
// resulting bits are collected again (serial-to-parallel, first bit to the
// MSB) into the modified word x'_n. The flip-flop is not cleared between
// words, so its state links consecutive words.
//
// Implementation: the published circuit runs the serial path on a faster
// clock. Here the M serial steps are unrolled into one combinational chain so
// that one word is processed per system clock, which keeps the stated
// throughput of M bits per cycle. Bit i of x'_n is
//     x'[i] = x[0] ^ q ^ (x[M-1] ^ ... ^ x[i+1])
// where q is the flip-flop state before the word: the flip-flop output is
// registered, so a bit sees only the bits sent before it. After the word the
// flip-flop holds q ^ parity(x). Bit order and the registered output are this
// design's choices.
//
// Interface: x_in and x_mod are M-bit words; x_mod is combinational from
// x_in and the stored flip-flop state. `advance` commits the word (updates
// the flip-flop) at the rising clock edge; `clear` or `rst` set it to 0.
module processing_block #(
  parameter int unsigned M = prng_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high
  input  logic         clear,    // synchronous clear of the J-K state
  input  logic         advance,  // consume x_in this cycle
  input  logic [M-1:0] x_in,     // x_n
  output logic [M-1:0] x_mod,    // x'_n
  output logic         jk_q      // J-K flip-flop state before this word
);
  // Flip-flop state seen by each serial step; q_chain[k] is the state when
  // bit M-1-k is on the serial line, q_chain[M] the state after the word.
  logic [M:0] q_chain;
  logic       lsb;

  assign lsb        = x_in[0];
  assign q_chain[0] = jk_q;

  for (genvar k = 0; k < M; k++) begin : g_serial_step
    assign x_mod[M-1-k] = lsb ^ q_chain[k];
    // J = K = S: toggle on 1, hold on 0
    assign q_chain[k+1] = x_in[M-1-k] ? ~q_chain[k] : q_chain[k];
  end

  always_ff @(posedge clk) begin
    if (rst || clear)  jk_q <= 1'b0;
    else if (advance)  jk_q <= q_chain[M];
  end
endmodule
