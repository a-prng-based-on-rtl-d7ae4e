// chaotic_prng: pseudo-random number generator built on a logistic map that
// perturbs itself.
//
// A register holds the chaotic word x_n. Each enabled cycle:
//   * the processing block turns x_n into the modified word x'_n (a running
//     J-K toggle over the bits of x_n, XORed with the LSB of x_n); x'_n is
//     the generator's output;
//   * the perturbation controller ANDs every second bit of x_n; if all are 1
//     (C = 1) the map is fed the perturbation word P_n, the LSBs of the last
//     M words, otherwise it is fed x'_n;
//   * the logistic map computes r*y*(1-y) of the selected word, which becomes
//     x_{n+1};
//   * the shift register takes the LSB of x_n and the J-K state moves on.
// So  x_{n+1} = r*x'_n*(1-x'_n) if C = 0,  r*P_n*(1-P_n) if C = 1.
//
// That structure follows the published circuit. Feeding the map with x'_n
// rather than x_n when C = 0 is a reading of it (FEEDBACK_MODIFIED = 1); with
// FEEDBACK_MODIFIED = 0 the map is fed x_n, the other reading. The load port,
// the reset values, the output register and the fixed-point formats are this
// design's choices.
//
// Interface and timing: `load` (one cycle) stores `seed` as x_0 and clears the
// shift register and J-K state. Each cycle with `en` = 1 afterwards
// advances the map by one step; the x'_n of that step appears on `rnd` one
// cycle later with `rnd_valid` = 1, i.e. one M-bit word per clock with one
// cycle of latency. `perturbed` tells whether that step used P_n. `r` should
// be held steady while running. The all-zero state is a fixed point
// (x = 0 maps to 0): do not seed with 0.
module chaotic_prng #(
  parameter int unsigned          M                 = prng_pkg::M_DEFAULT,
  parameter int unsigned          R_INT_BITS        = prng_pkg::R_INT_BITS,
  parameter prng_pkg::slice_sel_e SLICE             = prng_pkg::SLICE_EVEN,
  parameter bit                   FEEDBACK_MODIFIED = 1'b1
) (
  input  logic         clk,
  input  logic         rst,        // synchronous, active high
  input  logic         load,       // store seed as x_0
  input  logic [M-1:0] seed,       // x_0, U(1).(M-1), nonzero
  input  logic [M-1:0] r,          // control parameter, U(R_INT_BITS).(M-R_INT_BITS)
  input  logic         en,         // advance one step
  output logic [M-1:0] rnd,        // x'_n, one word per enabled cycle
  output logic         rnd_valid,
  output logic         perturbed,  // the step that produced rnd used P_n
  output logic [M-1:0] state       // x_n (for observation)
);
  logic [M-1:0] x_q;
  logic [M-1:0] x_mod, fb_word, map_in, x_next;
  logic         c;
  logic         advance;

  assign advance = en && !load;
  assign state   = x_q;

  processing_block #(.M(M)) u_proc (
    .clk     (clk),
    .rst     (rst),
    .clear   (load),
    .advance (advance),
    .x_in    (x_q),
    .x_mod   (x_mod),
    .jk_q    ()
  );

  assign fb_word = FEEDBACK_MODIFIED ? x_mod : x_q;

  perturbation_block #(.M(M), .SLICE(SLICE)) u_pert (
    .clk     (clk),
    .rst     (rst),
    .clear   (load),
    .advance (advance),
    .x_in    (x_q),
    .x_mod   (fb_word),
    .map_in  (map_in),
    .p_word  (),
    .perturb (c)
  );

  logistic_map #(.M(M), .R_INT_BITS(R_INT_BITS)) u_map (
    .y      (map_in),
    .r      (r),
    .x_next (x_next)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      x_q       <= '0;
      rnd       <= '0;
      rnd_valid <= 1'b0;
      perturbed <= 1'b0;
    end else if (load) begin
      x_q       <= seed;
      rnd_valid <= 1'b0;
      perturbed <= 1'b0;
    end else if (en) begin
      x_q       <= x_next;
      rnd       <= x_mod;
      rnd_valid <= 1'b1;
      perturbed <= c;
    end else begin
      rnd_valid <= 1'b0;
    end
  end

  // Handshake rules: a step taken yields a valid word on the next cycle, a
  // load yields none and leaves the seed in the state register.
  a_step_gives_word: assert property (@(posedge clk) disable iff (rst)
    (en && !load) |=> rnd_valid);
  a_load_no_word: assert property (@(posedge clk) disable iff (rst)
    load |=> (!rnd_valid && state == $past(seed)));
endmodule
