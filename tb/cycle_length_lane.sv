// cycle_length_lane: testbench helper that runs one generator of width M
// from the seed 0.3 with control parameter R_X1000/1000, checks its first
// output words against the bit-level reference model, and measures the
// cycle length of its complete state (x_n, shift register, J-K flip-flop)
// with a cycle_meter, up to CAP steps. A cycle that is found is confirmed by
// running exactly that many further steps and comparing the state.
module cycle_length_lane #(
  parameter int M       = 24,
  parameter int R_X1000 = 3900,
  parameter longint CAP = 4_000_000
) (
  input  logic   clk,
  output logic   done,
  output int     checks,
  output int     failures,
  output logic   found,
  output longint cycle_len
);
  import prng_ref_pkg::*;
  localparam int RI = 3;
  localparam int W  = 2*M + 1;

  logic rst, load, en, rnd_valid, perturbed;
  logic [M-1:0] seed, r, rnd, state;
  logic start;
  longint steps;
  logic [W-1:0] full_state;

  chaotic_prng #(.M(M)) dut (
    .clk, .rst, .load, .seed, .r, .en, .rnd, .rnd_valid, .perturbed, .state
  );

  assign full_state = {dut.x_q, dut.u_pert.u_sreg.p_out, dut.u_proc.jk_q};

  cycle_meter #(.W(W)) meter (
    .clk, .start, .step(en), .st(full_state), .found, .cycle_len, .steps
  );

  prng_ref #(M, RI, 1'b0, 1'b1) ref_m;

  initial begin
    longint unsigned exp_word;
    logic [W-1:0] snap;
    ref_m = new();
    done = 1'b0; checks = 0; failures = 0;
    rst = 1'b1; load = 1'b0; en = 1'b0; start = 1'b0;
    seed = M'(longint'(0.3 * (2.0 ** (M-1))));
    r    = M'(longint'((real'(R_X1000) / 1000.0) * (2.0 ** (M-RI))));
    ref_m.r = 64'(r);
    @(posedge clk); #1;
    rst = 1'b0; load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0; en = 1'b1; start = 1'b1;
    ref_m.load(64'(seed));
    exp_word = ref_m.step();
    @(posedge clk); #1;
    start = 1'b0;
    for (int i = 1; i < 2000; i++) begin
      checks++;
      if (!rnd_valid || 64'(rnd) != exp_word) begin
        failures++;
        if (failures < 5) $display("FAIL M=%0d word %0d: got %h exp %h", M, i, rnd, exp_word);
      end
      exp_word = ref_m.step();
      @(posedge clk); #1;
    end
    while (!found && steps < CAP) @(posedge clk);
    #1;
    if (found) begin
      snap = full_state;
      for (longint i = 0; i < cycle_len; i++) @(posedge clk);
      #1;
      checks++;
      if (full_state !== snap) begin
        failures++;
        $display("FAIL M=%0d: state did not return after %0d steps", M, cycle_len);
      end
    end
    en = 1'b0;
    done = 1'b1;
  end
endmodule
