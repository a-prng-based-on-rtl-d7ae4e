// tb_randomness: runs the generator at its default size (M = 24) for each of
// the control parameters r = 0.2, 0.8, 1.2, 2.3, 3.2, 3.5 and 3.9, producing
// N_WORDS words per setting. Every word is checked against the reference
// model. For each r it prints simple statistics of the output bit stream:
// the fraction of ones, the lag-1 correlation coefficient of the words, and
// the period of the complete generator state if one occurs within the run.
// These are printed for information; the checks are the word comparisons.
module tb_randomness;
  import prng_ref_pkg::*;
  localparam int M       = 24;
  localparam int RI      = 3;
  localparam int N_WORDS = 100_000;

  logic clk = 1'b0, rst, load, en;
  logic [M-1:0] seed, r, rnd, state;
  logic rnd_valid, perturbed;
  logic meter_start, found;
  longint cycle_len, steps;
  int checks = 0, failures = 0;

  chaotic_prng dut (
    .clk, .rst, .load, .seed, .r, .en, .rnd, .rnd_valid, .perturbed, .state
  );

  cycle_meter #(.W(2*M+1)) meter (
    .clk, .start(meter_start), .step(en),
    .st({dut.x_q, dut.u_pert.u_sreg.p_out, dut.u_proc.jk_q}),
    .found, .cycle_len, .steps
  );

  always #5 clk = ~clk;

  prng_ref #(M, RI, 1'b0, 1'b1) ref_m;

  initial begin
    repeat (8 * (N_WORDS + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real r_list[7] = '{0.2, 0.8, 1.2, 2.3, 3.2, 3.5, 3.9};
    longint unsigned exp_word;
    longint ones;
    real sum, sum2, sumlag, prev, v, mean, var_w, ac1;
    int n_pert;
    ref_m = new();
    rst = 1'b1; load = 1'b0; en = 1'b0; meter_start = 1'b0;
    seed = '0; r = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    foreach (r_list[k]) begin
      seed = M'(longint'(0.3 * (2.0 ** (M-1))));
      r    = M'(longint'(r_list[k] * (2.0 ** (M-RI))));
      ref_m.r = 64'(r);
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0; en = 1'b1; meter_start = 1'b1;
      ref_m.load(64'(seed));
      exp_word = ref_m.step();
      @(posedge clk); #1;
      meter_start = 1'b0;
      ones = 0; sum = 0; sum2 = 0; sumlag = 0; prev = 0; n_pert = 0;
      for (int i = 0; i < N_WORDS; i++) begin
        checks++;
        if (!rnd_valid || 64'(rnd) != exp_word) begin
          failures++;
          if (failures < 5) $display("FAIL r=%f word %0d: got %h exp %h", r_list[k], i, rnd, exp_word);
        end
        ones += $countones(rnd);
        v = real'(rnd) / (2.0 ** M);
        sum += v; sum2 += v * v;
        if (i > 0) sumlag += v * prev;
        prev = v;
        if (perturbed) n_pert++;
        exp_word = ref_m.step();
        @(posedge clk); #1;
      end
      en = 1'b0;
      mean  = sum / N_WORDS;
      var_w = sum2 / N_WORDS - mean * mean;
      ac1   = (var_w > 0.0) ? (sumlag / (N_WORDS - 1) - mean * mean) / var_w : 1.0;
      if (found)
        $display("r=%4.2f ones=%7.5f lag1=%8.5f perturbations=%0d period=%0d",
                 r_list[k], real'(ones) / (N_WORDS * M), ac1, n_pert, cycle_len);
      else
        $display("r=%4.2f ones=%7.5f lag1=%8.5f perturbations=%0d period>%0d",
                 r_list[k], real'(ones) / (N_WORDS * M), ac1, n_pert, N_WORDS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
