// tb_chaotic_prng_modes: end-to-end test of the generator's other settings:
// a 12-bit word, the odd-position slice in the perturbation controller, and
// the map fed with the unmodified x_n (FEEDBACK_MODIFIED = 0). Same procedure
// and reference model as the default-size test: every output word and
// perturbation flag is compared, stalls and reloads are exercised, and each
// mechanism must occur at least once.
module tb_chaotic_prng_modes;
  import prng_ref_pkg::*;
  localparam int M  = 12;
  localparam int RI = 3;

  logic clk = 1'b0, rst, load, en;
  logic [M-1:0] seed, r, rnd, state;
  logic rnd_valid, perturbed;
  int checks = 0, failures = 0;
  int n_pert = 0, n_normal = 0, n_stall = 0, n_reload = 0, n_jk = 0, n_words = 0;

  chaotic_prng #(
    .M(M), .R_INT_BITS(RI), .SLICE(prng_pkg::SLICE_ODD), .FEEDBACK_MODIFIED(1'b0)
  ) dut (
    .clk, .rst, .load, .seed, .r, .en, .rnd, .rnd_valid, .perturbed, .state
  );

  always #5 clk = ~clk;

  prng_ref #(M, RI, 1'b1, 1'b0) ref_m;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Load a seed, then run `steps` enabled cycles with random stalls.
  task automatic run(logic [M-1:0] s, real rr, int steps, bit stalls);
    longint unsigned exp_word;
    bit exp_c;
    int done = 0;
    seed = s;
    r    = M'(longint'(rr * (2.0 ** (M-RI))));
    ref_m.r = 64'(r);
    load = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    ref_m.load(64'(s));
    checks++;
    if (state !== s || rnd_valid !== 1'b0) fail($sformatf("load: state=%h", state));
    while (done < steps) begin
      en = !stalls || ($urandom_range(0, 4) != 0);
      if (!en) n_stall++;
      #1;
      checks++;
      if (64'(state) != ref_m.x) fail($sformatf("state %h exp %h", state, ref_m.x));
      if (en) begin
        if (ref_m.q) n_jk++;
        exp_word = ref_m.step();
        exp_c    = ref_m.last_c;
        if (exp_c) n_pert++; else n_normal++;
        done++;
      end
      @(posedge clk); #1;
      // the word of an enabled cycle appears right after that cycle's edge
      checks++;
      if (rnd_valid !== en) fail($sformatf("valid=%b en=%b", rnd_valid, en));
      if (en) begin
        n_words++;
        checks++;
        if (64'(rnd) != exp_word || perturbed !== exp_c)
          fail($sformatf("word: got %h/%b exp %h/%b", rnd, perturbed, exp_word, exp_c));
      end
    end
  endtask

  initial begin
    ref_m = new();
    rst = 1'b1; load = 1'b0; en = 1'b0; seed = '0; r = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (rnd_valid !== 1'b0 || state !== '0) fail("reset");

    // seed with every even bit set: the controller fires on the first step
    run(12'hAAA, 3.9, 200, 1'b0);
    // throughput: 1000 consecutive words in 1000 cycles
    run(12'h3F1, 3.99, 1000, 1'b0);
    run(12'hC3D, 3.9, 3000, 1'b1);
    n_reload++;
    run(12'hE1D, 3.7, 3000, 1'b1);
    n_reload++;
    run(12'hA5A, 1.2, 2000, 1'b1);
    n_reload++;
    run(12'hFFE, 0.2, 2000, 1'b1);
    n_reload++;
    run(12'hFFF, 4.0, 2000, 1'b1);
    n_reload++;
    run(12'h001, 2.3, 2000, 1'b1);
    n_reload++;
    for (int i = 0; i < 24; i++) begin
      run(12'($urandom) | 12'h1, 0.1 + 3.9 * real'($urandom_range(0, 1000)) / 1000.0, 1500, 1'b1);
      n_reload++;
    end

    $display("words=%0d perturbations=%0d normal=%0d jk_carry=%0d stalls=%0d reloads=%0d",
             n_words, n_pert, n_normal, n_jk, n_stall, n_reload);
    checks++; if (n_pert == 0)   fail("no perturbation moment");
    checks++; if (n_normal == 0) fail("no normal step");
    checks++; if (n_jk == 0)     fail("J-K state never carried a 1");
    checks++; if (n_stall == 0)  fail("no stall");
    checks++; if (n_reload == 0) fail("no reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
