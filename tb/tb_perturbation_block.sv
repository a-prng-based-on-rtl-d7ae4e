// tb_perturbation_block: self-checking test of the perturbation block.
// Drives random x_n and x'_n words (forcing the controller to fire now and
// then) and checks that the map input is x'_n when C = 0 and P_n when C = 1,
// where P_n is modelled as the LSBs of the previously advanced words.
module tb_perturbation_block;
  localparam int unsigned M = 24;

  logic clk = 1'b0, rst, clear, advance;
  logic [M-1:0] x_in, x_mod, map_in, p_word;
  logic perturb;
  int checks = 0, failures = 0;
  int n_pert = 0, n_pass = 0;
  logic [M-1:0] model_p;

  perturbation_block dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_c;
    rst = 1'b1; clear = 1'b0; advance = 1'b0; x_in = '0; x_mod = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    model_p = '0;
    for (int i = 0; i < 4000; i++) begin
      x_in    = M'($urandom) | (($urandom_range(0, 3) == 0) ? 24'h555555 : 24'h0);
      x_mod   = M'($urandom);
      advance = ($urandom_range(0, 4) != 0);
      #1;
      exp_c = &{x_in[22], x_in[20], x_in[18], x_in[16], x_in[14], x_in[12],
                x_in[10], x_in[8],  x_in[6],  x_in[4],  x_in[2],  x_in[0]};
      checks++;
      if (perturb !== exp_c || p_word !== model_p ||
          map_in !== (exp_c ? model_p : x_mod)) begin
        failures++;
        $display("FAIL %0d: C=%b/%b P=%h/%h map_in=%h", i, perturb, exp_c, p_word, model_p, map_in);
      end
      if (exp_c) n_pert++; else n_pass++;
      @(posedge clk); #1;
      if (advance) model_p = {x_in[0], model_p[M-1:1]};
    end
    checks++;
    if (n_pert == 0 || n_pass == 0) begin failures++; $display("FAIL a mux input never selected"); end
    $display("perturbations=%0d pass-through=%0d", n_pert, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
