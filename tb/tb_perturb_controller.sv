// tb_perturb_controller: self-checking test of the perturbation period
// controller. For M = 8 every input word is tried with both slice choices;
// for M = 24 words with all sliced bits set, one sliced bit cleared, and
// random words are tried. The expected C is worked out by testing each bit
// position's parity.
module tb_perturb_controller;
  logic [7:0]  x8;
  logic [23:0] x24;
  logic c8e, c8o, c24;
  int checks = 0, failures = 0;

  perturb_controller #(.M(8),  .SLICE(prng_pkg::SLICE_EVEN)) dut8e  (.x_in(x8),  .perturb(c8e));
  perturb_controller #(.M(8),  .SLICE(prng_pkg::SLICE_ODD))  dut8o  (.x_in(x8),  .perturb(c8o));
  perturb_controller #(.M(24))                               dut24  (.x_in(x24), .perturb(c24));

  function automatic logic model(logic [31:0] x, int m, bit odd);
    logic all_ones = 1'b1;
    for (int i = 0; i < m; i++)
      if ((i % 2 == 1) == odd && !x[i]) all_ones = 1'b0;
    return all_ones;
  endfunction

  task automatic chk(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: x8=%h x24=%h got %b exp %b", what, x8, x24, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fired;
    fired = 0;
    x24 = '0;
    for (int v = 0; v < 256; v++) begin
      x8 = 8'(v); #1;
      chk(c8e, model(32'(v), 8, 1'b0), "M8 even");
      chk(c8o, model(32'(v), 8, 1'b1), "M8 odd");
    end
    x24 = 24'h555555; #1; chk(c24, 1'b1, "all even set");
    for (int b = 0; b < 24; b += 2) begin
      x24 = 24'h555555 & ~(24'd1 << b) | 24'hAAAAAA; #1;
      chk(c24, 1'b0, "one even bit clear");
    end
    for (int i = 0; i < 5000; i++) begin
      x24 = 24'($urandom) | (($urandom_range(0, 7) == 0) ? 24'h555555 : 24'h0);
      #1;
      chk(c24, model(32'(x24), 24, 1'b0), "M24 random");
      if (c24) fired++;
    end
    checks++;
    if (fired == 0) begin failures++; $display("FAIL never fired"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
