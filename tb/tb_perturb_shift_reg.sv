// tb_perturb_shift_reg: self-checking test of the perturbation shift register.
// A queue of the bits shifted in models the register: P_n must hold the last
// M bits loaded, newest in the MSB, and must ignore cycles without shift_en
// and return to zero on clear.
module tb_perturb_shift_reg;
  localparam int unsigned M = 24;

  logic clk = 1'b0, rst, clear, shift_en, lsb_in;
  logic [M-1:0] p_out;
  int checks = 0, failures = 0;
  bit hist[$];

  perturb_shift_reg dut (.*);

  always #5 clk = ~clk;

  function automatic logic [M-1:0] model();
    logic [M-1:0] v = '0;
    // hist[$] is the newest bit; it sits in the MSB
    for (int i = 0; i < M && i < hist.size(); i++) v[M-1-i] = hist[hist.size()-1-i];
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; clear = 1'b0; shift_en = 1'b0; lsb_in = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (p_out !== '0) begin failures++; $display("FAIL reset"); end
    // one 1 followed by zeros must walk from the MSB to the LSB and fall out
    shift_en = 1'b1; lsb_in = 1'b1;
    @(posedge clk); #1;
    lsb_in = 1'b0;
    for (int i = 0; i < M; i++) begin
      checks++;
      if (p_out !== (M'(1) << (M-1-i))) begin
        failures++; $display("FAIL walk %0d: %h", i, p_out);
      end
      @(posedge clk); #1;
    end
    checks++;
    if (p_out !== '0) begin failures++; $display("FAIL walk out: %h", p_out); end
    hist = '{};
    for (int i = 0; i < 2000; i++) begin
      lsb_in   = 1'($urandom);
      shift_en = ($urandom_range(0, 3) != 0);
      clear    = (i == 1000);
      @(posedge clk); #1;
      if (clear) hist = '{};
      else if (shift_en) hist.push_back(lsb_in);
      checks++;
      if (p_out !== model()) begin
        failures++; $display("FAIL step %0d: got %h exp %h", i, p_out, model());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
