// tb_processing_block: self-checking test of the processing block.
// A bit-serial reference model sends each word MSB first through a J-K
// flip-flop (J = K = serial bit, registered output, truth table written out)
// and XORs the flip-flop output with the word's LSB, collecting the result
// MSB first. The DUT, which handles the whole word in one cycle, must match
// word for word, including the flip-flop state carried from word to word,
// cycles without `advance`, and a clear.
module tb_processing_block;
  localparam int unsigned M = 24;

  logic clk = 1'b0, rst, clear, advance;
  logic [M-1:0] x_in, x_mod;
  logic jk_q;
  int checks = 0, failures = 0;
  logic model_q;

  processing_block dut (.*);

  always #5 clk = ~clk;

  function automatic logic jk_next(logic q, logic j, logic k);
    case ({j, k})
      2'b00:   return q;
      2'b01:   return 1'b0;
      2'b10:   return 1'b1;
      default: return ~q;
    endcase
  endfunction

  // serial reference: returns x' and updates the flip-flop state
  function automatic logic [M-1:0] serial_model(logic [M-1:0] x, inout logic q);
    logic [M-1:0] par;
    logic s;
    par = '0;
    for (int tick = 0; tick < M; tick++) begin
      s   = x[M-1-tick];                   // parallel-to-serial, MSB first
      par = {par[M-2:0], q ^ x[0]};        // serial-to-parallel, first bit ends in MSB
      q   = jk_next(q, s, s);
    end
    return par;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [M-1:0] exp;
    logic q_tmp;
    rst = 1'b1; clear = 1'b0; advance = 1'b0; x_in = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    model_q = 1'b0;
    // hand-worked word: x = 0x800001, q = 0, LSB = 1. Bit 23 goes first and
    // sees q = 0 (output 1); it toggles q, so all later bits see q = 1 (output 0).
    x_in = 24'h800001; #1;
    checks++;
    if (x_mod !== 24'h800000) begin
      failures++; $display("FAIL hand case: got %h", x_mod);
    end
    for (int i = 0; i < 3000; i++) begin
      x_in    = M'($urandom);
      advance = ($urandom_range(0, 3) != 0);
      clear   = (i == 1500);
      #1;
      q_tmp = model_q;
      exp   = serial_model(x_in, q_tmp);
      checks++;
      if (x_mod !== exp || jk_q !== model_q) begin
        failures++;
        $display("FAIL word %0d: x=%h got %h exp %h q=%b/%b", i, x_in, x_mod, exp, jk_q, model_q);
      end
      @(posedge clk); #1;
      if (clear) model_q = 1'b0;
      else if (advance) model_q = q_tmp;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
