// tb_cycle_length: runs the cycle-length experiment at the four word widths
// 12, 16, 24 and 32 bits with r = 3.9, each from the seed 0.3, and prints the
// measured period of the complete generator state (or that none was found
// within the step limit). Output words are checked against the reference
// model and every found period is confirmed by replaying it.
module tb_cycle_length;
  localparam longint CAP = 4_000_000;
  logic clk = 1'b0;
  logic   done   [4];
  int     chk    [4];
  int     fl     [4];
  logic   found  [4];
  longint clen   [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cycle_length_lane #(.M(12), .CAP(CAP)) lane12 (.clk, .done(done[0]), .checks(chk[0]), .failures(fl[0]), .found(found[0]), .cycle_len(clen[0]));
  cycle_length_lane #(.M(16), .CAP(CAP)) lane16 (.clk, .done(done[1]), .checks(chk[1]), .failures(fl[1]), .found(found[1]), .cycle_len(clen[1]));
  cycle_length_lane #(.M(24), .CAP(CAP)) lane24 (.clk, .done(done[2]), .checks(chk[2]), .failures(fl[2]), .found(found[2]), .cycle_len(clen[2]));
  cycle_length_lane #(.M(32), .CAP(CAP)) lane32 (.clk, .done(done[3]), .checks(chk[3]), .failures(fl[3]), .found(found[3]), .cycle_len(clen[3]));

  initial begin
    repeat (3 * CAP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int widths[4] = '{12, 16, 24, 32};
    repeat (3) @(posedge clk);
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int i = 0; i < 4; i++) begin
      checks   += chk[i];
      failures += fl[i];
      if (found[i]) $display("M=%0d r=3.9: cycle length %0d", widths[i], clen[i]);
      else          $display("M=%0d r=3.9: no cycle within %0d steps", widths[i], CAP);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
