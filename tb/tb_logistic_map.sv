// tb_logistic_map: self-checking test of the combinational logistic map.
// Checks fixed points of the arithmetic (r = 4, y = 1/2 gives exactly 1;
// y = 0 and y = 1 give 0), compares random inputs in [0,1) against the real
// valued r*y*(1-y) (the truncated fixed-point result must lie within a few
// LSBs below it), and checks the wrap-around for inputs in [1,2) against a
// 64-bit integer model.
module tb_logistic_map;
  localparam int unsigned M  = 24;
  localparam int unsigned RI = 3;

  logic [M-1:0] y, r, x_next;
  int checks = 0, failures = 0;

  logistic_map dut (.y(y), .r(r), .x_next(x_next));

  function automatic logic [M-1:0] to_fix(real v, int frac);
    return M'(longint'(v * (2.0 ** frac)));
  endfunction

  task automatic check_eq(logic [M-1:0] exp, string what);
    checks++;
    if (x_next !== exp) begin
      failures++;
      $display("FAIL %s: y=%h r=%h got %h exp %h", what, y, r, x_next, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real yr, rr, ex, got;
    longint unsigned mask, omy, t, e;
    mask = (64'd1 << M) - 1;

    // exact points
    r = to_fix(4.0, M-RI); y = to_fix(0.5, M-1); #1;
    check_eq(24'h800000, "r=4 y=0.5");
    y = '0; #1; check_eq('0, "y=0");
    y = to_fix(1.0, M-1); #1; check_eq('0, "y=1");
    r = to_fix(2.0, M-RI); y = to_fix(0.5, M-1); #1;
    check_eq(to_fix(0.5, M-1), "r=2 y=0.5");

    // random points in the normal range against real arithmetic
    for (int i = 0; i < 2000; i++) begin
      rr = 4.0 * real'($urandom_range(0, 1 << 20)) / real'(1 << 20);
      yr = real'($urandom_range(0, (1 << (M-1)) - 1)) / (2.0 ** (M-1));
      r = to_fix(rr, M-RI); y = to_fix(yr, M-1); #1;
      rr = real'(r) / (2.0 ** (M-RI));
      yr = real'(y) / (2.0 ** (M-1));
      ex  = rr * yr * (1.0 - yr);
      got = real'(x_next) / (2.0 ** (M-1));
      checks++;
      if (got > ex + 1e-12 || got < ex - 8.0 / (2.0 ** (M-1))) begin
        failures++;
        $display("FAIL real: r=%f y=%f got %f exp %f", rr, yr, got, ex);
      end
    end

    // inputs in [1,2): 1-y wraps modulo 2
    for (int i = 0; i < 500; i++) begin
      y = M'($urandom) | (M'(1) << (M-1));
      r = M'($urandom);
      #1;
      omy = ((64'd1 << (M-1)) - 64'(y)) & mask;
      t   = ((64'(y) * omy) >> (M-1)) & mask;
      e   = ((64'(r) * t) >> (M-RI)) & mask;
      check_eq(M'(e), "wrap");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
