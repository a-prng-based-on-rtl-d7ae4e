// prng_ref_pkg: bit-level reference model of the self-perturbed logistic-map
// generator, used by the end-to-end testbenches. It works one bit at a time
// the way the circuit is described (serial J-K flip-flop over the word, MSB
// first; a shift register of LSBs; AND of every second bit; the map in
// 64-bit integer arithmetic with wrap to M bits), independently of the RTL's
// unrolled structure.
package prng_ref_pkg;
  class prng_ref #(int M = 24, int RI = 3, bit ODD = 1'b0, bit FBM = 1'b1);
    longint unsigned x, sr, r;
    bit q;
    bit last_c;

    function new();
      x = 0; sr = 0; r = 0; q = 1'b0; last_c = 1'b0;
    endfunction

    function longint unsigned mask();
      return (64'd1 << M) - 1;
    endfunction

    function void load(longint unsigned seed);
      x = seed & mask(); sr = 0; q = 1'b0;
    endfunction

    // x_new = r*y*(1-y), U(1).(M-1) y, wrap and truncate
    function longint unsigned map(longint unsigned y);
      longint unsigned omy, t;
      omy = ((64'd1 << (M-1)) - y) & mask();
      t   = ((y * omy) >> (M-1)) & mask();
      return ((r * t) >> (M-RI)) & mask();
    endfunction

    // one step: returns x'_n and advances the state
    function longint unsigned step();
      longint unsigned xm, y;
      bit lsb, s, c, qq;
      lsb = x[0];
      qq  = q;
      xm  = 0;
      for (int tick = 0; tick < M; tick++) begin
        s  = x[M-1-tick];
        xm = (xm << 1) | 64'(qq ^ lsb);
        if (s) qq = ~qq;                  // J = K = s
      end
      c = 1'b1;
      for (int i = 0; i < M; i++)
        if (((i % 2) == 1) == ODD && !x[i]) c = 1'b0;
      last_c = c;
      y  = c ? sr : (FBM ? xm : x);
      sr = (sr >> 1) | (64'(lsb) << (M-1));
      q  = qq;
      x  = map(y);
      return xm;
    endfunction
  endclass
endpackage
