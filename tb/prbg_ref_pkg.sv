// prbg_ref_pkg: reference models used by the testbenches.
//
// ref_lfsr models a Fibonacci LFSR the textbook way: stages b[1..n] in an unpacked array, the
// feedback is the XOR of the stages whose numbers are the exponents of the polynomial, the
// register shifts from b[1] towards b[n] and b[n] is the output. It shares no code with the RTL
// (which uses a packed tap mask), so the two can be compared bit for bit.
// ref_asg and ref_shrink build the alternating step and shrinking generators from it, and
// is_period() checks the period of a recorded bit sequence.
package prbg_ref_pkg;

  class ref_lfsr;
    int unsigned n;
    int unsigned exps[$];
    bit          b[1:128];

    function new(int unsigned n_, int unsigned exps_[$]);
      n    = n_;
      exps = exps_;
      for (int i = 1; i <= 128; i++) b[i] = 1'b1;
    endfunction

    // Load a seed given as an integer whose bit (i-1) is stage b[i].
    function void set_seed(logic [127:0] s);
      for (int i = 1; i <= 128; i++) b[i] = (i <= n) ? s[i-1] : 1'b0;
    endfunction

    function bit out();
      return b[n];
    endfunction

    function void step();
      bit fb;
      fb = 1'b0;
      foreach (exps[k]) fb ^= b[exps[k]];
      for (int i = 128; i >= 2; i--) if (i <= n) b[i] = b[i-1];
      b[1] = fb;
    endfunction

    function logic [127:0] as_vector();
      logic [127:0] v;
      v = '0;
      for (int i = 1; i <= 128; i++) if (i <= n) v[i-1] = b[i];
      return v;
    endfunction
  endclass

  class ref_asg;
    ref_lfsr r1, r2, r3;
    function new(ref_lfsr a, ref_lfsr b, ref_lfsr c);
      r1 = a; r2 = b; r3 = c;
    endfunction
    function bit out();
      return r2.out() ^ r3.out();
    endfunction
    function bit sel2();
      return r1.out();
    endfunction
    function void step();
      if (r1.out()) r2.step();
      else          r3.step();
      r1.step();
    endfunction
  endclass

  class ref_shrink;
    ref_lfsr ra, rb;
    int unsigned dropped = 0;     // bits of B discarded by the selection rule
    function new(ref_lfsr a, ref_lfsr b);
      ra = a; rb = b;
    endfunction
    // Advance until a bit is selected and return it (the shrunk sequence).
    function bit next_bit();
      bit r;
      while (ra.out() == 1'b0) begin
        ra.step(); rb.step();
        dropped++;
      end
      r = rb.out();
      ra.step(); rb.step();
      return r;
    endfunction
  endclass

  // True when seq[i] == seq[i+p] for every i with i+p < seq.size().
  function automatic bit is_period(ref bit seq[$], input int unsigned p);
    for (int i = 0; i + p < seq.size(); i++)
      if (seq[i] != seq[i+p]) return 1'b0;
    return 1'b1;
  endfunction

endpackage
