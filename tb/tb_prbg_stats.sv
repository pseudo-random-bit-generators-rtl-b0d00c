// tb_prbg_stats: statistical workload for the three generators, scaled down for simulation.
//
// The generators (default sizes and polynomials) are tested the way the NIST SP800-22 suite
// tests a generator: M_SEQ = 100 sequences per generator, each from its own seed, each put
// through every test at significance level 0.01; a test is passed when the proportion of
// passing sequences reaches 0.99 - 3*sqrt(0.99*0.01/100) = 0.9602, i.e. 96 of 100. Sequences
// are N_BITS = 8192 bits long (instead of 2^20) to keep the simulation short. Seeds come from
// a fixed xorshift64 stream, so the result does not depend on the simulator's random seed.
// The tests and their acceptance limits (equivalent to p-value >= 0.01):
//   - frequency (monobit):  |#ones - #zeros| / sqrt(n) <= 2.5758,
//   - runs:                 |V - 2n*pi*(1-pi)| / (2*sqrt(2n)*pi*(1-pi)) <= 1.8214,
//                           V = number of runs, pi = fraction of ones,
//   - block frequency:      64 blocks of 128 bits, chi2 = 4*128*sum((pi_j - 1/2)^2) <= 93.22
//                           (chi-square 0.99 quantile, 64 degrees of freedom),
//   - cumulative sums:      max |S_k| / sqrt(n) of the +-1 walk, forward and backward, <= 2.807
//                           (P(sup |W| >= 2.807) = 0.01 for Brownian motion),
//   - linear complexity:    Berlekamp-Massey on LC_BLOCKS blocks of 500 bits; a block passes
//                           when its complexity is within 240..260 (a random block is 250 +- 2).
// Expected outcome, which the testbench checks: the plain LFSR passes the first four tests and
// fails linear complexity on every sequence (its complexity is exactly 67); the alternating
// step and shrinking generators pass all five. The shrinking generator's rate is also checked:
// 0.45..0.55 output bits per clock, against one bit per clock for the other two.
module tb_prbg_stats;

  localparam int N_BITS    = 8192;
  localparam int M_SEQ     = 100;
  localparam int MIN_PASS  = 96;
  localparam int M         = 500;
  localparam int LC_BLOCKS = 4;
  localparam int N_TESTS   = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic load = 1'b0, en = 1'b0;
  logic [66:0] s67 = '0, s67b = '0, s67c = '0;
  logic [55:0] s56 = '0;
  logic [82:0] s83 = '0;
  logic [60:0] s61 = '0;
  logic [66:0] st_l;
  logic l_bit, a_bit, a_sel, g_bit, g_valid;

  int checks = 0, failures = 0;
  int passes[3][N_TESTS];
  int lc_lfsr_exact = 0;
  longint unsigned sg_clocks = 0;
  longint unsigned rng = 64'h9E37_79B9_7F4A_7C15;

  always #5 clk = ~clk;

  lfsr u_l (.clk, .rst_n, .en, .load, .seed(s67), .state(st_l), .out_bit(l_bit));
  asg  u_a (.clk, .rst_n, .en, .load, .seed1(s56), .seed2(s67b), .seed3(s83),
            .sel2(a_sel), .out_bit(a_bit));
  shrinking_gen u_g (.clk, .rst_n, .en, .load, .seed_a(s61), .seed_b(s67c),
                     .out_bit(g_bit), .out_valid(g_valid));

  function automatic void check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic logic [127:0] next_rand128();
    logic [127:0] r;
    for (int h = 0; h < 2; h++) begin
      rng ^= rng << 13;
      rng ^= rng >> 7;
      rng ^= rng << 17;
      r[h*64 +: 64] = rng;
    end
    return r;
  endfunction

  initial begin : watchdog
    repeat (M_SEQ * (4 * N_BITS + 100)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Berlekamp-Massey: linear complexity of s[off .. off+len-1], len <= M.
  function automatic int lin_cplx(ref bit s[$], input int off, input int len);
    bit c[0:M], b[0:M], t[0:M];
    int l = 0, m = -1;
    bit d;
    for (int i = 0; i <= M; i++) begin c[i] = 0; b[i] = 0; end
    c[0] = 1; b[0] = 1;
    for (int n = 0; n < len; n++) begin
      d = s[off + n];
      for (int i = 1; i <= l; i++) d ^= c[i] & s[off + n - i];
      if (d) begin
        t = c;
        for (int i = 0; i + n - m <= M; i++) c[i + n - m] ^= b[i];
        if (2 * l <= n) begin
          l = n + 1 - l;
          m = n;
          b = t;
        end
      end
    end
    return l;
  endfunction

  initial begin
    bit seq[3][$];
    string names[3];
    real rate;
    names = '{"LFSR", "ASG", "SG"};
    foreach (passes[g, t]) passes[g][t] = 0;

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;

    for (int sq = 0; sq < M_SEQ; sq++) begin
      // new seeds for all registers
      @(negedge clk);
      en   = 1'b0;
      s67  = 67'(next_rand128());
      s67b = 67'(next_rand128());
      s67c = 67'(next_rand128());
      s56  = 56'(next_rand128());
      s83  = 83'(next_rand128());
      s61  = 61'(next_rand128());
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      en   = 1'b1;
      for (int g = 0; g < 3; g++) seq[g].delete();
      while (seq[2].size() < N_BITS) begin
        if (seq[0].size() < N_BITS) seq[0].push_back(l_bit);
        if (seq[1].size() < N_BITS) seq[1].push_back(a_bit);
        if (g_valid) seq[2].push_back(g_bit);
        sg_clocks++;
        @(negedge clk);
      end
      en = 1'b0;

      for (int g = 0; g < 3; g++) begin
        int ones, runs, lc, walk, zmax_f, zmax_b, lc_ok;
        real n, pi, sobs, x, chi2;
        ones = 0;
        runs = 1;
        n    = real'(seq[g].size());
        foreach (seq[g][i]) begin
          ones += int'(seq[g][i]);
          if (i > 0 && seq[g][i] != seq[g][i-1]) runs++;
        end
        // frequency
        sobs = (2.0 * ones - n) / $sqrt(n);
        if (sobs < 0) sobs = -sobs;
        if (sobs <= 2.5758) passes[g][0]++;
        // runs
        pi = ones / n;
        x  = (runs - 2.0 * n * pi * (1.0 - pi)) / (2.0 * $sqrt(2.0 * n) * pi * (1.0 - pi));
        if (x < 0) x = -x;
        if (x <= 1.8214) passes[g][1]++;
        // block frequency
        chi2 = 0.0;
        for (int j = 0; j < N_BITS / 128; j++) begin
          int bo;
          bo = 0;
          for (int i = 0; i < 128; i++) bo += int'(seq[g][j * 128 + i]);
          chi2 += 4.0 * 128.0 * (bo / 128.0 - 0.5) * (bo / 128.0 - 0.5);
        end
        if (chi2 <= 93.22) passes[g][2]++;
        // cumulative sums, forward and backward
        walk = 0; zmax_f = 0;
        foreach (seq[g][i]) begin
          walk += seq[g][i] ? 1 : -1;
          if ((walk < 0 ? -walk : walk) > zmax_f) zmax_f = (walk < 0 ? -walk : walk);
        end
        walk = 0; zmax_b = 0;
        for (int i = N_BITS - 1; i >= 0; i--) begin
          walk += seq[g][i] ? 1 : -1;
          if ((walk < 0 ? -walk : walk) > zmax_b) zmax_b = (walk < 0 ? -walk : walk);
        end
        if (zmax_f / $sqrt(n) <= 2.807 && zmax_b / $sqrt(n) <= 2.807) passes[g][3]++;
        // linear complexity
        lc_ok = 1;
        for (int k = 0; k < LC_BLOCKS; k++) begin
          lc = lin_cplx(seq[g], k * M, M);
          if (lc < 240 || lc > 260) lc_ok = 0;
          if (g == 0 && lc == 67) lc_lfsr_exact++;
        end
        if (lc_ok == 1) passes[g][4]++;
      end
    end

    rate = real'(M_SEQ * N_BITS) / real'(sg_clocks);
    check(rate >= 0.45 && rate <= 0.55, $sformatf("shrinking generator rate %f bits/clock", rate));
    $display("shrinking generator: %0d bits in %0d clocks (%f bits/clock)",
             M_SEQ * N_BITS, sg_clocks, rate);

    $display("pass counts of %0d sequences: frequency, runs, block frequency, cumulative sums, linear complexity",
             M_SEQ);
    for (int g = 0; g < 3; g++) begin
      $display("  %-4s %3d %3d %3d %3d %3d", names[g],
               passes[g][0], passes[g][1], passes[g][2], passes[g][3], passes[g][4]);
      for (int t = 0; t < N_TESTS; t++) begin
        if (g == 0 && t == 4)
          check(passes[g][t] == 0, "LFSR fails linear complexity on every sequence");
        else
          check(passes[g][t] >= MIN_PASS,
                $sformatf("%s test %0d passed by %0d of %0d sequences", names[g], t,
                          passes[g][t], M_SEQ));
      end
    end
    check(lc_lfsr_exact == M_SEQ * LC_BLOCKS, "LFSR linear complexity is 67 in every block");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
