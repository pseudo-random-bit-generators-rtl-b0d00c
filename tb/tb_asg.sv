// tb_asg: self-checking testbench of the alternating step generator.
//
// 1. The default generator (56/67/83-bit registers) is compared bit for bit with a reference
//    model for 6000 steps with a random enable, then again after a seed load. The control bit
//    sel2 is checked too, and both branches (LFSR2 stepped, LFSR3 stepped) must occur.
// 2. A small generator (LFSR1 x^3+x^2+1, LFSR2 x^4+x^3+1, LFSR3 x^5+x^3+1) must have the period
//    T1*T2*T3 = 7*15*31 = 3255 and none of its proper divisors 3255/p (p = 3, 5, 7, 31).
module tb_asg;
  import prbg_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic en = 1'b0, load = 1'b0;
  logic [55:0] seed1 = '0;
  logic [66:0] seed2 = '0;
  logic [82:0] seed3 = '0;
  logic        sel2, out_bit;
  logic        en_s = 1'b0, sel2_s, out_s;

  int checks = 0, failures = 0;
  int n_sel2 = 0, n_sel3 = 0;

  always #5 clk = ~clk;

  asg dut (.clk, .rst_n, .en, .load, .seed1, .seed2, .seed3, .sel2, .out_bit);

  asg #(.N1(3), .N2(4), .N3(5), .TAPS1(3'b110), .TAPS2(4'b1100), .TAPS3(5'b10100),
        .SEED1('1), .SEED2('1), .SEED3('1)) dut_s (
    .clk, .rst_n, .en(en_s), .load(1'b0), .seed1(3'b0), .seed2(4'b0), .seed3(5'b0),
    .sel2(sel2_s), .out_bit(out_s)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_lfsr r1, r2, r3;
    ref_asg  m;
    int unsigned e1[$], e2[$], e3[$];
    bit seq[$];
    int unsigned primes[4];

    e1 = {56, 55, 35, 34};
    e2 = {67, 66, 58, 57};
    e3 = {83, 82, 38, 37};
    r1 = new(56, e1); r2 = new(67, e2); r3 = new(83, e3);
    m  = new(r1, r2, r3);

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;

    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) begin
        @(negedge clk);
        en = 1'b0;
        seed1 = 56'({$urandom(), $urandom()});
        seed2 = 67'({$urandom(), $urandom(), $urandom()});
        seed3 = 83'({$urandom(), $urandom(), $urandom()});
        load  = 1'b1;
        @(negedge clk);
        load  = 1'b0;
        r1.set_seed({72'b0, seed1});
        r2.set_seed({61'b0, seed2});
        r3.set_seed({45'b0, seed3});
      end
      for (int k = 0; k < 3000; k++) begin
        @(negedge clk);
        check(out_bit == m.out(), $sformatf("phase %0d out_bit step %0d", phase, k));
        check(sel2 == m.sel2(), $sformatf("phase %0d sel2 step %0d", phase, k));
        en = ($urandom_range(0, 3) != 0);
        @(posedge clk);
        #1;
        if (en) begin
          if (m.sel2()) n_sel2++; else n_sel3++;
          m.step();
        end
      end
    end
    @(negedge clk);
    en = 1'b0;
    check(n_sel2 > 0 && n_sel3 > 0,
          $sformatf("both branches used: LFSR2 %0d times, LFSR3 %0d times", n_sel2, n_sel3));

    // 2. period of the small generator
    en_s = 1'b1;
    for (int k = 0; k < 2 * 3255 + 50; k++) begin
      seq.push_back(out_s);
      @(negedge clk);
    end
    en_s = 1'b0;
    check(is_period(seq, 3255), "small ASG repeats after 3255 bits");
    primes = '{3, 5, 7, 31};
    foreach (primes[i])
      check(!is_period(seq, 3255 / primes[i]),
            $sformatf("small ASG does not repeat after %0d bits", 3255 / primes[i]));

    $display("ASG: LFSR2 stepped %0d times, LFSR3 stepped %0d times", n_sel2, n_sel3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
