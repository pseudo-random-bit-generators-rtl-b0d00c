// tb_shrinking_gen: self-checking testbench of the shrinking generator.
//
// 1. The default generator (61/67-bit registers) is stepped with a random enable; every bit it
//    marks valid is compared with the next bit of a reference shrinking generator, for 6000
//    steps, half of them after a seed load. Both kept and discarded bits must occur.
// 2. A small generator (A: x^3+x^2+1, B: x^4+x^3+1) must produce an output sequence of period
//    (2^4-1)*2^(3-1) = 60 and not of period 30, 20 or 12.
module tb_shrinking_gen;
  import prbg_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic en = 1'b0, load = 1'b0;
  logic [60:0] seed_a = '0;
  logic [66:0] seed_b = '0;
  logic        out_bit, out_valid;
  logic        en_s = 1'b0, out_s, valid_s;

  int checks = 0, failures = 0;
  int n_kept = 0, n_dropped = 0;

  always #5 clk = ~clk;

  shrinking_gen dut (.clk, .rst_n, .en, .load, .seed_a, .seed_b, .out_bit, .out_valid);

  shrinking_gen #(.NA(3), .NB(4), .TAPSA(3'b110), .TAPSB(4'b1100), .SEEDA('1), .SEEDB('1)) dut_s (
    .clk, .rst_n, .en(en_s), .load(1'b0), .seed_a(3'b0), .seed_b(4'b0),
    .out_bit(out_s), .out_valid(valid_s)
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
    ref_lfsr   ra, rb, ra_d;
    ref_shrink m;
    int unsigned ea[$], eb[$];
    bit seq[$];
    int unsigned divs[3];

    ea = {61, 60, 46, 45};
    eb = {67, 66, 58, 57};
    ra = new(61, ea); rb = new(67, eb);
    ra_d = new(61, ea);          // tracks a_i independently to predict out_valid
    m  = new(ra, rb);

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;

    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) begin
        @(negedge clk);
        en = 1'b0;
        seed_a = 61'({$urandom(), $urandom()});
        seed_b = 67'({$urandom(), $urandom(), $urandom()});
        load   = 1'b1;
        @(negedge clk);
        load   = 1'b0;
        ra.set_seed({67'b0, seed_a});
        ra_d.set_seed({67'b0, seed_a});
        rb.set_seed({61'b0, seed_b});
      end
      for (int k = 0; k < 3000; k++) begin
        @(negedge clk);
        check(out_valid == ra_d.out(), $sformatf("phase %0d out_valid step %0d", phase, k));
        en = ($urandom_range(0, 3) != 0);
        if (en) begin
          if (out_valid) begin
            n_kept++;
            check(out_bit == m.next_bit(), $sformatf("phase %0d out_bit step %0d", phase, k));
          end else begin
            n_dropped++;
          end
          ra_d.step();
        end
      end
    end
    @(negedge clk);
    en = 1'b0;
    check(n_kept > 0 && n_dropped > 0,
          $sformatf("selection rule kept %0d and discarded %0d bits", n_kept, n_dropped));

    // 2. period of the small generator's output sequence
    en_s = 1'b1;
    while (seq.size() < 2 * 60 + 20) begin
      if (valid_s) seq.push_back(out_s);
      @(negedge clk);
    end
    en_s = 1'b0;
    check(is_period(seq, 60), "small shrinking generator repeats after 60 bits");
    divs = '{30, 20, 12};
    foreach (divs[i])
      check(!is_period(seq, divs[i]),
            $sformatf("small shrinking generator does not repeat after %0d bits", divs[i]));

    $display("SG: kept %0d bits, discarded %0d bits", n_kept, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
