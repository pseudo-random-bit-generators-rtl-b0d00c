// tb_lfsr: self-checking testbench of the Fibonacci LFSR.
//
// 1. The default 67-bit register (x^67+x^66+x^58+x^57+1) is compared bit for bit and state for
//    state with a reference model over 3000 steps with a random enable, then after a seed load.
// 2. Holding en low must keep the state.
// 3. Loading a zero seed must load the all-ones default instead.
// 4. An 8-bit instance with x^8+x^6+x^5+x^4+1 must return to its seed after exactly 255 steps
//    (period 2^N - 1) and not before, and emit one bit per enabled clock.
module tb_lfsr;
  import prbg_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic en = 1'b0, load = 1'b0;
  logic [66:0] seed = '0;
  logic [66:0] state;
  logic        out_bit;

  logic        en8 = 1'b0;
  logic [7:0]  state8;
  logic        out8;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr dut (.clk, .rst_n, .en, .load, .seed, .state, .out_bit);

  lfsr #(.N(8), .TAPS(8'b1011_1000), .SEED(8'h01)) dut8 (
    .clk, .rst_n, .en(en8), .load(1'b0), .seed(8'h00), .state(state8), .out_bit(out8)
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_lfsr r;
    int unsigned exps67[$];
    logic [66:0] held;
    int steps;
    exps67 = {67, 66, 58, 57};
    r = new(67, exps67);

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(state == '1, "reset state is all ones");

    // 1. random enable, compare with reference
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      check(out_bit == r.out(), $sformatf("out_bit step %0d", k));
      check(state == r.as_vector()[66:0], $sformatf("state step %0d", k));
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (en) r.step();
    end
    @(negedge clk);
    en = 1'b0;

    // seed load
    seed = 67'({$urandom(), $urandom(), $urandom()});
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    r.set_seed({61'b0, seed});
    check(state == seed, "seed loaded");
    en = 1'b1;
    for (int k = 0; k < 500; k++) begin
      check(out_bit == r.out(), $sformatf("after load step %0d", k));
      @(negedge clk);
      r.step();
    end
    en = 1'b0;

    // 2. hold
    held = state;
    repeat (5) @(negedge clk);
    check(state == held, "state held while en low");

    // 3. zero seed
    seed = '0;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(state == '1, "zero seed replaced by all ones");

    // 4. period of the 8-bit register
    check(state8 == 8'h01, "8-bit register at its seed");
    en8 = 1'b1;
    steps = 0;
    do begin
      @(negedge clk);
      steps++;
    end while (state8 != 8'h01 && steps < 1000);
    en8 = 1'b0;
    check(steps == 255, $sformatf("8-bit period %0d, expected 255", steps));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
