// tb_prbg_top: end-to-end testbench of the three generators with their serial ports.
//
// The top runs with its default parameters (868 clocks per serial bit). Three receiver models
// decode the serial lines lfsr_tx, asg_tx and sg_tx. For each generator the testbench checks
//   - every bit on the *_bit / *_bit_valid stream against a reference model of the generator,
//   - every received byte against the next eight bits of that stream, first bit in bit 0.
// Operation: reset, BYTES bytes per line, then twice a load of random seeds in mid-byte
// followed by BYTES more bytes per line.
// Mechanisms counted (each must occur): generator stalled by a busy serial port, ASG step of
// LFSR2, ASG step of LFSR3, shrinking-generator bit kept, bit discarded, seed load.
module tb_prbg_top;
  import prbg_ref_pkg::*;

  localparam int CPB   = 868;      // default of the top
  localparam int BYTES  = 4;       // bytes per line in each phase
  localparam int PHASES = 3;       // reset seeds, then two random seed loads

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic load = 1'b0;
  logic [66:0] seed_lfsr = '0;
  logic [55:0] seed_asg1 = '0;
  logic [66:0] seed_asg2 = '0;
  logic [82:0] seed_asg3 = '0;
  logic [60:0] seed_sg_a = '0;
  logic [66:0] seed_sg_b = '0;
  logic lfsr_tx, lfsr_bit, lfsr_bit_valid;
  logic asg_tx, asg_bit, asg_bit_valid;
  logic sg_tx, sg_bit, sg_bit_valid;

  int checks = 0, failures = 0;
  int n_stall = 0, n_sel2 = 0, n_sel3 = 0, n_kept = 0, n_drop = 0, n_load = 0;
  int n_rx[3] = '{0, 0, 0};
  bit stream[3][$];            // bits taken from each generator, waiting for the line

  ref_lfsr   r_l, r_a1, r_a2, r_a3, r_sa, r_sb;
  ref_asg    m_asg;
  ref_shrink m_sg;

  always #5 clk = ~clk;

  prbg_top dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2 * (PHASES * BYTES + 2) * (10 * CPB + 2)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Serial receiver for line g: sample mid-cell, check the frame and the data.
  task automatic receive(int g);
    logic [7:0] got, want;
    logic line;
    forever begin
      @(negedge clk);
      line = (g == 0) ? lfsr_tx : (g == 1) ? asg_tx : sg_tx;
      if (rst_n && line == 1'b0) begin
        repeat (CPB / 2 - 1) @(negedge clk);
        line = (g == 0) ? lfsr_tx : (g == 1) ? asg_tx : sg_tx;
        check(line == 1'b0, $sformatf("line %0d start bit", g));
        for (int i = 0; i < 9; i++) begin
          repeat (CPB) @(negedge clk);
          line = (g == 0) ? lfsr_tx : (g == 1) ? asg_tx : sg_tx;
          if (i < 8) got[i] = line;
        end
        check(line == 1'b1, $sformatf("line %0d stop bit", g));
        check(stream[g].size() >= 8, $sformatf("line %0d byte without eight taken bits", g));
        for (int i = 0; i < 8; i++) want[i] = stream[g].pop_front();
        check(got == want, $sformatf("line %0d byte %0d: got %02h expected %02h",
                                     g, n_rx[g], got, want));
        n_rx[g]++;
        repeat (CPB / 2) @(negedge clk);
      end
    end
  endtask

  initial fork
    receive(0);
    receive(1);
    receive(2);
  join_none

  // Generator streams: compare each taken bit with the reference models.
  always @(negedge clk) begin
    if (rst_n && !load && r_l != null) begin
      if (lfsr_bit_valid) begin
        check(lfsr_bit == r_l.out(), "LFSR stream bit");
        stream[0].push_back(lfsr_bit);
        r_l.step();
      end else begin
        n_stall++;
      end
      if (asg_bit_valid) begin
        check(asg_bit == m_asg.out(), "ASG stream bit");
        if (m_asg.sel2()) n_sel2++; else n_sel3++;
        stream[1].push_back(asg_bit);
        m_asg.step();
      end
      if (sg_bit_valid) begin
        n_kept++;
        check(sg_bit == m_sg.next_bit(), "shrinking stream bit");
        stream[2].push_back(sg_bit);
      end
    end
  end

  initial begin
    int unsigned e67[$], e56[$], e83[$], e61[$];
    e67 = {67, 66, 58, 57};
    e56 = {56, 55, 35, 34};
    e83 = {83, 82, 38, 37};
    e61 = {61, 60, 46, 45};
    r_l  = new(67, e67);
    r_a1 = new(56, e56); r_a2 = new(67, e67); r_a3 = new(83, e83);
    r_sa = new(61, e61); r_sb = new(67, e67);
    m_asg = new(r_a1, r_a2, r_a3);
    m_sg  = new(r_sa, r_sb);

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;

    // phase 0 runs from the reset seeds; phases 1 and 2 start with a load of random seeds,
    // issued while a frame is on the line and the packers are partly filled
    for (int phase = 0; phase < PHASES; phase++) begin
      if (phase > 0) begin
        repeat (5 * CPB) @(negedge clk);
        @(negedge clk);
        seed_lfsr = 67'({$urandom(), $urandom(), $urandom()});
        seed_asg1 = 56'({$urandom(), $urandom()});
        seed_asg2 = 67'({$urandom(), $urandom(), $urandom()});
        seed_asg3 = 83'({$urandom(), $urandom(), $urandom()});
        seed_sg_a = 61'({$urandom(), $urandom()});
        seed_sg_b = 67'({$urandom(), $urandom(), $urandom()});
        load = 1'b1;
        r_l.set_seed({61'b0, seed_lfsr});
        r_a1.set_seed({72'b0, seed_asg1});
        r_a2.set_seed({61'b0, seed_asg2});
        r_a3.set_seed({45'b0, seed_asg3});
        r_sa.set_seed({67'b0, seed_sg_a});
        r_sb.set_seed({61'b0, seed_sg_b});
        n_load++;
        @(negedge clk);
        load = 1'b0;
      end
      while (n_rx[0] < (phase + 1) * BYTES || n_rx[1] < (phase + 1) * BYTES ||
             n_rx[2] < (phase + 1) * BYTES) @(negedge clk);
    end

    n_drop = m_sg.dropped;
    check(n_stall > 0, "generator stalled by the serial port");
    check(n_sel2 > 0, "ASG stepped LFSR2");
    check(n_sel3 > 0, "ASG stepped LFSR3");
    check(n_kept > 0, "shrinking generator kept a bit");
    check(n_drop > 0, "shrinking generator discarded a bit");
    check(n_load > 0, "seed load");
    $display("bytes received: LFSR %0d, ASG %0d, SG %0d", n_rx[0], n_rx[1], n_rx[2]);
    $display("stall cycles %0d, ASG LFSR2 steps %0d, LFSR3 steps %0d, SG kept %0d, discarded %0d, loads %0d",
             n_stall, n_sel2, n_sel3, n_kept, n_drop, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
