// tb_bit_packer: self-checking testbench of the bit-to-byte packer.
//
// A random bit source with a random valid flag feeds the packer; the byte sink takes bytes
// with a random ready. Every bit the packer accepts (gen_en && bit_valid) is queued, and every
// byte taken must hold the next eight queued bits, first bit in bit 0. The generator must be
// stalled (gen_en low) exactly when a full byte is not taken, and a byte taken in the same
// cycle as a new bit (back-to-back transfer) must occur.
module tb_bit_packer;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic bit_in = 1'b0, bit_valid = 1'b0, byte_ready = 1'b0;
  logic gen_en, byte_valid;
  logic [7:0] byte_out;

  int checks = 0, failures = 0;
  int n_stall = 0, n_overlap = 0, n_bytes = 0;
  bit expected[$];

  always #5 clk = ~clk;

  bit_packer dut (.clk, .rst_n, .bit_in, .bit_valid, .gen_en, .byte_out, .byte_valid, .byte_ready);

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
    logic [7:0] exp_byte;
    int stored;

    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    stored = 0;

    for (int k = 0; k < 8000; k++) begin
      @(negedge clk);
      bit_in     = 1'($urandom());
      bit_valid  = ($urandom_range(0, 3) != 0);
      byte_ready = ($urandom_range(0, 2) == 0);
      #1;
      // stall rule: the generator is held only while a full byte waits
      check(byte_valid == (stored == 8), $sformatf("byte_valid with %0d bits stored", stored));
      check(gen_en == !(byte_valid && !byte_ready), "gen_en only low while a full byte waits");
      if (!gen_en) n_stall++;
      if (byte_valid && byte_ready) begin
        n_bytes++;
        for (int i = 0; i < 8; i++) exp_byte[i] = expected.pop_front();
        check(byte_out == exp_byte,
              $sformatf("byte %0d: got %02h expected %02h", n_bytes, byte_out, exp_byte));
        stored = 0;
        if (gen_en && bit_valid) n_overlap++;
      end
      if (gen_en && bit_valid) begin
        expected.push_back(bit_in);
        stored++;
      end
    end
    check(n_stall > 0, "generator stall seen");
    check(n_overlap > 0, "byte taken together with a new bit seen");
    check(n_bytes > 100, "bytes transferred");
    $display("packer: %0d bytes, %0d stall cycles, %0d overlapped transfers", n_bytes, n_stall, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
