// tb_uart_tx: self-checking testbench of the serial transmitter.
//
// Random bytes are offered with random gaps. A receiver model in the testbench samples the tx
// line in the middle of each bit cell (CLKS_PER_BIT = 16 here) and checks the start bit, the
// eight data bits (LSB first) and the stop bit. The frame length is checked: ready must return
// exactly 10*CLKS_PER_BIT cycles after a byte is taken, and the line must idle high.
module tb_uart_tx;

  localparam int CPB = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic [7:0] data = '0;
  logic valid = 1'b0;
  logic ready, tx;

  int checks = 0, failures = 0;
  logic [7:0] sent[$];

  always #5 clk = ~clk;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .valid, .ready, .tx);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receiver model: waits for a falling edge on the line, samples mid-cell.
  initial begin : receiver
    logic [7:0] got, want;
    forever begin
      @(negedge clk);
      if (rst_n && tx == 1'b0) begin
        repeat (CPB / 2 - 1) @(negedge clk);
        check(tx == 1'b0, "start bit");
        for (int i = 0; i < 8; i++) begin
          repeat (CPB) @(negedge clk);
          got[i] = tx;
        end
        repeat (CPB) @(negedge clk);
        check(tx == 1'b1, "stop bit");
        want = sent.pop_front();
        check(got == want, $sformatf("received %02h expected %02h", got, want));
        repeat (CPB / 2) @(negedge clk);
      end
    end
  end

  initial begin
    int cycles;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(tx == 1'b1 && ready, "idle after reset");

    for (int n = 0; n < 40; n++) begin
      repeat ($urandom_range(0, 5)) @(negedge clk);
      data  = 8'($urandom());
      valid = 1'b1;
      while (!ready) @(negedge clk);
      sent.push_back(data);
      @(negedge clk);            // taken on the edge just passed
      valid = 1'b0;
      data  = 8'($urandom());    // must not disturb the frame in flight
      cycles = 0;   // cycles counted from the edge that took the byte
      while (!ready) begin
        @(negedge clk);
        cycles++;
      end
      check(cycles == 10 * CPB, $sformatf("frame took %0d cycles, expected %0d", cycles, 10 * CPB));
    end
    repeat (CPB) @(negedge clk);
    check(sent.size() == 0, "every byte received");
    check(tx == 1'b1, "line idles high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
