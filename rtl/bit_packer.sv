// bit_packer: gathers generator bits into bytes for the serial port.
//
// The packer drives the enable of a bit generator. While it has room it asserts gen_en, so
// the generator advances and the packer stores the generator's bit whenever bit_valid is high
// (always for the LFSR and the ASG, only for the selected bits of the shrinking generator).
// The first stored bit goes to byte bit 0, which the serial transmitter sends first, so the
// bits appear on the line in the order they were generated. When eight bits are stored the
// byte is offered with byte_valid and the generator is held (gen_en low) until byte_ready
// takes it; in the cycle the byte is taken a new bit can already be stored, so no bit is lost
// or repeated and the generator only ever stops, never skips.
//
// Interface and timing: valid/ready handshake on the byte side, a transfer happens on a clock
// edge with byte_valid && byte_ready; byte_out is stable while byte_valid waits.
// Reset is asynchronous, active low. The whole block is this design's choice: the generators
// were only said to send their output to a PC over a serial port.
module bit_packer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_in,
  input  logic       bit_valid,
  output logic       gen_en,
  output logic [7:0] byte_out,
  output logic       byte_valid,
  input  logic       byte_ready
);

  logic [3:0] count;      // number of bits stored, 0..8
  logic       full, take;
  logic [2:0] wr_pos;

  always_comb begin
    full   = (count == 4'd8);
    take   = full && byte_ready;
    gen_en = !full || byte_ready;
    wr_pos = take ? 3'd0 : count[2:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      byte_out <= '0;
    end else begin
      if (gen_en && bit_valid) begin
        byte_out[wr_pos] <= bit_in;
        count            <= {1'b0, wr_pos} + 4'd1;
      end else if (take) begin
        count <= '0;
      end
    end
  end

  assign byte_valid = full;

  // A byte on offer stays on offer, unchanged, until it is taken.
  a_hold : assert property (@(posedge clk) disable iff (!rst_n)
                            byte_valid && !byte_ready |=> byte_valid && $stable(byte_out));

endmodule
