// prbg_top: the three LFSR-based pseudo-random bit generators side by side.
//
//   - a single 67-bit LFSR (x^67+x^66+x^58+x^57+1),
//   - an alternating step generator (control LFSR of 56 bits, generating LFSRs of 67 and 83),
//   - a shrinking generator (LFSR A of 61 bits selecting bits of LFSR B of 67 bits).
//
// Each generator has its own bit_packer and uart_tx, so each drives its own serial line
// (*_tx) at CLKS_PER_BIT clocks per bit. The packer advances its generator only while it has
// room for a bit, so every generated bit reaches the line, in order, and the generators run
// at the pace of the serial port. The bits actually taken from each generator are also
// brought out as a stream (*_bit qualified by *_bit_valid) for on-chip use or observation.
//
// load (one clock) writes all seed ports into their registers; a zero seed falls back to the
// all-ones reset value. rst_n is an asynchronous active-low reset. All ports are sampled and
// driven on the rising edge of clk (100 MHz on the original board).
// The generators follow the generator descriptions; the shared clock with clock enables, the
// packer, the serial frame format and the seed ports are this design's choices.
module prbg_top #(
  parameter int unsigned CLKS_PER_BIT = prbg_pkg::CLKS_PER_BIT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [66:0] seed_lfsr,
  input  logic [55:0] seed_asg1,
  input  logic [66:0] seed_asg2,
  input  logic [82:0] seed_asg3,
  input  logic [60:0] seed_sg_a,
  input  logic [66:0] seed_sg_b,
  output logic        lfsr_tx,
  output logic        lfsr_bit,
  output logic        lfsr_bit_valid,
  output logic        asg_tx,
  output logic        asg_bit,
  output logic        asg_bit_valid,
  output logic        sg_tx,
  output logic        sg_bit,
  output logic        sg_bit_valid
);
  import prbg_pkg::*;

  // ---------------- single LFSR generator ----------------
  logic        lfsr_en, lfsr_out;
  logic [66:0] lfsr_state;
  logic [7:0]  lfsr_byte;
  logic        lfsr_byte_valid, lfsr_byte_ready;

  lfsr #(.N(67), .TAPS(TAPS_67)) u_lfsr (
    .clk, .rst_n, .en(lfsr_en && !load), .load, .seed(seed_lfsr),
    .state(lfsr_state), .out_bit(lfsr_out)
  );

  bit_packer u_lfsr_pack (
    .clk, .rst_n, .bit_in(lfsr_out), .bit_valid(!load), .gen_en(lfsr_en),
    .byte_out(lfsr_byte), .byte_valid(lfsr_byte_valid), .byte_ready(lfsr_byte_ready)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_lfsr_uart (
    .clk, .rst_n, .data(lfsr_byte), .valid(lfsr_byte_valid), .ready(lfsr_byte_ready),
    .tx(lfsr_tx)
  );

  assign lfsr_bit       = lfsr_out;
  assign lfsr_bit_valid = lfsr_en && !load;

  // ---------------- alternating step generator ----------------
  logic       asg_en, asg_out, asg_sel2;
  logic [7:0] asg_byte;
  logic       asg_byte_valid, asg_byte_ready;

  asg u_asg (
    .clk, .rst_n, .en(asg_en && !load), .load,
    .seed1(seed_asg1), .seed2(seed_asg2), .seed3(seed_asg3),
    .sel2(asg_sel2), .out_bit(asg_out)
  );

  bit_packer u_asg_pack (
    .clk, .rst_n, .bit_in(asg_out), .bit_valid(!load), .gen_en(asg_en),
    .byte_out(asg_byte), .byte_valid(asg_byte_valid), .byte_ready(asg_byte_ready)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_asg_uart (
    .clk, .rst_n, .data(asg_byte), .valid(asg_byte_valid), .ready(asg_byte_ready),
    .tx(asg_tx)
  );

  assign asg_bit       = asg_out;
  assign asg_bit_valid = asg_en && !load;

  // ---------------- shrinking generator ----------------
  logic       sg_en, sg_out, sg_sel;
  logic [7:0] sg_byte;
  logic       sg_byte_valid, sg_byte_ready;

  shrinking_gen u_sg (
    .clk, .rst_n, .en(sg_en && !load), .load, .seed_a(seed_sg_a), .seed_b(seed_sg_b),
    .out_bit(sg_out), .out_valid(sg_sel)
  );

  bit_packer u_sg_pack (
    .clk, .rst_n, .bit_in(sg_out), .bit_valid(sg_sel && !load), .gen_en(sg_en),
    .byte_out(sg_byte), .byte_valid(sg_byte_valid), .byte_ready(sg_byte_ready)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_sg_uart (
    .clk, .rst_n, .data(sg_byte), .valid(sg_byte_valid), .ready(sg_byte_ready),
    .tx(sg_tx)
  );

  assign sg_bit       = sg_out;
  assign sg_bit_valid = sg_en && sg_sel && !load;

endmodule
