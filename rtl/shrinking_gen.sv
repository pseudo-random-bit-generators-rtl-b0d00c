// shrinking_gen: shrinking generator built from two LFSRs.
//
// LFSR A and LFSR B step together on every enabled clock. The selection rule keeps the bit b_i
// of LFSR B when the bit a_i of LFSR A produced on the same step is 1 and discards it when a_i
// is 0, so on average one output bit is produced per two steps. Defaults: LFSR A 61 bits,
// LFSR B 67 bits (x^67+x^66+x^58+x^57+1). For LFSR A the primitive x^61+x^60+x^46+x^45+1 is
// used, because the x^61+x^60+x^47+x^46+1 it was specified with is not primitive (see README).
//
// Interface and timing:
//   out_bit = b_i (LFSR B.b_N) and out_valid = a_i (LFSR A.b_N) of the current state. Asserting
//   en consumes the pair: on that edge both registers advance, and out_bit is an output bit of
//   the generator if out_valid was 1 in that cycle.
//   load writes both seeds; rst_n (asynchronous, active low) loads the SEED parameters.
// The selection rule follows the generator description; the valid flag that replaces a
// variable-rate output is this design's choice.
module shrinking_gen #(
  parameter int unsigned   NA    = 61,
  parameter int unsigned   NB    = 67,
  parameter logic [NA-1:0] TAPSA = prbg_pkg::TAPS_61,
  parameter logic [NB-1:0] TAPSB = prbg_pkg::TAPS_67,
  parameter logic [NA-1:0] SEEDA = '1,
  parameter logic [NB-1:0] SEEDB = '1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          load,
  input  logic [NA-1:0] seed_a,
  input  logic [NB-1:0] seed_b,
  output logic          out_bit,
  output logic          out_valid
);

  logic          a_i, b_i;
  logic [NA-1:0] state_a;
  logic [NB-1:0] state_b;

  lfsr #(.N(NA), .TAPS(TAPSA), .SEED(SEEDA)) u_lfsr_a (
    .clk, .rst_n, .en, .load, .seed(seed_a), .state(state_a), .out_bit(a_i)
  );

  lfsr #(.N(NB), .TAPS(TAPSB), .SEED(SEEDB)) u_lfsr_b (
    .clk, .rst_n, .en, .load, .seed(seed_b), .state(state_b), .out_bit(b_i)
  );

  // Selection rule: b_i is accepted only when a_i = 1.
  assign out_valid = a_i;
  assign out_bit   = b_i;

endmodule
