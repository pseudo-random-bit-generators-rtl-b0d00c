// asg: alternating step generator built from three LFSRs.
//
// LFSR1 (the control register) steps on every enabled clock. Its output bit chooses which of
// the two generating registers steps on the same clock: LFSR2 when the bit is 1, LFSR3 when it
// is 0; the other one holds its state. The generator output is the XOR of the output bits of
// LFSR2 and LFSR3. Defaults: LFSR1 56 bits (x^56+x^55+x^35+x^34+1), LFSR2 67 bits
// (x^67+x^66+x^58+x^57+1), LFSR3 83 bits (x^83+x^82+x^38+x^37+1).
//
// Interface and timing:
//   out_bit = LFSR2.b_N xor LFSR3.b_N of the current state, valid on every cycle. Asserting en
//   consumes it: on that edge LFSR1 advances, and LFSR2 or LFSR3 advances as selected by
//   sel2 (= LFSR1.b_N before the edge). One output bit per enabled clock.
//   load writes the three seeds; rst_n (asynchronous, active low) loads the SEED parameters.
// The control scheme and the XOR output follow the generator description, where LFSR2 and
// LFSR3 are clock-controlled registers; this design keeps one clock for all three and uses
// clock enables, which gives the same bit sequence.
module asg #(
  parameter int unsigned   N1    = 56,
  parameter int unsigned   N2    = 67,
  parameter int unsigned   N3    = 83,
  parameter logic [N1-1:0] TAPS1 = prbg_pkg::TAPS_56,
  parameter logic [N2-1:0] TAPS2 = prbg_pkg::TAPS_67,
  parameter logic [N3-1:0] TAPS3 = prbg_pkg::TAPS_83,
  parameter logic [N1-1:0] SEED1 = '1,
  parameter logic [N2-1:0] SEED2 = '1,
  parameter logic [N3-1:0] SEED3 = '1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          load,
  input  logic [N1-1:0] seed1,
  input  logic [N2-1:0] seed2,
  input  logic [N3-1:0] seed3,
  output logic          sel2,
  output logic          out_bit
);

  logic          ctrl_bit, bit2, bit3;
  logic [N1-1:0] state1;
  logic [N2-1:0] state2;
  logic [N3-1:0] state3;

  // Control register: clocked on every enabled cycle.
  lfsr #(.N(N1), .TAPS(TAPS1), .SEED(SEED1)) u_lfsr1 (
    .clk, .rst_n, .en(en), .load, .seed(seed1), .state(state1), .out_bit(ctrl_bit)
  );

  // Generating registers: exactly one of them steps per enabled cycle.
  lfsr #(.N(N2), .TAPS(TAPS2), .SEED(SEED2)) u_lfsr2 (
    .clk, .rst_n, .en(en && ctrl_bit), .load, .seed(seed2), .state(state2), .out_bit(bit2)
  );

  lfsr #(.N(N3), .TAPS(TAPS3), .SEED(SEED3)) u_lfsr3 (
    .clk, .rst_n, .en(en && !ctrl_bit), .load, .seed(seed3), .state(state3), .out_bit(bit3)
  );

  assign sel2    = ctrl_bit;
  assign out_bit = bit2 ^ bit3;

endmodule
