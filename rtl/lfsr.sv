// lfsr: N-stage Fibonacci linear-feedback shift register, the simple LFSR-based bit generator.
//
// Stages b_1..b_N are held in state[0]..state[N-1]. On every enabled clock the register shifts
// one place towards b_N, and the modulo-2 sum (XOR) of the stages selected by the tap mask is
// written into b_1. The output bit is b_N. With a primitive polynomial the sequence has period
// 2^N - 1. The default parameters give the 67-bit generator with x^67+x^66+x^58+x^57+1.
//
// Interface and timing:
//   out_bit is b_N of the current state (combinational from the register). The bit is
//   consumed by asserting en: on that clock edge the register advances and out_bit shows the
//   next bit. load (priority over en) writes the seed into the register; a zero seed, which
//   would lock the register in the all-zero state, loads SEED instead. Reset (asynchronous,
//   active low) loads SEED.
// The structure and the polynomial follow the generator description; the enable, the seed
// port, the reset value and the zero-seed guard are this design's choices.
module lfsr #(
  parameter int unsigned       N    = 67,
  parameter logic [N-1:0]      TAPS = prbg_pkg::TAPS_67,
  parameter logic [N-1:0]      SEED = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] seed,
  output logic [N-1:0] state,
  output logic         out_bit
);

  logic feedback;

  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= SEED;
    else if (load)
      state <= (seed == '0) ? SEED : seed;
    else if (en)
      state <= {state[N-2:0], feedback};
  end

  assign out_bit = state[N-1];

  initial begin
    assert (N >= 2) else $error("lfsr: N must be at least 2");
    assert (SEED != '0) else $error("lfsr: SEED must be non-zero");
  end

endmodule
