// prbg_pkg: constants shared by the LFSR-based pseudo-random bit generators.
//
// A feedback polynomial x^N + ... + x^k + ... + 1 is stored as a tap mask of N bits in which
// bit k-1 is set for every term x^k (k >= 1). Bit k-1 stands for stage b_k of the shift
// register, so the mask also says which stages are XORed into the feedback. Stage b_1 is the
// input end of the register and b_N its output end.
//
// The 67-, 56- and 83-bit polynomials are the ones the generators were specified with. For the
// 61-bit register the specified polynomial x^61+x^60+x^47+x^46+1 is not primitive, which would
// break the period the shrinking generator relies on; this package uses the primitive
// x^61+x^60+x^46+x^45+1 instead (design choice, see README).
package prbg_pkg;

  // Build an N-bit tap mask from four exponents (the form of all polynomials used here).
  function automatic logic [127:0] taps4(int unsigned e1, int unsigned e2,
                                         int unsigned e3, int unsigned e4);
    logic [127:0] m;
    m = '0;
    m[e1-1] = 1'b1;
    m[e2-1] = 1'b1;
    m[e3-1] = 1'b1;
    m[e4-1] = 1'b1;
    return m;
  endfunction

  // x^67 + x^66 + x^58 + x^57 + 1 : single-LFSR generator, ASG LFSR2, shrinking LFSR B
  localparam logic [66:0] TAPS_67 = 67'(taps4(67, 66, 58, 57));
  // x^56 + x^55 + x^35 + x^34 + 1 : ASG control register LFSR1
  localparam logic [55:0] TAPS_56 = 56'(taps4(56, 55, 35, 34));
  // x^83 + x^82 + x^38 + x^37 + 1 : ASG LFSR3
  localparam logic [82:0] TAPS_83 = 83'(taps4(83, 82, 38, 37));
  // x^61 + x^60 + x^46 + x^45 + 1 : shrinking LFSR A (primitive replacement, see above)
  localparam logic [60:0] TAPS_61 = 61'(taps4(61, 60, 46, 45));

  // Serial port: 100 MHz board clock, 115200 baud.
  localparam int unsigned CLK_HZ        = 100_000_000;
  localparam int unsigned BAUD          = 115_200;
  localparam int unsigned CLKS_PER_BIT  = CLK_HZ / BAUD;   // 868

  typedef enum logic [1:0] {
    UART_IDLE  = 2'd0,
    UART_START = 2'd1,
    UART_DATA  = 2'd2,
    UART_STOP  = 2'd3
  } uart_state_e;

endpackage
