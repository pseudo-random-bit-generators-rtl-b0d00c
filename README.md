# LFSR-based pseudo-random bit generators

Three pseudo-random bit generators, all built from linear-feedback shift registers (LFSRs),
side by side in one design, each with its own serial output:

| Generator | Registers | Output rate | Period |
|---|---|---|---|
| Single LFSR | 67 bits, x^67+x^66+x^58+x^57+1 | 1 bit / clock | 2^67-1 ≈ 1.48·10^20 |
| Alternating step (ASG) | 56 + 67 + 83 bits | 1 bit / clock | (2^56-1)(2^67-1)(2^83-1) ≈ 1.03·10^62 |
| Shrinking (SG) | 61 + 67 bits | ≈ 0.5 bit / clock | (2^67-1)·2^60 ≈ 1.70·10^38 |

A plain LFSR has good bit statistics and is cheap. However, its linear complexity equals its
length: 2N output bits are enough to rebuild the whole register. The other two generators
combine several LFSRs non-linearly, through irregular clocking or through discarding bits, to
push the linear complexity up to about half the length of any observed block. You can see this
in the bundled statistics testbench. In every 500-bit block the single LFSR has linear
complexity exactly 67, so it fails a linear-complexity test on every sequence. The ASG and the
SG reach about 250, which is what a random sequence gives.

The design targets a 100 MHz FPGA board clock. The generated bits go to a host computer over
an asynchronous serial line, one line per generator.

## The shift register (`rtl/lfsr.sv`)

The stages are numbered b_1 … b_N. On every enabled clock edge the register shifts one place
from b_1 towards b_N. b_N is the output bit. b_1 receives the XOR of every stage b_k whose
polynomial term x^k is present. In the RTL, stage b_k is `state[k-1]`. A polynomial is written
as an N-bit tap mask with bit k-1 set for each term x^k. `prbg_pkg::taps4()` builds the mask
from the four exponents. For example, x^67+x^66+x^58+x^57+1 becomes bits 66, 65, 57 and 56 of
a 67-bit mask.

The bit on `out_bit` is the current b_N. Raising `en` *consumes* it: on that clock edge the
register advances and `out_bit` shows the next bit. All three generators and the packer use
this convention, so a generator never runs ahead of whatever reads it. `load` has priority over
`en` and copies `seed` into the register. A zero seed would lock the register forever in the
all-zero state, so a zero seed loads the `SEED` parameter instead (all ones by default). Reset
is asynchronous, active low, and also loads `SEED`.

## Alternating step generator (`rtl/asg.sv`)

LFSR1 is the control register and steps on every enabled clock. Its current output bit (`sel2`)
decides which generating register steps on the same edge:

* `sel2 = 1`: LFSR2 steps and LFSR3 holds;
* `sel2 = 0`: LFSR3 steps and LFSR2 holds.

The output is LFSR2.b_N XOR LFSR3.b_N.

LFSR2 and LFSR3 are described as clock-controlled registers, which suggests switching their
clocks with the control bit. Here a single clock drives all registers, and the control bit
goes to their clock *enables*. The bit sequence is the same, and the design stays fully synchronous
and safe for FPGA timing.

The defaults are LFSR1 = 56 bits (x^56+x^55+x^35+x^34+1), LFSR2 = 67 bits
(x^67+x^66+x^58+x^57+1) and LFSR3 = 83 bits (x^83+x^82+x^38+x^37+1). The period is
T1·T2·T3. The testbench confirms this on a small instance with 3-, 4- and 5-bit registers:
the period is exactly 3255 = 7·15·31, and no divisor of 3255 is a period.

## Shrinking generator (`rtl/shrinking_gen.sv`)

LFSR A and LFSR B step together on every enabled clock. The *selection rule* keeps B's bit b_i
when A's bit a_i is 1, and throws it away when a_i is 0. On average half of the steps produce
a bit, so the output has a variable rate. The module therefore shows `out_bit = b_i` together
with `out_valid = a_i`. A consumer that raises `en` takes `out_bit` only if `out_valid` was
high in that cycle.

Two points about the register choice:

* **LFSR A's polynomial.** The 61-bit register was specified as x^61+x^60+x^47+x^46+1 and
  called primitive, but it is not. Because 2^61-1 is prime, a degree-61 polynomial is primitive
  exactly when x^(2^61-1) ≡ 1 modulo it, and this one fails that test. Without a maximal-length
  A register the stated period does not hold. The default is therefore the primitive
  x^61+x^60+x^46+x^45+1, which is one tap pair lower. To get the specified polynomial,
  override `TAPSA` with `prbg_pkg::taps4(61,60,47,46)`.
* **Which register selects.** The 61-bit register is taken to be A (the selector) and the
  67-bit register to be B.

The period of the output is (2^NB-1)·2^(NA-1). The formula (2^NB-1)(2^NA-1) is sometimes
quoted instead. The testbench confirms the first on a small instance: with a 3-bit A and a
4-bit B the period is 60, not 105.

## Getting the bits out: packer and serial port

Each generator drives its own chain `generator → bit_packer → uart_tx → *_tx`.

`bit_packer` drives the generator's `en`. While it has room it keeps `en` high and stores each
bit whose `bit_valid` is set: always for the LFSR and the ASG, and `a_i` for the SG. The first
stored bit goes to byte bit 0. The transmitter sends that bit first, so the serial line carries
the bits in generation order. Once eight bits are stored, the byte is offered on a valid/ready
handshake and the generator is **stalled** (`en` low) until the transmitter takes it. In the
cycle the byte is taken, a new bit can already be stored. No bit is ever dropped or repeated,
so the host receives one contiguous stretch of each generator's sequence. As a result, the
generators run at the pace of the serial line, not at the clock rate.

`uart_tx` sends 8N1 frames: a start bit, eight data bits LSB first, and a stop bit. Each bit
lasts `CLKS_PER_BIT` = 868 clocks (115200 baud from 100 MHz). `ready` is high only when the
transmitter is idle. It returns exactly 10·`CLKS_PER_BIT` cycles after a byte is taken. The
line idles high.

## Top level (`rtl/prbg_top.sv`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (100 MHz), asynchronous active-low reset |
| `load` | in | 1 | one-cycle pulse: load every seed port below |
| `seed_lfsr` | in | 67 | single LFSR seed |
| `seed_asg1/2/3` | in | 56/67/83 | ASG seeds |
| `seed_sg_a/b` | in | 61/67 | SG seeds |
| `lfsr_tx`, `asg_tx`, `sg_tx` | out | 1 | serial lines |
| `*_bit`, `*_bit_valid` | out | 1 | the bits taken from each generator, for observation or on-chip use |

Seed bit k-1 is stage b_k. During the `load` cycle no generator steps. Bits already sitting in
a packer are still sent, and the bits after them come from the new seeds. The only parameter
is `CLKS_PER_BIT`.

Size: the flip-flop counts of the generator registers are 67, 206 and 128. The logic per
generator is one XOR tree over four taps per register, plus the enables.

## Verification

Every testbench checks its own results and ends with a `TB_RESULT checks=… failures=…` line.

| Testbench | What it checks |
|---|---|
| `tb_lfsr` | 67-bit register against an independent reference model (3500 steps, random enable, seed load), hold, zero-seed guard, period 255 of an 8-bit register |
| `tb_asg` | default ASG bit for bit against the reference (6000 steps, random enable, seed load), both branches used, small-instance period 3255 |
| `tb_shrinking_gen` | default SG bit for bit against the reference, kept and discarded bits, small-instance period 60 |
| `tb_bit_packer` | byte contents and bit order, stall only while a full byte waits, back-to-back transfers |
| `tb_uart_tx` | frames decoded by a receiver model, frame length 10·`CLKS_PER_BIT` |
| `tb_prbg_top` | full design at its default parameters: decodes all three serial lines (36 bytes) and compares them with reference generators across two seed loads; counts stalls, ASG steps of LFSR2 and LFSR3, SG bits kept and discarded, and seed loads, and requires each to occur |
| `tb_prbg_stats` | statistical workload in the style of NIST SP800-22: 100 seeded sequences of 8192 bits per generator through frequency, runs, block-frequency, cumulative-sums and linear-complexity (Berlekamp–Massey) tests at α = 0.01; a test passes at 96 of 100 sequences. Expected and checked: the LFSR fails linear complexity on every sequence (complexity exactly 67) and passes the rest; the ASG and the SG pass all five. Also checks the SG rate of 0.45…0.55 bit/clock |

The reference models in `tb/prbg_ref_pkg.sv` use a different formulation from the RTL: exponent
lists instead of tap masks, and an unpacked array of stages.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_prbg_top rtl/prbg_pkg.sv tb/prbg_ref_pkg.sv tb/tb_prbg_top.sv
./obj_dir/Vtb_prbg_top
```

Substitute the testbench name for the others. `tb_prbg_top` covers about 110,000 clock
cycles (36 serial frames) and runs in well under a second, as do all the others.

## What this design adds, and what it does not cover

The generator structures, register lengths and polynomials follow the original generator
descriptions, with the one polynomial change explained above. The following are this design's
own choices:

* clock enables instead of switched clocks in the ASG;
* the consume-on-enable output convention and the SG valid flag;
* the seed ports, the all-ones reset value and the zero-seed guard;
* the whole serial path: packing, bit order, stalling and 8N1 at 115200 baud.

Not covered:

* **Real statistical tests.** The full NIST SP800-22 run (100 sequences of 2^20 bits per
  generator) needs about 1.05·10^8 bits per generator. That is easy for the hardware: about
  19 minutes per generator at 115200 baud. It is far beyond simulation. The statistics
  testbench runs five of the fifteen tests on 100 sequences of 8192 bits instead.
* **FPGA throughput.** Throughput on the FPGA (roughly 260–320 Mbit/s for the three
  generators) is a place-and-route result and is not reproduced here. Through the serial port
  the throughput is limited to 92 kbit/s of payload per generator.
* **Host side.** There is no receiver on the board. The oscillator and the host computer are
  outside this RTL.
