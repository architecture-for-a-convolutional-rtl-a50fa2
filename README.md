# A multiply-accumulate engine for CNN convolution

Each output value of a convolutional layer is a dot product. A window of the
input feature map X is multiplied cell by cell with the kernel Y, and the
products are summed:

    S = X00*Y00 + X01*Y01 + ... + X(k-1)(k-1)*Y(k-1)(k-1)

This design does not build k*k multipliers and an adder tree. It builds one
multiplier and one adder, and loops them through a register:

    in_a (8) --+
               +--> multiplier --(16)--> adder --(32)--> register --+--> sum
    in_b (8) --+                          ^                         |
                                          +---------(32)------------+

Every clock takes one (X, Y) pair. The pair's product is added to the running
sum, and the register stores the result. The next pair starts from that stored
value. The hardware is the same for a 1x1, 3x3 or 11x11 kernel. A larger kernel
only takes more clocks, k*k for a k x k kernel. The limit is the range of the
32-bit sum.

The design is built bottom-up from a few cells. XOR and NAND gates make a
one-bit full adder. Chained full adders make the 32-bit accumulation adder and
the rows of the 8-bit array multiplier. A row of D flip-flops makes the sum
register.

## Hierarchy

| Module | What it is |
|---|---|
| `conv_mac` | The top: multiplier, 32-bit adder and sum register in a loop |
| `array_multiplier` | Unsigned 8 x 8 array multiplier with a 16-bit product |
| `ripple_adder` | W-bit ripple-carry adder: 32 bits in the loop, 8 bits in each multiplier row |
| `full_adder` | One-bit adder cell made of 2 `xor2` and 3 `nand2` gates |
| `xor2`, `nand2` | The two primitive gates |
| `sum_register` | 32-bit register: a row of `d_flip_flop`s with clear and enable in front |
| `d_flip_flop` | Rising-edge D flip-flop with an asynchronous active-low reset |
| `conv_mac_pkg` | The shared widths (8, 16, 32) and the operand, product and sum types |

Each file begins with a comment that describes its interface and timing.

## Driving the engine

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; the register loads on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset; clears the sum |
| `clr` | in | 1 | synchronous clear: the sum is 0 after the next edge; wins over `en` |
| `en` | in | 1 | `in_a`/`in_b` carry a valid pair: `sum <= sum + in_a*in_b` at the next edge |
| `in_a` | in | 8 | a cell of the input window X, unsigned |
| `in_b` | in | 8 | the matching kernel cell Y, unsigned |
| `product` | out | 16 | `in_a * in_b`, combinational |
| `sum` | out | 32 | the running sum, straight from the register |

To compute one output value:

1. Raise `clr` for one clock.
2. Present the k*k pairs in any order, one per clock, with `en` high. Dropping
   `en` for a clock inserts a bubble, and the sum holds.
3. `sum` holds the result one clock after the last pair is accepted. The
   engine has no pipeline, so one output costs k*k + 1 clocks including the
   clear.

The engine has no "done" or "valid" output. The logic that supplies the pairs
counts them and knows when `sum` is final. That logic is not part of this
design: the window addressing, the counters, and the memories for the image,
the kernel and the outputs. The testbenches play its role.

## Number range and overflow

The operands are unsigned, so a product is at most 255 * 255 = 65,025 and
needs 16 bits. The sum is 32 bits and wraps modulo 2^32. There is no overflow
flag and no saturation. The adder's carry out is computed but not used.

- A 3x3 window needs at most 9 * 65,025 = 585,225, which is 20 bits.
- At full-scale operands, 66,051 products fit. The 66,052nd wraps the sum.
  This means any square kernel up to 257 x 257 is safe for every input.

Signed operands are not supported. Signed data would need a signed
(Baugh-Wooley or Booth) multiplier and sign extension of the product into the
adder.

## Timing

All blocks are written as logic with no delays. The source design measured
these delays in a 0.6 um CMOS transistor-level simulation:

| Block | Reported delay |
|---|---|
| XOR gate | 0.7 ns |
| one-bit adder | 1.5 ns |
| 32-bit adder path | 33 ns |
| 8-bit multiplier | 11 ns |

The clock period must cover the multiplier followed by the 32-bit adder. The
two ripple carry chains make this the critical path: the carry through 32
adder cells, after the multiplier's seven adder rows. Faster options would be
a carry-lookahead or prefix adder, a Wallace/Dadda multiplier, or a pipeline
register between the multiplier and the adder. None of them is implemented.

## Where this RTL makes its own choices

The architecture fixes the widths (8-bit operands, 16-bit product, 32-bit
adder and register) and the loop structure. It also fixes the composition from
XOR/NAND gates, adder cells and flip-flops. The following were left open and
are decided here:

- **Unsigned arithmetic.** The 16-bit product is zero-extended to 32 bits.
- **Control inputs.** `en`, `clr` (with priority over `en`) and the
  asynchronous reset `rst_n` are additions. The original leaves iteration
  control and register reset to surrounding logic that it does not specify.
- **Adder cell netlist.** The cell computes `s = a^b^cin` and
  `cout = NAND(NAND(a,b), NAND(a^b,cin))`.
- **Carry-ripple organisation.** Both the 32-bit adder and the multiplier
  rows ripple their carries.
- **Multiplier structure.** It is an array multiplier. Row 0 is `a & b[0]`.
  Row i adds `a & b[i]` to the upper 8 bits of row i-1 in an 8-bit ripple
  adder, and the lowest bit of each row's sum is one product bit. Each AND is
  a NAND followed by a NAND used as an inverter.
- **Flip-flop.** It is an edge-triggered process, not a NAND-latch netlist.

`conv_mac` also carries two concurrent assertions. One requires that each
accepted pair adds exactly its product to the sum. The other requires that
`clr` empties the sum.

## Simulating

Every testbench checks itself. Each one prints
`TB_RESULT checks=N failures=M` and stops, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `xor2_tb`, `nand2_tb`, `full_adder_tb` | exhaustive truth tables |
| `ripple_adder_tb` | 32-bit corner cases and 20,000 random sums with carry in |
| `array_multiplier_tb` | all 65,536 operand pairs |
| `d_flip_flop_tb` | edge capture, falling edge ignored, asynchronous reset |
| `sum_register_tb` | 2,000 cycles of random clear/load/hold against a model |
| `conv_mac_tb` | see below |
| `conv_mac_image_tb` | a full stride-1 convolution of a random 16x16 image |

`conv_mac_tb` runs the top at its default sizes. It covers:

- 3x3 windows with random and full-scale operands;
- kernels of 1x1, 2x2, 3x3, 5x5, 7x7 and 11x11, with random idle cycles;
- `clr` and `en` raised together;
- a reset in mid-window;
- the overflow boundary: 66,051 and then 66,052 full-scale products.

It checks the sum after every pair and checks that each window takes exactly
one clock per pair. It also counts each of these situations and fails if one
never occurred.

`conv_mac_image_tb` uses a 3x3 kernel (196 outputs) and a 5x5 kernel (144
outputs). It compares every output, and checks the k*k + 1 clock cost of each
one.

To build and run one testbench with Verilator 5 from the top folder:

    verilator --binary --timing --assert -Irtl -Itb --top-module conv_mac_tb \
        rtl/conv_mac_pkg.sv tb/conv_mac_tb.sv
    ./obj_dir/Vconv_mac_tb

Replace `conv_mac_tb` with any testbench name. The package must come first
because the modules take their default widths from it. Each run takes well
under a second.

Lint with:

    verilator --lint-only -Wall -Irtl rtl/conv_mac_pkg.sv rtl/conv_mac.sv

Lint reports two warnings, both expected:

- the unused adder carry out, because the sum wraps by design;
- `rst_n` is used both as the flip-flops' asynchronous reset and in the
  assertions' `disable iff`.

## Changing it

- **Widths.** `conv_mac` takes `IN_W` (operand width, default 8) and `ACC_W`
  (sum width, default 32). The product width follows as `2*IN_W`, and
  `ACC_W` must be at least that. The array multiplier and the ripple adders
  take any width.
- **Overflow detection.** The adder's `cout` in `conv_mac` is where a sticky
  overflow flag or saturation would start.
- **Speed.** Replacing `ripple_adder` inside `conv_mac` with a faster adder of
  the same ports changes nothing else.
