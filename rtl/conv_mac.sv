// conv_mac: multiply-accumulate engine for one output of a CNN convolution.
//
// A convolution output is the dot product of an input window X and a kernel
// Y: S = sum of X[i][j] * Y[i][j]. This datapath computes it one term per
// clock. Input A (a cell of X) and Input B (the matching cell of Y), 8 bits
// each, go into the array multiplier; its 16-bit product is zero-extended and
// added to the 32-bit running sum in a ripple-carry adder; the register stores
// the new sum and feeds it back to the adder. Because the sum lives in a
// register, the same hardware serves any kernel size: a k x k kernel simply
// takes k*k accumulation steps, as long as the sum fits in 32 bits.
//
// Interface
//   clk, rst_n  clock; asynchronous active-low reset clears the sum
//   clr         synchronous clear: the sum becomes 0 at the next edge
//               (priority over en); used before each new output value
//   en          in_a/in_b hold a valid pair: at the next edge the sum
//               becomes sum + in_a * in_b
//   in_a, in_b  the two 8-bit unsigned operands
//   product     in_a * in_b, combinational
//   sum         the running sum (the output), valid one clock after the
//               last pair was accepted
// Timing: one pair per clock, no pipeline; sum is updated at the edge that
// samples en high. Overflow wraps modulo 2^32 with no flag: with 8-bit
// unsigned operands at most 66051 full-scale products fit.
//
// Widths, the multiplier-adder-register loop and the output taken from the
// register follow the architecture. Unsigned arithmetic, the en/clr controls
// and the reset are this design's choices.
module conv_mac #(
  parameter int unsigned IN_W  = conv_mac_pkg::IN_W,
  parameter int unsigned ACC_W = conv_mac_pkg::ACC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic [IN_W-1:0]     in_a,
  input  logic [IN_W-1:0]     in_b,
  output logic [2*IN_W-1:0]   product,
  output logic [ACC_W-1:0]    sum
);

  localparam int unsigned PROD_W = 2 * IN_W;

  logic [ACC_W-1:0] addend;
  logic [ACC_W-1:0] next_sum;
  logic             carry_out;  // overflow of the running sum; not used, the sum wraps

  array_multiplier #(.W(IN_W)) u_mult (
    .a(in_a),
    .b(in_b),
    .p(product)
  );

  assign addend = {{(ACC_W-PROD_W){1'b0}}, product};

  ripple_adder #(.W(ACC_W)) u_add (
    .a   (sum),
    .b   (addend),
    .cin (1'b0),
    .s   (next_sum),
    .cout(carry_out)
  );

  sum_register #(.W(ACC_W)) u_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .en   (en),
    .d    (next_sum),
    .q    (sum)
  );

  // The register takes exactly one accumulation step per accepted pair.
  a_accumulate: assert property (@(posedge clk) disable iff (!rst_n)
    (en && !clr) |=> (sum == $past(sum) + ACC_W'($past(product))));

  a_clear: assert property (@(posedge clk) disable iff (!rst_n)
    clr |=> (sum == '0));

endmodule
