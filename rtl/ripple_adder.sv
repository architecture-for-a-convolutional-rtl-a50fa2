// ripple_adder: W-bit carry-ripple adder (W = 32 in the accumulation path).
//
// A chain of W full_adder cells; the carry out of bit i is the carry in of
// bit i+1. s is (a + b + cin) modulo 2^W and cout is the carry out of the top
// bit. In the multiply-accumulate datapath it adds the zero-extended product
// to the running sum; W = 8 copies of it also form the rows of the multiplier.
//
// Interface: a, b (W bits), cin in; s (W bits), cout out. Purely
// combinational. The worst-case path runs through all W carry stages, which is
// why the 32-bit accumulation adder is the slowest block of the datapath.
//
// The 32-bit width and the reuse of one adder cell follow the architecture;
// the carry-ripple organisation is this design's choice, the simplest that
// fits a chain of identical cells.
module ripple_adder #(
  parameter int unsigned W = conv_mac_pkg::ACC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
