// full_adder: one-bit adder cell built from XOR and NAND gates.
//
// Adds a, b and a carry in. The sum is two XOR gates in series,
// s = (a ^ b) ^ cin. The carry is the NAND-NAND form of
// (a & b) | ((a ^ b) & cin): two NANDs make the generate and propagate
// terms and a third NAND combines them.
//
// This cell is repeated W times in the ripple-carry adder and in every row of
// the array multiplier.
//
// Interface: a, b, cin in; s, cout out. Purely combinational.
// That the adder cell is built from the XOR and NAND gates and reused in the
// multiplier and the 32-bit adder follows the architecture; the exact gate
// netlist (2 XOR + 3 NAND) is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic p;      // propagate, a ^ b
  logic g_n;    // ~(a & b)
  logic t_n;    // ~(p & cin)

  xor2  u_xor_p   (.a(a),   .b(b),   .y(p));
  xor2  u_xor_s   (.a(p),   .b(cin), .y(s));
  nand2 u_nand_g  (.a(a),   .b(b),   .y(g_n));
  nand2 u_nand_t  (.a(p),   .b(cin), .y(t_n));
  nand2 u_nand_co (.a(g_n), .b(t_n), .y(cout));

endmodule
