// conv_mac_pkg: widths shared by the convolution multiply-accumulate datapath.
//
// The datapath multiplies two 8-bit operands (one input-matrix cell and one
// kernel cell) into a 16-bit product and adds it to a 32-bit running sum.
// These three widths come straight from the architecture; the package only
// gives them one home so that every block and testbench uses the same values.
package conv_mac_pkg;

  // Width of each operand, Input A (matrix X cell) and Input B (kernel Y cell).
  localparam int unsigned IN_W = 8;

  // Width of the product of two IN_W-bit operands.
  localparam int unsigned PROD_W = 2 * IN_W;

  // Width of the adder and of the register that holds the running sum.
  localparam int unsigned ACC_W = 32;

  // Operand and accumulator types at the default widths.
  typedef logic [IN_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;
  typedef logic [ACC_W-1:0]  acc_t;

endpackage
