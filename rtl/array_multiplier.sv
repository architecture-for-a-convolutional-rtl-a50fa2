// array_multiplier: unsigned W x W-bit array multiplier (W = 8), 2W-bit product.
//
// Each partial product bit a[j] & b[i] is a NAND gate followed by a NAND used
// as an inverter. Row 0 is the partial product a & b[0]. Each further row i
// adds the upper W bits of the previous row's result (its W-bit sum plus the
// carry out) to the partial product a & b[i] in a W-bit ripple adder. The
// lowest bit of each row's sum is product bit i; the last row's upper W+1
// bits, less its lowest, give the top half of the product.
//
// Interface: a, b (W bits) in; p (2W bits) out, p = a * b. Purely
// combinational; the longest path crosses W-1 adder rows.
//
// The 8-bit operands, the 16-bit product and "adders combine partial
// products" follow the architecture. Unsigned operands and the carry-ripple
// array organisation are this design's choices.
module array_multiplier #(
  parameter int unsigned W = conv_mac_pkg::IN_W
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  logic [W-1:0] pp_n [W];   // NAND of a[j] and b[i]
  logic [W-1:0] pp   [W];   // partial product row i: a & {W{b[i]}}
  logic [W:0]   row  [W];   // running result of rows 0..i, W+1 bits

  for (genvar i = 0; i < W; i++) begin : g_pp_row
    for (genvar j = 0; j < W; j++) begin : g_pp_bit
      nand2 u_nand (.a(a[j]),       .b(b[i]),       .y(pp_n[i][j]));
      nand2 u_inv  (.a(pp_n[i][j]), .b(pp_n[i][j]), .y(pp[i][j]));
    end
  end

  assign row[0] = {1'b0, pp[0]};
  assign p[0]   = row[0][0];

  for (genvar i = 1; i < W; i++) begin : g_add_row
    ripple_adder #(.W(W)) u_row_add (
      .a   (row[i-1][W:1]),
      .b   (pp[i]),
      .cin (1'b0),
      .s   (row[i][W-1:0]),
      .cout(row[i][W])
    );
    assign p[i] = row[i][0];
  end

  assign p[2*W-1:W] = row[W-1][W:1];

endmodule
