// nand2: two-input NAND gate.
//
// y is low only when both a and b are high. Being functionally complete, it
// builds the carry logic of the adder cell and the AND gates that form the
// multiplier's partial products (a NAND followed by a NAND used as an
// inverter).
//
// Interface: a, b in; y out. Purely combinational, no clock.
// The gate follows the architecture (a CMOS gate with two parallel pull-up
// and two series pull-down transistors); here it is the logic function only.
module nand2 (
  input  logic a,
  input  logic b,
  output logic y
);

  assign y = ~(a & b);

endmodule
