// xor2: two-input exclusive-OR gate.
//
// y is high when exactly one of a and b is high. In the datapath it forms the
// sum bit of every adder cell (a half adder's sum is a XOR b, a full adder's
// sum is two XORs in series), so it sits on every carry-save and carry-ripple
// path of the multiplier and the accumulator adder.
//
// Interface: a, b in; y out. Purely combinational, no clock.
// The gate and its role follow the architecture; the architecture builds it
// as a static CMOS transistor circuit, which here is the logic function only.
module xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  assign y = a ^ b;

endmodule
