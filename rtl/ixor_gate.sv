// ixor_gate: the "improved" XOR used throughout the adjusted Vedic multiplier.
// Instead of the five-gate sum-of-products form, XOR is built from three gates:
// y = AND( OR(a,b), NAND(a,b) ). The three-gate composition follows the
// design description; making the gate W bits wide (one gate triple per bit) is
// a convenience of this implementation.
// Interface: a, b -> y, purely combinational, W bits.
module ixor_gate #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [W-1:0] or_ab, nand_ab;

  assign or_ab   = a | b;
  assign nand_ab = ~(a & b);
  assign y       = or_ab & nand_ab;
endmodule
