// full_adder: one-bit full adder built from two three-gate XORs (ixor_gate),
// s = a XOR b XOR ci, co = a AND b OR ci AND (a XOR b). Helper of the 3x3
// Vedic multiplier. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic ab;
  ixor_gate #(.W(1)) u_x1 (.a(a),  .b(b),  .y(ab));
  ixor_gate #(.W(1)) u_x2 (.a(ab), .b(ci), .y(s));
  assign co = (a & b) | (ci & ab);
endmodule
