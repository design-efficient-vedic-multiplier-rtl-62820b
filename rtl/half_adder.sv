// half_adder: one-bit half adder, s = a XOR b (three-gate ixor_gate),
// co = a AND b. Helper of the 3x3 Vedic multiplier. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  ixor_gate #(.W(1)) u_x (.a(a), .b(b), .y(s));
  assign co = a & b;
endmodule
