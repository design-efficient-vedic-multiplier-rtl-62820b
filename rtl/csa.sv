// csa: W-bit (3:2) carry-save adder. Three vectors a, b, c are reduced bit by
// bit in a row of full adders to a sum vector s and a carry vector cy, with
// a + b + c = s + 2*cy; cy[i] carries weight 2^(i+1), so cy[W-1] is the carry
// the design calls C[W] (c1). Sum XORs are ixor_gates.
// Interface: a, b, c -> s, cy; purely combinational.
module csa #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-1:0] ab;

  ixor_gate #(.W(W)) u_x1 (.a(a),  .b(b), .y(ab));
  ixor_gate #(.W(W)) u_x2 (.a(ab), .b(c), .y(s));
  assign cy = (a & b) | (c & ab);
endmodule
