// ib1c: increment-by-1 converter, out_v = in_v + en with the carry out
// dropped. It replaces an adder where only +1 is ever needed:
// out[i] = in[i] XOR (en AND in[i-1] AND ... AND in[0]).
// The function follows the design; the gate chain is the usual one.
// Interface: in_v, en -> out_v; purely combinational.
module ib1c #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] in_v,
  input  logic         en,
  output logic [W-1:0] out_v
);
  logic [W-1:0] run;

  assign run[0] = en;
  for (genvar i = 1; i < W; i++) begin : g_run
    assign run[i] = en & (&in_v[i-1:0]);
  end

  ixor_gate #(.W(W)) u_x (.a(in_v), .b(run), .y(out_v));
endmodule
