// bec: binary-to-excess-1 converter, out_v = in_v + 1 (modulo 2^W).
// In a carry-select adder it turns the carry-in-0 result of a group (sum bits
// with the group's carry out on top) into the carry-in-1 result without a
// second adder: out[0] = NOT in[0], out[i] = in[i] XOR (in[i-1] AND ... AND in[0]).
// The role and the name follow the design; the gate chain is the usual one.
// Interface: in_v -> out_v, purely combinational.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] in_v,
  output logic [W-1:0] out_v
);
  logic [W-1:0] run;   // run[i] = AND of in_v[i-1:0], run[0] = 1

  assign run[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_run
    assign run[i] = (&in_v[i-1:0]);
  end

  ixor_gate #(.W(W)) u_x (.a(in_v), .b(run), .y(out_v));
endmodule
