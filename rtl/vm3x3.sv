// vm3x3: conventional 3x3-bit Vedic multiplier (Urdhva-Tiryakbhyam sutra,
// "vertically and crosswise"). The nine bit products a[i] & b[j] are summed
// column by column, column k holding the crosswise products with i + j = k:
//   column 0: a0b0                          -> p0
//   column 1: a1b0 + a0b1                   -> half adder        -> p1, k1
//   column 2: a2b0 + a1b1 + a0b2, then + k1 -> full + half adder -> p2, k2a, k2b
//   column 3: a2b1 + a1b2 + k2a, then + k2b -> full + half adder -> p3, k3a, k3b
//   column 4: a2b2 + k3a + k3b              -> full adder        -> p4, p5
// All XORs are the three-gate ixor_gate. With PIPE = 1 the 6-bit product is
// registered, which is the pipelined 3x3 VM from which the design builds its
// fastest 24x24 multiplier; with PIPE = 0 it is combinational. The adder
// arrangement inside the columns and the placement of the register (on the
// 3x3 product) are this implementation's choices.
// Interface: a, b -> p = a*b, valid PIPE clock cycles after a, b. The register
// holds data only and has no reset.
module vm3x3 #(
  parameter bit PIPE = 1'b1
) (
  input  logic       clk,
  input  logic [2:0] a,
  input  logic [2:0] b,
  output logic [5:0] p
);
  logic [5:0] prod;
  logic [2:0] pp [3];   // pp[i][j] = a[i] & b[j]
  logic k1, s2, k2a, k2b, s3, k3a, k3b;

  for (genvar i = 0; i < 3; i++) begin : g_pp
    assign pp[i] = {3{a[i]}} & b;
  end

  assign prod[0] = pp[0][0];
  half_adder u_c1  (.a(pp[1][0]), .b(pp[0][1]), .s(prod[1]), .co(k1));
  full_adder u_c2a (.a(pp[2][0]), .b(pp[1][1]), .ci(pp[0][2]), .s(s2), .co(k2a));
  half_adder u_c2b (.a(s2), .b(k1), .s(prod[2]), .co(k2b));
  full_adder u_c3a (.a(pp[2][1]), .b(pp[1][2]), .ci(k2a), .s(s3), .co(k3a));
  half_adder u_c3b (.a(s3), .b(k2b), .s(prod[3]), .co(k3b));
  full_adder u_c4  (.a(pp[2][2]), .b(k3a), .ci(k3b), .s(prod[4]), .co(prod[5]));

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) p <= prod;
  end else begin : g_comb
    assign p = prod;
  end
endmodule
