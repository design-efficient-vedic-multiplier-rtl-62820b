// avm24: 24x24-bit adjusted Vedic multiplier, the mantissa multiplier of the
// single-precision MAC (two 1.F significands in, the 48-bit product out).
// Four 12x12 AVMs form HH = X[23:12]*Y[23:12], XHYL = X[23:12]*Y[11:0],
// XLYH = X[11:0]*Y[23:12] and LL = X[11:0]*Y[11:0]; Pr[11:0] = LL[11:0].
// A single 24-bit carry-save adder reduces XHYL, XLYH and {HH[11:0], LL[23:12]}
// to the S-vector S[23:0] and the C-vector C[24:1]. S[0] is already Pr[12],
// so the final adder shrinks to a 23-bit EBK-CSLA (groups 2,2,3,4,5,7) adding
// S[23:1] and C[23:1] into Pr[35:13], with carry out c2. C[24] is c1.
// The top twelve bits are HH[23:12] + c1 + c2: a 6-bit EBK-CSLA adds the carry
// value to HH[17:12] (Pr[41:36]); its carry out selects, in a 2:1 MUX, either
// HH[23:18] or HH[23:18] + 000001 from a second 6-bit EBK-CSLA (Pr[47:42]).
// No carry ripples through the partial-product reduction: the only carry
// chains are the MUX chains of the carry-select adders.
// All of this follows the design, except that its enable E = c1 OR c2 is
// replaced by the two-bit sum {c1 AND c2, c1 XOR c2}: both carries can be 1 at
// once and the top half then needs +2.
// Interface: x, y -> p = x*y; latency PIPE clock cycles (PIPE = 1 registers
// every 3x3 product), one new pair per clock.
module avm24 #(
  parameter bit PIPE = 1'b1
) (
  input  logic        clk,
  input  logic [23:0] x,
  input  logic [23:0] y,
  output logic [47:0] p
);
  logic [23:0] hh, xhyl, xlyh, ll;
  logic [23:0] s, cy;
  logic        c1, c2, e_inc, e_two, r;
  logic [5:0]  hi_inc;
  logic        hi_cout;

  avm12 #(.PIPE(PIPE)) u_hh   (.clk(clk), .x(x[23:12]), .y(y[23:12]), .p(hh));
  avm12 #(.PIPE(PIPE)) u_xhyl (.clk(clk), .x(x[23:12]), .y(y[11:0]),  .p(xhyl));
  avm12 #(.PIPE(PIPE)) u_xlyh (.clk(clk), .x(x[11:0]),  .y(y[23:12]), .p(xlyh));
  avm12 #(.PIPE(PIPE)) u_ll   (.clk(clk), .x(x[11:0]),  .y(y[11:0]),  .p(ll));

  csa #(.W(24)) u_csa (.a(xhyl), .b(xlyh), .c({hh[11:0], ll[23:12]}), .s(s), .cy(cy));
  assign c1 = cy[23];

  ebk_csla #(.GW('{2, 2, 3, 4, 5, 7, 0, 0})) u_add (
    .a(s[23:1]), .b(cy[22:0]), .cin(1'b0), .sum(p[35:13]), .cout(c2)
  );

  ixor_gate #(.W(1)) u_e (.a(c1), .b(c2), .y(e_inc));
  assign e_two = c1 & c2;

  ebk_csla #(.GW('{3, 3, 0, 0, 0, 0, 0, 0})) u_top_lo (
    .a(hh[17:12]), .b({4'b0000, e_two, e_inc}), .cin(1'b0), .sum(p[41:36]), .cout(r)
  );
  ebk_csla #(.GW('{3, 3, 0, 0, 0, 0, 0, 0})) u_top_hi (
    .a(hh[23:18]), .b(6'b000001), .cin(1'b0), .sum(hi_inc), .cout(hi_cout)
  );
  assign p[47:42] = r ? hi_inc : hh[23:18];

  assign p[12]   = s[0];
  assign p[11:0] = ll[11:0];
endmodule
