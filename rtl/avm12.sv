// avm12: 12x12-bit adjusted Vedic multiplier, built from four 6x6 AVMs.
// HH = X[11:6]*Y[11:6], XHYL = X[11:6]*Y[5:0], XLYH = X[5:0]*Y[11:6] and
// LL = X[5:0]*Y[5:0]. Pr[5:0] = LL[5:0]. A 12-bit carry-save adder reduces
// XHYL, XLYH and {HH[5:0], LL[11:6]} to S[11:0] and C[12:1]; S[0] is Pr[6]
// as it stands, so an 11-bit EBK-CSLA (groups 2,2,3,4) adds S[11:1] and C[11:1]
// to give Pr[17:7] and a carry c2. C[12] is the carry c1. The top six bits are
// HH[11:6] plus c1 + c2: a 3-bit EBK-CSLA adds that to HH[8:6] giving Pr[20:18],
// and its carry out drives a 2:1 MUX that picks HH[11:9] or HH[11:9] + 001
// (a second 3-bit EBK-CSLA) as Pr[23:21].
// This is the design's 12x12 AVM; the groupings of the 11-bit and 3-bit adders
// are this implementation's choice, and the single enable E = c1 OR c2 of the
// design is replaced by the two-bit sum c1 + c2 (both carries can be 1).
// Interface: x, y -> p = x*y; latency PIPE clock cycles, one pair per cycle.
module avm12 #(
  parameter bit PIPE = 1'b1
) (
  input  logic        clk,
  input  logic [11:0] x,
  input  logic [11:0] y,
  output logic [23:0] p
);
  logic [11:0] hh, xhyl, xlyh, ll;
  logic [11:0] s, cy;
  logic        c1, c2, e_inc, e_two, r;
  logic [2:0]  hi_inc;
  logic        hi_cout;

  avm6 #(.PIPE(PIPE)) u_hh   (.clk(clk), .x(x[11:6]), .y(y[11:6]), .p(hh));
  avm6 #(.PIPE(PIPE)) u_xhyl (.clk(clk), .x(x[11:6]), .y(y[5:0]),  .p(xhyl));
  avm6 #(.PIPE(PIPE)) u_xlyh (.clk(clk), .x(x[5:0]),  .y(y[11:6]), .p(xlyh));
  avm6 #(.PIPE(PIPE)) u_ll   (.clk(clk), .x(x[5:0]),  .y(y[5:0]),  .p(ll));

  csa #(.W(12)) u_csa (.a(xhyl), .b(xlyh), .c({hh[5:0], ll[11:6]}), .s(s), .cy(cy));
  assign c1 = cy[11];

  ebk_csla #(.GW('{2, 2, 3, 4, 0, 0, 0, 0})) u_add (
    .a(s[11:1]), .b(cy[10:0]), .cin(1'b0), .sum(p[17:7]), .cout(c2)
  );

  ixor_gate #(.W(1)) u_e (.a(c1), .b(c2), .y(e_inc));
  assign e_two = c1 & c2;

  ebk_csla #(.GW('{1, 2, 0, 0, 0, 0, 0, 0})) u_top_lo (
    .a(hh[8:6]), .b({1'b0, e_two, e_inc}), .cin(1'b0), .sum(p[20:18]), .cout(r)
  );
  ebk_csla #(.GW('{1, 2, 0, 0, 0, 0, 0, 0})) u_top_hi (
    .a(hh[11:9]), .b(3'b001), .cin(1'b0), .sum(hi_inc), .cout(hi_cout)
  );
  assign p[23:21] = r ? hi_inc : hh[11:9];

  assign p[6]   = s[0];
  assign p[5:0] = ll[5:0];
endmodule
