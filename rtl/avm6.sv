// avm6: 6x6-bit adjusted Vedic multiplier (AVM), the first level of the
// 24x24 mantissa multiplier.
// The operands are split into 3-bit halves and multiplied by four 3x3 Vedic
// multipliers: HH = X[5:3]*Y[5:3], XHYL = X[5:3]*Y[2:0], XLYH = X[2:0]*Y[5:3]
// and LL = X[2:0]*Y[2:0]. Product bits Pr[2:0] are LL[2:0] directly. The two
// cross products and the concatenation {HH[2:0], LL[5:3]} are reduced by one
// 6-bit carry-save adder; a 6-bit EBK-CSLA adds its sum vector S[5:0] and its
// carry vector shifted into place, giving Pr[8:3] and a carry c2. The CSA's top
// carry c1 and c2 are the carries into the upper bits Pr[11:9] = HH[5:3] + c1 + c2,
// formed by increment-by-1 converters.
// This follows the design's 6x6 AVM, except for the carry into the top: the
// design ORs c1 and c2 into a single increment, but both can be 1 (47*55 is an
// example), so here E = c1 XOR c2 increments Pr[11:9] and c1 AND c2 then
// increments Pr[11:10] (a +2).
// Interface: x, y -> p = x*y; latency PIPE clock cycles (the pipeline register
// is inside each 3x3 multiplier), a new pair accepted every cycle.
module avm6 #(
  parameter bit PIPE = 1'b1
) (
  input  logic        clk,
  input  logic [5:0]  x,
  input  logic [5:0]  y,
  output logic [11:0] p
);
  logic [5:0] hh, xhyl, xlyh, ll;
  logic [5:0] s, cy;
  logic       c1, c2, e_inc, e_two;
  logic [2:0] top1;

  vm3x3 #(.PIPE(PIPE)) u_hh   (.clk(clk), .a(x[5:3]), .b(y[5:3]), .p(hh));
  vm3x3 #(.PIPE(PIPE)) u_xhyl (.clk(clk), .a(x[5:3]), .b(y[2:0]), .p(xhyl));
  vm3x3 #(.PIPE(PIPE)) u_xlyh (.clk(clk), .a(x[2:0]), .b(y[5:3]), .p(xlyh));
  vm3x3 #(.PIPE(PIPE)) u_ll   (.clk(clk), .a(x[2:0]), .b(y[2:0]), .p(ll));

  csa #(.W(6)) u_csa (.a(xhyl), .b(xlyh), .c({hh[2:0], ll[5:3]}), .s(s), .cy(cy));
  assign c1 = cy[5];

  ebk_csla #(.GW('{3, 3, 0, 0, 0, 0, 0, 0})) u_add (
    .a(s), .b({cy[4:0], 1'b0}), .cin(1'b0), .sum(p[8:3]), .cout(c2)
  );

  // carry into Pr[11:9] is c1 + c2 in {0,1,2}
  ixor_gate #(.W(1)) u_e (.a(c1), .b(c2), .y(e_inc));
  assign e_two = c1 & c2;

  ib1c #(.W(3)) u_inc1 (.in_v(hh[5:3]), .en(e_inc), .out_v(top1));
  ib1c #(.W(2)) u_inc2 (.in_v(top1[2:1]), .en(e_two), .out_v(p[11:10]));
  assign p[9]   = top1[0];
  assign p[2:0] = ll[2:0];
endmodule
