// ebk_csla: enhanced Brent-Kung carry-select adder.
// The W = GW[0] + ... + GW[NG-1] operand bits are cut into NG groups (the
// non-zero entries of GW, at most eight), least significant first. Group 0 is a Brent-Kung adder fed with the real carry in.
// Every other group g has a Brent-Kung adder with carry in 0, whose (GW[g]+1)-bit
// result {carry, sum} is also passed through a (GW[g]+1)-bit binary-to-excess-1
// converter; a MUX driven by the carry out of group g-1 picks the plain result
// (carry 0) or the BEC result (carry 1). The carry therefore ripples through
// one MUX per group instead of through the adders.
// The structure and the default grouping 2,2,3,4,5,7 (23 bits) follow the
// design's 23-bit adder; other widths use the groupings given with their
// instances.
// Interface: a, b, cin -> sum, cout; purely combinational.
module ebk_csla #(
  // group widths, least significant group first; unused trailing entries are 0
  parameter int unsigned GW [8] = '{2, 2, 3, 4, 5, 7, 0, 0}
) (
  input  logic [width()-1:0] a,
  input  logic [width()-1:0] b,
  input  logic               cin,
  output logic [width()-1:0] sum,
  output logic               cout
);
  function automatic int unsigned width();
    int unsigned w = 0;
    for (int g = 0; g < 8; g++) w += GW[g];
    return w;
  endfunction

  function automatic int unsigned ngroups();
    int unsigned n = 0;
    for (int g = 0; g < 8; g++) if (GW[g] != 0 && n == g) n++;
    return n;
  endfunction

  localparam int unsigned NG = ngroups();

  function automatic int unsigned offset(int unsigned grp);
    int unsigned o = 0;
    for (int g = 0; g < NG; g++) if (g < grp) o += GW[g];
    return o;
  endfunction

  logic [NG:0] c;   // c[g]: carry into group g
  assign c[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int unsigned LO = offset(g);
    localparam int unsigned GWG = GW[g];
    if (g == 0) begin : g_first
      bk_adder #(.W(GWG)) u_bk (
        .a(a[LO +: GWG]), .b(b[LO +: GWG]), .cin(c[0]),
        .sum(sum[LO +: GWG]), .cout(c[1])
      );
    end else begin : g_sel
      logic [GWG-1:0] s0;
      logic           co0;
      logic [GWG:0]   r1;   // {carry, sum} for a carry in of 1
      bk_adder #(.W(GWG)) u_bk (
        .a(a[LO +: GWG]), .b(b[LO +: GWG]), .cin(1'b0),
        .sum(s0), .cout(co0)
      );
      bec #(.W(GWG + 1)) u_bec (.in_v({co0, s0}), .out_v(r1));
      assign {c[g+1], sum[LO +: GWG]} = c[g] ? r1 : {co0, s0};
    end
  end

  assign cout = c[NG];
endmodule
