// bk_adder: W-bit Brent-Kung parallel-prefix adder with carry in and out.
// Bit-level generate/propagate pairs are formed first (the carry in is folded
// into bit 0's generate), then combined by the Brent-Kung prefix network: an
// up-sweep that builds group carries at positions 2^k-1, 4*2^k-1, ... and a
// down-sweep that fills in the remaining positions. Sum bits are
// propagate XOR incoming carry. Every XOR is an ixor_gate.
// The Brent-Kung adder is named by the design but its tree is the textbook one.
// Interface: a, b, cin -> sum, cout; purely combinational.
module bk_adder #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] p;     // bit propagate a XOR b
  logic [W-1:0] gc;    // prefix generate: carry out of bit i
  logic [W-1:0] cvec;  // carry into bit i

  ixor_gate #(.W(W)) u_prop (.a(a), .b(b), .y(p));

  always_comb begin
    logic [W-1:0] g, pp;
    g  = a & b;
    pp = p;
    g[0] = g[0] | (p[0] & cin);
    // up-sweep
    for (int s = 1; s < W; s = s * 2) begin
      for (int i = 0; i < W; i++) begin
        if (((i + 1) % (2 * s)) == 0) begin
          g[i]  = g[i] | (pp[i] & g[i - s]);
          pp[i] = pp[i] & pp[i - s];
        end
      end
    end
    // down-sweep
    for (int s = 1 << $clog2(W > 1 ? W : 2); s >= 1; s = s / 2) begin
      for (int i = 0; i < W; i++) begin
        if ((((i + 1) % (2 * s)) == s) && (i >= 2 * s)) begin
          g[i]  = g[i] | (pp[i] & g[i - s]);
          pp[i] = pp[i] & pp[i - s];
        end
      end
    end
    gc = g;
  end

  if (W > 1) begin : g_carry
    assign cvec = {gc[W-2:0], cin};
  end else begin : g_carry1
    assign cvec = cin;
  end

  ixor_gate #(.W(W)) u_sum (.a(p), .b(cvec), .y(sum));
  assign cout = gc[W-1];
endmodule
