// fp_ref_pkg: exact reference models for the testbenches of the floating-point
// blocks. They work on wide integers, independent of the RTL's structure:
// a normal single-precision value is 1.F * 2^(E-127), held here as the integer
// {1,F} << (E-1) in a 300-bit vector, so every sum of two singles is exact.
// Results are truncated toward zero and use the same conventions as the RTL:
// exponent-0 inputs are zero, results below the normal range become signed
// zero, results above it the largest finite number, an exact zero sum is +0.
package fp_ref_pkg;

  localparam logic [30:0] MAXF = 31'h7F7F_FFFF;

  function automatic logic [31:0] pack(bit sgn, int e, logic [23:0] m);
    if (e <= 0)   return {sgn, 31'd0};
    if (e >= 255) return {sgn, MAXF};
    return {sgn, e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] x, logic [31:0] y);
    bit          sg;
    logic [47:0] pr;
    int          e;
    sg = x[31] ^ y[31];
    if (x[30:23] == 8'd0 || y[30:23] == 8'd0) return {sg, 31'd0};
    pr = 48'({1'b1, x[22:0]}) * 48'({1'b1, y[22:0]});
    e  = int'(x[30:23]) + int'(y[30:23]) - 127;
    if (pr[47]) return pack(sg, e + 1, pr[47:24]);
    return pack(sg, e, pr[46:23]);
  endfunction

  function automatic logic [299:0] wide(logic [31:0] a);
    if (a[30:23] == 8'd0) return '0;
    return 300'({1'b1, a[22:0]}) << (int'(a[30:23]) - 1);
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    logic [299:0] va, vb, r, m;
    bit           sg;
    int           p;
    va = wide(a);
    vb = wide(b);
    if (va >= vb) sg = a[31]; else sg = b[31];
    if (a[31] == b[31]) r = va + vb;
    else if (va >= vb)  r = va - vb;
    else                r = vb - va;
    if (r == '0) return 32'd0;
    p = 0;
    for (int i = 0; i < 300; i++) if (r[i]) p = i;
    if (p >= 23) m = r >> (p - 23); else m = r << (23 - p);
    return pack(sg, p - 22, m[23:0]);
  endfunction

  // a random normal number with biased exponent in [elo, ehi]
  function automatic logic [31:0] rnd_fp(int elo, int ehi);
    logic [31:0] v;
    v        = $urandom;
    v[30:23] = 8'(elo + int'($urandom_range(ehi - elo)));
    return v;
  endfunction

endpackage
