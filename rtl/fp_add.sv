// fp_add: binary single-precision floating-point adder of the accumulation
// loop, rounding toward zero.
// The operand of larger magnitude is chosen as L and the other as S. S's
// significand, extended by three zero bits (guard, round, sticky), is shifted
// right by the exponent difference; every bit shifted out is ORed into the
// sticky position. The significands are added, or subtracted when the signs
// differ. A carry out shifts the result right by one (exponent + 1); otherwise
// the leading-zero count shifts it left (exponent - count). The 23 fraction
// bits below the leading one are kept and the rest dropped, which is exact
// truncation of the true sum because of the sticky bit.
// The design names this adder without describing it; everything here is this
// implementation's choice: exponent-0 operands are zero, a result exponent
// above 254 saturates to the largest finite number, one below 1 flushes to a
// signed zero, and an exact zero sum is +0. Infinity and NaN are not supported.
// Interface: a, b -> s; purely combinational.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] s
);
  import fp_pkg::*;

  fp32_t af, bf;
  assign af = a;
  assign bf = b;

  always_comb begin
    logic        swap, sl, ss, sub;
    logic [7:0]  el, es, d;
    logic [23:0] ml, ms;
    logic [26:0] ext_s, al, mask;
    logic        sticky;
    logic [27:0] sum;
    logic [26:0] norm;
    logic [4:0]  lz;
    logic        found;
    logic [9:0]  e_r;
    logic [22:0] frac_r;

    swap = {bf.exp, bf.frac} > {af.exp, af.frac};
    sl = swap ? bf.sign : af.sign;
    ss = swap ? af.sign : bf.sign;
    el = swap ? bf.exp  : af.exp;
    es = swap ? af.exp  : bf.exp;
    ml = swap ? {bf.exp != 8'd0, bf.frac} : {af.exp != 8'd0, af.frac};
    ms = swap ? {af.exp != 8'd0, af.frac} : {bf.exp != 8'd0, bf.frac};
    if (el == 8'd0) ml = '0;   // exponent field 0: zero (subnormals flushed)
    if (es == 8'd0) ms = '0;
    sub = sl ^ ss;
    d   = el - es;

    // alignment with guard, round and sticky bits
    ext_s = {ms, 3'b000};
    mask  = '0;
    if (d >= 8'd27) begin
      al     = '0;
      sticky = |ms;
    end else begin
      mask   = (27'd1 << d) - 27'd1;
      al     = ext_s >> d;
      sticky = |(ext_s & mask);
    end
    al[0] = al[0] | sticky;

    sum = sub ? ({1'b0, ml, 3'b000} - {1'b0, al}) : ({1'b0, ml, 3'b000} + {1'b0, al});

    // leading-zero count below the carry position
    lz    = '0;
    found = 1'b0;
    for (int i = 26; i >= 0; i--) begin
      if (!found && sum[i]) begin
        found = 1'b1;
        lz    = 5'(26 - i);
      end
    end
    norm = sum[26:0] << lz;

    if (sum[27]) begin
      e_r    = {2'b00, el} + 10'd1;
      frac_r = sum[26:4];
    end else begin
      e_r    = {2'b00, el} - {5'd0, lz};
      frac_r = norm[25:3];
    end

    if (sum == '0) s = 32'd0;
    else if ($signed(e_r) <= 0) s = {sl, 31'd0};
    else if ($signed(e_r) > $signed(10'(EXP_MAX))) s = {sl, MAX_FINITE};
    else s = {sl, e_r[7:0], frac_r};
  end
endmodule
