// fp_mul: binary single-precision floating-point multiplier.
// The three fields are handled in parallel, as in the design: the product sign
// is Sx XOR Sy, the exponent is Ex + Ey - 127 (exp_adder), and the two 24-bit
// significands 1.Fx and 1.Fy are multiplied by the 24x24 adjusted Vedic
// multiplier. The 48-bit significand product lies in [1, 4); if its top bit is
// set it is shifted right by one and the exponent incremented. The fraction is
// then truncated to 23 bits (rounding toward zero).
// Normalisation, rounding and the special cases are this implementation's
// choices: an operand with exponent field 0 (zero or subnormal) is taken as
// zero and gives a signed zero; an exponent above 254 saturates to the largest
// finite number and one below 1 flushes to a signed zero. Infinity and NaN
// operands are not supported.
// Interface: x, y -> p, latency PIPE clock cycles (the sign and exponent are
// delayed to meet the pipelined significand product), one pair per clock.
module fp_mul #(
  parameter bit PIPE = 1'b1
) (
  input  logic        clk,
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [31:0] p
);
  import fp_pkg::*;

  fp32_t       xf, yf;
  logic [47:0] mprod;
  logic [9:0]  e_sum;
  logic        sign_c, zero_c;
  logic        sign_d, zero_d;
  logic [9:0]  e_d;
  logic [9:0]  e_n;
  logic [22:0] frac_n;

  assign xf = x;
  assign yf = y;

  ixor_gate #(.W(1)) u_sign (.a(xf.sign), .b(yf.sign), .y(sign_c));
  assign zero_c = (xf.exp == 8'd0) || (yf.exp == 8'd0);

  exp_adder u_exp (.ex(xf.exp), .ey(yf.exp), .e(e_sum));

  avm24 #(.PIPE(PIPE)) u_mant (
    .clk(clk), .x({1'b1, xf.frac}), .y({1'b1, yf.frac}), .p(mprod)
  );

  if (PIPE) begin : g_pipe
    always_ff @(posedge clk) begin
      sign_d <= sign_c;
      zero_d <= zero_c;
      e_d    <= e_sum;
    end
  end else begin : g_comb
    assign sign_d = sign_c;
    assign zero_d = zero_c;
    assign e_d    = e_sum;
  end

  // normalise by at most one position and truncate
  assign e_n    = e_d + {9'd0, mprod[47]};
  assign frac_n = mprod[47] ? mprod[46:24] : mprod[45:23];

  always_comb begin
    if (zero_d || $signed(e_n) <= 0) p = {sign_d, 31'd0};
    else if ($signed(e_n) > $signed(10'(EXP_MAX))) p = {sign_d, MAX_FINITE};
    else p = {sign_d, e_n[7:0], frac_n};
  end
endmodule
