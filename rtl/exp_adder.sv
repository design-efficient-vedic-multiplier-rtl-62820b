// exp_adder: exponent path of the floating-point multiplier,
// e = ex + ey - BIAS. The two 8-bit biased exponents are added and the bias
// (127 for single precision) subtracted, as the design specifies. The result
// is kept 10 bits wide in two's complement (range -127 .. 383) so that the
// multiplier can recognise exponent overflow and underflow; that width is this
// implementation's choice.
// Interface: ex, ey -> e; purely combinational.
module exp_adder #(
  parameter int unsigned BIAS = fp_pkg::BIAS
) (
  input  logic [7:0] ex,
  input  logic [7:0] ey,
  output logic [9:0] e
);
  localparam logic [9:0] BIAS10 = 10'(BIAS);
  assign e = {2'b00, ex} + {2'b00, ey} - BIAS10;
endmodule
