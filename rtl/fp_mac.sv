// fp_mac: single-precision floating-point multiply-accumulate unit, F = sum X*Y.
// A floating-point multiplier (fp_mul, whose significand product comes from
// the pipelined 24x24 adjusted Vedic multiplier) feeds a floating-point adder
// (fp_add) whose other input is the accumulator register; the adder's result
// is written back to the accumulator, which is also the output. This is the
// multiplier -> adder -> accumulator loop of the design.
// Control is this implementation's choice: a valid bit travels with each
// operand pair through the PIPE-cycle multiplier, and the accumulator adds the
// product in the cycle it emerges. One pair can be accepted every clock; acc
// reflects a pair PIPE + 1 clocks after it was presented, and acc_valid pulses
// in the cycle acc shows a newly accumulated value. clear sets the accumulator
// to +0 (and drops a product emerging in that cycle); rst_n is synchronous and
// active low and also empties the valid pipeline.
// Interface: clk, rst_n, clear, in_valid, x, y -> acc, acc_valid.
module fp_mac #(
  parameter bit PIPE = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [31:0] x,
  input  logic [31:0] y,
  output logic [31:0] acc,
  output logic        acc_valid
);
  logic [31:0] prod, sum;
  logic        prod_valid;

  fp_mul #(.PIPE(PIPE)) u_mul (.clk(clk), .x(x), .y(y), .p(prod));
  fp_add                u_add (.a(acc), .b(prod), .s(sum));

  if (PIPE) begin : g_vpipe
    logic v_q;
    always_ff @(posedge clk) begin
      if (!rst_n) v_q <= 1'b0;
      else        v_q <= in_valid;
    end
    assign prod_valid = v_q;
  end else begin : g_vcomb
    assign prod_valid = in_valid;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      acc_valid <= 1'b0;
    end else begin
      acc_valid <= 1'b0;
      if (clear) begin
        acc <= '0;
      end else if (prod_valid) begin
        acc       <= sum;
        acc_valid <= 1'b1;
      end
    end
  end
endmodule
