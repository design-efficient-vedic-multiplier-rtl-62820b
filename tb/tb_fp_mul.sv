// tb_fp_mul: single-precision multiplier (PIPE = 1) against the exact
// reference model, one pair per clock, each result checked exactly one clock
// after its operands. Covers products that need the one-bit normalisation and
// those that do not, zero operands, exponent overflow (saturation) and
// underflow (flush), and random operands across the whole exponent range.
module tb_fp_mul;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_norm = 0, n_ovf = 0, n_unf = 0, n_zero = 0;
  logic clk = 1'b0;
  logic [31:0] x, y, p;
  logic [31:0] hist [2];

  fp_mul dut (.clk(clk), .x(x), .y(y), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50001; i++) begin
      @(negedge clk);
      case (i % 8)
        0: begin x = rnd_fp(1, 254); y = rnd_fp(1, 254); end
        1: begin x = rnd_fp(200, 254); y = rnd_fp(200, 254); end           // overflow
        2: begin x = rnd_fp(1, 60);    y = rnd_fp(1, 60);    end           // underflow
        3: begin x = rnd_fp(1, 254);   y = {1'($urandom), 8'd0, 23'($urandom)}; end  // zero / subnormal
        default: begin x = rnd_fp(100, 154); y = rnd_fp(100, 154); end
      endcase
      if (i == 0) begin x = 32'h3F80_0000; y = 32'h4000_0000; end        // 1.0 * 2.0
      if (i == 1) begin x = 32'h3FFF_FFFF; y = 32'h3FFF_FFFF; end        // largest significands
      hist[i % 2] = ref_mul(x, y);
      if (x[30:23] != 0 && y[30:23] != 0) begin
        if (int'(x[30:23]) + int'(y[30:23]) - 127 >= 255) n_ovf++;
        else if (int'(x[30:23]) + int'(y[30:23]) - 127 <= 0) n_unf++;
        else if (({1'b1, x[22:0]} * 48'({1'b1, y[22:0]})) >> 47 != 0) n_norm++;
      end else n_zero++;
      #1;
      if (i >= 1) begin
        checks++;
        if (p !== hist[(i - 1) % 2]) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d: got %h expected %h", i, p, hist[(i - 1) % 2]);
        end
      end
    end
    $display("cases: normalise-shift=%0d overflow=%0d underflow=%0d zero-operand=%0d", n_norm, n_ovf, n_unf, n_zero);
    if (n_norm == 0 || n_ovf == 0 || n_unf == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
