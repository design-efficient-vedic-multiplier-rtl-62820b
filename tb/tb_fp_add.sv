// tb_fp_add: single-precision adder against the exact wide-integer reference.
// Operand classes: random over the full range, close exponents (heavy
// cancellation and long left normalisation), equal magnitudes with opposite
// signs (exact zero), large exponent differences (sticky-only alignment),
// zero operands, and sums near the top and bottom of the range.
module tb_fp_add;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, s, e;

  fp_add dut (.a(a), .b(b), .s(s));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200000; i++) begin
      case (i % 8)
        0: begin a = rnd_fp(1, 254); b = rnd_fp(1, 254); end
        1: begin a = rnd_fp(120, 121); b = rnd_fp(120, 121); b[22:8] = a[22:8]; end
        2: begin a = rnd_fp(1, 254); b = a ^ 32'h8000_0000; end
        3: begin a = rnd_fp(100, 130); b = rnd_fp(100, 130); b[31] = ~a[31]; end
        4: begin a = rnd_fp(250, 254); b = rnd_fp(250, 254); end
        5: begin a = rnd_fp(1, 3); b = rnd_fp(1, 3); end
        6: begin a = rnd_fp(1, 254); b = {1'($urandom), 8'd0, 23'($urandom)}; end
        default: begin a = rnd_fp(100, 160); b = rnd_fp(100, 160); end
      endcase
      if (i % 16 == 9) {a, b} = {b, a};
      e = ref_add(a, b);
      #1;
      checks++;
      if (s !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h: got %h expected %h", a, b, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
