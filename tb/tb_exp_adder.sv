// tb_exp_adder: exhaustive check of e = ex + ey - 127 over all exponent pairs.
module tb_exp_adder;
  int checks = 0, failures = 0;
  logic [7:0] ex, ey;
  logic [9:0] e;

  exp_adder dut (.ex(ex), .ey(ey), .e(e));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {ex, ey} = 16'(i);
      #1;
      checks++;
      if ($signed(e) != int'(ex) + int'(ey) - 127) begin
        failures++;
        if (failures < 10) $display("FAIL %0d + %0d -> %0d", ex, ey, $signed(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
