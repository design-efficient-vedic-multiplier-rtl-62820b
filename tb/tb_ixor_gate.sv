// tb_ixor_gate: exhaustive check of the three-gate XOR, 1-bit and 4-bit wide,
// against the ^ operator.
module tb_ixor_gate;
  int checks = 0, failures = 0;
  logic       a1, b1, y1;
  logic [3:0] a4, b4, y4;

  ixor_gate #(.W(1)) dut1 (.a(a1), .b(b1), .y(y1));
  ixor_gate #(.W(4)) dut4 (.a(a4), .b(b4), .y(y4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a1, b1} = 2'(i);
      #1;
      checks++;
      if (y1 !== (a1 ^ b1)) begin failures++; $display("FAIL 1-bit %b %b -> %b", a1, b1, y1); end
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (y4 !== (a4 ^ b4)) begin failures++; $display("FAIL 4-bit %h %h -> %h", a4, b4, y4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
