// tb_csa: carry-save adder, 6 bits exhaustive over (a,b,c) bit patterns per
// position and 24 bits random; checks a + b + c == s + 2*cy.
module tb_csa;
  int checks = 0, failures = 0;
  logic [5:0]  a6, b6, c6, s6, y6;
  logic [23:0] a24, b24, c24, s24, y24;

  csa #(.W(6))  d6  (.a(a6),  .b(b6),  .c(c6),  .s(s6),  .cy(y6));
  csa           d24 (.a(a24), .b(b24), .c(c24), .s(s24), .cy(y24));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 18); i += 7) begin
      {a6, b6, c6} = 18'(i);
      #1;
      checks++;
      if (int'(a6) + b6 + c6 != int'(s6) + 2 * int'(y6)) begin
        failures++;
        if (failures < 10) $display("FAIL w6 %h %h %h -> s %h cy %h", a6, b6, c6, s6, y6);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a24 = 24'($urandom); b24 = 24'($urandom); c24 = 24'($urandom);
      #1;
      checks++;
      if (longint'(a24) + b24 + c24 != longint'(s24) + 2 * longint'(y24)) begin
        failures++;
        if (failures < 10) $display("FAIL w24 %h %h %h -> s %h cy %h", a24, b24, c24, s24, y24);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
