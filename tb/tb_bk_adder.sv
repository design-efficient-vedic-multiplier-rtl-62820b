// tb_bk_adder: Brent-Kung adder at widths 3 and 6 (exhaustive, both carry-in
// values) and 7, 11 and 23 (random), compared with integer addition.
module tb_bk_adder;
  int checks = 0, failures = 0;

  logic [2:0]  a3, b3, s3;   logic c3i, c3o;
  logic [5:0]  a6, b6, s6;   logic c6i, c6o;
  logic [6:0]  a7, b7, s7;   logic c7i, c7o;
  logic [10:0] a11, b11, s11; logic c11i, c11o;
  logic [22:0] a23, b23, s23; logic c23i, c23o;

  bk_adder #(.W(3))  d3  (.a(a3),  .b(b3),  .cin(c3i),  .sum(s3),  .cout(c3o));
  bk_adder #(.W(6))  d6  (.a(a6),  .b(b6),  .cin(c6i),  .sum(s6),  .cout(c6o));
  bk_adder #(.W(7))  d7  (.a(a7),  .b(b7),  .cin(c7i),  .sum(s7),  .cout(c7o));
  bk_adder #(.W(11)) d11 (.a(a11), .b(b11), .cin(c11i), .sum(s11), .cout(c11o));
  bk_adder #(.W(23)) d23 (.a(a23), .b(b23), .cin(c23i), .sum(s23), .cout(c23o));

  task automatic chk(string n, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", n, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 7); i++) begin
      {c3i, a3, b3} = 7'(i);
      #1 chk("w3", {c3o, s3}, a3 + b3 + c3i);
    end
    for (int i = 0; i < (1 << 13); i++) begin
      {c6i, a6, b6} = 13'(i);
      #1 chk("w6", {c6o, s6}, a6 + b6 + c6i);
    end
    for (int i = 0; i < 20000; i++) begin
      a7 = 7'($urandom); b7 = 7'($urandom); c7i = 1'($urandom);
      a11 = 11'($urandom); b11 = 11'($urandom); c11i = 1'($urandom);
      a23 = 23'($urandom); b23 = 23'($urandom); c23i = 1'($urandom);
      if (i == 0) begin a23 = '1; b23 = '0; c23i = 1'b1; end   // full carry ripple
      #1;
      chk("w7", {c7o, s7}, a7 + b7 + c7i);
      chk("w11", {c11o, s11}, a11 + b11 + c11i);
      chk("w23", {c23o, s23}, longint'(a23) + b23 + c23i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
