// tb_ebk_csla: carry-select adder in the four groupings the multiplier uses:
// 23 bits (2,2,3,4,5,7) random plus carry-ripple corners, 11 bits (2,2,3,4)
// random, 6 bits (3,3) and 3 bits (1,2) exhaustive with both carry-in values.
module tb_ebk_csla;
  int checks = 0, failures = 0;

  logic [22:0] a23, b23, s23; logic ci23, co23;
  logic [10:0] a11, b11, s11; logic ci11, co11;
  logic [5:0]  a6, b6, s6;    logic ci6, co6;
  logic [2:0]  a3, b3, s3;    logic ci3, co3;

  ebk_csla d23 (.a(a23), .b(b23), .cin(ci23), .sum(s23), .cout(co23));
  ebk_csla #(.GW('{2, 2, 3, 4, 0, 0, 0, 0})) d11 (.a(a11), .b(b11), .cin(ci11), .sum(s11), .cout(co11));
  ebk_csla #(.GW('{3, 3, 0, 0, 0, 0, 0, 0})) d6  (.a(a6),  .b(b6),  .cin(ci6),  .sum(s6),  .cout(co6));
  ebk_csla #(.GW('{1, 2, 0, 0, 0, 0, 0, 0})) d3  (.a(a3),  .b(b3),  .cin(ci3),  .sum(s3),  .cout(co3));

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
    for (int i = 0; i < (1 << 13); i++) begin
      {ci6, a6, b6} = 13'(i);
      {ci3, a3, b3} = 7'(i);
      #1;
      chk("w6", {co6, s6}, a6 + b6 + ci6);
      chk("w3", {co3, s3}, a3 + b3 + ci3);
    end
    for (int i = 0; i < 30000; i++) begin
      a23 = 23'($urandom); b23 = 23'($urandom); ci23 = 1'($urandom);
      a11 = 11'($urandom); b11 = 11'($urandom); ci11 = 1'($urandom);
      // carry generated in group k and propagated through all higher groups
      if (i < 23) begin a23 = ~23'(0) ^ (23'(1) << i); b23 = 23'(1) << i; ci23 = 1'b0; end
      if (i == 23) begin a23 = '1; b23 = '0; ci23 = 1'b1; end
      #1;
      chk("w23", {co23, s23}, longint'(a23) + b23 + ci23);
      chk("w11", {co11, s11}, a11 + b11 + ci11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
