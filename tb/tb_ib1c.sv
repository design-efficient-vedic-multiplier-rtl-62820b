// tb_ib1c: increment-by-1 converter, exhaustive at widths 2 and 3 and both
// enable values, compared with (in + en) modulo 2^W.
module tb_ib1c;
  int checks = 0, failures = 0;
  logic [2:0] i3, o3; logic e3;
  logic [1:0] i2, o2; logic e2;

  ib1c       d3 (.in_v(i3), .en(e3), .out_v(o3));
  ib1c #(.W(2)) d2 (.in_v(i2), .en(e2), .out_v(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {e3, i3} = 4'(i);
      {e2, i2} = 3'(i);
      #1;
      checks += 2;
      if (o3 !== 3'(i3 + e3)) begin failures++; $display("FAIL w3 %0d+%0d -> %0d", i3, e3, o3); end
      if (o2 !== 2'(i2 + e2)) begin failures++; $display("FAIL w2 %0d+%0d -> %0d", i2, e2, o2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
