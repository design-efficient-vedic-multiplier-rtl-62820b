// tb_bec: binary-to-excess-1 converter, exhaustive at widths 3, 4 and 8,
// compared with in + 1 modulo 2^W.
module tb_bec;
  int checks = 0, failures = 0;
  logic [2:0] i3, o3;
  logic [3:0] i4, o4;
  logic [7:0] i8, o8;

  bec #(.W(3)) d3 (.in_v(i3), .out_v(o3));
  bec #(.W(4)) d4 (.in_v(i4), .out_v(o4));
  bec #(.W(8)) d8 (.in_v(i8), .out_v(o8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      i3 = 3'(i); i4 = 4'(i); i8 = 8'(i);
      #1;
      checks += 3;
      if (o3 !== 3'(i + 1)) begin failures++; $display("FAIL w3 %0d -> %0d", i3, o3); end
      if (o4 !== 4'(i + 1)) begin failures++; $display("FAIL w4 %0d -> %0d", i4, o4); end
      if (o8 !== 8'(i + 1)) begin failures++; $display("FAIL w8 %0d -> %0d", i8, o8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
