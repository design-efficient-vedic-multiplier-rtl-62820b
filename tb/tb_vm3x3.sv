// tb_vm3x3: all 64 operand pairs, streamed one per clock into a pipelined and
// a combinational 3x3 Vedic multiplier; the pipelined product must appear one
// clock after its operands, the combinational one in the same cycle.
module tb_vm3x3;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [2:0] a, b;
  logic [5:0] p_pipe, p_comb;
  logic [5:0] hist [2];

  vm3x3 #(.PIPE(1'b1)) dut_pipe (.clk(clk), .a(a), .b(b), .p(p_pipe));
  vm3x3 #(.PIPE(1'b0)) dut_comb (.clk(clk), .a(a), .b(b), .p(p_comb));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65; i++) begin
      @(negedge clk);
      {a, b} = 6'(i);
      hist[i % 2] = 6'(a) * 6'(b);
      #1;
      checks += (i >= 1) ? 2 : 1;
      if (p_comb !== hist[i % 2]) begin failures++; $display("FAIL comb %0d*%0d -> %0d", a, b, p_comb); end
      if (i >= 1 && p_pipe !== hist[(i - 1) % 2]) begin
        failures++; $display("FAIL pipe step %0d -> %0d", i, p_pipe);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
