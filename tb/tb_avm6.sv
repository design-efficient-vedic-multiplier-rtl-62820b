// tb_avm6: streams one operand pair per clock into a pipelined (PIPE = 1) and a
// combinational (PIPE = 0) avm6 and compares both products with integer
// multiplication. The pipelined copy must show each product exactly one clock
// after its operands and the combinational copy in the same cycle, which
// checks the latency as well as the value. All 4096 operand pairs are run,
// including 47*55 and 55*47, where both carries into the top bits are 1.
module tb_avm6;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p_pipe, p_comb;
  logic [2*N-1:0] hist [4];

  avm6 #(.PIPE(1'b1)) dut_pipe (.clk(clk), .x(x), .y(y), .p(p_pipe));
  avm6 #(.PIPE(1'b0)) dut_comb (.clk(clk), .x(x), .y(y), .p(p_comb));

  always #5 clk = ~clk;

  initial begin
    repeat (4096 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string n, logic [2*N-1:0] got, logic [2*N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", n, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      {x, y} = 12'(i);
      hist[i % 4] = (2*N)'(x) * (2*N)'(y);
      #1;
      chk("comb", p_comb, hist[i % 4]);
      if (i >= 1) chk("pipe", p_pipe, hist[(i - 1) % 4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
