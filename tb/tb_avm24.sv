// tb_avm24: streams one operand pair per clock into a pipelined (PIPE = 1) and a
// combinational (PIPE = 0) avm24 and compares both products with integer
// multiplication. The pipelined copy must show each product exactly one clock
// after its operands and the combinational copy in the same cycle, which
// checks the latency as well as the value. The first five pairs are the
// worked examples 100*24, 570*320, 1320*23450, 88965*12345 and 1876*6254,
// whose printed products are checked too; then corners (all ones, hidden bit
// only) and random operands, half of them with both MSBs set like 1.F
// significands.
module tb_avm24;
  localparam int N = 24;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p_pipe, p_comb;
  logic [2*N-1:0] hist [4];
  // operand pairs shown in the design's simulation waveform, plus corners
  localparam logic [N-1:0] fig_x [5] = '{24'd100, 24'd570, 24'd1320, 24'd88965, 24'd1876};
  localparam logic [N-1:0] fig_y [5] = '{24'd24, 24'd320, 24'd23450, 24'd12345, 24'd6254};
  localparam logic [2*N-1:0] fig_p [5] = '{48'd2400, 48'd182400, 48'd30954000, 48'd1098272925, 48'd11732504};
  localparam logic [N-1:0] corner [4] = '{24'hFFFFFF, 24'h800000, 24'hFFFFFF, 24'hAAAAAA};

  avm24 #(.PIPE(1'b1)) dut_pipe (.clk(clk), .x(x), .y(y), .p(p_pipe));
  avm24 #(.PIPE(1'b0)) dut_comb (.clk(clk), .x(x), .y(y), .p(p_comb));

  always #5 clk = ~clk;

  initial begin
    repeat (100000 + 1000) @(posedge clk);
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
    for (int i = 0; i < 100000; i++) begin
      @(negedge clk);
      if (i < 5) begin x = fig_x[i]; y = fig_y[i]; end else if (i < 9) begin x = corner[i - 5]; y = corner[(i + 1) % 4]; end else begin x = 24'($urandom); y = 24'($urandom); if (i % 2 == 0) begin x[23] = 1'b1; y[23] = 1'b1; end end
      hist[i % 4] = (2*N)'(x) * (2*N)'(y);
      if (i < 5) chk("waveform", hist[i % 4], fig_p[i]);
      #1;
      chk("comb", p_comb, hist[i % 4]);
      if (i >= 1) chk("pipe", p_pipe, hist[(i - 1) % 4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
