// tb_fp_mac_unpipelined: end-to-end test of the floating-point MAC with
// PIPE = 0 (combinational 24x24 multiplier, accumulator updated one clock
// after its operands); otherwise identical to tb_fp_mac. Random operand pairs are streamed
// with in_valid mostly high, so products arrive back to back; clear and a
// mid-run reset interrupt the accumulation. A cycle-level model built from the
// exact reference functions (product rounded, then sum rounded, both toward
// zero) predicts acc and acc_valid after every clock, which also checks the
// PIPE + 1 clock latency from operands to accumulator.
// Every mechanism is counted and must occur: back-to-back accumulation,
// clear, reset, effective subtraction in the adder, cancellation that needs a
// left normalisation, a carry that needs a right normalisation, a product that
// needs the one-bit normalisation, saturation at the largest finite number,
// flush of a too-small product, and a zero operand.
module tb_fp_mac_unpipelined;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_b2b = 0, n_clear = 0, n_reset = 0, n_sub = 0, n_lnorm = 0, n_rnorm = 0;
  int n_mnorm = 0, n_sat = 0, n_flush = 0, n_zero = 0;
  logic clk = 1'b0;
  logic rst_n, clear, in_valid;
  logic [31:0] x, y, acc;
  logic acc_valid;

  // model state
  logic [31:0] m_acc, m_prod, m_sum;
  logic        m_pv, m_accv, prev_valid;

  fp_mac #(.PIPE(P)) dut (.clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
              .x(x), .y(y), .acc(acc), .acc_valid(acc_valid));

  always #5 clk = ~clk;

  localparam int STEPS = 40000;
  localparam bit P = 1'b0;   // PIPE of the unit under test: unpipelined

  initial begin
    repeat (STEPS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ex(logic [31:0] v);
    return int'(v[30:23]);
  endfunction

  initial begin
    rst_n = 1'b0; clear = 1'b0; in_valid = 1'b0; x = '0; y = '0;
    repeat (2) @(negedge clk);
    m_acc = '0; m_pv = 1'b0; m_accv = 1'b0; m_prod = '0; prev_valid = 1'b0;
    for (int i = 0; i < STEPS; i++) begin
      // ---- stimulus for this cycle ----
      rst_n    = !(i == STEPS / 2);
      clear    = ($urandom_range(99) < 2);
      in_valid = ($urandom_range(99) < 85);
      case ((i / 500) % 6)
        0, 1, 2: begin x = rnd_fp(110, 140); y = rnd_fp(110, 140); end
        3: begin x = rnd_fp(120, 130); y = rnd_fp(120, 130); if ($urandom_range(3) == 0) y = 32'h3F80_0000; end
        4: begin x = rnd_fp(180, 254); y = rnd_fp(180, 254); end   // large: saturation
        default: begin x = rnd_fp(1, 70); y = rnd_fp(40, 90); end  // tiny: flush
      endcase
      if ($urandom_range(99) < 3) y[30:23] = 8'd0;                 // zero operand
      // cancellation: negate the exact current accumulator value
      if ($urandom_range(99) < 4 && m_acc[30:23] != 0) begin x = m_acc ^ 32'h8000_0000; y = 32'h3F80_0000; end

      // ---- model of the coming clock edge ----
      if (!P) begin m_prod = ref_mul(x, y); m_pv = in_valid; end
      m_sum = ref_add(m_acc, m_prod);
      if (!rst_n) begin
        n_reset++;
        m_acc = '0; m_accv = 1'b0; m_pv = 1'b0;
      end else begin
        if (clear) begin
          n_clear++;
          m_acc = '0; m_accv = 1'b0;
        end else if (m_pv) begin
          if (m_acc[30:23] != 0 && m_prod[30:23] != 0) begin
            if (m_acc[31] != m_prod[31]) begin
              n_sub++;
              if (m_sum[30:23] != 0 &&
                  ex(m_sum) < ((ex(m_acc) > ex(m_prod)) ? ex(m_acc) : ex(m_prod))) n_lnorm++;
            end else if (ex(m_sum) > ((ex(m_acc) > ex(m_prod)) ? ex(m_acc) : ex(m_prod))) n_rnorm++;
          end
          if (m_sum[30:0] == MAXF) n_sat++;
          if (prev_valid) n_b2b++;
          m_acc = m_sum; m_accv = 1'b1;
        end else m_accv = 1'b0;
        prev_valid = m_pv && !clear;
        if (P) m_pv = in_valid;
      end
      if (P) m_prod = ref_mul(x, y);
      if (in_valid && rst_n) begin
        if (x[30:23] == 0 || y[30:23] == 0) n_zero++;
        else begin
          if (m_prod[30:0] == 31'd0) n_flush++;
          if ((48'({1'b1, x[22:0]}) * 48'({1'b1, y[22:0]})) >> 47 != 0) n_mnorm++;
        end
      end
      if (!rst_n) prev_valid = 1'b0;

      @(negedge clk);
      checks++;
      if (acc !== m_acc || acc_valid !== m_accv) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: acc %h/%b expected %h/%b", i, acc, acc_valid, m_acc, m_accv);
      end
    end
    $display("mechanisms: back-to-back=%0d clear=%0d reset=%0d subtract=%0d left-normalise=%0d right-normalise=%0d",
             n_b2b, n_clear, n_reset, n_sub, n_lnorm, n_rnorm);
    $display("            product-normalise=%0d saturate=%0d flush=%0d zero-operand=%0d",
             n_mnorm, n_sat, n_flush, n_zero);
    if (n_b2b == 0)   begin failures++; $display("FAIL: no back-to-back accumulation"); end
    if (n_clear == 0) begin failures++; $display("FAIL: no clear"); end
    if (n_reset == 0) begin failures++; $display("FAIL: no reset"); end
    if (n_sub == 0)   begin failures++; $display("FAIL: no effective subtraction"); end
    if (n_lnorm == 0) begin failures++; $display("FAIL: no left normalisation"); end
    if (n_rnorm == 0) begin failures++; $display("FAIL: no right normalisation"); end
    if (n_mnorm == 0) begin failures++; $display("FAIL: no product normalisation"); end
    if (n_sat == 0)   begin failures++; $display("FAIL: no saturation"); end
    if (n_flush == 0) begin failures++; $display("FAIL: no flush"); end
    if (n_zero == 0)  begin failures++; $display("FAIL: no zero operand"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
