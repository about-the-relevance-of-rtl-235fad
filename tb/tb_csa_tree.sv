// tb_csa_tree -- self-checking test of the carry-save reduction.
// For several operand counts it checks that sum_o + carry_o equals the
// modulo-2^W sum of all operands, on random and all-ones operands.
module tb_csa_tree;
  localparam int W = 16;
  int checks = 0, failures = 0;

  logic [W-1:0] ops2 [2],  s2,  c2;
  logic [W-1:0] ops8 [8],  s8,  c8;
  logic [W-1:0] ops10 [10], s10, c10;
  logic [W-1:0] ops17 [17], s17, c17;

  csa_tree #(.M(2),  .W(W)) u2  (.ops(ops2),  .sum_o(s2),  .carry_o(c2));
  csa_tree #(.M(8),  .W(W)) u8  (.ops(ops8),  .sum_o(s8),  .carry_o(c8));
  csa_tree #(.M(10), .W(W)) u10 (.ops(ops10), .sum_o(s10), .carry_o(c10));
  csa_tree #(.M(17), .W(W)) u17 (.ops(ops17), .sum_o(s17), .carry_o(c17));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] e2, e8, e10, e17;
      e2 = '0; e8 = '0; e10 = '0; e17 = '0;
      foreach (ops2[i])  begin ops2[i]  = (n == 0) ? '1 : W'($urandom); e2 += ops2[i]; end
      foreach (ops8[i])  begin ops8[i]  = (n == 0) ? '1 : W'($urandom); e8 += ops8[i]; end
      foreach (ops10[i]) begin ops10[i] = (n == 0) ? '1 : W'($urandom); e10 += ops10[i]; end
      foreach (ops17[i]) begin ops17[i] = (n == 0) ? '1 : W'($urandom); e17 += ops17[i]; end
      #1;
      checks += 4;
      if (W'(s2 + c2) != e2)   begin failures++; $display("M=2 wrong"); end
      if (W'(s8 + c8) != e8)   begin failures++; $display("M=8 wrong"); end
      if (W'(s10 + c10) != e10) begin failures++; $display("M=10 wrong"); end
      if (W'(s17 + c17) != e17) begin failures++; $display("M=17 wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
