// Self-checking testbench for csa_tree.
// Drives random rows into trees of 2, 3, 9 and 17 rows and checks that
// sum + carry equals the arithmetic sum of the rows modulo 2^W.
module tb_csa_tree;

  int checks = 0, failures = 0;

  logic [31:0] r2 [2], r3 [3], r9 [9];
  logic [63:0] r17 [17];
  logic [31:0] s2, c2, s3, c3, s9, c9;
  logic [63:0] s17, c17;

  csa_tree #(.R(2),  .W(32)) u2  (.rows(r2),  .sum(s2),  .carry(c2));
  csa_tree #(.R(3),  .W(32)) u3  (.rows(r3),  .sum(s3),  .carry(c3));
  csa_tree #(.R(9),  .W(32)) u9  (.rows(r9),  .sum(s9),  .carry(c9));
  csa_tree #(.R(17), .W(64)) u17 (.rows(r17), .sum(s17), .carry(c17));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] e2, e3, e9;
      logic [63:0] e17;
      e2 = '0; e3 = '0; e9 = '0; e17 = '0;
      foreach (r2[i])  begin r2[i]  = (t < 10) ? '1 : $urandom; e2 += r2[i]; end
      foreach (r3[i])  begin r3[i]  = (t < 10) ? '1 : $urandom; e3 += r3[i]; end
      foreach (r9[i])  begin r9[i]  = (t < 10) ? '1 : $urandom; e9 += r9[i]; end
      foreach (r17[i]) begin r17[i] = (t < 10) ? '1 : {$urandom, $urandom}; e17 += r17[i]; end
      #1;
      checks += 4;
      if (s2 + c2 != e2)    begin failures++; if (failures < 10) $display("FAIL R=2"); end
      if (s3 + c3 != e3)    begin failures++; if (failures < 10) $display("FAIL R=3"); end
      if (s9 + c9 != e9)    begin failures++; if (failures < 10) $display("FAIL R=9"); end
      if (s17 + c17 != e17) begin failures++; if (failures < 10) $display("FAIL R=17"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
