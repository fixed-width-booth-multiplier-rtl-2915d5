// csa_tree_tb: random operands through trees of 6 rows (default, two
// levels: one 4-2 row group plus passing rows), 3, 7 and 11 rows (3-2
// remainders); sum + carry must equal the sum of all rows modulo 2^N.
module csa_tree_tb;
  int checks = 0, failures = 0;
  logic [7:0]  r6  [6];
  logic [7:0]  r3  [3];
  logic [15:0] r7  [7];
  logic [13:0] r11 [11];
  logic [7:0]  s6, c6, s3, c3;
  logic [15:0] s7, c7;
  logic [13:0] s11, c11;
  csa_tree                       dut6  (.rows(r6),  .sum(s6),  .carry(c6));
  csa_tree #(.N(8),  .ROWS(3))   dut3  (.rows(r3),  .sum(s3),  .carry(c3));
  csa_tree #(.N(16), .ROWS(7))   dut7  (.rows(r7),  .sum(s7),  .carry(c7));
  csa_tree #(.N(14), .ROWS(11))  dut11 (.rows(r11), .sum(s11), .carry(c11));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e6, e3, e7, e11;
    for (int t = 0; t < 20000; t++) begin
      e6 = 0; e3 = 0; e7 = 0; e11 = 0;
      foreach (r6[i])  begin r6[i]  = 8'($urandom);  e6  += int'(r6[i]);  end
      foreach (r3[i])  begin r3[i]  = 8'($urandom);  e3  += int'(r3[i]);  end
      foreach (r7[i])  begin r7[i]  = 16'($urandom); e7  += int'(r7[i]);  end
      foreach (r11[i]) begin r11[i] = 14'($urandom); e11 += int'(r11[i]); end
      if (t == 0) foreach (r6[i]) r6[i] = 8'hff;
      if (t == 0) e6 = 6 * 255;
      #1;
      checks += 4;
      if (8'(s6 + c6)     != 8'(e6))   begin failures++; if (failures < 10) $display("FAIL 6 rows"); end
      if (8'(s3 + c3)     != 8'(e3))   begin failures++; if (failures < 10) $display("FAIL 3 rows"); end
      if (16'(s7 + c7)    != 16'(e7))  begin failures++; if (failures < 10) $display("FAIL 7 rows"); end
      if (14'(s11 + c11)  != 14'(e11)) begin failures++; if (failures < 10) $display("FAIL 11 rows"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
