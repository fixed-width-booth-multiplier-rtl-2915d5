// prefix_adder_tb: 8-bit adder exhaustively, a 14-bit and a 23-bit one
// (not a power of two) on random operands, against a + b modulo 2^N.
module prefix_adder_tb;
  int checks = 0, failures = 0;
  logic [7:0]  a8, b8, s8;
  logic [13:0] a14, b14, s14;
  logic [22:0] a23, b23, s23;
  prefix_adder                dut8  (.a(a8),  .b(b8),  .s(s8));
  prefix_adder #(.N(14))      dut14 (.a(a14), .b(b14), .s(s14));
  prefix_adder #(.N(23))      dut23 (.a(a23), .b(b23), .s(s23));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        checks++;
        if (s8 != 8'((a + b) % 256)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d+%0d=%0d", a, b, s8);
        end
      end
    for (int t = 0; t < 20000; t++) begin
      a14 = 14'($urandom); b14 = 14'($urandom);
      a23 = 23'($urandom); b23 = 23'($urandom); #1;
      checks += 2;
      if (int'(s14) != (int'(a14) + int'(b14)) % (1 << 14)) failures++;
      if (int'(s23) != (int'(a23) + int'(b23)) % (1 << 23)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
