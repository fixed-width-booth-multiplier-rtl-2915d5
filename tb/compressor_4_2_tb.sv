// compressor_4_2_tb: all 32 input combinations; checks the count identity
// sum + 2*(carry + cout) = x0+x1+x2+x3+cin and that cout ignores cin.
module compressor_4_2_tb;
  int checks = 0, failures = 0;
  logic [3:0] x;
  logic       cin, sum, carry, cout, cout0;
  compressor_4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      x = 4'(t);
      cin = 1'b0; #1; cout0 = cout;
      for (int c = 0; c < 2; c++) begin
        cin = 1'(c); #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(x) + c) begin
          failures++;
          $display("FAIL x=%b cin=%b -> %b%b%b", x, cin, cout, carry, sum);
        end
        checks++;
        if (cout != cout0) begin
          failures++;
          $display("FAIL cout depends on cin for x=%b", x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
