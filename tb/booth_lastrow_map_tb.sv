// booth_lastrow_map_tb: checks the eight rows of the mapping table, both
// row by row against the published values and arithmetically: with
// c = n*p0, e = n xor p0, S = 4 - p_{L,0} + c and lambda = 1 - c.
module booth_lastrow_map_tb;
  int checks = 0, failures = 0;
  logic       n, p0, pl;
  logic [2:0] s;
  logic       lambda, e;
  booth_lastrow_map dut (.n_last(n), .p0_last(p0), .pl_first(pl), .s(s), .lambda(lambda), .e_last(e));

  // published table, one entry per {n, p0, pl}: {S2 S1 S0, lambda, e}
  localparam logic [4:0] TABLE [8] = '{5'b100_1_0, 5'b011_1_0, 5'b100_1_1, 5'b011_1_1,
                                       5'b100_1_1, 5'b011_1_1, 5'b101_0_0, 5'b100_0_0};

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    for (int t = 0; t < 8; t++) begin
      {n, p0, pl} = 3'(t); #1;
      checks++;
      if ({s, lambda, e} != TABLE[t]) begin
        failures++;
        $display("FAIL table row %b: got %b", 3'(t), {s, lambda, e});
      end
      c = int'(n & p0);
      checks++;
      if (int'(s) != 4 - int'(pl) + c || int'(lambda) != 1 - c || e != (n ^ p0)) begin
        failures++;
        $display("FAIL arithmetic row %b", 3'(t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
