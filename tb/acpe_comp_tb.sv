// acpe_comp_tb: random major bits and nonzero flags for L = 8 with
// W = 1, 2, 3 and L = 14 with W = 1. Expected sigma is worked out as
// floor((TP_major + E[TP_minor]) / 2^L) with real-valued weights: a major
// bit of column L-W+k is worth 2^(k-W) output LSBs, a nonzero row i < Q-1
// with 2i <= L-W-1 adds 2^-(W+1), and for W = 1 a nonzero last row adds 2^-3.
module acpe_comp_tb;
  int checks = 0, failures = 0;

  logic [0:0] m81  [5];  logic [3:0] nz81;  logic [7:0]  s81;
  logic [1:0] m82  [5];  logic [3:0] nz82;  logic [7:0]  s82;
  logic [2:0] m83  [5];  logic [3:0] nz83;  logic [7:0]  s83;
  logic [0:0] m141 [8];  logic [6:0] nz141; logic [13:0] s141;

  acpe_comp                     d81  (.maj(m81),  .nz(nz81),  .sigma(s81));
  acpe_comp #(.L(8),  .W(2))    d82  (.maj(m82),  .nz(nz82),  .sigma(s82));
  acpe_comp #(.L(8),  .W(3))    d83  (.maj(m83),  .nz(nz83),  .sigma(s83));
  acpe_comp #(.L(14), .W(1))    d141 (.maj(m141), .nz(nz141), .sigma(s141));

  function automatic int expect_sigma(input int L, input int W, input int majv [], input int nzv);
    real acc;
    int  q;
    q   = L / 2;
    acc = 0.0;
    foreach (majv[r])
      for (int k = 0; k < W; k++)
        if ((majv[r] >> k) & 1) acc += 2.0 ** (k - W);
    for (int i = 0; i < q - 1; i++)
      if (((nzv >> i) & 1) && 2 * i <= L - W - 1) acc += 2.0 ** (-(W + 1));
    if (W == 1 && ((nzv >> (q - 1)) & 1)) acc += 0.125;
    return int'($floor(acc + 1e-9));
  endfunction

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mv5 [] = new[5];
    int mv8 [] = new[8];
    for (int t = 0; t < 5000; t++) begin
      nz81 = 4'($urandom); nz82 = 4'($urandom); nz83 = 4'($urandom); nz141 = 7'($urandom);
      foreach (m81[r])  m81[r]  = 1'($urandom);
      foreach (m82[r])  m82[r]  = 2'($urandom);
      foreach (m83[r])  m83[r]  = 3'($urandom);
      foreach (m141[r]) m141[r] = 1'($urandom);
      if (t == 0) begin foreach (m81[r]) m81[r] = 1'b1; nz81 = '1; end
      #1;
      foreach (m81[r]) mv5[r] = int'(m81[r]);
      checks++; if (int'(s81) != expect_sigma(8, 1, mv5, int'(nz81))) begin failures++; $display("FAIL L8W1 %0d", s81); end
      foreach (m82[r]) mv5[r] = int'(m82[r]);
      checks++; if (int'(s82) != expect_sigma(8, 2, mv5, int'(nz82))) begin failures++; $display("FAIL L8W2 %0d", s82); end
      foreach (m83[r]) mv5[r] = int'(m83[r]);
      checks++; if (int'(s83) != expect_sigma(8, 3, mv5, int'(nz83))) begin failures++; $display("FAIL L8W3 %0d", s83); end
      foreach (m141[r]) mv8[r] = int'(m141[r]);
      checks++; if (int'(s141) != expect_sigma(14, 1, mv8, int'(nz141))) begin failures++; $display("FAIL L14W1 %0d", s141); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
