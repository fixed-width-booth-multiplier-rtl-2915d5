// acpe_booth_mult_tb: self-checking test of the fixed-width ACPE Booth
// multiplier. L = 8 is checked exhaustively for column information W = 1, 2
// and 3 against the integer model in acpe_mult_model_pkg; L = 14, W = 1 (the
// DCT configuration), L = 16, W = 1 and L = 18, W = 2 (longer multipliers)
// are checked on random operands. It also checks that the
// result never strays more than 2 LSB from the rounded exact product, that
// its mean error is far below that of direct truncation, and the example
// X = 01011001, Y = 01001101 (89 * 77 = 6853, rounded upper byte 27).
module acpe_booth_mult_tb;
  import acpe_mult_model_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  x8, y8;
  logic [7:0]  p8_w1, p8_w2, p8_w3;
  logic [13:0] x14, y14, p14;
  logic [15:0] x16, y16, p16;
  logic [17:0] x18, y18, p18;

  acpe_booth_mult                  dut_w1 (.x(x8), .y(y8), .p(p8_w1));
  acpe_booth_mult #(.L(8), .W(2))  dut_w2 (.x(x8), .y(y8), .p(p8_w2));
  acpe_booth_mult #(.L(8), .W(3))  dut_w3 (.x(x8), .y(y8), .p(p8_w3));
  acpe_booth_mult #(.L(14), .W(1)) dut_14 (.x(x14), .y(y14), .p(p14));
  acpe_booth_mult #(.L(16), .W(1)) dut_16 (.x(x16), .y(y16), .p(p16));
  acpe_booth_mult #(.L(18), .W(2)) dut_18 (.x(x18), .y(y18), .p(p18));

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xs, ys, rp, e, sum_err, sum_dt;
    int max_err;
    // worked example
    x8 = 8'b01011001; y8 = 8'b01001101; #1;
    check(sext(p8_w1, 8), 27, "example 89*77");
    // exhaustive L = 8
    max_err = 0; sum_err = 0; sum_dt = 0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a); y8 = 8'(b); #1;
        xs = sext(a, 8); ys = sext(b, 8);
        check(sext(p8_w1, 8), acpe_model(xs, ys, 8, 1), $sformatf("L8W1 %0d*%0d", xs, ys));
        check(sext(p8_w2, 8), acpe_model(xs, ys, 8, 2), $sformatf("L8W2 %0d*%0d", xs, ys));
        check(sext(p8_w3, 8), acpe_model(xs, ys, 8, 3), $sformatf("L8W3 %0d*%0d", xs, ys));
        rp = rounded_product(xs, ys, 8);
        e  = sext(p8_w1, 8) - rp;
        if (rp >= -120 && rp <= 120) begin
          sum_err += e;
          sum_dt  += ((xs * ys) >>> 8) - rp;  // error of a plain truncated (unrounded) product
          if ((e < 0 ? -e : e) > max_err) max_err = int'(e < 0 ? -e : e);
        end
      end
    checks++;
    if (max_err > 1) begin failures++; $display("FAIL max error %0d", max_err); end
    checks++;
    if ((sum_err < 0 ? -sum_err : sum_err) * 4 > (sum_dt < 0 ? -sum_dt : sum_dt)) begin
      failures++; $display("FAIL mean error %0d not below truncation %0d", sum_err, sum_dt);
    end
    $display("L=8 W=1: max |err| %0d, summed err %0d (plain truncation %0d)", max_err, sum_err, sum_dt);
    // random L = 14
    for (int t = 0; t < 50000; t++) begin
      x14 = 14'($urandom); y14 = 14'($urandom); #1;
      xs = sext(x14, 14); ys = sext(y14, 14);
      check(sext(p14, 14), acpe_model(xs, ys, 14, 1), $sformatf("L14 %0d*%0d", xs, ys));
      e = sext(p14, 14) - rounded_product(xs, ys, 14);
      checks++;
      if (e > 2 || e < -2) begin failures++; $display("FAIL L14 error %0d", e); end
    end
    // random L = 16 and L = 18
    for (int t = 0; t < 20000; t++) begin
      x16 = 16'($urandom); y16 = 16'($urandom);
      x18 = 18'($urandom); y18 = 18'($urandom); #1;
      check(sext(p16, 16), acpe_model(sext(x16, 16), sext(y16, 16), 16, 1), "L16");
      check(sext(p18, 18), acpe_model(sext(x18, 18), sext(y18, 18), 18, 2), "L18");
      e = sext(p16, 16) - rounded_product(sext(x16, 16), sext(y16, 16), 16);
      checks++;
      if (e > 2 || e < -2) begin failures++; $display("FAIL L16 error %0d", e); end
      e = sext(p18, 18) - rounded_product(sext(x18, 18), sext(y18, 18), 18);
      checks++;
      if (e > 2 || e < -2) begin failures++; $display("FAIL L18 error %0d", e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
