// booth_pp_row_tb: for every 8-bit X and every digit d in {-2..2}, checks
// that the row value signed(pp) + neg equals d*X, and that neg = (d < 0).
module booth_pp_row_tb;
  import acpe_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0]  x;
  booth_ctrl_t ctrl;
  logic [8:0]  pp;
  logic        neg;
  booth_pp_row #(.L(8)) dut (.x(x), .ctrl(ctrl), .pp(pp), .neg(neg));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs, got;
    for (int d = -2; d <= 2; d++)
      for (int a = 0; a < 256; a++) begin
        x = 8'(a);
        ctrl.neg = d < 0;
        ctrl.one = (d == 1 || d == -1);
        ctrl.two = (d == 2 || d == -2);
        ctrl.nz  = d != 0;
        #1;
        xs  = a >= 128 ? a - 256 : a;
        got = int'($signed(pp)) + int'(neg);
        checks++;
        if (got != d * xs || neg != (d < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL d=%0d x=%0d pp=%b neg=%b", d, xs, pp, neg);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
