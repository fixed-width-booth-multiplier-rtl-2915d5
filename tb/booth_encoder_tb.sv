// booth_encoder_tb: checks all eight triplets against the radix-4 digit
// d = -2*y2 + y1 + y0 (neg only for d < 0, nz for d != 0, one/two for |d|).
module booth_encoder_tb;
  import acpe_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0]  trip;
  booth_ctrl_t ctrl;
  booth_encoder dut (.trip(trip), .ctrl(ctrl));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, mag;
    for (int t = 0; t < 8; t++) begin
      trip = 3'(t); #1;
      d   = -2 * int'(trip[2]) + int'(trip[1]) + int'(trip[0]);
      mag = d < 0 ? -d : d;
      checks++;
      if (ctrl.neg != (d < 0) || ctrl.nz != (d != 0) || ctrl.one != (mag == 1) || ctrl.two != (mag == 2)) begin
        failures++;
        $display("FAIL trip=%b ctrl=%b d=%0d", trip, ctrl, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
