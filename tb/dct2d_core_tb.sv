// dct2d_core_tb: end-to-end test of the 2-D DCT core at its default
// parameters (14-bit ACPE multipliers, column information 1).
//
// It streams 24 blocks (extremes: all 0, all 255, a checkerboard, a ramp;
// the rest random or smooth) and compares every coefficient with a
// floating-point orthonormal 2-D DCT of the level-shifted block: each must be
// within 3 of the rounded reference and the RMS error below 1. It checks the output order and indices,
// the block latency (146 cycles from first pixel to first coefficient, 224
// cycles per block with the input always valid), and that each mechanism
// happened: input stalls (pix_valid while pix_ready is low), input bubbles
// (pix_valid low during LOAD), row passes, column passes, completed blocks.
module dct2d_core_tb;
  import dct_ref_pkg::*;

  localparam int NBLK = 24;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [7:0] pix = '0;
  logic pix_ready, coef_valid, block_done;
  logic signed [13:0] coef;
  logic [2:0] coef_u, coef_v;

  dct2d_core dut (
    .clk(clk), .rst_n(rst_n), .pix_valid(pix_valid), .pix(pix), .pix_ready(pix_ready),
    .coef_valid(coef_valid), .coef(coef), .coef_u(coef_u), .coef_v(coef_v), .block_done(block_done)
  );

  always #5 clk = ~clk;

  int unsigned blocks [NBLK][8][8];
  int cycle = 0;
  int n_stall = 0, n_bubble = 0, n_rowpass = 0, n_colpass = 0, n_blocks = 0;
  int first_pix_cycle [NBLK];
  int first_coef_cycle [NBLK];
  int max_err = 0;
  real sq_err = 0.0;
  int n_coef = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (NBLK * 400 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // block contents
  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          case (b)
            0: blocks[b][r][c] = 0;
            1: blocks[b][r][c] = 255;
            2: blocks[b][r][c] = ((r + c) % 2 == 1) ? 255 : 0;
            3: blocks[b][r][c] = 32 * c + 4 * r;
            default:
              if (b % 2 == 0) blocks[b][r][c] = $urandom_range(255);
              else blocks[b][r][c] = (100 + 10 * r + 7 * c + $urandom_range(20)) % 256;
          endcase
  end

  // pixel driver: blocks 0..3 with pix_valid always high, later ones with
  // random bubbles; pix_valid is raised early so that stalls occur
  initial begin
    int b, i;
    b = 0; i = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (b < NBLK) begin
      @(negedge clk);
      if (b >= 4 && $urandom_range(3) == 0) begin
        pix_valid = 0;
      end else begin
        pix_valid = 1;
        pix = 8'(blocks[b][i/8][i%8]);
      end
      @(posedge clk);
      if (pix_valid && !pix_ready) n_stall++;
      if (!pix_valid && pix_ready) n_bubble++;
      if (pix_valid && pix_ready) begin
        if (i == 0) first_pix_cycle[b] = cycle;
        i++;
        if (i == 64) begin i = 0; b++; end
      end
    end
    @(negedge clk);
    pix_valid = 0;
  end

  // pass counters from the core's controller
  always @(posedge clk) begin
    if (rst_n && dut.state == dut.ROW_LD) n_rowpass += (dut.vcnt == 0);
    if (rst_n && dut.state == dut.COL_LD) n_colpass += (dut.vcnt == 0);
  end

  // output checker
  initial begin
    real x [8][8];
    int  ob, oi, exp_u, exp_v, err, ref_i;
    real z;
    ob = 0; oi = 0;
    while (ob < NBLK) begin
      @(posedge clk);
      if (coef_valid) begin
        if (oi == 0) first_coef_cycle[ob] = cycle;
        exp_v = oi / 8;
        exp_u = oi % 8;
        check(coef_u == 3'(exp_u) && coef_v == 3'(exp_v),
              $sformatf("block %0d order: got (%0d,%0d) expected (%0d,%0d)", ob, coef_u, coef_v, exp_u, exp_v));
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) x[r][c] = real'(int'(blocks[ob][r][c]) - 128);
        z = dct2(x, exp_u, exp_v);
        ref_i = int'($floor(z + 0.5));
        err = int'(coef) - ref_i;
        sq_err += (real'(coef) - z) ** 2;
        n_coef++;
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        check(err <= 3, $sformatf("block %0d coef(%0d,%0d)=%0d reference %f", ob, exp_u, exp_v, coef, z));
        check(block_done == (oi == 63), $sformatf("block_done at index %0d", oi));
        oi++;
        if (oi == 64) begin
          oi = 0; ob++; n_blocks++;
        end
      end
    end
    // latency and rate, blocks fed without bubbles
    for (int b = 0; b < 4; b++)
      check(first_coef_cycle[b] - first_pix_cycle[b] == 146,
            $sformatf("block %0d latency %0d", b, first_coef_cycle[b] - first_pix_cycle[b]));
    for (int b = 1; b < 4; b++)
      check(first_pix_cycle[b] - first_pix_cycle[b-1] == 224,
            $sformatf("block %0d period %0d", b, first_pix_cycle[b] - first_pix_cycle[b-1]));
    check($sqrt(sq_err / n_coef) < 1.0, $sformatf("RMS error %f", $sqrt(sq_err / n_coef)));
    check(n_stall > 0,   "input stall never happened");
    check(n_bubble > 0,  "input bubble never happened");
    check(n_rowpass == NBLK, $sformatf("row passes %0d", n_rowpass));
    check(n_colpass == NBLK, $sformatf("column passes %0d", n_colpass));
    check(n_blocks == NBLK, "block count");
    $display("blocks=%0d stalls=%0d bubbles=%0d row_passes=%0d column_passes=%0d max|err|=%0d rms=%f",
             n_blocks, n_stall, n_bubble, n_rowpass, n_colpass, max_err, $sqrt(sq_err / n_coef));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
