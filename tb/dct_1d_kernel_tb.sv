// dct_1d_kernel_tb: loads random 8-point vectors (range +-1000, as in the
// DCT's passes) and issues all 8 coefficients, in order and in a random
// order. Each result must arrive exactly one cycle after its issue and be
// within 4 of the floating-point orthonormal DCT-II coefficient (four
// products, each within 1-2 LSB of the exact one); the RMS
// error must stay below 1.2. Also checks that all four multipliers' work
// is used: a vector with a single nonzero element in each position.
module dct_1d_kernel_tb;
  import dct_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic load = 0, issue = 0;
  logic signed [13:0] vec [8];
  logic [2:0] k = '0;
  logic y_valid;
  logic signed [13:0] y;

  dct_1d_kernel dut (.clk(clk), .rst_n(rst_n), .load(load), .vec(vec), .issue(issue), .k(k),
                     .y_valid(y_valid), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real sq = 0.0;
  int  nres = 0;

  task automatic run_vector(input int v [8], input bit shuffle);
    int order [8];
    real z;
    int  e;
    foreach (order[i]) order[i] = i;
    if (shuffle) order.shuffle();
    @(negedge clk);
    foreach (vec[i]) vec[i] = 14'(v[i]);
    load = 1;
    @(negedge clk);
    load = 0;
    for (int t = 0; t < 8; t++) begin
      issue = 1; k = 3'(order[t]);
      @(negedge clk);
      issue = 0;
      checks++;
      if (!y_valid) begin failures++; $display("FAIL no y_valid one cycle after issue"); end
      z = 0.0;
      for (int n = 0; n < 8; n++) z += dct_a(order[t], n) * v[n];
      e = int'(y) - int'($floor(z + 0.5));
      sq += (real'(y) - z) ** 2;
      nres++;
      checks++;
      if (e > 4 || e < -4) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d y=%0d reference %f", order[t], y, z);
      end
    end
    checks++;
    @(negedge clk);
    if (y_valid) begin failures++; $display("FAIL y_valid without issue"); end
  endtask

  initial begin
    int v [8];
    foreach (vec[i]) vec[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 8; p++) begin
      foreach (v[i]) v[i] = (i == p) ? 1000 : 0;
      run_vector(v, 0);
    end
    for (int t = 0; t < 500; t++) begin
      foreach (v[i]) v[i] = int'($urandom_range(2000)) - 1000;
      run_vector(v, t % 2 == 1);
    end
    checks++;
    if ($sqrt(sq / nres) >= 1.2) begin failures++; $display("FAIL RMS %f", $sqrt(sq / nres)); end
    $display("rms error %f", $sqrt(sq / nres));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
