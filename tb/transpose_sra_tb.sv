// transpose_sra_tb: fills the array with 64 numbered words, checks the head
// row and column, retires rows by shifting in new words, then rotates
// columns and checks that column c reaches the head after c shifts; all
// against a model array kept in the testbench.
module transpose_sra_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic shift_in = 0, shift_col = 0;
  logic signed [13:0] din = '0;
  logic signed [13:0] head_row [8];
  logic signed [13:0] head_col [8];
  int model [64];

  transpose_sra dut (.clk(clk), .rst_n(rst_n), .shift_in(shift_in), .din(din), .shift_col(shift_col),
                     .head_row(head_row), .head_col(head_col));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 8; i++) begin
      checks += 2;
      if (int'(head_row[i]) != model[i])     begin failures++; $display("FAIL head_row[%0d]=%0d model %0d", i, head_row[i], model[i]); end
      if (int'(head_col[i]) != model[8 * i]) begin failures++; $display("FAIL head_col[%0d]=%0d model %0d", i, head_col[i], model[8*i]); end
    end
  endtask

  initial begin
    int tmp [64];
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    compare();
    for (int step = 0; step < 160; step++) begin
      @(negedge clk);
      shift_in = 0; shift_col = 0;
      if (step < 96 || step % 3 != 0) begin
        shift_in = 1;
        din = 14'($urandom_range(8000)) - 14'sd4000;
        for (int i = 0; i < 63; i++) model[i] = model[i+1];
        model[63] = int'(din);
      end else begin
        shift_col = 1;
        tmp = model;
        for (int r = 0; r < 8; r++)
          for (int c = 0; c < 8; c++) model[8*r+c] = tmp[8*r+(c+1)%8];
      end
      @(negedge clk);
      shift_in = 0; shift_col = 0;
      compare();
    end
    // both requested: shift_in wins
    @(negedge clk);
    shift_in = 1; shift_col = 1; din = 14'sd77;
    for (int i = 0; i < 63; i++) model[i] = model[i+1];
    model[63] = 77;
    @(negedge clk);
    shift_in = 0; shift_col = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
