// transpose_sra: 8x8 shift-register array of the 2-D DCT.
//
// One array is both the block buffer and the transposition memory. With
// shift_in, all 64 words move one place along the row-major chain
// (a[r][c] <= next word, a[7][7] <= din), so 64 shifts fill it with a block
// in row-major order, and 8 shifts retire the head row while 8 new words
// enter at the tail. With shift_col every row rotates one place left
// (a[r][c] <= a[r][c+1], a[r][7] <= a[r][0]), bringing the next column to
// column 0. head_row is row 0 and head_col is column 0, both combinational
// from the registers. shift_in has priority over shift_col. Reset clears the
// array. The organisation of the array is this design's own.
module transpose_sra
  import acpe_pkg::*;
#(
  parameter int DW = 14
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_in,
  input  logic signed [DW-1:0] din,
  input  logic                 shift_col,
  output logic signed [DW-1:0] head_row [DCT_N],
  output logic signed [DW-1:0] head_col [DCT_N]
);
  logic signed [DW-1:0] a [DCT_N][DCT_N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < DCT_N; r++)
        for (int c = 0; c < DCT_N; c++) a[r][c] <= '0;
    end else if (shift_in) begin
      for (int r = 0; r < DCT_N; r++)
        for (int c = 0; c < DCT_N; c++)
          if (c < DCT_N - 1)      a[r][c] <= a[r][c+1];
          else if (r < DCT_N - 1) a[r][c] <= a[r+1][0];
          else                    a[r][c] <= din;
    end else if (shift_col) begin
      for (int r = 0; r < DCT_N; r++)
        for (int c = 0; c < DCT_N; c++) a[r][c] <= a[r][(c+1)%DCT_N];
    end
  end

  always_comb begin
    for (int i = 0; i < DCT_N; i++) begin
      head_row[i] = a[0][i];
      head_col[i] = a[i][0];
    end
  end
endmodule
