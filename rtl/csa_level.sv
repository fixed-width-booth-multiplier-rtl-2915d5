// csa_level: one level of the carry-save reduction tree.
//
// The ROWS input rows are taken four at a time through rows of 4-2
// compressors (two rows out per four in; the compressors' cout ripples one
// column left only, so a level costs a constant delay). A remainder of three
// rows goes through a row of full adders, a remainder of one or two rows
// passes unchanged. All arithmetic is modulo 2^N: carries out of column N-1
// are dropped. NEXT = 2*(ROWS/4) + (ROWS%4 == 3 ? 2 : ROWS%4). Combinational.
module csa_level #(
  parameter int N    = 8,
  parameter int ROWS = 6,
  parameter int NEXT = 2 * (ROWS / 4) + ((ROWS % 4 == 3) ? 2 : (ROWS % 4))
) (
  input  logic [N-1:0] rows_in  [ROWS],
  output logic [N-1:0] rows_out [NEXT]
);
  localparam int G4  = ROWS / 4;
  localparam int REM = ROWS % 4;

  for (genvar g = 0; g < G4; g++) begin : g_c42
    logic [N:0]   cch;  // cout chain, cch[0] = 0
    logic [N-1:0] s, c;
    assign cch[0] = 1'b0;
    for (genvar b = 0; b < N; b++) begin : g_bit
      compressor_4_2 u_c42 (
        .x    ({rows_in[4*g+3][b], rows_in[4*g+2][b], rows_in[4*g+1][b], rows_in[4*g][b]}),
        .cin  (cch[b]),
        .sum  (s[b]),
        .carry(c[b]),
        .cout (cch[b+1])
      );
    end
    assign rows_out[2*g]   = s;
    assign rows_out[2*g+1] = {c[N-2:0], 1'b0};
  end

  if (REM == 3) begin : g_fa
    logic [N-1:0] s, c;
    for (genvar b = 0; b < N; b++) begin : g_bit
      full_adder u_fa (
        .a(rows_in[4*G4][b]), .b(rows_in[4*G4+1][b]), .c(rows_in[4*G4+2][b]),
        .sum(s[b]), .carry(c[b])
      );
    end
    assign rows_out[2*G4]   = s;
    assign rows_out[2*G4+1] = {c[N-2:0], 1'b0};
  end else begin : g_pass
    for (genvar r = 0; r < REM; r++) begin : g_row
      assign rows_out[2*G4+r] = rows_in[4*G4+r];
    end
  end
endmodule
