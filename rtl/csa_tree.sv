// csa_tree: tree-based carry-save reduction of ROWS operands to two.
//
// The tree is a chain of csa_level stages (rows of 4-2 compressors, plus a
// 3-2 row for a remainder of three) generated until two rows remain; level
// l takes the rows of level l-1. sum + carry equals the sum of all input
// rows modulo 2^N. Combinational; for ROWS = 6 it is two levels (6 -> 4 -> 2).
module csa_tree #(
  parameter int N    = 8,
  parameter int ROWS = 6
) (
  input  logic [N-1:0] rows [ROWS],
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);
  function automatic int next_rows(input int r);
    return 2 * (r / 4) + ((r % 4 == 3) ? 2 : (r % 4));
  endfunction

  function automatic int rows_at(input int level);
    int r;
    r = ROWS;
    for (int l = 0; l < level; l++) r = next_rows(r);
    return r;
  endfunction

  function automatic int num_levels();
    int r, n;
    r = ROWS;
    n = 0;
    while (r > 2) begin
      r = next_rows(r);
      n++;
    end
    return n;
  endfunction

  localparam int NLEV = num_levels();

  if (NLEV == 0) begin : g_direct
    assign sum   = rows[0];
    assign carry = (ROWS == 2) ? rows[ROWS-1] : '0;
  end else begin : g_tree
    for (genvar l = 0; l < NLEV; l++) begin : g_lvl
      localparam int RI = rows_at(l);
      localparam int RO = rows_at(l + 1);
      logic [N-1:0] ri [RI];
      logic [N-1:0] ro [RO];
      if (l == 0) begin : g_first
        assign ri = rows;
      end else begin : g_next
        assign ri = g_lvl[l-1].ro;
      end
      csa_level #(.N(N), .ROWS(RI)) u_level (.rows_in(ri), .rows_out(ro));
    end
    assign sum   = g_lvl[NLEV-1].ro[0];
    assign carry = g_lvl[NLEV-1].ro[1];
  end
endmodule
