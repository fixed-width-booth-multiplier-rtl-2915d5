// acpe_booth_mult: L x L signed fixed-width radix-4 Booth multiplier with an
// adaptive conditional-probability estimator (ACPE) compensation.
//
// A full L x L Booth multiplier builds Q = L/2 partial-product rows over 2L
// columns. A fixed-width multiplier returns only the upper L columns, so the
// truncation part (columns 0..L-1) is not added up. Chopping it (direct
// truncation) biases the result by several LSBs; this design instead adds a
// bias sigma at column L that is computed from the W truncated columns next
// to the output (TP_major, summed exactly) and an estimate of the rest
// (TP_minor), see acpe_comp.
//
// Array layout (Booth digit i from y[2i+1:2i-1], row bit p_{j,i} at column
// j+2i): the negation bit n_i of row i < Q-1 sits at column 2i; the last
// row's n_{Q-1} is merged with p_{0,Q-1} by the mapping table
// (booth_lastrow_map) into e_{Q-1} (column L-2), lambda (column L-1) and the
// row-0 sign-extension bits S2..S0 (columns L+2..L); rows i >= 1 carry
// ~p_{L,i} at column L+2i, and a constant word completes the sign
// extension. The complete array sums to X*Y + 2^(L-1), so its upper half is
// the rounded product; the output p approximates that (within 1 LSB for
// L = 8, W = 1, and usually equal to it).
//
// Main-part rows (Q sign/partial-product rows, the constant, sigma) are
// reduced by a 4-2 compressor CSA tree and added by a parallel-prefix adder.
// Purely combinational. The mapping table, the MP/TP split, the column
// information W, the CSA tree and the prefix adder follow the published
// architecture; bit positions, the constant and the estimator are derived
// here.
module acpe_booth_mult
  import acpe_pkg::*;
#(
  parameter int L = 8,  // operand and product width, even, >= 4
  parameter int W = 1   // column information, 1 <= W <= L-2
) (
  input  logic [L-1:0] x,  // multiplicand
  input  logic [L-1:0] y,  // multiplier (Booth recoded)
  output logic [L-1:0] p   // approx. floor((x*y + 2^(L-1)) / 2^L)
);
  localparam int Q    = L / 2;
  localparam int ROWS = Q + 2;

  // Upper half of the sign-extension constant -(2^(L+2) + sum 2^(L+2i)).
  function automatic logic [L-1:0] sign_const();
    logic [L-1:0] c;
    c = L'(4);
    for (int i = 1; i < Q; i++) c += L'(1) << (2 * i);
    return -c;
  endfunction
  localparam logic [L-1:0] CUP = sign_const();

  booth_ctrl_t ctrl [Q];
  logic [L:0]  pp   [Q];
  logic [Q-1:0] neg, nz;
  logic [L:0]  yx;

  assign yx = {y, 1'b0};

  for (genvar i = 0; i < Q; i++) begin : g_row
    booth_encoder u_enc (.trip(yx[2*i+2 -: 3]), .ctrl(ctrl[i]));
    booth_pp_row #(.L(L)) u_pp (.x(x), .ctrl(ctrl[i]), .pp(pp[i]), .neg(neg[i]));
    assign nz[i] = ctrl[i].nz;
  end

  logic [2:0] s_ext;
  logic       lambda, e_last;
  booth_lastrow_map u_map (
    .n_last(neg[Q-1]), .p0_last(pp[Q-1][0]), .pl_first(pp[0][L]),
    .s(s_ext), .lambda(lambda), .e_last(e_last)
  );

  // Truncation-part major bits and the compensation bias.
  logic [W-1:0] maj [Q+1];
  logic [L-1:0] sigma;

  always_comb begin
    for (int r = 0; r <= Q; r++) maj[r] = '0;
    for (int k = 0; k < W; k++) begin
      int col;
      col = L - W + k;
      for (int i = 0; i < Q; i++) begin
        if (col >= 2 * i && col - 2 * i <= L - 1)
          maj[i][k] = (i == Q - 1 && col == 2 * i) ? e_last : pp[i][col-2*i];
      end
      if (col == L - 1) maj[Q][k] = lambda;
      else if (col % 2 == 0 && col / 2 < Q - 1) maj[Q][k] = neg[col/2];
    end
  end

  acpe_comp #(.L(L), .W(W)) u_comp (.maj(maj), .nz(nz), .sigma(sigma));

  // Main-part rows, column c of the array at bit c-L.
  logic [L-1:0] mp [ROWS];

  always_comb begin
    for (int r = 0; r < ROWS; r++) mp[r] = '0;
    mp[0][2:0] = s_ext;
    for (int i = 1; i < Q; i++) begin
      for (int j = 0; j < L; j++)
        if (j + 2 * i >= L) mp[i][j+2*i-L] = pp[i][j];
      mp[i][2*i] = ~pp[i][L];
    end
    mp[Q]   = CUP;
    mp[Q+1] = sigma;
  end

  logic [L-1:0] sum_row, carry_row;
  csa_tree #(.N(L), .ROWS(ROWS)) u_tree (.rows(mp), .sum(sum_row), .carry(carry_row));
  prefix_adder #(.N(L)) u_add (.a(sum_row), .b(carry_row), .s(p));

endmodule
