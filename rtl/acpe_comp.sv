// acpe_comp: adaptive conditional-probability compensation circuit.
//
// The truncation part (TP, columns 0..L-1) of the fixed-width Booth array is
// split into TP_major, the W columns L-W..L-1 next to the main part, and
// TP_minor, columns 0..L-W-1. The bias added to the main part at column L is
//   sigma = floor( (TP_major + E[TP_minor]) / 2^L ).
// TP_major is summed exactly from its bits. TP_minor is not built; it is
// replaced by its expectation conditioned on which Booth digits are nonzero:
// a zero digit gives an all-zero row, and each bit of a nonzero row is taken
// as 1 with probability 1/2. Every nonzero row i with 2i <= L-W-1 then has an
// expected minor part of exactly 2^(L-W-1) (its bits 2^(2i)..2^(L-W-1) plus
// n_i at 2^(2i), halved). For W = 1 the last row also has one minor bit,
// e_{Q-1} at column L-2, worth 2^(L-3) on average (1/8 of an output LSB;
// the other terms are then multiples of 1/4, so with the floor this term
// never changes sigma, but it keeps the estimate exact).
// In units of 2^(L-W-2): sigma = (4*M + E) >> (W+2), M being the weighted
// sum of the major bits. The split into major and minor parts and the column
// information W follow the published method; the estimate of TP_minor and
// the floor are this design's own choices.
//
// maj[r][k] is the bit of column L-W+k contributed by partial-product row r
// (r < Q) or, for r = Q, by the n_i bits and lambda. Combinational.
module acpe_comp #(
  parameter int L = 8,   // operand width (even)
  parameter int W = 1    // column information: number of TP_major columns
) (
  input  logic [W-1:0] maj [L/2+1],
  input  logic [L/2-1:0] nz,
  output logic [L-1:0] sigma
);
  localparam int Q  = L / 2;
  localparam int SW = L + W + 4;

  logic [SW-1:0] m_sum, e_sum, total;

  always_comb begin
    m_sum = '0;
    for (int r = 0; r <= Q; r++) m_sum += SW'(maj[r]);
    e_sum = '0;
    for (int i = 0; i < Q - 1; i++)
      if (2 * i <= L - W - 1 && nz[i]) e_sum += SW'(2);
    if (W == 1 && nz[Q-1]) e_sum += SW'(1);  // exact, though it never moves the floor
    total = (m_sum << 2) + e_sum;
    sigma = L'(total >> (W + 2));
  end
endmodule
