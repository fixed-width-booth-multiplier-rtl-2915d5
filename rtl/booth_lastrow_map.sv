// booth_lastrow_map: mapping table of the modified Booth array.
//
// In the fixed-width array the negation bit n_{Q-1} of the last Booth row and
// that row's lowest bit p_{0,Q-1} share column L-2. This table adds them:
// e_{Q-1} (column L-2) is their sum bit, and their carry is folded together
// with the row-0 sign p_{L,0} into the sign-extension bits S2 S1 S0
// (columns L+2..L) and the bit lambda (column L-1). The table is taken as is
// from the published mapping; the column positions are those for which the
// mapping is exact, and they make the whole array add the rounding constant
// 2^(L-1): S = 4 - p_{L,0} + c and lambda = 1 - c with c = n*p0.
// Combinational.
module booth_lastrow_map (
  input  logic       n_last,    // n_{Q-1}
  input  logic       p0_last,   // p_{0,Q-1}
  input  logic       pl_first,  // p_{L,0}
  output logic [2:0] s,         // {S2, S1, S0}
  output logic       lambda,
  output logic       e_last     // e_{Q-1}
);
  always_comb begin
    unique case ({n_last, p0_last, pl_first})
      3'b000: {s, lambda, e_last} = {3'b100, 1'b1, 1'b0};
      3'b001: {s, lambda, e_last} = {3'b011, 1'b1, 1'b0};
      3'b010: {s, lambda, e_last} = {3'b100, 1'b1, 1'b1};
      3'b011: {s, lambda, e_last} = {3'b011, 1'b1, 1'b1};
      3'b100: {s, lambda, e_last} = {3'b100, 1'b1, 1'b1};
      3'b101: {s, lambda, e_last} = {3'b011, 1'b1, 1'b1};
      3'b110: {s, lambda, e_last} = {3'b101, 1'b0, 1'b0};
      default: {s, lambda, e_last} = {3'b100, 1'b0, 1'b0};  // 3'b111
    endcase
  end
endmodule
