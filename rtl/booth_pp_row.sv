// booth_pp_row: partial-product generator for one radix-4 Booth row.
//
// pp is the (L+1)-bit two's complement of |d|*X, one's-complemented when the
// digit is negative; neg is the bit n_i that completes the negation, so
// d*X = signed(pp) + neg. A zero digit gives pp = 0, neg = 0.
// Bit j of row i has weight 2^(j+2i) in the multiplier array. Combinational.
module booth_pp_row
  import acpe_pkg::*;
#(
  parameter int L = 8  // multiplicand width
) (
  input  logic [L-1:0] x,
  input  booth_ctrl_t  ctrl,
  output logic [L:0]   pp,
  output logic         neg
);
  logic [L:0] mag;
  always_comb begin
    unique case (1'b1)
      ctrl.one: mag = {x[L-1], x};   // sign-extended X
      ctrl.two: mag = {x, 1'b0};     // 2X
      default:  mag = '0;
    endcase
    pp  = mag ^ {(L+1){ctrl.neg}};
    neg = ctrl.neg;
  end
endmodule
