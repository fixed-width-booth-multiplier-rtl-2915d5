// booth_encoder: radix-4 (modified) Booth recoding of one multiplier digit.
//
// The overlapping triplet {y[2i+1], y[2i], y[2i-1]} becomes the digit
// d = -2*y[2i+1] + y[2i] + y[2i-1]. Output is one-hot magnitude (one/two),
// sign (neg) and a nonzero flag (nz). The triplet 111 (d = -0) is treated as
// zero with neg = 0, so a zero digit never produces a negation bit; that
// choice is this design's own. Purely combinational.
module booth_encoder
  import acpe_pkg::*;
(
  input  logic [2:0]  trip,  // {y[2i+1], y[2i], y[2i-1]}
  output booth_ctrl_t ctrl
);
  always_comb begin
    ctrl.one = trip[1] ^ trip[0];
    ctrl.two = (trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]);
    ctrl.nz  = ctrl.one | ctrl.two;
    ctrl.neg = trip[2] & ~(trip[1] & trip[0]);
  end
endmodule
