// acpe_pkg: types and constants shared by the fixed-width ACPE Booth
// multiplier and the 2-D DCT built on it.
//
// booth_ctrl_t carries one radix-4 Booth digit d in {-2,-1,0,+1,+2} as
// one-hot magnitude controls (one, two), a sign (neg) and a nonzero flag (nz).
// dct_coef() returns the orthonormal 8-point DCT-II coefficient
// 0.5*c(k)*cos((2n+1)*k*pi/16), c(0)=1/sqrt(2), scaled by 2^14 and rounded:
// the seven distinct magnitudes are round(2^13*cos(m*pi/16)), m=1..7.
// The 2^14 scale is this design's choice; it makes a 14x14 fixed-width
// product come back in the units of the data operand.
package acpe_pkg;

  typedef struct packed {
    logic neg;  // digit is negative (and nonzero)
    logic one;  // |d| == 1
    logic two;  // |d| == 2
    logic nz;   // d != 0
  } booth_ctrl_t;

  localparam int DCT_N = 8;

  // round(2^13 * cos(m*pi/16)) for m = 0..8
  function automatic logic signed [15:0] cos16(input int unsigned m);
    case (m)
      0: cos16 = 16'sd8192;
      1: cos16 = 16'sd8035;
      2: cos16 = 16'sd7568;
      3: cos16 = 16'sd6811;
      4: cos16 = 16'sd5793;
      5: cos16 = 16'sd4551;
      6: cos16 = 16'sd3135;
      7: cos16 = 16'sd1598;
      default: cos16 = 16'sd0;
    endcase
  endfunction

  // a(k,n) = 0.5*c(k)*cos((2n+1)k*pi/16) * 2^14
  function automatic logic signed [15:0] dct_coef(input logic [2:0] k, input logic [2:0] n);
    int unsigned m;
    logic        flip;
    if (k == 3'd0) return cos16(4);  // 0.5/sqrt(2) == 0.5*cos(pi/4)
    m = ((2 * int'(n) + 1) * int'(k)) % 32;
    if (m > 16) m = 32 - m;           // cos is even, period 32
    flip = (m > 8);
    if (flip) m = 16 - m;             // cos(pi - a) = -cos(a)
    return flip ? -cos16(m) : cos16(m);
  endfunction

endpackage
