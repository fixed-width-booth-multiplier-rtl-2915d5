// compressor_4_2: 4-2 compressor, the main cell of the CSA tree.
//
// x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout). It is two chained full
// adders: the first takes x[0..2] and produces cout, which depends only on
// x and so does not ripple along a row; the second adds its sum, x[3] and
// cin. Combinational.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;
  full_adder u_fa1 (.a(x[0]), .b(x[1]), .c(x[2]), .sum(s1),  .carry(cout));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .c(cin),  .sum(sum), .carry(carry));
endmodule
